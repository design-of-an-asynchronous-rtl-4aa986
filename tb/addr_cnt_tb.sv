// addr_cnt_tb: steps a 5-bit and a full 16-bit load counter through CNT
// handshakes; checks the count, the full flag on the last address, the wrap to
// 0 of the small one and the ACK latency.
module addr_cnt_tb;
  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        req_s, ack_s, full_s;
  logic [4:0]  addr_s;
  logic        req_l, ack_l, full_l;
  logic [15:0] addr_l;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  addr_cnt #(.WIDTH(5), .DELAY(2)) dut_s (.clk(clk), .rst(rst), .cnt_req(req_s), .cnt_ack(ack_s), .addr(addr_s), .full(full_s));
  addr_cnt dut_l (.clk(clk), .rst(rst), .cnt_req(req_l), .cnt_ack(ack_l), .addr(addr_l), .full(full_l));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n;
    req_s = 1'b0;
    req_l = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk); #1;
    check(addr_s == 0 && addr_l == 0, "counters cleared by reset");
    for (int i = 1; i <= 70; i++) begin
      @(negedge clk);
      req_s = 1'b1;
      req_l = 1'b1;
      n = 0;
      do begin @(posedge clk); #1; n++; end while (!ack_s && n < 20);
      check(n == 2, $sformatf("small counter ACK after %0d cycles", n));
      check(ack_l, "default counter ACK after one cycle");
      check(addr_s == 5'(i % 32), $sformatf("small counter %0d expected %0d", addr_s, i % 32));
      check(full_s == ((i % 32) == 31), "small counter full flag");
      check(addr_l == 16'(i), $sformatf("default counter %0d expected %0d", addr_l, i));
      check(!full_l, "default counter full flag");
      @(negedge clk);
      req_s = 1'b0;
      req_l = 1'b0;
      @(posedge clk); #1;
      check(!ack_s && !ack_l, "ACK released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

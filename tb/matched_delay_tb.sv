// matched_delay_tb: checks the REQ-to-ACK delay of the matched delay element
// for DELAY = 1 and DELAY = 4: ACK must rise exactly DELAY cycles after REQ is
// raised, stay high while REQ is high, and fall one cycle after REQ falls.
module matched_delay_tb;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic req1, req4;
  logic ack1, ack4;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  matched_delay #(.DELAY(1)) dut1 (.clk(clk), .rst(rst), .req(req1), .ack(ack1));
  matched_delay #(.DELAY(4)) dut4 (.clk(clk), .rst(rst), .req(req4), .ack(ack4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Raise req on one instance, count cycles to ack, hold, drop, count again.
  task automatic one(input int d, input int hold);
    int n;
    n = 0;
    @(negedge clk);
    if (d == 1) req1 = 1'b1; else req4 = 1'b1;
    do begin
      @(posedge clk); #1;
      n++;
    end while (((d == 1) ? ack1 : ack4) == 1'b0 && n < 20);
    check(n == d, $sformatf("DELAY=%0d: ack after %0d cycles", d, n));
    repeat (hold) begin
      @(posedge clk); #1;
      check(((d == 1) ? ack1 : ack4) == 1'b1, "ack dropped while req high");
    end
    @(negedge clk);
    if (d == 1) req1 = 1'b0; else req4 = 1'b0;
    @(posedge clk); #1;
    check(((d == 1) ? ack1 : ack4) == 1'b0, "ack did not fall one cycle after req");
  endtask

  initial begin
    req1 = 1'b0;
    req4 = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk); #1;
    check(ack1 == 1'b0 && ack4 == 1'b0, "ack low after reset");
    for (int i = 0; i < 20; i++) begin
      one(1, $urandom_range(0, 3));
      one(4, $urandom_range(0, 3));
      repeat ($urandom_range(0, 2)) @(posedge clk);
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

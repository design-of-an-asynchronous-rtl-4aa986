// tt_mem_tb: writes random bytes to random addresses of the full 64K x 8 table
// in write mode (address from ADDR), reads them back in read mode (address
// from TT_ADDR) and compares with a copy kept here. Also checks the matched
// delay of 2 cycles and that a write leaves DOUT alone.
module tt_mem_tb;
  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        mem_req, mem_ack, mem_rw;
  logic [15:0] tt_addr, addr;
  logic [7:0]  din, dout;
  int          checks = 0, failures = 0;
  logic [7:0]  model [int];

  always #5 clk = ~clk;

  tt_mem dut (
    .clk(clk), .rst(rst), .mem_req(mem_req), .mem_ack(mem_ack), .mem_rw(mem_rw),
    .tt_addr(tt_addr), .addr(addr), .din(din), .dout(dout)
  );

  task automatic access(input bit rw, input int a, input int d);
    int n;
    @(negedge clk);
    mem_rw = rw;
    if (rw) begin
      tt_addr = 16'(a);
      addr    = 16'($urandom);
    end else begin
      addr    = 16'(a);
      tt_addr = 16'($urandom);
    end
    din     = 8'(d);
    mem_req = 1'b1;
    n = 0;
    do begin @(posedge clk); #1; n++; end while (!mem_ack && n < 20);
    checks++;
    if (n != 2) begin failures++; $display("FAIL: MEM_ACK after %0d cycles", n); end
    @(negedge clk);
    mem_req = 1'b0;
    do @(posedge clk); while (mem_ack);
  endtask

  initial begin
    int a, d, last_rd;
    int addrs[$];
    mem_req = 1'b0; mem_rw = 1'b0; tt_addr = '0; addr = '0; din = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    addrs = '{0, 1, 255, 256, 4095, 4096, 32768, 65534, 65535};
    for (int i = 0; i < 300; i++) addrs.push_back($urandom_range(0, 65535));
    foreach (addrs[i]) begin
      d = $urandom_range(0, 255);
      model[addrs[i]] = 8'(d);
      access(1'b0, addrs[i], d);
    end
    last_rd = -1;
    for (int i = 0; i < 600; i++) begin
      a = addrs[$urandom_range(0, addrs.size() - 1)];
      if ($urandom_range(0, 3) == 0) begin
        // interleaved write: DOUT must keep the last read value
        d = $urandom_range(0, 255);
        access(1'b0, a, d);
        if (last_rd >= 0) begin
          checks++;
          if (dout !== model[last_rd]) begin failures++; $display("FAIL: write disturbed DOUT"); end
        end
        model[a] = 8'(d);
      end else begin
        access(1'b1, a, 0);
        last_rd = a;
        checks++;
        if (dout !== model[a]) begin
          failures++;
          $display("FAIL: read %h got %h expected %h", a, dout, model[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

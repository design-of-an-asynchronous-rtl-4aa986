// dacal_tb: runs 40 DACAL handshakes after reset and compares the dither array
// number with the usage order 0,8,12,4,2,10,14,6,3,11,15,7,1,9,13,5, written
// out here as a table, including the wrap back to 0. Checks the ACK latency.
module dacal_tb;
  localparam int DELAY = 1;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       dacal_req, dacal_ack;
  logic [3:0] da;
  int         checks = 0, failures = 0;
  int         order[16] = '{0, 8, 12, 4, 2, 10, 14, 6, 3, 11, 15, 7, 1, 9, 13, 5};

  always #5 clk = ~clk;

  dacal #(.DELAY(DELAY)) dut (.clk(clk), .rst(rst), .dacal_req(dacal_req), .dacal_ack(dacal_ack), .da(da));

  initial begin
    int n;
    dacal_req = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (da !== 4'd0) begin failures++; $display("FAIL: DA after reset %0d", da); end
    for (int i = 1; i <= 40; i++) begin
      @(negedge clk);
      dacal_req = 1'b1;
      n = 0;
      do begin
        @(posedge clk); #1;
        n++;
      end while (!dacal_ack && n < 20);
      checks++;
      if (n != DELAY) begin failures++; $display("FAIL: ACK after %0d cycles", n); end
      checks++;
      if (da !== 4'(order[i % 16])) begin
        failures++;
        $display("FAIL: step %0d DA=%0d expected %0d", i, da, order[i % 16]);
      end
      repeat ($urandom_range(0, 2)) @(posedge clk);
      @(negedge clk);
      dacal_req = 1'b0;
      do @(posedge clk); while (dacal_ack);
      #1;
      checks++;
      if (da !== 4'(order[i % 16])) begin failures++; $display("FAIL: DA not held"); end
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

// data_latch_tb: loads random values into the 8-bit latch at random times and
// checks that q follows d one cycle after a load and holds otherwise.
module data_latch_tb;
  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       load;
  logic [7:0] d, q, model;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_latch #(.WIDTH(8)) dut (.clk(clk), .rst(rst), .load(load), .d(d), .q(q));

  initial begin
    load = 1'b0;
    d    = 8'hA5;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== 8'h00) begin failures++; $display("FAIL: q not cleared by reset"); end
    rst   = 1'b0;
    model = 8'h00;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      load = ($urandom_range(0, 2) == 0);
      d    = 8'($urandom);
      if (load) model = d;
      @(posedge clk); #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL: cycle %0d q=%h expected %h", i, q, model);
      end
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

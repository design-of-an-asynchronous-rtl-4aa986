// ditherer_ctrl_tb: surrounds the controller with responders for the four
// datapath handshakes (random ACK delays) and a software model. It loads a
// pretend table of 5 entries (cnt_full is raised for the fifth), then sends
// three Cb/Cr pairs with four Lum values each. Every rising REQ is logged and
// the log is compared with the expected order: per table entry MEM, CNT,
// software ACK; per Lum TT, MEM, OUT, DACAL. It also checks MEM_RW (write
// while loading, read afterwards), the latch strobes and the four-phase rule
// on each datapath handshake.
module ditherer_ctrl_tb;
  localparam int ENTRIES = 5;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic din_req, din_ack, chroma_req, chroma_ack, lum_req, lum_ack, out_req, loaded;
  logic out_ack = 1'b0;
  logic lat_chroma, lat_lum, tt_req, tt_ack, dacal_req, dacal_ack;
  logic cnt_req, cnt_ack, cnt_full, mem_req, mem_ack, mem_rw;
  int   checks = 0, failures = 0;
  int   n_cnt = 0, n_lat_ch = 0, n_lat_lum = 0;
  string log_q[$], exp_q[$];

  always #5 clk = ~clk;

  ditherer_ctrl dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // A datapath responder: ACK follows REQ after a random delay.
  task automatic responder(ref logic req, ref logic ack, input string name);
    forever begin
      @(posedge clk);
      #1;
      if (req && !ack) begin
        log_q.push_back(name);
        if (name == "MEM") check(mem_rw == loaded, "MEM_RW matches the mode");
        repeat ($urandom_range(0, 3)) @(posedge clk);
        #1 ack = 1'b1;
        if (name == "CNT") n_cnt++;
        while (req) begin @(posedge clk); #1; end
        repeat ($urandom_range(0, 2)) @(posedge clk);
        #1 ack = 1'b0;
      end
    end
  endtask

  initial fork
    responder(tt_req, tt_ack, "TT");
    responder(dacal_req, dacal_ack, "DA");
    responder(cnt_req, cnt_ack, "CNT");
    responder(mem_req, mem_ack, "MEM");
  join_none

  assign cnt_full = (n_cnt == ENTRIES - 1);

  always @(posedge clk) begin
    if (lat_chroma) n_lat_ch++;
    if (lat_lum)    n_lat_lum++;
    if (out_req && !out_ack) begin
      // the output channel
      out_ack <= 1'b1;
    end else if (!out_req) out_ack <= 1'b0;
  end
  always @(posedge clk) if (out_req && !out_ack) log_q.push_back("OUT");

  task automatic sw_send(ref logic req, ref logic ack);
    @(negedge clk);
    req = 1'b1;
    while (!ack) @(posedge clk);
    repeat ($urandom_range(0, 2)) @(posedge clk);
    @(negedge clk);
    req = 1'b0;
    while (ack) @(posedge clk);
  endtask

  initial begin
    din_req = 0; chroma_req = 0; lum_req = 0;
    tt_ack = 0; dacal_ack = 0; cnt_ack = 0; mem_ack = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(mem_rw == 1'b0 && !loaded, "write mode after reset");
    for (int i = 0; i < ENTRIES; i++) begin
      sw_send(din_req, din_ack);
      exp_q.push_back("MEM");
      exp_q.push_back("CNT");
    end
    repeat (2) @(posedge clk);
    check(loaded && mem_rw, "read mode after the last entry");
    for (int p = 0; p < 3; p++) begin
      sw_send(chroma_req, chroma_ack);
      for (int l = 0; l < 4; l++) begin
        sw_send(lum_req, lum_ack);
        exp_q.push_back("TT");
        exp_q.push_back("MEM");
        exp_q.push_back("OUT");
        exp_q.push_back("DA");
      end
    end
    repeat (30) @(posedge clk);
    check(log_q.size() == exp_q.size(), $sformatf("%0d handshakes, expected %0d", log_q.size(), exp_q.size()));
    foreach (exp_q[i])
      if (i < log_q.size()) check(log_q[i] == exp_q[i], $sformatf("step %0d was %s, expected %s", i, log_q[i], exp_q[i]));
    check(n_lat_ch == 3, $sformatf("%0d chroma latch strobes", n_lat_ch));
    check(n_lat_lum == 12, $sformatf("%0d lum latch strobes", n_lat_lum));
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

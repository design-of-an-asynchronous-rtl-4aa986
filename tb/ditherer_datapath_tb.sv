// ditherer_datapath_tb: plays the controller's part against the datapath.
// It loads the whole 64K table through MEM (write mode) and CNT handshakes,
// with entry a = (a*7 + (a>>8)*13 + 1) mod 256, then switches to read mode and
// runs 200 Cb/Cr pairs of four Lum values each: latch, TT, MEM read, DACAL.
// Each DOUT is compared with the table entry at the address worked out here
// from the DA order list and the chroma section ranges.
module ditherer_datapath_tb;
  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [7:0] cb, cr, lum, din, dout;
  logic       lat_chroma, lat_lum, tt_req, tt_ack, dacal_req, dacal_ack;
  logic       cnt_req, cnt_ack, cnt_full, mem_req, mem_ack, mem_rw;
  int         checks = 0, failures = 0, full_seen = 0;
  int         order[16] = '{0, 8, 12, 4, 2, 10, 14, 6, 3, 11, 15, 7, 1, 9, 13, 5};

  always #5 clk = ~clk;

  ditherer_datapath dut (.*);

  function automatic logic [7:0] entry(input int a);
    return 8'(a * 7 + (a >> 8) * 13 + 1);
  endfunction

  function automatic int sec(input int v);
    if (v <= 32)  return 0;
    if (v <= 96)  return 1;
    if (v <= 160) return 2;
    return 3;
  endfunction

  task automatic hs(ref logic req, ref logic ack);
    @(negedge clk);
    req = 1'b1;
    do @(posedge clk); while (!ack);
    @(negedge clk);
    req = 1'b0;
    do @(posedge clk); while (ack);
  endtask

  initial begin
    int step, a, b, r, l;
    cb = 0; cr = 0; lum = 0; din = 0;
    lat_chroma = 0; lat_lum = 0; tt_req = 0; dacal_req = 0; cnt_req = 0; mem_req = 0; mem_rw = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 65536; i++) begin
      @(negedge clk);
      din = entry(i);
      if (cnt_full) full_seen++;
      hs(mem_req, mem_ack);
      hs(cnt_req, cnt_ack);
    end
    checks++;
    if (full_seen != 1) begin failures++; $display("FAIL: full seen %0d times", full_seen); end
    @(negedge clk);
    mem_rw = 1'b1;
    step = 0;
    for (int p = 0; p < 200; p++) begin
      b = $urandom_range(0, 255);
      r = $urandom_range(0, 255);
      @(negedge clk);
      cb = 8'(b); cr = 8'(r); lat_chroma = 1'b1;
      @(negedge clk);
      lat_chroma = 1'b0; cb = 8'($urandom); cr = 8'($urandom);
      for (int k = 0; k < 4; k++) begin
        l = $urandom_range(0, 255);
        @(negedge clk);
        lum = 8'(l); lat_lum = 1'b1;
        @(negedge clk);
        lat_lum = 1'b0; lum = 8'($urandom);
        hs(tt_req, tt_ack);
        hs(mem_req, mem_ack);
        a = order[step % 16] * 4096 + sec(b) * 1024 + sec(r) * 256 + l;
        checks++;
        if (dout !== entry(a)) begin
          failures++;
          $display("FAIL: pair %0d lum %0d: dout %h expected %h (address %h)", p, k, dout, entry(a), a);
        end
        hs(dacal_req, dacal_ack);
        step++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

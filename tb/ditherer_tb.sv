// ditherer_tb: end-to-end test of the ditherer at its default sizes.
//
// A software model loads the full 64K-entry translation table, entry
// a = (a*11 + (a>>12)*29 + (a>>8)*3) mod 256, then sends the 4 x 4 example
// tile (Cb A..D, Cr E..H, Lum I..Y in the order the hardware consumes them)
// followed by 60 random tiles, with random delays on every software
// handshake, including a slow output acknowledge. Each output is compared
// with the table entry at the address worked out here: DA from the usage
// order list 0,8,12,4,2,10,14,6,3,11,15,7,1,9,13,5, chroma sections from the
// ranges 0-32, 33-96, 97-160, 161-255. Then the design is reset in the middle
// of a tile, the table is loaded again with different contents and one more
// tile is checked, which shows that reset returns DACAL to DA 0.
//
// Mechanisms counted, each must happen: table writes, end of table (switch
// to read mode), chroma reuse (four Lum per Cb/Cr), DACAL wrap-around, every
// Cb and Cr section, every DA, output back-pressure and reset with reload.
module ditherer_tb;
  logic       clk = 1'b0;
  logic       reset = 1'b1;
  logic [7:0] din, cb, cr, lum, dout;
  logic       din_req, din_ack, loaded, chroma_req, chroma_ack, lum_req, lum_ack, out_req, out_ack;
  int         checks = 0, failures = 0;
  int         order[16] = '{0, 8, 12, 4, 2, 10, 14, 6, 3, 11, 15, 7, 1, 9, 13, 5};
  int         seed = 0;   // table contents variant
  int         step = 0;   // Lum values since reset

  // mechanism counters
  int n_write = 0, n_mode = 0, n_reuse = 0, n_wrap = 0, n_stall = 0, n_reset = 0, n_lookup = 0;
  int cb_sec_seen[4], cr_sec_seen[4], da_seen[16];

  always #5 clk = ~clk;

  ditherer dut (.*);

  function automatic logic [7:0] entry(input int a);
    return 8'(a * 11 + (a >> 12) * 29 + (a >> 8) * 3 + seed * 101);
  endfunction

  function automatic int sec(input int v);
    if (v <= 32)  return 0;
    if (v <= 96)  return 1;
    if (v <= 160) return 2;
    return 3;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(ref logic req, ref logic ack);
    repeat ($urandom_range(0, 2)) @(posedge clk);
    @(negedge clk);
    req = 1'b1;
    do @(posedge clk); while (!ack);
    repeat ($urandom_range(0, 1)) @(posedge clk);
    @(negedge clk);
    req = 1'b0;
    do @(posedge clk); while (ack);
  endtask

  task automatic load_table();
    for (int i = 0; i < 65536; i++) begin
      @(negedge clk);
      din = entry(i);
      send(din_req, din_ack);
      n_write++;
    end
    repeat (2) @(posedge clk);
    check(loaded, "loaded after the last table entry");
    if (loaded) n_mode++;
  endtask

  // One Lum value and its output.
  task automatic pixel(input int b, input int r, input int l);
    int a, d, wait_n;
    @(negedge clk);
    lum = 8'(l);
    send(lum_req, lum_ack);
    lum = 8'($urandom);
    wait_n = 0;
    while (!out_req && wait_n < 200) begin @(posedge clk); wait_n++; end
    d = order[step % 16];
    a = d * 4096 + sec(b) * 1024 + sec(r) * 256 + l;
    check(out_req && dout == entry(a),
          $sformatf("step %0d: dout %h expected %h (DA %0d, cb %0d, cr %0d, lum %0d)", step, dout, entry(a), d, b, r, l));
    da_seen[d]++;
    cb_sec_seen[sec(b)]++;
    cr_sec_seen[sec(r)]++;
    n_lookup++;
    if (d == 5) n_wrap++;
    if ($urandom_range(0, 3) == 0) begin
      repeat ($urandom_range(1, 6)) @(posedge clk);
      check(out_req && dout == entry(a), "output held during back-pressure");
      n_stall++;
    end
    @(negedge clk);
    out_ack = 1'b1;
    do @(posedge clk); while (out_req);
    @(negedge clk);
    out_ack = 1'b0;
    step++;
  endtask

  task automatic chroma_group(input int b, input int r, input int l[4]);
    @(negedge clk);
    cb = 8'(b);
    cr = 8'(r);
    send(chroma_req, chroma_ack);
    cb = 8'($urandom);
    cr = 8'($urandom);
    foreach (l[k]) pixel(b, r, l[k]);
    n_reuse++;
  endtask

  function automatic int rnd_chroma();
    return $urandom_range(0, 255);
  endfunction

  initial begin
    // Example tile: Cb A..D and Cr E..H, one per section, Lum I..Y.
    int ex_cb[4] = '{10, 60, 130, 200};
    int ex_cr[4] = '{200, 33, 97, 32};
    int ex_lum[4][4] = '{'{0, 17, 34, 51}, '{68, 85, 102, 119}, '{136, 153, 170, 187}, '{204, 221, 238, 255}};
    int l4[4];
    din = 0; cb = 0; cr = 0; lum = 0;
    din_req = 0; chroma_req = 0; lum_req = 0; out_ack = 0;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    check(!loaded, "write mode after reset");
    load_table();
    for (int g = 0; g < 4; g++) chroma_group(ex_cb[g], ex_cr[g], ex_lum[g]);
    for (int t = 0; t < 60; t++)
      for (int g = 0; g < 4; g++) begin
        foreach (l4[k]) l4[k] = $urandom_range(0, 255);
        chroma_group(rnd_chroma(), rnd_chroma(), l4);
      end
    // Reset in the middle of a tile, reload a different table, one more tile.
    @(negedge clk);
    cb = 8'd5; cr = 8'd250;
    send(chroma_req, chroma_ack);
    pixel(5, 250, 77);
    @(negedge clk);
    reset = 1'b1;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    check(!loaded, "write mode after the second reset");
    n_reset++;
    step = 0;
    seed = 1;
    load_table();
    for (int g = 0; g < 4; g++) begin
      foreach (l4[k]) l4[k] = $urandom_range(0, 255);
      chroma_group(rnd_chroma(), rnd_chroma(), l4);
    end

    check(n_write == 2 * 65536, "table writes");
    check(n_mode == 2, "switches to read mode");
    check(n_reuse > 0 && n_lookup == 4 * n_reuse + 1, "four Lum values per Cb/Cr pair");
    check(n_wrap > 0, "DACAL wrap-around");
    check(n_stall > 0, "output back-pressure");
    check(n_reset == 1, "reset and reload");
    foreach (cb_sec_seen[i]) check(cb_sec_seen[i] > 0, $sformatf("Cb section %0d", i));
    foreach (cr_sec_seen[i]) check(cr_sec_seen[i] > 0, $sformatf("Cr section %0d", i));
    foreach (da_seen[i]) check(da_seen[i] > 0, $sformatf("DA %0d", i));
    $display("mechanisms: writes=%0d mode_switches=%0d chroma_pairs=%0d lookups=%0d da_wraps=%0d stalls=%0d resets=%0d",
             n_write, n_mode, n_reuse, n_lookup, n_wrap, n_stall, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

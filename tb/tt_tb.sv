// tt_tb: drives the translation-table address unit with the section boundary
// values and random pixels. The expected address is worked out here from the
// section ranges 0-32, 33-96, 97-160, 161-255 as
// DA*4096 + Cb section*1024 + Cr section*256 + Lum.
// It also checks that TT_ACK answers TT_REQ after DELAY cycles.
module tt_tb;
  localparam int DELAY = 2;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [7:0]  cb, cr, lum;
  logic [3:0]  da;
  logic        tt_req, tt_ack;
  logic [15:0] tt_addr;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  tt #(.DELAY(DELAY)) dut (
    .clk(clk), .rst(rst), .cb(cb), .cr(cr), .lum(lum), .da(da),
    .tt_req(tt_req), .tt_ack(tt_ack), .tt_addr(tt_addr)
  );

  function automatic int sec(input int v);
    if (v <= 32)  return 0;
    if (v <= 96)  return 1;
    if (v <= 160) return 2;
    return 3;
  endfunction

  task automatic lookup(input int b, input int r, input int l, input int a);
    int n, exp;
    @(negedge clk);
    cb = 8'(b); cr = 8'(r); lum = 8'(l); da = 4'(a);
    tt_req = 1'b1;
    n = 0;
    do begin
      @(posedge clk); #1;
      n++;
    end while (!tt_ack && n < 20);
    // Inputs may change once the request is acknowledged.
    cb = 8'($urandom); cr = 8'($urandom); lum = 8'($urandom); da = 4'($urandom);
    exp = a * 4096 + sec(b) * 1024 + sec(r) * 256 + l;
    checks++;
    if (tt_addr !== 16'(exp)) begin
      failures++;
      $display("FAIL: cb=%0d cr=%0d lum=%0d da=%0d addr=%h expected %h", b, r, l, a, tt_addr, exp);
    end
    checks++;
    if (n != DELAY) begin
      failures++;
      $display("FAIL: TT_ACK after %0d cycles, expected %0d", n, DELAY);
    end
    @(negedge clk);
    tt_req = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (tt_addr !== 16'(exp) || tt_ack) begin
      failures++;
      $display("FAIL: address not held or ack not released");
    end
  endtask

  initial begin
    int edges[8];
    edges = '{0, 32, 33, 96, 97, 160, 161, 255};
    tt_req = 1'b0;
    cb = 0; cr = 0; lum = 0; da = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    foreach (edges[i]) foreach (edges[j])
      lookup(edges[i], edges[j], $urandom_range(0, 255), $urandom_range(0, 15));
    for (int i = 0; i < 300; i++)
      lookup($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 15));
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

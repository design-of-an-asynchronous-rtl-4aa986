// ditherer_datapath: the ditherer's datapath (TT, DACAL, MEM, CNT, latches).
//
// Two sides share the table memory. Load side: the counter CNT supplies the
// write address and the software's DIN the data; each MEM_REQ in write mode
// stores one entry and each CNT_REQ moves to the next. Lookup side: latches
// hold Cb, Cr and Lum, DACAL supplies the dither array number, TT turns the
// four into a table address, and a MEM_REQ in read mode drives the RGB entry
// on DOUT. Every unit answers its REQ with an ACK through its own matched
// delay; the controller sequences them. The block set and their
// connections are the document's; the latch load strobes (lat_chroma,
// lat_lum) and the counter's full flag are this design's additions, needed
// because the document does not say how the latches and the end of loading
// are controlled.
module ditherer_datapath
  import dith_pkg::*;
#(
  parameter int unsigned TT_DELAY    = 1,
  parameter int unsigned DACAL_DELAY = 1,
  parameter int unsigned CNT_DELAY   = 1,
  parameter int unsigned MEM_DELAY   = 2
) (
  input  logic clk,
  input  logic rst,
  // pixel inputs and latch strobes
  input  pix_t cb,
  input  pix_t cr,
  input  pix_t lum,
  input  logic lat_chroma,
  input  logic lat_lum,
  // handshakes with the controller
  input  logic tt_req,
  output logic tt_ack,
  input  logic dacal_req,
  output logic dacal_ack,
  input  logic cnt_req,
  output logic cnt_ack,
  output logic cnt_full,
  input  logic mem_req,
  output logic mem_ack,
  input  logic mem_rw,
  // table data in, RGB out
  input  rgb_t din,
  output rgb_t dout
);

  pix_t  cb_q, cr_q, lum_q;
  da_t   da;
  addr_t tt_addr;
  addr_t addr;

  data_latch #(.WIDTH(PIX_W)) u_cb_latch  (.clk(clk), .rst(rst), .load(lat_chroma), .d(cb),  .q(cb_q));
  data_latch #(.WIDTH(PIX_W)) u_cr_latch  (.clk(clk), .rst(rst), .load(lat_chroma), .d(cr),  .q(cr_q));
  data_latch #(.WIDTH(PIX_W)) u_lum_latch (.clk(clk), .rst(rst), .load(lat_lum),    .d(lum), .q(lum_q));

  dacal #(.DELAY(DACAL_DELAY)) u_dacal (
    .clk       (clk),
    .rst       (rst),
    .dacal_req (dacal_req),
    .dacal_ack (dacal_ack),
    .da        (da)
  );

  tt #(.DELAY(TT_DELAY)) u_tt (
    .clk     (clk),
    .rst     (rst),
    .cb      (cb_q),
    .cr      (cr_q),
    .lum     (lum_q),
    .da      (da),
    .tt_req  (tt_req),
    .tt_ack  (tt_ack),
    .tt_addr (tt_addr)
  );

  addr_cnt #(.WIDTH(ADDR_W), .DELAY(CNT_DELAY)) u_cnt (
    .clk     (clk),
    .rst     (rst),
    .cnt_req (cnt_req),
    .cnt_ack (cnt_ack),
    .addr    (addr),
    .full    (cnt_full)
  );

  tt_mem #(.ADDR_W_P(ADDR_W), .DELAY(MEM_DELAY)) u_mem (
    .clk     (clk),
    .rst     (rst),
    .mem_req (mem_req),
    .mem_ack (mem_ack),
    .mem_rw  (mem_rw),
    .tt_addr (tt_addr),
    .addr    (addr),
    .din     (din),
    .dout    (dout)
  );

endmodule

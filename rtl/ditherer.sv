// ditherer: hardware ditherer for an MPEG-1 decoder, datapath plus controller.
//
// Maps each decoded pixel (8-bit Lum and the 8-bit Cb, Cr of its 2 x 2 block)
// to an 8-bit colour-map index through a 64 KB translation table, using one
// of 16 dither arrays chosen by the pixel's position in a 4 x 4 tile. The
// software first loads the whole table, one byte per din_req/din_ack
// handshake (65,536 of them); loaded then rises. After that it sends a Cb/Cr
// pair (chroma_req/chroma_ack) followed by its four Lum values in tile order
// (top-left, top-right, bottom-left, bottom-right, each lum_req/lum_ack), and
// receives one RGB index per Lum on dout (out_req/out_ack). Reset (synchronous,
// active high) clears the address counter and the dither-array counter and selects
// write mode; the table must be reloaded after it.
//
// All software channels are four-phase, bundled data: data valid before REQ
// rises and held until ACK rises. With the default delays one Lum takes
// about 20 clock cycles and one table entry about 13, depending on how fast
// the software answers. The partition into datapath and controller and the
// signals between them follow the document; the clock, the software channels
// and the delay lengths are this design's choices.
module ditherer
  import dith_pkg::*;
#(
  parameter int unsigned TT_DELAY    = 1,
  parameter int unsigned DACAL_DELAY = 1,
  parameter int unsigned CNT_DELAY   = 1,
  parameter int unsigned MEM_DELAY   = 2
) (
  input  logic clk,
  input  logic reset,
  // table load channel
  input  rgb_t din,
  input  logic din_req,
  output logic din_ack,
  output logic loaded,
  // chroma channel
  input  pix_t cb,
  input  pix_t cr,
  input  logic chroma_req,
  output logic chroma_ack,
  // luminance channel
  input  pix_t lum,
  input  logic lum_req,
  output logic lum_ack,
  // dithered output channel
  output rgb_t dout,
  output logic out_req,
  input  logic out_ack
);

  logic lat_chroma, lat_lum;
  logic tt_req, tt_ack;
  logic dacal_req, dacal_ack;
  logic cnt_req, cnt_ack, cnt_full;
  logic mem_req, mem_ack, mem_rw;

  ditherer_ctrl u_ctrl (
    .clk        (clk),
    .rst        (reset),
    .din_req    (din_req),
    .din_ack    (din_ack),
    .chroma_req (chroma_req),
    .chroma_ack (chroma_ack),
    .lum_req    (lum_req),
    .lum_ack    (lum_ack),
    .out_req    (out_req),
    .out_ack    (out_ack),
    .loaded     (loaded),
    .lat_chroma (lat_chroma),
    .lat_lum    (lat_lum),
    .tt_req     (tt_req),
    .tt_ack     (tt_ack),
    .dacal_req  (dacal_req),
    .dacal_ack  (dacal_ack),
    .cnt_req    (cnt_req),
    .cnt_ack    (cnt_ack),
    .cnt_full   (cnt_full),
    .mem_req    (mem_req),
    .mem_ack    (mem_ack),
    .mem_rw     (mem_rw)
  );

  ditherer_datapath #(
    .TT_DELAY    (TT_DELAY),
    .DACAL_DELAY (DACAL_DELAY),
    .CNT_DELAY   (CNT_DELAY),
    .MEM_DELAY   (MEM_DELAY)
  ) u_dp (
    .clk        (clk),
    .rst        (reset),
    .cb         (cb),
    .cr         (cr),
    .lum        (lum),
    .lat_chroma (lat_chroma),
    .lat_lum    (lat_lum),
    .tt_req     (tt_req),
    .tt_ack     (tt_ack),
    .dacal_req  (dacal_req),
    .dacal_ack  (dacal_ack),
    .cnt_req    (cnt_req),
    .cnt_ack    (cnt_ack),
    .cnt_full   (cnt_full),
    .mem_req    (mem_req),
    .mem_ack    (mem_ack),
    .mem_rw     (mem_rw),
    .din        (din),
    .dout       (dout)
  );

endmodule

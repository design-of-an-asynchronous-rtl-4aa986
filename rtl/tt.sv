// tt: translation-table address unit (the TT block).
//
// From the 28 bits of Cb, Cr, Lum and DA it forms the 16-bit address of the
// RGB entry in the table memory. Cb and Cr are each reduced to one of four
// sections by three comparators against 33, 97 and 161; Lum keeps its full
// 8 bits; the 4-bit DA picks one of 16 sub-tables of 4 x 4 x 256 entries.
// Address = {DA, Cb section, Cr section, Lum} (field order is this design's
// choice; sections and sizes follow the document).
//
// Handshake: four-phase TT_REQ/TT_ACK. The address is registered on the
// first cycle TT_REQ is high; TT_ACK rises DELAY cycles later through a
// matched delay, so TT_ADDR is stable whenever TT_ACK is high.
module tt
  import dith_pkg::*;
#(
  parameter int unsigned DELAY = 1
) (
  input  logic  clk,
  input  logic  rst,
  input  pix_t  cb,
  input  pix_t  cr,
  input  pix_t  lum,
  input  da_t   da,
  input  logic  tt_req,
  output logic  tt_ack,
  output addr_t tt_addr
);

  logic     req_q;
  tt_addr_t a;

  always_comb begin
    a.da     = da;
    a.cb_sec = chroma_section(cb);
    a.cr_sec = chroma_section(cr);
    a.lum    = lum;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      req_q   <= 1'b0;
      tt_addr <= '0;
    end else begin
      req_q <= tt_req;
      if (tt_req && !req_q) tt_addr <= a;
    end
  end

  matched_delay #(.DELAY(DELAY)) u_delay (
    .clk (clk),
    .rst (rst),
    .req (tt_req),
    .ack (tt_ack)
  );

endmodule

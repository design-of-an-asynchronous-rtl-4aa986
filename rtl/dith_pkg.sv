// dith_pkg: widths, types and the two small functions shared by the ditherer.
//
// A pixel lookup goes through a 64K x 8 translation table whose address is
// {DA[3:0], Cb section[1:0], Cr section[1:0], Lum[7:0]}. The chroma components
// are 8-bit values but only their section (0..32, 33..96, 97..160, 161..255)
// selects a sub-table, so each contributes 2 address bits. The DA (dither
// array) number is produced by a 4-bit binary counter followed by two XOR
// gates, giving the order 0,8,12,4,2,10,14,6,3,11,15,7,1,9,13,5.
// The section cut-off points and the DA order are the document's; the bit
// order of the address fields is this design's choice.
package dith_pkg;

  localparam int unsigned PIX_W  = 8;   // width of Cb, Cr and Lum
  localparam int unsigned DA_W   = 4;   // 16 dither arrays
  localparam int unsigned SEC_W  = 2;   // 4 chroma sections
  localparam int unsigned RGB_W  = 8;   // 8-bit colour-map index
  localparam int unsigned ADDR_W = DA_W + 2 * SEC_W + PIX_W;  // 16

  // Lower bounds of chroma sections 1, 2 and 3.
  localparam logic [PIX_W-1:0] SEC1_LO = 8'd33;
  localparam logic [PIX_W-1:0] SEC2_LO = 8'd97;
  localparam logic [PIX_W-1:0] SEC3_LO = 8'd161;

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic [DA_W-1:0]   da_t;
  typedef logic [SEC_W-1:0]  sec_t;
  typedef logic [RGB_W-1:0]  rgb_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Translation-table address fields, most significant first.
  typedef struct packed {
    da_t  da;
    sec_t cb_sec;
    sec_t cr_sec;
    pix_t lum;
  } tt_addr_t;

  // Section of an 8-bit chroma value: three comparators.
  function automatic sec_t chroma_section(pix_t c);
    sec_t s;
    s = {1'b0, (c >= SEC1_LO)} + {1'b0, (c >= SEC2_LO)} + {1'b0, (c >= SEC3_LO)};
    return s;
  endfunction

  // DA number of step k of the 16-step pattern: {k1^k0, k1, k3^k2, k3}.
  function automatic da_t da_of_step(logic [3:0] k);
    return {k[1] ^ k[0], k[1], k[3] ^ k[2], k[3]};
  endfunction

endpackage

// dacal: dither-array calculation (the DACAL block).
//
// A special counter that steps through the 16 dither arrays in the order
// they are used on a 4 x 4 pixel tile: 0,8,12,4, 2,10,14,6, 3,11,15,7,
// 1,9,13,5. Each group of four belongs to one Cb/Cr pair and covers its 2 x 2
// luminance pixels (top-left, top-right, bottom-left, bottom-right). The
// order falls out of a 4-bit binary count k and two XOR gates:
// DA = {k1^k0, k1, k3^k2, k3}. Reset points it at DA 0; after DA 5 it wraps
// to DA 0.
//
// Handshake: four-phase DACAL_REQ/DACAL_ACK. The count advances on the first
// cycle DACAL_REQ is high; DACAL_ACK rises DELAY cycles later, so the new DA
// is stable whenever DACAL_ACK is high.
module dacal
  import dith_pkg::*;
#(
  parameter int unsigned DELAY = 1
) (
  input  logic clk,
  input  logic rst,
  input  logic dacal_req,
  output logic dacal_ack,
  output da_t  da
);

  logic       req_q;
  logic [3:0] k;

  always_ff @(posedge clk) begin
    if (rst) begin
      req_q <= 1'b0;
      k     <= '0;
    end else begin
      req_q <= dacal_req;
      if (dacal_req && !req_q) k <= k + 1'b1;
    end
  end

  assign da = da_of_step(k);

  matched_delay #(.DELAY(DELAY)) u_delay (
    .clk (clk),
    .rst (rst),
    .req (dacal_req),
    .ack (dacal_ack)
  );

endmodule

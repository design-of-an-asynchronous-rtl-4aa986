// matched_delay: the delay element that sits between a block's REQ and ACK.
//
// In the asynchronous original a chain of buffers delays REQ so that ACK rises
// only after the block's work is certainly done (the bundling constraint).
// Here the delay is counted in clock cycles: ACK rises DELAY cycles after REQ
// is first seen high, and falls one cycle after REQ is seen low (four-phase,
// return-to-zero). A block that registers its result on the first cycle REQ
// is high therefore has that result stable whenever ACK is high, for any
// DELAY >= 1. The delay length is not given by the document; the clocked
// counter is this design's stand-in for the buffer chain.
//
// Ports: clk, rst (active high, synchronous), req in, ack out.
module matched_delay #(
  parameter int unsigned DELAY = 1
) (
  input  logic clk,
  input  logic rst,
  input  logic req,
  output logic ack
);

  localparam int unsigned CW = (DELAY > 1) ? $clog2(DELAY) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      ack <= 1'b0;
    end else if (!req) begin
      cnt <= '0;
      ack <= 1'b0;
    end else if (!ack) begin
      if (cnt == CW'(DELAY - 1)) ack <= 1'b1;
      else                       cnt <= cnt + 1'b1;
    end
  end

  // Four-phase rule: once raised, REQ stays high until ACK answers it.
  a_req_held: assert property (@(posedge clk) disable iff (rst) $fell(req) |-> ack)
    else $error("matched_delay: REQ withdrawn before ACK");

  initial assert (DELAY >= 1) else $error("matched_delay: DELAY must be at least 1");

endmodule

// data_latch: one of the input latches for Lum, Cb and Cr.
//
// Holds a value handed over by the software so that the translation-table
// lookup sees stable data while the software is already preparing the next
// one. The document names these latches but does not draw them; here each is
// an edge-triggered register loaded by a one-cycle strobe from the controller
// and cleared by reset. A new value is visible on q the cycle after load.
module data_latch #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= d;
  end

endmodule

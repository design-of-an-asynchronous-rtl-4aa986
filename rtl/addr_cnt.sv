// addr_cnt: table-load address counter (the CNT block).
//
// Points at the memory entry the software writes next while the translation
// table is loaded. Reset clears it to 0; every CNT_REQ handshake adds one,
// wrapping from the last entry back to 0. The output full is high while the
// counter points at the last entry, which tells the controller that the
// entry being written completes the table (the document says loading goes on
// "until the memory is filled"; the flag is this design's way to know it).
//
// Handshake: four-phase CNT_REQ/CNT_ACK. The address changes on the first
// cycle CNT_REQ is high; CNT_ACK rises DELAY cycles later.
module addr_cnt #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DELAY = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             cnt_req,
  output logic             cnt_ack,
  output logic [WIDTH-1:0] addr,
  output logic             full
);

  logic req_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      req_q <= 1'b0;
      addr  <= '0;
    end else begin
      req_q <= cnt_req;
      if (cnt_req && !req_q) addr <= addr + 1'b1;
    end
  end

  assign full = &addr;

  matched_delay #(.DELAY(DELAY)) u_delay (
    .clk (clk),
    .rst (rst),
    .req (cnt_req),
    .ack (cnt_ack)
  );

endmodule

// tt_mem: translation-table memory (the MEM block).
//
// 2^ADDR_W entries of RGB_W bits, 64K x 8 by default: 16 dither arrays of
// 4 Cb sections x 4 Cr sections x 256 Lum values. MEM_RW selects the mode
// and, with it, the address: in write mode (MEM_RW = 0) the entry on DIN is
// stored at the load counter's ADDR; in read mode (MEM_RW = 1) the entry at
// the TT unit's TT_ADDR is driven on DOUT. Reset puts the controller, which
// owns MEM_RW, in write mode; the table contents are not reset.
//
// Handshake: four-phase MEM_REQ/MEM_ACK. The write, or the registered read,
// happens on the first cycle MEM_REQ is high; a matched delay of DELAY cycles
// between MEM_REQ and MEM_ACK stands for the memory's access time, as in the
// document. DOUT holds the last read value until the next read.
module tt_mem
  import dith_pkg::*;
#(
  parameter int unsigned ADDR_W_P = ADDR_W,
  parameter int unsigned DELAY    = 2
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                mem_req,
  output logic                mem_ack,
  input  logic                mem_rw,     // 1 = read, 0 = write
  input  logic [ADDR_W_P-1:0] tt_addr,    // read address
  input  logic [ADDR_W_P-1:0] addr,       // write address
  input  rgb_t                din,
  output rgb_t                dout
);

  rgb_t mem [2**ADDR_W_P];
  logic req_q;
  logic fire;

  assign fire = mem_req && !req_q;

  always_ff @(posedge clk) begin
    if (rst) req_q <= 1'b0;
    else     req_q <= mem_req;
  end

  always_ff @(posedge clk) begin
    if (fire && !mem_rw) mem[addr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst)                 dout <= '0;
    else if (fire && mem_rw) dout <= mem[tt_addr];
  end

  matched_delay #(.DELAY(DELAY)) u_delay (
    .clk (clk),
    .rst (rst),
    .req (mem_req),
    .ack (mem_ack)
  );

endmodule

// ditherer_ctrl: the controller that sequences the datapath's handshakes.
//
// After reset it is in load mode (MEM_RW = 0, write). For every table entry
// the software offers (din_req) it runs MEM_REQ/MEM_ACK to write the entry,
// then CNT_REQ/CNT_ACK to advance the address, then acknowledges the software
// (din_ack). When the entry just written was the last one (cnt_full) it
// switches the memory to read mode for good. In run mode it takes one Cb/Cr
// pair (chroma_req/chroma_ack) and then four Lum values (lum_req/lum_ack);
// for each Lum it runs TT_REQ/TT_ACK (form the address), MEM_REQ/MEM_ACK
// (read the RGB entry), out_req/out_ack (hand DOUT to the software) and
// DACAL_REQ/DACAL_ACK (move to the next dither array).
//
// Every handshake is four-phase: raise REQ, wait for ACK, drop REQ, wait for
// ACK to drop. The order of steps follows the document; the document's
// controller is an asynchronous circuit of gC elements, while this one is a
// clocked state machine, and the software-side channels (din, chroma, lum,
// out) are this design's own, since the document gives no signals for them.
// The latch strobes lat_chroma and lat_lum are one cycle long and are raised
// on the cycle the software's request is seen.
module ditherer_ctrl (
  input  logic clk,
  input  logic rst,
  // software side
  input  logic din_req,
  output logic din_ack,
  input  logic chroma_req,
  output logic chroma_ack,
  input  logic lum_req,
  output logic lum_ack,
  output logic out_req,
  input  logic out_ack,
  output logic loaded,
  // datapath side
  output logic lat_chroma,
  output logic lat_lum,
  output logic tt_req,
  input  logic tt_ack,
  output logic dacal_req,
  input  logic dacal_ack,
  output logic cnt_req,
  input  logic cnt_ack,
  input  logic cnt_full,
  output logic mem_req,
  input  logic mem_ack,
  output logic mem_rw
);

  typedef enum logic [4:0] {
    S_LD_WAIT, S_LD_MEM, S_LD_MEM_RTZ, S_LD_CNT, S_LD_CNT_RTZ, S_LD_ACK,
    S_CH_WAIT, S_CH_ACK, S_LUM_WAIT, S_LUM_ACK,
    S_TT, S_TT_RTZ, S_RD, S_RD_RTZ, S_OUT, S_OUT_RTZ, S_DA, S_DA_RTZ
  } state_t;

  state_t     state, state_n;
  logic       last, last_n;    // entry being loaded is the table's last
  logic       run, run_n;      // read mode
  logic [1:0] nlum, nlum_n;    // Lum values done for the current Cb/Cr

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_LD_WAIT;
      last  <= 1'b0;
      run   <= 1'b0;
      nlum  <= '0;
    end else begin
      state <= state_n;
      last  <= last_n;
      run   <= run_n;
      nlum  <= nlum_n;
    end
  end

  always_comb begin
    state_n = state;
    last_n  = last;
    run_n   = run;
    nlum_n  = nlum;
    unique case (state)
      S_LD_WAIT:    if (din_req)     state_n = S_LD_MEM;
      S_LD_MEM:     if (mem_ack) begin
                      state_n = S_LD_MEM_RTZ;
                      last_n  = cnt_full;
                    end
      S_LD_MEM_RTZ: if (!mem_ack)    state_n = S_LD_CNT;
      S_LD_CNT:     if (cnt_ack)     state_n = S_LD_CNT_RTZ;
      S_LD_CNT_RTZ: if (!cnt_ack)    state_n = S_LD_ACK;
      S_LD_ACK:     if (!din_req) begin
                      if (last) begin
                        state_n = S_CH_WAIT;
                        run_n   = 1'b1;
                      end else begin
                        state_n = S_LD_WAIT;
                      end
                    end
      S_CH_WAIT:    if (chroma_req)  state_n = S_CH_ACK;
      S_CH_ACK:     if (!chroma_req) state_n = S_LUM_WAIT;
      S_LUM_WAIT:   if (lum_req)     state_n = S_LUM_ACK;
      S_LUM_ACK:    if (!lum_req)    state_n = S_TT;
      S_TT:         if (tt_ack)      state_n = S_TT_RTZ;
      S_TT_RTZ:     if (!tt_ack)     state_n = S_RD;
      S_RD:         if (mem_ack)     state_n = S_RD_RTZ;
      S_RD_RTZ:     if (!mem_ack)    state_n = S_OUT;
      S_OUT:        if (out_ack)     state_n = S_OUT_RTZ;
      S_OUT_RTZ:    if (!out_ack)    state_n = S_DA;
      S_DA:         if (dacal_ack)   state_n = S_DA_RTZ;
      S_DA_RTZ:     if (!dacal_ack) begin
                      nlum_n  = nlum + 1'b1;
                      state_n = (nlum == 2'd3) ? S_CH_WAIT : S_LUM_WAIT;
                    end
      default:      state_n = S_LD_WAIT;
    endcase
  end

  assign mem_rw     = run;
  assign loaded     = run;
  assign mem_req    = (state == S_LD_MEM) || (state == S_RD);
  assign cnt_req    = (state == S_LD_CNT);
  assign din_ack    = (state == S_LD_ACK);
  assign chroma_ack = (state == S_CH_ACK);
  assign lum_ack    = (state == S_LUM_ACK);
  assign tt_req     = (state == S_TT);
  assign out_req    = (state == S_OUT);
  assign dacal_req  = (state == S_DA);
  assign lat_chroma = (state == S_CH_WAIT) && chroma_req;
  assign lat_lum    = (state == S_LUM_WAIT) && lum_req;

  // The memory mode must not change during a memory handshake.
  a_rw_stable: assert property (@(posedge clk) disable iff (rst) (mem_req || mem_ack) |=> $stable(mem_rw))
    else $error("ditherer_ctrl: MEM_RW changed during a memory access");

endmodule

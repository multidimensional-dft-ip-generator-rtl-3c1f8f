// lm_switch: one of the two switches beside the local memories. It connects
// its requester (the SDRAM interface on one side, the PE array on the other)
// to local memory 0 (sel = 0) or local memory 1 (sel = 1). The memory it does
// not select sees all-zero requests, so the requests of the two switches can
// be merged with an OR in front of each memory. Read data is steered back with
// the select delayed by the memory's one-cycle read latency. The two switches
// run on opposite selects, which makes the memories a ping-pong pair.
// The two switches and the ping-pong pair follow the accelerator's block
// diagram; the OR-merge and the select timing are this design's choice.
module lm_switch
  import mddft_pkg::*;
#(
  parameter int R_BANKS = 2
) (
  input  logic    clk,
  input  logic    sel,
  input  lm_req_t req      [R_BANKS],
  output cplx_t   rdata    [R_BANKS],
  output lm_req_t m0_req   [R_BANKS],
  output lm_req_t m1_req   [R_BANKS],
  input  cplx_t   m0_rdata [R_BANKS],
  input  cplx_t   m1_rdata [R_BANKS]
);

  logic sel_q;

  always_ff @(posedge clk) sel_q <= sel;

  always_comb
    for (int l = 0; l < R_BANKS; l++) begin
      m0_req[l] = sel ? '0 : req[l];
      m1_req[l] = sel ? req[l] : '0;
      rdata[l]  = sel_q ? m1_rdata[l] : m0_rdata[l];
    end

endmodule

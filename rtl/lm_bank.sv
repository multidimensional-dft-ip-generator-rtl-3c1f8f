// lm_bank: one bank of a local memory, a simple dual-port RAM (one write port,
// one read port, both synchronous, read data one cycle after the address), as
// a dual-port block RAM of the FPGA provides. Read-during-write to the same
// address returns the old contents.
// The dual-port block RAM banks follow the accelerator's description; the
// read-during-write behaviour is this design's choice.
module lm_bank
  import mddft_pkg::*;
#(
  parameter int DEPTH = 8192
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  cplx_t                    wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output cplx_t                    rdata
);

  cplx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule

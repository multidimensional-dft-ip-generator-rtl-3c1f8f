// cmul: pipelined complex multiplier of the processing element. Multiplies a
// data sample by a twiddle factor (fixed point, TW-2 fraction bits) with
// round-to-nearest, one register stage: inputs in cycle t, product and its
// valid in cycle t+1. Four real products, as a DSP-based multiplier would use.
// The accelerator specifies a complex multiplier after the FFT; its number
// format, rounding and pipelining are this design's choice.
module cmul
  import mddft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t a,
  input  twid_t w,
  output logic  out_valid,
  output cplx_t y
);

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    y <= cmul_f(a, w);
  end

endmodule

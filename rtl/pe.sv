// pe: processing element, a 1-D FFT followed by a complex multiplier and an
// output multiplexer that either passes the multiplier's product (column
// stride DFT: twiddle multiplication) or the plain FFT result (row DFT and
// column local DFT).
//
// Timing: fft_valid marks an FFT result in cycle t (bit-reversed bin order,
// see fft1d). The owner of the twiddle ROM presents the twiddle for that
// result in cycle t+1 on tw together with tw_en; the PE's result leaves on
// out_data with out_valid in cycle t+2. The structure (FFT, multiplier, mux)
// is the accelerator's; the two-cycle alignment is this design's choice.
module pe
  import mddft_pkg::*;
#(
  parameter int N_MAX = 2048
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       inv,
  input  logic [4:0] lg_len,
  input  logic       in_valid,
  input  cplx_t      in_data,
  output logic       fft_valid,
  input  twid_t      tw,
  input  logic       tw_en,
  output logic       out_valid,
  output cplx_t      out_data
);

  cplx_t fft_d, d1, d2, prod;
  logic  v1, pv, sel_tw;

  fft1d #(.N_MAX(N_MAX)) u_fft (
    .clk, .rst_n, .clear, .inv, .lg_len, .in_valid, .in_data,
    .out_valid(fft_valid), .out_data(fft_d)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= fft_valid;
    d1     <= fft_d;
    d2     <= d1;
    sel_tw <= tw_en;
  end

  cmul u_cmul (.clk, .rst_n, .in_valid(v1), .a(d1), .w(tw), .out_valid(pv), .y(prod));

  assign out_valid = pv;
  assign out_data  = sel_tw ? prod : d2;

endmodule

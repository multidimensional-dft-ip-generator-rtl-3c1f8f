// fft_sdf_stage: one radix-2 single-path delay-feedback (SDF) stage of the
// streaming FFT, decimation in frequency, butterfly span D.
//
// Samples are taken in blocks of 2D. The first D samples of a block go into a
// D-entry feedback memory while the stage emits the twiddled differences of
// the previous block. For the second D samples the stage adds the stored
// sample a to the incoming b, emits (a+b), and stores (a-b)*W_{2D}^n back.
// Forward transforms halve the sum and difference (the FFT result is scaled
// by 1/N so it cannot overflow); inverse transforms use conjugate twiddles and
// no scaling. When active = 0 the stage is a plain register (shorter FFTs).
// Bubbles (in_valid = 0) are allowed; the stage only counts valid samples.
// clear restarts the block count at a new stream. Output is registered.
// The accelerator uses a vendor streaming FFT core; this SDF stage, its
// scaling (halving with round half to even) and its timing are this design's own.
module fft_sdf_stage
  import mddft_pkg::*;
#(
  parameter int D = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  active,
  input  logic  inv,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  out_valid,
  output cplx_t out_data
);

  localparam int CW = $clog2(2 * D);
  localparam int PW = (D > 1) ? $clog2(D) : 1;

  cplx_t mem [D];
  twid_t tw  [D];
  logic [CW-1:0] cnt;
  logic [PW-1:0] ptr;
  logic          primed;

  initial begin
    for (int n = 0; n < D; n++) tw[n] = twiddle_value(n, 2 * D);
  end

  // x / 2 of a DW+1-bit sum, rounded half to even: the forward scaling then
  // adds no bias (a bias common to all bins would show up as a spike at
  // sample 0 after the inverse transform)
  function automatic logic signed [DW-1:0] half(input logic signed [DW:0] x);
    return x[DW:1] + DW'(x[0] & x[1]);
  endfunction

  cplx_t dl, sum, dif, dif_tw;
  twid_t w;
  logic  second;   // second half of the block: butterfly

  always_comb begin
    dl     = mem[ptr];
    second = (int'(cnt) >= D);
    w      = tw[ptr];     // ptr = cnt mod D
    if (inv) w.im = -w.im;
    if (inv) begin
      sum.re = dl.re + in_data.re;
      sum.im = dl.im + in_data.im;
      dif.re = dl.re - in_data.re;
      dif.im = dl.im - in_data.im;
    end else begin
      sum.re = half((DW+1)'(dl.re) + (DW+1)'(in_data.re));
      sum.im = half((DW+1)'(dl.im) + (DW+1)'(in_data.im));
      dif.re = half((DW+1)'(dl.re) - (DW+1)'(in_data.re));
      dif.im = half((DW+1)'(dl.im) - (DW+1)'(in_data.im));
    end
    dif_tw = cmul_f(dif, w);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      cnt       <= '0;
      ptr       <= '0;
      primed    <= 1'b0;
      out_valid <= 1'b0;
    end else if (!active) begin
      out_valid <= in_valid;
    end else begin
      out_valid <= in_valid && (primed || second);
      if (in_valid) begin
        cnt <= (int'(cnt) == 2 * D - 1) ? '0 : cnt + 1'b1;
        ptr <= (int'(ptr) == D - 1)     ? '0 : ptr + 1'b1;
        if (second) primed <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!active) begin
      if (in_valid) out_data <= in_data;
    end else if (in_valid) begin
      if (second) begin
        mem[ptr] <= dif_tw;
        out_data <= sum;
      end else begin
        mem[ptr] <= in_data;
        out_data <= dl;
      end
    end
  end

endmodule

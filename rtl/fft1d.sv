// fft1d: streaming 1-D FFT of run-time length 2^lg_len (2 .. N_MAX points),
// one complex sample per cycle, forward or inverse. It plays the part of the
// 1-D DFT module of a processing element: the same core computes N1-point row
// DFTs and the shorter column stride / column local DFTs.
//
// Structure: log2(N_MAX) radix-2 SDF stages with butterfly spans N_MAX/2 .. 1.
// A transform of length 2^k uses the last k stages; the others act as plain
// registers. Vectors are streamed back to back; after the last one the user
// keeps feeding (zero) samples until all results are out. Results come out
// in bit-reversed order: the j-th valid output of a vector is bin
// bitrev_k(j). Forward results are scaled by 1/2^k, inverse results are not.
// Latency from a vector's first input to its first output is 2^k - 1 + log2(N_MAX)
// cycles without bubbles. clear resets the stream position (start of a pass).
// The internal structure, the scaling and the output order are this design's
// choices; the accelerator only fixes the function and the 1 sample/cycle rate.
module fft1d
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
  output logic       out_valid,
  output cplx_t      out_data
);

  localparam int NST = $clog2(N_MAX);

  logic  v [NST+1];
  cplx_t d [NST+1];

  assign v[0] = in_valid;
  assign d[0] = in_data;

  for (genvar s = 0; s < NST; s++) begin : g_st
    fft_sdf_stage #(.D(N_MAX >> (s + 1))) u_st (
      .clk, .rst_n, .clear,
      .active   (s >= NST - int'(lg_len)),
      .inv,
      .in_valid (v[s]),
      .in_data  (d[s]),
      .out_valid(v[s+1]),
      .out_data (d[s+1])
    );
  end

  assign out_valid = v[NST];
  assign out_data  = d[NST];

endmodule

// pe_array: N_PE processing elements working in lockstep on N_PE vectors at a
// time, sharing one twiddle factor ROM. All PEs produce the same bin in the
// same cycle, so one twiddle read per cycle serves them all.
//
// Timing: tw_addr/tw_en must be given in the cycle fft_valid is high (the
// cycle an FFT result appears); results leave two cycles later with out_valid.
// The one-ROM-for-all arrangement follows the accelerator's block diagram.
module pe_array
  import mddft_pkg::*;
#(
  parameter int N_PE  = 1,
  parameter int N_MAX = 2048,
  parameter int N_TW  = 4096
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    inv,
  input  logic [4:0]              lg_len,
  input  logic                    in_valid,
  input  cplx_t                   in_data [N_PE],
  output logic                    fft_valid,
  input  logic [$clog2(N_TW)-1:0] tw_addr,
  input  logic                    tw_en,
  output logic                    out_valid,
  output cplx_t                   out_data [N_PE]
);

  twid_t w;
  logic  tw_en_q;
  logic  fv  [N_PE];
  logic  ov  [N_PE];

  twiddle_rom #(.N_TW(N_TW)) u_rom (.clk, .addr(tw_addr), .inv, .w);

  always_ff @(posedge clk) tw_en_q <= tw_en;

  for (genvar q = 0; q < N_PE; q++) begin : g_pe
    pe #(.N_MAX(N_MAX)) u_pe (
      .clk, .rst_n, .clear, .inv, .lg_len, .in_valid, .in_data(in_data[q]),
      .fft_valid(fv[q]), .tw(w), .tw_en(tw_en_q),
      .out_valid(ov[q]), .out_data(out_data[q])
    );
  end

  // The PEs run in lockstep; PE 0 speaks for all of them.
  assign fft_valid = fv[0];
  assign out_valid = ov[0];

endmodule

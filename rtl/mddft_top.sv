// mddft_top: multidimensional DFT accelerator. It computes 2-D DFTs (and,
// plane by plane, 3-D DFTs) of images stored row by row in SDRAM without ever
// transposing them and without strided SDRAM accesses: every transfer is a
// burst along the image rows.
//
// A column of Nr samples that does not fit the local memory as a whole is
// split as Nr = m*p. Row operations load m image rows spaced p apart, run the
// row DFT on them and then an m-point DFT down each column (column stride
// DFT) followed by a twiddle multiplication, and store the rows back. The
// column local DFT then loads p consecutive rows (a strip of columns) and
// finishes the column with a p-point DFT; the host stores its rows back in
// permuted order. A host issues the command sequence (see ucam_ctrl).
//
// Blocks: ucam_ctrl (commands), sdram_if (interface to SDRAM), two lm_switch
// (ping-pong switches), two local_mem (S samples, R_BANKS banks each),
// lm_ctrl (local memory controller) and pe_array (N_PE PEs: FFT + complex
// multiplier, shared twiddle ROM). One local memory is filled and emptied
// over the SDRAM bus while the PEs work on the other.
// Defaults are the single-PE Virtex-5 configuration: S = 16384 samples,
// 2 banks, 1 PE, 2048-point FFT, m = 8, 16-beat bursts of 2 samples (B = 32).
// Ports: cmd_* command stream, mem_* burst bus to the SDRAM controller,
// busy, cycles (timer of active cycles).
// The PE array's out_valid is left open on purpose (lint notes the empty
// pin): lm_ctrl times its write-back from the FFT's valid and the fixed
// multiplier latency, so it does not need that flag.
module mddft_top
  import mddft_pkg::*;
#(
  parameter int S           = 16384,
  parameter int R_BANKS     = 2,
  parameter int N_PE        = 1,
  parameter int N1_MAX      = 2048,
  parameter int M_STRIDE    = S / N1_MAX,
  parameter int BURST_BEATS = 16,
  parameter int N_TW        = S / N1_MAX * S / (R_BANKS * BURST_BEATS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  cmd_t              cmd,
  output logic              mem_cmd_valid,
  input  logic              mem_cmd_ready,
  output logic              mem_cmd_write,
  output logic [ADDR_W-1:0] mem_cmd_addr,
  output logic [4:0]        mem_cmd_beats,
  output logic              mem_wvalid,
  input  logic              mem_wready,
  output cplx_t             mem_wdata [R_BANKS],
  input  logic              mem_rvalid,
  input  cplx_t             mem_rdata [R_BANKS],
  output logic              busy,
  output logic              stride_mode,
  output logic [31:0]       cycles
);

  // Parameter rules: the column local DFT of up to L = S/B points must fit
  // the FFT, a row operation tile (m rows of N1_MAX) the local memory, and
  // every PE needs its own bank lane.
  if (S / (R_BANKS * BURST_BEATS) > N1_MAX) begin : g_bad_l
    $error("mddft_top: L = S/(R_BANKS*BURST_BEATS) must not exceed N1_MAX");
  end
  if (M_STRIDE * N1_MAX > S) begin : g_bad_m
    $error("mddft_top: M_STRIDE*N1_MAX must not exceed S");
  end
  if (N_PE > R_BANKS) begin : g_bad_pe
    $error("mddft_top: N_PE must not exceed R_BANKS");
  end

  // command front end
  logic        lm_start, two_pass, inv, lm_done, pe_sel, xf_start, xf_dir, xf_done;
  pass_t       pass0, pass1;
  logic [15:0] cs_b;
  logic [4:0]  lg_ncol;
  win_t        xf_win;

  ucam_ctrl #(.S(S), .R_BANKS(R_BANKS), .BURST_BEATS(BURST_BEATS), .M_STRIDE(M_STRIDE)) u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd,
    .lm_start, .two_pass, .pass0, .pass1, .cs_b, .lg_ncol, .inv, .lm_done,
    .pe_sel, .xf_start, .xf_dir, .xf_win, .xf_done, .busy, .stride_mode, .cycles
  );

  // interface to SDRAM
  lm_req_t sd_req [R_BANKS];
  cplx_t   sd_rd  [R_BANKS];
  logic    xf_busy;
  logic [4:0] sd_lg;

  sdram_if #(.R_BANKS(R_BANKS), .BURST_BEATS(BURST_BEATS)) u_sdram_if (
    .clk, .rst_n, .start(xf_start), .dir_from_fpga(xf_dir), .win(xf_win),
    .busy(xf_busy), .done(xf_done), .lg_rowlen(sd_lg),
    .req(sd_req), .rdata(sd_rd),
    .mem_cmd_valid, .mem_cmd_ready, .mem_cmd_write, .mem_cmd_addr, .mem_cmd_beats,
    .mem_wvalid, .mem_wready, .mem_wdata, .mem_rvalid, .mem_rdata
  );

  // local memory controller and PE array
  lm_req_t pe_req [R_BANKS];
  cplx_t   pe_rd  [R_BANKS];
  logic    lm_busy, pe_clear, pe_in_valid, pe_fft_valid, tw_en;
  logic [4:0] pe_lg_len, pe_lg;
  logic [$clog2(N_TW)-1:0] tw_addr;
  cplx_t   pe_in_data [N_PE];
  cplx_t   pe_out_data[N_PE];

  lm_ctrl #(.R_BANKS(R_BANKS), .N_PE(N_PE), .N_TW(N_TW)) u_lm_ctrl (
    .clk, .rst_n, .start(lm_start), .two_pass, .pass0, .pass1, .cs_b, .lg_ncol,
    .busy(lm_busy), .done(lm_done), .lg_rowlen(pe_lg),
    .req(pe_req), .rdata(pe_rd),
    .pe_clear, .pe_lg_len, .pe_in_valid, .pe_in_data, .pe_fft_valid,
    .tw_addr, .tw_en, .pe_out_data
  );

  pe_array #(.N_PE(N_PE), .N_MAX(N1_MAX), .N_TW(N_TW)) u_pes (
    .clk, .rst_n, .clear(pe_clear), .inv, .lg_len(pe_lg_len),
    .in_valid(pe_in_valid), .in_data(pe_in_data), .fft_valid(pe_fft_valid),
    .tw_addr, .tw_en, .out_valid(), .out_data(pe_out_data)
  );

  // switches and the two local memories
  lm_req_t sw_l_m0 [R_BANKS], sw_l_m1 [R_BANKS], sw_r_m0 [R_BANKS], sw_r_m1 [R_BANKS];
  lm_req_t m0_req  [R_BANKS], m1_req  [R_BANKS];
  cplx_t   m0_rd   [R_BANKS], m1_rd   [R_BANKS];

  lm_switch #(.R_BANKS(R_BANKS)) u_sw_sdram (
    .clk, .sel(!pe_sel), .req(sd_req), .rdata(sd_rd),
    .m0_req(sw_l_m0), .m1_req(sw_l_m1), .m0_rdata(m0_rd), .m1_rdata(m1_rd)
  );

  lm_switch #(.R_BANKS(R_BANKS)) u_sw_pe (
    .clk, .sel(pe_sel), .req(pe_req), .rdata(pe_rd),
    .m0_req(sw_r_m0), .m1_req(sw_r_m1), .m0_rdata(m0_rd), .m1_rdata(m1_rd)
  );

  always_comb
    for (int l = 0; l < R_BANKS; l++) begin
      m0_req[l] = sw_l_m0[l] | sw_r_m0[l];
      m1_req[l] = sw_l_m1[l] | sw_r_m1[l];
    end

  logic [R_BANKS-1:0] m0_we, m0_re, m1_we, m1_re;
  logic [15:0] m0_wrow [R_BANKS], m0_wcol [R_BANKS], m0_rrow [R_BANKS], m0_rcol [R_BANKS];
  logic [15:0] m1_wrow [R_BANKS], m1_wcol [R_BANKS], m1_rrow [R_BANKS], m1_rcol [R_BANKS];
  cplx_t       m0_wd   [R_BANKS], m1_wd   [R_BANKS];

  always_comb
    for (int l = 0; l < R_BANKS; l++) begin
      m0_we[l] = m0_req[l].we; m0_wrow[l] = m0_req[l].wrow; m0_wcol[l] = m0_req[l].wcol;
      m0_wd[l] = m0_req[l].wdata;
      m0_re[l] = m0_req[l].re; m0_rrow[l] = m0_req[l].rrow; m0_rcol[l] = m0_req[l].rcol;
      m1_we[l] = m1_req[l].we; m1_wrow[l] = m1_req[l].wrow; m1_wcol[l] = m1_req[l].wcol;
      m1_wd[l] = m1_req[l].wdata;
      m1_re[l] = m1_req[l].re; m1_rrow[l] = m1_req[l].rrow; m1_rcol[l] = m1_req[l].rcol;
    end

  // each memory takes its tile shape from the side that owns it
  local_mem #(.S(S), .R_BANKS(R_BANKS)) u_lm0 (
    .clk, .lg_rowlen(pe_sel ? sd_lg : pe_lg),
    .we(m0_we), .wrow(m0_wrow), .wcol(m0_wcol), .wdata(m0_wd),
    .re(m0_re), .rrow(m0_rrow), .rcol(m0_rcol), .rdata(m0_rd)
  );

  local_mem #(.S(S), .R_BANKS(R_BANKS)) u_lm1 (
    .clk, .lg_rowlen(pe_sel ? pe_lg : sd_lg),
    .we(m1_we), .wrow(m1_wrow), .wcol(m1_wcol), .wdata(m1_wd),
    .re(m1_re), .rrow(m1_rrow), .rcol(m1_rcol), .rdata(m1_rd)
  );

  // The command front end may start an engine only when it is idle.
  a_xf_start_idle: assert property (@(posedge clk) disable iff (!rst_n) xf_start |-> !xf_busy);
  a_lm_start_idle: assert property (@(posedge clk) disable iff (!rst_n) lm_start |-> !lm_busy);

endmodule

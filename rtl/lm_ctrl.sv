// lm_ctrl: local memory controller. Runs one compute command on the local
// memory that is currently on the PE side, as one or two passes.
//
// A pass treats the tile in the memory as 2^lg_nvec vectors of 2^lg_len
// samples: rows (row DFT) or columns (column stride DFT, column local DFT).
// N_PE vectors are streamed at a time, one sample per PE per cycle, through
// the PE array; after the last sample the controller keeps feeding zeros until
// every result has left the FFTs. Results arrive in bit-reversed bin order and
// are written back in place at their natural position, so the tile holds the
// transformed vectors in order when the pass ends. In a twiddle pass
// (column stride DFT) bin k of the column whose first row is image row b is
// multiplied by W_N^(b*k), N = 2^lg_ncol the full column length; the ROM holds
// W_{N_TW}^e, so the address is b*k*(N_TW/N).
//
// Reads of vector v+1 overlap the write-back of vector v; the skewed bank
// placement of local_mem keeps the N_PE lanes conflict-free. A pass of T
// samples takes about T/N_PE + 2^lg_len + log2(N1_MAX) + 5 cycles.
// Only lanes 0 .. N_PE-1 of req are driven (and, in a pass of fewer vectors
// than PEs, only one lane per vector); the others stay idle (at the
// defaults, 1 PE and 2 banks, lane 1 is constant zero: the second lane
// exists for the SDRAM side, which moves two samples per beat).
// Interface: start (one cycle) with the pass descriptors; done pulses when the
// last result is written. Passes, in-place natural-order write-back and the
// zero flush are this design's realisation of the row / column operations.
module lm_ctrl
  import mddft_pkg::*;
#(
  parameter int R_BANKS = 2,
  parameter int N_PE    = 1,
  parameter int N_TW    = 4096
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    two_pass,
  input  pass_t                   pass0,
  input  pass_t                   pass1,
  input  logic [15:0]             cs_b,
  input  logic [4:0]              lg_ncol,
  output logic                    busy,
  output logic                    done,
  output logic [4:0]              lg_rowlen,
  // PE-side port of the local memory
  output lm_req_t                 req   [R_BANKS],
  input  cplx_t                   rdata [R_BANKS],
  // PE array
  output logic                    pe_clear,
  output logic [4:0]              pe_lg_len,
  output logic                    pe_in_valid,
  output cplx_t                   pe_in_data [N_PE],
  input  logic                    pe_fft_valid,
  output logic [$clog2(N_TW)-1:0] tw_addr,
  output logic                    tw_en,
  input  cplx_t                   pe_out_data [N_PE]
);

  localparam int LG_TW = $clog2(N_TW);
  localparam int LG_PE = $clog2(N_PE);

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_RUN} state_e;
  state_e st;

  pass_t        cur, nxt;
  logic         more;
  logic [31:0]  total, k, oc, wc;
  logic         rd_q, fl_q;
  // write-back pipeline, aligned with the PE array's two-cycle latency
  logic         wv   [2];
  logic [31:0]  wgrp [2];
  logic [15:0]  welem[2];

  assign busy      = (st != S_IDLE);
  assign pe_clear  = (st == S_CLEAR);
  assign pe_lg_len = cur.lg_len;
  assign lg_rowlen = cur.lg_rowlen;

  // samples per PE in one pass
  // (a pass with fewer vectors than PEs runs one group; the spare lanes idle)
  logic [4:0] lg_grp;
  always_comb begin
    lg_grp = (int'(cur.lg_nvec) > LG_PE) ? cur.lg_nvec : 5'(LG_PE);
    total  = 32'(1) << (int'(cur.lg_len) + int'(lg_grp) - LG_PE);
  end

  // fft output position -> bin and group
  logic [31:0] ogrp;
  logic [15:0] obin;
  logic [LG_TW-1:0] e;             // exponent mod N_TW
  always_comb begin
    ogrp    = oc >> cur.lg_len;
    obin    = bitrev(16'(oc & ((32'(1) << cur.lg_len) - 1)), cur.lg_len);
    e       = LG_TW'((32'(cs_b) * 32'(obin)) << (LG_TW - int'(lg_ncol)));
    tw_addr = e;
    tw_en   = cur.twiddle;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= S_IDLE; done <= 1'b0; more <= 1'b0;
      k <= '0; oc <= '0; wc <= '0; rd_q <= 1'b0; fl_q <= 1'b0;
      cur <= '0; nxt <= '0;
      for (int i = 0; i < 2; i++) wv[i] <= 1'b0;
    end else begin
      done <= 1'b0;
      rd_q <= (st == S_RUN) && (k < total);
      fl_q <= (st == S_RUN) && (k >= total) && (oc < total);
      wv[0] <= (st == S_RUN) && pe_fft_valid && (oc < total);
      wv[1] <= wv[0];
      case (st)
        S_IDLE: if (start) begin
          cur <= pass0; nxt <= pass1; more <= two_pass;
          st  <= S_CLEAR;
        end
        S_CLEAR: begin
          k <= '0; oc <= '0; wc <= '0;
          st <= S_RUN;
        end
        S_RUN: begin
          if (k < total) k <= k + 1;
          if (pe_fft_valid && oc < total) oc <= oc + 1;
          if (wv[1]) begin
            wc <= wc + 1;
            if (wc == total - 1) begin
              if (more) begin
                cur <= nxt; more <= 1'b0; st <= S_CLEAR;
              end else begin
                st <= S_IDLE; done <= 1'b1;
              end
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    wgrp[0]  <= ogrp;  welem[0] <= obin;
    wgrp[1]  <= wgrp[0]; welem[1] <= welem[0];
  end

  // feed side: group of N_PE vectors and element index of sample k
  logic [31:0] fgrp;
  logic [15:0] felem;
  always_comb begin
    fgrp  = k >> cur.lg_len;
    felem = 16'(k & ((32'(1) << cur.lg_len) - 1));
  end

  always_comb begin
    for (int l = 0; l < R_BANKS; l++) begin
      logic [15:0] fv, wvv;
      req[l] = '0;
      fv  = 16'((fgrp << LG_PE) + 32'(l));
      wvv = 16'((wgrp[1] << LG_PE) + 32'(l));
      if (l < N_PE && 32'(l) < (32'(1) << cur.lg_nvec)) begin
        req[l].re    = (st == S_RUN) && (k < total);
        req[l].rrow  = cur.col_dir ? felem : fv;
        req[l].rcol  = cur.col_dir ? fv : felem;
        req[l].we    = wv[1];
        req[l].wrow  = cur.col_dir ? welem[1] : wvv;
        req[l].wcol  = cur.col_dir ? wvv : welem[1];
        req[l].wdata = pe_out_data[l];
      end
    end
  end

  assign pe_in_valid = rd_q || fl_q;
  always_comb
    for (int q = 0; q < N_PE; q++) pe_in_data[q] = rd_q ? rdata[q] : '0;

endmodule

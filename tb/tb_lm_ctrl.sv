// tb_lm_ctrl: test of the local memory controller driving a PE array on one
// local memory (2 banks, 1 PE). The tile is preloaded with random samples;
// the testbench starts row DFT passes, column passes with and without the
// twiddle multiplication, and a two-pass command, and compares the tile with
// a double-precision model of the same passes. Also checks the pass time:
// samples + transform length + pipeline latency.
module tb_lm_ctrl;
  import mddft_pkg::*;

  localparam int RB = 2, NPE = 1, S = 4096, NTW = 1024, N1MAX = 256;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, two_pass = 0, busy, done, inv = 0;
  pass_t pass0, pass1;
  logic [15:0] cs_b;
  logic [4:0] lg_ncol, lg_rowlen, pe_lg_len;
  lm_req_t req [RB];
  cplx_t rdata [RB];
  logic pe_clear, pe_in_valid, pe_fft_valid, tw_en, pe_out_valid;
  cplx_t pe_in_data [NPE], pe_out_data [NPE];
  logic [$clog2(NTW)-1:0] tw_addr;

  lm_ctrl #(.R_BANKS(RB), .N_PE(NPE), .N_TW(NTW)) dut (.*);
  pe_array #(.N_PE(NPE), .N_MAX(N1MAX), .N_TW(NTW)) u_pes (
    .clk, .rst_n, .clear(pe_clear), .inv, .lg_len(pe_lg_len), .in_valid(pe_in_valid),
    .in_data(pe_in_data), .fft_valid(pe_fft_valid), .tw_addr, .tw_en,
    .out_valid(pe_out_valid), .out_data(pe_out_data));

  logic [RB-1:0] we, re;
  logic [15:0] wrow [RB], wcol [RB], rrow [RB], rcol [RB];
  cplx_t wd [RB];
  always_comb
    for (int l = 0; l < RB; l++) begin
      we[l] = req[l].we; wrow[l] = req[l].wrow; wcol[l] = req[l].wcol; wd[l] = req[l].wdata;
      re[l] = req[l].re; rrow[l] = req[l].rrow; rcol[l] = req[l].rcol;
    end
  local_mem #(.S(S), .R_BANKS(RB)) u_lm (.clk, .lg_rowlen, .we, .wrow, .wcol, .wdata(wd),
                                          .re, .rrow, .rcol, .rdata);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real tr [S], ti [S];   // model of the tile, row-major

  function automatic int widx(input int i, input int c, input int lgc);
    return ((i << lgc) + c) / RB;
  endfunction

  task automatic poke(input int i, input int c, input int lgc, input cplx_t v);
    if ((i + c) % RB == 0) u_lm.g_bank[0].u_bank.mem[widx(i, c, lgc)] = v;
    else                   u_lm.g_bank[1].u_bank.mem[widx(i, c, lgc)] = v;
  endtask

  function automatic cplx_t peek(input int i, input int c, input int lgc);
    return ((i + c) % RB == 0) ? u_lm.g_bank[0].u_bank.mem[widx(i, c, lgc)]
                               : u_lm.g_bank[1].u_bank.mem[widx(i, c, lgc)];
  endfunction

  // model of one pass on an R x C tile (C = 2^lgc)
  task automatic model_pass(input pass_t p, input int b, input int ncol, input bit inverse);
    int n, nv, C;
    real vr [], vi [];
    n = 1 << p.lg_len; nv = 1 << p.lg_nvec; C = 1 << p.lg_rowlen;
    vr = new[n]; vi = new[n];
    for (int v = 0; v < nv; v++) begin
      for (int k = 0; k < n; k++) begin
        real sr = 0, si = 0, a;
        for (int t = 0; t < n; t++) begin
          int ix;
          ix = p.col_dir ? t * C + v : v * C + t;
          a = (inverse ? 2.0 : -2.0) * PI * real'((k * t) % n) / real'(n);
          sr += tr[ix] * $cos(a) - ti[ix] * $sin(a);
          si += tr[ix] * $sin(a) + ti[ix] * $cos(a);
        end
        if (!inverse) begin sr /= real'(n); si /= real'(n); end
        if (p.twiddle) begin
          real wr, wi, t0;
          a = (inverse ? 2.0 : -2.0) * PI * real'((b * k) % ncol) / real'(ncol);
          wr = $cos(a); wi = $sin(a);
          t0 = sr * wr - si * wi; si = sr * wi + si * wr; sr = t0;
        end
        vr[k] = sr; vi[k] = si;
      end
      for (int k = 0; k < n; k++) begin
        int ix;
        ix = p.col_dir ? k * C + v : v * C + k;
        tr[ix] = vr[k]; ti[ix] = vi[k];
      end
    end
  endtask

  task automatic run(input string name, input int rows, input int lgc, input pass_t p0, input pass_t p1,
                     input bit two, input int b, input int lgn, input bit inverse);
    int C, cyc, bad, lim;
    real tol;
    cplx_t v;
    C = 1 << lgc;
    for (int i = 0; i < rows; i++)
      for (int c = 0; c < C; c++) begin
        v.re = DW'(int'($urandom_range(1 << 21)) - (1 << 20));
        v.im = DW'(int'($urandom_range(1 << 21)) - (1 << 20));
        if (inverse) begin v.re = v.re >>> 10; v.im = v.im >>> 10; end
        tr[i * C + c] = real'(v.re); ti[i * C + c] = real'(v.im);
        poke(i, c, lgc, v);
      end
    model_pass(p0, b, 1 << lgn, inverse);
    if (two) model_pass(p1, b, 1 << lgn, inverse);
    @(negedge clk);
    pass0 = p0; pass1 = p1; two_pass = two; cs_b = 16'(b); lg_ncol = 5'(lgn); inv = inverse;
    start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    bad = 0;
    tol = inverse ? 32.0 : 8.0;   // the inverse is unscaled, so rounding errors grow
    for (int i = 0; i < rows; i++)
      for (int c = 0; c < C; c++) begin
        real dr, di;
        v = peek(i, c, lgc);
        dr = real'(v.re) - tr[i * C + c]; di = real'(v.im) - ti[i * C + c];
        checks++;
        if (dr > tol || dr < -tol || di > tol || di < -tol) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL %s (%0d,%0d): got (%0d,%0d) exp (%0.1f,%0.1f)", name, i, c,
                                v.re, v.im, tr[i * C + c], ti[i * C + c]);
        end
      end
    lim = (1 << (p0.lg_len + p0.lg_nvec)) / NPE + (1 << p0.lg_len) + 20 + $clog2(N1MAX);
    if (two) lim += (1 << (p1.lg_len + p1.lg_nvec)) / NPE + (1 << p1.lg_len) + 20 + $clog2(N1MAX);
    checks++;
    if (cyc > lim) begin failures++; $display("FAIL %s took %0d cycles > %0d", name, cyc, lim); end
    $display("%s: %0d cycles, %0d samples off", name, cyc, bad);
  endtask

  function automatic pass_t mk(input bit cd, input int len, input int nv, input int rl, input bit tw);
    pass_t p;
    p.col_dir = cd; p.lg_len = 5'(len); p.lg_nvec = 5'(nv); p.lg_rowlen = 5'(rl); p.twiddle = tw;
    return p;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 16 rows of 256: row DFT
    run("row DFT 16x256", 16, 8, mk(0, 8, 4, 8, 0), '0, 0, 0, 4, 0);
    // 8 rows of 64 spaced p = 32 apart in a 256-row column, b = 5: column stride DFT
    run("col stride 8x64", 8, 6, mk(1, 3, 6, 6, 1), '0, 0, 5, 8, 0);
    // row operations: row DFT then column stride, b = 3, N = 128
    run("row ops 8x64", 8, 6, mk(0, 6, 3, 6, 0), mk(1, 3, 6, 6, 1), 1, 3, 7, 0);
    // column local DFT: 64 rows x 32 columns
    run("col local 64x32", 64, 5, mk(1, 6, 5, 5, 0), '0, 0, 0, 6, 0);
    // inverse row operations
    run("inverse row ops 8x32", 8, 5, mk(0, 5, 3, 5, 0), mk(1, 3, 5, 5, 1), 1, 7, 9, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mddft_full: the accelerator at its default parameters (S = 16384
// samples, 2 banks, 1 PE, 2048-point FFT, m = 8, 16-beat bursts, so B = 32
// and L = 512), taken through one complete 2-D forward DFT of a 1024 x 1024
// image: 128 row-operation jobs of 8 rows (row DFT, 8-point column stride
// DFT, twiddles), then 64 column-local-DFT jobs of 128 x 128 samples with
// permuted store, all with ping-pong overlap against a behavioural SDRAM
// that stalls 10% of the cycles. A full double-precision reference would be
// too slow, so the testbench checks 8 x 16 output bins spread over the
// spectrum (DC and Nyquist included) against a direct DFT of the random
// input, computed row DFT first for the chosen columns. Timing: the run must stay within
// 1.2x the sum of the per-job floors (the larger of compute and bus time)
// plus a fill/drain allowance.
module tb_mddft_full;
  import mddft_pkg::*;

  localparam int S = 16384, RB = 2, NPE = 1, M = 8;
  localparam int B = 32, L = S / B;
  localparam int N1 = 1024, N2 = 1024, NN = N1 * N2;
  localparam int WORDS = 2 * NN;
  localparam int OUT = NN;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid = 0, cmd_ready;
  cmd_t cmd;
  logic mem_cmd_valid, mem_cmd_ready, mem_cmd_write, mem_wvalid, mem_wready, mem_rvalid;
  logic [ADDR_W-1:0] mem_cmd_addr;
  logic [4:0] mem_cmd_beats;
  cplx_t mem_wdata [RB], mem_rdata [RB];
  logic busy, stride_mode;
  logic [31:0] cycles;

  mddft_top dut (.*);

  sdram_model #(.R_BANKS(RB), .WORDS(WORDS), .LAT(5), .STALL_PCT(10)) u_mem (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_split = 0, n_nosplit = 0, n_twopass = 0, n_twpass = 0, n_swap = 0;
  int n_overlap = 0, n_bp = 0, n_inv = 0, n_null = 0, n_3d = 0;
  logic sel_q;
  always @(posedge clk) begin
    sel_q <= dut.pe_sel;
    if (rst_n) begin
      if (dut.lm_start && stride_mode) n_split++;
      if (dut.lm_start && !stride_mode) n_nosplit++;
      if (dut.lm_start && dut.two_pass) n_twopass++;
      if (dut.u_lm_ctrl.st == 2'd1 && dut.u_lm_ctrl.cur.twiddle) n_twpass++;
      if (sel_q != dut.pe_sel) n_swap++;
      if (dut.u_lm_ctrl.busy && dut.u_sdram_if.busy) n_overlap++;
      if (mem_wvalid && !mem_wready) n_bp++;
      if (dut.lm_start && dut.inv) n_inv++;
    end
  end

  // ---------------- host side ----------------
  task automatic send(input cmd_t c);
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(negedge clk);   // accepted at the posedge in between
    cmd_valid = 0;
  endtask

  task automatic cfg(input opt_e o, input int prm);
    cmd_t c;
    c = '0; c.kind = CMD_COMPUTE; c.option = 4'(o); c.param = 16'(prm);
    send(c);
  endtask

  task automatic xfer(input xfer_e d, input int base, input int stride, input int rows, input int cols);
    cmd_t c;
    c = '0; c.kind = CMD_XFER; c.option = 4'(d);
    c.win.base = ADDR_W'(base); c.win.row_stride = ADDR_W'(stride);
    c.win.rows = 16'(rows); c.win.cols = 16'(cols);
    send(c);
  endtask

  typedef struct { int tb, ts, tr, tc; int fb, fs; int csb; opt_e op; } job_t;
  job_t jobs [$];

  // lower bound of the run time: per job the larger of compute (passes x
  // tile / N_PE) and bus time (tile in and out, R_BANKS samples per beat);
  // plus per ping-pong run the fill and drain of one job
  int t_ideal = 0, t_slack = 0;
  function automatic int passes_of(input opt_e o);
    return (o == OPT_RDFT_CSDFT) ? 2 : 1;
  endfunction

  // ping-pong schedule: FROM(i-2), TO(i), CS(b_i), COMPUTE(i); then drain.
  task automatic run_jobs();
    int n;
    n = jobs.size();
    foreach (jobs[i]) begin
      int tile, cp, bus;
      tile = jobs[i].tr * jobs[i].tc;
      cp   = passes_of(jobs[i].op) * tile / NPE;
      bus  = 2 * tile / RB;
      t_ideal += (cp > bus) ? cp : bus;
      t_slack += 40;
    end
    t_slack += 2 * (jobs[0].tr * jobs[0].tc) + 100;
    for (int i = 0; i < n; i++) begin
      if (i >= 2) xfer(XFER_FROM_FPGA, jobs[i-2].fb, jobs[i-2].fs, jobs[i-2].tr, jobs[i-2].tc);
      xfer(XFER_TO_FPGA, jobs[i].tb, jobs[i].ts, jobs[i].tr, jobs[i].tc);
      cfg(OPT_CS_START, jobs[i].csb);
      cfg(jobs[i].op, 0);
    end
    if (n >= 2) xfer(XFER_FROM_FPGA, jobs[n-2].fb, jobs[n-2].fs, jobs[n-2].tr, jobs[n-2].tc);
    cfg(OPT_NULL, 0);
    n_null++;
    xfer(XFER_FROM_FPGA, jobs[n-1].fb, jobs[n-1].fs, jobs[n-1].tr, jobs[n-1].tc);
    while (busy || cmd_valid) @(posedge clk);
    jobs.delete();
  endtask

  function automatic int lg2(input int v);
    int r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  // One plane: rows of n1 samples, nr rows, pitch samples apart in SDRAM.
  // do_rows = 0 skips the row DFT (the DFT along d3 of a 3-D volume).
  task automatic plane(input int in_b, input int out_b, input int pitch, input int n1, input int nr,
                       input bit do_rows);
    int m, p, c2, r;
    job_t j;
    m = (nr > L) ? M : 1;
    p = nr / m;
    cfg(OPT_IMAGE_SIZE, (lg2(n1) << 8) | lg2(nr));
    if (m > 1) begin
      for (int b = 0; b < p; b++) begin
        j.tb = in_b + b * pitch; j.ts = p * pitch; j.tr = m; j.tc = n1;
        j.fb = j.tb; j.fs = j.ts; j.csb = b; j.op = do_rows ? OPT_RDFT_CSDFT : OPT_CSDFT;
        jobs.push_back(j);
      end
      run_jobs();
    end else if (do_rows) begin
      r = (S / n1 < nr) ? S / n1 : nr;
      for (int c = 0; c < nr / r; c++) begin
        j.tb = in_b + c * r * pitch; j.ts = pitch; j.tr = r; j.tc = n1;
        j.fb = j.tb; j.fs = j.ts; j.csb = 0; j.op = OPT_RDFT;
        jobs.push_back(j);
      end
      run_jobs();
    end
    c2 = (n1 < S / p) ? n1 : S / p;
    for (int k1 = 0; k1 < m; k1++)
      for (int s = 0; s < n1 / c2; s++) begin
        j.tb = in_b + k1 * p * pitch + s * c2; j.ts = pitch; j.tr = p; j.tc = c2;
        j.fb = out_b + k1 * pitch + s * c2; j.fs = m * pitch; j.csb = 0; j.op = OPT_CLDFT;
        jobs.push_back(j);
      end
    run_jobs();
  endtask

  // ---------------- reference ----------------
  real wr [N1], wi [N1];          // exp(-2 pi j t / N1), N1 == N2
  int  k1s [8] = '{0, 1, 3, 17, 100, 511, 512, 1023};
  int  k2s [16] = '{0, 1, 2, 5, 8, 63, 127, 128, 129, 300, 511, 512, 640, 777, 1000, 1023};

  // copy of the input: the row operations overwrite it in SDRAM
  int  in_re [NN], in_im [NN];

  task automatic load_random(input int amp);
    for (int i = 0; i < NN; i++) begin
      in_re[i] = int'($urandom_range(2 * amp)) - amp;
      in_im[i] = int'($urandom_range(2 * amp)) - amp;
      u_mem.mem[i].re = DW'(in_re[i]);
      u_mem.mem[i].im = DW'(in_im[i]);
    end
  endtask

  task automatic check_bins(input real tol);
    real rr [8][N2], ri [8][N2];
    int bad = 0;
    for (int t = 0; t < N1; t++) begin
      wr[t] = $cos(2.0 * PI * real'(t) / real'(N1));
      wi[t] = -$sin(2.0 * PI * real'(t) / real'(N1));
    end
    // row DFT of every row, at the chosen k1 only
    for (int r = 0; r < N2; r++)
      for (int a = 0; a < 8; a++) begin
        real sr = 0, si = 0, xr, xi;
        for (int c = 0; c < N1; c++) begin
          int e;
          e  = (k1s[a] * c) % N1;
          xr = real'(in_re[r * N1 + c]);
          xi = real'(in_im[r * N1 + c]);
          sr += xr * wr[e] - xi * wi[e];
          si += xr * wi[e] + xi * wr[e];
        end
        rr[a][r] = sr; ri[a][r] = si;
      end
    // column DFT at the chosen k2, scaled by 1/(N1 N2)
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 16; b++) begin
        real sr = 0, si = 0, gr, gi;
        for (int r = 0; r < N2; r++) begin
          int e;
          e = (k2s[b] * r) % N2;
          sr += rr[a][r] * wr[e] - ri[a][r] * wi[e];
          si += rr[a][r] * wi[e] + ri[a][r] * wr[e];
        end
        sr = sr / real'(NN); si = si / real'(NN);
        gr = real'(signed'(u_mem.mem[OUT + k2s[b] * N1 + k1s[a]].re));
        gi = real'(signed'(u_mem.mem[OUT + k2s[b] * N1 + k1s[a]].im));
        checks++;
        if (gr - sr > tol || sr - gr > tol || gi - si > tol || si - gi > tol) begin
          failures++; bad++;
          if (bad < 6) $display("FAIL bin (k1=%0d,k2=%0d): got (%0.0f,%0.0f) exp (%0.1f,%0.1f)",
                                k1s[a], k2s[b], gr, gi, sr, si);
        end
      end
    $display("1024x1024 DFT: 128 bins compared, %0d off", bad);
    $display("bin (0,0): got (%0d,%0d)", signed'(u_mem.mem[OUT].re), signed'(u_mem.mem[OUT].im));
  endtask

  task automatic check_time(input string name, input int c0);
    int took;
    took = int'(cycles) - c0;
    checks++;
    $display("%s: %0d cycles, bound %0d + %0d (ratio %0.2f)", name, took, t_ideal, t_slack,
             real'(took) / real'(t_ideal));
    if (real'(took) > 1.2 * real'(t_ideal) + real'(t_slack)) begin
      failures++; $display("FAIL %s too slow", name);
    end
  endtask

  initial begin
    int c0;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    load_random(1 << 28);
    cfg(OPT_FWD_INV, 1);
    c0 = int'(cycles); t_ideal = 0; t_slack = 0;
    plane(0, OUT, N1, N1, N2, 1);
    check_time("2-D 1024x1024", c0);
    check_bins(16.0);

    begin
      automatic string nm [7] = '{"column split", "two-pass compute", "twiddle pass", "ping-pong swap",
                        "compute/transfer overlap", "bus back-pressure", "NULL compute"};
      automatic int    ct [7];
      ct = '{n_split, n_twopass, n_twpass, n_swap, n_overlap, n_bp, n_null};
      for (int i = 0; i < 7; i++) begin
        checks++;
        $display("mechanism %-26s %0d", nm[i], ct[i]);
        if (ct[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", nm[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

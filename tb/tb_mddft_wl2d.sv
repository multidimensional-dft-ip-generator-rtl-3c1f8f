// tb_mddft_wl2d: the 2-D image sizes the accelerator is rated for, at the
// default parameters: 128x128, 256x256, 512x512, 1024x1024 (tb_mddft_full),
// 2048x2048, 2048x512 and 512x2048 (N1 x N2, row length first), and the
// largest size the defaults hold, 2048x4096 (N2max = S^2/(N1max*B)). Each
// forward transform is spot-checked at 8 x 16 bins spread over the spectrum
// against a direct DFT of the random input, and timed against the floor of
// the ping-pong schedule. Two sizes also go back through the inverse
// transform; the whole image must come back with an SNR of at least RT_SNR
// dB (the reconstruction test of the design's precision study).
module tb_mddft_wl2d;
  import mddft_pkg::*;

  localparam int S = 16384, RB = 2, NPE = 1, M = 8;
  localparam int B = 32, L = S / B;
  localparam int MAXN = 2048 * 4096;
  localparam int WORDS = 2 * MAXN;
  localparam int OUT = MAXN;
  localparam real RT_SNR = 100.0;
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
    repeat (80000000) @(posedge clk);
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
  int  in_re [], in_im [];   // copy of the input: row operations overwrite it

  task automatic load_random(input int cnt, input int amp);
    in_re = new[cnt]; in_im = new[cnt];
    for (int i = 0; i < cnt; i++) begin
      in_re[i] = int'($urandom_range(2 * amp)) - amp;
      in_im[i] = int'($urandom_range(2 * amp)) - amp;
      u_mem.mem[i].re = DW'(in_re[i]);
      u_mem.mem[i].im = DW'(in_im[i]);
    end
  endtask

  // cos / -sin of 2 pi t / n
  task automatic wtab(input int n, output real c [], output real s []);
    c = new[n]; s = new[n];
    for (int t = 0; t < n; t++) begin
      c[t] = $cos(2.0 * PI * real'(t) / real'(n));
      s[t] = -$sin(2.0 * PI * real'(t) / real'(n));
    end
  endtask

  // a spread of bins in [0, n): DC, low, middle, Nyquist, top, random
  function automatic int pick(input int n, input int i);
    case (i % 8)
      0: return 0;
      1: return 1;
      2: return 3 + i / 8;
      3: return n / 8 + 1;
      4: return n / 2 - 1;
      5: return n / 2;
      6: return n - 1 - i / 8;
      default: return int'($urandom_range(n - 1));
    endcase
  endfunction

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

  function automatic bit off(input real g, input real e, input real tol);
    return (g - e > tol) || (e - g > tol);
  endfunction

  // 2-D DFT of the n1 x n2 image at 0, result at OUT; 8 x 16 bins checked
  task automatic run_2d(input int n1, input int n2, input int amp, input real tol);
    real c1 [], s1 [], c2 [], s2 [];
    real rr [][], ri [][];
    int  k1s [8], k2s [16], c0, bad = 0;
    string nm;
    nm = $sformatf("2-D %0dx%0d", n1, n2);
    load_random(n1 * n2, amp);
    cfg(OPT_FWD_INV, 1);
    c0 = int'(cycles); t_ideal = 0; t_slack = 0;
    plane(0, OUT, n1, n1, n2, 1);
    check_time(nm, c0);
    wtab(n1, c1, s1); wtab(n2, c2, s2);
    foreach (k1s[a]) k1s[a] = pick(n1, a);
    foreach (k2s[b]) k2s[b] = pick(n2, b);
    rr = new[8]; ri = new[8];
    for (int a = 0; a < 8; a++) begin
      rr[a] = new[n2]; ri[a] = new[n2];
      for (int r = 0; r < n2; r++) begin
        real sr = 0, si = 0;
        for (int c = 0; c < n1; c++) begin
          int e;
          e  = (k1s[a] * c) % n1;
          sr += real'(in_re[r * n1 + c]) * c1[e] - real'(in_im[r * n1 + c]) * s1[e];
          si += real'(in_re[r * n1 + c]) * s1[e] + real'(in_im[r * n1 + c]) * c1[e];
        end
        rr[a][r] = sr; ri[a][r] = si;
      end
    end
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 16; b++) begin
        real sr = 0, si = 0, gr, gi;
        for (int r = 0; r < n2; r++) begin
          int e;
          e = (k2s[b] * r) % n2;
          sr += rr[a][r] * c2[e] - ri[a][r] * s2[e];
          si += rr[a][r] * s2[e] + ri[a][r] * c2[e];
        end
        sr = sr / real'(n1 * n2); si = si / real'(n1 * n2);
        gr = real'(signed'(u_mem.mem[OUT + k2s[b] * n1 + k1s[a]].re));
        gi = real'(signed'(u_mem.mem[OUT + k2s[b] * n1 + k1s[a]].im));
        checks++;
        if (off(gr, sr, tol) || off(gi, si, tol)) begin
          failures++; bad++;
          if (bad < 4) $display("FAIL %s bin (%0d,%0d): got (%0.0f,%0.0f) exp (%0.1f,%0.1f)",
                                nm, k1s[a], k2s[b], gr, gi, sr, si);
        end
      end
    $display("%s: 128 bins compared, %0d off", nm, bad);
  endtask

  // inverse of the spectrum at OUT must give back the input (whole image)
  task automatic round_trip(input int n1, input int n2, input real min_snr);
    real sig = 0, err = 0, mx = 0, snr, d;
    int c0;
    for (int i = 0; i < n1 * n2; i++) u_mem.mem[i] = u_mem.mem[OUT + i];
    cfg(OPT_FWD_INV, 0);
    c0 = int'(cycles); t_ideal = 0; t_slack = 0;
    plane(0, OUT, n1, n1, n2, 1);
    check_time($sformatf("IDFT %0dx%0d", n1, n2), c0);
    for (int i = 0; i < n1 * n2; i++) begin
      sig += real'(in_re[i]) ** 2 + real'(in_im[i]) ** 2;
      d = real'(signed'(u_mem.mem[OUT + i].re)) - real'(in_re[i]);
      err += d * d; if (d > mx) mx = d; if (-d > mx) mx = -d;
      d = real'(signed'(u_mem.mem[OUT + i].im)) - real'(in_im[i]);
      err += d * d; if (d > mx) mx = d; if (-d > mx) mx = -d;
    end
    snr = 10.0 * $log10(sig / (err + 1.0e-30));
    checks++;
    $display("IDFT %0dx%0d round trip: SNR %0.1f dB, max error %0.0f LSB (full scale 2^31)",
             n1, n2, snr, mx);
    if (snr < min_snr) begin failures++; $display("FAIL round trip SNR below %0.1f dB", min_snr); end
  endtask

  task automatic mechanisms();
    automatic string nm [5] = '{"two-pass compute", "twiddle pass", "ping-pong swap",
                                "compute/transfer overlap", "bus back-pressure"};
    automatic int    ct [5];
    ct = '{n_twopass, n_twpass, n_swap, n_overlap, n_bp};
    for (int i = 0; i < 5; i++) begin
      checks++;
      $display("mechanism %-26s %0d", nm[i], ct[i]);
      if (ct[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", nm[i]); end
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_2d(128, 128, 1 << 28, 16.0);
    round_trip(128, 128, RT_SNR);
    run_2d(256, 256, 1 << 28, 16.0);
    run_2d(512, 512, 1 << 28, 16.0);
    round_trip(512, 512, RT_SNR);
    run_2d(2048, 512, 1 << 28, 16.0);
    run_2d(512, 2048, 1 << 28, 16.0);
    run_2d(2048, 2048, 1 << 28, 16.0);
    run_2d(2048, 4096, 1 << 28, 16.0);
    mechanisms();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mddft_wl3d: 3-D DFTs of the cube sizes the accelerator is rated for
// that a simulator can hold, 128^3 and 256^3 samples, at the default
// parameters. The host runs the 2-D procedure on every d1-d2 plane in place,
// then the DFT along d3 on every d1-d3 plane (row pitch N1*N2, no split
// since N3 <= L = 512) into a separate output area. 64 output bins are
// checked against a separable direct DFT of the random input, and the run
// is timed against the floor of the ping-pong schedule. (512^3 fits the
// design but needs 2^28 samples of simulated SDRAM.)
module tb_mddft_wl3d;
  import mddft_pkg::*;

  localparam int S = 16384, RB = 2, NPE = 1, M = 8;
  localparam int B = 32, L = S / B;
  localparam int MAXN = 256 * 256 * 256;
  localparam int WORDS = 2 * MAXN;
  localparam int OUT = MAXN;
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
    repeat (120000000) @(posedge clk);
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

  // 3-D DFT of an n x n x n volume at 0, result at OUT; 4 x 4 x 4 bins checked
  task automatic run_3d(input int n, input int amp, input real tol);
    real cw [], sw [];
    real ar [][], ai [][], br [][], bi [][];
    int  ks [4], c0, bad = 0, nn;
    string nm;
    nm = $sformatf("3-D %0dx%0dx%0d", n, n, n);
    nn = n * n;
    load_random(nn * n, amp);
    cfg(OPT_FWD_INV, 1);
    c0 = int'(cycles); t_ideal = 0; t_slack = 0;
    for (int z = 0; z < n; z++) plane(z * nn, z * nn, n, n, n, 1);   // d1-d2 planes
    for (int y = 0; y < n; y++) plane(y * n, OUT + y * n, nn, n, n, 0); // along d3
    check_time(nm, c0);
    wtab(n, cw, sw);
    foreach (ks[i]) ks[i] = pick(n, i);
    ks[3] = n / 2;
    // along d1 at the chosen k1: ar[a][z*n + y]
    ar = new[4]; ai = new[4];
    for (int a = 0; a < 4; a++) begin
      ar[a] = new[nn]; ai[a] = new[nn];
      for (int zy = 0; zy < nn; zy++) begin
        real sr = 0, si = 0;
        for (int x = 0; x < n; x++) begin
          int e;
          e = (ks[a] * x) % n;
          sr += real'(in_re[zy * n + x]) * cw[e] - real'(in_im[zy * n + x]) * sw[e];
          si += real'(in_re[zy * n + x]) * sw[e] + real'(in_im[zy * n + x]) * cw[e];
        end
        ar[a][zy] = sr; ai[a][zy] = si;
      end
    end
    // along d2: br[a*4 + b][z]
    br = new[16]; bi = new[16];
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        br[a * 4 + b] = new[n]; bi[a * 4 + b] = new[n];
        for (int z = 0; z < n; z++) begin
          real sr = 0, si = 0;
          for (int y = 0; y < n; y++) begin
            int e;
            e = (ks[b] * y) % n;
            sr += ar[a][z * n + y] * cw[e] - ai[a][z * n + y] * sw[e];
            si += ar[a][z * n + y] * sw[e] + ai[a][z * n + y] * cw[e];
          end
          br[a * 4 + b][z] = sr; bi[a * 4 + b][z] = si;
        end
      end
    // along d3, scaled by 1/n^3
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        for (int c = 0; c < 4; c++) begin
          real sr = 0, si = 0, gr, gi;
          int  adr;
          for (int z = 0; z < n; z++) begin
            int e;
            e = (ks[c] * z) % n;
            sr += br[a * 4 + b][z] * cw[e] - bi[a * 4 + b][z] * sw[e];
            si += br[a * 4 + b][z] * sw[e] + bi[a * 4 + b][z] * cw[e];
          end
          sr = sr / real'(nn * n); si = si / real'(nn * n);
          adr = OUT + ks[c] * nn + ks[b] * n + ks[a];
          gr = real'(signed'(u_mem.mem[adr].re));
          gi = real'(signed'(u_mem.mem[adr].im));
          checks++;
          if (off(gr, sr, tol) || off(gi, si, tol)) begin
            failures++; bad++;
            if (bad < 4) $display("FAIL %s bin (%0d,%0d,%0d): got (%0.0f,%0.0f) exp (%0.1f,%0.1f)",
                                  nm, ks[a], ks[b], ks[c], gr, gi, sr, si);
          end
        end
    $display("%s: 64 bins compared, %0d off", nm, bad);
  endtask

  task automatic mechanisms();
    automatic string nm [3] = '{"ping-pong swap", "compute/transfer overlap", "bus back-pressure"};
    automatic int    ct [3];
    ct = '{n_swap, n_overlap, n_bp};
    for (int i = 0; i < 3; i++) begin
      checks++;
      $display("mechanism %-26s %0d", nm[i], ct[i]);
      if (ct[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", nm[i]); end
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_3d(128, 1 << 28, 16.0);
    run_3d(256, 1 << 28, 16.0);
    mechanisms();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

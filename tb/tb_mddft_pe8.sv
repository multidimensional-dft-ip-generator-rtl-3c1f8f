// tb_mddft_pe8: end-to-end test of the accelerator with 8 processing
// elements and 8-bank local memories (the multi-PE configuration proposed
// for a board whose memory bus delivers 8 samples per cycle), at reduced size:
// S = 1024 samples, 32-point FFT, m = 4, 4-beat bursts of 8 samples, so
// B = 32 and L = 32. Same host, workloads and checks as tb_mddft_top:
//   A  2-D 32x64 forward (column split, m = 4, p = 16; the 4-row tiles of
//      the row operations keep only 4 of the 8 PEs busy)
//   B  2-D 16x16 forward (no split)
//   C  2-D 32x64 inverse of A's result, must give back the input
//   D  3-D 16x8x64 forward
// All mechanisms must occur, and every run must stay within 1.2x the
// compute/bus floor (now with 8 samples per cycle on both sides) plus a
// fill/drain allowance.
module tb_mddft_pe8;
  import mddft_pkg::*;

  localparam int S = 1024, RB = 8, NPE = 8, N1MAX = 32, M = 4, BB = 4;
  localparam int B = RB * BB, L = S / B;
  localparam int WORDS = 65536;
  localparam int OUT = 32768;
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

  mddft_top #(.S(S), .R_BANKS(RB), .N_PE(NPE), .N1_MAX(N1MAX), .M_STRIDE(M), .BURST_BEATS(BB)) dut (.*);

  sdram_model #(.R_BANKS(RB), .WORDS(WORDS), .LAT(5), .STALL_PCT(10)) u_mem (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
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
  real xr [], xi [], yr [], yi [];

  // in-place DFT along one axis of an n1 x n2 x n3 array held in yr/yi
  task automatic ref_axis(input int n1, input int n2, input int n3, input int axis, input bit inverse);
    int n, st, cnt;
    real tr [], ti [];
    n  = (axis == 0) ? n1 : (axis == 1) ? n2 : n3;
    st = (axis == 0) ? 1 : (axis == 1) ? n1 : n1 * n2;
    tr = new[n]; ti = new[n];
    cnt = n1 * n2 * n3;
    for (int base = 0; base < cnt; base++) begin
      // base must be the first element of a line along axis
      if (((base / st) % n) != 0) continue;
      for (int k = 0; k < n; k++) begin
        real sr = 0, si = 0, a;
        for (int t = 0; t < n; t++) begin
          a = (inverse ? 2.0 : -2.0) * PI * real'((k * t) % n) / real'(n);
          sr += yr[base + t * st] * $cos(a) - yi[base + t * st] * $sin(a);
          si += yr[base + t * st] * $sin(a) + yi[base + t * st] * $cos(a);
        end
        tr[k] = inverse ? sr : sr / real'(n);
        ti[k] = inverse ? si : si / real'(n);
      end
      for (int k = 0; k < n; k++) begin
        yr[base + k * st] = tr[k]; yi[base + k * st] = ti[k];
      end
    end
  endtask

  task automatic load_random(input int cnt, input int amp);
    xr = new[cnt]; xi = new[cnt];
    for (int i = 0; i < cnt; i++) begin
      xr[i] = real'(int'($urandom_range(2 * amp)) - amp);
      xi[i] = real'(int'($urandom_range(2 * amp)) - amp);
      u_mem.mem[i].re = DW'(int'(xr[i]));
      u_mem.mem[i].im = DW'(int'(xi[i]));
    end
  endtask

  task automatic compare(input string name, input int base, input int cnt, input real tol);
    int bad = 0;
    real dr, di;
    for (int i = 0; i < cnt; i++) begin
      dr = real'(u_mem.mem[base + i].re) - yr[i];
      di = real'(u_mem.mem[base + i].im) - yi[i];
      checks++;
      if (dr > tol || dr < -tol || di > tol || di < -tol) begin
        failures++; bad++;
        if (bad < 6) $display("FAIL %s [%0d]: got (%0d,%0d) exp (%0.1f,%0.1f)", name, i,
                              u_mem.mem[base + i].re, u_mem.mem[base + i].im, yr[i], yi[i]);
      end
    end
    $display("%s: %0d samples compared, %0d off", name, cnt, bad);
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

    // A: 2-D 32 x 64, forward
    load_random(32 * 64, 1 << 20);
    yr = new[32 * 64]; yi = new[32 * 64];
    foreach (xr[i]) begin yr[i] = xr[i]; yi[i] = xi[i]; end
    ref_axis(32, 64, 1, 0, 0); ref_axis(32, 64, 1, 1, 0);
    cfg(OPT_FWD_INV, 1);
    c0 = int'(cycles); t_ideal = 0; t_slack = 0;
    plane(0, OUT, 32, 32, 64, 1);
    check_time("A 32x64", c0);
    compare("A 2-D 32x64 DFT", OUT, 32 * 64, 8.0);

    // C: inverse of A's output must give the input back
    for (int i = 0; i < 32 * 64; i++) u_mem.mem[i] = u_mem.mem[OUT + i];
    cfg(OPT_FWD_INV, 0);
    plane(0, OUT, 32, 32, 64, 1);
    foreach (xr[i]) begin yr[i] = xr[i]; yi[i] = xi[i]; end
    compare("C 2-D 32x64 IDFT round trip", OUT, 32 * 64, 600.0);

    // B: 2-D 16 x 16, forward, no column split
    load_random(16 * 16, 1 << 20);
    yr = new[256]; yi = new[256];
    foreach (xr[i]) begin yr[i] = xr[i]; yi[i] = xi[i]; end
    ref_axis(16, 16, 1, 0, 0); ref_axis(16, 16, 1, 1, 0);
    cfg(OPT_FWD_INV, 1);
    plane(0, OUT, 16, 16, 16, 1);
    compare("B 2-D 16x16 DFT", OUT, 256, 8.0);

    // D: 3-D 16 x 8 x 64: 2-D DFT of every d1-d2 slice, then along d3
    load_random(16 * 8 * 64, 1 << 20);
    yr = new[16 * 8 * 64]; yi = new[16 * 8 * 64];
    foreach (xr[i]) begin yr[i] = xr[i]; yi[i] = xi[i]; end
    ref_axis(16, 8, 64, 0, 0); ref_axis(16, 8, 64, 1, 0); ref_axis(16, 8, 64, 2, 0);
    c0 = int'(cycles); t_ideal = 0; t_slack = 0;
    for (int z = 0; z < 64; z++) plane(z * 128, z * 128, 16, 16, 8, 1);
    for (int y = 0; y < 8; y++) plane(y * 16, OUT + y * 16, 128, 16, 64, 0);
    n_3d++;
    check_time("D 16x8x64", c0);
    compare("D 3-D 16x8x64 DFT", OUT, 16 * 8 * 64, 8.0);

    begin
      automatic string nm [10] = '{"column split", "no split", "two-pass compute", "twiddle pass", "ping-pong swap",
                         "compute/transfer overlap", "bus back-pressure", "inverse mode", "NULL compute", "3-D"};
      automatic int    ct [10];
      ct = '{n_split, n_nosplit, n_twopass, n_twpass, n_swap, n_overlap, n_bp, n_inv, n_null, n_3d};
      for (int i = 0; i < 10; i++) begin
        checks++;
        $display("mechanism %-26s %0d", nm[i], ct[i]);
        if (ct[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", nm[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

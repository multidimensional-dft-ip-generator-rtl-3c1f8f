// tb_ucam_ctrl: test of the command front end with the compute engine and
// SDRAM interface replaced by simple responders (done a fixed number of
// cycles after start). Checks the pass descriptors derived for several image
// sizes (column split or not), the column stride start row, DFT/IDFT select,
// the ping-pong swap on every compute command, the ordering rules (a compute
// waits for the running transfer and compute; a transfer runs during a
// compute) and the cycle timer (counts only while a job runs); then a
// random mix of commands checking that exactly the compute commands swap.
module tb_ucam_ctrl;
  import mddft_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid = 0, cmd_ready;
  cmd_t cmd;
  logic lm_start, two_pass, inv, lm_done = 0, pe_sel, xf_start, xf_dir, xf_done = 0, busy, stride_mode;
  pass_t pass0, pass1;
  logic [15:0] cs_b;
  logic [4:0] lg_ncol;
  win_t xf_win;
  logic [31:0] cycles;

  ucam_ctrl #(.S(16384), .R_BANKS(2), .BURST_BEATS(16), .M_STRIDE(8)) dut (.*);

  int checks = 0, failures = 0;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // responders
  int lm_cnt = 0, xf_cnt = 0, LM_T = 50, XF_T = 30;
  int lm_starts = 0, xf_starts = 0;
  logic lm_run = 0, xf_run = 0;
  int overlap = 0;
  always @(posedge clk) begin
    lm_done <= 0; xf_done <= 0;
    if (lm_start) begin lm_run <= 1; lm_cnt <= LM_T; lm_starts++; end
    else if (lm_run) begin lm_cnt <= lm_cnt - 1; if (lm_cnt == 1) begin lm_run <= 0; lm_done <= 1; end end
    if (xf_start) begin xf_run <= 1; xf_cnt <= XF_T; xf_starts++; end
    else if (xf_run) begin xf_cnt <= xf_cnt - 1; if (xf_cnt == 1) begin xf_run <= 0; xf_done <= 1; end end
    if (lm_run && xf_run) overlap++;
    if (lm_start && xf_run) begin failures++; $display("FAIL compute started during a transfer"); end
  end

  task automatic send(input cmd_t c);
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic cfg(input opt_e o, input int prm);
    cmd_t c;
    c = '0; c.kind = CMD_COMPUTE; c.option = 4'(o); c.param = 16'(prm);
    send(c);
  endtask

  task automatic xfer(input xfer_e d, input int base);
    cmd_t c;
    c = '0; c.kind = CMD_XFER; c.option = 4'(d); c.win.base = ADDR_W'(base);
    c.win.rows = 8; c.win.cols = 64; c.win.row_stride = 256;
    send(c);
  endtask

  task automatic expect_pass(input string nm, input pass_t p, input bit cd, input int len, input int nv,
                             input int rl, input bit tw);
    checks++;
    if (p.col_dir != cd || int'(p.lg_len) != len || int'(p.lg_nvec) != nv || int'(p.lg_rowlen) != rl ||
        p.twiddle != tw) begin
      failures++;
      $display("FAIL %s: got dir=%0d len=%0d nvec=%0d rowlen=%0d tw=%0d", nm, p.col_dir, p.lg_len, p.lg_nvec,
               p.lg_rowlen, p.twiddle);
    end
  endtask

  task automatic wait_idle();
    do @(negedge clk); while (busy || lm_run || xf_run);
  endtask

  initial begin
    logic s0;
    int c0;
    cmd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // 2048 x 2048: Nr > L = 512, so m = 8, p = 256; column local tile 256 x 64
    cfg(OPT_IMAGE_SIZE, (11 << 8) | 11);
    cfg(OPT_FWD_INV, 1);
    cfg(OPT_CS_START, 37);
    s0 = pe_sel;
    cfg(OPT_RDFT_CSDFT, 0);
    @(negedge clk);
    checks++; if (!stride_mode) begin failures++; $display("FAIL stride mode expected"); end
    checks++; if (pe_sel == s0) begin failures++; $display("FAIL no swap"); end
    checks++; if (!two_pass || cs_b != 37 || inv || lg_ncol != 11) begin failures++; $display("FAIL row ops setup"); end
    expect_pass("2048 row DFT", pass0, 0, 11, 3, 11, 0);
    expect_pass("2048 col stride", pass1, 1, 3, 11, 11, 1);
    // a transfer is accepted while the compute runs
    xfer(XFER_TO_FPGA, 1234);
    checks++; if (!lm_run || xf_dir || xf_win.base != 1234) begin failures++; $display("FAIL transfer during compute"); end
    cfg(OPT_CLDFT, 0);
    @(negedge clk);
    expect_pass("2048 col local", pass0, 1, 8, 6, 6, 0);
    checks++; if (two_pass) begin failures++; $display("FAIL col local is one pass"); end
    wait_idle();

    // 512 x 2048 (Nc = 512): m = 8, p = 256, local tile 256 x 64
    cfg(OPT_IMAGE_SIZE, (9 << 8) | 11);
    cfg(OPT_RDFT_CSDFT, 0);
    @(negedge clk);
    expect_pass("512x2048 row DFT", pass0, 0, 9, 3, 9, 0);
    expect_pass("512x2048 col stride", pass1, 1, 3, 9, 9, 1);
    wait_idle();

    // 128 x 128: whole columns fit, row DFT on 128 rows, column local 128 x 128
    cfg(OPT_IMAGE_SIZE, (7 << 8) | 7);
    cfg(OPT_FWD_INV, 0);
    cfg(OPT_RDFT, 0);
    @(negedge clk);
    checks++; if (stride_mode || !inv) begin failures++; $display("FAIL 128x128 mode"); end
    expect_pass("128 row DFT", pass0, 0, 7, 7, 7, 0);
    cfg(OPT_CLDFT, 0);
    @(negedge clk);
    expect_pass("128 col local", pass0, 1, 7, 7, 7, 0);
    // a compute command waits for a running transfer
    wait_idle();
    XF_T = 80;
    xfer(XFER_FROM_FPGA, 0);
    cfg(OPT_CSDFT, 0);   // responder flags a start during the transfer
    checks++; if (xf_dir != 1'b1) begin failures++; $display("FAIL direction"); end
    wait_idle();
    // NULL swaps but starts nothing
    c0 = lm_starts; s0 = pe_sel;
    cfg(OPT_NULL, 0);
    @(negedge clk);
    checks++; if (lm_starts != c0 || pe_sel == s0) begin failures++; $display("FAIL NULL"); end
    checks++; if (overlap == 0) begin failures++; $display("FAIL no overlap of compute and transfer"); end
    checks++; if (cycles < 200) begin failures++; $display("FAIL timer %0d", cycles); end
    // the timer stands still while nothing runs
    wait_idle();
    c0 = int'(cycles);
    repeat (100) @(negedge clk);
    checks++; if (int'(cycles) != c0) begin failures++; $display("FAIL timer runs while idle"); end
    // random command mix: each compute command (NULL included) swaps exactly
    // once and starts one compute (none for NULL); others never swap
    cfg(OPT_IMAGE_SIZE, (10 << 8) | 10);
    for (int i = 0; i < 40; i++) begin
      opt_e o;
      int   st0;
      case ($urandom_range(6))
        0: o = OPT_RDFT;   1: o = OPT_CSDFT; 2: o = OPT_RDFT_CSDFT; 3: o = OPT_CLDFT;
        4: o = OPT_NULL;   5: o = OPT_FWD_INV; default: o = OPT_CS_START;
      endcase
      s0 = pe_sel; st0 = lm_starts;
      if ($urandom_range(1) == 1) xfer(XFER_TO_FPGA, i * 64);
      cfg(o, (o == OPT_FWD_INV) ? int'($urandom_range(1)) : i);
      @(negedge clk);
      checks++;
      if ((pe_sel != s0) != (o inside {OPT_RDFT, OPT_CSDFT, OPT_RDFT_CSDFT, OPT_CLDFT, OPT_NULL})) begin
        failures++; $display("FAIL swap on option %0d", o);
      end
      checks++;
      if ((lm_starts - st0) != ((o inside {OPT_RDFT, OPT_CSDFT, OPT_RDFT_CSDFT, OPT_CLDFT}) ? 1 : 0)) begin
        failures++; $display("FAIL compute starts on option %0d: %0d", o, lm_starts - st0);
      end
      if (o == OPT_CS_START) begin
        wait_idle();
        checks++; if (int'(cs_b) != i) begin failures++; $display("FAIL CS_START %0d", cs_b); end
      end
    end
    wait_idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

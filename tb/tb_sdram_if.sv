// tb_sdram_if: test of the SDRAM interface with one local memory and the
// behavioural SDRAM (random stalls). Loads windows of different shapes
// (row stride, partial bursts, 1 row) into the local memory, checks the local
// contents sample by sample, writes them back to another region with another
// stride and checks the SDRAM contents. Also checks the transfer time against
// the beat count (one beat per cycle when the bus does not stall).
module tb_sdram_if;
  import mddft_pkg::*;

  localparam int RB = 2, BB = 16, S = 16384, WORDS = 1 << 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, dir_from_fpga = 0, busy, done;
  win_t win;
  logic [4:0] lg_rowlen;
  lm_req_t req [RB];
  cplx_t rdata [RB];
  logic mem_cmd_valid, mem_cmd_ready, mem_cmd_write, mem_wvalid, mem_wready, mem_rvalid;
  logic [ADDR_W-1:0] mem_cmd_addr;
  logic [4:0] mem_cmd_beats;
  cplx_t mem_wdata [RB], mem_rdata [RB];

  sdram_if #(.R_BANKS(RB), .BURST_BEATS(BB)) dut (.*);
  sdram_model #(.R_BANKS(RB), .WORDS(WORDS), .LAT(6), .STALL_PCT(0)) u_mem (.*);

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

  function automatic cplx_t pat(input int a);
    cplx_t c;
    c.re = DW'(a * 7 + 3); c.im = DW'(-a);
    return c;
  endfunction

  task automatic go(input logic d, input int base, input int stride, input int rows, input int cols,
                    output int cyc);
    win.base = ADDR_W'(base); win.row_stride = ADDR_W'(stride);
    win.rows = 16'(rows); win.cols = 16'(cols);
    dir_from_fpga = d;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  // local sample (i, c) as stored in the banks, read through the bank model
  function automatic cplx_t lm_peek(input int i, input int c, input int lgc);
    int b, w;
    b = (i + c) % RB;
    w = ((i << lgc) + c) / RB;
    return (b == 0) ? u_lm.g_bank[0].u_bank.mem[w] : u_lm.g_bank[1].u_bank.mem[w];
  endfunction

  task automatic trial(input int base, input int stride, input int rows, input int cols, input int dst,
                       input int dstride);
    int cyc, lgc;
    lgc = $clog2(cols);
    go(0, base, stride, rows, cols, cyc);
    checks++;
    if (cyc > rows * cols / RB + 2 * rows * cols / (RB * BB) + 6 * rows + 40) begin
      failures++; $display("FAIL load took %0d cycles", cyc);
    end
    for (int i = 0; i < rows; i++)
      for (int c = 0; c < cols; c++) begin
        checks++;
        if (lm_peek(i, c, lgc) != pat(base + i * stride + c)) begin
          failures++;
          if (failures < 8) $display("FAIL local (%0d,%0d)", i, c);
        end
      end
    go(1, dst, dstride, rows, cols, cyc);
    repeat (20) @(negedge clk);
    for (int i = 0; i < rows; i++)
      for (int c = 0; c < cols; c++) begin
        checks++;
        if (u_mem.mem[dst + i * dstride + c] != pat(base + i * stride + c)) begin
          failures++;
          if (failures < 8) $display("FAIL sdram (%0d,%0d) got %0d", i, c, u_mem.mem[dst + i * dstride + c].re);
        end
      end
    $display("window %0dx%0d ok so far: failures=%0d", rows, cols, failures);
  endtask

  initial begin
    for (int a = 0; a < WORDS; a++) u_mem.mem[a] = pat(a);
    repeat (3) @(negedge clk);
    rst_n = 1;
    trial(0, 2048, 8, 2048, 40000, 2048);   // 8 rows of 2048 spaced 2048 apart
    trial(64, 256, 16, 64, 50000, 128);     // strip of 64 columns
    trial(6, 8, 4, 8, 60000, 8);            // partial bursts (4 beats)
    trial(100, 0, 1, 2, 61000, 0);          // a single beat
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_local_mem: test of one banked local memory (S = 1024, 2 and 4 banks).
// Fills a tile row by row, R_BANKS consecutive samples per cycle (the SDRAM
// side pattern), checks the skewed placement (sample (i, c) in bank
// (i + c) mod R_BANKS), reads it back column by column with R_BANKS rows per
// cycle (the column DFT pattern) and row by row, checking data and the
// one-cycle read latency; then overwrites it column-wise and reads it back.
module tb_local_mem;
  import mddft_pkg::*;

  localparam int S = 1024;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cplx_t pat(input int i, input int c, input int k);
    cplx_t v;
    v.re = DW'(i * 1000 + c + k * 77777); v.im = DW'(-(i * 31 + c * 7) - k);
    return v;
  endfunction

  // ---- 2-bank instance ----
  localparam int R2 = 2;
  logic [R2-1:0] we2, re2;
  logic [15:0] wrow2 [R2], wcol2 [R2], rrow2 [R2], rcol2 [R2];
  cplx_t wd2 [R2], rd2 [R2];
  logic [4:0] lg2;
  local_mem #(.S(S), .R_BANKS(R2)) u2 (.clk, .lg_rowlen(lg2), .we(we2), .wrow(wrow2), .wcol(wcol2),
                                       .wdata(wd2), .re(re2), .rrow(rrow2), .rcol(rcol2), .rdata(rd2));
  // ---- 4-bank instance ----
  localparam int R4 = 4;
  logic [R4-1:0] we4, re4;
  logic [15:0] wrow4 [R4], wcol4 [R4], rrow4 [R4], rcol4 [R4];
  cplx_t wd4 [R4], rd4 [R4];
  logic [4:0] lg4;
  local_mem #(.S(S), .R_BANKS(R4)) u4 (.clk, .lg_rowlen(lg4), .we(we4), .wrow(wrow4), .wcol(wcol4),
                                       .wdata(wd4), .re(re4), .rrow(rrow4), .rcol(rcol4), .rdata(rd4));

  // generic driver through tasks per instance (R lanes)
  task automatic run2(input int lgc, input int k);
    int C, R;
    C = 1 << lgc; R = S / C; lg2 = 5'(lgc);
    // row-wise fill
    for (int i = 0; i < R; i++)
      for (int c = 0; c < C; c += R2) begin
        @(negedge clk);
        re2 = '0; we2 = '1;
        for (int l = 0; l < R2; l++) begin wrow2[l] = 16'(i); wcol2[l] = 16'(c + l); wd2[l] = pat(i, c + l, k); end
      end
    @(negedge clk); we2 = '0;
    // placement
    for (int i = 0; i < R; i++)
      for (int c = 0; c < C; c++) begin
        cplx_t v;
        int w;
        w = (i * C + c) / R2;
        v = ((i + c) % R2 == 0) ? u2.g_bank[0].u_bank.mem[w] : u2.g_bank[1].u_bank.mem[w];
        checks++;
        if (v != pat(i, c, k)) begin failures++; if (failures < 6) $display("FAIL placement (%0d,%0d)", i, c); end
      end
    // column-wise read, R2 rows per cycle
    for (int c = 0; c < C; c++)
      for (int i = 0; i < R; i += R2) begin
        @(negedge clk);
        re2 = '1;
        for (int l = 0; l < R2; l++) begin rrow2[l] = 16'(i + l); rcol2[l] = 16'(c); end
        @(negedge clk);
        re2 = '0;
        for (int l = 0; l < R2; l++) begin
          checks++;
          if (rd2[l] != pat(i + l, c, k)) begin failures++; if (failures < 6) $display("FAIL col read (%0d,%0d)", i + l, c); end
        end
      end
  endtask

  task automatic run4(input int lgc, input int k);
    int C, R;
    C = 1 << lgc; R = S / C; lg4 = 5'(lgc);
    // column-wise fill, 4 rows per cycle
    for (int c = 0; c < C; c++)
      for (int i = 0; i < R; i += R4) begin
        @(negedge clk);
        re4 = '0; we4 = '1;
        for (int l = 0; l < R4; l++) begin wrow4[l] = 16'(i + l); wcol4[l] = 16'(c); wd4[l] = pat(i + l, c, k); end
      end
    @(negedge clk); we4 = '0;
    // row-wise read, pipelined: request every cycle, check one cycle later
    for (int i = 0; i < R; i++)
      for (int c = 0; c < C; c += R4) begin
        @(negedge clk);
        re4 = '1;
        for (int l = 0; l < R4; l++) begin rrow4[l] = 16'(i); rcol4[l] = 16'(c + l); end
        @(posedge clk); #1;
        for (int l = 0; l < R4; l++) begin
          checks++;
          if (rd4[l] != pat(i, c + l, k)) begin failures++; if (failures < 6) $display("FAIL row read4 (%0d,%0d)", i, c + l); end
        end
      end
    @(negedge clk); re4 = '0;
  endtask

  initial begin
    we2 = '0; re2 = '0; we4 = '0; re4 = '0;
    for (int l = 0; l < R2; l++) begin wrow2[l] = 0; wcol2[l] = 0; rrow2[l] = 0; rcol2[l] = 0; wd2[l] = '0; end
    for (int l = 0; l < R4; l++) begin wrow4[l] = 0; wcol4[l] = 0; rrow4[l] = 0; rcol4[l] = 0; wd4[l] = '0; end
    run2(6, 1);    // 16 rows x 64
    run2(3, 2);    // 128 rows x 8
    run4(5, 3);    // 32 rows x 32
    run4(8, 4);    // 4 rows x 256
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

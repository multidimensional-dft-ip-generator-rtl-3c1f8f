// tb_fft1d: self-checking test of the streaming FFT. Streams several vectors
// back to back for a set of lengths, forward and inverse, and compares every
// bin with a double-precision DFT computed here (forward scaled by 1/N).
// Also checks the 1 sample/cycle rate: the last result of a pass must appear
// no later than nvec*N + N + log2(N_MAX) + a few cycles after the first input.
module tb_fft1d;
  import mddft_pkg::*;

  localparam int N_MAX = 2048;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, clear = 0, inv = 0, in_valid = 0;
  logic [4:0] lg_len = 3;
  cplx_t in_data, out_data;
  logic out_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fft1d #(.N_MAX(N_MAX)) dut (.*);

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [4][N_MAX], xi [4][N_MAX];

  task automatic run(input int lg, input int nvec, input logic inverse, input int amp);
    int n, got, cyc, first_cyc;
    real er, ei, ang, tol, sc;
    n = 1 << lg;
    for (int v = 0; v < nvec; v++)
      for (int i = 0; i < n; i++) begin
        xr[v][i] = int'($urandom_range(2 * amp)) - amp;
        xi[v][i] = int'($urandom_range(2 * amp)) - amp;
      end
    @(posedge clk);
    lg_len <= 5'(lg); inv <= inverse; clear <= 1;
    @(posedge clk);
    clear <= 0;
    got = 0; cyc = 0; first_cyc = 0;
    fork
      begin : feed
        for (int k = 0; got < nvec * n; k++) begin
          in_valid <= 1;
          if (k < nvec * n) begin
            in_data.re <= xr[k / n][k % n];
            in_data.im <= xi[k / n][k % n];
          end else in_data <= '0;
          @(posedge clk);
        end
        in_valid <= 0;
      end
      begin : collect
        while (got < nvec * n) begin
          @(negedge clk);
          cyc++;
          if (out_valid) begin
            int v, bin;
            v = got / n;
            bin = int'(bitrev(16'(got % n), 5'(lg)));
            er = 0; ei = 0;
            for (int i = 0; i < n; i++) begin
              ang = (inverse ? 2.0 : -2.0) * PI * real'(i) * real'(bin) / real'(n);
              er += real'(xr[v][i]) * $cos(ang) - real'(xi[v][i]) * $sin(ang);
              ei += real'(xr[v][i]) * $sin(ang) + real'(xi[v][i]) * $cos(ang);
            end
            sc = inverse ? 1.0 : 1.0 / real'(n);
            er *= sc; ei *= sc;
            tol = 4.0 + 2.0 * real'(lg) + (inverse ? real'(n) * real'(lg) * 0.01 : 0.0);
            checks++;
            if ((real'(out_data.re) - er > tol) || (er - real'(out_data.re) > tol) ||
                (real'(out_data.im) - ei > tol) || (ei - real'(out_data.im) > tol)) begin
              failures++;
              if (failures < 10)
                $display("FAIL len=%0d inv=%0d vec=%0d bin=%0d got=(%0d,%0d) exp=(%0.1f,%0.1f)",
                         n, inverse, v, bin, out_data.re, out_data.im, er, ei);
            end
            got++;
          end
        end
      end
    join
    // rate: nvec*n inputs plus one vector of flush plus the register stages
    checks++;
    if (cyc > nvec * n + n + $clog2(N_MAX) + 4) begin
      failures++;
      $display("FAIL rate: len=%0d nvec=%0d took %0d cycles", n, nvec, cyc);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1, 4, 0, 1 << 20);
    run(3, 4, 0, 1 << 20);
    run(6, 3, 0, 1 << 20);
    run(8, 2, 1, 1 << 10);
    run(9, 2, 0, 1 << 20);
    run(11, 1, 0, 1 << 20);
    run(4, 4, 1, 1 << 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pe: test of one processing element. Streams 16-point vectors through the
// FFT; for every result the testbench supplies a twiddle one cycle after
// fft_valid (random on/off), and checks out_data two cycles after fft_valid
// against DFT/16, times the twiddle when it was enabled.
module tb_pe;
  import mddft_pkg::*;

  localparam real PI = 3.14159265358979323846;
  localparam int N = 16, NV = 6;

  logic clk = 0, rst_n = 0, clear = 0, inv = 0, in_valid = 0, fft_valid, tw_en, out_valid;
  logic [4:0] lg_len = 4;
  cplx_t in_data, out_data;
  twid_t tw;
  always #5 clk = ~clk;

  pe #(.N_MAX(2048)) dut (.*);

  int checks = 0, failures = 0;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [NV][N], xi [NV][N];
  int fc = 0, oc = 0;
  int tw_e [NV * N];
  bit tw_on [NV * N];

  // supply a twiddle for each FFT result, one cycle later
  always @(posedge clk) begin
    if (fft_valid && fc < NV * N) begin
      tw_e[fc]  <= int'($urandom_range(N - 1));
      tw_on[fc] <= 1'($urandom);
      fc <= fc + 1;
    end
  end
  always_comb begin
    tw    = twiddle_value(tw_e[(fc > 0) ? fc - 1 : 0], N);
    tw_en = tw_on[(fc > 0) ? fc - 1 : 0];
  end

  always @(negedge clk) begin
    if (out_valid && oc < NV * N) begin
      int v, bin;
      real er, ei, a, wr, wi, t0;
      v = oc / N; bin = int'(bitrev(16'(oc % N), 5'd4));
      er = 0; ei = 0;
      for (int i = 0; i < N; i++) begin
        a = -2.0 * PI * real'(i * bin) / real'(N);
        er += real'(xr[v][i]) * $cos(a) - real'(xi[v][i]) * $sin(a);
        ei += real'(xr[v][i]) * $sin(a) + real'(xi[v][i]) * $cos(a);
      end
      er /= real'(N); ei /= real'(N);
      if (tw_on[oc]) begin
        a = -2.0 * PI * real'(tw_e[oc]) / real'(N);
        wr = $cos(a); wi = $sin(a);
        t0 = er * wr - ei * wi; ei = er * wi + ei * wr; er = t0;
      end
      checks++;
      if (real'(out_data.re) - er > 6.0 || er - real'(out_data.re) > 6.0 ||
          real'(out_data.im) - ei > 6.0 || ei - real'(out_data.im) > 6.0) begin
        failures++;
        if (failures < 6) $display("FAIL result %0d: got (%0d,%0d) exp (%0.1f,%0.1f) tw=%0d", oc,
                                   out_data.re, out_data.im, er, ei, tw_on[oc]);
      end
      oc++;
    end
  end

  initial begin
    int k;
    in_data = '0;
    for (int v = 0; v < NV; v++)
      for (int i = 0; i < N; i++) begin
        xr[v][i] = int'($urandom_range(1 << 22)) - (1 << 21);
        xi[v][i] = int'($urandom_range(1 << 22)) - (1 << 21);
      end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    k = 0;
    while (oc < NV * N && k < 10 * NV * N) begin
      in_valid = 1;
      if (k < NV * N) begin in_data.re = xr[k / N][k % N]; in_data.im = xi[k / N][k % N]; end
      else in_data = '0;
      k++;
      @(negedge clk);
    end
    in_valid = 0;
    checks++;
    if (oc != NV * N) begin failures++; $display("FAIL only %0d results", oc); end
    // latency: N - 1 + 11 stage registers + 2 PE cycles from first input to first result
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

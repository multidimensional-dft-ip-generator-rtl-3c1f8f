// tb_pe_array: two PEs in lockstep with the shared twiddle ROM (N_TW = 64).
// Each PE gets its own 8-point vectors; the testbench drives a ROM address
// and tw_en in each fft_valid cycle and checks both PEs' results two cycles
// later against DFT/8 times W_64^addr, or plain DFT/8 when tw_en was low.
module tb_pe_array;
  import mddft_pkg::*;

  localparam real PI = 3.14159265358979323846;
  localparam int N = 8, NV = 8, NPE = 2, NTW = 64;

  logic clk = 0, rst_n = 0, clear = 0, inv = 0, in_valid = 0, fft_valid, tw_en, out_valid;
  logic [4:0] lg_len = 3;
  cplx_t in_data [NPE], out_data [NPE];
  logic [$clog2(NTW)-1:0] tw_addr;
  always #5 clk = ~clk;

  pe_array #(.N_PE(NPE), .N_MAX(64), .N_TW(NTW)) dut (.*);

  int checks = 0, failures = 0;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [NPE][NV][N], xi [NPE][NV][N];
  int fc = 0, oc = 0;
  int   a_log [NV * N];
  bit   e_log [NV * N];
  logic [5:0] a_cur;
  bit         e_cur;

  always_comb begin
    a_cur   = 6'((fc * 13 + 5) % NTW);
    e_cur   = (fc % 3) != 0;
    tw_addr = a_cur;
    tw_en   = e_cur;
  end
  always @(posedge clk)
    if (fft_valid && fc < NV * N) begin
      a_log[fc] <= int'(a_cur); e_log[fc] <= e_cur; fc <= fc + 1;
    end

  always @(negedge clk) begin
    if (out_valid && oc < NV * N) begin
      for (int q = 0; q < NPE; q++) begin
        int v, bin;
        real er, ei, a, wr, wi, t0;
        v = oc / N; bin = int'(bitrev(16'(oc % N), 5'd3));
        er = 0; ei = 0;
        for (int i = 0; i < N; i++) begin
          a = -2.0 * PI * real'(i * bin) / real'(N);
          er += real'(xr[q][v][i]) * $cos(a) - real'(xi[q][v][i]) * $sin(a);
          ei += real'(xr[q][v][i]) * $sin(a) + real'(xi[q][v][i]) * $cos(a);
        end
        er /= real'(N); ei /= real'(N);
        if (e_log[oc]) begin
          a = -2.0 * PI * real'(a_log[oc]) / real'(NTW);
          wr = $cos(a); wi = $sin(a);
          t0 = er * wr - ei * wi; ei = er * wi + ei * wr; er = t0;
        end
        checks++;
        if (real'(out_data[q].re) - er > 6.0 || er - real'(out_data[q].re) > 6.0 ||
            real'(out_data[q].im) - ei > 6.0 || ei - real'(out_data[q].im) > 6.0) begin
          failures++;
          if (failures < 6) $display("FAIL PE%0d result %0d: got (%0d,%0d) exp (%0.1f,%0.1f)", q, oc,
                                     out_data[q].re, out_data[q].im, er, ei);
        end
      end
      oc++;
    end
  end

  initial begin
    int k;
    for (int q = 0; q < NPE; q++) in_data[q] = '0;
    for (int q = 0; q < NPE; q++)
      for (int v = 0; v < NV; v++)
        for (int i = 0; i < N; i++) begin
          xr[q][v][i] = int'($urandom_range(1 << 22)) - (1 << 21);
          xi[q][v][i] = int'($urandom_range(1 << 22)) - (1 << 21);
        end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    k = 0;
    while (oc < NV * N && k < 10 * NV * N) begin
      in_valid = 1;
      for (int q = 0; q < NPE; q++)
        if (k < NV * N) begin in_data[q].re = xr[q][k / N][k % N]; in_data[q].im = xi[q][k / N][k % N]; end
        else in_data[q] = '0;
      k++;
      @(negedge clk);
    end
    in_valid = 0;
    checks++;
    if (oc != NV * N) begin failures++; $display("FAIL only %0d results", oc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

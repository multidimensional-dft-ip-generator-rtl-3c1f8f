// tb_twiddle_rom: reads every entry of the twiddle ROM, forward and inverse,
// and compares it with cos/sin computed here; checks the one-cycle read
// latency and the conjugate for the inverse transform.
module tb_twiddle_rom;
  import mddft_pkg::*;

  localparam int N_TW = 4096;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, inv = 0;
  logic [$clog2(N_TW)-1:0] addr = '0;
  twid_t w;
  always #5 clk = ~clk;

  twiddle_rom #(.N_TW(N_TW)) dut (.*);

  int checks = 0, failures = 0;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real sc, er, ei;
    sc = real'(1 << (TW - 2));
    for (int iv = 0; iv < 2; iv++)
      for (int e = 0; e < N_TW; e++) begin
        @(negedge clk); addr = 12'(e); inv = iv[0];
        @(negedge clk);
        er = $cos(2.0 * PI * real'(e) / real'(N_TW)) * sc;
        ei = (iv != 0 ? 1.0 : -1.0) * $sin(2.0 * PI * real'(e) / real'(N_TW)) * sc;
        checks++;
        if (real'(w.re) - er > 1.0 || er - real'(w.re) > 1.0 || real'(w.im) - ei > 1.0 || ei - real'(w.im) > 1.0) begin
          failures++;
          if (failures < 8) $display("FAIL e=%0d inv=%0d got (%0d,%0d) exp (%0.1f,%0.1f)", e, iv, w.re, w.im, er, ei);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

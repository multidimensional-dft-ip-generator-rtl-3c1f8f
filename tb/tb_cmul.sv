// tb_cmul: test of the complex multiplier. Random samples times random
// twiddle values (and the exact corner values +1, -1, +j), compared with a
// product computed here in double precision; checks the one-cycle latency.
module tb_cmul;
  import mddft_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  cplx_t a, y;
  twid_t w;
  always #5 clk = ~clk;

  cmul dut (.*);

  int checks = 0, failures = 0;
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input cplx_t aa, input twid_t ww);
    real sc, er, ei;
    sc = real'(1 << (TW - 2));
    er = (real'(aa.re) * real'(ww.re) - real'(aa.im) * real'(ww.im)) / sc;
    ei = (real'(aa.re) * real'(ww.im) + real'(aa.im) * real'(ww.re)) / sc;
    @(negedge clk); a = aa; w = ww; in_valid = 1;
    @(negedge clk); in_valid = 0;
    checks++;
    if (!out_valid || real'(y.re) - er > 1.0 || er - real'(y.re) > 1.0 ||
        real'(y.im) - ei > 1.0 || ei - real'(y.im) > 1.0) begin
      failures++;
      $display("FAIL (%0d,%0d)*(%0d,%0d) = (%0d,%0d) exp (%0.1f,%0.1f) v=%0d", aa.re, aa.im, ww.re, ww.im,
               y.re, y.im, er, ei, out_valid);
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL valid held"); end
  endtask

  initial begin
    cplx_t aa;
    twid_t ww;
    a = '0; w = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      aa.re = DW'($urandom); aa.im = DW'($urandom);
      aa.re = aa.re >>> 2; aa.im = aa.im >>> 2;
      ww = twiddle_value(int'($urandom_range(4095)), 4096);
      one(aa, ww);
    end
    aa.re = 123456; aa.im = -654321;
    one(aa, twiddle_value(0, 4));   // +1
    one(aa, twiddle_value(2, 4));   // -1
    one(aa, twiddle_value(3, 4));   // +j
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

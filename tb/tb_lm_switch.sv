// tb_lm_switch: drives random requests through the switch with both select
// values and checks that they reach only the selected memory port (the other
// sees zeros), and that read data is steered back from the memory that was
// selected one cycle earlier.
module tb_lm_switch;
  import mddft_pkg::*;

  localparam int RB = 2;
  logic clk = 0, sel = 0;
  lm_req_t req [RB], m0_req [RB], m1_req [RB];
  cplx_t rdata [RB], m0_rdata [RB], m1_rdata [RB];
  always #5 clk = ~clk;

  lm_switch #(.R_BANKS(RB)) dut (.*);

  int checks = 0, failures = 0;
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic s_prev;
    s_prev = 0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      sel = 1'($urandom);
      for (int l = 0; l < RB; l++) begin
        req[l] = lm_req_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
        m0_rdata[l] = cplx_t'({$urandom, $urandom});
        m1_rdata[l] = cplx_t'({$urandom, $urandom});
      end
      #1;
      for (int l = 0; l < RB; l++) begin
        checks++;
        if ((sel ? m1_req[l] : m0_req[l]) != req[l] || (sel ? m0_req[l] : m1_req[l]) != '0) begin
          failures++; $display("FAIL request routing t=%0d lane %0d sel=%0d", t, l, sel);
        end
        if (t > 0) begin
          checks++;
          if (rdata[l] != (s_prev ? m1_rdata[l] : m0_rdata[l])) begin
            failures++; $display("FAIL read data t=%0d lane %0d", t, l);
          end
        end
      end
      s_prev = sel;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

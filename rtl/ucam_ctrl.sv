// ucam_ctrl: command front end of the accelerator (datapath control and
// synchronisation). It takes the accelerator's commands one at a time,
// keeps the configuration they set, and starts the compute engine (lm_ctrl)
// and the SDRAM interface (sdram_if) so that they overlap.
//
// Commands (cmd_t): COMPUTE options 2..6 run row DFT, column stride DFT, row
// operations (both), column local DFT, or nothing; option 7 sets the image
// row b of the first sample of a column stride load (twiddle base); option 8
// sets {log2 Nc, log2 Nr} of the 2-D plane being processed; option 9 chooses
// DFT (1) or IDFT (0). DATA_TRANSFER options move a window into (0) or out of
// (1) the local memory on the SDRAM side.
//
// Ping-pong rule (this design's choice): every compute command, NULL
// included, first swaps the two local memories, so the tile just loaded goes
// to the PEs and the tile just computed comes to the SDRAM side. A compute
// command therefore waits until both the running compute and the running
// transfer have finished; a transfer only waits for the previous transfer;
// configuration commands wait for the compute to finish.
//
// Tile shapes (from S, B = R_BANKS*BURST_BEATS and L = S/B): if Nr > L the
// column is split as Nr = m*p with m = M_STRIDE: row operations hold m image
// rows spaced p apart, the column local DFT holds p rows of min(Nc, S/p)
// samples. Otherwise the row DFT holds min(S/Nc, Nr) consecutive rows and the
// column local DFT min(Nc, S/Nr) columns of the whole image column.
// cycles counts the clock cycles during which a job is active (the timer).
module ucam_ctrl
  import mddft_pkg::*;
#(
  parameter int S           = 16384,
  parameter int R_BANKS     = 2,
  parameter int BURST_BEATS = 16,
  parameter int M_STRIDE    = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  cmd_t        cmd,
  // compute engine
  output logic        lm_start,
  output logic        two_pass,
  output pass_t       pass0,
  output pass_t       pass1,
  output logic [15:0] cs_b,
  output logic [4:0]  lg_ncol,
  output logic        inv,
  input  logic        lm_done,
  // ping-pong select: local memory on the PE side
  output logic        pe_sel,
  // SDRAM interface
  output logic        xf_start,
  output logic        xf_dir,
  output win_t        xf_win,
  input  logic        xf_done,
  // status
  output logic        busy,
  output logic        stride_mode,
  output logic [31:0] cycles
);

  localparam int LG_S  = $clog2(S);
  localparam int LG_B  = $clog2(R_BANKS * BURST_BEATS);
  localparam int LG_L  = LG_S - LG_B;
  localparam int LG_M  = $clog2(M_STRIDE);

  logic       fwd;
  logic [4:0] lg_nc, lg_nr;
  logic       comp_act, xf_act;

  // tile shapes
  logic [4:0] lgm, lgp, lg_rrows, lg_c2;
  always_comb begin
    stride_mode = (int'(lg_nr) > LG_L);
    lgm      = stride_mode ? 5'(LG_M) : 5'd0;
    lgp      = lg_nr - lgm;
    lg_rrows = stride_mode ? lgm
             : ((int'(lg_nr) < LG_S - int'(lg_nc)) ? lg_nr : 5'(LG_S - int'(lg_nc)));
    lg_c2    = (int'(lg_nc) < LG_S - int'(lgp)) ? lg_nc : 5'(LG_S - int'(lgp));
  end

  function automatic pass_t mk_pass(input logic cd, input logic [4:0] len, input logic [4:0] nv,
                                    input logic [4:0] rl, input logic tw);
    pass_t p;
    p.col_dir = cd; p.lg_len = len; p.lg_nvec = nv; p.lg_rowlen = rl; p.twiddle = tw;
    return p;
  endfunction

  logic is_comp, can_go;
  always_comb begin
    is_comp = (cmd.kind == CMD_COMPUTE) && (cmd.option >= 4'(OPT_RDFT)) && (cmd.option <= 4'(OPT_NULL));
    if (cmd.kind == CMD_XFER)
      can_go = !xf_act && !(xf_start);
    else if (is_comp)
      can_go = !comp_act && !xf_act && !lm_start && !xf_start;
    else
      can_go = !comp_act && !lm_start;
    cmd_ready = can_go;
  end

  assign inv     = !fwd;
  assign lg_ncol = lg_nr;
  assign busy    = comp_act || xf_act || lm_start || xf_start;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fwd <= 1'b1; lg_nc <= 5'd1; lg_nr <= 5'd1; cs_b <= '0;
      comp_act <= 1'b0; xf_act <= 1'b0; lm_start <= 1'b0; xf_start <= 1'b0;
      pe_sel <= 1'b0; two_pass <= 1'b0; pass0 <= '0; pass1 <= '0;
      xf_dir <= 1'b0; xf_win <= '0; cycles <= '0;
    end else begin
      lm_start <= 1'b0;
      xf_start <= 1'b0;
      if (busy) cycles <= cycles + 1;
      if (lm_done) comp_act <= 1'b0;
      if (xf_done) xf_act <= 1'b0;
      if (lm_start) comp_act <= 1'b1;
      if (xf_start) xf_act <= 1'b1;
      if (cmd_valid && cmd_ready) begin
        if (cmd.kind == CMD_XFER) begin
          xf_start <= 1'b1;
          xf_dir   <= (cmd.option == 4'(XFER_FROM_FPGA));
          xf_win   <= cmd.win;
        end else if (is_comp) begin
          pe_sel <= !pe_sel;
          case (opt_e'(cmd.option))
            OPT_RDFT: begin
              lm_start <= 1'b1; two_pass <= 1'b0;
              pass0 <= mk_pass(1'b0, lg_nc, lg_rrows, lg_nc, 1'b0);
            end
            OPT_CSDFT: begin
              lm_start <= 1'b1; two_pass <= 1'b0;
              pass0 <= mk_pass(1'b1, lgm, lg_nc, lg_nc, 1'b1);
            end
            OPT_RDFT_CSDFT: begin
              lm_start <= 1'b1; two_pass <= 1'b1;
              pass0 <= mk_pass(1'b0, lg_nc, lg_rrows, lg_nc, 1'b0);
              pass1 <= mk_pass(1'b1, lgm, lg_nc, lg_nc, 1'b1);
            end
            OPT_CLDFT: begin
              lm_start <= 1'b1; two_pass <= 1'b0;
              pass0 <= mk_pass(1'b1, lgp, lg_c2, lg_c2, 1'b0);
            end
            default: ;  // NULL: swap only
          endcase
        end else begin
          case (opt_e'(cmd.option))
            OPT_CS_START:   cs_b <= cmd.param;
            OPT_IMAGE_SIZE: begin lg_nc <= cmd.param[12:8]; lg_nr <= cmd.param[4:0]; end
            OPT_FWD_INV:    fwd <= cmd.param[0];
            default: ;
          endcase
        end
      end
    end
  end

  // A compute command never starts while a transfer is running.
  a_no_swap_during_xfer: assert property (@(posedge clk) disable iff (!rst_n)
    lm_start |-> !xf_act);

endmodule

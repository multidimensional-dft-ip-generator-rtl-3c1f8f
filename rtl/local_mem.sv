// local_mem: one of the two local memories (S complex samples) of the
// accelerator, split into R_BANKS banks so that R_BANKS samples can be written
// and read per cycle.
//
// The memory holds a 2-D tile of rows of C = 2^lg_rowlen samples. Following the
// skewed placement of the accelerator's bank organisation, row i starts in bank
// (i mod R_BANKS), so sample (i, c) lives in bank (i + c) mod R_BANKS at word
// (i*C + c) / R_BANKS. R_BANKS consecutive samples of one row, or of one
// column, therefore always fall into different banks: rows (row DFT, SDRAM
// bursts) and columns (column stride and column local DFT) are both read and
// written without conflicts.
//
// Each of the R_BANKS write lanes and read lanes addresses a sample by
// (row, col); a crossbar steers it to its bank. Read data of lane l appears on
// rdata[l] one cycle after the request. Two lanes must never address the same
// bank in one cycle (checked by assertions). Bank count and tile shape follow
// the accelerator's description; the lane interface is this design's own.
module local_mem
  import mddft_pkg::*;
#(
  parameter int S       = 16384,
  parameter int R_BANKS = 2
) (
  input  logic                 clk,
  input  logic [4:0]           lg_rowlen,
  input  logic [R_BANKS-1:0]   we,
  input  logic [15:0]          wrow [R_BANKS],
  input  logic [15:0]          wcol [R_BANKS],
  input  cplx_t                wdata[R_BANKS],
  input  logic [R_BANKS-1:0]   re,
  input  logic [15:0]          rrow [R_BANKS],
  input  logic [15:0]          rcol [R_BANKS],
  output cplx_t                rdata[R_BANKS]
);

  localparam int DEPTH = S / R_BANKS;
  localparam int AW    = $clog2(DEPTH);
  localparam int LGR   = $clog2(R_BANKS);
  localparam int BW    = (R_BANKS > 1) ? LGR : 1;

  function automatic logic [BW-1:0] bank_of(input logic [15:0] row, input logic [15:0] col);
    logic [15:0] t;
    t = row + col;
    return (R_BANKS > 1) ? BW'(t % 16'(R_BANKS)) : '0;
  endfunction

  function automatic logic [AW-1:0] word_of(input logic [15:0] row, input logic [15:0] col,
                                             input logic [4:0] lgc);
    logic [31:0] lin;
    lin = (32'(row) << lgc) + 32'(col);
    return AW'(lin >> LGR);
  endfunction

  logic              b_we   [R_BANKS];
  logic [AW-1:0]     b_wa   [R_BANKS];
  cplx_t             b_wd   [R_BANKS];
  logic              b_re   [R_BANKS];
  logic [AW-1:0]     b_ra   [R_BANKS];
  cplx_t             b_rd   [R_BANKS];
  logic [BW-1:0]     rsel_q [R_BANKS];

  always_comb begin
    for (int b = 0; b < R_BANKS; b++) begin
      b_we[b] = 1'b0; b_wa[b] = '0; b_wd[b] = '0;
      b_re[b] = 1'b0; b_ra[b] = '0;
      for (int l = 0; l < R_BANKS; l++) begin
        if (we[l] && int'(bank_of(wrow[l], wcol[l])) == b) begin
          b_we[b] = 1'b1;
          b_wa[b] = word_of(wrow[l], wcol[l], lg_rowlen);
          b_wd[b] = wdata[l];
        end
        if (re[l] && int'(bank_of(rrow[l], rcol[l])) == b) begin
          b_re[b] = 1'b1;
          b_ra[b] = word_of(rrow[l], rcol[l], lg_rowlen);
        end
      end
    end
  end

  for (genvar b = 0; b < R_BANKS; b++) begin : g_bank
    lm_bank #(.DEPTH(DEPTH)) u_bank (
      .clk, .we(b_we[b]), .waddr(b_wa[b]), .wdata(b_wd[b]),
      .re(b_re[b]), .raddr(b_ra[b]), .rdata(b_rd[b])
    );
  end

  always_ff @(posedge clk)
    for (int l = 0; l < R_BANKS; l++) rsel_q[l] <= bank_of(rrow[l], rcol[l]);

  always_comb
    for (int l = 0; l < R_BANKS; l++) rdata[l] = b_rd[rsel_q[l]];

  // No two active lanes may hit the same bank in one cycle.
  for (genvar l1 = 0; l1 < R_BANKS; l1++) begin : g_chk
    for (genvar l2 = l1 + 1; l2 < R_BANKS; l2++) begin : g_pair
      a_wr_conflict: assert property (@(posedge clk)
        !(we[l1] && we[l2] && bank_of(wrow[l1], wcol[l1]) == bank_of(wrow[l2], wcol[l2])));
      a_rd_conflict: assert property (@(posedge clk)
        !(re[l1] && re[l2] && bank_of(rrow[l1], rcol[l1]) == bank_of(rrow[l2], rcol[l2])));
    end
  end

endmodule

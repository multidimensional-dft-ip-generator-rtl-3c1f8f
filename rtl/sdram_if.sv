// sdram_if: interface to SDRAM. Moves a 2-D window of the image between the
// external memory and the local memory on the SDRAM side of the switches,
// always reading or writing whole row segments, so every access is a burst
// of consecutive addresses.
//
// The window is rows x cols samples; window row i starts at sample address
// base + i*row_stride, and becomes row i of the local tile (row length cols,
// a power of two). One beat of the external bus carries R_BANKS samples
// (128 bits: two 2x32-bit samples); bursts are up to BURST_BEATS beats
// (16 beats = 32 samples, the burst size B).
//
// External bus (this design's own, a plain burst protocol): a command
// (mem_cmd_*, valid/ready) gives write flag, sample address and beat count.
// Read data returns in order on mem_rvalid/mem_rdata, one beat per cycle at
// most, and is always accepted. Write data follows on mem_wvalid/mem_wready
// in command order. Read commands may run ahead of their data.
// Local side: one lm_req_t per bank lane; local reads have one-cycle latency,
// so a 4-entry buffer keeps the write stream at one beat per cycle.
// start (one cycle) with dir and win; done pulses when the last beat has been
// written locally (to FPGA) or accepted by the bus (from FPGA).
module sdram_if
  import mddft_pkg::*;
#(
  parameter int R_BANKS     = 2,
  parameter int BURST_BEATS = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              dir_from_fpga,
  input  win_t              win,
  output logic              busy,
  output logic              done,
  output logic [4:0]        lg_rowlen,
  // local memory (SDRAM-side port)
  output lm_req_t           req   [R_BANKS],
  input  cplx_t             rdata [R_BANKS],
  // external burst bus
  output logic              mem_cmd_valid,
  input  logic              mem_cmd_ready,
  output logic              mem_cmd_write,
  output logic [ADDR_W-1:0] mem_cmd_addr,
  output logic [4:0]        mem_cmd_beats,
  output logic              mem_wvalid,
  input  logic              mem_wready,
  output cplx_t             mem_wdata [R_BANKS],
  input  logic              mem_rvalid,
  input  cplx_t             mem_rdata [R_BANKS]
);

  localparam int LGR = $clog2(R_BANKS);

  win_t        w;
  logic        wr;          // 1: local memory -> SDRAM
  logic        act;
  logic [15:0] cmd_row, cmd_col;   // next burst to request
  logic        cmd_left;
  logic [15:0] lrow, lcol;         // next local beat to read (from FPGA)
  logic        lrd_left;
  logic [15:0] drow, dcol;         // next beat on the data bus
  logic        rd_q;
  logic [2:0]  fcnt;
  logic [1:0]  fwp, frp;
  cplx_t       fifo [4][R_BANKS];
  logic [31:0] beats_left;

  assign busy = act;

  function automatic logic [4:0] log2_16(input logic [15:0] v);
    logic [4:0] r;
    r = '0;
    for (int i = 0; i < 16; i++) if (v[i]) r = 5'(i);
    return r;
  endfunction

  assign lg_rowlen = log2_16(w.cols);

  // command channel
  logic [15:0] seg_left;
  always_comb begin
    seg_left      = (w.cols - cmd_col) >> LGR;   // beats left in this row
    mem_cmd_valid = act && cmd_left;
    mem_cmd_write = wr;
    mem_cmd_addr  = w.base + ADDR_W'(cmd_row) * w.row_stride + ADDR_W'(cmd_col);
    mem_cmd_beats = (seg_left > 16'(BURST_BEATS)) ? 5'(BURST_BEATS) : seg_left[4:0];
  end

  // write-data channel from the prefetch buffer
  assign mem_wvalid = act && wr && (fcnt != 0);
  always_comb
    for (int l = 0; l < R_BANKS; l++) mem_wdata[l] = fifo[frp][l];

  logic lrd_go, pop;
  assign lrd_go = act && wr && lrd_left && (int'(fcnt) + int'(rd_q) < 3);
  assign pop    = mem_wvalid && mem_wready;

  always_comb
    for (int l = 0; l < R_BANKS; l++) begin
      req[l]       = '0;
      req[l].re    = lrd_go;
      req[l].rrow  = lrow;
      req[l].rcol  = lcol + 16'(l);
      req[l].we    = act && !wr && mem_rvalid;
      req[l].wrow  = drow;
      req[l].wcol  = dcol + 16'(l);
      req[l].wdata = mem_rdata[l];
    end

  logic data_beat;
  assign data_beat = wr ? pop : (act && mem_rvalid);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      act <= 1'b0; done <= 1'b0; wr <= 1'b0; w <= '0;
      cmd_row <= '0; cmd_col <= '0; cmd_left <= 1'b0;
      lrow <= '0; lcol <= '0; lrd_left <= 1'b0;
      drow <= '0; dcol <= '0; rd_q <= 1'b0;
      fcnt <= '0; fwp <= '0; frp <= '0; beats_left <= '0;
    end else begin
      done <= 1'b0;
      rd_q <= lrd_go;
      if (!act) begin
        if (start) begin
          act <= 1'b1; wr <= dir_from_fpga; w <= win;
          cmd_row <= '0; cmd_col <= '0; cmd_left <= (win.rows != 0);
          lrow <= '0; lcol <= '0; lrd_left <= dir_from_fpga && (win.rows != 0);
          drow <= '0; dcol <= '0;
          fcnt <= '0; fwp <= '0; frp <= '0;
          beats_left <= (32'(win.rows) * 32'(win.cols)) >> LGR;
        end
      end else begin
        // commands
        if (mem_cmd_valid && mem_cmd_ready) begin
          if (32'(cmd_col) + (32'(mem_cmd_beats) << LGR) >= 32'(w.cols)) begin
            cmd_col <= '0;
            cmd_row <= cmd_row + 1'b1;
            if (cmd_row + 1'b1 == w.rows) cmd_left <= 1'b0;
          end else cmd_col <= cmd_col + (16'(mem_cmd_beats) << LGR);
        end
        // local reads feeding the write stream
        if (lrd_go) begin
          if (lcol + 16'(R_BANKS) >= w.cols) begin
            lcol <= '0; lrow <= lrow + 1'b1;
            if (lrow + 1'b1 == w.rows) lrd_left <= 1'b0;
          end else lcol <= lcol + 16'(R_BANKS);
        end
        if (rd_q) begin
          for (int l = 0; l < R_BANKS; l++) fifo[fwp][l] <= rdata[l];
          fwp <= fwp + 1'b1;
        end
        if (pop) frp <= frp + 1'b1;
        fcnt <= fcnt + 3'(rd_q) - 3'(pop);
        // data beats
        if (data_beat) begin
          if (dcol + 16'(R_BANKS) >= w.cols) begin
            dcol <= '0; drow <= drow + 1'b1;
          end else dcol <= dcol + 16'(R_BANKS);
          beats_left <= beats_left - 1;
          if (beats_left == 1) begin
            act <= 1'b0; done <= 1'b1;
          end
        end
        if (beats_left == 0) begin
          act <= 1'b0; done <= 1'b1;
        end
      end
    end
  end

endmodule

// twiddle_rom: table of the twiddle factors W_N^e = exp(-j*2*pi*e/N_TW),
// e = 0 .. N_TW-1, used after the column stride DFT (the diagonal twiddle
// matrix of the column decomposition). A column of length N (N a power of two,
// N <= N_TW) uses entry e*(N_TW/N), so one table serves every column length.
//
// The table is computed at elaboration from cos/sin; nothing is read from a
// file. Read port: address in cycle t, twiddle out in cycle t+1 (one BRAM
// read). inv = 1 returns the conjugate, for the inverse transform.
// N_TW defaults to S*S/(N1_MAX*B) = 16384^2/(2048*32) = 4096, the largest
// column length the accelerator supports. Table contents and fixed-point
// format are this design's choice.
module twiddle_rom
  import mddft_pkg::*;
#(
  parameter int N_TW = 4096
) (
  input  logic                    clk,
  input  logic [$clog2(N_TW)-1:0] addr,
  input  logic                    inv,
  output twid_t                   w
);

  twid_t rom [N_TW];

  initial begin
    for (int e = 0; e < N_TW; e++) rom[e] = twiddle_value(e, N_TW);
  end

  always_ff @(posedge clk) begin
    w.re <= rom[addr].re;
    w.im <= inv ? -rom[addr].im : rom[addr].im;
  end

endmodule

// mddft_pkg: types, command codes and small arithmetic helpers shared by the
// multidimensional DFT accelerator.
//
// A complex sample is two signed fixed-point components of DW bits each
// (2 x 32 bits, the sample width used by the accelerator). Twiddle factors are
// signed TW-bit fixed point with TW-2 fraction bits, so +1.0 is representable.
// The compute command options carry the numeric codes of the accelerator's
// command set (row DFT = 2 ... DFT/IDFT select = 9). The two data-transfer
// options and all field widths of the command word are this design's own.
// The accelerator moves single-precision samples (2 x 32 bits); keeping the
// width but using fixed point is this design's choice.
package mddft_pkg;

  parameter int DW     = 32;   // bits per real / imaginary component
  parameter int TW     = 25;   // bits per twiddle component
  parameter int ADDR_W = 28;   // external sample address (2 GB / 8 B per sample)

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [TW-1:0] re;
    logic signed [TW-1:0] im;
  } twid_t;

  // Command classes (COMPUTE_INSTRUCTION / DATA_TRANSFER).
  typedef enum logic {
    CMD_COMPUTE = 1'b0,
    CMD_XFER    = 1'b1
  } cmd_kind_e;

  // Options of a COMPUTE_INSTRUCTION command.
  typedef enum logic [3:0] {
    OPT_RDFT        = 4'd2,  // row DFT
    OPT_CSDFT       = 4'd3,  // column stride DFT (+ twiddle multiplication)
    OPT_RDFT_CSDFT  = 4'd4,  // row operations: row DFT then column stride DFT
    OPT_CLDFT       = 4'd5,  // column local DFT
    OPT_NULL        = 4'd6,  // no computation (memory read/write tests)
    OPT_CS_START    = 4'd7,  // param = row address of the first sample
    OPT_IMAGE_SIZE  = 4'd8,  // param = {log2(Nc), log2(Nr)}
    OPT_FWD_INV     = 4'd9   // param = 1: DFT, 0: IDFT
  } opt_e;

  // Options of a DATA_TRANSFER command.
  typedef enum logic [3:0] {
    XFER_TO_FPGA   = 4'd0,   // SDRAM -> local memory
    XFER_FROM_FPGA = 4'd1    // local memory -> SDRAM
  } xfer_e;

  // A 2-D window of the image in SDRAM. Local row i of the window holds
  // samples base + i*row_stride + [0, cols).
  typedef struct packed {
    logic [ADDR_W-1:0] base;        // sample address of the window's first sample
    logic [ADDR_W-1:0] row_stride;  // samples between consecutive window rows
    logic [15:0]       rows;        // number of rows
    logic [15:0]       cols;        // samples per row (multiple of one beat)
  } win_t;

  typedef struct packed {
    cmd_kind_e   kind;
    logic [3:0]  option;   // opt_e or xfer_e
    logic [15:0] param;
    win_t        win;      // used by DATA_TRANSFER only
  } cmd_t;

  // One pass of the compute engine over the local memory.
  typedef struct packed {
    logic       col_dir;   // 0: vectors are rows, 1: vectors are columns
    logic [4:0] lg_len;    // log2 of the transform length
    logic [4:0] lg_nvec;   // log2 of the number of vectors
    logic [4:0] lg_rowlen; // log2 of the local memory row length C
    logic       twiddle;   // multiply results by W_N^(b*k)
  } pass_t;

  // One lane of a local memory port: a write and a read of one sample each,
  // addressed by (row, col) of the tile held in the memory.
  typedef struct packed {
    logic        we;
    logic [15:0] wrow;
    logic [15:0] wcol;
    cplx_t       wdata;
    logic        re;
    logic [15:0] rrow;
    logic [15:0] rcol;
  } lm_req_t;

  // Round-to-nearest arithmetic shift right of a wide product.
  function automatic logic signed [DW-1:0] rshift_round(input logic signed [DW+TW-1:0] v);
    return DW'((v + (DW+TW)'(1 <<< (TW-3))) >>> (TW-2));
  endfunction

  // a * w, with w in TW-bit fixed point (TW-2 fraction bits).
  function automatic cplx_t cmul_f(input cplx_t a, input twid_t w);
    logic signed [DW+TW-1:0] rr, ii, ri, ir;
    cplx_t y;
    rr = a.re * w.re;
    ii = a.im * w.im;
    ri = a.re * w.im;
    ir = a.im * w.re;
    y.re = rshift_round(rr - ii);
    y.im = rshift_round(ri + ir);
    return y;
  endfunction

  // Reverse the low lg bits of v.
  function automatic logic [15:0] bitrev(input logic [15:0] v, input logic [4:0] lg);
    logic [15:0] r;
    r = '0;
    for (int i = 0; i < 16; i++)
      if (i < int'(lg)) r[int'(lg) - 1 - i] = v[i];
    return r;
  endfunction

  // Twiddle factor exp(-j*2*pi*e/n) as fixed point.
  function automatic twid_t twiddle_value(input int e, input int n);
    real ang, sc;
    twid_t w;
    ang = -2.0 * 3.14159265358979323846 * real'(e) / real'(n);
    sc  = real'(1 <<< (TW - 2));
    w.re = TW'($rtoi($floor($cos(ang) * sc + 0.5)));
    w.im = TW'($rtoi($floor($sin(ang) * sc + 0.5)));
    return w;
  endfunction

endpackage

# Transpose-free multidimensional DFT accelerator

This is an FPGA accelerator for 2-D and 3-D discrete Fourier transforms of images too large for on-chip memory. The image sits in external SDRAM, stored row by row. SDRAM is fast only for long bursts of consecutive addresses. Reading a column touches one sample per row, which wastes almost all of the bandwidth, so the usual answer is to transpose the image twice. This design never transposes and never makes a strided access. **Every SDRAM transfer is a burst along an image row.**

The architecture follows the multidimensional DFT IP described by Yu, Irick, Chakrabarti and Narayanan ("Multidimensional DFT IP Generator for FPGA Platforms"). The defaults are that design's single-PE Virtex-5 configuration:

| | Default |
|---|---|
| Local memory size S | 16384 samples |
| Banks per local memory | 2 |
| Processing elements | 1 |
| Largest FFT | 2048 points |
| Split factor m | 8 |
| Burst | 16 beats of 2 samples, so B = 32 samples |

## The column split

Take an image of Nc samples per row and Nr rows. The row DFTs are easy: load a few whole rows, transform them, and write them back.

Columns are the hard part. A strip of whole columns that is B samples wide holds Nr·B samples. That fills a bus burst but needs Nr·B ≤ S, so Nr ≤ L = S/B (512 at the defaults). Longer columns are split with the usual two-factor FFT decomposition, Nr = m·p:

1. **Row operations.** One job handles m image rows spaced p apart: rows b, b+p, …, b+(m−1)p, for b = 0 … p−1.
   - Each row gets its Nc-point row DFT.
   - Each column of that m×Nc tile gets an m-point DFT. This is the *column stride DFT*.
   - Output k1 of every column is multiplied by W_Nr^(b·k1). These are the twiddles.
   - The rows go back to where they came from.
   - All accesses are whole rows.
2. **Column local DFT.** One job handles p consecutive image rows (rows k1·p … k1·p+p−1) and a strip of min(Nc, S/p) columns.
   - Each column gets a p-point DFT.
   - Tile row k2 is written to image row k1 + m·k2 of a separate output area. This permuted store puts the spectrum in natural order.
   - Because p ≤ L, a strip is at least B samples wide, so every access is still a full burst.

If Nr ≤ L there is no split. Row jobs hold min(S/Nc, Nr) rows. Column jobs hold whole columns (p = Nr, m = 1, no twiddles).

**3-D.** A volume N1×N2×N3 is transformed in two steps. First, each d1-d2 plane gets the 2-D DFT above. Second, the d3 axis is handled the same way on the d1-d3 planes. Those planes are just windows whose row pitch is N1·N2 samples. The row DFT is skipped in this step (command csDFT instead of rDFT_csDFT).

**Size limits at the default parameters** (powers of two only):

| Dimension | Limit | Reason |
|---|---|---|
| Row length | N1 ≤ 2048 | FFT size, and m·N1 ≤ S |
| Column length, unsplit | ≤ 512 | L = S/B |
| Column length, split | 8·p with p ≤ 512, so ≤ 4096 | N2max = S²/(N1max·B) |

The external address is 28 bits, i.e. 2²⁸ samples (2 GB at 8 bytes per sample). Both the input and the output area must fit in it.

## Block structure

```
 cmd ──► ucam_ctrl ──────────────┬──────────────────────────┐
            │ xf_start/win       │ lm_start/passes          │ pe_sel
            ▼                    ▼                          ▼
 mem_* ◄─► sdram_if         lm_ctrl ◄──► pe_array (N_PE × pe = fft1d + cmul,
            │ lanes              │ lanes      shared twiddle_rom)
            ▼                    ▼
        lm_switch           lm_switch        (each routes to memory 0 or 1)
            └──► local_mem 0 ◄──┘
            └──► local_mem 1 ◄──┘
```

| Module | Role |
|---|---|
| `mddft_top` | Wires everything together. Requests from the two switches are OR-merged per memory; each memory takes its tile shape from the side that owns it. |
| `ucam_ctrl` | Command decoder and scheduler. Derives tile shapes from the image size, swaps the ping-pong memories, and runs the cycle timer. |
| `sdram_if` | Window mover between the external burst bus and a local memory. A window is base, row stride, rows and cols. |
| `lm_switch` | Routes one side's lanes to memory 0 or 1. Read data is steered with the select delayed by one cycle. |
| `local_mem` | S samples in R_BANKS banks with skewed placement (below). `lm_bank` is one bank. |
| `lm_ctrl` | Runs a compute command as one or two passes over the tile in the PE-side memory. |
| `pe_array`, `pe` | N_PE processing elements. Each is an FFT, a register, a complex multiplier and a bypass multiplexer. They share one twiddle ROM. |
| `fft1d`, `fft_sdf_stage` | Run-time-length radix-2 single-delay-feedback FFT, 1 sample per cycle. |
| `cmul` | Registered complex multiplier. |
| `twiddle_rom` | N_TW entries of exp(−j2πe/N_TW), computed at elaboration. |
| `mddft_pkg` | Shared types and functions: the sample type, commands, windows, passes, rounding, the complex multiply and bit reversal. |

## Local memory bank skew

A tile of rows with C = 2^k samples each is stored so that:

- sample (i, c) is in bank (i + c) mod R;
- its word address is (i·C + c)/R.

R consecutive samples of a row fall into R different banks, so R samples arrive per bus beat without conflict. R consecutive samples of a column also fall into R different banks, so R PEs can each read one column at the same time. The placement mirrors how the tile is loaded: image row i of a job starts in bank i mod R. Assertions in `local_mem` flag any two lanes hitting the same bank.

## Commands and the ping-pong schedule

Commands are `cmd_t` structs on a valid/ready port. Compute options (`option`, `param`):

| Code | Name | Effect |
|---|---|---|
| 2 | rDFT | Row DFT of every tile row |
| 3 | csDFT | Column stride DFT + twiddles |
| 4 | rDFT_csDFT | Both, as two passes |
| 5 | clDFT | Column local DFT |
| 6 | NULL | Swap the memories only |
| 7 | CS_START | `param` = b, the image row of the first loaded row (twiddle base) |
| 8 | IMAGE_SIZE | `param[12:8]` = log2 Nc, `param[4:0]` = log2 Nr |
| 9 | FWD_INV | 1 = forward DFT, 0 = inverse |

A transfer command (`kind = CMD_XFER`) uses option 0 to move a window into the FPGA and option 1 to move one out. The window is given by `base`, `row_stride`, `rows` and `cols`, in samples.

There are two local memories. At any time one belongs to the PEs and the other to the SDRAM side. Every compute command, NULL included, first swaps them. The swap makes three rules:

- A compute waits until the running compute and the running transfer have both finished.
- A transfer waits only for the previous transfer.
- IMAGE_SIZE, FWD_INV and CS_START wait for the running compute.

A host therefore issues, for job i:

```
FROM_FPGA(job i-2)   TO_FPGA(job i)   CS_START(b_i)   COMPUTE(job i)
```

and after the last job `FROM_FPGA(n-2)  NULL  FROM_FPGA(n-1)`. While job i computes, job i−1's result is written out and job i+1 is loaded. The testbench tasks `plane()` and `run_jobs()` in `tb/tb_mddft_top.sv` are a complete host for 2-D and 3-D transforms.

## Compute engine

`lm_ctrl` sees a tile as 2^lg_nvec vectors of 2^lg_len samples: rows, or columns. It streams N_PE vectors at a time through the PEs, one sample per PE per cycle, and then feeds zeros until the last results have left the FFT pipeline.

The FFT emits bins in bit-reversed order. `lm_ctrl` writes bin k back to position k of its vector in place, so the tile holds natural-order transforms. Reads of the next vector overlap the write-back of the current one.

A pass of T samples takes about T/N_PE + 2^lg_len + 16 cycles. Option 4 is two passes:

1. rows, without twiddles;
2. columns, with the twiddle W_N^(b·k) applied through the multiplier. N is the full column length, and the ROM address is b·k·N_TW/N mod N_TW.

`fft1d` has log2(N_MAX) stages. A 2^k-point transform uses the last k stages, and the first ones only delay. `clear` restarts the stream position at the start of a pass.

**Number format.** Samples are 2×32-bit signed fixed point. Twiddles are 25-bit with 23 fraction bits.

- **Forward:** each butterfly stage halves its outputs, rounding half to even, so the forward DFT is scaled by 1/N. This avoids overflow whatever the length. Rounding half to even avoids a DC bias that plain truncation would build up.
- **Inverse:** no scaling and conjugate twiddles, so a forward transform followed by an inverse one gives back the input, within a few LSBs per stage.

## External bus

`mem_*` is a plain burst protocol:

- a command with write flag, sample address and beat count (at most 16), on valid/ready;
- write beats on `mem_wvalid`/`mem_wready`;
- read beats on `mem_rvalid`, returned in order and always accepted.

Each beat carries R_BANKS samples. `sdram_if` splits each window row into bursts and can have several read commands in flight. An adapter to a real memory controller (for example an AXI or PLB/MPMC port) has to be added.

## Timing

Cycle counts at the default parameters, measured in simulation against a behavioural SDRAM that stalls 10% of its cycles (the "floor" assumes that compute and transfers of consecutive jobs always overlap):

| Transform | Cycles | At 100 MHz | Cycles / floor |
|---|---|---|---|
| 2-D 128×128 | 72.6 k | 0.73 ms | 2.21 |
| 2-D 256×256 | 185 k | 1.85 ms | 1.41 |
| 2-D 512×512 | 660 k | 6.6 ms | 1.26 |
| 2-D 1024×1024 | 3.52 M | 35 ms | 1.12 |
| 2-D 2048×512 (row length 2048) | 2.56 M | 26 ms | 1.22 |
| 2-D 512×2048 (row length 512) | 3.52 M | 35 ms | 1.12 |
| 2-D 2048×2048 | 14.0 M | 140 ms | 1.11 |
| 2-D 2048×4096 | 28.0 M | 280 ms | 1.11 |
| 3-D 128³ | 13.9 M | 139 ms | 2.21 |
| 3-D 256³ | 71.1 M | 711 ms | 1.41 |

Two effects shape these numbers:

- **Split row operations are compute-bound.** With a single PE, the row DFT and the column stride DFT are two passes through the same FFT, so they need 2 cycles per sample. Loading and storing the tile costs only 1 cycle per sample with 2 samples per beat. Row operations therefore take about twice as long as the column local DFT.
- **Small planes run as a single job.** A 128×128 plane fits the local memory whole, so it has nothing to overlap with; load, compute and store run one after another. The same holds for each plane of the 3-D cases.

The published BEE3 system took about 103 ms for 1024×1024 and 412 ms for 2048×2048. That system is limited by its 128-bit PLB and MPMC, not by the PE. Real figures here depend on the memory controller attached to `mem_*`.

## Where this RTL departs from the published design

- **FFT core.** The vendor streaming FFT core is replaced by this design's own radix-2 SDF pipeline. Its scaling, rounding and bit-reversed output order are our choices.
- **Number format.** Samples are fixed point rather than single-precision floating point.
- **Bus and front end.** There is no system bus, memory controller, command processor (ASIP), router or host software. Commands enter already decoded, and the external bus is the generic `mem_*` port.
- **Window engine.** It supports base, row stride, rows and cols. This is all the DFT needs. There is no column offset, column stride or separate dimension offset; 3-D uses a row stride of N1·N2.
- **Commands and timing.** The command encoding beyond the option codes, the ping-pong swap rule, the in-place natural-order write-back and all cycle-level timing are this design's own.
- **Parameter rules.** `mddft_top` stops elaboration with an error unless:
  - L = S/(R_BANKS·BURST_BEATS) ≤ N1_MAX, because the column local DFT runs on the same FFT;
  - M_STRIDE·N1_MAX ≤ S;
  - N_PE ≤ R_BANKS.

  With several PEs, a pass with fewer vectors than PEs (for example, 4-row tiles with 8 PEs) runs on as many PEs as there are vectors.
- **IP generator.** The generator that picks FFT size, N_PE and S from the target device is not included. These are plain parameters: `N1_MAX`, `N_PE`, `S`, `R_BANKS`, `M_STRIDE`, `BURST_BEATS`, with N_TW = S²/(N1_MAX·R_BANKS·BURST_BEATS).
- **Sizes.** Only power-of-two lengths are supported.
- **Largest sizes.** The largest 2-D size that fits at the defaults is 2048×4096. The largest 3-D volume the compute side can handle (2048×4096×4096) exceeds the 28-bit sample address. 512×512×512 is the largest cube that fits, exactly filling the address space with input plus output.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=… failures=…` and has a watchdog.

| Testbench | What it covers |
|---|---|
| `tb_fft1d` | A set of lengths up to N_MAX, back-to-back vectors, forward and inverse, against a direct DFT; also the 1 sample per cycle rate |
| `tb_cmul`, `tb_twiddle_rom` | Products against double precision, with 1-cycle latency; the table and its conjugate |
| `tb_pe`, `tb_pe_array` | FFT plus twiddle, and bypass |
| `tb_local_mem` | Skewed placement, conflict-free row and column access, 1-cycle latency |
| `tb_lm_switch` | Routing and the delayed read steering |
| `tb_lm_ctrl` | Each compute option on a tile, against a reference |
| `tb_sdram_if` | Windows of several shapes both ways under bus stalls, checked sample by sample; transfer time against the beat count |
| `tb_ucam_ctrl` | Decoding, tile shapes, ping-pong order |
| `tb_mddft_top` | End to end at reduced size (S = 256, N1_MAX = 32, m = 4, 4-beat bursts), see below |
| `tb_mddft_full` | End to end at the default parameters, see below |
| `tb_mddft_pe8` | The same end-to-end test with 8 PEs and 8-bank memories (S = 1024) |
| `tb_mddft_wl2d`, `tb_mddft_wl3d` | The rated image sizes at the default parameters, see below |

`tb_mddft_top` covers:

- a 32×64 forward 2-D DFT with column split;
- its inverse, which must give back the input;
- a 16×16 transform without split;
- a 16×8×64 3-D DFT;
- every mechanism: split, no split, two-pass, twiddles, swap, overlap, back-pressure, inverse, NULL, 3-D. It fails if any never happened.

Results are compared with a double-precision DFT.

`tb_mddft_full` runs the default configuration on a complete 1024×1024 forward transform. It checks 128 spectrum bins against a direct DFT, and checks the cycle count. It needs about 5 s of simulation.

`tb_mddft_wl2d` runs the other 2-D sizes of the table above, up to the largest, 2048×4096. Each is spot-checked at 128 bins and timed. 128×128 and 512×512 also go back through the inverse transform: the whole image must return with an SNR above 100 dB. The measured SNR is 127 dB and 115 dB; the worst sample is off by 336 and 1292 LSB of a 2³¹ full scale, with input amplitude 2²⁸. `tb_mddft_wl3d` runs 128³ and 256³ with 64 bins checked. These take about 1 and 1.5 minutes. The 512³ cube fits the design but not a simulator's memory.

`tb/sdram_model.sv` is the behavioural SDRAM used by the system testbenches.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_mddft_full rtl/mddft_pkg.sv tb/tb_mddft_full.sv
./obj_dir/Vtb_mddft_full
```

All RTL passes `verilator --lint-only -Wall`. One warning is left: the PE array's `out_valid` pin is unconnected in `mddft_top`, which the header of that file explains.

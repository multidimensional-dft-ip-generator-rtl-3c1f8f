// sdram_model: behavioural model of the external SDRAM and its controller,
// for simulation only (not synthesizable logic). It serves the accelerator's
// burst bus: commands are queued (up to 4), then executed in order. A read
// returns its beats, one per cycle, no earlier than LAT cycles after its
// command was accepted (latencies of queued reads overlap); a write takes its beats
// on mem_wvalid/mem_wready. With STALL_PCT > 0 the model randomly inserts
// idle cycles in both directions, to exercise back-pressure. The array mem
// holds WORDS complex samples; testbenches load and inspect it directly.
module sdram_model
  import mddft_pkg::*;
#(
  parameter int R_BANKS   = 2,
  parameter int WORDS     = 65536,
  parameter int LAT       = 6,
  parameter int STALL_PCT = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mem_cmd_valid,
  output logic              mem_cmd_ready,
  input  logic              mem_cmd_write,
  input  logic [ADDR_W-1:0] mem_cmd_addr,
  input  logic [4:0]        mem_cmd_beats,
  input  logic              mem_wvalid,
  output logic              mem_wready,
  input  cplx_t             mem_wdata [R_BANKS],
  output logic              mem_rvalid,
  output cplx_t             mem_rdata [R_BANKS]
);

  cplx_t mem [WORDS];

  typedef struct packed {
    logic              wr;
    logic [ADDR_W-1:0] addr;
    logic [4:0]        beats;
    int                due;    // cycle from which read data may flow
  } mcmd_t;

  mcmd_t q [$];
  mcmd_t cur;
  logic  have;
  int    beat;
  int    stalls = 0;
  int    now = 0;

  assign mem_cmd_ready = (q.size() < 4);

  always_ff @(posedge clk) begin
    logic stall;
    stall = (STALL_PCT > 0) && ($urandom_range(99) < STALL_PCT);
    if (stall) stalls++;
    now++;
    mem_rvalid <= 1'b0;
    if (!rst_n) begin
      q.delete(); have <= 1'b0; mem_wready <= 1'b0;
    end else begin
      if (mem_cmd_valid && mem_cmd_ready)
        q.push_back('{wr: mem_cmd_write, addr: mem_cmd_addr, beats: mem_cmd_beats, due: now + LAT});
      if (!have) begin
        mem_wready <= 1'b0;
        if (q.size() > 0) begin
          cur <= q.pop_front(); have <= 1'b1; beat <= 0;
        end
      end else if (cur.wr) begin
        if (mem_wvalid && mem_wready) begin
          for (int l = 0; l < R_BANKS; l++)
            mem[(int'(cur.addr) + beat * R_BANKS + l) % WORDS] <= mem_wdata[l];
          beat <= beat + 1;
          if (beat + 1 == int'(cur.beats)) begin
            have <= 1'b0; mem_wready <= 1'b0;
          end else mem_wready <= !stall;
        end else mem_wready <= !stall;
      end else begin
        if (now >= cur.due && !stall) begin
          mem_rvalid <= 1'b1;
          for (int l = 0; l < R_BANKS; l++)
            mem_rdata[l] <= mem[(int'(cur.addr) + beat * R_BANKS + l) % WORDS];
          beat <= beat + 1;
          if (beat + 1 == int'(cur.beats)) have <= 1'b0;
        end
      end
    end
  end

endmodule

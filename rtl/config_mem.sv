// config_mem: triplicated configuration memory, organised in frames.
//
// Three identical modules, each N_FRAMES frames of FRAME_BITS cells. One
// frame address selects the same frame in all three modules: the three copies
// are read together (combinational read, as the voter needs them side by side)
// and each module has its own write enable and write data, written on the
// rising clock edge. A read-modify-write of one frame therefore fits in one
// cycle. The cells are not reset: like the SRAM they model, they hold what was
// last written. Three copies organised in frames are the algorithm's; the
// whole-frame port with combinational read is this design's choice.
//
// A second, read-only scan port returns SCAN_LANES consecutive frames of
// module 1 starting at scan_addr (frames past the last one read as zero), so
// that the CRC scan can check several frames in one cycle.
module config_mem #(
  parameter int unsigned FRAME_BITS = 126,
  parameter int unsigned N_FRAMES   = 39,
  parameter int unsigned SCAN_LANES = 1,
  localparam int unsigned FA_W      = (N_FRAMES > 1) ? $clog2(N_FRAMES) : 1
) (
  input  logic                                        clk,
  input  logic [FA_W-1:0]                             addr,
  output logic [scrub_pkg::N_MODULES-1:0][FRAME_BITS-1:0] rd_data,
  input  logic [scrub_pkg::N_MODULES-1:0]             we,
  input  logic [scrub_pkg::N_MODULES-1:0][FRAME_BITS-1:0] wd,
  input  logic [FA_W-1:0]                             scan_addr,
  output logic [SCAN_LANES-1:0][FRAME_BITS-1:0]       scan_rd
);

  logic [FRAME_BITS-1:0] mem [scrub_pkg::N_MODULES][N_FRAMES];

  for (genvar m = 0; m < scrub_pkg::N_MODULES; m++) begin : g_mod
    assign rd_data[m] = mem[m][addr];
    always_ff @(posedge clk) begin
      if (we[m]) mem[m][addr] <= wd[m];
    end
  end

  for (genvar l = 0; l < SCAN_LANES; l++) begin : g_lane
    always_comb begin
      if (32'(scan_addr) + l < N_FRAMES) scan_rd[l] = mem[0][32'(scan_addr) + l];
      else                               scan_rd[l] = '0;
    end
  end

  a_addr_in_range: assert property (@(posedge clk) (|we) |-> (addr < FA_W'(N_FRAMES)))
    else $error("config_mem: write to frame %0d beyond the last frame", addr);

endmodule

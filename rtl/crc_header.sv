// crc_header: store of the per-frame CRC check words (the frame headers, K).
//
// One CRC_W-bit word per frame, written once after the configuration is
// generated and read combinationally during every scan round, where it is
// compared with the CRC recomputed from module 1. Keeping only the check word,
// not a copy of the frame, is what makes error detection cheap. Not reset.
// A separate store, one word per frame, is this design's layout of the
// frame headers. A read-only scan port returns the SCAN_LANES consecutive
// check words starting at scan_addr (zero past the last frame).
module crc_header #(
  parameter int unsigned N_FRAMES   = 39,
  parameter int unsigned CRC_W      = scrub_pkg::CRC_W,
  parameter int unsigned SCAN_LANES = 1,
  localparam int unsigned FA_W    = (N_FRAMES > 1) ? $clog2(N_FRAMES) : 1
) (
  input  logic             clk,
  input  logic [FA_W-1:0]  addr,
  input  logic             we,
  input  logic [CRC_W-1:0] wd,
  output logic [CRC_W-1:0] rd,
  input  logic [FA_W-1:0]  scan_addr,
  output logic [SCAN_LANES-1:0][CRC_W-1:0] scan_rd
);

  logic [CRC_W-1:0] mem [N_FRAMES];

  assign rd = mem[addr];
  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wd;
  end

  for (genvar l = 0; l < SCAN_LANES; l++) begin : g_lane
    always_comb begin
      if (32'(scan_addr) + l < N_FRAMES) scan_rd[l] = mem[32'(scan_addr) + l];
      else                               scan_rd[l] = '0;
    end
  end

  a_addr_in_range: assert property (@(posedge clk) we |-> (addr < FA_W'(N_FRAMES)))
    else $error("crc_header: write to frame %0d beyond the last frame", addr);

endmodule

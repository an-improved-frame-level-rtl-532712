// golden_mem: golden copy of the configuration, one frame per address.
//
// Holds the configuration as it was first written, so that a frame can be
// restored when bit-level voting cannot recover it (the same cell upset in
// two or three modules). Written once per frame while the configuration is
// generated; read combinationally by the scrub controller. Not reset.
// Keeping an original copy is part of the algorithm; when it is used (a
// voted frame whose CRC still fails) is decided by the controller.
module golden_mem #(
  parameter int unsigned FRAME_BITS = 126,
  parameter int unsigned N_FRAMES   = 39,
  localparam int unsigned FA_W      = (N_FRAMES > 1) ? $clog2(N_FRAMES) : 1
) (
  input  logic                  clk,
  input  logic [FA_W-1:0]       addr,
  input  logic                  we,
  input  logic [FRAME_BITS-1:0] wd,
  output logic [FRAME_BITS-1:0] rd
);

  logic [FRAME_BITS-1:0] mem [N_FRAMES];

  assign rd = mem[addr];
  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wd;
  end

  a_addr_in_range: assert property (@(posedge clk) we |-> (addr < FA_W'(N_FRAMES)))
    else $error("golden_mem: write to frame %0d beyond the last frame", addr);

endmodule

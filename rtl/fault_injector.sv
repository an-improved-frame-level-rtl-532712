// fault_injector: emulates single event upsets in the configuration memory.
//
// The user names a rectangle of the configuration memory, a frame range
// [frame_lo, frame_hi] and a cell range [cell_lo, cell_hi] (0-based, cell i is
// bit i of a frame), and a mask of the modules to hit. On start the injector
// walks the frame range, one frame per clock, reading each frame and writing
// it back with every cell of the cell range inverted, in each selected module
// only. Inverting the whole rectangle is this design's reading of a "fault
// injection matrix"; which cells and modules are hit is left to the user.
//
// Interface: drives the shared frame port of config_mem (addr, we, wd) and
// sees its read data. busy is high while it owns that port; done pulses for
// one cycle after the last frame is written. A frame_hi beyond the last frame
// is clamped; frame_lo > frame_hi, or a cell range that selects no cell,
// writes nothing.
module fault_injector #(
  parameter int unsigned FRAME_BITS = 126,
  parameter int unsigned N_FRAMES   = 39,
  localparam int unsigned FA_W      = (N_FRAMES > 1) ? $clog2(N_FRAMES) : 1,
  localparam int unsigned CB_W      = (FRAME_BITS > 1) ? $clog2(FRAME_BITS) : 1,
  localparam int unsigned NM        = scrub_pkg::N_MODULES
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  logic [NM-1:0]                  mod_mask,
  input  logic [FA_W-1:0]                frame_lo,
  input  logic [FA_W-1:0]                frame_hi,
  input  logic [CB_W-1:0]                cell_lo,
  input  logic [CB_W-1:0]                cell_hi,
  output logic                           busy,
  output logic                           done,
  // frame port of the configuration memory
  output logic [FA_W-1:0]                mem_addr,
  output logic [NM-1:0]                  mem_we,
  output logic [NM-1:0][FRAME_BITS-1:0]  mem_wd,
  input  logic [NM-1:0][FRAME_BITS-1:0]  mem_rd
);

  logic [FA_W-1:0]       f, f_last;
  logic [NM-1:0]         mask_q;
  logic [FRAME_BITS-1:0] cells_q, cells_nx;
  logic [FA_W-1:0]       hi_clamped;

  always_comb begin
    for (int i = 0; i < FRAME_BITS; i++)
      cells_nx[i] = (CB_W'(i) >= cell_lo) && (CB_W'(i) <= cell_hi);
    hi_clamped = (frame_hi > FA_W'(N_FRAMES - 1)) ? FA_W'(N_FRAMES - 1) : frame_hi;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      f       <= '0;
      f_last  <= '0;
      mask_q  <= '0;
      cells_q <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start && frame_lo <= hi_clamped) begin
          busy    <= 1'b1;
          f       <= frame_lo;
          f_last  <= hi_clamped;
          mask_q  <= mod_mask;
          cells_q <= cells_nx;
        end else if (start) begin
          done <= 1'b1;
        end
      end else begin
        if (f == f_last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          f <= f + 1'b1;
        end
      end
    end
  end

  always_comb begin
    mem_addr = f;
    for (int m = 0; m < NM; m++) begin
      mem_we[m] = busy && mask_q[m];
      mem_wd[m] = mem_rd[m] ^ cells_q;
    end
  end

endmodule

// flr_scrubber_top: improved frame-level redundancy (FLR) scrubber.
//
// A configuration memory is kept in three identical modules (triple modular
// redundancy) plus a golden copy, and every frame carries a 16-bit CRC header.
// Scrubbing first detects, then corrects: the CRC of each frame of module 1 is
// compared with its header, and only then is bit-level 2-of-3 voting run, from
// the first failing frame to the end (or over all frames when module 1 is
// clean). Frames that voting cannot recover are restored from the golden copy.
//
// Blocks: config_gen (random configuration, cell = rand > eta), config_mem
// (the three modules), golden_mem, crc_header, fault_injector (upset
// emulation) and flr_scrub_ctrl (the flow chart, with the CRC units and the
// voter inside). SCAN_LANES sets how many frames the CRC scan checks per
// cycle: 1 follows the flow chart's frame loop, N_FRAMES checks all frames
// concurrently.
//
// Use: gen_start builds the configuration and its headers; inj_start flips a
// rectangle of cells in the selected modules; scrub_start runs one scrub and
// ends with a done pulse and the statistics of that scrub. The three commands
// share one frame port and are accepted only while the other side is idle
// (a command to a busy scrubber is dropped). When nothing runs, rb_addr reads
// back a frame of each module, of the golden copy and its header.
// The three modules, CRC headers, voting and golden copy follow the
// algorithm; separate commands, the shared frame port and the readback port
// are this design's.
module flr_scrubber_top #(
  parameter int unsigned FRAME_BITS = 126,
  parameter int unsigned N_FRAMES   = 39,
  parameter int unsigned SCAN_LANES = 1,
  localparam int unsigned FA_W      = (N_FRAMES > 1) ? $clog2(N_FRAMES) : 1,
  localparam int unsigned CB_W      = (FRAME_BITS > 1) ? $clog2(FRAME_BITS) : 1,
  localparam int unsigned NM        = scrub_pkg::N_MODULES,
  localparam int unsigned CRC_W     = scrub_pkg::CRC_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // configuration generation
  input  logic                          gen_start,
  input  logic                          seed_load,
  input  logic [31:0]                   seed,
  input  logic [7:0]                    eta,
  // fault injection
  input  logic                          inj_start,
  input  logic [NM-1:0]                 inj_mod_mask,
  input  logic [FA_W-1:0]               inj_frame_lo,
  input  logic [FA_W-1:0]               inj_frame_hi,
  input  logic [CB_W-1:0]               inj_cell_lo,
  input  logic [CB_W-1:0]               inj_cell_hi,
  output logic                          inj_busy,
  output logic                          inj_done,
  // scrubbing
  input  logic                          scrub_start,
  output logic                          busy,
  output scrub_pkg::ctrl_state_t        ctrl_state,
  output logic                          done,
  output logic                          err_detected,
  output logic [FA_W-1:0]               err_frame,
  output logic [1:0]                    round,
  output logic [31:0]                   detect_cycles,
  output logic [31:0]                   correct_cycles,
  output logic [31:0]                   frames_voted,
  output logic [31:0]                   golden_restores,
  // readback while idle
  input  logic [FA_W-1:0]               rb_addr,
  output logic [NM-1:0][FRAME_BITS-1:0] rb_frames,
  output logic [FRAME_BITS-1:0]         rb_golden,
  output logic [CRC_W-1:0]              rb_header
);

  logic                          ctrl_busy;
  logic                          gen_en, gen_valid, gen_ready;
  logic [FRAME_BITS-1:0]         gen_data;

  logic [FA_W-1:0]               addr, ctrl_addr, inj_addr;
  logic [NM-1:0]                 cm_we, ctrl_cm_we, inj_we;
  logic [NM-1:0][FRAME_BITS-1:0] cm_wd, ctrl_cm_wd, inj_wd, cm_rd;
  logic                          g_we, h_we;
  logic [FRAME_BITS-1:0]         g_wd, g_rd;
  logic [CRC_W-1:0]              h_wd, h_rd;
  logic [SCAN_LANES-1:0][FRAME_BITS-1:0] scan_m1;
  logic [SCAN_LANES-1:0][CRC_W-1:0]      scan_k;

  config_gen #(.FRAME_BITS(FRAME_BITS)) u_gen (
    .clk, .rst_n, .en(gen_en), .seed_load, .seed, .eta,
    .frame_valid(gen_valid), .frame_ready(gen_ready), .frame_data(gen_data)
  );

  flr_scrub_ctrl #(.FRAME_BITS(FRAME_BITS), .N_FRAMES(N_FRAMES), .SCAN_LANES(SCAN_LANES)) u_ctrl (
    .clk, .rst_n,
    .gen_start(gen_start && !inj_busy),
    .scrub_start(scrub_start && !inj_busy),
    .gen_en, .gen_valid, .gen_ready, .gen_data,
    .mem_addr(ctrl_addr), .cm_we(ctrl_cm_we), .cm_wd(ctrl_cm_wd), .cm_rd,
    .g_we, .g_wd, .g_rd, .h_we, .h_wd, .h_rd, .scan_m1, .scan_k,
    .state(ctrl_state), .busy(ctrl_busy), .done, .err_detected, .err_frame, .round,
    .detect_cycles, .correct_cycles, .frames_voted, .golden_restores
  );

  fault_injector #(.FRAME_BITS(FRAME_BITS), .N_FRAMES(N_FRAMES)) u_inj (
    .clk, .rst_n, .start(inj_start && !ctrl_busy), .mod_mask(inj_mod_mask),
    .frame_lo(inj_frame_lo), .frame_hi(inj_frame_hi),
    .cell_lo(inj_cell_lo), .cell_hi(inj_cell_hi),
    .busy(inj_busy), .done(inj_done),
    .mem_addr(inj_addr), .mem_we(inj_we), .mem_wd(inj_wd), .mem_rd(cm_rd)
  );

  // Frame port arbitration: the injector and the controller never run together.
  always_comb begin
    if (inj_busy) begin
      addr  = inj_addr;
      cm_we = inj_we;
      cm_wd = inj_wd;
    end else begin
      addr  = ctrl_busy ? ctrl_addr : rb_addr;
      cm_we = ctrl_cm_we;
      cm_wd = ctrl_cm_wd;
    end
  end

  config_mem #(.FRAME_BITS(FRAME_BITS), .N_FRAMES(N_FRAMES), .SCAN_LANES(SCAN_LANES)) u_cm (
    .clk, .addr, .rd_data(cm_rd), .we(cm_we), .wd(cm_wd),
    .scan_addr(ctrl_addr), .scan_rd(scan_m1)
  );

  golden_mem #(.FRAME_BITS(FRAME_BITS), .N_FRAMES(N_FRAMES)) u_golden (
    .clk, .addr, .we(g_we && !inj_busy), .wd(g_wd), .rd(g_rd)
  );

  crc_header #(.N_FRAMES(N_FRAMES), .SCAN_LANES(SCAN_LANES)) u_hdr (
    .clk, .addr, .we(h_we && !inj_busy), .wd(h_wd), .rd(h_rd),
    .scan_addr(ctrl_addr), .scan_rd(scan_k)
  );

  assign busy      = ctrl_busy;
  assign rb_frames = cm_rd;
  assign rb_golden = g_rd;
  assign rb_header = h_rd;

  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n) !(inj_busy && ctrl_busy))
    else $error("flr_scrubber_top: injector and controller both own the frame port");

endmodule

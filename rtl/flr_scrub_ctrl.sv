// flr_scrub_ctrl: controller of the improved frame-level redundancy scrubber.
//
// It runs the scrubbing flow chart on the triplicated configuration memory:
//
//  gen_start   Generate and triplicate: every frame delivered by the
//              generator is written into all three modules and into the
//              golden copy (ST_GEN). Then the CRC of every frame of module 1
//              is computed and stored as that frame's header K (ST_HDR).
//  scrub_start Round = 0, go to frame 1, Round = Round + 1. In an odd round
//              (ST_SCAN) the CRC J of each module-1 frame is compared with K,
//              one frame per clock. The first frame with J != K ends the scan
//              and voting starts at that frame. If every frame matches, the
//              round count becomes even and voting starts at frame 1 instead,
//              so that upsets in modules 2 and 3, which the module-1 CRC cannot
//              see, are repaired too.
//              Voting (ST_VOTE) visits one frame per clock from its start frame
//              to the last one: the three copies are voted bit by bit and the
//              modules that differ from the vote are rewritten with it. The CRC
//              of the voted frame is checked against K; if it still differs,
//              voting could not recover the frame (the same cell upset in two or
//              three modules) and the frame is restored from the golden copy in
//              all three modules. After the last frame the scrub ends.
//
// The flow chart, the CRC check on module 1 only and the voting are the
// scrubbing algorithm's; voting from the failing frame to the last frame, the
// CRC check of the voted frame that triggers the golden restore, and one frame
// per clock are this design's reading of it.
//
// The scan checks SCAN_LANES consecutive frames per cycle, each with its own
// CRC unit, through a separate read port of module 1 and the header store.
// SCAN_LANES = 1 is the flow chart's frame-by-frame loop; SCAN_LANES =
// N_FRAMES checks every frame at once, so that detection takes one cycle
// whatever the number of frames.
//
// Timing: after scrub_start, a scan that first fails at frame f takes
// f/SCAN_LANES+1 cycles (integer division) and the voting that follows
// N_FRAMES-f cycles; a clean scan takes ceil(N_FRAMES/SCAN_LANES) cycles and
// the full vote another N_FRAMES. done pulses in the
// cycle after the last vote, when busy has fallen. detect_cycles and
// correct_cycles count the scan and vote cycles of the last scrub. gen_start
// takes one cycle per delivered frame plus N_FRAMES cycles for the headers;
// with the built-in generator a frame is delivered every FRAME_BITS+1 cycles.
// Commands that arrive while busy are ignored.
module flr_scrub_ctrl #(
  parameter int unsigned FRAME_BITS = 126,
  parameter int unsigned N_FRAMES   = 39,
  parameter int unsigned SCAN_LANES = 1,
  localparam int unsigned FA_W      = (N_FRAMES > 1) ? $clog2(N_FRAMES) : 1,
  localparam int unsigned NM        = scrub_pkg::N_MODULES,
  localparam int unsigned CRC_W     = scrub_pkg::CRC_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          gen_start,
  input  logic                          scrub_start,
  // frame stream from the configuration generator
  output logic                          gen_en,
  input  logic                          gen_valid,
  output logic                          gen_ready,
  input  logic [FRAME_BITS-1:0]         gen_data,
  // frame port shared by the configuration memory, golden copy and headers
  output logic [FA_W-1:0]               mem_addr,
  output logic [NM-1:0]                 cm_we,
  output logic [NM-1:0][FRAME_BITS-1:0] cm_wd,
  input  logic [NM-1:0][FRAME_BITS-1:0] cm_rd,
  output logic                          g_we,
  output logic [FRAME_BITS-1:0]         g_wd,
  input  logic [FRAME_BITS-1:0]         g_rd,
  output logic                          h_we,
  output logic [CRC_W-1:0]              h_wd,
  input  logic [CRC_W-1:0]              h_rd,
  // scan port: SCAN_LANES consecutive module-1 frames and headers from mem_addr
  input  logic [SCAN_LANES-1:0][FRAME_BITS-1:0] scan_m1,
  input  logic [SCAN_LANES-1:0][CRC_W-1:0]      scan_k,
  // status
  output scrub_pkg::ctrl_state_t        state,
  output logic                          busy,
  output logic                          done,
  output logic                          err_detected,    // the scan found J != K
  output logic [FA_W-1:0]               err_frame,       // frame where it did
  output logic [1:0]                    round,           // 1: voted after a CRC error, 2: full vote
  output logic [31:0]                   detect_cycles,
  output logic [31:0]                   correct_cycles,
  output logic [31:0]                   frames_voted,    // frames rewritten by voting
  output logic [31:0]                   golden_restores  // frames restored from the golden copy
);

  import scrub_pkg::*;

  if (SCAN_LANES < 1 || SCAN_LANES > N_FRAMES) begin : g_bad_lanes
    $error("flr_scrub_ctrl: SCAN_LANES must be between 1 and N_FRAMES");
  end

  logic [FA_W-1:0]        f;
  logic                   last;
  logic [CRC_W-1:0]       crc_m1, crc_voted;
  logic [FRAME_BITS-1:0]  voted, err1, err2, err3;
  logic                   disagree;
  logic                   vote_fails;
  logic [SCAN_LANES-1:0][CRC_W-1:0] crc_lane;
  logic                   any_hit;
  logic [FA_W-1:0]        hit_frame;
  logic                   group_last;

  crc16_frame #(.DATA_W(FRAME_BITS)) u_crc_m1    (.data(cm_rd[0]), .crc(crc_m1));
  crc16_frame #(.DATA_W(FRAME_BITS)) u_crc_voted (.data(voted),    .crc(crc_voted));

  for (genvar l = 0; l < SCAN_LANES; l++) begin : g_lane
    crc16_frame #(.DATA_W(FRAME_BITS)) u_crc_scan (.data(scan_m1[l]), .crc(crc_lane[l]));
  end

  // Scan of SCAN_LANES frames per cycle: the lowest failing frame wins.
  always_comb begin
    any_hit   = 1'b0;
    hit_frame = f;
    for (int l = SCAN_LANES - 1; l >= 0; l--) begin
      if (32'(f) + 32'(l) < N_FRAMES && crc_lane[l] != scan_k[l]) begin
        any_hit     = 1'b1;
        hit_frame   = FA_W'(32'(f) + 32'(l));
      end
    end
    group_last = (32'(f) + SCAN_LANES >= N_FRAMES);
  end

  majority_voter #(.W(FRAME_BITS)) u_voter (
    .m1(cm_rd[0]), .m2(cm_rd[1]), .m3(cm_rd[2]),
    .voted, .err1, .err2, .err3, .disagree
  );

  assign last       = (f == FA_W'(N_FRAMES - 1));
  assign vote_fails = (crc_voted != h_rd);
  assign busy       = (state != ST_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= ST_IDLE;
      f               <= '0;
      done            <= 1'b0;
      err_detected    <= 1'b0;
      err_frame       <= '0;
      round           <= '0;
      detect_cycles   <= '0;
      correct_cycles  <= '0;
      frames_voted    <= '0;
      golden_restores <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: begin
          f <= '0;
          if (gen_start) begin
            state <= ST_GEN;
          end else if (scrub_start) begin
            state           <= ST_SCAN;
            round           <= 2'd1;
            err_detected    <= 1'b0;
            err_frame       <= '0;
            detect_cycles   <= '0;
            correct_cycles  <= '0;
            frames_voted    <= '0;
            golden_restores <= '0;
          end
        end
        ST_GEN: begin
          if (gen_valid) begin
            if (last) begin
              f     <= '0;
              state <= ST_HDR;
            end else begin
              f <= f + 1'b1;
            end
          end
        end
        ST_HDR: begin
          if (last) begin
            state <= ST_IDLE;
            done  <= 1'b1;
          end else begin
            f <= f + 1'b1;
          end
        end
        ST_SCAN: begin
          detect_cycles <= detect_cycles + 1;
          if (any_hit) begin
            err_detected <= 1'b1;
            err_frame    <= hit_frame;
            f            <= hit_frame;
            state        <= ST_VOTE;
          end else if (group_last) begin
            f     <= '0;
            round <= round + 1'b1;
            state <= ST_VOTE;
          end else begin
            f <= f + FA_W'(SCAN_LANES);
          end
        end
        ST_VOTE: begin
          correct_cycles <= correct_cycles + 1;
          if (vote_fails)    golden_restores <= golden_restores + 1;
          else if (disagree) frames_voted    <= frames_voted + 1;
          if (last) begin
            state <= ST_IDLE;
            done  <= 1'b1;
          end else begin
            f <= f + 1'b1;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // Memory port: the frame under f in every state.
  always_comb begin
    mem_addr  = f;
    gen_en    = (state == ST_GEN);
    gen_ready = (state == ST_GEN);
    cm_we     = '0;
    cm_wd     = '0;
    g_we      = 1'b0;
    g_wd      = gen_data;
    h_we      = 1'b0;
    h_wd      = crc_m1;
    unique case (state)
      ST_GEN: begin
        cm_we = {NM{gen_valid}};
        g_we  = gen_valid;
        cm_wd = {NM{gen_data}};
      end
      ST_HDR: h_we = 1'b1;
      ST_VOTE: begin
        if (vote_fails) begin
          cm_we = '1;
          cm_wd = {NM{g_rd}};
        end else begin
          cm_we = {|err3, |err2, |err1};
          cm_wd = {NM{voted}};
        end
      end
      default: ;
    endcase
  end

  a_no_cmd_overlap: assert property (@(posedge clk) disable iff (!rst_n)
      !(state == ST_IDLE && gen_start && scrub_start))
    else $warning("flr_scrub_ctrl: gen_start and scrub_start together, generation wins");

endmodule

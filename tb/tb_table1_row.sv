// tb_table1_row: one row of the one-module fault-injection sweep, used by
// tb_table1_workloads.
//
// Row K (1..10) is a module of 42*K cells per frame and 13*K frames, with a
// fault rectangle of 12*K cells (cells 1..12*K, 0-based 0..12*K-1) by 6*K
// frames (frames 5*K+1..11*K, 0-based 5*K..11*K-1). The row generates a
// configuration, then runs three scrubs: rectangle in module 1 only, in
// modules 1 and 2, and in all three modules (shifted to different cells in
// each module, so that voting can always recover). Each scrub must find the
// error at the rectangle's first frame, take 5*K+1 scan cycles (one when
// CONCURRENT builds the scrubber with one scan lane per frame), vote 8*K frames,
// repair 6*K frames by voting and leave the three modules equal to the
// golden copy. The scan and vote cycle counts are printed.
module tb_table1_row #(
  parameter int K = 1,
  parameter bit CONCURRENT = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int W = 42 * K, N = 13 * K, FA = $clog2(N), CB = $clog2(W);
  localparam int L = CONCURRENT ? N : 1;
  localparam int DET = CONCURRENT ? 1 : 5 * K + 1;
  logic gen_start = 0, seed_load = 0, inj_start = 0, scrub_start = 0;
  logic [31:0] seed = 32'h1357_9bdf + K;
  logic [7:0] eta = 8'd128;
  logic [2:0] inj_mod_mask = '0;
  logic [FA-1:0] inj_frame_lo = '0, inj_frame_hi = '0, rb_addr = '0;
  logic [CB-1:0] inj_cell_lo = '0, inj_cell_hi = '0;
  logic inj_busy, inj_done, busy, done, err_detected;
  scrub_pkg::ctrl_state_t ctrl_state;
  logic [FA-1:0] err_frame;
  logic [1:0] round;
  logic [31:0] det_c, cor_c, fvoted, grest;
  logic [2:0][W-1:0] rb_frames;
  logic [W-1:0] rb_golden;
  logic [15:0] rb_header;

  flr_scrubber_top #(.FRAME_BITS(W), .N_FRAMES(N), .SCAN_LANES(L)) dut (
    .clk, .rst_n, .gen_start, .seed_load, .seed, .eta,
    .inj_start, .inj_mod_mask, .inj_frame_lo, .inj_frame_hi, .inj_cell_lo, .inj_cell_hi,
    .inj_busy, .inj_done, .scrub_start, .busy, .ctrl_state, .done, .err_detected, .err_frame, .round,
    .detect_cycles(det_c), .correct_cycles(cor_c), .frames_voted(fvoted), .golden_restores(grest),
    .rb_addr, .rb_frames, .rb_golden, .rb_header);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL row %0d: %s", K, what); end
  endtask

  task automatic inject(input int m, input int cell0);
    @(negedge clk);
    inj_frame_lo = FA'(5 * K); inj_frame_hi = FA'(11 * K - 1);
    inj_cell_lo = CB'(cell0); inj_cell_hi = CB'(cell0 + 12 * K - 1);
    inj_mod_mask = 3'(1 << m); inj_start = 1;
    @(negedge clk); inj_start = 0;
    while (!inj_done) @(negedge clk);
  endtask

  task automatic scrub(input int nmod);
    @(negedge clk); scrub_start = 1;
    @(negedge clk); scrub_start = 0;
    while (!done) @(negedge clk);
    chk(err_detected && int'(err_frame) == 5 * K, $sformatf("%0d modules: error frame %0d", nmod, err_frame));
    chk(det_c == 32'(DET), $sformatf("%0d modules: detect cycles %0d", nmod, det_c));
    chk(cor_c == 32'(8 * K), $sformatf("%0d modules: correct cycles %0d", nmod, cor_c));
    chk(fvoted == 32'(6 * K) && grest == 0, $sformatf("%0d modules: voted %0d golden %0d", nmod, fvoted, grest));
    $display("row %2d, %0d scan lane(s): %3d cells x %3d frames, fault %3d,%3d in %0d module(s): detect %0d cycles, correct %0d cycles",
             K, L, W, N, 12 * K, 6 * K, nmod, det_c, cor_c);
    for (int f = 0; f < N; f++) begin
      @(negedge clk); rb_addr = FA'(f); #1;
      chk(rb_frames[0] === rb_golden && rb_frames[1] === rb_golden && rb_frames[2] === rb_golden,
          $sformatf("%0d modules: frame %0d not restored", nmod, f));
    end
  endtask

  initial begin
    finished = 0; checks = 0; failures = 0;
    @(posedge rst_n);
    @(negedge clk); seed_load = 1;
    @(negedge clk); seed_load = 0; gen_start = 1;
    @(negedge clk); gen_start = 0;
    while (!done) @(negedge clk);
    inject(0, 0);
    scrub(1);
    inject(0, 0); inject(1, 12 * K);
    scrub(2);
    inject(0, 0); inject(1, 12 * K); inject(2, 24 * K);
    scrub(3);
    finished = 1;
  end
endmodule

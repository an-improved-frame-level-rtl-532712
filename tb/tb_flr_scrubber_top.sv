// tb_flr_scrubber_top: end-to-end test of the scrubber at its default size
// (126-cell frames, 39 frames, three modules).
//
// 1. Generates the configuration with the built-in generator and checks every
//    frame of the three modules and the golden copy against a reference
//    xorshift model, every header against a long-division CRC, and the
//    generation time, (FRAME_BITS+1) per frame plus one per header.
// 2. Injects fault rectangles through the injector and runs scrubs; a
//    reference model of the scrub predicts the memory contents after it and
//    all statistics (error frame, round, scan and vote cycles, frames repaired
//    by voting, golden restores).
// Each mechanism is counted and must occur at least once: a CRC error found
// in the module-1 scan, a clean scan followed by a full vote, repair by
// voting, restore from the golden copy, an upset left behind the failing frame
// and repaired by the next scrub, a command dropped because the other side
// was busy, and a frame range clamped at the last frame.
module tb_flr_scrubber_top;
  localparam int W = 126, N = 39, FA = $clog2(N), CB = $clog2(W);
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real reset edge, so asynchronous resets act before the first clock
  logic gen_start = 0, seed_load = 0, inj_start = 0, scrub_start = 0;
  logic [31:0] seed = '0;
  logic [7:0] eta = '0;
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
  int checks = 0, failures = 0;

  // mechanism counters
  int n_crc_error = 0, n_full_vote = 0, n_vote_repair = 0, n_golden = 0;
  int n_deferred = 0, n_dropped = 0, n_clamped = 0;

  logic [W-1:0] sh [3][N];
  logic [W-1:0] gold [N];

  flr_scrubber_top dut (
    .clk, .rst_n, .gen_start, .seed_load, .seed, .eta,
    .inj_start, .inj_mod_mask, .inj_frame_lo, .inj_frame_hi, .inj_cell_lo, .inj_cell_hi,
    .inj_busy, .inj_done, .scrub_start, .busy, .ctrl_state, .done, .err_detected, .err_frame, .round,
    .detect_cycles(det_c), .correct_cycles(cor_c), .frames_voted(fvoted), .golden_restores(grest),
    .rb_addr, .rb_frames, .rb_golden, .rb_header);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_crc(input logic [W-1:0] m);
    logic [W+15:0] dv;
    dv = {m, 16'h0};
    for (int i = W + 15; i >= 16; i--)
      if (dv[i]) dv[i -: 17] = dv[i -: 17] ^ 17'h11021;
    return dv[15:0];
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic compare_mem(input string tag);
    for (int f = 0; f < N; f++) begin
      @(negedge clk); rb_addr = FA'(f); #1;
      for (int m = 0; m < 3; m++)
        chk(rb_frames[m] === sh[m][f], $sformatf("%s module %0d frame %0d", tag, m, f));
      chk(rb_golden === gold[f], $sformatf("%s golden frame %0d", tag, f));
      chk(rb_header === ref_crc(gold[f]), $sformatf("%s header frame %0d", tag, f));
    end
  endtask

  task automatic inject(input int fl, input int fh, input int cl, input int ch, input logic [2:0] mm);
    int fh_c;
    fh_c = (fh > N - 1) ? N - 1 : fh;
    if (fh > N - 1) n_clamped++;
    for (int f = fl; f <= fh_c; f++)
      for (int m = 0; m < 3; m++)
        if (mm[m])
          for (int i = cl; i <= ch; i++) sh[m][f][i] = ~sh[m][f][i];
    @(negedge clk);
    inj_frame_lo = FA'(fl); inj_frame_hi = FA'(fh); inj_cell_lo = CB'(cl); inj_cell_hi = CB'(ch);
    inj_mod_mask = mm; inj_start = 1;
    @(negedge clk); inj_start = 0;
    while (!inj_done) @(negedge clk);
  endtask

  task automatic scrub_and_check(input string tag);
    int e_start, e_det, e_cor, e_voted, e_gold, e_round, cyc;
    bit e_err;
    e_err = 0; e_start = 0; e_det = N; e_round = 2;
    for (int f = 0; f < N; f++)
      if (ref_crc(sh[0][f]) != ref_crc(gold[f])) begin
        e_err = 1; e_start = f; e_det = f + 1; e_round = 1; break;
      end
    for (int f = 0; f < e_start; f++)
      if (sh[1][f] != gold[f] || sh[2][f] != gold[f]) begin n_deferred++; break; end
    e_cor = N - e_start; e_voted = 0; e_gold = 0;
    for (int f = e_start; f < N; f++) begin
      logic [W-1:0] v;
      v = (sh[0][f] & sh[1][f]) | (sh[0][f] & sh[2][f]) | (sh[1][f] & sh[2][f]);
      if (ref_crc(v) != ref_crc(gold[f])) begin
        e_gold++;
        for (int m = 0; m < 3; m++) sh[m][f] = gold[f];
      end else if (sh[0][f] != v || sh[1][f] != v || sh[2][f] != v) begin
        e_voted++;
        for (int m = 0; m < 3; m++) sh[m][f] = v;
      end
    end
    @(negedge clk); scrub_start = 1;
    @(negedge clk); scrub_start = 0; cyc = 1;
    // an injection request during the scrub must be dropped
    inj_frame_lo = '0; inj_frame_hi = FA'(N - 1); inj_cell_lo = '0; inj_cell_hi = CB'(W - 1);
    inj_mod_mask = 3'b111; inj_start = 1;
    @(negedge clk); inj_start = 0; cyc++;
    if (!inj_busy) n_dropped++;
    while (!done) begin @(negedge clk); cyc++; end
    chk(cyc == e_det + e_cor + 1, $sformatf("%s scrub took %0d cycles, expected %0d", tag, cyc, e_det + e_cor + 1));
    chk(err_detected == e_err, $sformatf("%s err_detected", tag));
    if (e_err) chk(int'(err_frame) == e_start, $sformatf("%s err_frame %0d exp %0d", tag, err_frame, e_start));
    chk(int'(round) == e_round, $sformatf("%s round", tag));
    chk(det_c == e_det, $sformatf("%s detect_cycles %0d exp %0d", tag, det_c, e_det));
    chk(cor_c == e_cor, $sformatf("%s correct_cycles %0d exp %0d", tag, cor_c, e_cor));
    chk(fvoted == e_voted, $sformatf("%s frames_voted %0d exp %0d", tag, fvoted, e_voted));
    chk(grest == e_gold, $sformatf("%s golden_restores %0d exp %0d", tag, grest, e_gold));
    if (e_err) n_crc_error++; else n_full_vote++;
    if (e_voted > 0) n_vote_repair++;
    if (e_gold > 0) n_golden++;
    $display("%-40s err=%0d frame=%0d round=%0d detect=%0d correct=%0d voted=%0d golden=%0d",
             tag, err_detected, err_frame, round, det_c, cor_c, fvoted, grest);
    compare_mem(tag);
  endtask

  initial begin
    int cyc, ones;
    logic [31:0] st;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // --- generate and triplicate
    @(negedge clk); seed = 32'h2468_ace1; eta = 8'd128; seed_load = 1;
    @(negedge clk); seed_load = 0; gen_start = 1;
    @(negedge clk); gen_start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    chk(cyc == N * (W + 1) + N + 1, $sformatf("generation took %0d cycles, expected %0d", cyc, N * (W + 1) + N + 1));
    st = seed; ones = 0;
    for (int f = 0; f < N; f++) begin
      for (int i = W - 1; i >= 0; i--) begin
        st = st ^ (st << 13); st = st ^ (st >> 17); st = st ^ (st << 5);
        gold[f][i] = st[31:24] > eta;
      end
      ones += $countones(gold[f]);
      for (int m = 0; m < 3; m++) sh[m][f] = gold[f];
    end
    chk(ones > N * W * 4 / 10 && ones < N * W * 6 / 10, "density of ones near one half for eta = 128");
    compare_mem("after generation");

    scrub_and_check("clean configuration");
    inject(5, 10, 0, 11, 3'b001);
    scrub_and_check("12x6 rectangle in module 1");
    inject(0, 38, 100, 125, 3'b010);
    scrub_and_check("module 2 only");
    inject(20, 22, 40, 41, 3'b011);
    scrub_and_check("same cells in modules 1 and 2");
    inject(1, 3, 7, 9, 3'b100);
    inject(25, 25, 3, 3, 3'b001);
    scrub_and_check("module 3 upset before the failing frame");
    scrub_and_check("next scrub");
    inject(36, 2 ** FA - 1, 0, 0, 3'b101);
    scrub_and_check("frame range clamped, two modules");
    for (int n = 0; n < 10; n++) begin
      int k;
      k = $urandom_range(1, 4);
      for (int j = 0; j < k; j++) begin
        int fl, cl;
        fl = $urandom_range(N - 1); cl = $urandom_range(W - 1);
        inject(fl, fl + $urandom_range(3), cl, (cl + $urandom_range(5) > W - 1) ? W - 1 : cl + $urandom_range(5),
               3'(1 << $urandom_range(2)));
      end
      scrub_and_check($sformatf("random %0d", n));
    end

    $display("mechanisms: crc_error=%0d full_vote=%0d vote_repair=%0d golden_restore=%0d deferred=%0d dropped_cmd=%0d clamped=%0d",
             n_crc_error, n_full_vote, n_vote_repair, n_golden, n_deferred, n_dropped, n_clamped);
    chk(n_crc_error > 0, "mechanism: CRC error found by the module-1 scan");
    chk(n_full_vote > 0, "mechanism: clean scan then full vote");
    chk(n_vote_repair > 0, "mechanism: repair by bit-level voting");
    chk(n_golden > 0, "mechanism: restore from the golden copy");
    chk(n_deferred > 0, "mechanism: upset behind the failing frame left to the next scrub");
    chk(n_dropped > 0, "mechanism: command dropped while busy");
    chk(n_clamped > 0, "mechanism: frame range clamped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

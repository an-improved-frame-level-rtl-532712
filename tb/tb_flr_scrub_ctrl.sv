// tb_flr_scrub_ctrl: self-checking test of the scrub controller.
//
// The controller runs on real memories (config_mem, golden_mem, crc_header);
// the testbench stands in for the generator, streaming random frames, and
// writes upsets straight into the memories while the controller is idle. A
// reference model of the scrub (CRC scan of module 1 to the first failing
// frame, else a full vote; voting from the start frame to the end; golden
// restore when the voted frame's CRC differs from its header) predicts the
// memory contents and every statistic, including the scan and vote cycle
// counts. Scenarios: clean memory, one upset in module 1, upsets in modules 2
// and 3 only, the same cell upset in two modules, an upset in module 3 before
// the failing module-1 frame (left for the next scrub), and random mixes.
// The controller is built with four scan lanes (39 frames: nine full groups
// and a last group of three), so the scan checks four frames per cycle and
// must report the lowest failing frame of a group.
module tb_flr_scrub_ctrl;
  localparam int W = 126, N = 39, FA = $clog2(N), L = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real reset edge, so asynchronous resets act before the first clock
  logic gen_start = 0, scrub_start = 0;
  logic gen_en, gen_valid, gen_ready;
  logic [W-1:0] gen_data;
  logic [FA-1:0] c_addr, tb_addr, addr;
  logic [2:0] c_we, tb_we, we;
  logic [2:0][W-1:0] c_wd, tb_wd, wd, rd;
  logic g_we, h_we;
  logic [W-1:0] g_wd, g_rd;
  logic [15:0] h_wd, h_rd;
  logic [L-1:0][W-1:0] scan_m1;
  logic [L-1:0][15:0] scan_k;
  scrub_pkg::ctrl_state_t state;
  logic busy, done, err_detected;
  logic [FA-1:0] err_frame;
  logic [1:0] round;
  logic [31:0] det_c, cor_c, fvoted, grest;
  int checks = 0, failures = 0;

  logic [W-1:0] sh [3][N];
  logic [W-1:0] gold [N];

  flr_scrub_ctrl #(.FRAME_BITS(W), .N_FRAMES(N), .SCAN_LANES(L)) dut (
    .clk, .rst_n, .gen_start, .scrub_start, .gen_en, .gen_valid, .gen_ready, .gen_data,
    .mem_addr(c_addr), .cm_we(c_we), .cm_wd(c_wd), .cm_rd(rd),
    .g_we, .g_wd, .g_rd, .h_we, .h_wd, .h_rd, .scan_m1, .scan_k,
    .state, .busy, .done, .err_detected, .err_frame, .round,
    .detect_cycles(det_c), .correct_cycles(cor_c), .frames_voted(fvoted), .golden_restores(grest));

  assign addr = busy ? c_addr : tb_addr;
  assign we   = busy ? c_we : tb_we;
  assign wd   = busy ? c_wd : tb_wd;

  config_mem #(.FRAME_BITS(W), .N_FRAMES(N), .SCAN_LANES(L)) u_cm (.clk, .addr, .rd_data(rd), .we, .wd,
    .scan_addr(c_addr), .scan_rd(scan_m1));
  golden_mem #(.FRAME_BITS(W), .N_FRAMES(N)) u_g (.clk, .addr, .we(g_we), .wd(g_wd), .rd(g_rd));
  crc_header #(.N_FRAMES(N), .SCAN_LANES(L)) u_h (.clk, .addr, .we(h_we), .wd(h_wd), .rd(h_rd),
    .scan_addr(c_addr), .scan_rd(scan_k));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] r;
    for (int k = 0; k < W; k += 32) r[k +: 32] = $urandom;
    return r;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic flip(input int m, input int f, input int cb);
    @(negedge clk);
    sh[m][f][cb] = ~sh[m][f][cb];
    tb_addr = FA'(f); tb_we = '0; tb_we[m] = 1'b1; tb_wd[m] = sh[m][f];
    @(negedge clk);
    tb_we = '0;
  endtask

  task automatic compare_mem(input string tag);
    for (int f = 0; f < N; f++) begin
      @(negedge clk); tb_addr = FA'(f); #1;
      for (int m = 0; m < 3; m++)
        chk(rd[m] === sh[m][f], $sformatf("%s module %0d frame %0d", tag, m, f));
      chk(g_rd === gold[f], $sformatf("%s golden frame %0d", tag, f));
      chk(h_rd === ref_crc(gold[f]), $sformatf("%s header frame %0d", tag, f));
    end
  endtask

  // Reference scrub: updates sh[][] and returns the expected statistics.
  task automatic scrub_and_check(input string tag);
    int e_start, e_det, e_cor, e_voted, e_gold, e_round, cyc;
    bit e_err;
    e_err = 0; e_start = 0; e_det = (N + L - 1) / L; e_round = 2;
    for (int f = 0; f < N; f++)
      if (ref_crc(sh[0][f]) != ref_crc(gold[f])) begin
        e_err = 1; e_start = f; e_det = f / L + 1; e_round = 1; break;
      end
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
    while (!done) begin @(negedge clk); cyc++; end
    chk(cyc == e_det + e_cor + 1, $sformatf("%s scrub took %0d cycles, expected %0d", tag, cyc, e_det + e_cor + 1));
    chk(err_detected == e_err, $sformatf("%s err_detected", tag));
    if (e_err) chk(int'(err_frame) == e_start, $sformatf("%s err_frame %0d exp %0d", tag, err_frame, e_start));
    chk(int'(round) == e_round, $sformatf("%s round", tag));
    chk(det_c == e_det, $sformatf("%s detect_cycles %0d exp %0d", tag, det_c, e_det));
    chk(cor_c == e_cor, $sformatf("%s correct_cycles %0d exp %0d", tag, cor_c, e_cor));
    chk(fvoted == e_voted, $sformatf("%s frames_voted %0d exp %0d", tag, fvoted, e_voted));
    chk(grest == e_gold, $sformatf("%s golden_restores %0d exp %0d", tag, grest, e_gold));
    compare_mem(tag);
  endtask

  initial begin
    int cyc;
    tb_addr = '0; tb_we = '0; tb_wd = '0; gen_valid = 0; gen_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // --- generate: stream N frames, with idle gaps on the stream
    for (int f = 0; f < N; f++) begin
      gold[f] = rnd();
      for (int m = 0; m < 3; m++) sh[m][f] = gold[f];
    end
    @(negedge clk); gen_start = 1;
    @(negedge clk); gen_start = 0;
    chk(busy && gen_en && gen_ready, "generation starts");
    cyc = 1;
    for (int f = 0; f < N; f++) begin
      if (f % 7 == 3) begin gen_valid = 0; @(negedge clk); cyc++; end
      gen_valid = 1; gen_data = gold[f];
      @(negedge clk); cyc++;
    end
    gen_valid = 0;
    while (!done) begin @(negedge clk); cyc++; end
    chk(cyc == N + N / 7 + (N % 7 > 3 ? 1 : 0) + N + 1, $sformatf("generation and headers took %0d cycles", cyc));
    compare_mem("after generation");

    scrub_and_check("clean");
    flip(0, 7, 3);
    scrub_and_check("module 1 upset");
    flip(1, 2, 100); flip(2, 20, 0); flip(2, 38, 125);
    scrub_and_check("modules 2 and 3 upsets");
    flip(0, 12, 50); flip(2, 12, 50);
    scrub_and_check("same cell in two modules");
    flip(1, 12, 60); flip(2, 12, 60); flip(0, 12, 60);
    scrub_and_check("same cell in three modules");
    flip(0, 10, 5); flip(0, 9, 6);
    scrub_and_check("two failing frames in one scan group");
    flip(0, 38, 0);
    scrub_and_check("failing frame in the short last group");
    flip(2, 4, 9); flip(0, 30, 1);
    scrub_and_check("module 3 upset before the failing frame");
    chk(sh[2][4] != gold[4], "upset before the failing frame is left for the next scrub");
    scrub_and_check("next scrub repairs it");
    for (int n = 0; n < 12; n++) begin
      int k;
      k = $urandom_range(1, 8);
      for (int j = 0; j < k; j++) flip($urandom_range(2), $urandom_range(N-1), $urandom_range(W-1));
      scrub_and_check($sformatf("random %0d", n));
    end
    // a command while busy is ignored
    @(negedge clk); scrub_start = 1;
    @(negedge clk); scrub_start = 0; gen_start = 1;
    @(negedge clk); gen_start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    chk(state == scrub_pkg::ST_IDLE, "gen_start during a scrub is ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_config_gen: self-checking test of the random configuration generator.
//
// A reference xorshift32 (shifts 13, 17, 5) in the testbench predicts every
// cell: cell = (top byte of the next state) > eta, first cell in the frame's
// MSB. Checks the frame contents for several eta values, that a frame takes
// exactly FRAME_BITS enabled cycles, that a frame is held while frame_ready is
// low, and the extremes eta = 255 (no ones) and a density near one half for
// eta = 128.
module tb_config_gen;
  localparam int W = 126;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real reset edge, so asynchronous resets act before the first clock
  logic en = 0, seed_load = 0, ready = 0, valid;
  logic [31:0] seed;
  logic [7:0] eta;
  logic [W-1:0] data;
  int checks = 0, failures = 0;
  logic [31:0] ref_state;

  config_gen #(.FRAME_BITS(W)) dut (.clk, .rst_n, .en, .seed_load, .seed, .eta,
    .frame_valid(valid), .frame_ready(ready), .frame_data(data));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] ref_frame(input logic [7:0] e);
    logic [W-1:0] fr;
    for (int i = W - 1; i >= 0; i--) begin
      ref_state = ref_state ^ (ref_state << 13);
      ref_state = ref_state ^ (ref_state >> 17);
      ref_state = ref_state ^ (ref_state << 5);
      fr[i] = ref_state[31:24] > e;
    end
    return fr;
  endfunction

  task automatic run_frames(input logic [31:0] s, input logic [7:0] e, input int nfr, output int ones);
    logic [W-1:0] exp_fr;
    int cyc;
    ones = 0;
    @(negedge clk);
    seed = s; eta = e; seed_load = 1; en = 0;
    @(negedge clk);
    seed_load = 0; en = 1;
    ref_state = (s == 0) ? 32'h1 : s;
    for (int k = 0; k < nfr; k++) begin
      exp_fr = ref_frame(e);
      cyc = 0;
      while (!valid) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != W) begin failures++; $display("FAIL frame took %0d cycles", cyc); end
      checks++;
      if (data !== exp_fr) begin failures++; $display("FAIL frame %0d data", k); end
      ones += $countones(data);
      // hold a few cycles without ready: frame must stay
      repeat (3) @(negedge clk);
      checks++;
      if (!valid || data !== exp_fr) begin failures++; $display("FAIL frame not held"); end
      ready = 1;
      @(negedge clk);
      ready = 0;
    end
    en = 0;
  endtask

  initial begin
    int ones;
    seed = 0; eta = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_frames(32'h1234_5678, 8'd128, 20, ones);
    checks++;
    if (ones < 20 * W * 4 / 10 || ones > 20 * W * 6 / 10) begin failures++; $display("FAIL density %0d", ones); end
    run_frames(32'hdead_beef, 8'd255, 3, ones);
    checks++;
    if (ones != 0) begin failures++; $display("FAIL eta=255 gave %0d ones", ones); end
    run_frames(32'h0, 8'd30, 5, ones);
    run_frames(32'h0bad_cafe, 8'd220, 5, ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

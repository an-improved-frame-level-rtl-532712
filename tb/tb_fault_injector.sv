// tb_fault_injector: self-checking test of the fault injector.
//
// The injector drives a real configuration memory. Each test fills the three
// modules with random frames, injects one rectangle (random frame range, cell
// range and module mask), and compares every frame of every module with the
// expected contents: cells inside the rectangle inverted in the selected
// modules, everything else unchanged. It also checks that the injection takes
// one cycle per frame and the clamping of an out-of-range frame_hi.
module tb_fault_injector;
  localparam int W = 126, N = 39, FA = $clog2(N), CB = $clog2(W);
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real reset edge, so asynchronous resets act before the first clock
  logic start = 0, busy, done;
  logic [2:0] mod_mask;
  logic [FA-1:0] flo, fhi;
  logic [CB-1:0] clo, chi;
  logic [FA-1:0] inj_addr, addr, tb_addr;
  logic [2:0] inj_we, we, tb_we;
  logic [2:0][W-1:0] inj_wd, wd, tb_wd, rd;
  logic [W-1:0] shadow [3][N];
  int checks = 0, failures = 0;

  fault_injector #(.FRAME_BITS(W), .N_FRAMES(N)) dut (.clk, .rst_n, .start, .mod_mask,
    .frame_lo(flo), .frame_hi(fhi), .cell_lo(clo), .cell_hi(chi), .busy, .done,
    .mem_addr(inj_addr), .mem_we(inj_we), .mem_wd(inj_wd), .mem_rd(rd));
  config_mem #(.FRAME_BITS(W), .N_FRAMES(N)) u_mem (.clk, .addr, .rd_data(rd), .we, .wd);

  assign addr = busy ? inj_addr : tb_addr;
  assign we   = busy ? inj_we   : tb_we;
  assign wd   = busy ? inj_wd   : tb_wd;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill();
    for (int f = 0; f < N; f++) begin
      @(negedge clk);
      tb_addr = FA'(f); tb_we = 3'b111;
      for (int m = 0; m < 3; m++) begin
        for (int k = 0; k < W; k += 32) tb_wd[m][k +: 32] = $urandom;
        shadow[m][f] = tb_wd[m];
      end
    end
    @(negedge clk); tb_we = '0;
  endtask

  task automatic inject(input int fl, input int fh, input int cl, input int ch, input logic [2:0] mm);
    int cyc, fh_c;
    fh_c = (fh > N - 1) ? N - 1 : fh;
    for (int f = fl; f <= fh_c; f++)
      for (int m = 0; m < 3; m++)
        if (mm[m])
          for (int i = cl; i <= ch; i++) shadow[m][f][i] = ~shadow[m][f][i];
    @(negedge clk);
    flo = FA'(fl); fhi = FA'(fh); clo = CB'(cl); chi = CB'(ch); mod_mask = mm; start = 1;
    @(negedge clk);
    start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    if (fl <= fh_c) begin
      checks++;
      if (cyc != fh_c - fl + 2) begin failures++; $display("FAIL injection took %0d cycles", cyc); end
    end
  endtask

  task automatic compare();
    for (int f = 0; f < N; f++) begin
      @(negedge clk); tb_addr = FA'(f); #1;
      for (int m = 0; m < 3; m++) begin
        checks++;
        if (rd[m] !== shadow[m][f]) begin failures++; $display("FAIL module %0d frame %0d", m, f); end
      end
    end
  endtask

  initial begin
    tb_we = '0; tb_addr = '0; tb_wd = '0; flo = '0; fhi = '0; clo = '0; chi = '0; mod_mask = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    fill();
    inject(5, 10, 0, 11, 3'b001);       // a 12-cell by 6-frame rectangle in module 1
    compare();
    for (int n = 0; n < 20; n++) begin
      int fl, fh, cl, ch;
      fl = $urandom_range(N-1); fh = $urandom_range(N-1);
      cl = $urandom_range(W-1); ch = $urandom_range(W-1);
      if (n % 3 != 2) begin
        if (fl > fh) begin automatic int t = fl; fl = fh; fh = t; end
        if (cl > ch) begin automatic int t = cl; cl = ch; ch = t; end
      end
      inject(fl, fh, cl, ch, 3'($urandom));
      compare();
    end
    inject(30, 2 ** FA - 1, W - 1, W - 1, 3'b110); // frame_hi beyond the last frame
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

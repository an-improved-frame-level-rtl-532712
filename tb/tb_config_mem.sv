// tb_config_mem: self-checking test of the triplicated configuration memory.
//
// Writes random frames into random modules and frames, keeps a shadow copy in
// the testbench, and checks after every write that all three modules read
// back the shadow frame at a random address, so writes must land only in the
// enabled modules and only at the addressed frame. The scan port is checked
// with three lanes at random addresses, including lanes past the last frame,
// which must read zero.
module tb_config_mem;
  localparam int W = 126, N = 39, FA = $clog2(N), L = 3;
  logic clk = 0;
  logic [FA-1:0] addr;
  logic [2:0][W-1:0] rd, wd;
  logic [2:0] we;
  logic [FA-1:0] saddr;
  logic [L-1:0][W-1:0] srd;
  logic [W-1:0] shadow [3][N];
  int checks = 0, failures = 0;

  config_mem #(.FRAME_BITS(W), .N_FRAMES(N), .SCAN_LANES(L)) dut (.clk, .addr, .rd_data(rd), .we, .wd,
    .scan_addr(saddr), .scan_rd(srd));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] r;
    for (int k = 0; k < W; k += 32) r[k +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    we = '0; addr = '0; wd = '0; saddr = '0;
    // fill every frame of every module
    for (int f = 0; f < N; f++) begin
      @(negedge clk);
      addr = FA'(f); we = 3'b111;
      for (int m = 0; m < 3; m++) begin wd[m] = rnd(); shadow[m][f] = wd[m]; end
    end
    @(negedge clk); we = '0;
    for (int n = 0; n < 600; n++) begin
      int f, g;
      @(negedge clk);
      f = $urandom_range(N-1);
      addr = FA'(f); we = 3'($urandom);
      for (int m = 0; m < 3; m++) begin
        wd[m] = rnd();
        if (we[m]) shadow[m][f] = wd[m];
      end
      @(negedge clk);
      we = '0;
      g = (n % 2 == 1) ? f : $urandom_range(N-1);
      addr = FA'(g);
      saddr = FA'((n % 5 == 0) ? N - 2 : $urandom_range(N-1));
      #1;
      for (int l = 0; l < L; l++) begin
        checks++;
        if (srd[l] !== ((int'(saddr) + l < N) ? shadow[0][int'(saddr) + l] : '0)) begin
          failures++; $display("FAIL scan lane %0d at %0d", l, saddr);
        end
      end
      for (int m = 0; m < 3; m++) begin
        checks++;
        if (rd[m] !== shadow[m][g]) begin failures++; $display("FAIL module %0d frame %0d", m, g); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

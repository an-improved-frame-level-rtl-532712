// tb_crc_header: self-checking test of the CRC header store.
//
// Fills every frame with random words, then mixes random writes and reads,
// comparing each read with a shadow copy kept in the testbench; a write must
// change only its own address, and only when the write enable is high. The
// three-lane scan port is checked at random addresses, past the end too.
module tb_crc_header;
  localparam int W = 16, N = 39, FA = $clog2(N), L = 3;
  logic clk = 0;
  logic [FA-1:0] addr;
  logic we;
  logic [FA-1:0] saddr;
  logic [L-1:0][W-1:0] srd;
  logic [W-1:0] wd, rd;
  logic [W-1:0] shadow [N];
  int checks = 0, failures = 0;

  crc_header #(.N_FRAMES(N), .SCAN_LANES(L)) dut (.clk, .addr, .we, .wd, .rd,
    .scan_addr(saddr), .scan_rd(srd));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    logic [127:0] r;
    r = {$urandom, $urandom, $urandom, $urandom};
    return r[W-1:0];
  endfunction

  initial begin
    we = 0; addr = '0; wd = '0; saddr = '0;
    for (int f = 0; f < N; f++) begin
      @(negedge clk); addr = FA'(f); we = 1; wd = rnd(); shadow[f] = wd;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 600; n++) begin
      int f, g;
      @(negedge clk);
      f = $urandom_range(N-1); addr = FA'(f); we = 1'($urandom); wd = rnd();
      if (we) shadow[f] = wd;
      @(negedge clk);
      we = 0; g = (n % 2 == 1) ? f : $urandom_range(N-1); addr = FA'(g);
      saddr = FA'((n % 5 == 0) ? N - 2 : $urandom_range(N-1));
      #1;
      for (int l = 0; l < L; l++) begin
        checks++;
        if (srd[l] !== ((int'(saddr) + l < N) ? shadow[int'(saddr) + l] : '0)) begin
          failures++; $display("FAIL scan lane %0d at %0d", l, saddr);
        end
      end
      checks++;
      if (rd !== shadow[g]) begin failures++; $display("FAIL frame %0d", g); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_table1_workloads: the fault-injection sweep of ten module sizes, from
// 42 cells x 13 frames to 420 cells x 130 frames, each with its fault
// rectangle, run side by side (one tb_table1_row per size, each with the
// scrubber built at that size). Every size is built twice: with one scan lane
// (frame-by-frame CRC scan, detection time grows with the failing frame) and
// with one lane per frame (all frames checked at once, detection in one
// cycle at every size). Passes when every row's checks pass.
module tb_table1_workloads;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real reset edge, so asynchronous resets act before the first clock
  logic [20:1] fin;
  int c [20:1];
  int fl [20:1];
  int checks, failures;

  always #5 clk = ~clk;

  for (genvar k = 1; k <= 10; k++) begin : g_row
    tb_table1_row #(.K(k)) u_row (.clk, .rst_n, .finished(fin[k]), .checks(c[k]), .failures(fl[k]));
    tb_table1_row #(.K(k), .CONCURRENT(1'b1)) u_row_conc (.clk, .rst_n, .finished(fin[k + 10]),
      .checks(c[k + 10]), .failures(fl[k + 10]));
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (&fin);
    checks = 0; failures = 0;
    for (int k = 1; k <= 20; k++) begin checks += c[k]; failures += fl[k]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

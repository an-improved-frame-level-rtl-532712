// tb_crc16_frame: self-checking test of the frame CRC unit.
//
// Checks the 72-bit ASCII string "123456789" against the published CRC-16
// XMODEM check value 0x31C3 (same polynomial, zero init, no reflection), and
// random 126-bit frames against a reference that does polynomial long division
// on the message with sixteen zero bits appended.
module tb_crc16_frame;
  localparam int W = 126;
  logic [W-1:0]  d;
  logic [15:0]   c;
  logic [71:0]   s;
  logic [15:0]   cs;
  int checks = 0, failures = 0;

  crc16_frame #(.DATA_W(W)) dut   (.data(d), .crc(c));
  crc16_frame #(.DATA_W(72)) dut72 (.data(s), .crc(cs));

  function automatic logic [15:0] ref_crc(input logic [W-1:0] m);
    logic [W+15:0] dv;
    logic [16:0]   g;
    dv = {m, 16'h0};
    g  = 17'h11021;
    for (int i = W + 15; i >= 16; i--)
      if (dv[i]) dv[i -: 17] = dv[i -: 17] ^ g;
    return dv[15:0];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = "123456789";
    #1;
    checks++;
    if (cs !== 16'h31C3) begin failures++; $display("FAIL check string: %h", cs); end
    d = '0; #1; checks++;
    if (c !== 16'h0) begin failures++; $display("FAIL zero frame: %h", c); end
    for (int n = 0; n < 300; n++) begin
      for (int k = 0; k < W; k += 32) d[k +: 32] = $urandom;
      if (n == 1) d = {{(W-1){1'b0}}, 1'b1};
      if (n == 2) d = {1'b1, {(W-1){1'b0}}};
      #1;
      checks++;
      if (c !== ref_crc(d)) begin failures++; $display("FAIL frame %h: %h vs %h", d, c, ref_crc(d)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

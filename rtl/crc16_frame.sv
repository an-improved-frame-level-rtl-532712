// crc16_frame: combinational CRC of one whole configuration frame.
//
// Computes R(x) = x^r * M(x) mod G(x) for the DATA_W-bit frame M, with the
// frame's most significant bit taken as the highest-order coefficient. The
// loop is the bit-serial division (one XOR and one shift per message bit)
// unrolled across the frame, so a frame's check word is available in the
// same cycle the frame is read. Initial value zero, no final XOR: the plain
// polynomial remainder. The polynomial itself is a parameter; its default
// (CCITT, 0x1021) is this design's choice.
//
// Interface: data in, crc out; no clock, no latency.
module crc16_frame #(
  parameter int unsigned DATA_W = 126,
  parameter int unsigned CRC_W  = scrub_pkg::CRC_W,
  parameter logic [CRC_W-1:0] POLY = scrub_pkg::CRC_POLY
) (
  input  logic [DATA_W-1:0] data,
  output logic [CRC_W-1:0]  crc
);

  always_comb begin
    logic [CRC_W-1:0] r;
    logic             fb;
    r = '0;
    for (int i = DATA_W - 1; i >= 0; i--) begin
      fb = r[CRC_W-1] ^ data[i];
      r  = {r[CRC_W-2:0], 1'b0};
      if (fb) r = r ^ POLY;
    end
    crc = r;
  end

endmodule

// scrub_pkg: constants and types shared by the frame-level redundancy scrubber.
//
// The scrubber protects a triplicated configuration memory. Every frame has a
// 16-bit CRC check word (the frame "header"); the generator polynomial is not
// fixed by the algorithm, so this design uses the CCITT polynomial
// x^16 + x^12 + x^5 + 1 with a zero initial value and no final inversion,
// which is exactly the remainder of x^16*M(x) divided by G(x).
// The controller states follow the scrubbing flow chart: generate and
// triplicate, compute headers, then rounds of CRC scanning and bit-level voting.
package scrub_pkg;

  localparam int unsigned N_MODULES = 3;          // triple modular redundancy
  localparam int unsigned CRC_W     = 16;         // 16-bit frame check word
  localparam logic [CRC_W-1:0] CRC_POLY = 16'h1021; // G(x) without the x^16 term

  typedef enum logic [2:0] {
    ST_IDLE,   // waiting for a command
    ST_GEN,    // write generated frames into the three modules and the golden copy
    ST_HDR,    // compute the CRC of every frame of module 1 into the header store
    ST_SCAN,   // odd round: compare the CRC of each module-1 frame with its header
    ST_VOTE    // bit-level voting from the current frame to the last one
  } ctrl_state_t;

endpackage

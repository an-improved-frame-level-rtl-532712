// config_gen: random configuration generator, M = rand > eta.
//
// Produces configuration frames whose cells are random binary values: for
// every cell a fresh uniform random number r in [0,1) is drawn and the cell is
// 1 when r > eta, 0 otherwise, so eta sets the density of ones. Here r is the
// top byte of a 32-bit xorshift generator (r = state[31:24]/256) and eta is an
// 8-bit fraction (eta/256); both are this design's choice.
//
// Timing: one cell per clock while enabled, so a frame takes FRAME_BITS
// cycles. The first cell drawn ends up as the frame's most significant bit.
// A finished frame is offered with frame_valid and held until frame_ready;
// generation pauses meanwhile. seed_load restarts the sequence (a zero seed
// is replaced by 1, since xorshift cannot leave the all-zero state).
module config_gen #(
  parameter int unsigned FRAME_BITS = 126,
  localparam int unsigned CNT_W     = $clog2(FRAME_BITS + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  seed_load,
  input  logic [31:0]           seed,
  input  logic [7:0]            eta,
  output logic                  frame_valid,
  input  logic                  frame_ready,
  output logic [FRAME_BITS-1:0] frame_data
);

  logic [31:0]      state, state_nx;
  logic [CNT_W-1:0] cnt;
  logic             new_cell;

  always_comb begin
    state_nx = state ^ (state << 13);
    state_nx = state_nx ^ (state_nx >> 17);
    state_nx = state_nx ^ (state_nx << 5);
    new_cell     = state_nx[31:24] > eta;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= 32'h1;
      cnt         <= '0;
      frame_valid <= 1'b0;
      frame_data  <= '0;
    end else if (seed_load) begin
      state       <= (seed == 32'h0) ? 32'h1 : seed;
      cnt         <= '0;
      frame_valid <= 1'b0;
    end else if (frame_valid) begin
      if (frame_ready) begin
        frame_valid <= 1'b0;
        cnt         <= '0;
      end
    end else if (en) begin
      state      <= state_nx;
      frame_data <= {frame_data[FRAME_BITS-2:0], new_cell};
      if (cnt == CNT_W'(FRAME_BITS - 1)) begin
        frame_valid <= 1'b1;
      end
      cnt <= cnt + 1'b1;
    end
  end

endmodule

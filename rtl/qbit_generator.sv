// qbit_generator: modified LFSR that yields Q new pseudo-random bits per step.
//
// A standard LFSR shifts one new bit in per clock. This generator keeps the same
// N-bit state but, on each clock with step high, jumps Q positions along the
// same sequence through the V^Q matrix (vq_matrix). The Q bits of the current
// step are on y at all times: y[0] is the oldest (s[t]) and y[Q-1] the newest,
// so y[0], y[1], ... read in order reproduce the standard LFSR's output stream.
// Interface: synchronous active-high rst loads SEED (must be non-zero); step
// advances the state by Q positions at the next clock edge; y and state are
// valid one clock after reset. The method gives the q-bits-per-clock structure;
// seed, reset and the step enable are choices of this design.
module qbit_generator #(
  parameter int unsigned N    = bist_pkg::DEF_N,
  parameter int unsigned Q    = bist_pkg::DEF_Q,
  parameter logic [N:0]  POLY = bist_pkg::DEF_POLY,
  parameter logic [N-1:0] SEED = N'(bist_pkg::DEF_SEED)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         step,
  output logic [N-1:0] state,
  output logic [Q-1:0] y
);

  logic [N-1:0] next_state;

  vq_matrix #(.N(N), .Q(Q), .POLY(POLY)) u_vq (
    .state     (state),
    .new_bits  (y),
    .next_state(next_state)
  );

  always_ff @(posedge clk) begin
    if (rst)       state <= SEED;
    else if (step) state <= next_state;
  end

endmodule

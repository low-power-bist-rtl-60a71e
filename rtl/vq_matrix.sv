// vq_matrix: the V^q matrix of the modified LFSR, as XOR equations.
//
// The state holds the last N bits of the sequence, state[i] = s[t-1-i], and the
// sequence obeys s[t] = XOR of s[t-i] over every i with POLY[i] = 1 (1 <= i <= N).
// One matrix step produces the Q next bits new_bits[k] = s[t+k] and the state
// Q steps ahead, next_state = V^Q * state. Each output is a fixed GF(2) linear
// combination of the state bits; those combinations are worked out at
// elaboration by a constant function, so the hardware is only XOR trees and no
// coefficient memory, as in the method. Q may exceed N.
// Purely combinational. The bit order of state and outputs is this design's
// choice.
module vq_matrix #(
  parameter int unsigned N    = bist_pkg::DEF_N,
  parameter int unsigned Q    = bist_pkg::DEF_Q,
  parameter logic [N:0]  POLY = bist_pkg::DEF_POLY
) (
  input  logic [N-1:0] state,
  output logic [Q-1:0] new_bits,
  output logic [N-1:0] next_state
);

  typedef logic [N+Q-1:0][N-1:0] coef_t;

  // coef[m] is the set of state bits whose XOR equals s[t-N+m].
  function automatic coef_t make_coef();
    coef_t c;
    c = '0;
    for (int m = 0; m < int'(N); m++) c[m][N-1-m] = 1'b1;
    for (int m = int'(N); m < int'(N + Q); m++) begin
      c[m] = '0;
      for (int i = 1; i <= int'(N); i++)
        if (POLY[i]) c[m] = c[m] ^ c[m-i];
    end
    return c;
  endfunction

  localparam coef_t COEF = make_coef();

  always_comb begin
    for (int k = 0; k < int'(Q); k++)
      new_bits[k] = ^(COEF[N+k] & state);
    for (int i = 0; i < int'(N); i++)
      next_state[i] = ^(COEF[N+Q-1-i] & state);
  end

endmodule

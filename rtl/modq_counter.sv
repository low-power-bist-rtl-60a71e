// modq_counter: modulo-Q counter that sequences the low-power generator.
//
// The generator computes Q new pseudo-random bits in one step; this counter
// counts the Q scan clocks over which those bits are consumed. It advances on
// every clock with en high, runs 0,1,...,Q-1,0,..., and raises last while it
// holds Q-1 and en is high, which is the cycle on which the generator loads its
// next state. A synchronous active-high reset returns it to 0.
// The counter is named by the method; its encoding (plain binary) and the reset
// style are choices of this design.
module modq_counter #(
  parameter int unsigned Q = 5,
  localparam int unsigned W = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  output logic [W-1:0] cnt,
  output logic         last
);

  localparam logic [W-1:0] TOP = W'(Q - 1);

  assign last = en && (cnt == TOP);

  always_ff @(posedge clk) begin
    if (rst)       cnt <= '0;
    else if (last) cnt <= '0;
    else if (en)   cnt <= cnt + W'(1);
  end

endmodule

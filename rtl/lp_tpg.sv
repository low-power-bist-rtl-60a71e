// lp_tpg: low-power test pattern generator for a scan chain.
//
// The generator (qbit_generator) computes Q new bits in one step and the
// modulo-Q counter hands them to the scan input one per clock: scan_bit is
// y[cnt]. The generator register therefore changes only once every Q scan
// clocks, on the cycle the counter wraps, while the bit stream on scan_bit is
// exactly that of a standard one-bit-per-clock LFSR with the same polynomial
// and seed. Fewer register and feedback transitions per delivered bit is where
// the power saving comes from.
// Interface: clk and synchronous active-high rst, as in the method's generator;
// en advances the stream by one bit per clock. y carries the whole current group
// of Q bits (for a design that feeds Q scan chains in parallel) and group_start
// is high while scan_bit is the first bit of a group. Output is valid the clock
// after reset. The enable and the parallel outputs are this design's additions.
module lp_tpg #(
  parameter int unsigned N    = bist_pkg::DEF_N,
  parameter int unsigned Q    = bist_pkg::DEF_Q,
  parameter logic [N:0]  POLY = bist_pkg::DEF_POLY,
  parameter logic [N-1:0] SEED = N'(bist_pkg::DEF_SEED),
  localparam int unsigned CW = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  output logic          scan_bit,
  output logic [Q-1:0]  y,
  output logic [CW-1:0] cnt,
  output logic          group_start
);

  logic last;

  modq_counter #(.Q(Q)) u_cnt (
    .clk (clk),
    .rst (rst),
    .en  (en),
    .cnt (cnt),
    .last(last)
  );

  qbit_generator #(.N(N), .Q(Q), .POLY(POLY), .SEED(SEED)) u_gen (
    .clk  (clk),
    .rst  (rst),
    .step (last),
    .state(),
    .y    (y)
  );

  assign scan_bit    = y[cnt];
  assign group_start = (cnt == '0);

  // The counter never leaves 0..Q-1, so y[cnt] always selects a real bit.
  a_cnt_range: assert property (@(posedge clk) disable iff (rst) int'(cnt) < int'(Q));

endmodule

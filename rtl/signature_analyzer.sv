// signature_analyzer: serial signature analyzer (LFSR polynomial divider).
//
// An LFSR with an external input, wired as a divider by g(x) = POLY: each clock
// with en high shifts the response bit din into the register with
// internal-XOR feedback. After a stream d0, d1, ..., d(M-1) the register holds
// the remainder of d0*x^(M-1) + ... + d(M-1) divided by g(x); sig[i] is the
// coefficient of x^i. clear (synchronous, like rst) empties the register before
// a test. The method uses an LFSR-based divider as its signature analyzer but
// gives no polynomial or structure for it; the internal-XOR form and the use of
// the generator's polynomial by default are choices of this design.
module signature_analyzer #(
  parameter int unsigned N    = bist_pkg::DEF_N,
  parameter logic [N:0]  POLY = bist_pkg::DEF_POLY
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clear,
  input  logic         en,
  input  logic         din,
  output logic [N-1:0] sig
);

  localparam logic [N-1:0] FB = POLY[N-1:0];

  logic [N-1:0] shifted;

  if (N > 1) begin : g_wide
    assign shifted = {sig[N-2:0], din};
  end else begin : g_one
    assign shifted = din;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) sig <= '0;
    else if (en)      sig <= shifted ^ (sig[N-1] ? FB : '0);
  end

endmodule

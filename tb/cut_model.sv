// cut_model: behavioural stand-in for a scan-tested circuit under test, used
// only by the testbenches. It is a scan chain of LEN cells (scan_in enters cell
// 0, scan_out is cell LEN-1) and, on capture, loads each cell i with
// c[i] ^ (c[i+1] & c[i+2]) ^ c[i+3] (indices modulo LEN), a fixed nonlinear
// function standing in for the combinational logic of a real benchmark.
module cut_model #(
  parameter int unsigned LEN = 33
) (
  input  logic clk,
  input  logic rst,
  input  logic scan_en,
  input  logic scan_in,
  input  logic capture,
  output logic scan_out
);
  logic [LEN-1:0] c, resp;

  always_comb
    for (int i = 0; i < int'(LEN); i++)
      resp[i] = c[i] ^ (c[(i + 1) % LEN] & c[(i + 2) % LEN]) ^ c[(i + 3) % LEN];

  always_ff @(posedge clk) begin
    if (rst)          c <= '0;
    else if (scan_en) c <= {c[LEN-2:0], scan_in};
    else if (capture) c <= resp;
  end

  assign scan_out = c[LEN-1];
endmodule

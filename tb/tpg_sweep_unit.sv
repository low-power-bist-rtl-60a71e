// tpg_sweep_unit: testbench helper. Drives one lp_tpg configuration with en
// held high for BITS clocks after reset, compares every scan bit with a
// standard LFSR, and counts the bit toggles of the generator register, the
// switching activity the q-bit scheme is meant to reduce. Results appear on
// the outputs once finished is high.
module tpg_sweep_unit #(
  parameter int N = 5,
  parameter int Q = 2,
  parameter logic [N:0] POLY = 6'b100101,
  parameter int BITS = 2000
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output int   toggles,
  output logic finished
);
  import tb_ref_pkg::*;
  localparam logic [N-1:0] SEED = N'(1);
  localparam int CW = (Q > 1) ? $clog2(Q) : 1;

  logic en, scan_bit, group_start;
  logic [Q-1:0] y;
  logic [CW-1:0] cnt;

  lp_tpg #(.N(N), .Q(Q), .POLY(POLY), .SEED(SEED)) dut
    (.clk, .rst, .en, .scan_bit, .y, .cnt, .group_start);

  initial begin
    logic [63:0] r; logic b; logic [N-1:0] prev;
    checks = 0; failures = 0; toggles = 0; finished = 0; en = 0;
    r = 64'(SEED);
    @(negedge rst); @(posedge clk); #2;
    en = 1;
    for (int i = 0; i < BITS; i++) begin
      r = lfsr_step(r, N, 65'(POLY), b);
      checks++;
      if (scan_bit != b) failures++;
      prev = dut.u_gen.state;
      @(posedge clk); #2;
      toggles += $countones(dut.u_gen.state ^ prev);
    end
    en = 0;
    finished = 1;
  end
endmodule

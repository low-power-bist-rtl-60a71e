// lp_bist_top: complete low-power scan BIST around an external circuit under test.
//
// The low-power generator (lp_tpg) computes Q pseudo-random bits per generator
// step and feeds them one per clock to the scan input of the circuit under test;
// the test-per-scan controller alternates SCAN_LEN shift clocks with one capture
// clock for PATTERNS patterns; the serial signature analyzer divides the stream
// leaving the scan chain by its polynomial. The circuit under test and its scan
// chain are outside this module: scan_in, scan_en and capture drive it and
// scan_out returns its last scan cell.
// Timing: pulse start (one clock) while idle or done; busy is high for
// PATTERNS*(SCAN_LEN+1)+SCAN_LEN clocks, then done rises with the final
// signature on signature. A new start clears the analyzer and runs again with
// the generator continuing where it stopped; rst reloads the seed.
// The generator structure follows the method; the controller, the analyzer's
// polynomial and the sizes SCAN_LEN and PATTERNS are this design's choices.
module lp_bist_top
  import bist_pkg::*;
#(
  parameter int unsigned N        = bist_pkg::DEF_N,
  parameter int unsigned Q        = bist_pkg::DEF_Q,
  parameter logic [N:0]  POLY     = bist_pkg::DEF_POLY,
  parameter logic [N-1:0] SEED    = N'(bist_pkg::DEF_SEED),
  parameter int unsigned SA_N     = bist_pkg::DEF_N,
  parameter logic [SA_N:0] SA_POLY = bist_pkg::DEF_POLY,
  parameter int unsigned SCAN_LEN = bist_pkg::DEF_SCAN_LEN,
  parameter int unsigned PATTERNS = bist_pkg::DEF_PATTERNS
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  // scan port of the circuit under test
  output logic            scan_en,
  output logic            scan_in,
  output logic            capture,
  input  logic            scan_out,
  // status and result
  output logic            busy,
  output logic            done,
  output phase_e          phase,
  output logic [Q-1:0]    tpg_group,
  output logic            tpg_group_start,
  output logic [SA_N-1:0] signature
);

  logic tpg_en, sa_en, sa_clear;

  bist_controller #(.SCAN_LEN(SCAN_LEN), .PATTERNS(PATTERNS)) u_ctrl (
    .clk     (clk),
    .rst     (rst),
    .start   (start),
    .tpg_en  (tpg_en),
    .scan_en (scan_en),
    .capture (capture),
    .sa_en   (sa_en),
    .sa_clear(sa_clear),
    .busy    (busy),
    .done    (done),
    .phase   (phase)
  );

  lp_tpg #(.N(N), .Q(Q), .POLY(POLY), .SEED(SEED)) u_tpg (
    .clk        (clk),
    .rst        (rst),
    .en         (tpg_en),
    .scan_bit   (scan_in),
    .y          (tpg_group),
    .cnt        (),
    .group_start(tpg_group_start)
  );

  signature_analyzer #(.N(SA_N), .POLY(SA_POLY)) u_sa (
    .clk  (clk),
    .rst  (rst),
    .clear(sa_clear),
    .en   (sa_en),
    .din  (scan_out),
    .sig  (signature)
  );

endmodule

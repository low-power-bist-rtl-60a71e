// bist_controller: test-per-scan sequencer of the BIST.
//
// After start it runs PATTERNS scan cycles. Each cycle shifts SCAN_LEN bits
// from the pattern generator into the scan chain (phase SHIFT) and then gives
// the circuit under test one capture clock (phase CAPTURE). While a pattern is
// shifted in, the response of the previous pattern leaves the chain and is fed
// to the signature analyzer; for the first pattern the chain holds no response
// and the analyzer is held. After the last capture, one more SCAN_LEN shift
// (phase UNLOAD) compacts the final response, then done rises and stays high
// until the next start.
// Outputs, all combinational from the phase register: tpg_en (one new pattern
// bit per clock), scan_en, capture, sa_en, sa_clear (in the start cycle).
// Latency from start to done: PATTERNS*(SCAN_LEN+1) + SCAN_LEN + 1 clocks.
// The method names test-per-scan as the setting; the sequence and its timing
// are this design's.
module bist_controller
  import bist_pkg::*;
#(
  parameter int unsigned SCAN_LEN = bist_pkg::DEF_SCAN_LEN,
  parameter int unsigned PATTERNS = bist_pkg::DEF_PATTERNS,
  localparam int unsigned BW = $clog2(SCAN_LEN + 1),
  localparam int unsigned PW = $clog2(PATTERNS + 1)
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  output logic   tpg_en,
  output logic   scan_en,
  output logic   capture,
  output logic   sa_en,
  output logic   sa_clear,
  output logic   busy,
  output logic   done,
  output phase_e phase
);

  logic [BW-1:0] bit_cnt;   // bits shifted in the current phase
  logic [PW-1:0] pat_cnt;   // patterns captured so far

  localparam logic [BW-1:0] LAST_BIT = BW'(SCAN_LEN - 1);
  localparam logic [PW-1:0] LAST_PAT = PW'(PATTERNS - 1);

  wire shift_last = (bit_cnt == LAST_BIT);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase   <= PH_IDLE;
      bit_cnt <= '0;
      pat_cnt <= '0;
    end else begin
      unique case (phase)
        PH_IDLE, PH_DONE: begin
          if (start) begin
            phase   <= PH_SHIFT;
            bit_cnt <= '0;
            pat_cnt <= '0;
          end
        end
        PH_SHIFT: begin
          bit_cnt <= shift_last ? '0 : bit_cnt + BW'(1);
          if (shift_last) phase <= PH_CAPTURE;
        end
        PH_CAPTURE: begin
          pat_cnt <= pat_cnt + PW'(1);
          phase   <= (pat_cnt == LAST_PAT) ? PH_UNLOAD : PH_SHIFT;
        end
        PH_UNLOAD: begin
          bit_cnt <= shift_last ? '0 : bit_cnt + BW'(1);
          if (shift_last) phase <= PH_DONE;
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  always_comb begin
    tpg_en   = (phase == PH_SHIFT);
    scan_en  = (phase == PH_SHIFT) || (phase == PH_UNLOAD);
    capture  = (phase == PH_CAPTURE);
    sa_en    = (phase == PH_UNLOAD) || ((phase == PH_SHIFT) && (pat_cnt != '0));
    sa_clear = start && ((phase == PH_IDLE) || (phase == PH_DONE));
    busy     = (phase != PH_IDLE) && (phase != PH_DONE);
    done     = (phase == PH_DONE);
  end

  // Scan rules: shifting and capturing never overlap, the generator only runs
  // while the chain shifts, and the analyzer only listens to a shifting chain.
  a_shift_xor_capture: assert property (@(posedge clk) disable iff (rst) !(scan_en && capture));
  a_tpg_in_shift:      assert property (@(posedge clk) disable iff (rst) tpg_en |-> scan_en);
  a_sa_in_shift:       assert property (@(posedge clk) disable iff (rst) sa_en |-> scan_en);
  a_capture_one:       assert property (@(posedge clk) disable iff (rst) capture |=> !capture);

endmodule

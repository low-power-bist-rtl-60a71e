// bist_pkg: constants and types shared by the low-power scan BIST.
//
// The default generator is a degree-33 LFSR producing Q = 5 new bits per
// generator step. The polynomial is f(x) = 1 + x^2 + x^3 + x^4 + x^6 + x^7 + x^33,
// one of the three degree-33 primitive polynomials the method was evaluated
// with; degree 33 matches the 33 primary inputs of the ISCAS'85 circuit C1908.
// The number of new bits (5) follows the worked example of the method.
// Polynomials are written as a bit mask: bit i is the coefficient of x^i.
// The scan length and pattern count are this design's own choices.
package bist_pkg;

  localparam int unsigned DEF_N        = 33;
  localparam int unsigned DEF_Q        = 5;
  localparam logic [32:0] DEF_POLY_LOW = 33'h0000_00DD;   // x^0,x^2,x^3,x^4,x^6,x^7
  localparam logic [33:0] DEF_POLY     = {1'b1, DEF_POLY_LOW};
  localparam logic [32:0] DEF_SEED     = 33'h1_2345_6789;
  localparam int unsigned DEF_SCAN_LEN = 33;
  localparam int unsigned DEF_PATTERNS = 1000;

  // Phases of the test-per-scan sequence.
  typedef enum logic [2:0] {
    PH_IDLE    = 3'd0,  // waiting for start
    PH_SHIFT   = 3'd1,  // loading a pattern, unloading the previous response
    PH_CAPTURE = 3'd2,  // one functional clock into the scan cells
    PH_UNLOAD  = 3'd3,  // shifting out the last response only
    PH_DONE    = 3'd4   // signature valid
  } phase_e;

endpackage

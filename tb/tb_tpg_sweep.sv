// tb_tpg_sweep: runs the generator configurations that the low-power method was
// evaluated with: every primitive degree-5 polynomial, three degree-28 and
// three degree-33 polynomials, each with 2 to 10 new bits per step, plus the
// degree-6 example 1 + x^3 + x^6 with 5 new bits. For each, 2000 scan bits are
// compared with a standard LFSR and the generator register toggles per bit
// are reported. Toggles per bit must fall as Q grows: with 10 new bits per step
// they must be below a third of the count with 2.
module tb_tpg_sweep;
  localparam int NP = 13;
  localparam int QMIN = 2, QMAX = 10, NQ = QMAX - QMIN + 1;
  localparam int BITS = 2000;
  localparam int          PN [NP] = '{5, 5, 5, 5, 5, 5, 28, 28, 28, 33, 33, 33, 6};
  localparam logic [33:0] PP [NP] = '{
    34'h25,                         // 1 + x^2 + x^5
    34'h29,                         // 1 + x^3 + x^5
    34'h2F,                         // 1 + x + x^2 + x^3 + x^5
    34'h37,                         // 1 + x + x^2 + x^4 + x^5
    34'h3B,                         // 1 + x + x^3 + x^4 + x^5
    34'h3D,                         // 1 + x^2 + x^3 + x^4 + x^5
    34'h1000_0009,                  // 1 + x^3 + x^28
    34'h1000_0053,                  // 1 + x + x^4 + x^6 + x^28
    34'h1000_0173,                  // 1 + x + x^4 + x^5 + x^6 + x^8 + x^28
    34'h2_0000_0051,                // 1 + x^4 + x^6 + x^33
    34'h2_0000_00DD,                // 1 + x^2 + x^3 + x^4 + x^6 + x^7 + x^33
    34'h2_0098_0411,                // 1 + x^4 + x^10 + x^19 + x^20 + x^23 + x^33
    34'h49                          // 1 + x^3 + x^6
  };

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int   u_checks [NP][NQ];
  int   u_fail   [NP][NQ];
  int   u_tog    [NP][NQ];
  logic u_fin    [NP][NQ];

  for (genvar p = 0; p < NP; p++) begin : g_poly
    for (genvar q = 0; q < NQ; q++) begin : g_q
      if (p < NP - 1 || q == 5 - QMIN) begin : g_on
        tpg_sweep_unit #(.N(PN[p]), .Q(q + QMIN), .POLY(PP[p][PN[p]:0]), .BITS(BITS)) u
          (.clk, .rst, .checks(u_checks[p][q]), .failures(u_fail[p][q]),
           .toggles(u_tog[p][q]), .finished(u_fin[p][q]));
      end else begin : g_off
        assign u_checks[p][q] = 0;
        assign u_fail[p][q]   = 0;
        assign u_tog[p][q]    = 0;
        assign u_fin[p][q]    = 1'b1;
      end
    end
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (BITS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    repeat (3) @(posedge clk);
    rst = 0;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int p = 0; p < NP; p++) for (int q = 0; q < NQ; q++) all_done &= u_fin[p][q];
    end while (!all_done);
    for (int p = 0; p < NP; p++) begin
      string line;
      line = $sformatf("degree %0d poly %h toggles/bit:", PN[p], PP[p]);
      for (int q = 0; q < NQ; q++) begin
        checks   += u_checks[p][q];
        failures += u_fail[p][q];
        if (u_checks[p][q] > 0)
          line = {line, $sformatf(" q%0d=%0.2f", q + QMIN, real'(u_tog[p][q]) / BITS)};
      end
      $display("%s", line);
      if (p < NP - 1) begin
        checks++;
        if (!(3 * u_tog[p][NQ-1] < u_tog[p][0])) begin
          failures++;
          $display("FAIL toggles do not fall with q for polynomial %0d", p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ref_pkg: reference models used by the testbenches, written independently
// of the RTL: a one-bit-per-clock Fibonacci LFSR and a long-division remainder.
// Widths up to 64 bits; poly bit i is the coefficient of x^i.
package tb_ref_pkg;

  // One step of a standard LFSR. st[i] = s[t-1-i]; returns the new state and
  // the new bit s[t] = XOR of s[t-i] for poly[i] = 1.
  function automatic logic [63:0] lfsr_step(input logic [63:0] st, input int n,
                                            input logic [64:0] poly, output logic nb);
    nb = 1'b0;
    for (int i = 1; i <= n; i++) if (poly[i]) nb ^= st[i-1];
    lfsr_step = (st << 1) | 64'(nb);
    if (n < 64) lfsr_step &= (64'd1 << n) - 64'd1;
  endfunction

  // Remainder of the polynomial sum d[k] x^(len-1-k) divided by poly (degree n),
  // by schoolbook long division over GF(2) on a bit array.
  function automatic logic [63:0] poly_rem(input bit d[], input int n, input logic [64:0] poly);
    bit w[];
    logic [63:0] r;
    int len;
    len = d.size();
    w = new[len];
    foreach (d[k]) w[k] = d[k];
    for (int k = 0; k + n < len; k++)
      if (w[k]) for (int j = 0; j <= n; j++) if (poly[n-j]) w[k+j] ^= 1'b1;
    r = '0;
    for (int j = 0; j < n && j < len; j++) r[j] = w[len-1-j];
    return r;
  endfunction

endpackage

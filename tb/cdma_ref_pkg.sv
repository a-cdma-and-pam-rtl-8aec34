`timescale 1ps/1ps
// cdma_ref_pkg: reference model for the CDMA testbenches. The spreading codes
// are built by the Sylvester doubling of the Hadamard matrix:
// H(2m) = [H(m) H(m); H(m) ~H(m)], which gives the same code rows as the
// parity formula in the design but by a different route.
package cdma_ref_pkg;

  // Code bit k of line i for codes of length s (a power of two).
  function automatic bit ref_code(int i, int k, int s);
    bit v;
    int half;
    v = 0;
    half = s / 2;
    while (half >= 1) begin
      if ((i >= half) && (k >= half)) v = ~v;
      if (i >= half) i -= half;
      if (k >= half) k -= half;
      half /= 2;
    end
    return v;
  endfunction

  // Expected chip sum of chip k for word d (n lines, +1 for a chip of 1,
  // -1 for a chip of 0).
  function automatic int ref_sum(logic [63:0] d, int k, int n, int s);
    int acc;
    acc = 0;
    for (int i = 0; i < n; i++) acc += ((d[i] ^ ref_code(i, k, s)) ? 1 : -1);
    return acc;
  endfunction

endpackage

// cf_tb_pkg: reference arithmetic for the counterflow testbenches.
//
// lfsr_ref steps the count-value LFSR written out bit by bit from its
// polynomial x^5 + x^3 + 1 (new bit 0 = old bit 4 xor old bit 2, the other
// bits shift up by one); lfsr_pow applies it k times. meetings(g0, g1, r)
// counts how often a northbound and a southbound item share a stage of an
// r-stage ring: g is the north item's unwrapped position minus the south
// item's, it only grows, and the two share a stage whenever g is a multiple of
// r, so the answer is the number of multiples of r in [g0, g1].
package cf_tb_pkg;

  function automatic logic [4:0] lfsr_ref(input logic [4:0] c);
    logic [4:0] n;
    n[0] = c[4] ^ c[2];
    n[1] = c[0];
    n[2] = c[1];
    n[3] = c[2];
    n[4] = c[3];
    return n;
  endfunction

  function automatic logic [4:0] lfsr_pow(input logic [4:0] c, input int k);
    logic [4:0] r = c;
    for (int i = 0; i < (k % 31); i++) r = lfsr_ref(r);
    return r;
  endfunction

  function automatic int floor_div(input int a, input int b);
    int q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  function automatic int meetings(input int g0, input int g1, input int r);
    if (g1 < g0) return 0;
    return floor_div(g1, r) - floor_div(g0 - 1, r);
  endfunction

endpackage

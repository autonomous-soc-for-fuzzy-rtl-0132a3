// tb_ref_pkg: reference model of the fuzzy processor for the testbenches.
//
// Closed-form versions of the default tables, written out by hand rather
// than taken from the RTL: the default MFs are triangles centred on
// c_k = min(512*k, 4095) whose edges rise and fall by one degree of truth
// per two input codes (slope 255/512, coded as 128/256), and the default
// rule surface is clamp(40*((i1-4)+(i2-4)), -128, 127); ref_cons_b() is an
// asymmetric alternative, clamp(20*(i1-4) - 9*(i2-4)). ref_dflp() then
// applies min-AND, product implication and weighted-average defuzzification
// with 4 output fraction bits, truncated toward zero.
package tb_ref_pkg;

  function automatic int ref_ctr(input int k);
    return (512 * k > 4095) ? 4095 : 512 * k;
  endfunction

  function automatic int ref_mu(input int k, input int x);
    int c = ref_ctr(k);
    if (x == c) return 255;
    if (x < c) begin
      if (k == 0 || x < ref_ctr(k - 1)) return 0;
      return (x - ref_ctr(k - 1)) / 2;
    end
    if (k == 8) return 255;           // right shoulder (x > 4095 impossible)
    if (x > ref_ctr(k + 1)) return 0;
    return (ref_ctr(k + 1) - x) / 2;
  endfunction

  function automatic int ref_lo(input int x);
    return (x / 512 > 7) ? 7 : x / 512;
  endfunction

  function automatic int ref_cons(input int i1, input int i2);
    int s = 40 * ((i1 - 4) + (i2 - 4));
    if (s > 127) s = 127;
    if (s < -128) s = -128;
    return s;
  endfunction

  // An asymmetric rule surface, used to tell the two inputs apart.
  function automatic int ref_cons_b(input int i1, input int i2);
    int s = 20 * (i1 - 4) - 9 * (i2 - 4);
    if (s > 127) s = 127;
    if (s < -128) s = -128;
    return s;
  endfunction

  function automatic int ref_dflp(input int x1, input int x2, input bit asym = 1'b0);
    longint num = 0;
    longint den = 0;
    longint q;
    int l1 = ref_lo(x1);
    int l2 = ref_lo(x2);
    for (int r = 0; r < 4; r++) begin
      int i1 = l1 + (r & 1);
      int i2 = l2 + ((r >> 1) & 1);
      int m1 = ref_mu(i1, x1);
      int m2 = ref_mu(i2, x2);
      int a  = (m1 < m2) ? m1 : m2;
      num += a * (asym ? ref_cons_b(i1, i2) : ref_cons(i1, i2));
      den += a;
    end
    if (den == 0) return 0;
    q = (num * 16) / den;
    if (q > 2047) q = 2047;
    if (q < -2048) q = -2048;
    return int'(q);
  endfunction

endpackage

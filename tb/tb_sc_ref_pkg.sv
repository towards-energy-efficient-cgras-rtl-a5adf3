// tb_sc_ref_pkg: reference model used by the SC-CGRA testbenches.
//
// It recomputes, independently of the RTL, the Sobol cells (incrementally, with the
// Gray-code recurrence x_i = x_(i-1) xor v_c, c = position of the lowest zero bit of
// i-1), leading-zero counts and the ISC-MUL product, so the testbenches can compare
// bit-exact results.
package tb_sc_ref_pkg;

  // direction integers m_1..m_7 of the two Sobol dimensions used
  localparam int M_DIM0 [7] = '{1, 1, 1, 1, 1, 1, 1};
  localparam int M_DIM1 [7] = '{1, 3, 5, 15, 17, 51, 85};

  function automatic int ref_cell(input int dim, input int idx);
    int x, c, t;
    x = 0;
    for (int i = 1; i <= idx; i++) begin
      t = i - 1;
      c = 1;
      while ((t & 1) == 1) begin
        t = t >> 1;
        c++;
      end
      x = x ^ (((dim == 0) ? M_DIM0[c-1] : M_DIM1[c-1]) << (16 - c));
    end
    return x & 32'hFFFF;
  endfunction

  function automatic int ref_lz(input int v);
    int n;
    n = 0;
    while (n < 15 && ((v << n) & 32'h8000) == 0) n++;
    return n;
  endfunction

  function automatic int ref_count(input int seg, input int an, input int bn, input int len);
    int n;
    n = 0;
    for (int i = 0; i < len; i++)
      if (ref_cell(0, seg * len + i) < an && ref_cell(1, seg * len + i) < bn) n++;
    return n;
  endfunction

  // signed approximate product of the ISC-MUL of a PE holding segment seg, with
  // 2^lg cells per PE (lg = 5 in the array)
  function automatic longint ref_mul(input int seg, input int am, input int as_,
                                     input int bm, input int bs, input int lg = 5);
    int sa, sb, sf, n;
    longint m;
    sa = ref_lz(am);
    sb = ref_lz(bm);
    n  = ref_count(seg, (am << sa) & 32'hFFFF, (bm << sb) & 32'hFFFF, 1 << lg);
    sf = 32 - lg - sa - sb;
    m  = (sf >= 0) ? (longint'(n) << sf) : (longint'(n) >> (-sf));
    return ((as_ ^ bs) != 0) ? -m : m;
  endfunction

  // the same for 32-bit two's-complement words as the SC-ALU sees them,
  // with 16-bit magnitude and 32-bit result saturation
  function automatic int ref_alu_mul(input int seg, input int a, input int b);
    longint am, bm, p;
    am = (a < 0) ? -longint'(a) : longint'(a);
    bm = (b < 0) ? -longint'(b) : longint'(b);
    if (am > 65535) am = 65535;
    if (bm > 65535) bm = 65535;
    p = ref_mul(seg, int'(am), (a < 0) ? 1 : 0, int'(bm), (b < 0) ? 1 : 0);
    if (p > 64'sd2147483647) p = 64'sd2147483647;
    if (p < -64'sd2147483648) p = -64'sd2147483648;
    return int'(p);
  endfunction

endpackage

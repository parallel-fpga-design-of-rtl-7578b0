// cfar_tb_pkg: stimulus and reference model shared by the CFAR testbenches.
//
// gen_sample() draws one 16-bit sample of a mixture of noise, pulse
// interference and target returns: the noise is a sum of four uniform
// variates (mean about 2000), an interference pulse (probability 3%) adds
// 6000..30000 and a target (probability 2%) adds 12000..24000, clipped to
// 16 bits. ref_det() is the CA-CFAR rule worked out directly from the sample
// array: r is the sum of the N cells around the test cell (TEST_POS of them
// before it), Hd = TA*r with TA in fixed point, and the decision is Hd <= x_z.
package cfar_tb_pkg;

  function automatic int unsigned gen_sample();
    int unsigned v;
    v = ($urandom % 1000) + ($urandom % 1000) + ($urandom % 1000) + ($urandom % 1000);
    if ($urandom % 100 < 3) v += 6000 + $urandom % 24000;
    if ($urandom % 100 < 2) v += 12000 + $urandom % 12000;
    if (v > 65535) v = 65535;
    return v;
  endfunction

  // sum of the learning cells of the window whose test cell is sample c
  function automatic longint unsigned ref_sum(const ref int unsigned s[$], input int c,
                                              input int n, input int test_pos);
    longint unsigned r = 0;
    for (int i = 0; i <= n; i++)
      if (i != test_pos) r += 64'(s[c - test_pos + i]);
    return r;
  endfunction

  function automatic bit ref_det(const ref int unsigned s[$], input int c, input int n,
                                 input int test_pos, input longint unsigned ta, input int frac);
    longint unsigned hd = ref_sum(s, c, n, test_pos) * ta;
    return hd <= (longint'(s[c]) << frac);
  endfunction

endpackage

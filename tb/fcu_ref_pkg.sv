// fcu_ref_pkg: integer reference arithmetic for the FCU testbenches.
//
// cs_val     value of a 17-bit carry-save pair, (c+s) mod 2^17 as signed.
// mb_digits  the Booth digits the recoder is specified to produce, computed
//            with integer arithmetic from the two transfer rules
//            (t1 = slice sum >= 4, t2 = remainder + t1 >= 2) and the
//            top slice taken modulo 8.
// trunc_mult the truncated product: the sum over rows of
//            floor((d_j*A - neg_j) * 4^j / 2^15), plus the compensation
//            constant, modulo 2^17.
package fcu_ref_pkg;

  localparam int CWR = 17;

  function automatic int cs_val(input logic [CWR-1:0] c, input logic [CWR-1:0] s);
    logic [CWR-1:0] v;
    v = c + s;
    return int'($signed(v));
  endfunction

  function automatic int wrap17(input longint v);
    logic [CWR-1:0] t;
    t = CWR'(v);
    return int'($signed(t));
  endfunction

  function automatic void mb_digits(input logic [CWR-1:0] c, input logic [CWR-1:0] s,
                                    output int d [8]);
    int t1, t2, g, w, v, u, nt1, nt2, top;
    t1 = 0; t2 = 0;
    for (int j = 0; j < 7; j++) begin
      g   = 2 * int'(c[2*j+1]) + int'(c[2*j]) + 2 * int'(s[2*j+1]) + int'(s[2*j]);
      nt1 = (g >= 4) ? 1 : 0;
      w   = g - 4 * nt1;
      v   = w + t1;
      nt2 = (v >= 2) ? 1 : 0;
      u   = v - 4 * nt2;
      d[j] = u + t2;
      t1 = nt1; t2 = nt2;
    end
    top = (int'(c[16:14]) + int'(s[16:14]) + t1 + t2) % 8;
    if (top >= 4) top -= 8;
    d[7] = top;
  endfunction

  function automatic int trunc_mult(input int a, input logic [CWR-1:0] c,
                                    input logic [CWR-1:0] s, input int comp);
    int     d [8];
    longint acc, row;
    mb_digits(c, s, d);
    acc = comp;
    for (int j = 0; j < 8; j++) begin
      row = longint'(d[j]) * a - ((d[j] < 0) ? 1 : 0);
      row = row * (longint'(1) << (2 * j));
      acc += row >>> 15;             // arithmetic shift = floor division
    end
    return wrap17(acc);
  endfunction

endpackage

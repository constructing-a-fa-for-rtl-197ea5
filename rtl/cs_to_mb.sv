// cs_to_mb: recodes a carry-save number straight into radix-4 modified Booth
// digits, with no carry-propagate adder in front.
//
// The CW = 17-bit CS pair is cut into 2-bit slices. Slice j adds its four
// bits, g in 0..6. It passes a first transfer t1 = (g >= 4) to slice j+1
// and keeps w = g - 4*t1 in 0..3; adding the incoming t1 gives v in 0..4.
// A second transfer t2 = (v >= 2) goes to slice j+1 and leaves u = v - 4*t2
// in -2..1; adding the incoming t2 gives the digit in -2..2. Each digit
// depends on its own slice and the one below it only. The top digit
// (weight 4^7) takes bits 14..16 of both words plus the two transfers,
// modulo 8, as a signed number: because the value fits DW = 16 bits and the
// lower digits stay within +/-10922, this top digit is exact and within
// -2..2. Output digit j has weight 4^j. Combinational. `ovf` flags a top
// digit outside -2..2 (value wider than 16 bits).
// CS-to-MB recoding is the architecture's idea; this two-transfer scheme is
// this design's own.
module cs_to_mb
  import fcu_pkg::*;
(
  input  logic [CW-1:0] p_c,
  input  logic [CW-1:0] p_s,
  output mb_digit_t     dig [ND],
  output logic          ovf
);

  localparam int TOPB = CW - 2 * (ND - 1);  // bits in the top slice (3)

  logic        t1 [ND];          // t1[j]: first transfer into slice j
  logic        t2 [ND];          // t2[j]: second transfer into slice j
  logic [2:0]  g, v;
  logic [1:0]  w;
  logic [2:0]  u, d;             // digits as 3-bit two's complement
  logic [TOPB-1:0]   top;        // top slice sum mod 2^TOPB

  function automatic mb_digit_t encode(input logic signed [2:0] val);
    mb_digit_t e;
    e.neg = val[2];
    e.one = (val == 3'sd1) || (val == -3'sd1);
    e.two = (val == 3'sd2) || (val == -3'sd2);
    return e;
  endfunction

  always_comb begin
    t1[0] = 1'b0;
    t2[0] = 1'b0;
    for (int j = 0; j < ND - 1; j++) begin
      g = 3'(p_c[2*j+1]) * 3'd2 + 3'(p_c[2*j]) + 3'(p_s[2*j+1]) * 3'd2 + 3'(p_s[2*j]);
      t1[j+1] = (g >= 3'd4);
      w       = 2'(g - {t1[j+1], 2'b00});
      v       = 3'(w) + 3'(t1[j]);
      t2[j+1] = (v >= 3'd2);
      u       = v - {t2[j+1], 2'b00};   // -2..1, modulo 8
      d       = u + 3'(t2[j]);          // -2..2
      dig[j]  = encode($signed(d));
    end
    top = p_c[CW-1:2*(ND-1)] + p_s[CW-1:2*(ND-1)]
        + TOPB'(t1[ND-1]) + TOPB'(t2[ND-1]);
    dig[ND-1] = encode($signed(top));
    ovf = ($signed(top) > 2) || ($signed(top) < -2);
  end

endmodule

// fcu: flexible computational unit. Computes, in one combinational pass,
//   d[1]=1: W* = A x (X* +/- Y*) +/- K*     (N* to the multiplier)
//   d[1]=0: W* = A x K* +/- (X* +/- Y*)     (K* to the multiplier)
// and any part of these (set K* to zero, or A to 0x7FFF for near-unity).
//
// X*, Y*, K* and W* are carry-save pairs, A is a two's complement Q1.15
// fraction. The first CS adder/subtractor forms N* = X* +/- Y*. MUX1 chooses
// N* or K* as the multiplier operand P*, which is Booth-recoded straight from
// CS form and multiplied by A (mb_mult, truncated 17-bit product M*). MUX2
// chooses N* or K* for the second CS adder/subtractor, which forms
// W* = M* +/- MUX2. No carry-propagate adder is on the path, so results can
// feed another FCU directly.
// Configuration word cfg = d[3:0]: d[0] X*-Y*, d[1] MUX1 selects N*,
// d[2] MUX2 selects N*, d[3] the second unit subtracts.
// N* and P* are brought out for observation; `ovf` reports a multiplier
// operand wider than 16 bits.
// The structure (two CS adder/subtractors around a multiplier, MUX1, MUX2,
// 16-bit operands, 17-bit product) follows the architecture; the
// configuration bit assignment and the select polarities are this design's.
module fcu
  import fcu_pkg::*;
(
  input  fcu_cfg_t      cfg,
  input  logic [DW-1:0] a,
  input  cs_t           x,
  input  cs_t           y,
  input  cs_t           k,
  output cs_t           w,
  output cs_t           n,
  output cs_t           p,
  output logic          ovf
);

  cs_t m, q;

  cs_addsub #(.CW(CW)) u_add1 (
    .a_c (x.c), .a_s (x.s),
    .b_c (y.c), .b_s (y.s),
    .sub (cfg.sub1),
    .r_c (n.c), .r_s (n.s)
  );

  always_comb begin
    p = cfg.mux1_n ? n : k;   // MUX1
    q = cfg.mux2_n ? n : k;   // MUX2
  end

  mb_mult u_mult (
    .a   (a),
    .p_c (p.c), .p_s (p.s),
    .m_c (m.c), .m_s (m.s),
    .ovf (ovf)
  );

  cs_addsub #(.CW(CW)) u_add2 (
    .a_c (m.c), .a_s (m.s),
    .b_c (q.c), .b_s (q.s),
    .sub (cfg.sub2),
    .r_c (w.c), .r_s (w.s)
  );

endmodule

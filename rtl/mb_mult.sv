// mb_mult: truncated modified-Booth multiplier with a carry-save operand and
// a carry-save product, M* = A x P* / 2^15.
//
// A is a 16-bit two's complement fraction (Q1.15). P* is recoded into eight
// radix-4 Booth digits by cs_to_mb, with no carry-propagate adder. Each digit
// selects 0, A or 2A and inverts it when negative; row j then has weight 4^j.
// Only the columns of weight 2^15 and up are built (17 columns, the 17-bit
// product), so every Booth negation bit, which sits at column 2j <= 14, is
// dropped as well. The constant COMP, the rounded mean of the dropped bits for
// random data, is added at the lowest kept column to compensate. The rows are
// summed by a chain of 3:2 carry-save adders and the product is left in CS
// form. Arithmetic is modulo 2^17; the result lies within about +/-5 of
// A*P/2^15. Combinational. `ovf` reports a P* wider than 16 bits.
// The 17-bit product, the truncation and the compensation follow the
// architecture; the Q1.15 scaling, the value of COMP and the adder chain are
// this design's choices.
module mb_mult
  import fcu_pkg::*;
#(
  parameter int COMP = 4
) (
  input  logic [DW-1:0] a,
  input  logic [CW-1:0] p_c,
  input  logic [CW-1:0] p_s,
  output logic [CW-1:0] m_c,
  output logic [CW-1:0] m_s,
  output logic          ovf
);

  localparam int PW = 2 * DW;   // width of the full product

  mb_digit_t     dig [ND];
  logic [CW-1:0] mag, ppv, row, acc_c, acc_s, nxt_s;
  logic [PW-1:0] full;

  cs_to_mb u_rec (
    .p_c (p_c),
    .p_s (p_s),
    .dig (dig),
    .ovf (ovf)
  );

  always_comb begin
    acc_s = CW'(COMP);
    acc_c = '0;
    for (int j = 0; j < ND; j++) begin
      // partial product d_j * A in one's complement (negation bit dropped)
      mag  = dig[j].two ? {a, 1'b0} : (dig[j].one ? {a[DW-1], a} : '0);
      ppv  = mag ^ {CW{dig[j].neg}};
      full = PW'($signed(ppv)) << (2 * j);
      row  = full[PW-1:DW-1];                 // kept columns 15..31
      // 3:2 carry-save addition into the accumulator
      nxt_s = acc_s ^ acc_c ^ row;
      acc_c = CW'({(acc_s & acc_c) | (acc_s & row) | (acc_c & row), 1'b0});
      acc_s = nxt_s;
    end
    m_c = acc_c;
    m_s = acc_s;
  end

endmodule

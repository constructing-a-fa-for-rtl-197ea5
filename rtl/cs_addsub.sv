// cs_addsub: carry-save adder/subtractor, R* = A* + B* or R* = A* - B*.
//
// All four words enter a 4:2 compressor built from two rows of full adders;
// the result stays in carry-save form, so the delay is two full adders
// whatever the width. For a subtraction both words of B* are inverted
// (one's complement) and the missing +2 enters through the two free
// least-significant positions of the carry words, one per adder row.
// Arithmetic is modulo 2^CW (see fcu_pkg). Combinational, no clock.
// The CS adder/subtractor with 4:2 compressors comes from the architecture;
// the way the subtraction constant is injected is this design's choice.
module cs_addsub #(
  parameter int CW = 17
) (
  input  logic [CW-1:0] a_c,
  input  logic [CW-1:0] a_s,
  input  logic [CW-1:0] b_c,
  input  logic [CW-1:0] b_s,
  input  logic          sub,
  output logic [CW-1:0] r_c,
  output logic [CW-1:0] r_s
);

  logic [CW-1:0] bc, bs;      // B* or its one's complement
  logic [CW-1:0] s1;          // first-row sum
  logic [CW-2:0] m1, m2;      // majority (carry) of both rows, top bit dropped

  always_comb begin
    bc  = b_c ^ {CW{sub}};
    bs  = b_s ^ {CW{sub}};
    // row 1: a_c + a_s + bc = s1 + 2*m1
    s1  = a_c ^ a_s ^ bc;
    m1  = (a_c[CW-2:0] & a_s[CW-2:0]) | (a_c[CW-2:0] & bc[CW-2:0])
        | (a_s[CW-2:0] & bc[CW-2:0]);
    // row 2: s1 + {m1,sub} + bs = r_s + 2*m2
    r_s = s1 ^ {m1, sub} ^ bs;
    m2  = (s1[CW-2:0] & {m1[CW-3:0], sub}) | (s1[CW-2:0] & bs[CW-2:0])
        | ({m1[CW-3:0], sub} & bs[CW-2:0]);
    r_c = {m2, sub};
  end

endmodule

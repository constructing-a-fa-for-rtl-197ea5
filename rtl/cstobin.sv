// cstobin: carry-save to two's complement converter.
//
// A ripple-carry adder adds the two CW = 17-bit words of a CS number; the low
// DW = 16 bits are the binary result. `ovf` is set when the value does not
// fit 16 bits (bit 16 differs from bit 15). Combinational; the delay is one
// carry ripple over 17 bits. The ripple-carry structure follows the
// architecture; the overflow flag is an addition of this design.
module cstobin
  import fcu_pkg::*;
(
  input  logic [CW-1:0] c,
  input  logic [CW-1:0] s,
  output logic [DW-1:0] y,
  output logic          ovf
);

  logic [CW-1:0] sum;
  logic          cy;   // ripple carry

  always_comb begin
    cy = 1'b0;
    for (int i = 0; i < CW; i++) begin
      sum[i] = c[i] ^ s[i] ^ cy;
      cy     = (c[i] & s[i]) | (c[i] & cy) | (s[i] & cy);
    end
    y   = sum[DW-1:0];
    ovf = sum[CW-1] ^ sum[DW-1];
  end

endmodule

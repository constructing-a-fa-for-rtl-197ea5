// operand_mux: operand multiplexers between the register bank and the
// functional units.
//
// For each FCU, four multiplexers pick the registers named in the current
// control word for X*, Y*, K* and A; a fifth picks the register that the
// CS-to-binary converter reads. A is a binary operand: it is taken from the
// low 16 bits of the sum word of a register whose carry word is zero
// (written from the data port or by the converter's write-back).
// Combinational. A full crossbar is this design's choice; the architecture
// only says that the control unit drives the multiplexer selects every cycle.
module operand_mux
  import fcu_pkg::*;
(
  input  cs_t           regs [NREG],
  input  ctrl_word_t    cw,
  output cs_t           x    [NUM_FCU],
  output cs_t           y    [NUM_FCU],
  output cs_t           k    [NUM_FCU],
  output logic [DW-1:0] a    [NUM_FCU],
  output cs_t           cb
);

  cs_t a_reg [NUM_FCU];

  always_comb begin
    for (int f = 0; f < NUM_FCU; f++) begin
      x[f]     = regs[cw.fcu[f].x];
      y[f]     = regs[cw.fcu[f].y];
      k[f]     = regs[cw.fcu[f].k];
      a_reg[f] = regs[cw.fcu[f].a];
      a[f]     = a_reg[f].s[DW-1:0];
    end
    cb = regs[cw.cb_src];
  end

endmodule

// reg_bank: scratch register bank of the accelerator. Holds NREG carry-save
// numbers: inputs, intermediate results shared between FCUs, and binary
// coefficients (stored with a zero carry word).
//
// NWR write ports (one per FCU, one for the data-port input, one for the
// CS-to-binary write-back) write at the rising clock edge; when two ports
// write the same register in one cycle the higher-numbered port wins. Every
// register is visible at all times on `rdata`; the operand multiplexers
// (operand_mux) pick from there, so a read has no latency and a value written
// at the end of control step t can be used in step t+1. Synchronous reset
// clears all registers. Register count, port count, conflict rule and reset
// are this design's choices; the architecture only states the bank's role.
module reg_bank
  import fcu_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  logic           we    [NWR],
  input  logic [RAW-1:0] waddr [NWR],
  input  cs_t            wdata [NWR],
  output cs_t            rdata [NREG]
);

  cs_t regs [NREG];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < NREG; r++) regs[r] <= '0;
    end else begin
      for (int wp = 0; wp < NWR; wp++)
        if (we[wp]) regs[waddr[wp]] <= wdata[wp];
    end
  end

  assign rdata = regs;

endmodule

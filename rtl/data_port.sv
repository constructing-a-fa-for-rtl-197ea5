// data_port: stream interface between the outside world and the register
// bank.
//
// Input side: a valid/ready stream of 16-bit two's complement samples. The
// control unit asserts `take` in the control step that stores a sample (it
// only does so while `in_valid` is high); `in_ready` equals `take`. The sample
// is handed on as a carry-save number with a zero carry word, sign-extended
// to 17 bits.
// Output side: a one-entry buffer register in front of a valid/ready stream.
// `push` loads a converted result; `space` tells the control unit that a push
// is possible this cycle (buffer empty, or being emptied by out_ready). The
// control unit stalls a step that outputs while `space` is low. A result
// appears on out_data one cycle after its step.
// The data port is only named by the architecture; the handshakes and the
// buffer are this design's choices.
module data_port
  import fcu_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  // input stream
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [DW-1:0] in_data,
  // towards the control unit and register bank
  input  logic          take,
  output logic          in_ok,
  output cs_t           in_cs,
  input  logic          push,
  input  logic [DW-1:0] push_data,
  output logic          space,
  // output stream
  output logic          out_valid,
  input  logic          out_ready,
  output logic [DW-1:0] out_data
);

  always_comb begin
    in_ok    = in_valid;
    in_ready = take;
    in_cs.c  = '0;
    in_cs.s  = CW'($signed(in_data));
    space    = !out_valid || out_ready;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (push) begin
      out_valid <= 1'b1;
      out_data  <= push_data;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

  // A held result must not change until it is taken.
  a_out_hold: assert property (@(posedge clk) disable iff (rst)
    out_valid && !out_ready |=> out_valid && $stable(out_data));
  // The control unit never pushes into a full buffer.
  a_push_space: assert property (@(posedge clk) disable iff (rst)
    push |-> space);
  // A sample is only taken when one is offered.
  a_take_valid: assert property (@(posedge clk) disable iff (rst)
    take |-> in_valid);

endmodule

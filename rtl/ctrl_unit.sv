// ctrl_unit: control unit of the accelerator, a finite state machine that
// issues one control word per control step.
//
// A kernel is scheduled off line into control steps; each step's word
// (ctrl_word_t in fcu_pkg) gives every FCU its configuration, operand
// registers and result register, and tells the data port and the
// CS-to-binary converter what to do. The words are loaded through
// prog_we/prog_addr/prog_data while the unit is idle. A one-cycle `start`
// runs the steps from address 0, one per clock cycle, until the step marked
// `last` (or the last address). A step that takes an input sample waits while
// none is offered (`in_ok` low), and a step that outputs a result waits while
// the output buffer is full (`space` low); while a step waits, `go` is low and
// nothing is written. `done` pulses for one cycle after the last step.
// Stepping through the schedule one step per cycle follows the architecture,
// which produces a kernel-specific FSM; holding the step outputs in a loadable
// store, so that one netlist runs any scheduled kernel, is this design's
// choice.
module ctrl_unit
  import fcu_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  output logic           busy,
  output logic           done,
  input  logic           prog_we,
  input  logic [PAW-1:0] prog_addr,
  input  ctrl_word_t     prog_data,
  input  logic           in_ok,
  input  logic           space,
  output ctrl_word_t     cw,
  output logic           go,
  output logic [PAW-1:0] pc
);

  typedef enum logic {S_IDLE, S_RUN} state_t;

  state_t     state;
  ctrl_word_t prog [PDEPTH];

  always_ff @(posedge clk) begin
    if (prog_we && state == S_IDLE) prog[prog_addr] <= prog_data;
  end

  always_comb begin
    busy = (state == S_RUN);
    cw   = busy ? prog[pc] : '0;
    go   = busy && (!cw.in_en || in_ok) && (!cw.cb_out || space);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      pc    <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          pc    <= '0;
        end
        S_RUN: if (go) begin
          if (cw.last || pc == PAW'(PDEPTH - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            pc <= pc + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

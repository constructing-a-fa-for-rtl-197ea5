// flex_accel: flexible DSP accelerator built from carry-save FCUs.
//
// NUM_FCU flexible computational units (fcu) work side by side on operands
// held in carry-save (CS) form in a shared register bank (reg_bank). Every
// clock cycle is one control step: the control unit (ctrl_unit) presents a
// control word, the operand multiplexers (operand_mux) route the named
// registers to the FCUs and to the CS-to-binary converter (cstobin), the FCUs
// compute their chained add-multiply-add templates, and at the clock edge the
// results are written back. Intermediate results therefore stay in CS form
// from one FCU operation to the next; only values that leave the accelerator,
// or that are used as a multiplier coefficient A, pass through the ripple-carry
// converter. Samples enter and results leave through the data port
// (data_port), whose handshakes can stall a control step.
//
// Interface: load control words with prog_we/prog_addr/prog_data while idle,
// pulse start, stream samples on in_*, take results on out_*; done pulses
// after the last step and `step` shows the control step being executed.
// `ovf` is a sticky flag, cleared by start, set when an FCU writes a result computed from a multiplier operand wider than 16 bits or
// when a converted output or write-back does not fit 16 bits.
// The component set and their roles follow the architecture; the numbers of
// FCUs and registers, the control word and the data-port protocol are this
// design's choices (see fcu_pkg).
module flex_accel
  import fcu_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  // control
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic           ovf,
  output logic [PAW-1:0] step,
  // control-step store
  input  logic           prog_we,
  input  logic [PAW-1:0] prog_addr,
  input  ctrl_word_t     prog_data,
  // input stream
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [DW-1:0]  in_data,
  // output stream
  output logic           out_valid,
  input  logic           out_ready,
  output logic [DW-1:0]  out_data
);

  ctrl_word_t     cw;
  logic           go, in_ok, space;

  cs_t            regs  [NREG];
  logic           we    [NWR];
  logic [RAW-1:0] waddr [NWR];
  cs_t            wdata [NWR];

  cs_t            opx [NUM_FCU];
  cs_t            opy [NUM_FCU];
  cs_t            opk [NUM_FCU];
  logic [DW-1:0]  opa [NUM_FCU];
  cs_t            res [NUM_FCU];
  logic           fovf [NUM_FCU];

  cs_t            cb_in, in_cs;
  logic [DW-1:0]  cb_y;
  logic           cb_ovf, step_ovf;

  ctrl_unit u_ctrl (
    .clk       (clk),
    .rst       (rst),
    .start     (start),
    .busy      (busy),
    .done      (done),
    .prog_we   (prog_we),
    .prog_addr (prog_addr),
    .prog_data (prog_data),
    .in_ok     (in_ok),
    .space     (space),
    .cw        (cw),
    .go        (go),
    .pc        (step)
  );

  operand_mux u_xbar (
    .regs (regs),
    .cw   (cw),
    .x    (opx),
    .y    (opy),
    .k    (opk),
    .a    (opa),
    .cb   (cb_in)
  );

  for (genvar f = 0; f < NUM_FCU; f++) begin : g_fcu
    fcu u_fcu (
      .cfg (cw.fcu[f].cfg),
      .a   (opa[f]),
      .x   (opx[f]),
      .y   (opy[f]),
      .k   (opk[f]),
      .w   (res[f]),
      .n   (),
      .p   (),
      .ovf (fovf[f])
    );
  end

  cstobin u_cstobin (
    .c   (cb_in.c),
    .s   (cb_in.s),
    .y   (cb_y),
    .ovf (cb_ovf)
  );

  data_port u_port (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .in_data   (in_data),
    .take      (go && cw.in_en),
    .in_ok     (in_ok),
    .in_cs     (in_cs),
    .push      (go && cw.cb_out),
    .push_data (cb_y),
    .space     (space),
    .out_valid (out_valid),
    .out_ready (out_ready),
    .out_data  (out_data)
  );

  // Register-bank write ports: FCUs, data-port input, converter write-back.
  always_comb begin
    for (int f = 0; f < NUM_FCU; f++) begin
      we[f]    = go && cw.fcu[f].we;
      waddr[f] = cw.fcu[f].dst;
      wdata[f] = res[f];
    end
    we[WP_IN]      = go && cw.in_en;
    waddr[WP_IN]   = cw.in_dst;
    wdata[WP_IN]   = in_cs;
    we[WP_CB]      = go && cw.cb_wb;
    waddr[WP_CB]   = cw.cb_dst;
    wdata[WP_CB].c = '0;
    wdata[WP_CB].s = CW'($signed(cb_y));
  end

  reg_bank u_regs (
    .clk   (clk),
    .rst   (rst),
    .we    (we),
    .waddr (waddr),
    .wdata (wdata),
    .rdata (regs)
  );

  // Sticky overflow status.
  always_comb begin
    step_ovf = go && (cw.cb_out || cw.cb_wb) && cb_ovf;
    for (int f = 0; f < NUM_FCU; f++)
      step_ovf = step_ovf || (go && cw.fcu[f].we && fovf[f]);
  end

  always_ff @(posedge clk) begin
    if (rst || start) ovf <= 1'b0;
    else if (step_ovf) ovf <= 1'b1;
  end

endmodule

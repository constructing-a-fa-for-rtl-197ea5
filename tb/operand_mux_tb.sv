// operand_mux_tb: random register contents and random control words; checks
// every routed operand, including the binary A operand taken from the sum
// word.
module operand_mux_tb;
  import fcu_pkg::*;
  logic clk = 0;
  cs_t           regs [NREG];
  ctrl_word_t    cw;
  cs_t           x [NUM_FCU], y [NUM_FCU], k [NUM_FCU];
  logic [DW-1:0] a [NUM_FCU];
  cs_t           cb;
  int checks = 0, failures = 0, cycles = 0;

  operand_mux dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 20000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      for (int r = 0; r < NREG; r++) regs[r] = cs_t'({$urandom, $urandom});
      cw = ctrl_word_t'({$urandom, $urandom, $urandom});
      #1;
      for (int f = 0; f < NUM_FCU; f++) begin
        chk(x[f] === regs[cw.fcu[f].x], "x");
        chk(y[f] === regs[cw.fcu[f].y], "y");
        chk(k[f] === regs[cw.fcu[f].k], "k");
        chk(a[f] === regs[cw.fcu[f].a].s[DW-1:0], "a");
      end
      chk(cb === regs[cw.cb_src], "cb");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

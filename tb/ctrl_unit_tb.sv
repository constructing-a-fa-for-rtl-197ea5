// ctrl_unit_tb: loads random programs, runs them with random input
// availability and output space, and checks against a step model: the word
// presented each cycle, `go`, busy, the done pulse one cycle after the last
// step, and the run length (steps plus stalled cycles). Also checks that a
// program write during a run is ignored and that a program without a `last`
// flag ends at the final address.
module ctrl_unit_tb;
  import fcu_pkg::*;
  logic clk = 0, rst, start, busy, done, prog_we, in_ok, space, go;
  logic [PAW-1:0] prog_addr, pc;
  ctrl_word_t prog_data, cw;
  ctrl_word_t model [PDEPTH];
  int checks = 0, failures = 0, cycles = 0, stalls = 0;

  ctrl_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 50000) begin
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
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  task automatic load(input int len);
    for (int i = 0; i < PDEPTH; i++) begin
      model[i] = ctrl_word_t'({$urandom, $urandom, $urandom});
      model[i].last = (i == len - 1);
      prog_we = 1; prog_addr = PAW'(i); prog_data = model[i];
      @(posedge clk); #1;
    end
    prog_we = 0;
  endtask

  task automatic run(input int len);
    int  pcm, t0, nst;
    logic exp_go;
    start = 1; @(posedge clk); #1; start = 0;
    t0 = cycles; pcm = 0; nst = 0;
    while (1) begin
      in_ok = 1'($urandom); space = 1'($urandom);
      // attempt to overwrite the running program: must be ignored
      prog_we = 1; prog_addr = PAW'($urandom); prog_data = '1;
      #1;
      exp_go = (!model[pcm].in_en || in_ok) && (!model[pcm].cb_out || space);
      chk(busy, "busy");
      chk(cw === model[pcm], "control word");
      chk(go === exp_go, "go");
      chk(pc == PAW'(pcm), "pc");
      if (!exp_go) nst++;
      @(posedge clk); #1;
      if (exp_go) begin
        if (model[pcm].last || pcm == PDEPTH - 1) break;
        pcm++;
      end
    end
    prog_we = 0;
    chk(done && !busy, "done pulse after last step");
    chk(cycles - t0 == len + nst, "run length");
    @(posedge clk); #1;
    chk(!done, "done is one cycle");
    stalls += nst;
  endtask

  initial begin
    start = 0; prog_we = 0; prog_addr = '0; prog_data = '0; in_ok = 0; space = 0;
    rst = 1;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    chk(!busy && !done, "idle after reset");
    for (int r = 0; r < 20; r++) begin
      int len = (r == 19) ? PDEPTH + 5 : int'($urandom_range(1, PDEPTH));
      load(len);
      run(len > PDEPTH ? PDEPTH : len);
    end
    chk(stalls > 0, "no stall occurred");
    $display("stalled cycles=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

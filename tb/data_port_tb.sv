// data_port_tb: random input offers, pushes and output back-pressure. Checks
// the input conversion to carry-save form, in_ready, the space signal, and
// that the output stream delivers every pushed word once, in order.
module data_port_tb;
  import fcu_pkg::*;
  logic clk = 0, rst;
  logic in_valid, in_ready, take, in_ok, push, space, out_valid, out_ready;
  logic [DW-1:0] in_data, push_data, out_data;
  cs_t in_cs;
  int checks = 0, failures = 0, cycles = 0;
  logic [DW-1:0] q [$];
  int pushes = 0, pops = 0, full_stalls = 0;

  data_port dut (.*);

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
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  initial begin
    in_valid = 0; take = 0; push = 0; out_ready = 0; in_data = '0; push_data = '0;
    rst = 1;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      in_valid  = 1'($urandom);
      in_data   = DW'($urandom);
      take      = in_valid && 1'($urandom);
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      chk(in_ok == in_valid, "in_ok");
      chk(in_ready == take, "in_ready");
      chk(in_cs.c == '0 && int'($signed(in_cs.s)) == int'($signed(in_data)), "in_cs");
      chk(space == (!out_valid || out_ready), "space");
      push      = space && ($urandom_range(0, 2) != 0);
      push_data = DW'($urandom);
      if (!space) full_stalls++;
      #1;
      @(posedge clk);
      if (out_valid && out_ready) begin
        chk(q.size() > 0 && out_data == q[0], "output order");
        if (q.size() > 0) void'(q.pop_front());
        pops++;
      end
      if (push) begin q.push_back(push_data); pushes++; end
      #1;
      chk(out_valid == (q.size() > 0), "out_valid");
      if (q.size() > 0) chk(out_data == q[0], "out_data");
    end
    chk(full_stalls > 0, "back-pressure never occurred");
    $display("pushes=%0d pops=%0d full_cycles=%0d", pushes, pops, full_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

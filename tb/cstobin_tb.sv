// cstobin_tb: converts random carry-save pairs and checks the binary result
// and the overflow flag against integer addition.
module cstobin_tb;
  import fcu_pkg::*;
  logic clk = 0;
  logic [CW-1:0] c, s;
  logic [DW-1:0] y;
  logic ovf;
  int checks = 0, failures = 0, cycles = 0;

  cstobin dut (.*);

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

  task automatic run(input logic [CW-1:0] cc, input logic [CW-1:0] ss);
    logic [CW-1:0] sum;
    int v;
    logic exp_ovf;
    c = cc; s = ss;
    #1;
    sum = cc + ss;
    v = int'($signed(sum));
    exp_ovf = (v > 32767) || (v < -32768);
    checks++;
    if (y !== sum[DW-1:0] || ovf !== exp_ovf) begin
      failures++;
      if (failures < 10) $display("FAIL %h+%h: y=%h ovf=%0b", cc, ss, y, ovf);
    end
  endtask

  initial begin
    run('0, '0);
    run(17'h1FFFF, 17'h00001);
    run(17'h07FFF, 17'h00001);   // 32768: overflow
    run(17'h18000, 17'h00000);   // -32768
    for (int i = 0; i < 5000; i++) begin
      @(posedge clk);
      run(CW'($urandom), CW'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

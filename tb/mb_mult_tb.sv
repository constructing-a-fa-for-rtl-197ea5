// mb_mult_tb: multiplies random Q1.15 coefficients by random carry-save
// operands. Each product is checked bit-exactly against the truncated-sum
// formula (rows floor-divided by 2^15, plus the compensation constant) and
// against the exact product A*P/2^15, from which it may differ by no more
// than the truncation bound, -4.67 .. +4.
module mb_mult_tb;
  import fcu_pkg::*;
  import fcu_ref_pkg::*;
  localparam int COMP = 4;
  logic clk = 0;
  logic [DW-1:0] a;
  logic [CW-1:0] p_c, p_s, m_c, m_s;
  logic ovf;
  int checks = 0, failures = 0, cycles = 0;
  real max_err = 0.0;

  mb_mult #(.COMP(COMP)) dut (.*);

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

  task automatic run(input int av, input int pv, input logic [CW-1:0] c);
    int  got, exp;
    real exact, e;
    a   = DW'(av);
    p_c = c;
    p_s = CW'(pv) - c;
    #1;
    got   = cs_val(m_c, m_s);
    exp   = trunc_mult(av, p_c, p_s, COMP);
    exact = real'(longint'(av) * pv) / 32768.0;
    e     = real'(got) - exact;
    if (e < 0 ? -e > max_err : e > max_err) max_err = e < 0 ? -e : e;
    checks++;
    if (got != exp || e > 4.0 || e < -4.67 || ovf) begin
      failures++;
      if (failures < 10) $display("FAIL A=%0d P=%0d got %0d formula %0d exact %f", av, pv, got, exp, exact);
    end
  endtask

  initial begin
    run(16384, 1000, '0);       // 0.5 * 1000
    run(-32768, 32767, '0);     // -1 * max
    run(32767, -32768, 17'h1ABCD);
    run(0, 12345, 17'h00F0F);
    run(6, 5, '0);
    for (int i = 0; i < 5000; i++) begin
      @(posedge clk);
      run(int'($signed(16'($urandom))), int'($signed(16'($urandom))), CW'($urandom));
    end
    $display("largest deviation from the exact product: %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

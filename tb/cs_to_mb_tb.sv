// cs_to_mb_tb: recodes random carry-save splits of 16-bit values and checks
// that the digits are legal, that sum(d_j * 4^j) equals the value exactly,
// that the digits match the specified transfer rules, and that no overflow
// is flagged. Values wider than 16 bits whose top digit cannot be encoded
// must raise ovf.
module cs_to_mb_tb;
  import fcu_pkg::*;
  import fcu_ref_pkg::*;
  logic clk = 0;
  logic [CW-1:0] p_c, p_s;
  mb_digit_t dig [ND];
  logic ovf;
  int checks = 0, failures = 0, cycles = 0;

  cs_to_mb dut (.*);

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

  task automatic run(input int val, input logic [CW-1:0] c);
    int     ref_d [8];
    longint sum;
    int     dv;
    p_c = c;
    p_s = CW'(val) - c;
    #1;
    mb_digits(p_c, p_s, ref_d);
    sum = 0;
    for (int j = 0; j < ND; j++) begin
      dv = dig[j].two ? 2 : (dig[j].one ? 1 : 0);
      if (dig[j].neg) dv = -dv;
      checks++;
      if ((dig[j].one && dig[j].two) || (dig[j].neg && !dig[j].one && !dig[j].two)
          || dv != ref_d[j]) begin
        failures++;
        if (failures < 10) $display("FAIL digit %0d of %0d: %b ref %0d", j, val, dig[j], ref_d[j]);
      end
      sum += longint'(dv) <<< (2 * j);
    end
    checks++;
    if (sum != val || ovf) begin
      failures++;
      if (failures < 10) $display("FAIL value %0d recoded to %0d ovf=%0b", val, sum, ovf);
    end
  endtask

  initial begin
    run(0, '0);
    run(32767, '0);
    run(-32768, '0);
    run(-32768, 17'h10000);
    run(32767, 17'h1FFFF);
    run(5, 17'h0);
    run(-1, 17'h1FFFF);
    for (int i = 0; i < 5000; i++) begin
      @(posedge clk);
      run(int'($signed(16'($urandom))), CW'($urandom));
    end
    // 17-bit value with top slice sum 3 (mod 8): must be flagged
    p_c = '0; p_s = 17'h0C000; #1;   // 49152, top digit would be 3
    checks++;
    if (!ovf) begin failures++; $display("FAIL ovf not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// cs_addsub_tb: checks the carry-save adder/subtractor against integer
// arithmetic modulo 2^17 for random and corner operands, both operations.
module cs_addsub_tb;
  localparam int CW = 17;
  logic clk = 0;
  logic [CW-1:0] a_c, a_s, b_c, b_s, r_c, r_s;
  logic sub;
  int checks = 0, failures = 0, cycles = 0;

  cs_addsub #(.CW(CW)) dut (.*);

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

  task automatic check();
    logic [CW-1:0] exp, got;
    #1;
    exp = sub ? (a_c + a_s) - (b_c + b_s) : (a_c + a_s) + (b_c + b_s);
    got = r_c + r_s;
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL sub=%0b a=%h+%h b=%h+%h got %h exp %h",
                                  sub, a_c, a_s, b_c, b_s, got, exp);
    end
  endtask

  initial begin
    // corners: all ones, zero, single bits
    {a_c, a_s, b_c, b_s, sub} = '0; check();
    {a_c, a_s, b_c, b_s} = {4 * CW{1'b1}}; sub = 0; check();
    sub = 1; check();
    a_c = 0; a_s = 17'd4; b_c = 0; b_s = 17'd1; sub = 1; check();   // 4 - 1
    for (int i = 0; i < 5000; i++) begin
      @(posedge clk);
      a_c = CW'($urandom); a_s = CW'($urandom);
      b_c = CW'($urandom); b_s = CW'($urandom);
      sub = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// reg_bank_tb: random writes on all ports, with deliberate address
// conflicts, against a model array; checks reset clearing and that the
// highest-numbered port wins a conflict.
module reg_bank_tb;
  import fcu_pkg::*;
  logic clk = 0, rst;
  logic           we    [NWR];
  logic [RAW-1:0] waddr [NWR];
  cs_t            wdata [NWR];
  cs_t            rdata [NREG];
  cs_t            model [NREG];
  int checks = 0, failures = 0, cycles = 0;

  reg_bank dut (.*);

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

  task automatic compare();
    for (int r = 0; r < NREG; r++) begin
      checks++;
      if (rdata[r] !== model[r]) begin
        failures++;
        if (failures < 10) $display("FAIL reg %0d got %h exp %h", r, rdata[r], model[r]);
      end
    end
  endtask

  initial begin
    for (int p = 0; p < NWR; p++) begin we[p] = 0; waddr[p] = '0; wdata[p] = '0; end
    rst = 1;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    for (int r = 0; r < NREG; r++) model[r] = '0;
    compare();
    for (int i = 0; i < 3000; i++) begin
      for (int p = 0; p < NWR; p++) begin
        we[p]    = 1'($urandom);
        waddr[p] = (i % 4 == 0) ? RAW'(3) : RAW'($urandom);   // conflicts on reg 3
        wdata[p] = cs_t'({$urandom, $urandom});
      end
      @(posedge clk); #1;
      for (int p = 0; p < NWR; p++) if (we[p]) model[waddr[p]] = wdata[p];
      compare();
    end
    for (int p = 0; p < NWR; p++) we[p] = 0;
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    for (int r = 0; r < NREG; r++) model[r] = '0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

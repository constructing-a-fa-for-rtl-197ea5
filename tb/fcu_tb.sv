// fcu_tb: drives the FCU with all 16 configuration words and random
// carry-save operands. Checks the first adder output N* exactly, the
// multiplier operand selection exactly, and W* against the ideal
// A*P/2^15 +/- Q within the truncation bound (-4.67 .. +4). Also replays the
// operand values of the stand-alone FCU simulation (A=6, X=4, Y=1, K=4) and
// checks the exact carry and sum words of N* and P* for them.
module fcu_tb;
  import fcu_pkg::*;
  import fcu_ref_pkg::*;
  logic clk = 0;
  fcu_cfg_t cfg;
  logic [DW-1:0] a;
  cs_t x, y, k, w, n, p;
  logic ovf;
  int checks = 0, failures = 0, cycles = 0;

  fcu dut (.*);

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

  function automatic cs_t split(input int v);
    cs_t r;
    r.c = CW'($urandom);
    r.s = CW'(v) - r.c;
    return r;
  endfunction

  task automatic run(input logic [3:0] d, input int av, input int xv, input int yv, input int kv);
    int  nv, pv, qv, wv;
    real ideal, e;
    cfg = fcu_cfg_t'(d);
    a   = DW'(av);
    x = split(xv); y = split(yv); k = split(kv);
    #1;
    nv = cfg.sub1 ? xv - yv : xv + yv;
    pv = cfg.mux1_n ? nv : kv;
    qv = cfg.mux2_n ? nv : kv;
    ideal = real'(longint'(av) * pv) / 32768.0 + (cfg.sub2 ? -qv : qv);
    wv = cs_val(w.c, w.s);
    e  = real'(wv) - ideal;
    checks += 3;
    if (cs_val(n.c, n.s) != nv) begin
      failures++; $display("FAIL N d=%b got %0d exp %0d", d, cs_val(n.c, n.s), nv);
    end
    if (cs_val(p.c, p.s) != pv) begin
      failures++; $display("FAIL P d=%b got %0d exp %0d", d, cs_val(p.c, p.s), pv);
    end
    if (e > 4.0 || e < -4.67 || ovf) begin
      failures++;
      if (failures < 20) $display("FAIL W d=%b A=%0d X=%0d Y=%0d K=%0d got %0d ideal %f",
                                  d, av, xv, yv, kv, wv, ideal);
    end
  endtask

  // Stand-alone FCU operands with X*=(0,4), Y*=(0,1), K*=(0,4), A=6 as carry
  // and sum words; checks the exact carry-save patterns of N* and P*.
  task automatic wave(input logic [3:0] d, input cs_t exp_n, input cs_t exp_p);
    cfg = fcu_cfg_t'(d);
    a = 16'd6;
    x = '{c: '0, s: 17'd4};
    y = '{c: '0, s: 17'd1};
    k = '{c: '0, s: 17'd4};
    #1;
    checks += 2;
    if (n !== exp_n) begin failures++; $display("FAIL d=%b N*=%h/%h", d, n.c, n.s); end
    if (p !== exp_p) begin failures++; $display("FAIL d=%b P*=%h/%h", d, p.c, p.s); end
  endtask

  initial begin
    // X*-Y*: carry word all ones above bit 3, sum word 12; X*+Y* = (0, 5)
    wave(4'b0001, '{c: 17'h1FFF7, s: 17'h0000C}, '{c: '0, s: 17'd4});
    wave(4'b0010, '{c: '0, s: 17'd5}, '{c: '0, s: 17'd5});
    wave(4'b0110, '{c: '0, s: 17'd5}, '{c: '0, s: 17'd5});
    wave(4'b1110, '{c: '0, s: 17'd5}, '{c: '0, s: 17'd5});
    // operand values of the stand-alone FCU simulation, random CS splits
    run(4'b0001, 6, 4, 1, 4);
    run(4'b0010, 6, 4, 1, 4);
    run(4'b0110, 6, 4, 1, 4);
    run(4'b1110, 6, 4, 1, 4);
    // near-unity coefficient: W = K + N etc.
    run(4'b0000, 32767, 1000, 2000, 3000);
    run(4'b1011, 16384, 10000, -3000, 500);   // 0.5*(X-Y) - K
    for (int i = 0; i < 8000; i++) begin
      @(posedge clk);
      run(4'($urandom), int'($signed(16'($urandom))),
          int'($urandom_range(0, 16000)) - 8000, int'($urandom_range(0, 16000)) - 8000,
          int'($urandom_range(0, 16000)) - 8000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

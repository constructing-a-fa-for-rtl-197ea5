// flex_accel_tb: end-to-end test of the accelerator at its default sizes.
//
// Programs: a 4-tap FIR kernel (y[n] = sum h_k x[n-k], Q1.15 taps, four
// outputs) and a series of random programs that use every FCU configuration,
// both FCUs, chained carry-save results, CS-to-binary write-back (also as a
// multiplier coefficient), mid-program inputs and outputs. A last program
// forces a multiplier operand beyond 16 bits and checks the overflow flag.
//
// Checking: a value-level model interprets the same control words with real
// arithmetic and carries an error bound per register (truncation: -4.67..+4
// per multiplication, propagated through later operations). Every output
// must lie within its bound of the ideal value; FIR outputs are also compared
// with the direct FIR formula. A step model predicts, cycle by cycle, the
// control step, in_ready and the end of the run (one step per cycle, plus
// one cycle for every step stalled by a missing input or a full output
// buffer). Counts of each mechanism are printed; one that never occurred is
// a failure.
module flex_accel_tb;
  import fcu_pkg::*;

  logic clk = 0, rst, start, busy, done, ovf, prog_we;
  logic [PAW-1:0] step;
  logic [PAW-1:0] prog_addr;
  ctrl_word_t     prog_data;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [DW-1:0] in_data, out_data;

  flex_accel dut (.*);

  int checks = 0, failures = 0, cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 200000) begin
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
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycles);
    end
  endtask

  // ---------------------------------------------------------------- model
  real ideal [NREG];
  real err   [NREG];
  logic fcu_written [NREG];   // last writer was an FCU (value in CS form)

  ctrl_word_t prog [PDEPTH];
  int         plen;
  int         in_q  [$];      // samples to offer, in order
  real        exp_v [$];      // expected outputs: ideal value
  real        exp_e [$];      // and error bound

  // mechanism counters
  int n_sub1, n_sub2, n_mux1_n, n_mux1_k, n_mux2_n, n_mux2_k, n_par, n_chain;
  int n_wb, n_wb_coef, n_in_stall, n_out_stall, n_out, n_in, n_ovf, n_runs;

  localparam real TRUNC_LO = 4.67;   // truncation error bound, below
  localparam real TRUNC_HI = 4.0;    // and above

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  // Value of FCU f's result in step word w, from the current model state.
  function automatic void fcu_eval(input fcu_ctl_t fc, output real wv, output real we_,
                                   output real pmax);
    real xv, yv, kv, av, nv, ne, pv, pe, qv, qe;
    xv = ideal[fc.x]; yv = ideal[fc.y]; kv = ideal[fc.k];
    av = ideal[fc.a];
    nv = fc.cfg.sub1 ? xv - yv : xv + yv;
    ne = err[fc.x] + err[fc.y];
    pv = fc.cfg.mux1_n ? nv : kv;  pe = fc.cfg.mux1_n ? ne : err[fc.k];
    qv = fc.cfg.mux2_n ? nv : kv;  qe = fc.cfg.mux2_n ? ne : err[fc.k];
    wv  = av * pv / 32768.0 + (fc.cfg.sub2 ? -qv : qv);
    we_ = (absr(av) * pe + absr(pv) * err[fc.a] + err[fc.a] * pe) / 32768.0
        + qe + TRUNC_LO;
    pmax = absr(pv) + pe;
  endfunction

  // Apply one control step to the model (all reads before any write).
  task automatic model_step(input ctrl_word_t w, input int sample);
    real wv [NUM_FCU], wb_e [NUM_FCU], pm;
    real cb_v, cb_e;
    for (int f = 0; f < NUM_FCU; f++) fcu_eval(w.fcu[f], wv[f], wb_e[f], pm);
    cb_v = ideal[w.cb_src]; cb_e = err[w.cb_src];
    if (w.cb_out) begin exp_v.push_back(cb_v); exp_e.push_back(cb_e); end
    for (int f = 0; f < NUM_FCU; f++)
      if (w.fcu[f].we) begin
        ideal[w.fcu[f].dst] = wv[f]; err[w.fcu[f].dst] = wb_e[f];
        fcu_written[w.fcu[f].dst] = 1;
      end
    if (w.in_en) begin
      ideal[w.in_dst] = real'(sample); err[w.in_dst] = 0.0;
      fcu_written[w.in_dst] = 0;
    end
    if (w.cb_wb) begin
      ideal[w.cb_dst] = cb_v; err[w.cb_dst] = cb_e;
      fcu_written[w.cb_dst] = 0;
    end
  endtask

  function automatic fcu_ctl_t fop(input logic [3:0] d, input int a, input int x,
                                   input int y, input int k, input int dst);
    fcu_ctl_t c;
    c.cfg = fcu_cfg_t'(d);
    c.a = RAW'(a); c.x = RAW'(x); c.y = RAW'(y); c.k = RAW'(k);
    c.we = (dst >= 0); c.dst = RAW'(dst < 0 ? 0 : dst);
    return c;
  endfunction

  function automatic ctrl_word_t nop();
    ctrl_word_t w;
    w = '0;
    for (int f = 0; f < NUM_FCU; f++) w.fcu[f] = fop(4'b0000, 15, 15, 15, 15, -1);
    w.cb_src = RAW'(15);
    return w;
  endfunction

  // ---------------------------------------------------------------- FIR
  // Registers: h0..h3 in r0..r3, samples circular in r4..r7, partial sums
  // r8/r9/r10, output r12, r15 stays zero.
  int fir_h [4];
  int fir_x [7];
  localparam logic [3:0] D_MAC = 4'b0100;   // W = A*K + (X+Y)

  task automatic build_fir();
    ctrl_word_t w;
    int s = 0;
    for (int i = 0; i < 4; i++) fir_h[i] = int'($urandom_range(0, 32767)) - 16384;
    for (int i = 0; i < 7; i++) fir_x[i] = int'($urandom_range(0, 8000)) - 4000;
    for (int i = 0; i < 4; i++) begin
      w = nop(); w.in_en = 1; w.in_dst = RAW'(i); prog[s++] = w; in_q.push_back(fir_h[i]);
    end
    for (int i = 0; i < 3; i++) begin
      w = nop(); w.in_en = 1; w.in_dst = RAW'(4 + i); prog[s++] = w; in_q.push_back(fir_x[i]);
    end
    for (int n = 3; n < 7; n++) begin
      w = nop(); w.in_en = 1; w.in_dst = RAW'(4 + n % 4); in_q.push_back(fir_x[n]);
      if (n > 3) begin w.cb_out = 1; w.cb_src = RAW'(12); end
      prog[s++] = w;
      w = nop();
      w.fcu[0] = fop(D_MAC, 0, 15, 15, 4 + n % 4, 8);
      w.fcu[1] = fop(D_MAC, 1, 15, 15, 4 + (n - 1) % 4, 9);
      prog[s++] = w;
      w = nop();
      w.fcu[0] = fop(D_MAC, 2, 8, 9, 4 + (n - 2) % 4, 10);
      prog[s++] = w;
      w = nop();
      w.fcu[0] = fop(D_MAC, 3, 10, 15, 4 + (n - 3) % 4, 12);
      prog[s++] = w;
    end
    w = nop(); w.cb_out = 1; w.cb_src = RAW'(12); w.last = 1; prog[s++] = w;
    plen = s;
  endtask

  // ---------------------------------------------------------------- random
  function automatic int rnd_reg(input int lo, input int hi);
    return int'($urandom_range(hi, lo));
  endfunction

  task automatic build_random();
    ctrl_word_t w;
    real wv, e, pm;
    int  smp, dsts [NUM_FCU];
    logic sim_regs_ok;
    plen = int'($urandom_range(PDEPTH, 20));
    for (int s = 0; s < plen; s++) begin
      w = nop();
      smp = 0;
      if (s < 4) begin
        w.in_en = 1; w.in_dst = RAW'(s);
        smp = (s < 2) ? int'($signed(16'($urandom))) : int'($urandom_range(0, 6000)) - 3000;
      end else if ($urandom_range(0, 6) == 0) begin
        w.in_en = 1; w.in_dst = RAW'(rnd_reg(4, 14));
        smp = int'($urandom_range(0, 6000)) - 3000;
      end
      if (s >= 4) begin
        for (int f = 0; f < NUM_FCU; f++) begin
          int areg;
          // coefficient: a binary register (inputs r0..r3 or a write-back)
          areg = rnd_reg(0, 3);
          for (int r = 4; r < 15; r++)
            if (!fcu_written[r] && $urandom_range(0, 7) == 0) areg = r;
          w.fcu[f] = fop(4'($urandom), areg, rnd_reg(2, 15), rnd_reg(2, 15),
                         rnd_reg(2, 15), -1);
          fcu_eval(w.fcu[f], wv, e, pm);
          dsts[f] = rnd_reg(4, 14);
          if ($urandom_range(0, 4) != 0 && pm < 32000.0 && absr(wv) + e < 32000.0) begin
            w.fcu[f].we = 1; w.fcu[f].dst = RAW'(dsts[f]);
          end
        end
        if ($urandom_range(0, 3) == 0) begin
          w.cb_out = 1; w.cb_src = RAW'(rnd_reg(0, 14));
        end
        if ($urandom_range(0, 4) == 0) begin
          w.cb_wb = 1; w.cb_src = RAW'(rnd_reg(4, 14)); w.cb_dst = RAW'(rnd_reg(4, 14));
        end
      end
      if (s == plen - 1) begin
        w.last = 1; w.cb_out = 1;
      end
      // mechanism counts
      for (int f = 0; f < NUM_FCU; f++) if (w.fcu[f].we) begin
        if (w.fcu[f].cfg.sub1) n_sub1++;
        if (w.fcu[f].cfg.sub2) n_sub2++;
        if (w.fcu[f].cfg.mux1_n) n_mux1_n++; else n_mux1_k++;
        if (w.fcu[f].cfg.mux2_n) n_mux2_n++; else n_mux2_k++;
        if (fcu_written[w.fcu[f].x] || fcu_written[w.fcu[f].y] || fcu_written[w.fcu[f].k])
          n_chain++;
        if (w.fcu[f].a >= 4) n_wb_coef++;
      end
      if (w.fcu[0].we && w.fcu[1].we) n_par++;
      if (w.cb_wb) n_wb++;
      prog[s] = w;
      if (w.in_en) in_q.push_back(smp);
      model_step(w, smp);
    end
  endtask

  // ---------------------------------------------------------------- run
  task automatic load_program();
    for (int i = 0; i < plen; i++) begin
      prog_we = 1; prog_addr = PAW'(i); prog_data = prog[i];
      @(posedge clk); #1;
    end
    prog_we = 0;
  endtask

  // Runs the loaded program against the step model; returns the outputs.
  task automatic execute(output int outs [$]);
    int pcm = 0, t0, nst = 0, in_idx = 0;
    logic go_m, fin, fout;
    ctrl_word_t w;
    outs.delete();
    start = 1; @(posedge clk); #1; start = 0;
    t0 = cycles;
    chk(busy && !ovf, "busy after start, overflow flag cleared");
    forever begin
      w = prog[pcm];
      in_valid  = (in_idx < in_q.size()) && ($urandom_range(0, 9) < 7);
      in_data   = (in_idx < in_q.size()) ? DW'(in_q[in_idx]) : '0;
      out_ready = ($urandom_range(0, 9) < 6);
      #1;
      go_m = (!w.in_en || in_valid) && (!w.cb_out || !out_valid || out_ready);
      if (w.in_en && !in_valid) n_in_stall++;
      if (w.cb_out && out_valid && !out_ready) n_out_stall++;
      if (!go_m) nst++;
      chk(in_ready == (go_m && w.in_en), "in_ready follows the step model");
      chk(busy, "busy while running");
      fin  = in_valid && in_ready;
      fout = out_valid && out_ready;
      if (fout) outs.push_back(int'($signed(out_data)));
      @(posedge clk); #1;
      if (fin) begin in_idx++; n_in++; end
      if (go_m) begin
        if (w.last) break;
        pcm++;
      end
    end
    chk(done && !busy, "done one cycle after the last step");
    chk(cycles - t0 == plen + nst, "one control step per cycle plus stalls");
    in_valid = 0;
    // drain the output buffer
    out_ready = 1;
    #1;
    if (out_valid) outs.push_back(int'($signed(out_data)));
    @(posedge clk); #1;
    out_ready = 0;
    chk(in_idx == in_q.size(), "all samples consumed");
  endtask

  task automatic compare_outputs(input int outs [$]);
    chk(outs.size() == exp_v.size(), "number of outputs");
    for (int i = 0; i < outs.size() && i < exp_v.size(); i++) begin
      checks++;
      if (absr(real'(outs[i]) - exp_v[i]) > exp_e[i] + 1e-6) begin
        failures++;
        if (failures < 20) $display("FAIL output %0d: got %0d ideal %f bound %f",
                                    i, outs[i], exp_v[i], exp_e[i]);
      end
      n_out++;
    end
  endtask

  int outs [$];

  initial begin
    start = 0; prog_we = 0; prog_addr = '0; prog_data = '0;
    in_valid = 0; in_data = '0; out_ready = 0;
    n_sub1 = 0; n_sub2 = 0; n_mux1_n = 0; n_mux1_k = 0; n_mux2_n = 0; n_mux2_k = 0;
    n_par = 0; n_chain = 0; n_wb = 0; n_wb_coef = 0; n_in_stall = 0; n_out_stall = 0;
    n_out = 0; n_in = 0; n_ovf = 0; n_runs = 0;
    rst = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int r = 0; r < NREG; r++) begin ideal[r] = 0.0; err[r] = 0.0; fcu_written[r] = 0; end

    // FIR kernel
    in_q.delete(); exp_v.delete(); exp_e.delete();
    build_fir();
    for (int s = 0; s < plen; s++) model_step(prog[s], prog[s].in_en ? in_q[0] : 0);
    // (the model consumed samples by value; rebuild the queue order)
    in_q.delete();
    for (int i = 0; i < 4; i++) in_q.push_back(fir_h[i]);
    for (int i = 0; i < 7; i++) in_q.push_back(fir_x[i]);
    // re-run the model with the right samples
    for (int r = 0; r < NREG; r++) begin ideal[r] = 0.0; err[r] = 0.0; fcu_written[r] = 0; end
    exp_v.delete(); exp_e.delete();
    begin
      int k = 0;
      for (int s = 0; s < plen; s++) begin
        model_step(prog[s], prog[s].in_en ? in_q[k] : 0);
        if (prog[s].in_en) k++;
      end
    end
    load_program();
    execute(outs);
    compare_outputs(outs);
    for (int n = 3; n < 7 && n - 3 < outs.size(); n++) begin
      real y;
      y = 0.0;
      for (int t = 0; t < 4; t++) y += real'(fir_h[t]) * real'(fir_x[n - t]) / 32768.0;
      checks++;
      if (absr(real'(outs[n - 3]) - y) > 4.0 * TRUNC_LO + 1.0) begin
        failures++;
        $display("FAIL FIR y[%0d] = %0d, formula %f", n, outs[n - 3], y);
      end
    end
    chk(!ovf, "no overflow in the FIR kernel");
    n_runs++;

    // random programs (the model state carries over between runs)
    for (int r = 0; r < 200; r++) begin
      in_q.delete(); exp_v.delete(); exp_e.delete();
      build_random();
      load_program();
      execute(outs);
      compare_outputs(outs);
      chk(!ovf, "no overflow in an in-range program");
      n_runs++;
    end

    // forced overflow: 30000 + 30000 as a multiplier operand
    in_q.delete(); exp_v.delete(); exp_e.delete();
    begin
      ctrl_word_t w;
      w = nop(); w.in_en = 1; w.in_dst = 0; prog[0] = w; in_q.push_back(32767);
      w = nop(); w.in_en = 1; w.in_dst = 4; prog[1] = w; in_q.push_back(30000);
      w = nop(); w.in_en = 1; w.in_dst = 5; prog[2] = w; in_q.push_back(30000);
      w = nop(); w.fcu[0] = fop(4'b0010, 0, 4, 5, 15, 6); w.last = 1; prog[3] = w;
      plen = 4;
    end
    load_program();
    execute(outs);
    chk(ovf, "overflow flagged");
    if (ovf) n_ovf++;
    start = 1; @(posedge clk); #1; start = 0;
    chk(!ovf, "start clears the overflow flag");
    in_valid = 1; in_data = '0; out_ready = 1;
    while (busy) @(posedge clk);
    #1;
    in_valid = 0;

    $display("runs=%0d inputs=%0d outputs=%0d", n_runs, n_in, n_out);
    $display("sub1=%0d sub2=%0d mux1_N=%0d mux1_K=%0d mux2_N=%0d mux2_K=%0d",
             n_sub1, n_sub2, n_mux1_n, n_mux1_k, n_mux2_n, n_mux2_k);
    $display("parallel_fcu_steps=%0d cs_chained_ops=%0d writebacks=%0d writeback_coeffs=%0d",
             n_par, n_chain, n_wb, n_wb_coef);
    $display("input_stalls=%0d output_stalls=%0d overflow_flags=%0d",
             n_in_stall, n_out_stall, n_ovf);
    chk(n_sub1 > 0 && n_sub2 > 0, "both subtractions exercised");
    chk(n_mux1_n > 0 && n_mux1_k > 0 && n_mux2_n > 0 && n_mux2_k > 0, "all multiplexer settings");
    chk(n_par > 0 && n_chain > 0, "parallel FCUs and CS chaining");
    chk(n_wb > 0 && n_wb_coef > 0, "write-back and write-back coefficient");
    chk(n_in_stall > 0 && n_out_stall > 0, "input and output stalls");
    chk(n_ovf > 0, "overflow flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

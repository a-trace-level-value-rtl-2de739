// tb_decoupled_tlvp: end-to-end test of the decoupled trace-level value
// predictor at its default sizes (1024-entry trace table, 4096-entry VHT).
//
// A small "program" of five traces runs for many iterations, as a core
// would report it: start of trace, retired instructions, end of trace.
//   T0  two registers, a constant and a stride (+4), one register rewritten
//   T1  a value repeating with period three, and a constant
//   T2  a stride (+1) broken by a random value every 13th iteration
//   T3  writes six registers: more than a trace entry holds (overflow)
//   T4  takes a different path (other registers, other next PC) every 7th
//       iteration
// For every trace the testbench works out, from the prediction stream it
// saw and the values the trace really produced, whether the prediction was
// right and whether a squash is due, and compares with verify_ok / squash.
// From the 20th iteration on, T0 and T1 must be predicted right and
// initiated, and T2 too except on its broken iterations, which must be
// squashed, and the two after them (the stride is relearned). The prediction latency (2 + 3n cycles) is checked every time.
// Each mechanism is counted and must happen at least once: trace-table
// miss and allocation, hit, initiation, 2bC decrement on a different path,
// pattern (PHT) and stride predictions, VHT miss, value replacement, right
// verification, squash and record overflow.
module tb_decoupled_tlvp;
  import tlvp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #2 rst_n = 1'b0;

  logic   start_valid, start_ready;
  pc_t    start_pc;
  logic   pred_valid, pred_conf, pred_done, pred_hit, pred_initiate;
  regid_t pred_reg;
  word_t  pred_value;
  pc_t    pred_next_pc;
  logic   ret_valid, ret_wr;
  regid_t ret_rd;
  pc_t    ret_pc;
  word_t  ret_value;
  logic   end_valid, end_ready;
  pc_t    end_next_pc;
  logic   verify_valid, verify_ok, squash, ready;
  logic [NREG-1:0] verify_wrong_mask;
  tlvp_events_t events;

  decoupled_tlvp dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 25) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters (observed inside the design) ----
  int c_tt_miss = 0, c_tt_hit = 0, c_alloc = 0, c_initiate = 0, c_tt_dec_diff = 0;
  int c_pht = 0, c_stride = 0, c_vht_miss = 0, c_replace = 0, c_ok = 0, c_squash = 0, c_overflow = 0, c_vp_correct = 0;
  always @(posedge clk) begin
    if (dut.u_ctrl.state_q == dut.u_ctrl.S_TT) begin
      if (dut.tt_lk_hit) c_tt_hit++; else c_tt_miss++;
      if (dut.tt_lk_initiate) c_initiate++;
    end
    if (events.tt_alloc) c_alloc++;
    if (dut.tt_upd_done && !dut.tt_upd_alloc && !dut.u_tt.same && dut.u_tt.lk_hit) c_tt_dec_diff++;
    if (events.vp_pred_hit) begin
      if (events.vp_pred_pht) c_pht++; else c_stride++;
    end
    if (events.vp_trn_miss) c_vht_miss++;
    if (events.vp_trn_replace) c_replace++;
    if (events.vp_trn_correct) c_vp_correct++;
    if (verify_valid && verify_ok) c_ok++;
    if (verify_valid && squash) c_squash++;
    if (dut.tb_rec_valid && dut.tb_rec.overflow) c_overflow++;
  end

  // ---- prediction stream capture ----
  regid_t p_reg [$];
  word_t  p_val [$];
  always @(posedge clk) if (pred_valid) begin p_reg.push_back(pred_reg); p_val.push_back(pred_value); end

  // ---- one instruction of a trace ----
  typedef struct { pc_t pc; bit wr; regid_t rd; word_t v; } instr_t;
  instr_t body [$];

  function automatic void add(pc_t pc, bit wr, regid_t rd, word_t v);
    instr_t x; x.pc = pc; x.wr = wr; x.rd = rd; x.v = v; body.push_back(x);
  endfunction

  // Run one trace: predict, execute, verify. Returns whether it was predicted
  // right and whether it was initiated / squashed.
  task automatic run_trace(input pc_t sp, input pc_t np, output bit ok, output bit init, output bit sq);
    int cyc, n_exp;
    regid_t a_reg [$];
    word_t  a_val [$];
    bit over, want_ok, found;
    // actual outputs of the trace: last writer per register, first-write order
    over = 0;
    foreach (body[i]) if (body[i].wr && body[i].rd != 0) begin
      found = 0;
      foreach (a_reg[j]) if (a_reg[j] == body[i].rd) begin found = 1; a_val[j] = body[i].v; end
      if (!found) begin
        if (a_reg.size() < NREG) begin a_reg.push_back(body[i].rd); a_val.push_back(body[i].v); end
        else over = 1;
      end
    end
    p_reg.delete(); p_val.delete();
    @(negedge clk);
    while (!start_ready) @(negedge clk);
    start_valid = 1; start_pc = sp;
    @(negedge clk);
    start_valid = 0;
    cyc = 1;
    while (!pred_done && cyc < 100) begin @(negedge clk); cyc++; end
    n_exp = p_reg.size();
    check(cyc == 2 + 3 * n_exp, $sformatf("trace %h: prediction took %0d cycles for %0d registers", sp, cyc, n_exp));
    init = pred_initiate;
    check(!init || pred_hit, "initiated without a hit");
    want_ok = pred_hit && !over && pred_next_pc == np && p_reg.size() == a_reg.size();
    if (want_ok) foreach (a_reg[j]) if (p_reg[j] != a_reg[j] || p_val[j] != a_val[j]) want_ok = 0;
    // execute the trace (retirements every cycle)
    foreach (body[i]) begin
      ret_valid = 1; ret_wr = body[i].wr; ret_rd = body[i].rd; ret_pc = body[i].pc; ret_value = body[i].v;
      @(negedge clk);
    end
    ret_valid = 0;
    while (!end_ready) @(negedge clk);
    end_valid = 1; end_next_pc = np;
    @(negedge clk);
    end_valid = 0;
    cyc = 0;
    while (!verify_valid && cyc < 10) begin @(negedge clk); cyc++; end
    check(verify_valid, "no verification result");
    check(verify_ok == want_ok, $sformatf("trace %h: verify_ok %0b want %0b", sp, verify_ok, want_ok));
    check(squash == (init && !want_ok), $sformatf("trace %h: squash %0b", sp, squash));
    ok = verify_ok; sq = squash;
    body.delete();
  endtask

  initial begin
    bit ok, init, sq;
    int it;
    start_valid = 0; start_pc = '0; ret_valid = 0; ret_wr = 0; ret_rd = '0; ret_pc = '0;
    ret_value = '0; end_valid = 0; end_next_pc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (ready);
    for (it = 0; it < 60; it++) begin
      bit broken;
      // T0
      add(32'h1000, 1, 5'd1, 32'd5);
      add(32'h1008, 1, 5'd2, 32'd1000 + 32'(it) * 4);
      add(32'h1010, 0, 5'd0, 32'd0);            // a store: no register written
      add(32'h1018, 1, 5'd1, 32'd9);
      run_trace(32'h1000, 32'h1040, ok, init, sq);
      if (it >= 20) check(ok && init, $sformatf("T0 iteration %0d: ok %0b initiated %0b", it, ok, init));
      // T1
      add(32'h1100, 1, 5'd3, (it % 3 == 0) ? 32'd10 : (it % 3 == 1) ? 32'd20 : 32'd30);
      add(32'h1108, 1, 5'd5, 32'hCAFE);
      add(32'h1110, 1, 5'd0, 32'd77);           // write to r0: ignored
      run_trace(32'h1100, 32'h1130, ok, init, sq);
      if (it >= 20) check(ok && init, $sformatf("T1 iteration %0d: ok %0b initiated %0b", it, ok, init));
      // T2
      broken = (it % 13 == 12);
      add(32'h1200, 1, 5'd6, broken ? $urandom : 32'(it));
      run_trace(32'h1200, 32'h1210, ok, init, sq);
      // a stride predictor needs two values after a break to find the stride again
      if (it >= 20 && !broken && it % 13 != 0 && it % 13 != 1) check(ok, $sformatf("T2 iteration %0d: not predicted", it));
      if (it >= 20 && broken) check(sq, $sformatf("T2 iteration %0d: broken value not squashed", it));
      // T3: six registers
      for (int r = 0; r < 6; r++) add(32'h1300 + 32'(r) * 8, 1, regid_t'(10 + r), 32'(r));
      run_trace(32'h1300, 32'h1340, ok, init, sq);
      check(!ok, "T3 overflowed but verified");
      // T4: two paths
      if (it % 7 == 6) begin
        add(32'h1400, 1, 5'd20, 32'd1);
        add(32'h1480, 1, 5'd21, 32'd2);
        run_trace(32'h1400, 32'h1500, ok, init, sq);
      end else begin
        add(32'h1400, 1, 5'd20, 32'd1);
        run_trace(32'h1400, 32'h1420, ok, init, sq);
      end
    end
    $display("trace table: miss %0d hit %0d alloc %0d initiate %0d decrement-on-other-path %0d",
             c_tt_miss, c_tt_hit, c_alloc, c_initiate, c_tt_dec_diff);
    $display("values: pattern %0d stride %0d vht-miss %0d replace %0d correct %0d; verify ok %0d squash %0d overflow %0d",
             c_pht, c_stride, c_vht_miss, c_replace, c_vp_correct, c_ok, c_squash, c_overflow);
    check(c_tt_miss > 0, "trace table miss never happened");
    check(c_tt_hit > 0, "trace table hit never happened");
    check(c_alloc > 0, "trace table allocation never happened");
    check(c_initiate > 0, "prediction never initiated");
    check(c_tt_dec_diff > 0, "2bC decrement on a different path never happened");
    check(c_pht > 0, "pattern prediction never happened");
    check(c_stride > 0, "stride prediction never happened");
    check(c_vht_miss > 0, "VHT miss never happened");
    check(c_replace > 0, "value replacement never happened");
    check(c_ok > 0, "right verification never happened");
    check(c_vp_correct > 0, "value predictor never right in training");
    check(c_squash > 0, "squash never happened");
    check(c_overflow > 0, "record overflow never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

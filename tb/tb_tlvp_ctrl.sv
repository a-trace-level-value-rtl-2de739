// tb_tlvp_ctrl: self-checking test of the predictor's sequencer.
// The testbench plays the trace table, the value predictor (ready when
// idle, answer two cycles after acceptance, like the real one), the trace
// builder and the verifier. Each round starts a trace whose table entry is
// random (hit or miss, 0..4 registers), then ends it with a random record.
// Checked: the value predictor is asked for exactly the entry's PCs in slot
// order and each answer is passed on with the right register and slot; the
// pred_done flags; the record and verdict passed to the trace table; the
// training requests (PC and value of each record slot, none on overflow);
// and the cycle counts: pred_done 2 + 3n cycles after start, idle again
// 4 + 3n cycles after end (4 when nothing is trained).
module tb_tlvp_ctrl;
  import tlvp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #2 rst_n = 1'b0;

  logic init_done, start_valid, start_ready, end_valid, end_ready;
  pc_t start_pc;
  logic pred_valid, pred_conf, pred_done, pred_hit, pred_initiate;
  regid_t pred_reg; word_t pred_value; pc_t pred_next_pc;
  logic tt_lk_en, tt_lk_hit, tt_lk_initiate, tt_upd_en, tt_upd_ok, tt_upd_done;
  pc_t tt_lk_pc; tt_entry_t tt_lk_entry; trace_rec_t tt_upd_rec;
  logic vp_req_valid, vp_req_ready, vp_req_train, vp_rsp_valid, vp_rsp_conf, vp_trn_done;
  pc_t vp_req_pc; word_t vp_req_value, vp_rsp_value;
  logic tb_start, tb_end, tb_rec_valid; trace_rec_t tb_rec;
  logic vf_clear, vf_set_shape, vf_pred_wr, vf_chk_en, vf_res_valid, vf_res_ok;
  logic [$clog2(NREG)-1:0] vf_pred_slot;

  tlvp_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- models of the surrounding blocks ----
  tt_entry_t cur_entry;
  bit        cur_hit;
  trace_rec_t cur_rec;
  bit        cur_ok;
  pc_t       req_log_pc [$];
  word_t     req_log_val [$];
  bit        req_log_train [$];
  int        vp_busy;      // cycles until the model answers
  bit        vp_train_q;
  pc_t       vp_pc_q;

  function automatic word_t vp_value_of(pc_t pc); return pc ^ 32'h5a5a_0000; endfunction

  always_ff @(posedge clk) begin
    tt_lk_hit      <= cur_hit;
    tt_lk_initiate <= cur_hit && cur_entry.ctr >= 2;
    tt_lk_entry    <= cur_entry;
    tt_upd_done    <= tt_upd_en;
    tb_rec_valid   <= tb_end;
    tb_rec         <= cur_rec;
    vf_res_valid   <= vf_chk_en;
    vf_res_ok      <= cur_ok;
    if (vp_req_valid && vp_req_ready) begin
      vp_busy    <= 2;
      vp_train_q <= vp_req_train;
      vp_pc_q    <= vp_req_pc;
      req_log_pc.push_back(vp_req_pc);
      req_log_val.push_back(vp_req_value);
      req_log_train.push_back(vp_req_train);
    end else if (vp_busy > 0) vp_busy <= vp_busy - 1;
  end
  assign vp_req_ready = (vp_busy == 0);
  assign vp_rsp_valid = (vp_busy == 1) && !vp_train_q;
  assign vp_trn_done  = (vp_busy == 1) && vp_train_q;
  assign vp_rsp_value = vp_value_of(vp_pc_q);
  assign vp_rsp_conf  = vp_pc_q[3];

  // prediction stream observed
  regid_t got_reg [$]; word_t got_val [$]; int got_slot [$];
  always @(posedge clk) if (pred_valid) begin
    got_reg.push_back(pred_reg); got_val.push_back(pred_value); got_slot.push_back(int'(vf_pred_slot));
    if (!vf_pred_wr) begin failures++; $display("FAIL: pred_valid without verifier write"); end
  end
  int n_upd = 0; trace_rec_t upd_seen; bit upd_ok_seen;
  always @(posedge clk) if (tt_upd_en) begin n_upd++; upd_seen = tt_upd_rec; upd_ok_seen = tt_upd_ok; end

  int n_hit = 0, n_miss = 0, n_over = 0, n_init = 0;

  initial begin
    init_done = 0; start_valid = 0; end_valid = 0; start_pc = '0;
    cur_entry = '0; cur_hit = 0; cur_rec = '0; cur_ok = 0; vp_busy = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!start_ready && !end_ready, "not ready before init_done");
    init_done = 1;
    for (int t = 0; t < 400; t++) begin
      int n, cyc, nt;
      pc_t sp;
      sp = {$urandom} & ~32'h7;
      n = $urandom_range(0, NREG);
      cur_hit = ($urandom_range(0, 4) != 0);
      cur_entry = '0;
      cur_entry.valid = 1; cur_entry.ctr = 2'($urandom); cur_entry.nregs = nreg_t'(n);
      cur_entry.next_pc = {$urandom} & ~32'h7;
      for (int j = 0; j < NREG; j++) begin
        cur_entry.reg_id[j] = regid_t'($urandom_range(1, 31));
        cur_entry.pcs[j] = {$urandom} & ~32'h7;
      end
      req_log_pc.delete(); req_log_val.delete(); req_log_train.delete();
      got_reg.delete(); got_val.delete(); got_slot.delete();
      // ---- prediction ----
      @(negedge clk);
      check(start_ready && end_ready, "idle: ready");
      start_valid = 1; start_pc = sp;
      #1 check(tt_lk_en && tt_lk_pc == sp && tb_start && vf_clear, "start: lookup, builder start, verifier clear");
      @(negedge clk);
      start_valid = 0;
      cyc = 1;
      while (!pred_done && cyc < 50) begin
        check(!start_ready, "not ready while predicting");
        @(negedge clk); cyc++;
      end
      nt = (cur_hit) ? n : 0;
      check(cyc == 2 + 3 * nt, $sformatf("pred_done after %0d cycles, want %0d", cyc, 2 + 3 * nt));
      check(pred_hit == cur_hit && pred_initiate == (cur_hit && cur_entry.ctr >= 2), "pred_done flags");
      if (cur_hit) check(pred_next_pc == cur_entry.next_pc, "pred_next_pc");
      check(req_log_pc.size() == nt && got_reg.size() == nt, $sformatf("%0d requests, %0d answers, want %0d", req_log_pc.size(), got_reg.size(), nt));
      for (int j = 0; j < nt && j < req_log_pc.size() && j < got_reg.size(); j++) begin
        check(!req_log_train[j] && req_log_pc[j] == cur_entry.pcs[j], $sformatf("predict request %0d pc", j));
        check(got_reg[j] == cur_entry.reg_id[j] && got_val[j] == vp_value_of(cur_entry.pcs[j]) && got_slot[j] == j,
              $sformatf("answer %0d", j));
      end
      if (cur_hit) n_hit++; else n_miss++;
      if (cur_hit && cur_entry.ctr >= 2) n_init++;
      // ---- training ----
      cur_rec = '0;
      cur_rec.start_pc = sp; cur_rec.next_pc = cur_entry.next_pc;
      n = $urandom_range(0, NREG);
      cur_rec.nregs = nreg_t'(n);
      cur_rec.overflow = ($urandom_range(0, 5) == 0);
      for (int j = 0; j < NREG; j++) begin
        cur_rec.reg_id[j] = regid_t'(j + 1);
        cur_rec.pcs[j] = {$urandom} & ~32'h7;
        cur_rec.values[j] = $urandom;
      end
      cur_ok = $urandom_range(0, 1);
      req_log_pc.delete(); req_log_val.delete(); req_log_train.delete();
      n_upd = 0;
      @(negedge clk);
      end_valid = 1;
      #1 check(tb_end, "end passed to the builder");
      @(negedge clk);
      end_valid = 0;
      cyc = 1;
      while (!end_ready && cyc < 50) begin @(negedge clk); cyc++; end
      nt = (cur_rec.overflow || n == 0) ? 0 : n;
      check(cyc == ((nt == 0) ? 4 : 4 + 3 * nt), $sformatf("idle after %0d cycles, want %0d", cyc, (nt == 0) ? 4 : 4 + 3 * nt));
      check(n_upd == 1 && upd_seen == cur_rec && upd_ok_seen == cur_ok, "trace table update");
      check(req_log_pc.size() == nt, $sformatf("%0d training requests, want %0d", req_log_pc.size(), nt));
      for (int j = 0; j < nt && j < req_log_pc.size(); j++)
        check(req_log_train[j] && req_log_pc[j] == cur_rec.pcs[j] && req_log_val[j] == cur_rec.values[j],
              $sformatf("training request %0d", j));
      if (cur_rec.overflow) n_over++;
    end
    $display("hits %0d misses %0d initiated %0d overflowed records %0d", n_hit, n_miss, n_init, n_over);
    check(n_hit > 0 && n_miss > 0 && n_init > 0 && n_over > 0, "a case never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_trace_table: self-checking test of the trace table.
// The testbench models the table (direct mapped, full tags) and its update
// rule: same trace -> 2bC up on a right prediction, down on a wrong one;
// a different or overflowed trace on an entry whose 2bC is not zero -> 2bC
// down, entry kept; otherwise a fitting trace is written with 2bC = 1.
// Random lookups and updates use four start PCs, two of which share an
// index, and two trace shapes per start PC. Every lookup result (hit,
// initiate, all fields) and every update's allocation flag is compared with
// the model; upd_done must come one cycle after upd_en.
module tb_trace_table;
  import tlvp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #2 rst_n = 1'b0;

  logic lk_en, lk_hit, lk_initiate, upd_en, upd_ok, upd_done, upd_alloc, busy, init_done;
  pc_t  lk_pc;
  tt_entry_t lk_entry;
  trace_rec_t upd_rec;

  trace_table dut (.*);

  int checks = 0, failures = 0;
  int n_alloc = 0, n_inc = 0, n_dec = 0, n_keep = 0, n_init = 0;
  tt_entry_t model [int];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pc_t starts [4];
  trace_rec_t shapes [4][2];

  function automatic int idx_of(pc_t p); return int'(p[PC_LSB +: 10]); endfunction

  function automatic trace_rec_t make_shape(pc_t sp, int v);
    trace_rec_t r;
    r = '0;
    r.start_pc = sp;
    r.next_pc  = sp + 32'h40 + 32'(v) * 8;
    r.nregs    = nreg_t'(1 + (v + int'(sp[5:3])) % NREG);
    for (int j = 0; j < NREG; j++) begin
      r.reg_id[j] = regid_t'(j + 1 + v * 5);
      r.pcs[j]    = sp + 32'(j) * 8 + 32'(v) * 16;
      r.values[j] = $urandom;
    end
    return r;
  endfunction

  function automatic bit same_trace(tt_entry_t e, trace_rec_t r);
    if (r.overflow || e.next_pc != r.next_pc || e.nregs != r.nregs) return 0;
    for (int j = 0; j < int'(r.nregs); j++)
      if (e.reg_id[j] != r.reg_id[j] || e.pcs[j] != r.pcs[j]) return 0;
    return 1;
  endfunction

  initial begin
    lk_en = 0; upd_en = 0; lk_pc = '0; upd_rec = '0; upd_ok = 0;
    starts[0] = 32'h0040_1000; starts[1] = 32'h0040_2008;
    starts[2] = 32'h0040_1000 + 32'(TT_ENTRIES * 8); starts[3] = 32'h0040_3110;
    for (int s = 0; s < 4; s++) for (int v = 0; v < 2; v++) shapes[s][v] = make_shape(starts[s], v);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (init_done);
    for (int it = 0; it < 4000; it++) begin
      int s, idx;
      bit hit;
      tt_entry_t e;
      @(negedge clk);
      s = $urandom_range(0, 3);
      idx = idx_of(starts[s]);
      hit = 1'b0;
      e = '0;
      if (model.exists(idx)) begin
        e = model[idx];
        hit = e.valid && e.tag == pc_tag(starts[s]);
      end
      if ($urandom_range(0, 1) == 0) begin
        lk_en = 1; lk_pc = starts[s];
        @(posedge clk);
        #1 lk_en = 0;
        check(lk_hit == hit, $sformatf("lookup %h hit %0b want %0b", starts[s], lk_hit, hit));
        check(lk_initiate == (hit && e.ctr >= 2), $sformatf("lookup %h initiate %0b", starts[s], lk_initiate));
        if (hit) begin
          check(lk_entry == e, $sformatf("lookup %h entry differs", starts[s]));
          if (e.ctr >= 2) n_init++;
        end
      end else begin
        trace_rec_t r;
        bit ok, same, want_alloc;
        // mostly the first shape, sometimes the second, rarely an overflow
        r = shapes[s][($urandom_range(0, 5) == 0) ? 1 : 0];
        if ($urandom_range(0, 15) == 0) r.overflow = 1'b1;
        ok = ($urandom_range(0, 3) != 0);
        // model
        same = hit && same_trace(e, r);
        want_alloc = 0;
        if (same) begin
          if (ok) e.ctr = sat2_inc(e.ctr); else e.ctr = sat2_dec(e.ctr);
          model[idx] = e;
          if (ok) n_inc++; else n_dec++;
        end else if (hit && e.ctr != 0) begin
          e.ctr = sat2_dec(e.ctr);
          model[idx] = e;
          n_keep++;
        end else if (!r.overflow) begin
          tt_entry_t n;
          n = '0;
          n.valid = 1; n.tag = pc_tag(r.start_pc); n.ctr = 2'd1;
          n.next_pc = r.next_pc; n.nregs = r.nregs;
          for (int j = 0; j < int'(r.nregs); j++) begin
            n.reg_id[j] = r.reg_id[j]; n.pcs[j] = r.pcs[j];
          end
          model[idx] = n;
          want_alloc = 1;
          n_alloc++;
        end
        upd_en = 1; upd_rec = r; upd_ok = ok;
        @(posedge clk);
        #1 upd_en = 0;
        check(busy && upd_done, "update: done and busy in the cycle after upd_en");
        check(upd_alloc == want_alloc, $sformatf("update %h alloc %0b want %0b", r.start_pc, upd_alloc, want_alloc));
        @(posedge clk);  // the write-back cycle; no new request while busy
      end
    end
    $display("alloc %0d inc %0d dec %0d hysteresis %0d initiating lookups %0d", n_alloc, n_inc, n_dec, n_keep, n_init);
    check(n_alloc > 3 && n_inc > 0 && n_dec > 0 && n_keep > 0 && n_init > 0, "a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

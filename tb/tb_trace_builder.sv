// tb_trace_builder: self-checking test of the trace builder.
// Random traces of 0..14 retired instructions over a few registers; some
// retirements write no register or register 0, some traces write more than
// four registers (overflow), and sometimes the last retirement comes in the
// same cycle as end. The testbench keeps its own list of (register, last
// writer PC, last value) in first-write order and compares the record, one
// cycle after end, field by field.
module tb_trace_builder;
  import tlvp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #2 rst_n = 1'b0;

  logic start, ret_valid, ret_wr, end_valid, rec_valid;
  pc_t start_pc, ret_pc, end_next_pc;
  regid_t ret_rd;
  word_t ret_value;
  trace_rec_t rec;

  trace_builder dut (.*);

  int checks = 0, failures = 0, n_over = 0, n_same_cycle = 0, n_refresh = 0;

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

  initial begin
    start = 0; ret_valid = 0; ret_wr = 0; end_valid = 0;
    start_pc = '0; ret_pc = '0; end_next_pc = '0; ret_rd = '0; ret_value = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      int n, nr, maxreg;
      bit over, same_cycle;
      regid_t m_reg [$];
      pc_t    m_pc  [$];
      word_t  m_val [$];
      pc_t sp, np;
      m_reg.delete(); m_pc.delete(); m_val.delete();
      over = 0;
      sp = {$urandom} & ~32'h7;
      np = {$urandom} & ~32'h7;
      maxreg = (t % 3 == 0) ? 7 : 4;
      @(negedge clk);
      start = 1; start_pc = sp;
      @(negedge clk);
      start = 0;
      n = $urandom_range(0, 14);
      same_cycle = ($urandom_range(0, 2) == 0) && n > 0;
      for (int i = 0; i < n; i++) begin
        bit found;
        ret_valid = 1;
        ret_wr = ($urandom_range(0, 4) != 0);
        ret_rd = regid_t'($urandom_range(0, maxreg));
        ret_pc = sp + 32'(i) * 8;
        ret_value = $urandom;
        if (ret_wr && ret_rd != 0) begin
          found = 0;
          foreach (m_reg[j]) if (m_reg[j] == ret_rd) begin
            found = 1; m_pc[j] = ret_pc; m_val[j] = ret_value; n_refresh++;
          end
          if (!found) begin
            if (m_reg.size() < NREG) begin m_reg.push_back(ret_rd); m_pc.push_back(ret_pc); m_val.push_back(ret_value); end
            else over = 1;
          end
        end
        if (i == n - 1 && same_cycle) begin
          end_valid = 1; end_next_pc = np; n_same_cycle++;
        end
        @(negedge clk);
        ret_valid = 0;
      end
      if (!same_cycle) begin
        if ($urandom_range(0, 1) == 0) @(negedge clk);
        end_valid = 1; end_next_pc = np;
        @(negedge clk);
      end
      end_valid = 0;
      check(rec_valid, "rec_valid one cycle after end");
      @(negedge clk);
      check(!rec_valid, "rec_valid is a one-cycle pulse");
      if (over) n_over++;
      check(rec.start_pc == sp && rec.next_pc == np, "start/next PC");
      check(rec.overflow == over, $sformatf("overflow %0b want %0b", rec.overflow, over));
      check(int'(rec.nregs) == m_reg.size(), $sformatf("nregs %0d want %0d", rec.nregs, m_reg.size()));
      foreach (m_reg[j])
        check(rec.reg_id[j] == m_reg[j] && rec.pcs[j] == m_pc[j] && rec.values[j] == m_val[j],
              $sformatf("slot %0d differs", j));
    end
    $display("overflows %0d, refreshed slots %0d, end with last retirement %0d", n_over, n_refresh, n_same_cycle);
    check(n_over > 0 && n_refresh > 0 && n_same_cycle > 0, "a case never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

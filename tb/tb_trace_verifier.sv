// tb_trace_verifier: self-checking test of the trace verifier.
// Each round clears the verifier, gives it a random trace-table answer
// (hit or not, initiated or not, next PC, registers) and predicted values,
// then checks it against a record that is either identical to the
// prediction or differs in one value, one register, the next PC, the
// register count, the start PC or the overflow flag. The expected ok,
// squash (initiated and not ok) and wrong-value mask are worked out in the
// testbench; results must come one cycle after chk_en.
module tb_trace_verifier;
  import tlvp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #2 rst_n = 1'b0;

  logic clear, set_shape, shp_hit, shp_initiate, pred_wr, chk_en;
  logic res_valid, res_ok, res_squash;
  pc_t clr_pc, shp_next_pc;
  nreg_t shp_nregs;
  logic [NREG-1:0][REG_W-1:0] shp_reg_id;
  logic [$clog2(NREG)-1:0] pred_slot;
  word_t pred_value;
  trace_rec_t chk_rec;
  logic [NREG-1:0] res_wrong_mask;

  trace_verifier dut (.*);

  int checks = 0, failures = 0, n_ok = 0, n_squash = 0, n_bad_quiet = 0;

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
    clear = 0; set_shape = 0; pred_wr = 0; chk_en = 0; shp_hit = 0; shp_initiate = 0;
    clr_pc = '0; shp_next_pc = '0; shp_nregs = '0; shp_reg_id = '0; pred_slot = '0;
    pred_value = '0; chk_rec = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      trace_rec_t r;
      bit hit, init, want_ok;
      int kind, n, jj;
      logic [NREG-1:0] want_mask;
      r = '0;
      r.start_pc = {$urandom} & ~32'h7;
      r.next_pc  = {$urandom} & ~32'h7;
      n = $urandom_range(0, NREG);
      r.nregs = nreg_t'(n);
      for (int j = 0; j < NREG; j++) begin
        r.reg_id[j] = regid_t'($urandom_range(1, 31));
        r.values[j] = $urandom;
      end
      hit = ($urandom_range(0, 5) != 0);
      init = hit && $urandom_range(0, 1);
      @(negedge clk);
      clear = 1; clr_pc = r.start_pc;
      @(negedge clk);
      clear = 0;
      set_shape = 1; shp_hit = hit; shp_initiate = init; shp_next_pc = r.next_pc;
      shp_nregs = r.nregs; shp_reg_id = r.reg_id;
      @(negedge clk);
      set_shape = 0;
      for (int j = 0; j < n; j++) begin
        pred_wr = 1; pred_slot = 2'(j); pred_value = r.values[j];
        @(negedge clk);
      end
      pred_wr = 0;
      // make the actual record differ, or not
      kind = $urandom_range(0, 7);
      want_mask = '0;
      case (kind)
        1: if (n > 0) begin jj = $urandom_range(0, n - 1); r.values[jj] ^= 32'h10; want_mask[jj] = 1; end
        2: if (n > 0) begin jj = $urandom_range(0, n - 1); r.reg_id[jj] ^= 5'h1; want_mask[jj] = 1; end
        3: r.next_pc += 8;
        4: if (n < NREG) begin r.nregs = nreg_t'(n + 1); want_mask[n] = 1; end
        5: r.start_pc += 8;
        6: r.overflow = 1;
        default: ;
      endcase
      want_ok = hit && want_mask == '0 && kind != 3 && kind != 5 && kind != 6;
      if (kind == 4 && n == NREG) want_ok = hit;
      chk_en = 1; chk_rec = r;
      @(negedge clk);
      chk_en = 0;
      check(res_valid, "res_valid one cycle after chk_en");
      check(res_ok == want_ok, $sformatf("round %0d kind %0d ok %0b want %0b", t, kind, res_ok, want_ok));
      check(res_squash == (init && !want_ok), $sformatf("round %0d squash %0b", t, res_squash));
      check(res_wrong_mask == want_mask, $sformatf("round %0d mask %b want %b", t, res_wrong_mask, want_mask));
      if (want_ok) n_ok++;
      if (init && !want_ok) n_squash++;
      if (!init && !want_ok) n_bad_quiet++;
    end
    $display("right %0d, squashes %0d, wrong but not initiated %0d", n_ok, n_squash, n_bad_quiet);
    check(n_ok > 0 && n_squash > 0 && n_bad_quiet > 0, "a case never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

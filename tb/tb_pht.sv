// tb_pht: self-checking test of the pattern history table.
// A reference array of counters, kept in the testbench, follows the rule:
// the counter of the actual code goes up, the other three go down, all
// saturating at 0 and 7; with upd_none all four go down. Random read-modify-write sequences on a small set
// of patterns drive counters into both saturation limits; every read is
// compared with the reference. Also checks that the table reads zero after
// its clearing sweep.
module tb_pht;
  import tlvp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic rd_en, upd_en, init_done;
  hist_t rd_pattern, upd_pattern;
  pht_ctrs_t rd_ctrs, upd_ctrs;
  code_t upd_code;
  logic upd_none;

  pht dut (.*);

  int checks = 0, failures = 0;
  int unsigned ref_ctr [int][NVAL];
  int sat_hi = 0, sat_lo = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hist_t pats [8];
    rd_en = 0; upd_en = 0; rd_pattern = '0; upd_pattern = '0; upd_ctrs = '0; upd_code = '0; upd_none = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (init_done);
    @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      pats[i] = hist_t'($urandom);
      for (int c = 0; c < NVAL; c++) ref_ctr[int'(pats[i])][c] = 0;
    end
    for (int it = 0; it < 2000; it++) begin
      hist_t p;
      code_t code;
      bit none;
      p = pats[$urandom_range(0, 7)];
      // mostly the same code per pattern so counters saturate high too
      code = ($urandom_range(0, 3) != 0) ? code_t'(p[1:0]) : code_t'($urandom);
      none = ($urandom_range(0, 7) == 0);
      rd_en <= 1; rd_pattern <= p;
      @(posedge clk);
      rd_en <= 0;
      @(posedge clk);
      #1;
      for (int c = 0; c < NVAL; c++)
        check(int'(rd_ctrs[c]) == ref_ctr[int'(p)][c],
              $sformatf("pattern %h counter %0d: got %0d want %0d", p, c, rd_ctrs[c], ref_ctr[int'(p)][c]));
      upd_en <= 1; upd_pattern <= p; upd_ctrs <= rd_ctrs; upd_code <= code; upd_none <= none;
      @(posedge clk);
      upd_en <= 0;
      for (int c = 0; c < NVAL; c++) begin
        if (!none && c == int'(code)) begin
          if (ref_ctr[int'(p)][c] == 7) sat_hi++; else ref_ctr[int'(p)][c]++;
        end else begin
          if (ref_ctr[int'(p)][c] == 0) sat_lo++; else ref_ctr[int'(p)][c]--;
        end
      end
    end
    check(sat_hi > 0, "upper saturation never exercised");
    check(sat_lo > 0, "lower saturation never exercised");
    $display("saturations: high %0d low %0d", sat_hi, sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tt_size_sweep: the same program on predictors whose trace tables have
// 128, 512, 1024 (default) and 4096 entries, all with a 4096-entry VHT.
//
// The program has 300 traces, more than the 128-entry table can hold, run
// in order for 12 rounds, so that the small table keeps losing entries.
// Checked:
//   - every verification agrees with the testbench's own comparison;
//   - tables that hold every trace (512, 1024, 4096 entries) behave
//     identically and get at least 95% of the values of rounds 3 onward right;
//   - the 128-entry table gets fewer values right than the 512-entry one.
// Printed per size: values predicted, values right, prediction accuracy
// (right / predicted), traces verified right and traces initiated.
module tb_tt_size_sweep;
  localparam int NS = 4;
  localparam int unsigned SIZES [NS] = '{128, 512, 1024, 4096};
  localparam int N_TRACES = 300;
  localparam int ROUNDS   = 12;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #2 rst_n = 1'b0;

  logic done [NS];
  int n_values [NS], n_correct [NS], n_ok [NS], n_init [NS], errors [NS];

  for (genvar s = 0; s < NS; s++) begin : g_size
    tlvp_workload_driver #(.TT_DEPTH(SIZES[s]), .N_TRACES(N_TRACES), .ROUNDS(ROUNDS)) u_drv (
      .clk, .rst_n, .done(done[s]), .n_values(n_values[s]), .n_correct(n_correct[s]),
      .n_traces_ok(n_ok[s]), .n_initiated(n_init[s]), .errors(errors[s]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int s = 0; s < NS; s++) begin
      $display("TT %4d entries: values predicted %5d right %5d (accuracy %0d%%), traces right %4d, initiated %4d",
               SIZES[s], n_values[s], n_correct[s],
               (n_values[s] > 0) ? (100 * n_correct[s] / n_values[s]) : 0, n_ok[s], n_init[s]);
      check(errors[s] == 0, $sformatf("TT %0d: %0d verification mismatches", SIZES[s], errors[s]));
    end
    // 600 values per round; rounds 3..12 are 10 rounds of 600
    for (int s = 1; s < NS; s++) begin
      check(n_correct[s] == n_correct[1] && n_ok[s] == n_ok[1] && n_init[s] == n_init[1],
            $sformatf("TT %0d differs from TT %0d though both hold every trace", SIZES[s], SIZES[1]));
      check(n_correct[s] >= (95 * 600 * (ROUNDS - 2)) / 100,
            $sformatf("TT %0d: only %0d values right", SIZES[s], n_correct[s]));
    end
    check(n_correct[0] < n_correct[1], "128-entry table not worse than 512-entry one on 300 traces");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

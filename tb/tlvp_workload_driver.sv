// tlvp_workload_driver: drives one decoupled_tlvp instance through a
// synthetic program and counts how well it predicts. Used by
// tb_tt_size_sweep to compare trace-table sizes on the same program.
//
// The program has N_TRACES traces laid out 0x48 bytes apart (so they fall
// on distinct table indices up to the table size), run in order for ROUNDS
// rounds. Trace i writes two registers: a constant (i + 1) and a stride
// value (round * (i + 1)). Counted per instance: values predicted on a
// trace-table hit, values predicted right, traces verified right and
// traces whose prediction was initiated. Every verification is also
// checked against the testbench's own comparison; mismatches are counted in
// `errors`. `done` rises when the program has finished.
module tlvp_workload_driver
  import tlvp_pkg::*;
#(
  parameter int unsigned TT_DEPTH = 1024,
  parameter int N_TRACES = 300,
  parameter int ROUNDS   = 12
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   n_values,
  output int   n_correct,
  output int   n_traces_ok,
  output int   n_initiated,
  output int   errors
);

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

  decoupled_tlvp #(.TT_DEPTH(TT_DEPTH)) dut (.*);

  regid_t p_reg [$];
  word_t  p_val [$];
  always @(posedge clk) if (pred_valid) begin p_reg.push_back(pred_reg); p_val.push_back(pred_value); end

  initial begin
    done = 0; n_values = 0; n_correct = 0; n_traces_ok = 0; n_initiated = 0; errors = 0;
    start_valid = 0; start_pc = '0; ret_valid = 0; ret_wr = 0; ret_rd = '0; ret_pc = '0;
    ret_value = '0; end_valid = 0; end_next_pc = '0;
    @(posedge rst_n);
    wait (ready);
    for (int r = 0; r < ROUNDS; r++) begin
      for (int i = 0; i < N_TRACES; i++) begin
        pc_t sp, np;
        word_t v0, v1;
        bit want_ok;
        sp = 32'h0010_0000 + 32'(i) * 32'h48;
        np = sp + 32'h48;
        v0 = 32'(i + 1);
        v1 = 32'(r) * 32'(i + 1);
        p_reg.delete(); p_val.delete();
        @(negedge clk);
        while (!start_ready) @(negedge clk);
        start_valid = 1; start_pc = sp;
        @(negedge clk);
        start_valid = 0;
        while (!pred_done) @(negedge clk);
        if (pred_initiate) n_initiated++;
        if (pred_hit) begin
          n_values += p_reg.size();
          foreach (p_reg[j]) begin
            if ((p_reg[j] == 5'd1 && p_val[j] == v0) || (p_reg[j] == 5'd2 && p_val[j] == v1)) n_correct++;
          end
        end
        want_ok = pred_hit && pred_next_pc == np && p_reg.size() == 2
                  && p_reg[0] == 5'd1 && p_val[0] == v0 && p_reg[1] == 5'd2 && p_val[1] == v1;
        ret_valid = 1; ret_wr = 1; ret_rd = 5'd1; ret_pc = sp;     ret_value = v0;
        @(negedge clk);
        ret_rd = 5'd2; ret_pc = sp + 8; ret_value = v1;
        @(negedge clk);
        ret_valid = 0;
        while (!end_ready) @(negedge clk);
        end_valid = 1; end_next_pc = np;
        @(negedge clk);
        end_valid = 0;
        while (!verify_valid) @(negedge clk);
        if (verify_ok != want_ok || squash != (pred_initiate && !want_ok)) errors++;
        if (verify_ok) n_traces_ok++;
      end
    end
    done = 1;
  end

endmodule

// decoupled_tlvp: decoupled trace-level value predictor, the value predictor
// (VP) of one processing element of a Contrail processor.
//
// A Contrail processor skips traces whose results can be predicted: the
// fast speculation stream jumps from a trace's first PC to the PC after it
// with the trace's output registers set to predicted values, and a slow,
// low-voltage verification stream executes the skipped trace later and
// checks the prediction. This module makes those trace-level predictions.
// Instead of one wide table holding the value history of every register of
// every trace, it keeps trace information (trace table: tag, 2-bit counter,
// next PC, register identifiers, producer PCs) apart from value information
// (an instruction-level value predictor: VHT + PHT), and asks the latter once
// per register of the trace, one register per access.
//
// Blocks: trace_table, inst_value_predictor (vht, pht), trace_builder,
// trace_verifier, tlvp_ctrl. Core interface:
//   start_valid/start_pc/start_ready  a trace begins at start_pc: predict it
//   pred_valid, pred_reg, pred_value, pred_conf  one predicted register
//   pred_done, pred_hit, pred_initiate, pred_next_pc  end of the prediction;
//                                      pred_initiate: the trace may be skipped
//   ret_*                              retired instructions of the trace, as
//                                      executed (by the verification stream)
//   end_valid/end_next_pc/end_ready    the executed trace ended
//   verify_valid, verify_ok, squash    outcome; squash: an initiated
//                                      prediction was wrong
//   verify_wrong_mask                  register slots predicted wrongly
//   ready                              tables cleared after reset
//   events                             one-cycle strobes for performance
//                                      counters (tlvp_pkg::tlvp_events_t)
// Retirements are accepted every cycle. One trace is handled at a time:
// start, retirements, end, then the next start. Timing is given in
// tlvp_ctrl; after reset the tables clear themselves (VHT_ENTRIES cycles)
// before start_ready rises.
module decoupled_tlvp
  import tlvp_pkg::*;
#(
  parameter int unsigned TT_DEPTH  = TT_ENTRIES,
  parameter int unsigned VHT_DEPTH = VHT_ENTRIES
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start_valid,
  input  pc_t    start_pc,
  output logic   start_ready,
  output logic   pred_valid,
  output regid_t pred_reg,
  output word_t  pred_value,
  output logic   pred_conf,
  output logic   pred_done,
  output logic   pred_hit,
  output logic   pred_initiate,
  output pc_t    pred_next_pc,
  input  logic   ret_valid,
  input  logic   ret_wr,
  input  regid_t ret_rd,
  input  pc_t    ret_pc,
  input  word_t  ret_value,
  input  logic   end_valid,
  input  pc_t    end_next_pc,
  output logic   end_ready,
  output logic   verify_valid,
  output logic   verify_ok,
  output logic   squash,
  output logic [NREG-1:0] verify_wrong_mask,
  output logic   ready,
  output tlvp_events_t events
);

  // trace table
  logic       tt_lk_en, tt_lk_hit, tt_lk_initiate;
  pc_t        tt_lk_pc;
  tt_entry_t  tt_lk_entry;
  logic       tt_upd_en, tt_upd_ok, tt_upd_done, tt_upd_alloc, tt_busy, tt_init;
  logic       unused_tt_busy;
  trace_rec_t tt_upd_rec;
  // value predictor
  logic  vp_req_valid, vp_req_ready, vp_req_train;
  pc_t   vp_req_pc;
  word_t vp_req_value, vp_rsp_value;
  logic  vp_rsp_valid, vp_rsp_hit, vp_rsp_conf, vp_rsp_from_pht;
  logic  vp_trn_done, vp_trn_correct, vp_trn_miss, vp_trn_replace, vp_init;
  // builder and verifier
  logic       tb_start, tb_end, tb_rec_valid;
  trace_rec_t tb_rec;
  logic       vf_clear, vf_set_shape, vf_pred_wr, vf_chk_en, vf_res_valid, vf_res_ok;
  logic [$clog2(NREG)-1:0] vf_pred_slot;

  assign ready = tt_init && vp_init;

  trace_table #(.ENTRIES(TT_DEPTH)) u_tt (
    .clk, .rst_n,
    .lk_en      (tt_lk_en),
    .lk_pc      (tt_lk_pc),
    .lk_hit     (tt_lk_hit),
    .lk_initiate(tt_lk_initiate),
    .lk_entry   (tt_lk_entry),
    .upd_en     (tt_upd_en),
    .upd_rec    (tt_upd_rec),
    .upd_ok     (tt_upd_ok),
    .upd_done   (tt_upd_done),
    .upd_alloc  (tt_upd_alloc),
    .busy       (tt_busy),
    .init_done  (tt_init)
  );

  inst_value_predictor #(.ENTRIES(VHT_DEPTH)) u_vp (
    .clk, .rst_n,
    .req_valid   (vp_req_valid),
    .req_ready   (vp_req_ready),
    .req_train   (vp_req_train),
    .req_pc      (vp_req_pc),
    .req_value   (vp_req_value),
    .rsp_valid   (vp_rsp_valid),
    .rsp_hit     (vp_rsp_hit),
    .rsp_conf    (vp_rsp_conf),
    .rsp_from_pht(vp_rsp_from_pht),
    .rsp_value   (vp_rsp_value),
    .trn_done    (vp_trn_done),
    .trn_correct (vp_trn_correct),
    .trn_miss    (vp_trn_miss),
    .trn_replace (vp_trn_replace),
    .init_done   (vp_init)
  );

  trace_builder u_builder (
    .clk, .rst_n,
    .start      (tb_start),
    .start_pc   (start_pc),
    .ret_valid  (ret_valid),
    .ret_wr     (ret_wr),
    .ret_rd     (ret_rd),
    .ret_pc     (ret_pc),
    .ret_value  (ret_value),
    .end_valid  (tb_end),
    .end_next_pc(end_next_pc),
    .rec_valid  (tb_rec_valid),
    .rec        (tb_rec)
  );

  trace_verifier u_verifier (
    .clk, .rst_n,
    .clear         (vf_clear),
    .clr_pc        (start_pc),
    .set_shape     (vf_set_shape),
    .shp_hit       (tt_lk_hit),
    .shp_initiate  (tt_lk_initiate),
    .shp_next_pc   (tt_lk_entry.next_pc),
    .shp_nregs     (tt_lk_entry.nregs),
    .shp_reg_id    (tt_lk_entry.reg_id),
    .pred_wr       (vf_pred_wr),
    .pred_slot     (vf_pred_slot),
    .pred_value    (vp_rsp_value),
    .chk_en        (vf_chk_en),
    .chk_rec       (tb_rec),
    .res_valid     (vf_res_valid),
    .res_ok        (vf_res_ok),
    .res_squash    (squash),
    .res_wrong_mask(verify_wrong_mask)
  );

  assign verify_valid = vf_res_valid;

  // The sequencer never overlaps table operations, so the trace table's busy
  // flag is not needed here; the assertion below checks that instead.
  assign unused_tt_busy = tt_busy;
  a_no_lookup_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    tt_busy |-> !tt_lk_en && !tt_upd_en);

  always_comb begin
    events.tt_alloc       = tt_upd_done && tt_upd_alloc;
    events.vp_pred_hit    = vp_rsp_valid && vp_rsp_hit;
    events.vp_pred_pht    = vp_rsp_valid && vp_rsp_from_pht;
    events.vp_trn_correct = vp_trn_done && vp_trn_correct;
    events.vp_trn_miss    = vp_trn_done && vp_trn_miss;
    events.vp_trn_replace = vp_trn_done && vp_trn_replace;
  end
  assign verify_ok    = vf_res_ok;

  tlvp_ctrl u_ctrl (
    .clk, .rst_n,
    .init_done     (ready),
    .start_valid, .start_pc, .start_ready,
    .end_valid, .end_ready,
    .pred_valid, .pred_reg, .pred_value, .pred_conf,
    .pred_done, .pred_hit, .pred_initiate, .pred_next_pc,
    .tt_lk_en, .tt_lk_pc, .tt_lk_hit, .tt_lk_initiate, .tt_lk_entry,
    .tt_upd_en, .tt_upd_rec, .tt_upd_ok, .tt_upd_done,
    .vp_req_valid, .vp_req_ready, .vp_req_train, .vp_req_pc, .vp_req_value,
    .vp_rsp_valid, .vp_rsp_value, .vp_rsp_conf, .vp_trn_done,
    .tb_start, .tb_end, .tb_rec_valid, .tb_rec,
    .vf_clear, .vf_set_shape, .vf_pred_wr, .vf_pred_slot,
    .vf_chk_en, .vf_res_valid, .vf_res_ok
  );

  // Handshake rules
  property p_one_op;
    @(posedge clk) disable iff (!rst_n) !(tt_lk_en && tt_upd_en);
  endproperty
  a_one_op: assert property (p_one_op);
  a_start_needs_ready: assert property (@(posedge clk) disable iff (!rst_n)
    start_valid && !start_ready |=> start_valid);

endmodule

// tlvp_ctrl: sequencer of the decoupled trace-level value predictor.
//
// Prediction (start_valid & start_ready, start_pc = first PC of a trace):
// the trace table is looked up with start_pc. On a hit the instruction-level
// value predictor is asked once per register slot of the trace, in slot
// order, with the PC stored for that slot; each answer leaves on the
// pred_valid stream (register identifier, value, per-value confidence) and
// is handed to the verifier. pred_done then pulses with pred_hit,
// pred_initiate (TT 2bC >= 2: the trace may be skipped) and pred_next_pc.
// Referring to one instruction-level predictor several times, one register
// after another, is the decoupled organisation; the order and the handshake
// are this design's choices.
//
// Training (end_valid & end_ready, end_next_pc = PC after the trace): the
// trace builder closes the trace record, the verifier compares it with the
// prediction (verify_valid, verify_ok, squash), the trace table's 2bC is
// counted up or down (or a new entry is written), and the VHT is trained
// with the final value of each register of the record, one register after
// another. The VHT is trained only with these live-out values, which are
// the values it is asked for; this is this design's choice.
//
// start_ready and end_ready are high only when the sequencer is idle and the
// tables have finished clearing after reset. Timing with the value predictor
// of this design (three cycles per request): pred_done comes 2 + 3n cycles
// after the start of a trace whose table entry has n registers (2 on a
// miss); after an end the sequencer is idle again 4 + 3n cycles later for a
// record of n registers (4 when nothing is trained).
module tlvp_ctrl
  import tlvp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init_done,
  // core side
  input  logic       start_valid,
  input  pc_t        start_pc,
  output logic       start_ready,
  input  logic       end_valid,
  output logic       end_ready,
  output logic       pred_valid,
  output regid_t     pred_reg,
  output word_t      pred_value,
  output logic       pred_conf,
  output logic       pred_done,
  output logic       pred_hit,
  output logic       pred_initiate,
  output pc_t        pred_next_pc,
  // trace table
  output logic       tt_lk_en,
  output pc_t        tt_lk_pc,
  input  logic       tt_lk_hit,
  input  logic       tt_lk_initiate,
  input  tt_entry_t  tt_lk_entry,
  output logic       tt_upd_en,
  output trace_rec_t tt_upd_rec,
  output logic       tt_upd_ok,
  input  logic       tt_upd_done,
  // instruction-level value predictor
  output logic       vp_req_valid,
  input  logic       vp_req_ready,
  output logic       vp_req_train,
  output pc_t        vp_req_pc,
  output word_t      vp_req_value,
  input  logic       vp_rsp_valid,
  input  word_t      vp_rsp_value,
  input  logic       vp_rsp_conf,
  input  logic       vp_trn_done,
  // trace builder
  output logic       tb_start,
  output logic       tb_end,
  input  logic       tb_rec_valid,
  input  trace_rec_t tb_rec,
  // verifier
  output logic       vf_clear,
  output logic       vf_set_shape,
  output logic       vf_pred_wr,
  output logic [$clog2(NREG)-1:0] vf_pred_slot,
  output logic       vf_chk_en,
  input  logic       vf_res_valid,
  input  logic       vf_res_ok
);

  typedef enum logic [3:0] {
    S_IDLE, S_TT, S_PRQ, S_PRW, S_PDONE,
    S_REC, S_VER, S_TTU, S_TRQ, S_TRW
  } state_e;

  localparam int unsigned SW = $clog2(NREG);

  state_e     state_q;
  logic [SW-1:0] slot_q;
  tt_entry_t  ent_q;
  logic       hit_q, init_q;
  trace_rec_t rec_q;

  logic start_fire, end_fire, last_slot_p, last_slot_t;

  assign start_ready = (state_q == S_IDLE) && init_done;
  assign end_ready   = (state_q == S_IDLE) && init_done && !start_valid;
  assign start_fire  = start_valid && start_ready;
  assign end_fire    = end_valid && end_ready;
  assign last_slot_p = (nreg_t'(slot_q) + 1'b1) >= ent_q.nregs;
  assign last_slot_t = (nreg_t'(slot_q) + 1'b1) >= rec_q.nregs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      slot_q  <= '0;
      hit_q   <= 1'b0;
      init_q  <= 1'b0;
      ent_q   <= '0;
      rec_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (start_fire)    state_q <= S_TT;
          else if (end_fire) state_q <= S_REC;
        end
        S_TT: begin
          ent_q  <= tt_lk_entry;
          hit_q  <= tt_lk_hit;
          init_q <= tt_lk_initiate;
          slot_q <= '0;
          state_q <= (tt_lk_hit && tt_lk_entry.nregs != '0) ? S_PRQ : S_PDONE;
        end
        S_PRQ: if (vp_req_ready) state_q <= S_PRW;
        S_PRW: if (vp_rsp_valid) begin
          slot_q  <= slot_q + 1'b1;
          state_q <= last_slot_p ? S_PDONE : S_PRQ;
        end
        S_PDONE: state_q <= S_IDLE;
        S_REC: if (tb_rec_valid) begin
          rec_q   <= tb_rec;
          state_q <= S_VER;
        end
        S_VER: if (vf_res_valid) state_q <= S_TTU;
        S_TTU: if (tt_upd_done) begin
          slot_q  <= '0;
          state_q <= (!rec_q.overflow && rec_q.nregs != '0) ? S_TRQ : S_IDLE;
        end
        S_TRQ: if (vp_req_ready) state_q <= S_TRW;
        S_TRW: if (vp_trn_done) begin
          slot_q  <= slot_q + 1'b1;
          state_q <= last_slot_t ? S_IDLE : S_TRQ;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Trace table
  assign tt_lk_en   = start_fire;
  assign tt_lk_pc   = start_pc;
  assign tt_upd_en  = (state_q == S_VER) && vf_res_valid;
  assign tt_upd_rec = rec_q;
  assign tt_upd_ok  = vf_res_ok;

  // Instruction-level value predictor
  assign vp_req_valid = (state_q == S_PRQ) || (state_q == S_TRQ);
  assign vp_req_train = (state_q == S_TRQ);
  assign vp_req_pc    = (state_q == S_TRQ) ? rec_q.pcs[slot_q] : ent_q.pcs[slot_q];
  assign vp_req_value = rec_q.values[slot_q];

  // Trace builder and verifier
  assign tb_start     = start_fire;
  assign tb_end       = end_fire;
  assign vf_clear     = start_fire;
  assign vf_set_shape = (state_q == S_TT);
  assign vf_pred_wr   = (state_q == S_PRW) && vp_rsp_valid;
  assign vf_pred_slot = slot_q;
  assign vf_chk_en    = (state_q == S_REC) && tb_rec_valid;

  // Prediction stream to the core
  assign pred_valid    = (state_q == S_PRW) && vp_rsp_valid;
  assign pred_reg      = ent_q.reg_id[slot_q];
  assign pred_value    = vp_rsp_value;
  assign pred_conf     = vp_rsp_conf;
  assign pred_done     = (state_q == S_PDONE);
  assign pred_hit      = hit_q;
  assign pred_initiate = init_q;
  assign pred_next_pc  = ent_q.next_pc;

endmodule

// inst_value_predictor: instruction-level value predictor (VHT + PHT) that the
// trace table refers to once per register of a trace.
//
// Each VHT entry keeps the last four distinct values an instruction produced
// (codes 00..11), their recency order (LRU Info), the difference between its
// last two values (Stride), a confidence State and the pattern of the codes
// of its last HIST_P outcomes. The pattern indexes the PHT, whose four
// counters choose one of the four values.
//
// Prediction of the value of the instruction at req_pc:
//   - the value whose PHT counter is largest (lowest code on a tie) if that
//     counter is at least CTR_THRESH ("pattern" prediction, rsp_from_pht);
//   - otherwise the most recent value plus Stride ("stride" prediction);
//   - rsp_hit says the VHT holds the instruction, rsp_conf that State >= 2.
// Training with the actual value at req_pc:
//   - on a VHT miss a new entry is written (value in slot 00, State 0);
//   - on a hit the actual value's code is the slot holding it, or the least
//     recently seen slot, which takes the new value; that code is moved to
//     the front of LRU Info and shifted into the history; Stride becomes
//     actual minus the previous most recent value; State counts up if the
//     prediction the entry would have given was right, down otherwise; the
//     PHT counter of that code counts up and the other three count down
//     (all four count down when the value was not among the stored ones).
// The fields, the PHT counter rule and the use of the pattern to index the
// PHT follow the predictor's description. How Stride and State take part in
// a prediction, the tie rule, the allocation values and the one-request-at-
// a-time operation are this design's choices.
//
// Interface and timing: a request (req_valid & req_ready) is accepted only
// when idle; req_train selects training. The result appears two cycles after
// acceptance, for one cycle: rsp_valid for a prediction, trn_done (with
// trn_correct, trn_miss) for training. One request every three cycles.
module inst_value_predictor
  import tlvp_pkg::*;
#(
  parameter int unsigned ENTRIES = VHT_ENTRIES
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  req_valid,
  output logic  req_ready,
  input  logic  req_train,
  input  pc_t   req_pc,
  input  word_t req_value,
  output logic  rsp_valid,
  output logic  rsp_hit,
  output logic  rsp_conf,
  output logic  rsp_from_pht,
  output word_t rsp_value,
  output logic  trn_done,
  output logic  trn_correct,
  output logic  trn_miss,
  output logic  trn_replace,     // training replaced a stored data value
  output logic  init_done
);

  typedef enum logic [1:0] {S_IDLE, S_VHT, S_PHT} state_e;
  state_e state_q;

  logic  train_q;
  pc_t   pc_q;
  word_t value_q;
  logic  hit_q;
  vht_entry_t ent_q;

  logic       vht_hit;
  vht_entry_t vht_entry;
  logic       vht_wr;
  vht_entry_t vht_wdata;
  logic       vht_init, pht_init;

  pht_ctrs_t  pht_ctrs;
  logic       pht_upd;
  code_t      act_code;

  logic match;     // actual value found among the stored values
  logic correct;   // the entry's prediction equals the actual value
  logic accept;
  assign req_ready = (state_q == S_IDLE) && init_done;
  assign accept    = req_valid && req_ready;
  assign init_done = vht_init && pht_init;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= S_IDLE;
    else begin
      unique case (state_q)
        S_IDLE: if (accept) state_q <= S_VHT;
        S_VHT:  state_q <= S_PHT;
        S_PHT:  state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      train_q <= req_train;
      pc_q    <= req_pc;
      value_q <= req_value;
    end
    if (state_q == S_VHT) begin
      hit_q <= vht_hit;
      ent_q <= vht_entry;
    end
  end

  vht #(.ENTRIES(ENTRIES)) u_vht (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_en    (accept),
    .rd_pc    (req_pc),
    .rd_hit   (vht_hit),
    .rd_entry (vht_entry),
    .wr_en    (vht_wr),
    .wr_pc    (pc_q),
    .wr_entry (vht_wdata),
    .init_done(vht_init)
  );

  pht u_pht (
    .clk        (clk),
    .rst_n      (rst_n),
    .rd_en      (state_q == S_VHT),
    .rd_pattern (vht_entry.hist),
    .rd_ctrs    (pht_ctrs),
    .upd_en     (pht_upd),
    .upd_pattern(ent_q.hist),
    .upd_ctrs   (pht_ctrs),
    .upd_code   (act_code),
    .upd_none   (!match),
    .init_done  (pht_init)
  );

  // Prediction from the entry and its PHT counters
  code_t            best;
  logic [CTR_W-1:0] best_ctr;
  word_t            pred_value;
  logic             pred_pht;

  always_comb begin
    best     = '0;
    best_ctr = pht_ctrs[0];
    for (int i = 1; i < NVAL; i++) begin
      if (pht_ctrs[i] > best_ctr) begin
        best     = code_t'(i);
        best_ctr = pht_ctrs[i];
      end
    end
    pred_pht   = (best_ctr >= CTR_W'(CTR_THRESH));
    pred_value = pred_pht ? ent_q.values[best]
                          : ent_q.values[ent_q.lru[0]] + ent_q.stride;
  end

  // Training: which slot the actual value occupies, and the new entry

  always_comb begin
    match    = 1'b0;
    act_code = ent_q.lru[NVAL-1];
    for (int i = NVAL - 1; i >= 0; i--) begin
      if (ent_q.values[i] == value_q) begin
        match    = 1'b1;
        act_code = code_t'(i);
      end
    end
    correct = hit_q && (pred_value == value_q);
  end

  always_comb begin
    int k;
    vht_wdata = ent_q;
    k = 1;
    if (!hit_q) begin
      vht_wdata        = '0;
      vht_wdata.valid  = 1'b1;
      vht_wdata.tag    = pc_tag(pc_q);
      vht_wdata.values[0] = value_q;
      for (int i = 0; i < NVAL; i++) vht_wdata.lru[i] = code_t'(i);
    end else begin
      vht_wdata.values[act_code] = value_q;
      vht_wdata.stride = value_q - ent_q.values[ent_q.lru[0]];
      vht_wdata.state  = correct ? sat2_inc(ent_q.state) : sat2_dec(ent_q.state);
      vht_wdata.hist   = {ent_q.hist[HIST_W-3:0], act_code};
      vht_wdata.lru[0] = act_code;
      for (int i = 0; i < NVAL; i++) begin
        if (ent_q.lru[i] != act_code && k < NVAL) begin
          vht_wdata.lru[k] = ent_q.lru[i];
          k = k + 1;
        end
      end
    end
  end

  assign vht_wr  = (state_q == S_PHT) && train_q;
  assign pht_upd = (state_q == S_PHT) && train_q && hit_q;

  assign rsp_valid    = (state_q == S_PHT) && !train_q;
  assign rsp_hit      = hit_q;
  assign rsp_conf     = hit_q && (ent_q.state >= 2'(STATE_PREDICT));
  assign rsp_from_pht = hit_q && pred_pht;
  assign rsp_value    = hit_q ? pred_value : '0;

  assign trn_done    = (state_q == S_PHT) && train_q;
  assign trn_correct = correct;
  assign trn_miss    = !hit_q;
  assign trn_replace = hit_q && !match;

endmodule

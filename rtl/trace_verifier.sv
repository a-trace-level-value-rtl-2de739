// trace_verifier: checks the values predicted for a trace against the values
// the trace actually produced.
//
// clear (with clr_pc) starts a new trace: the stored prediction is emptied.
// set_shape stores what the trace table said about the trace: that it hit
// (shp_hit), whether the prediction is initiated (shp_initiate, from the
// 2bC), the next PC and the register identifiers. pred_wr stores the value
// predicted for register slot pred_slot. chk_en (with the executed trace
// record chk_rec) compares: the prediction is right when the trace table
// hit, the record did not overflow, the start PC, next PC and register list
// agree and every predicted value equals the actual one. One cycle later
// res_valid pulses with res_ok and res_squash; res_squash is raised when
// the prediction was initiated (the speculation stream skipped the trace)
// and was wrong, which is when the speculation stream must be squashed and
// the state recovered from the verification stream. res_wrong_mask marks
// the register slots whose value was wrong.
// Squashing on a wrong initiated prediction follows the architecture's
// description; the comparison rules in detail are this design's own.
module trace_verifier
  import tlvp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  pc_t        clr_pc,
  input  logic       set_shape,
  input  logic       shp_hit,
  input  logic       shp_initiate,
  input  pc_t        shp_next_pc,
  input  nreg_t      shp_nregs,
  input  logic [NREG-1:0][REG_W-1:0] shp_reg_id,
  input  logic       pred_wr,
  input  logic [$clog2(NREG)-1:0] pred_slot,
  input  word_t      pred_value,
  input  logic       chk_en,
  input  trace_rec_t chk_rec,
  output logic       res_valid,
  output logic       res_ok,
  output logic       res_squash,
  output logic [NREG-1:0] res_wrong_mask
);

  pc_t   pc_q, next_pc_q;
  logic  hit_q, init_q;
  nreg_t nregs_q;
  logic [NREG-1:0][REG_W-1:0] reg_id_q;
  logic [NREG-1:0][XLEN-1:0]  val_q;

  logic ok;
  logic [NREG-1:0] wrong;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit_q     <= 1'b0;
      init_q    <= 1'b0;
      pc_q      <= '0;
      next_pc_q <= '0;
      nregs_q   <= '0;
      reg_id_q  <= '0;
      val_q     <= '0;
    end else begin
      if (clear) begin
        hit_q  <= 1'b0;
        init_q <= 1'b0;
        pc_q   <= clr_pc;
      end
      if (set_shape) begin
        hit_q     <= shp_hit;
        init_q    <= shp_initiate;
        next_pc_q <= shp_next_pc;
        nregs_q   <= shp_nregs;
        reg_id_q  <= shp_reg_id;
      end
      if (pred_wr) val_q[pred_slot] <= pred_value;
    end
  end

  always_comb begin
    wrong = '0;
    for (int j = 0; j < NREG; j++) begin
      if (nreg_t'(j) < chk_rec.nregs &&
          (val_q[j] != chk_rec.values[j] || reg_id_q[j] != chk_rec.reg_id[j]))
        wrong[j] = 1'b1;
    end
    ok = hit_q && !chk_rec.overflow
         && chk_rec.start_pc == pc_q
         && chk_rec.next_pc  == next_pc_q
         && chk_rec.nregs    == nregs_q
         && wrong == '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid      <= 1'b0;
      res_ok         <= 1'b0;
      res_squash     <= 1'b0;
      res_wrong_mask <= '0;
    end else begin
      res_valid <= chk_en;
      if (chk_en) begin
        res_ok         <= ok;
        res_squash     <= init_q && !ok;
        res_wrong_mask <= wrong;
      end
    end
  end

endmodule

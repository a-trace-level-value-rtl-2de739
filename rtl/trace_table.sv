// trace_table: the trace table (TT) of the decoupled trace-level value
// predictor.
//
// A direct-mapped table of ENTRIES entries indexed by a trace's start PC.
// Each entry holds Tag, a 2-bit saturating up/down counter (2bC), next PC,
// the Register Identifiers of the registers the trace writes and, for each,
// the PC of the instruction that produces its final value
// (tlvp_pkg::tt_entry_t).
//
// Lookup: lk_en/lk_pc; one cycle later lk_hit and lk_entry are valid, and
// lk_initiate says the 2bC allows the trace prediction to be initiated
// (2bC >= 2).
//
// Update: upd_en with the executed trace record (upd_rec) and whether the
// trace's prediction was right (upd_ok). The entry is read in the first
// cycle and written back in the second, when upd_done pulses; lk_en and
// upd_en must not be raised while an update is in flight (busy).
//   - Same trace (hit, same next PC, same registers and PCs): 2bC counts up
//     if the prediction was right, down otherwise.
//   - Different trace or overflowed record on a hit whose 2bC is not zero:
//     the 2bC counts down and the entry stays (hysteresis).
//   - Otherwise a record that fits is written as a new entry with 2bC = 1.
// The replacement rule and the starting 2bC value are this design's own;
// the fields and the role of the 2bC follow the predictor's description.
module trace_table
  import tlvp_pkg::*;
#(
  parameter int unsigned ENTRIES = TT_ENTRIES,
  localparam int unsigned AW = $clog2(ENTRIES)
) (
  input  logic       clk,
  input  logic       rst_n,
  // lookup
  input  logic       lk_en,
  input  pc_t        lk_pc,
  output logic       lk_hit,
  output logic       lk_initiate,
  output tt_entry_t  lk_entry,
  // update
  input  logic       upd_en,
  input  trace_rec_t upd_rec,
  input  logic       upd_ok,
  output logic       upd_done,
  output logic       upd_alloc,     // this update wrote a new entry
  output logic       busy,
  output logic       init_done
);

  logic [$bits(tt_entry_t)-1:0] rd_raw;
  tt_entry_t  rd_entry;
  tag_t       rd_tag_q;
  logic       upd_q;
  trace_rec_t rec_q;
  logic       ok_q;

  logic       wr_en;
  tt_entry_t  wr_entry;
  logic       same;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) upd_q <= 1'b0;
    else        upd_q <= upd_en;
  end

  always_ff @(posedge clk) begin
    if (lk_en || upd_en) rd_tag_q <= pc_tag(upd_en ? upd_rec.start_pc : lk_pc);
    if (upd_en) begin
      rec_q <= upd_rec;
      ok_q  <= upd_ok;
    end
  end

  tlvp_ram #(.DEPTH(ENTRIES), .WIDTH($bits(tt_entry_t))) u_ram (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_en    (lk_en | upd_en),
    .rd_addr  (upd_en ? upd_rec.start_pc[PC_LSB +: AW] : lk_pc[PC_LSB +: AW]),
    .rd_data  (rd_raw),
    .wr_en    (wr_en),
    .wr_addr  (rec_q.start_pc[PC_LSB +: AW]),
    .wr_data  (wr_entry),
    .init_done(init_done)
  );

  assign rd_entry    = tt_entry_t'(rd_raw);
  assign lk_hit      = rd_entry.valid && (rd_entry.tag == rd_tag_q);
  assign lk_entry    = rd_entry;
  assign lk_initiate = lk_hit && (rd_entry.ctr >= 2'(TT_CTR_PREDICT));

  // Does the stored entry describe the same trace as the executed record?
  always_comb begin
    same = lk_hit && !rec_q.overflow
           && (rd_entry.next_pc == rec_q.next_pc)
           && (rd_entry.nregs == rec_q.nregs);
    for (int j = 0; j < NREG; j++) begin
      if (nreg_t'(j) < rec_q.nregs) begin
        if (rd_entry.reg_id[j] != rec_q.reg_id[j] || rd_entry.pcs[j] != rec_q.pcs[j])
          same = 1'b0;
      end
    end
  end

  always_comb begin
    wr_en     = 1'b0;
    upd_alloc = 1'b0;
    wr_entry  = rd_entry;
    if (upd_q) begin
      if (same) begin
        wr_en        = 1'b1;
        wr_entry.ctr = ok_q ? sat2_inc(rd_entry.ctr) : sat2_dec(rd_entry.ctr);
      end else if (lk_hit && rd_entry.ctr != 2'b00) begin
        wr_en        = 1'b1;
        wr_entry.ctr = sat2_dec(rd_entry.ctr);
      end else if (!rec_q.overflow) begin
        wr_en            = 1'b1;
        upd_alloc        = 1'b1;
        wr_entry         = '0;
        wr_entry.valid   = 1'b1;
        wr_entry.tag     = pc_tag(rec_q.start_pc);
        wr_entry.ctr     = 2'(TT_CTR_ALLOC);
        wr_entry.next_pc = rec_q.next_pc;
        wr_entry.nregs   = rec_q.nregs;
        for (int j = 0; j < NREG; j++) begin
          if (nreg_t'(j) < rec_q.nregs) begin
            wr_entry.reg_id[j] = rec_q.reg_id[j];
            wr_entry.pcs[j]    = rec_q.pcs[j];
          end
        end
      end
    end
  end

  assign upd_done = upd_q;
  assign busy     = upd_q;

endmodule

// trace_builder: records what a trace does while it executes, so that the
// trace table can be filled and the predictions checked.
//
// start (with start_pc) opens a new trace. Every retired instruction that is
// a candidate for prediction (ret_wr: it writes a register; branches and
// stores are not candidates) adds its destination register to the trace's
// register list, in first-write order, or refreshes that register's slot:
// each slot ends up with the PC and value of the last instruction of the
// trace that wrote the register. Writes to register 0 are ignored. A fifth
// distinct register sets overflow, since the predictor keeps four register
// values per trace. end (with end_next_pc, the PC that follows the trace)
// closes it: one cycle later rec_valid pulses and rec holds the completed
// record until the next start. A retirement in the same cycle as end is
// still part of the trace.
//
// Which registers a trace reports (every register it writes) and how trace
// boundaries are chosen (given by the core through start/end) are this
// design's choices; the PCs and register identifiers per trace are what the
// trace table stores.
module trace_builder
  import tlvp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  pc_t        start_pc,
  input  logic       ret_valid,
  input  logic       ret_wr,
  input  regid_t     ret_rd,
  input  pc_t        ret_pc,
  input  word_t      ret_value,
  input  logic       end_valid,
  input  pc_t        end_next_pc,
  output logic       rec_valid,
  output trace_rec_t rec
);

  trace_rec_t cur_q, cur_d;
  logic       done_q;

  always_comb begin
    logic found;
    cur_d = cur_q;
    found = 1'b0;
    if (ret_valid && ret_wr && ret_rd != '0) begin
      for (int j = 0; j < NREG; j++) begin
        if (nreg_t'(j) < cur_q.nregs && cur_q.reg_id[j] == ret_rd) begin
          found = 1'b1;
          cur_d.pcs[j]    = ret_pc;
          cur_d.values[j] = ret_value;
        end
      end
      if (!found) begin
        if (cur_q.nregs < nreg_t'(NREG)) begin
          cur_d.reg_id[cur_q.nregs[$clog2(NREG)-1:0]] = ret_rd;
          cur_d.pcs[cur_q.nregs[$clog2(NREG)-1:0]]    = ret_pc;
          cur_d.values[cur_q.nregs[$clog2(NREG)-1:0]] = ret_value;
          cur_d.nregs = cur_q.nregs + 1'b1;
        end else begin
          cur_d.overflow = 1'b1;
        end
      end
    end
    if (end_valid) cur_d.next_pc = end_next_pc;
    if (start) begin
      cur_d          = '0;
      cur_d.start_pc = start_pc;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q  <= '0;
      done_q <= 1'b0;
    end else begin
      cur_q  <= cur_d;
      done_q <= end_valid;
    end
  end

  assign rec_valid = done_q;
  assign rec       = cur_q;

endmodule

// pht: pattern history table of the instruction-level value predictor.
//
// Indexed by a 2p-bit value history pattern (p codes of 2 bits), each entry
// holds four saturating up/down counters, one per data value slot of a VHT
// entry. A read (rd_en, rd_pattern) returns the four counters one cycle
// later on rd_ctrs. An update (upd_en) takes the pattern, the counters read
// for it earlier (upd_ctrs) and the code of the slot that held the actual
// value (upd_code): that slot's counter is incremented and the other three
// are decremented, all saturating, and the result is written back in the same
// cycle. With upd_none set (the actual value was none of the four stored
// values) no counter is the correct one and all four are decremented. The counter rule is the one the predictor is described with; the
// 3-bit counter width and the zero reset value are this design's choices.
// The table clears itself after reset; init_done says when it is ready.
module pht
  import tlvp_pkg::*;
#(
  parameter int unsigned ENTRIES = 1 << HIST_W,
  localparam int unsigned AW = $clog2(ENTRIES)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rd_en,
  input  hist_t      rd_pattern,
  output pht_ctrs_t  rd_ctrs,
  input  logic       upd_en,
  input  hist_t      upd_pattern,
  input  pht_ctrs_t  upd_ctrs,
  input  code_t      upd_code,
  input  logic       upd_none,
  output logic       init_done
);

  localparam logic [CTR_W-1:0] CTR_MAX = '1;

  pht_ctrs_t new_ctrs;

  always_comb begin
    for (int i = 0; i < NVAL; i++) begin
      if (!upd_none && code_t'(i) == upd_code)
        new_ctrs[i] = (upd_ctrs[i] == CTR_MAX) ? upd_ctrs[i] : upd_ctrs[i] + 1'b1;
      else
        new_ctrs[i] = (upd_ctrs[i] == '0) ? upd_ctrs[i] : upd_ctrs[i] - 1'b1;
    end
  end

  tlvp_ram #(.DEPTH(ENTRIES), .WIDTH($bits(pht_ctrs_t))) u_ram (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_en    (rd_en),
    .rd_addr  (rd_pattern[AW-1:0]),
    .rd_data  (rd_ctrs),
    .wr_en    (upd_en),
    .wr_addr  (upd_pattern[AW-1:0]),
    .wr_data  (new_ctrs),
    .init_done(init_done)
  );

endmodule

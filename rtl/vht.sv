// vht: value history table of the instruction-level value predictor.
//
// A direct-mapped table of VHT_ENTRIES entries indexed by instruction PC.
// Each entry holds Tag, LRU Info, State, Stride, four Data Values and the
// Value History Pattern (tlvp_pkg::vht_entry_t). A lookup (rd_en, rd_pc)
// returns the entry one cycle later on rd_entry, with rd_hit set when the
// entry is valid and its tag equals the looked-up PC's tag. A write
// (wr_en, wr_pc, wr_entry) stores a whole entry at wr_pc's index; the caller
// fills in the tag. Direct mapping and a tag made of every PC bit above the
// instruction offset are this design's choices. The table clears itself
// after reset; init_done says when it is ready.
module vht
  import tlvp_pkg::*;
#(
  parameter int unsigned ENTRIES = VHT_ENTRIES,
  localparam int unsigned AW = $clog2(ENTRIES)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rd_en,
  input  pc_t        rd_pc,
  output logic       rd_hit,
  output vht_entry_t rd_entry,
  input  logic       wr_en,
  input  pc_t        wr_pc,
  input  vht_entry_t wr_entry,
  output logic       init_done
);

  logic [$bits(vht_entry_t)-1:0] rd_raw;
  tag_t rd_tag_q;

  always_ff @(posedge clk) begin
    if (rd_en) rd_tag_q <= pc_tag(rd_pc);
  end

  tlvp_ram #(.DEPTH(ENTRIES), .WIDTH($bits(vht_entry_t))) u_ram (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_en    (rd_en),
    .rd_addr  (rd_pc[PC_LSB +: AW]),
    .rd_data  (rd_raw),
    .wr_en    (wr_en),
    .wr_addr  (wr_pc[PC_LSB +: AW]),
    .wr_data  (wr_entry),
    .init_done(init_done)
  );

  assign rd_entry = vht_entry_t'(rd_raw);
  assign rd_hit   = rd_entry.valid && (rd_entry.tag == rd_tag_q);

endmodule

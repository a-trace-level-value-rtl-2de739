// tlvp_ram: single-clock table memory with one synchronous read port and one
// write port, used for the TT, the VHT and the PHT.
//
// A read issued with rd_en returns mem[rd_addr] on rd_data in the next cycle
// (old data if the same address is written in the same cycle). After reset
// the memory clears itself, one word per cycle, starting at address 0;
// init_done rises once all DEPTH words are zero, and writes and reads must
// wait for it. Clearing by sweep, instead of a valid bit per word held in
// flip-flops, is this design's own choice; it keeps the whole table in a
// plain memory array.
module tlvp_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  output logic             init_done
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    init_ptr;
  logic             init_busy;

  logic             we;
  logic [AW-1:0]    wa;
  logic [WIDTH-1:0] wd;

  always_comb begin
    we = init_busy | wr_en;
    wa = init_busy ? init_ptr : wr_addr;
    wd = init_busy ? '0 : wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_ptr  <= '0;
    end else if (init_busy) begin
      init_ptr <= init_ptr + 1'b1;
      if (init_ptr == AW'(DEPTH - 1)) init_busy <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wd;
    if (rd_en) rd_data <= mem[rd_addr];
  end

  assign init_done = ~init_busy;

endmodule

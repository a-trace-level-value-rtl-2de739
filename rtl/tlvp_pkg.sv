// tlvp_pkg: shared constants and record types of the decoupled trace-level
// value predictor.
//
// The predictor splits trace information (trace table, TT) from value
// information (an instruction-level value predictor made of a value history
// table, VHT, and a pattern history table, PHT). The default sizes are the
// evaluated configuration: a 4096-entry VHT, four register values kept per
// trace, four data values per VHT entry and a 1024-entry TT (the size found
// sufficient against 4096 entries). Widths of PCs and data (32 bits), the
// 5-bit register identifiers and the 8-byte instruction size follow the
// 32-bit MIPS-like instruction set the predictor was evaluated on. The history
// length (6 outcomes), the 3-bit PHT counters and their threshold are this
// design's own choices.
package tlvp_pkg;

  // Architectural widths
  localparam int unsigned XLEN    = 32;   // register value width
  localparam int unsigned PC_W    = 32;   // instruction address width
  localparam int unsigned REG_W   = 5;    // register identifier width (32 registers)
  localparam int unsigned PC_LSB  = 3;    // 8-byte instructions: PC[2:0] is always 0
  localparam int unsigned TAG_W   = PC_W - PC_LSB; // full tag: every PC bit above the offset

  // Predictor organisation
  localparam int unsigned NREG    = 4;    // register values kept per trace (j)
  localparam int unsigned NVAL    = 4;    // data values per VHT entry (k), codes 00..11
  localparam int unsigned HIST_P  = 6;    // outcomes in the value history pattern (p)
  localparam int unsigned HIST_W  = 2 * HIST_P; // 2p-bit pattern, PHT index
  localparam int unsigned CTR_W   = 3;    // PHT saturating counter width
  localparam int unsigned CTR_THRESH = 4; // PHT counter value that selects a data value
  localparam int unsigned STATE_PREDICT = 2; // VHT State at or above which a value is confident
  localparam int unsigned TT_CTR_PREDICT = 2; // TT 2bC at or above which a trace prediction is initiated
  localparam int unsigned TT_CTR_ALLOC   = 1; // TT 2bC value given to a newly allocated trace

  localparam int unsigned VHT_ENTRIES = 4096;
  localparam int unsigned TT_ENTRIES  = 1024;

  typedef logic [XLEN-1:0]  word_t;
  typedef logic [PC_W-1:0]  pc_t;
  typedef logic [REG_W-1:0] regid_t;
  typedef logic [1:0]       code_t;     // binary code of one of the four data values
  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [HIST_W-1:0] hist_t;
  typedef logic [$clog2(NREG+1)-1:0] nreg_t;
  typedef logic [NVAL-1:0][CTR_W-1:0] pht_ctrs_t;

  // One VHT entry: Tag, LRU Info, State, Stride, four Data Values and the
  // Value History Pattern. lru[0] is the most recently seen value's code,
  // lru[NVAL-1] the least recently seen one.
  typedef struct packed {
    logic                     valid;
    tag_t                     tag;
    logic [NVAL-1:0][1:0]     lru;
    logic [1:0]               state;
    word_t                    stride;
    logic [NVAL-1:0][XLEN-1:0] values;
    hist_t                    hist;
  } vht_entry_t;

  // One TT entry: Tag, 2bC, next PC, Register Identifiers and PCs. nregs
  // says how many of the NREG slots are in use.
  typedef struct packed {
    logic                      valid;
    tag_t                      tag;
    logic [1:0]                ctr;
    pc_t                       next_pc;
    nreg_t                     nregs;
    logic [NREG-1:0][REG_W-1:0] reg_id;
    logic [NREG-1:0][PC_W-1:0]  pcs;
  } tt_entry_t;

  // A completed trace as executed: its start and next PC, the registers it
  // wrote in first-write order and, per register, the PC and value of the
  // last instruction that wrote it. overflow: more than NREG registers.
  typedef struct packed {
    pc_t                        start_pc;
    pc_t                        next_pc;
    logic                       overflow;
    nreg_t                      nregs;
    logic [NREG-1:0][REG_W-1:0] reg_id;
    logic [NREG-1:0][PC_W-1:0]  pcs;
    logic [NREG-1:0][XLEN-1:0]  values;
  } trace_rec_t;

  // One-cycle event strobes of the predictor, for performance counters
  // (prediction accuracy, coverage, table behaviour).
  typedef struct packed {
    logic tt_alloc;       // trace table wrote a new entry
    logic vp_pred_hit;    // a value prediction found its instruction in the VHT
    logic vp_pred_pht;    // ... and its value was chosen by the PHT counters
    logic vp_trn_correct; // training: the stored entry predicted the value right
    logic vp_trn_miss;    // training: VHT miss, entry allocated
    logic vp_trn_replace; // training: a stored data value was replaced
  } tlvp_events_t;

  function automatic tag_t pc_tag(pc_t pc);
    return pc[PC_W-1:PC_LSB];
  endfunction

  function automatic logic [1:0] sat2_inc(logic [1:0] c);
    return (c == 2'b11) ? c : c + 2'd1;
  endfunction

  function automatic logic [1:0] sat2_dec(logic [1:0] c);
    return (c == 2'b00) ? c : c - 2'd1;
  endfunction

endpackage

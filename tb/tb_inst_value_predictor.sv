// tb_inst_value_predictor: self-checking test of the instruction-level value
// predictor (VHT + PHT).
//
// The testbench keeps its own model of both tables and of the prediction and
// training rules, written from the rules alone. Eight instructions produce
// value streams of four kinds (constant, stride, a repeating pattern of
// three values, random); two of them share a VHT index so tags are tested.
// Each step predicts an instruction's next value and then trains it with
// the actual value; hit, confidence, source (pattern or stride), value,
// training correctness and miss are compared with the model, and each
// answer must come exactly two cycles after the request is accepted.
module tb_inst_value_predictor;
  import tlvp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  req_valid, req_ready, req_train;
  pc_t   req_pc;
  word_t req_value;
  logic  rsp_valid, rsp_hit, rsp_conf, rsp_from_pht;
  word_t rsp_value;
  logic  trn_done, trn_correct, trn_miss, trn_replace, init_done;

  inst_value_predictor dut (.*);

  int checks = 0, failures = 0;
  int m_replaced;
  int n_pht = 0, n_stride = 0, n_conf = 0, n_miss = 0, n_correct = 0, n_replace = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  typedef struct {
    bit        valid;
    bit [TAG_W-1:0] tag;
    int        lru [NVAL];
    int        state;
    bit [31:0] stride;
    bit [31:0] values [NVAL];
    int        hist;
  } m_ent_t;
  m_ent_t m_vht [int];
  int     m_pht [int][NVAL];

  function automatic int m_idx(pc_t pc);  return int'(pc[PC_LSB +: 12]); endfunction

  function automatic m_ent_t m_get(pc_t pc);
    m_ent_t e;
    if (m_vht.exists(m_idx(pc))) return m_vht[m_idx(pc)];
    e.valid = 0; e.tag = '0; e.state = 0; e.stride = 0; e.hist = 0;
    foreach (e.lru[i]) begin e.lru[i] = i; e.values[i] = 0; end
    return e;
  endfunction

  function automatic int m_ctr(int pat, int c);
    if (!m_pht.exists(pat)) return 0;
    return m_pht[pat][c];
  endfunction

  // returns hit; outputs value, conf, from_pht
  function automatic bit m_predict(pc_t pc, output bit [31:0] v, output bit conf, output bit from_pht);
    m_ent_t e = m_get(pc);
    int best = 0;
    bit hit = e.valid && e.tag == pc[PC_W-1:PC_LSB];
    for (int c = 1; c < NVAL; c++) if (m_ctr(e.hist, c) > m_ctr(e.hist, best)) best = c;
    from_pht = hit && m_ctr(e.hist, best) >= 4;
    v = !hit ? 0 : (from_pht ? e.values[best] : e.values[e.lru[0]] + e.stride);
    conf = hit && e.state >= 2;
    return hit;
  endfunction

  function automatic void m_train(pc_t pc, bit [31:0] actual, output bit correct, output bit miss);
    bit [31:0] pv; bit pc_conf, pfp, hit;
    m_ent_t e, n;
    int code, k;
    bit found;
    hit = m_predict(pc, pv, pc_conf, pfp);
    e = m_get(pc);
    correct = hit && pv == actual;
    miss = !hit;
    if (!hit) begin
      n.valid = 1; n.tag = pc[PC_W-1:PC_LSB]; n.state = 0; n.stride = 0; n.hist = 0;
      foreach (n.lru[i]) begin n.lru[i] = i; n.values[i] = 0; end
      n.values[0] = actual;
      m_vht[m_idx(pc)] = n;
      return;
    end
    found = 0; code = e.lru[NVAL-1];
    for (int c = 0; c < NVAL; c++) if (!found && e.values[c] == actual) begin found = 1; code = c; end
    if (!found) n_replace++;
    n = e;
    n.values[code] = actual;
    n.stride = actual - e.values[e.lru[0]];
    n.state = correct ? (e.state == 3 ? 3 : e.state + 1) : (e.state == 0 ? 0 : e.state - 1);
    n.hist = ((e.hist << 2) | code) & ((1 << HIST_W) - 1);
    n.lru[0] = code; k = 1;
    for (int i = 0; i < NVAL; i++) if (e.lru[i] != code) begin n.lru[k] = e.lru[i]; k++; end
    for (int c = 0; c < NVAL; c++) begin
      int old = m_ctr(e.hist, c);
      m_pht[e.hist][c] = (found && c == code) ? (old == 7 ? 7 : old + 1) : (old == 0 ? 0 : old - 1);
    end
    m_vht[m_idx(pc)] = n;
  endfunction

  // ---------------- stimulus ----------------
  pc_t       pcs   [8];
  int        kind  [8];
  bit [31:0] seqv  [8];
  int        step  [8];

  function automatic bit [31:0] next_value(int i);
    step[i]++;
    case (kind[i])
      0: return 32'h1234_0000 + i;
      1: return 32'd100 + 32'(step[i]) * 32'd8;
      2: begin int r = step[i] % 3; return (r == 0) ? 32'd7 : (r == 1) ? 32'd19 : 32'hFFFF_FFF0; end
      default: return $urandom_range(0, 5);
    endcase
  endfunction

  task automatic issue(input bit train, input pc_t pc, input word_t v, output int lat);
    req_valid <= 1; req_train <= train; req_pc <= pc; req_value <= v;
    do @(posedge clk); while (!req_ready);
    req_valid <= 0;
    lat = 0;
    do begin
      #1; lat++;
      if ((train && trn_done) || (!train && rsp_valid)) break;
      @(posedge clk);
    end while (lat < 10);
  endtask

  initial begin
    int lat;
    bit [31:0] mv; bit mc, mf, mh, mcorr, mmiss;
    req_valid = 0; req_train = 0; req_pc = '0; req_value = '0;
    for (int i = 0; i < 8; i++) begin
      pcs[i]  = 32'h0040_0000 + 32'(i) * 32'h38;
      kind[i] = i % 4;
      step[i] = 0;
    end
    pcs[7] = pcs[3] + 32'(VHT_ENTRIES * 8);  // same index as pcs[3], other tag
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (init_done);
    @(posedge clk);
    for (int it = 0; it < 3000; it++) begin
      int i;
      word_t actual;
      i = $urandom_range(0, 7);
      actual = next_value(i);
      // predict
      mh = m_predict(pcs[i], mv, mc, mf);
      issue(0, pcs[i], '0, lat);
      check(lat == 2, $sformatf("prediction latency %0d, want 2 cycles after acceptance", lat));
      check(rsp_hit == mh, $sformatf("pc %h hit %0b want %0b", pcs[i], rsp_hit, mh));
      check(rsp_conf == mc, $sformatf("pc %h conf %0b want %0b", pcs[i], rsp_conf, mc));
      check(rsp_from_pht == mf, $sformatf("pc %h source %0b want %0b", pcs[i], rsp_from_pht, mf));
      check(rsp_value == mv, $sformatf("pc %h value %h want %h", pcs[i], rsp_value, mv));
      if (mh && mf) n_pht++;
      if (mh && !mf) n_stride++;
      if (mc) n_conf++;
      @(posedge clk);
      // train
      m_replaced = n_replace;
      m_train(pcs[i], actual, mcorr, mmiss);
      m_replaced = n_replace - m_replaced;
      issue(1, pcs[i], actual, lat);
      check(lat == 2, $sformatf("training latency %0d", lat));
      check(trn_correct == mcorr, $sformatf("pc %h trn_correct %0b want %0b", pcs[i], trn_correct, mcorr));
      check(trn_miss == mmiss, $sformatf("pc %h trn_miss %0b want %0b", pcs[i], trn_miss, mmiss));
      if (mmiss) n_miss++;
      if (mcorr) n_correct++;
      check(trn_replace == (m_replaced != 0), $sformatf("pc %h trn_replace %0b", pcs[i], trn_replace));
      @(posedge clk);
    end
    $display("pattern predictions %0d, stride predictions %0d, confident %0d, misses %0d, correct %0d, replacements %0d",
             n_pht, n_stride, n_conf, n_miss, n_correct, n_replace);
    check(n_pht > 0 && n_stride > 0 && n_conf > 0 && n_miss > 2 && n_replace > 0, "a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vht: self-checking test of the value history table.
// Writes random entries at random PCs, including PCs that share an index but
// differ in tag, and reads PCs back one cycle later: the entry must be the
// last one written at that index, and rd_hit must be set only when the
// stored tag is the read PC's tag. After the clearing sweep every read
// misses.
module tb_vht;
  import tlvp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic rd_en, wr_en, rd_hit, init_done;
  pc_t  rd_pc, wr_pc;
  vht_entry_t rd_entry, wr_entry;

  vht dut (.*);

  int checks = 0, failures = 0, hits = 0, misses = 0;
  vht_entry_t model [int];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pc_t rand_pc();
    // 16 indices, 4 tags each
    return {11'h0, 2'($urandom), 4'h0, 4'($urandom), 8'h0, 3'b000} | 32'h0040_0000;
  endfunction

  initial begin
    rd_en = 0; wr_en = 0; rd_pc = '0; wr_pc = '0; wr_entry = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (init_done);
    @(posedge clk);
    for (int it = 0; it < 3000; it++) begin
      pc_t p;
      int idx;
      @(negedge clk);
      p = rand_pc();
      idx = int'(p[PC_LSB +: 12]);
      if ($urandom_range(0, 2) == 0) begin
        vht_entry_t e;
        e = vht_entry_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
        e.valid = 1'b1;
        e.tag = pc_tag(p);
        wr_en = 1; wr_pc = p; wr_entry = e;
        @(posedge clk);
        #1 wr_en = 0;
        model[idx] = e;
      end else begin
        bit want_hit;
        rd_en = 1; rd_pc = p;
        @(posedge clk);
        #1 rd_en = 0;
        want_hit = 1'b0;
        if (model.exists(idx)) want_hit = (model[idx].tag == pc_tag(p));
        check(rd_hit == want_hit, $sformatf("pc %h hit %0b want %0b", p, rd_hit, want_hit));
        if (model.exists(idx)) check(rd_entry == model[idx], $sformatf("pc %h entry differs", p));
        else check(rd_entry == '0, $sformatf("pc %h entry not cleared", p));
        if (want_hit) hits++; else misses++;
      end
    end
    check(hits > 100 && misses > 100, "hits or misses never exercised");
    $display("hits %0d misses %0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

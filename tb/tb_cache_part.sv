// tb_cache_part -- checks the set-associative array: lookups after random
// block writes, metadata and dirty bits, invalid-first then LRU victim
// choice, against a per-way model of tags, valid bits and recency.
module tb_cache_part;
  localparam int SETS = 4, WAYS = 4, TW = 6, LW = 16, MW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0] lk_set = 0, wr_set = 0, lk_way, vic_way, wr_way = 0;
  logic [TW-1:0] lk_tag = 0, vic_tag, wr_tag = 0;
  logic lk_hit, lk_dirty, vic_valid, vic_dirty;
  logic [MW-1:0] lk_meta, vic_meta, wr_meta = 0;
  logic [LW-1:0] lk_data, vic_data, wr_data = 0;
  logic wr_en = 0, wr_valid = 0, wr_dirty = 0, wr_data_en = 0, wr_touch = 0;
  cache_part #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TW), .LINE_W(LW), .META_W(MW)) dut (.*);
  int checks = 0, failures = 0;
  bit v [SETS][WAYS]; bit dt [SETS][WAYS]; int tg [SETS][WAYS], me [SETS][WAYS], da [SETS][WAYS];
  longint last [SETS][WAYS]; longint now = 0;
  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) begin v[s][w] = 0; dt[s][w] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      int hw, ev; bit eh, inv; longint old;
      @(negedge clk);
      lk_set = 2'($urandom); lk_tag = TW'($urandom % 8);
      #1;
      eh = 0; hw = 0; inv = 0; ev = 0;
      for (int w = 0; w < WAYS; w++) if (v[lk_set][w] && tg[lk_set][w] == int'(lk_tag)) begin eh = 1; hw = w; end
      for (int w = WAYS - 1; w >= 0; w--) if (!v[lk_set][w]) begin inv = 1; ev = w; end
      if (!inv) begin
        old = -1;
        for (int w = 0; w < WAYS; w++) if (old < 0 || last[lk_set][w] < old) begin old = last[lk_set][w]; ev = w; end
      end
      check(lk_hit == eh, "hit");
      if (eh) check(int'(lk_way) == hw && lk_meta == MW'(me[lk_set][hw]) && lk_data == LW'(da[lk_set][hw])
                    && lk_dirty == dt[lk_set][hw], "hit way contents");
      check(int'(vic_way) == ev && vic_valid == v[lk_set][ev], $sformatf("victim %0d vs %0d", vic_way, ev));
      // write: a fill of the victim, an update of the hit way, or an invalidation
      wr_en = 1; wr_set = lk_set; wr_tag = lk_tag; wr_meta = MW'($urandom); wr_data = LW'($urandom);
      wr_dirty = 1'($urandom); wr_data_en = 1'($urandom); wr_touch = 1;
      if (eh && ($urandom % 5 == 0)) begin wr_way = 2'(hw); wr_valid = 0; wr_touch = 0; end
      else begin wr_way = eh ? 2'(hw) : 2'(ev); wr_valid = 1; end
      if (!eh) wr_data_en = 1;
      @(negedge clk);
      wr_en = 0;
      now++;
      v[wr_set][wr_way] = wr_valid; dt[wr_set][wr_way] = wr_dirty; tg[wr_set][wr_way] = int'(wr_tag);
      me[wr_set][wr_way] = int'(wr_meta);
      if (wr_data_en) da[wr_set][wr_way] = int'(wr_data);
      if (wr_touch) last[wr_set][wr_way] = now;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

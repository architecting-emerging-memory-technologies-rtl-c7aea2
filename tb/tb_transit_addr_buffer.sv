// tb_transit_addr_buffer -- checks insertion, duplicate suppression, lookup,
// removal on a match and FIFO replacement of the transit address buffer
// against a queue model.
module tb_transit_addr_buffer;
  localparam int N = 4, KW = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ins_en = 0, rm_en = 0, lk_hit;
  logic [KW-1:0] ins_key = 0, lk_key = 0;
  logic [2:0] occupancy;
  transit_addr_buffer #(.ENTRIES(N), .KEY_W(KW)) dut (.*);
  int checks = 0, failures = 0;
  // model: slot contents, valid, replacement pointer
  int key [N]; bit v [N]; int ptr = 0;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int e = 0; e < N; e++) v[e] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      bit exp_hit, dup; int occ;
      @(negedge clk);
      ins_en = 1'($urandom); ins_key = KW'($urandom % 10);
      lk_key = KW'($urandom % 10); rm_en = 1'($urandom);
      #1;
      exp_hit = 0; dup = 0; occ = 0;
      for (int e = 0; e < N; e++) begin
        if (v[e] && key[e] == int'(lk_key)) exp_hit = 1;
        if (v[e] && key[e] == int'(ins_key)) dup = 1;
        occ += v[e];
      end
      checks++;
      if (lk_hit != exp_hit || int'(occupancy) != occ) begin
        failures++; $display("FAIL lookup %0d: %b vs %b", lk_key, lk_hit, exp_hit);
      end
      if (rm_en) for (int e = 0; e < N; e++) if (v[e] && key[e] == int'(lk_key)) v[e] = 0;
      if (ins_en && !dup && !(rm_en && lk_key == ins_key)) begin
        v[ptr] = 1; key[ptr] = int'(ins_key); ptr = (ptr + 1) % N;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

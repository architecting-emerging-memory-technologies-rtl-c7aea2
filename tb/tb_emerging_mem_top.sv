// tb_emerging_mem_top -- end-to-end test of the whole design.
//
// The top is built with small arrays so that every mechanism shows up in a
// short run.  Four threads drive the four subsystems at the same time:
//   predictor  a mix of learnable branches (global-history patterns) and
//              random ones; checks one-cycle prediction, the training rule
//              (mispredicted or weak), and that a learnable loop ends up
//              predicted without mistakes;
//   MLC LLC    reads and writes that alternate between many-block phases and
//              few-hot-block phases, checked against a reference image;
//   GPU L2     reads and writes over all partitions, checked against a
//              reference image, with a write-twice sequence that must
//              pre-migrate the matching blocks of the other partitions;
//   hybrid L1  loads, stores and snooped remote reads, updates and write
//              misses, checked against a golden image, with write-backs and
//              updates checked against it too.
// Every mechanism is counted; one that never happened is a failure:
// predictions, mispredictions, weak-but-correct training; LLC hits, misses,
// protection-bit sets, LBM->SBM and SBM->LBM switches, write-backs and
// re-fetches; L2 STT-RAM and SRAM hits, misses, SRAM fills, TAB insertions and
// hits, both migration directions, pre-migrations and write-backs; L1 hits in
// both partitions, misses, both move directions, STT-RAM writes, refreshes,
// requests held by a refresh, bus updates and write-backs.
// A watchdog ends the run if it hangs.
`timescale 1ns/1ps
module tb_emerging_mem_top;
  import l1_pkg::*;
  localparam int NP = 4, BP_HIST = 16, BP_ROWS = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL @%0t: %s", $time, m); end
  endtask

  // ---- ports ----
  logic bp_pred_req = 0, bp_pred_ready, bp_pred_valid, bp_pred_taken, bp_pred_weak;
  logic [31:0] bp_pred_pc = 0;
  logic bp_res_valid = 0, bp_res_taken = 0, bp_res_mispredict, bp_train_fire;
  logic [4:0] bp_inflight;
  logic llc_req_valid = 0, llc_req_ready, llc_req_we = 0;
  logic [31:0] llc_req_addr = 0;
  logic [255:0] llc_req_wdata = 0, llc_resp_rdata;
  logic llc_resp_valid, llc_resp_hit;
  logic llc_mem_req_valid, llc_mem_req_ready, llc_mem_req_we, llc_mem_resp_valid;
  logic [31:0] llc_mem_req_addr;
  logic [511:0] llc_mem_req_wdata, llc_mem_resp_rdata;
  logic [1:0] llc_mem_req_wmask;
  logic [6:0] llc_events;
  logic [NP-1:0] l2_req_valid = '0, l2_req_ready, l2_req_we = '0, l2_resp_valid, l2_resp_hit;
  logic [NP-1:0][31:0] l2_req_addr = '0, l2_req_wdata = '0, l2_resp_rdata;
  logic [NP-1:0] l2_mem_req_valid, l2_mem_req_ready, l2_mem_req_we, l2_mem_resp_valid;
  logic [NP-1:0][31:0] l2_mem_req_addr;
  logic [NP-1:0][1023:0] l2_mem_req_wdata, l2_mem_resp_rdata;
  logic [NP-1:0][9:0] l2_events;
  logic l1_cpu_req_valid = 0, l1_cpu_req_ready, l1_cpu_req_we = 0;
  logic [31:0] l1_cpu_req_addr = 0;
  logic [63:0] l1_cpu_req_wdata = 0, l1_cpu_resp_rdata;
  logic l1_cpu_resp_valid, l1_cpu_resp_hit;
  logic l1_bus_req_valid, l1_bus_req_ready;
  bus_cmd_t l1_bus_req_cmd;
  logic [31:0] l1_bus_req_addr;
  logic [511:0] l1_bus_req_data, l1_bus_resp_data = '0;
  logic l1_bus_resp_valid = 0, l1_bus_resp_shared = 0;
  logic l1_snp_valid = 0, l1_snp_ready;
  snp_cmd_t l1_snp_cmd = SNP_RD;
  logic [31:0] l1_snp_addr = 0;
  logic [511:0] l1_snp_data = '0, l1_snp_resp_data;
  logic l1_snp_resp_valid, l1_snp_resp_hit, l1_snp_resp_supply;
  logic [9:0] l1_events;

  emerging_mem_top #(.BP_ROWS(BP_ROWS), .BP_HIST(BP_HIST), .LLC_SETS(4), .L2_NPART(NP),
                     .L2_STT_SETS(8), .L2_SRAM_SETS(4), .L2_WAYS(4),
                     .L1_STT_SETS(4), .L1_SRAM_SETS(2)) dut (.*);

  // ---- mechanism counters ----
  int n_llc [7], n_l2 [10], n_l1 [10];
  int n_pred = 0, n_mis = 0, n_weak_train = 0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 7; i++) n_llc[i] += int'(llc_events[i]);
    for (int i = 0; i < 10; i++) begin
      n_l1[i] += int'(l1_events[i]);
      for (int p = 0; p < NP; p++) n_l2[i] += int'(l2_events[p][i]);
    end
  end

  // ================= branch predictor =================
  task automatic bp_branch(input logic [31:0] pc, input bit outcome, output bit mis);
    bit t, w;
    @(negedge clk);
    check(bp_pred_ready, "predictor ready with an empty queue");
    bp_pred_req = 1; bp_pred_pc = pc;
    @(negedge clk);
    bp_pred_req = 0;
    check(bp_pred_valid, "prediction one cycle after the request");
    t = bp_pred_taken; w = bp_pred_weak; n_pred++;
    @(negedge clk);
    bp_res_valid = 1; bp_res_taken = outcome;
    #1;
    mis = (t != outcome);
    check(bp_res_mispredict == mis, "mispredict flag");
    check(bp_train_fire == (mis || w), "training on mispredict or weak output");
    if (mis) n_mis++;
    if (!mis && w) n_weak_train++;
    @(negedge clk);
    bp_res_valid = 0;
  endtask

  task automatic bp_thread();
    bit mis; int late_mis = 0;
    // a loop branch taken 3 times then not taken, repeated
    for (int it = 0; it < 600; it++) begin
      bp_branch(32'h100, (it % 4) != 3, mis);
      if (it >= 500 && mis) late_mis++;
      if (it % 5 == 0) bp_branch(32'h200, 1'((it / 5) % 2), mis);
    end
    check(late_mis < 20, $sformatf("loop branch learned (%0d late mispredictions)", late_mis));
  endtask

  // ================= MLC LLC =================
  logic [511:0] llc_mem [int];
  logic [511:0] llc_ref [int];
  function automatic logic [511:0] llc_init(input logic [31:0] a);
    logic [511:0] l;
    for (int i = 0; i < 16; i++) l[i*32 +: 32] = a ^ (32'h9e3779b9 * (i + 1));
    return l;
  endfunction
  int llc_cnt = -1;
  logic [31:0] llc_pend;
  assign llc_mem_req_ready = (llc_cnt < 0);
  always @(posedge clk) begin
    llc_mem_resp_valid <= 1'b0;
    if (llc_mem_req_valid && llc_mem_req_ready) begin
      if (llc_mem_req_we) begin
        logic [511:0] l;
        l = llc_mem.exists(llc_mem_req_addr) ? llc_mem[llc_mem_req_addr] : llc_init(llc_mem_req_addr);
        if (llc_mem_req_wmask[0]) l[255:0] = llc_mem_req_wdata[255:0];
        if (llc_mem_req_wmask[1]) l[511:256] = llc_mem_req_wdata[511:256];
        llc_mem[llc_mem_req_addr] = l;
      end else begin llc_cnt <= 20; llc_pend <= llc_mem_req_addr; end
    end
    if (llc_cnt > 0) llc_cnt <= llc_cnt - 1;
    if (llc_cnt == 0) begin
      llc_mem_resp_valid <= 1'b1;
      llc_mem_resp_rdata <= llc_mem.exists(llc_pend) ? llc_mem[llc_pend] : llc_init(llc_pend);
      llc_cnt <= -1;
    end
  end
  task automatic llc_access(input bit we, input logic [31:0] a);
    logic [255:0] wd; logic [511:0] l; logic [31:0] la;
    wd = {8{$urandom}}; la = {a[31:6], 6'b0};
    l = llc_ref.exists(la) ? llc_ref[la] : llc_init(la);
    @(negedge clk);
    while (!llc_req_ready) @(negedge clk);
    llc_req_valid = 1; llc_req_we = we; llc_req_addr = a; llc_req_wdata = wd;
    @(negedge clk);
    llc_req_valid = 0;
    while (!llc_resp_valid) @(negedge clk);
    if (!we) check(llc_resp_rdata == (a[5] ? l[511:256] : l[255:0]), $sformatf("LLC read %h", a));
    else begin
      if (a[5]) l[511:256] = wd; else l[255:0] = wd;
      llc_ref[la] = l;
    end
  endtask
  task automatic llc_thread();
    // one set driven LBM -> SBM -> LBM: hot lower halves, then small hot blocks
    for (int k = 0; k < 8; k++) llc_access(0, 32'(k) << 8);
    llc_access(0, 32'h20); llc_access(1, 32'h100);
    repeat (3) llc_access(0, 32'h0);
    llc_access(0, 32'(8) << 8); llc_access(0, 32'(9) << 8);
    llc_access(0, 32'h0); llc_access(1, 32'h0); llc_access(0, 32'h20);
    for (int k = 30; k < 35; k++) repeat (4) llc_access(0, 32'(k) << 8);
    for (int j = 0; j < 2; j++) llc_access(0, 32'(40 + j) << 8);
    llc_access(0, (32'(30) << 8) | 32'h20);
    for (int it = 0; it < 2400; it++) begin
      logic [31:0] a;
      if ((it / 300) % 2 == 0)
        a = ($urandom % 10 == 0) ? {20'h0, 4'(8 + $urandom % 8), 2'($urandom), 1'($urandom), 5'h0}
                                 : {20'h0, 4'($urandom % 3), 2'($urandom), 1'b0, 5'h0};
      else
        a = (it % 16 == 0) ? {20'h0, 4'(8 + $urandom % 8), 2'($urandom), 1'($urandom), 5'h0}
                           : {20'h0, 4'((it / 2) % 3), 2'($urandom), 1'(it % 2), 5'h0};
      llc_access(1'($urandom % 3 == 0), a);
    end
  endtask

  // ================= GPU L2 =================
  logic [1023:0] l2_mem [int];
  function automatic logic [1023:0] l2_mrd(input logic [31:0] a);
    logic [1023:0] l;
    if (l2_mem.exists(a)) return l2_mem[a];
    for (int i = 0; i < 32; i++) l[i*32 +: 32] = (a + 32'(i * 4)) * 32'd2654435761;
    return l;
  endfunction
  int l2_cnt [NP]; logic [31:0] l2_pend [NP];
  for (genvar p = 0; p < NP; p++) begin : g_l2mem
    assign l2_mem_req_ready[p] = (l2_cnt[p] < 0);
    initial l2_cnt[p] = -1;
    always @(posedge clk) begin
      l2_mem_resp_valid[p] <= 0;
      if (l2_mem_req_valid[p] && l2_mem_req_ready[p]) begin
        if (l2_mem_req_we[p]) l2_mem[l2_mem_req_addr[p]] = l2_mem_req_wdata[p];
        else begin l2_cnt[p] <= 12; l2_pend[p] <= l2_mem_req_addr[p]; end
      end
      if (l2_cnt[p] > 0) l2_cnt[p] <= l2_cnt[p] - 1;
      if (l2_cnt[p] == 0) begin
        l2_mem_resp_valid[p] <= 1; l2_mem_resp_rdata[p] <= l2_mrd(l2_pend[p]); l2_cnt[p] <= -1;
      end
    end
  end
  logic [31:0] l2_ref [int];
  task automatic l2_access(input bit we, input logic [31:0] a);
    int p; logic [31:0] d;
    p = int'(a[8:7]); d = $urandom;
    @(negedge clk);
    while (!l2_req_ready[p]) @(negedge clk);
    l2_req_valid[p] = 1; l2_req_we[p] = we; l2_req_addr[p] = a; l2_req_wdata[p] = d;
    @(negedge clk);
    l2_req_valid[p] = 0;
    while (!l2_resp_valid[p]) @(negedge clk);
    if (we) l2_ref[a] = d;
    else check(l2_resp_rdata[p] == (l2_ref.exists(a) ? l2_ref[a] : a * 32'd2654435761),
               $sformatf("L2 read %h", a));
  endtask
  function automatic logic [31:0] l2a(input int k, input int s, input int p);
    return (32'(k) << 12) | (32'(s) << 9) | (32'(p) << 7) | 32'h10;
  endfunction
  task automatic l2_thread();
    for (int p = 0; p < NP; p++) l2_access(0, l2a(3, 1, p));
    l2_access(1, l2a(3, 1, 0));
    l2_access(1, l2a(3, 1, 0));
    for (int it = 0; it < 2500; it++)
      l2_access(1'($urandom % 3 == 0),
                l2a($urandom % 10, $urandom % 8, $urandom % NP) + 32'(($urandom % 4) * 4));
  endtask

  // ================= hybrid L1 =================
  localparam int NL = 24;
  logic [511:0] l1_gold [NL], l1_mem [NL];
  bit l1_rhas [NL];
  int l1_cd = 0; bit l1_pend = 0;
  assign l1_bus_req_ready = 1'b1;
  always @(negedge clk) if (rst_n) begin
    int l;
    l1_bus_resp_valid = 1'b0;
    if (l1_pend) begin
      if (l1_cd == 0) begin l1_bus_resp_valid = 1'b1; l1_pend = 0; end else l1_cd--;
    end
    if (l1_bus_req_valid) begin
      l = int'(l1_bus_req_addr[10:6]);
      case (l1_bus_req_cmd)
        BUS_RD:  begin l1_bus_resp_data = l1_mem[l]; l1_bus_resp_shared = l1_rhas[l]; end
        BUS_RDX: begin l1_bus_resp_data = l1_mem[l]; l1_bus_resp_shared = 0; l1_rhas[l] = 0; end
        BUS_UPD: begin
          check(l1_bus_req_data == l1_gold[l], "L1 update carries the written line");
          l1_bus_resp_shared = l1_rhas[l];
        end
        default: begin
          check(l1_bus_req_data == l1_gold[l], "L1 write-back carries the current line");
          l1_mem[l] = l1_bus_req_data;
        end
      endcase
      if (l1_bus_req_cmd != BUS_WB) begin l1_pend = 1; l1_cd = 1; end
    end
  end
  task automatic l1_cpu(input bit we, input int l, input int wd);
    logic [63:0] d;
    d = {$urandom, $urandom};
    @(negedge clk);
    l1_cpu_req_valid = 1; l1_cpu_req_we = we;
    l1_cpu_req_addr = (32'(l) << 6) | (32'(wd) << 3); l1_cpu_req_wdata = d;
    if (we) l1_gold[l][wd*64 +: 64] = d;
    while (!l1_cpu_req_ready) @(negedge clk);
    @(negedge clk);
    l1_cpu_req_valid = 0;
    while (!l1_cpu_resp_valid) @(negedge clk);
    if (!we) check(l1_cpu_resp_rdata == l1_gold[l][wd*64 +: 64], $sformatf("L1 load line %0d", l));
  endtask
  task automatic l1_snoop(input snp_cmd_t c, input int l, input int wd);
    logic [511:0] nl;
    nl = l1_gold[l];
    if (c != SNP_RD) nl[wd*64 +: 64] = {$urandom, $urandom};
    @(negedge clk);
    while (!l1_snp_ready) @(negedge clk);
    l1_snp_valid = 1; l1_snp_cmd = c; l1_snp_addr = 32'(l) << 6; l1_snp_data = nl;
    @(negedge clk);
    l1_snp_valid = 0;
    check(l1_snp_resp_valid, "L1 snoop answered the next cycle");
    if (l1_snp_resp_supply) begin
      check(l1_snp_resp_data == l1_gold[l], "L1 supplies the current line");
      l1_mem[l] = l1_snp_resp_data;
    end else if (c != SNP_UPD) check(l1_mem[l] == l1_gold[l], "memory current when not owned");
    l1_rhas[l] = 1;
    if (c != SNP_RD) l1_mem[l] = nl;
    l1_gold[l] = nl;
  endtask
  task automatic l1_thread();
    for (int i = 0; i < NL; i++) begin
      l1_gold[i] = {16{$urandom}}; l1_mem[i] = l1_gold[i]; l1_rhas[i] = 0;
    end
    for (int it = 0; it < 3000; it++) begin
      int l, wd, r;
      l = $urandom % NL; wd = $urandom % 8; r = $urandom % 100;
      if (r < 40) l1_cpu(0, l, wd);
      else if (r < 72) l1_cpu(1, l, wd);
      else if (r < 82) l1_snoop(SNP_RD, l, wd);
      else if (r < 92) begin l1_snoop(SNP_RD, l, wd); l1_snoop(SNP_UPD, l, wd); end
      else l1_snoop(SNP_RDX, l, wd);
    end
  endtask

  initial begin
    #20000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    string llc_names [7] = '{"hit", "miss", "to_sbm", "to_lbm", "pb_set", "writeback", "refetch"};
    string l2_names [10] = '{"hit_stt", "hit_sram", "miss", "fill_sram", "tab_hit", "tab_ins",
                             "mig_to_sram", "mig_to_stt", "premig", "writeback"};
    string l1_names [10] = '{"hit_sram", "hit_stt", "miss", "mig_to_sram", "mig_to_stt",
                             "stt_write", "refresh", "refresh_wait", "update", "writeback"};
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      bp_thread();
      llc_thread();
      l2_thread();
      l1_thread();
    join
    repeat (20) @(negedge clk);
    $display("predictor: predictions=%0d mispredictions=%0d weak_trainings=%0d",
             n_pred, n_mis, n_weak_train);
    check(n_pred > 0, "mechanism predictor.predict");
    check(n_mis > 0, "mechanism predictor.mispredict_train");
    check(n_weak_train > 0, "mechanism predictor.weak_train");
    for (int i = 0; i < 7; i++) begin
      $display("llc.%s=%0d", llc_names[i], n_llc[i]);
      check(n_llc[i] > 0, {"mechanism llc.", llc_names[i]});
    end
    for (int i = 0; i < 10; i++) begin
      $display("l2.%s=%0d", l2_names[i], n_l2[i]);
      check(n_l2[i] > 0, {"mechanism l2.", l2_names[i]});
    end
    for (int i = 0; i < 10; i++) begin
      $display("l1.%s=%0d", l1_names[i], n_l1[i]);
      check(n_l1[i] > 0, {"mechanism l1.", l1_names[i]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

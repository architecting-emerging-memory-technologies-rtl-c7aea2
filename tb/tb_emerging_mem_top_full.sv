// tb_emerging_mem_top_full -- the top at its default (full) size.
//
// No parameter is overridden: 256-row predictor with 48 history bits, 4 MB
// MLC LLC of 8192 sets, 8-partition GPU L2 (4 MB STT-RAM + 512 KB SRAM), and
// the 4 KB + 128 KB hybrid L1.  Each subsystem gets a short, complete piece of
// work with its results checked:
//   predictor  a loop branch (taken 3 times, then not) until it is predicted
//              without mistakes over a whole iteration;
//   LLC        a read miss, then read and write hits with their LBM latencies
//              (10 and 44 cycles) and the data written read back;
//   GPU L2     a read miss then an STT-RAM read hit (4 cycles) in every
//              partition, and a write miss that lands in SRAM (5-cycle hit);
//   L1         a read miss, an STT-RAM read hit (4 cycles), a write that moves
//              the block to SRAM, an SRAM read hit (3 cycles) of the new data,
//              and at least one refresh.
// A watchdog ends the run if it hangs.
`timescale 1ns/1ps
module tb_emerging_mem_top_full;
  import l1_pkg::*;
  localparam int NP = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask

  logic bp_pred_req = 0, bp_pred_ready, bp_pred_valid, bp_pred_taken, bp_pred_weak;
  logic [31:0] bp_pred_pc = 0;
  logic bp_res_valid = 0, bp_res_taken = 0, bp_res_mispredict, bp_train_fire;
  logic [4:0] bp_inflight;
  logic llc_req_valid = 0, llc_req_ready, llc_req_we = 0;
  logic [31:0] llc_req_addr = 0;
  logic [255:0] llc_req_wdata = 0, llc_resp_rdata;
  logic llc_resp_valid, llc_resp_hit;
  logic llc_mem_req_valid, llc_mem_req_we;
  logic llc_mem_resp_valid = 0;
  logic [31:0] llc_mem_req_addr;
  logic [511:0] llc_mem_req_wdata, llc_mem_resp_rdata = '0;
  logic [1:0] llc_mem_req_wmask;
  logic [6:0] llc_events;
  logic [NP-1:0] l2_req_valid = '0, l2_req_ready, l2_req_we = '0, l2_resp_valid, l2_resp_hit;
  logic [NP-1:0][31:0] l2_req_addr = '0, l2_req_wdata = '0, l2_resp_rdata;
  logic [NP-1:0] l2_mem_req_valid, l2_mem_req_we, l2_mem_resp_valid = '0;
  logic [NP-1:0][31:0] l2_mem_req_addr;
  logic [NP-1:0][1023:0] l2_mem_req_wdata, l2_mem_resp_rdata = '0;
  logic [NP-1:0][9:0] l2_events;
  logic l1_cpu_req_valid = 0, l1_cpu_req_ready, l1_cpu_req_we = 0;
  logic [31:0] l1_cpu_req_addr = 0;
  logic [63:0] l1_cpu_req_wdata = 0, l1_cpu_resp_rdata;
  logic l1_cpu_resp_valid, l1_cpu_resp_hit;
  logic l1_bus_req_valid;
  bus_cmd_t l1_bus_req_cmd;
  logic [31:0] l1_bus_req_addr;
  logic [511:0] l1_bus_req_data, l1_bus_resp_data = '0;
  logic l1_bus_resp_valid = 0;
  logic l1_snp_ready;
  logic [511:0] l1_snp_resp_data;
  logic l1_snp_resp_valid, l1_snp_resp_hit, l1_snp_resp_supply;
  logic [9:0] l1_events;

  emerging_mem_top dut (
    .clk, .rst_n,
    .bp_pred_req, .bp_pred_pc, .bp_pred_ready, .bp_pred_valid, .bp_pred_taken, .bp_pred_weak,
    .bp_res_valid, .bp_res_taken, .bp_res_mispredict, .bp_train_fire, .bp_inflight,
    .llc_req_valid, .llc_req_ready, .llc_req_we, .llc_req_addr, .llc_req_wdata,
    .llc_resp_valid, .llc_resp_hit, .llc_resp_rdata,
    .llc_mem_req_valid, .llc_mem_req_ready(1'b1), .llc_mem_req_we, .llc_mem_req_addr,
    .llc_mem_req_wdata, .llc_mem_req_wmask, .llc_mem_resp_valid, .llc_mem_resp_rdata,
    .llc_events,
    .l2_req_valid, .l2_req_ready, .l2_req_we, .l2_req_addr, .l2_req_wdata,
    .l2_resp_valid, .l2_resp_hit, .l2_resp_rdata,
    .l2_mem_req_valid, .l2_mem_req_ready({NP{1'b1}}), .l2_mem_req_we, .l2_mem_req_addr,
    .l2_mem_req_wdata, .l2_mem_resp_valid, .l2_mem_resp_rdata, .l2_events,
    .l1_cpu_req_valid, .l1_cpu_req_ready, .l1_cpu_req_we, .l1_cpu_req_addr,
    .l1_cpu_req_wdata, .l1_cpu_resp_valid, .l1_cpu_resp_hit, .l1_cpu_resp_rdata,
    .l1_bus_req_valid, .l1_bus_req_ready(1'b1), .l1_bus_req_cmd, .l1_bus_req_addr,
    .l1_bus_req_data, .l1_bus_resp_valid, .l1_bus_resp_shared(1'b0), .l1_bus_resp_data,
    .l1_snp_valid(1'b0), .l1_snp_ready, .l1_snp_cmd(SNP_RD), .l1_snp_addr(32'h0),
    .l1_snp_data('0), .l1_snp_resp_valid, .l1_snp_resp_hit, .l1_snp_resp_supply,
    .l1_snp_resp_data, .l1_events
  );

  // memories: line content is a function of the address (writes are not kept;
  // nothing written is evicted in this short run)
  function automatic logic [1023:0] pat(input logic [31:0] a);
    for (int i = 0; i < 32; i++) pat[i*32 +: 32] = (a + 32'(i * 4)) * 32'd2654435761;
  endfunction
  always @(posedge clk) begin
    llc_mem_resp_valid <= llc_mem_req_valid && !llc_mem_req_we;
    llc_mem_resp_rdata <= pat(llc_mem_req_addr)[511:0];
    for (int p = 0; p < NP; p++) begin
      l2_mem_resp_valid[p] <= l2_mem_req_valid[p] && !l2_mem_req_we[p];
      l2_mem_resp_rdata[p] <= pat(l2_mem_req_addr[p]);
    end
  end
  logic l1_pend = 0;
  always @(posedge clk) begin
    l1_bus_resp_valid <= l1_pend;
    l1_bus_resp_data  <= pat(l1_bus_req_addr)[511:0];
    l1_pend <= l1_bus_req_valid && l1_bus_req_cmd != BUS_WB;
  end
  int n_ref = 0;
  always @(posedge clk) n_ref += int'(l1_events[6]);

  task automatic bp_thread();
    bit mis; int clean = 0, it = 0;
    while (clean < 8 && it < 1000) begin
      bit o;
      o = (it % 4) != 3;
      @(negedge clk); bp_pred_req = 1; bp_pred_pc = 32'h400;
      @(negedge clk); bp_pred_req = 0;
      check(bp_pred_valid, "prediction one cycle after the request");
      mis = (bp_pred_taken != o);
      @(negedge clk); bp_res_valid = 1; bp_res_taken = o;
      #1 check(bp_res_mispredict == mis, "mispredict flag");
      @(negedge clk); bp_res_valid = 0;
      clean = mis ? 0 : clean + 1;
      it++;
    end
    check(clean >= 8, $sformatf("loop branch learned after %0d branches", it));
  endtask

  task automatic llc_access(input bit we, input logic [31:0] a, input logic [255:0] d,
                            output int lat, output bit h, output logic [255:0] r);
    @(negedge clk);
    while (!llc_req_ready) @(negedge clk);
    llc_req_valid = 1; llc_req_we = we; llc_req_addr = a; llc_req_wdata = d;
    @(negedge clk); llc_req_valid = 0; lat = 1;
    while (!llc_resp_valid) begin @(negedge clk); lat++; end
    h = llc_resp_hit; r = llc_resp_rdata;
  endtask
  task automatic llc_thread();
    int lat; bit h; logic [255:0] r, d;
    logic [31:0] a;
    a = 32'h0123_4560;                                   // upper half of a line
    d = {8{32'h5a5a_0001}};
    llc_access(0, a, '0, lat, h, r);
    check(!h && r == pat({a[31:6], 6'b0})[511:256], "LLC read miss data");
    llc_access(0, a, '0, lat, h, r);
    check(h && lat == 10, $sformatf("LLC LBM read hit latency %0d", lat));
    llc_access(1, a, d, lat, h, r);
    check(h && lat == 44, $sformatf("LLC LBM write hit latency %0d", lat));
    llc_access(0, a, '0, lat, h, r);
    check(h && r == d, "LLC read after write");
  endtask

  task automatic l2_access(input int p, input bit we, input logic [31:0] a, input logic [31:0] d,
                           output int lat, output bit h, output logic [31:0] r);
    @(negedge clk);
    while (!l2_req_ready[p]) @(negedge clk);
    l2_req_valid[p] = 1; l2_req_we[p] = we; l2_req_addr[p] = a; l2_req_wdata[p] = d;
    @(negedge clk); l2_req_valid[p] = 0; lat = 1;
    while (!l2_resp_valid[p]) begin @(negedge clk); lat++; end
    h = l2_resp_hit[p]; r = l2_resp_rdata[p];
  endtask
  task automatic l2_thread();
    int lat; bit h; logic [31:0] r, a;
    for (int p = 0; p < NP; p++) begin
      a = 32'h0007_2004 | (32'(p) << 7);
      l2_access(p, 0, a, 0, lat, h, r);
      check(!h && r == pat({a[31:7], 7'b0})[32'(a[6:2])*32 +: 32], "L2 read miss data");
      l2_access(p, 0, a, 0, lat, h, r);
      check(h && lat == 4, $sformatf("L2 partition %0d STT-RAM read hit latency %0d", p, lat));
    end
    a = 32'h0031_0008 | (32'(3) << 7);
    l2_access(3, 1, a, 32'hfeed_0003, lat, h, r);
    check(!h, "L2 write miss");
    l2_access(3, 0, a, 0, lat, h, r);
    check(h && lat == 5 && r == 32'hfeed_0003, $sformatf("L2 SRAM read hit latency %0d", lat));
  endtask

  task automatic l1_access(input bit we, input logic [31:0] a, input logic [63:0] d,
                           output int lat, output bit h, output logic [63:0] r);
    @(negedge clk);
    l1_cpu_req_valid = 1; l1_cpu_req_we = we; l1_cpu_req_addr = a; l1_cpu_req_wdata = d;
    while (!l1_cpu_req_ready) @(negedge clk);
    @(negedge clk); l1_cpu_req_valid = 0; lat = 1;
    while (!l1_cpu_resp_valid) begin @(negedge clk); lat++; end
    h = l1_cpu_resp_hit; r = l1_cpu_resp_rdata;
  endtask
  task automatic l1_thread();
    int lat; bit h; logic [63:0] r; logic [31:0] a;
    a = 32'h0000_9a58;
    l1_access(0, a, 0, lat, h, r);
    check(!h && r == pat({a[31:6], 6'b0})[32'(a[5:3])*64 +: 64], "L1 read miss data");
    l1_access(0, a, 0, lat, h, r);
    check(h && lat == 4 && l1_events[1] == 0, $sformatf("L1 STT-RAM read hit latency %0d", lat));
    l1_access(1, a, 64'h1234_5678_9abc_def0, lat, h, r);
    check(h, "L1 write hit");
    l1_access(0, a, 0, lat, h, r);
    check(h && lat == 3 && r == 64'h1234_5678_9abc_def0,
          $sformatf("L1 block moved to SRAM, read hit latency %0d", lat));
    repeat (200) @(negedge clk);
    check(n_ref > 0, "L1 STT-RAM refresh ran");
  endtask

  initial begin
    #5000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork bp_thread(); llc_thread(); l2_thread(); l1_thread(); join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

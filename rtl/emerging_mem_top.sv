// emerging_mem_top -- the energy-efficient memory structures side by side.
//
// Four independent subsystems, each with its own ports brought out under a
// prefix:
//   bp_*   memristor_predictor: neural branch predictor whose weights live in
//          multi-level memristor cells and are summed as analog currents;
//   llc_*  mlc_llc: MLC STT-RAM last-level cache whose sets switch between
//          64-byte and 32-byte blocks at run time;
//   l2_*   gpu_l2: GPGPU last-level cache of hybrid STT-RAM/SRAM partitions
//          with differential allocation, migration and pre-migration.
//   l1_*   hybrid_l1: private L1 data cache of an SRAM and an STT-RAM
//          partition whose blocks move with their MOESI coherence state.
// They do not share state; one clock and one active-low asynchronous reset
// drive all of them.  Every parameter defaults to the configuration the
// subsystem's documentation names as its main one.
module emerging_mem_top
  import l1_pkg::*;
#(
  parameter int unsigned BP_ROWS      = 256,
  parameter int unsigned BP_HIST      = 48,
  parameter int unsigned LLC_SETS     = 8192,
  parameter int unsigned LLC_MISS_LAT = 4,
  parameter int unsigned L2_NPART     = 8,
  parameter int unsigned L2_STT_SETS  = 512,
  parameter int unsigned L2_SRAM_SETS = 64,
  parameter int unsigned L2_WAYS      = 8,
  parameter int unsigned L1_STT_SETS  = 512,
  parameter int unsigned L1_SRAM_SETS = 16,
  parameter policy_t     L1_POLICY    = POL_IMM
) (
  input  logic        clk,
  input  logic        rst_n,
  // branch predictor
  input  logic        bp_pred_req,
  input  logic [31:0] bp_pred_pc,
  output logic        bp_pred_ready,
  output logic        bp_pred_valid,
  output logic        bp_pred_taken,
  output logic        bp_pred_weak,
  input  logic        bp_res_valid,
  input  logic        bp_res_taken,
  output logic        bp_res_mispredict,
  output logic        bp_train_fire,
  output logic [4:0]  bp_inflight,
  // MLC STT-RAM LLC
  input  logic         llc_req_valid,
  output logic         llc_req_ready,
  input  logic         llc_req_we,
  input  logic [31:0]  llc_req_addr,
  input  logic [255:0] llc_req_wdata,
  output logic         llc_resp_valid,
  output logic         llc_resp_hit,
  output logic [255:0] llc_resp_rdata,
  output logic         llc_mem_req_valid,
  input  logic         llc_mem_req_ready,
  output logic         llc_mem_req_we,
  output logic [31:0]  llc_mem_req_addr,
  output logic [511:0] llc_mem_req_wdata,
  output logic [1:0]   llc_mem_req_wmask,
  input  logic         llc_mem_resp_valid,
  input  logic [511:0] llc_mem_resp_rdata,
  output logic [6:0]   llc_events,   // {refetch, writeback, pb_set, to_lbm, to_sbm, miss, hit}
  // GPGPU L2
  input  logic [L2_NPART-1:0]          l2_req_valid,
  output logic [L2_NPART-1:0]          l2_req_ready,
  input  logic [L2_NPART-1:0]          l2_req_we,
  input  logic [L2_NPART-1:0][31:0]    l2_req_addr,
  input  logic [L2_NPART-1:0][31:0]    l2_req_wdata,
  output logic [L2_NPART-1:0]          l2_resp_valid,
  output logic [L2_NPART-1:0]          l2_resp_hit,
  output logic [L2_NPART-1:0][31:0]    l2_resp_rdata,
  output logic [L2_NPART-1:0]          l2_mem_req_valid,
  input  logic [L2_NPART-1:0]          l2_mem_req_ready,
  output logic [L2_NPART-1:0]          l2_mem_req_we,
  output logic [L2_NPART-1:0][31:0]    l2_mem_req_addr,
  output logic [L2_NPART-1:0][1023:0]  l2_mem_req_wdata,
  input  logic [L2_NPART-1:0]          l2_mem_resp_valid,
  input  logic [L2_NPART-1:0][1023:0]  l2_mem_resp_rdata,
  output logic [L2_NPART-1:0][9:0]     l2_events,
  // hybrid L1
  input  logic         l1_cpu_req_valid,
  output logic         l1_cpu_req_ready,
  input  logic         l1_cpu_req_we,
  input  logic [31:0]  l1_cpu_req_addr,
  input  logic [63:0]  l1_cpu_req_wdata,
  output logic         l1_cpu_resp_valid,
  output logic         l1_cpu_resp_hit,
  output logic [63:0]  l1_cpu_resp_rdata,
  output logic         l1_bus_req_valid,
  input  logic         l1_bus_req_ready,
  output bus_cmd_t     l1_bus_req_cmd,
  output logic [31:0]  l1_bus_req_addr,
  output logic [511:0] l1_bus_req_data,
  input  logic         l1_bus_resp_valid,
  input  logic         l1_bus_resp_shared,
  input  logic [511:0] l1_bus_resp_data,
  input  logic         l1_snp_valid,
  output logic         l1_snp_ready,
  input  snp_cmd_t     l1_snp_cmd,
  input  logic [31:0]  l1_snp_addr,
  input  logic [511:0] l1_snp_data,
  output logic         l1_snp_resp_valid,
  output logic         l1_snp_resp_hit,
  output logic         l1_snp_resp_supply,
  output logic [511:0] l1_snp_resp_data,
  // {writeback, update, refresh_wait, refresh, stt_write, mig_to_stt, mig_to_sram,
  //  miss, hit_stt, hit_sram}
  output logic [9:0]   l1_events
);
  memristor_predictor #(.ROWS(BP_ROWS), .HIST(BP_HIST)) u_bp (
    .clk, .rst_n,
    .pred_req(bp_pred_req), .pred_pc(bp_pred_pc), .pred_ready(bp_pred_ready),
    .pred_valid(bp_pred_valid), .pred_taken(bp_pred_taken), .pred_weak(bp_pred_weak),
    .res_valid(bp_res_valid), .res_taken(bp_res_taken), .res_mispredict(bp_res_mispredict),
    .train_fire(bp_train_fire), .inflight(bp_inflight)
  );

  mlc_llc #(.SETS(LLC_SETS), .MISS_LAT(LLC_MISS_LAT)) u_llc (
    .clk, .rst_n,
    .req_valid(llc_req_valid), .req_ready(llc_req_ready), .req_we(llc_req_we),
    .req_addr(llc_req_addr), .req_wdata(llc_req_wdata),
    .resp_valid(llc_resp_valid), .resp_hit(llc_resp_hit), .resp_rdata(llc_resp_rdata),
    .mem_req_valid(llc_mem_req_valid), .mem_req_ready(llc_mem_req_ready),
    .mem_req_we(llc_mem_req_we), .mem_req_addr(llc_mem_req_addr),
    .mem_req_wdata(llc_mem_req_wdata), .mem_req_wmask(llc_mem_req_wmask),
    .mem_resp_valid(llc_mem_resp_valid), .mem_resp_rdata(llc_mem_resp_rdata),
    .ev_hit(llc_events[0]), .ev_miss(llc_events[1]), .ev_to_sbm(llc_events[2]),
    .ev_to_lbm(llc_events[3]), .ev_pb_set(llc_events[4]), .ev_writeback(llc_events[5]),
    .ev_refetch(llc_events[6])
  );

  gpu_l2 #(.NPART(L2_NPART), .STT_SETS(L2_STT_SETS), .SRAM_SETS(L2_SRAM_SETS),
           .WAYS(L2_WAYS)) u_l2 (
    .clk, .rst_n,
    .req_valid(l2_req_valid), .req_ready(l2_req_ready), .req_we(l2_req_we),
    .req_addr(l2_req_addr), .req_wdata(l2_req_wdata),
    .resp_valid(l2_resp_valid), .resp_hit(l2_resp_hit), .resp_rdata(l2_resp_rdata),
    .mem_req_valid(l2_mem_req_valid), .mem_req_ready(l2_mem_req_ready),
    .mem_req_we(l2_mem_req_we), .mem_req_addr(l2_mem_req_addr),
    .mem_req_wdata(l2_mem_req_wdata), .mem_resp_valid(l2_mem_resp_valid),
    .mem_resp_rdata(l2_mem_resp_rdata), .events(l2_events)
  );

  hybrid_l1 #(.SRAM_SETS(L1_SRAM_SETS), .STT_SETS(L1_STT_SETS), .POLICY(L1_POLICY)) u_l1 (
    .clk, .rst_n,
    .cpu_req_valid(l1_cpu_req_valid), .cpu_req_ready(l1_cpu_req_ready),
    .cpu_req_we(l1_cpu_req_we), .cpu_req_addr(l1_cpu_req_addr),
    .cpu_req_wdata(l1_cpu_req_wdata), .cpu_resp_valid(l1_cpu_resp_valid),
    .cpu_resp_hit(l1_cpu_resp_hit), .cpu_resp_rdata(l1_cpu_resp_rdata),
    .bus_req_valid(l1_bus_req_valid), .bus_req_ready(l1_bus_req_ready),
    .bus_req_cmd(l1_bus_req_cmd), .bus_req_addr(l1_bus_req_addr),
    .bus_req_data(l1_bus_req_data), .bus_resp_valid(l1_bus_resp_valid),
    .bus_resp_shared(l1_bus_resp_shared), .bus_resp_data(l1_bus_resp_data),
    .snp_valid(l1_snp_valid), .snp_ready(l1_snp_ready), .snp_cmd(l1_snp_cmd),
    .snp_addr(l1_snp_addr), .snp_data(l1_snp_data), .snp_resp_valid(l1_snp_resp_valid),
    .snp_resp_hit(l1_snp_resp_hit), .snp_resp_supply(l1_snp_resp_supply),
    .snp_resp_data(l1_snp_resp_data),
    .ev_hit_sram(l1_events[0]), .ev_hit_stt(l1_events[1]), .ev_miss(l1_events[2]),
    .ev_mig_to_sram(l1_events[3]), .ev_mig_to_stt(l1_events[4]),
    .ev_stt_write(l1_events[5]), .ev_refresh(l1_events[6]),
    .ev_refresh_wait(l1_events[7]), .ev_update(l1_events[8]),
    .ev_writeback(l1_events[9])
  );
endmodule

// gpu_l2 -- the GPGPU last-level cache: NPART hybrid STT-RAM/SRAM partitions
// (gpu_l2_partition), each in front of its own DRAM channel, plus the
// pre-migration broadcast that links them.
//
// The interconnect delivers each request to the partition selected by
// address bits 7.. (line-interleaved, this design's choice); the partitions
// then work independently.  When a partition migrates a block it broadcasts
// a notice (direction and line address above the partition bits); every
// other partition receives it one cycle later.  If several partitions send
// a notice in the same cycle, each receiver takes the one from the lowest
// numbered sender and the others are lost, which is harmless because notices
// are only hints.  Default sizes follow the document's hybrid configuration:
// a 4 MB STT-RAM part and a 512 KB SRAM augment in total, 8 partitions,
// 8-way sets of 128-byte lines (512 STT-RAM and 64 SRAM sets per partition).
// Ports are the partitions' ports as arrays indexed by partition.
module gpu_l2 #(
  parameter int unsigned NPART     = 8,
  parameter int unsigned STT_SETS  = 512,
  parameter int unsigned SRAM_SETS = 64,
  parameter int unsigned WAYS      = 8,
  localparam int unsigned LAW = 32 - 7 - $clog2(NPART)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NPART-1:0]          req_valid,
  output logic [NPART-1:0]          req_ready,
  input  logic [NPART-1:0]          req_we,
  input  logic [NPART-1:0][31:0]    req_addr,
  input  logic [NPART-1:0][31:0]    req_wdata,
  output logic [NPART-1:0]          resp_valid,
  output logic [NPART-1:0]          resp_hit,
  output logic [NPART-1:0][31:0]    resp_rdata,
  output logic [NPART-1:0]          mem_req_valid,
  input  logic [NPART-1:0]          mem_req_ready,
  output logic [NPART-1:0]          mem_req_we,
  output logic [NPART-1:0][31:0]    mem_req_addr,
  output logic [NPART-1:0][1023:0]  mem_req_wdata,
  input  logic [NPART-1:0]          mem_resp_valid,
  input  logic [NPART-1:0][1023:0]  mem_resp_rdata,
  // per-partition event pulses: {writeback, premig, mig_to_stt, mig_to_sram,
  // tab_ins, tab_hit, fill_sram, miss, hit_sram, hit_stt}
  output logic [NPART-1:0][9:0]     events
);
  logic [NPART-1:0]          pmo_v, pmo_stt, pmi_v_q, pmi_stt_q;
  logic [NPART-1:0][LAW-1:0] pmo_line, pmi_line_q;

  for (genvar p = 0; p < NPART; p++) begin : g_part
    gpu_l2_partition #(.PID(p), .NPART(NPART), .STT_SETS(STT_SETS), .SRAM_SETS(SRAM_SETS),
                       .WAYS(WAYS)) u_part (
      .clk, .rst_n,
      .req_valid(req_valid[p]), .req_ready(req_ready[p]), .req_we(req_we[p]),
      .req_addr(req_addr[p]), .req_wdata(req_wdata[p]),
      .resp_valid(resp_valid[p]), .resp_hit(resp_hit[p]), .resp_rdata(resp_rdata[p]),
      .mem_req_valid(mem_req_valid[p]), .mem_req_ready(mem_req_ready[p]),
      .mem_req_we(mem_req_we[p]), .mem_req_addr(mem_req_addr[p]),
      .mem_req_wdata(mem_req_wdata[p]), .mem_resp_valid(mem_resp_valid[p]),
      .mem_resp_rdata(mem_resp_rdata[p]),
      .pm_out_valid(pmo_v[p]), .pm_out_to_stt(pmo_stt[p]), .pm_out_line(pmo_line[p]),
      .pm_in_valid(pmi_v_q[p]), .pm_in_to_stt(pmi_stt_q[p]), .pm_in_line(pmi_line_q[p]),
      .ev_hit_stt(events[p][0]), .ev_hit_sram(events[p][1]), .ev_miss(events[p][2]),
      .ev_fill_sram(events[p][3]), .ev_tab_hit(events[p][4]), .ev_tab_ins(events[p][5]),
      .ev_mig_to_sram(events[p][6]), .ev_mig_to_stt(events[p][7]),
      .ev_premig(events[p][8]), .ev_writeback(events[p][9])
    );
  end

  // broadcast: each partition takes the lowest-numbered other sender
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pmi_v_q    <= '0;
      pmi_stt_q  <= '0;
      pmi_line_q <= '0;
    end else begin
      for (int r = 0; r < NPART; r++) begin
        pmi_v_q[r] <= 1'b0;
        for (int s = NPART - 1; s >= 0; s--) begin
          if (s != r && pmo_v[s]) begin
            pmi_v_q[r]    <= 1'b1;
            pmi_stt_q[r]  <= pmo_stt[s];
            pmi_line_q[r] <= pmo_line[s];
          end
        end
      end
    end
  end
endmodule

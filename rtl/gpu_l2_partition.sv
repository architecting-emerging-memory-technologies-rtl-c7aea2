// gpu_l2_partition -- one partition of a GPGPU last-level cache made of a
// large STT-RAM part and a small SRAM augment, managed by an
// allocation/migration controller (AMC).
//
// The aim is to keep blocks that are read much more than written in STT-RAM
// (cheap reads, no leakage) and move write-heavy or transit blocks to SRAM
// (cheap writes).  Both parts are probed in parallel, each with its own set
// index and tag; a block lives in at most one of them.  Every block carries
// a 2-bit read reference counter (RRC) and a 1-bit write counter (WRC),
// cleared when the block is loaded or moved.
//   Differential allocation: a write miss is filled into SRAM; a read miss
//     into STT-RAM, unless the set index is in the transit address buffer
//     (TAB), in which case it goes to SRAM and the TAB entry is removed.
//   Migration: in STT-RAM a write that finds WRC saturated moves the block
//     to SRAM; a read that finds RRC saturated clears both counters.  In SRAM
//     the roles are swapped: a read that finds RRC saturated moves the block
//     to STT-RAM, a write that finds WRC saturated clears both.  Otherwise the
//     access increments its counter.
//   TAB: a block evicted from STT-RAM with both counters zero puts its set
//     index into the TAB (transit_addr_buffer).
//   Pre-migration: every migration is announced on pm_out with the line
//     address above the partition bits; partitions receiving such a notice
//     move their own block at the same set/tag in the same direction, if
//     they hold it there.  Incoming notices wait in a 4-entry queue and are
//     dropped when it is full (they are only hints).
//
// Address map (128-byte lines, NPART partitions): bits 6..0 offset, then the
// partition number, then the set index and tag of each part.  Requests are
// 32-bit word reads and writes.  A displaced dirty block is written back to
// the partition's own DRAM channel (mem_*; one outstanding request, whole
// lines).  Timing from the accepting edge to resp_valid: hits take the part's
// latency (STT-RAM read 4 / write 30, SRAM read 5 / write 5 cycles, as in the
// document's configuration); migrations, misses and write-backs add their
// steps.  Queue size, word interface, LRU, SRAM associativity and the
// exact counter-saturation reading (a write that finds WRC already 1
// migrates, as in the document's example sequence of operations) are this
// design's choices.
module gpu_l2_partition #(
  parameter int unsigned PID       = 0,
  parameter int unsigned NPART     = 8,
  parameter int unsigned STT_SETS  = 512,
  parameter int unsigned SRAM_SETS = 64,
  parameter int unsigned WAYS      = 8,
  parameter int unsigned TAB_N     = 16,
  parameter int unsigned STT_RD    = 4,
  parameter int unsigned STT_WR    = 30,
  parameter int unsigned SRAM_RD   = 5,
  parameter int unsigned SRAM_WR   = 5,
  localparam int unsigned PW  = $clog2(NPART),
  localparam int unsigned LB  = 7 + PW,          // first set-index bit
  localparam int unsigned LAW = 32 - LB          // pre-migration line address width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_valid,
  output logic             req_ready,
  input  logic             req_we,
  input  logic [31:0]      req_addr,
  input  logic [31:0]      req_wdata,
  output logic             resp_valid,
  output logic             resp_hit,
  output logic [31:0]      resp_rdata,
  output logic             mem_req_valid,
  input  logic             mem_req_ready,
  output logic             mem_req_we,
  output logic [31:0]      mem_req_addr,
  output logic [1023:0]    mem_req_wdata,
  input  logic             mem_resp_valid,
  input  logic [1023:0]    mem_resp_rdata,
  // pre-migration notices
  output logic             pm_out_valid,
  output logic             pm_out_to_stt,
  output logic [LAW-1:0]   pm_out_line,
  input  logic             pm_in_valid,
  input  logic             pm_in_to_stt,
  input  logic [LAW-1:0]   pm_in_line,
  // events
  output logic             ev_hit_stt,
  output logic             ev_hit_sram,
  output logic             ev_miss,
  output logic             ev_fill_sram,
  output logic             ev_tab_hit,
  output logic             ev_tab_ins,
  output logic             ev_mig_to_sram,
  output logic             ev_mig_to_stt,
  output logic             ev_premig,
  output logic             ev_writeback
);
  localparam int unsigned SBS = $clog2(STT_SETS);
  localparam int unsigned SBR = $clog2(SRAM_SETS);
  localparam int unsigned TWS = 32 - LB - SBS;
  localparam int unsigned TWR = 32 - LB - SBR;
  localparam int unsigned WW  = $clog2(WAYS);
  localparam logic [1:0]  RMAX = 2'd3;   // read-RC saturation (theta_wr)
  localparam logic        WMAX = 1'b1;   // write-RC saturation (theta_rw)

  typedef struct packed { logic [1:0] rrc; logic wrc; } rc_t;
  typedef enum logic [2:0] { S_IDLE, S_LOOKUP, S_WAIT, S_EVICT, S_FETCH, S_MIG, S_RESP } state_t;

  state_t        state_q;
  logic [31:0]   addr_q, wdata_q;
  logic          we_q, pm_q, pm_stt_q, to_sram_q, mig_q, hit_q, mig_dirty_q, busy_q;
  logic [WW-1:0] src_way_q;
  logic [7:0]    cnt_q;
  logic [1023:0] line_q;
  logic [31:0]   rdata_q;

  // pre-migration queue
  localparam int unsigned PMQ = 4;
  logic [LAW:0]  pmq_q [PMQ];
  logic [2:0]    pmq_cnt_q;
  logic [1:0]    pmq_head_q, pmq_tail_q;

  // both parts, probed with their own index and tag
  logic [SBS-1:0] s_set;  logic [TWS-1:0] s_tag;
  logic [SBR-1:0] r_set;  logic [TWR-1:0] r_tag;
  assign s_set = addr_q[LB +: SBS];  assign s_tag = addr_q[31 -: TWS];
  assign r_set = addr_q[LB +: SBR];  assign r_tag = addr_q[31 -: TWR];

  logic s_hit, s_dirty, s_vvalid, s_vdirty, r_hit, r_dirty, r_vvalid, r_vdirty;
  logic [WW-1:0] s_way, s_vway, r_way, r_vway;
  rc_t s_meta, s_vmeta, r_meta, r_vmeta;
  logic [TWS-1:0] s_vtag;  logic [TWR-1:0] r_vtag;
  logic [1023:0] s_data, s_vdata, r_data, r_vdata;
  logic s_we, s_wvalid, s_wdirty, s_wde, s_touch, r_we, r_wvalid, r_wdirty, r_wde, r_touch;
  logic [WW-1:0] s_wway, r_wway;
  rc_t s_wmeta, r_wmeta;
  logic [1023:0] s_wdata, r_wdata;

  cache_part #(.SETS(STT_SETS), .WAYS(WAYS), .TAG_W(TWS), .LINE_W(1024), .META_W(3)) u_stt (
    .clk, .rst_n, .lk_set(s_set), .lk_tag(s_tag), .lk_hit(s_hit), .lk_way(s_way),
    .lk_dirty(s_dirty), .lk_meta(s_meta), .lk_data(s_data), .vic_way(s_vway),
    .vic_valid(s_vvalid), .vic_dirty(s_vdirty), .vic_tag(s_vtag), .vic_meta(s_vmeta),
    .vic_data(s_vdata), .wr_en(s_we), .wr_set(s_set), .wr_way(s_wway), .wr_valid(s_wvalid),
    .wr_dirty(s_wdirty), .wr_tag(s_tag), .wr_meta(s_wmeta), .wr_data_en(s_wde),
    .wr_data(s_wdata), .wr_touch(s_touch)
  );
  cache_part #(.SETS(SRAM_SETS), .WAYS(WAYS), .TAG_W(TWR), .LINE_W(1024), .META_W(3)) u_sram (
    .clk, .rst_n, .lk_set(r_set), .lk_tag(r_tag), .lk_hit(r_hit), .lk_way(r_way),
    .lk_dirty(r_dirty), .lk_meta(r_meta), .lk_data(r_data), .vic_way(r_vway),
    .vic_valid(r_vvalid), .vic_dirty(r_vdirty), .vic_tag(r_vtag), .vic_meta(r_vmeta),
    .vic_data(r_vdata), .wr_en(r_we), .wr_set(r_set), .wr_way(r_wway), .wr_valid(r_wvalid),
    .wr_dirty(r_wdirty), .wr_tag(r_tag), .wr_meta(r_wmeta), .wr_data_en(r_wde),
    .wr_data(r_wdata), .wr_touch(r_touch)
  );

  logic tab_hit, tab_ins, tab_rm;
  logic [$clog2(TAB_N+1)-1:0] tab_occ;   // visible for debug only
  transit_addr_buffer #(.ENTRIES(TAB_N), .KEY_W(SBS)) u_tab (
    .clk, .rst_n, .ins_en(tab_ins), .ins_key(s_set), .lk_key(s_set), .lk_hit(tab_hit),
    .rm_en(tab_rm), .occupancy(tab_occ)
  );

  // the requested word merged into a line
  function automatic logic [1023:0] merge(input logic [1023:0] l, input logic [4:0] w,
                                          input logic [31:0] d);
    logic [1023:0] r;
    r = l;
    r[w*32 +: 32] = d;
    return r;
  endfunction

  logic is_req, do_fill_sram;
  logic [4:0] wsel;
  assign wsel   = addr_q[6:2];
  assign is_req = !pm_q;
  // where a miss is filled: writes and TAB-matched reads go to SRAM
  assign do_fill_sram = we_q || tab_hit;

  // victim of the target part during eviction
  logic t_vvalid, t_vdirty;
  logic [31:0] t_vaddr;
  logic [1023:0] t_vdata;
  always_comb begin
    if (to_sram_q) begin
      t_vvalid = r_vvalid; t_vdirty = r_vdirty; t_vdata = r_vdata;
      t_vaddr  = {r_vtag, r_set, PW'(PID), 7'b0};
    end else begin
      t_vvalid = s_vvalid; t_vdirty = s_vdirty; t_vdata = s_vdata;
      t_vaddr  = {s_vtag, s_set, PW'(PID), 7'b0};
    end
  end

  assign req_ready = (state_q == S_IDLE);

  // memory requests
  always_comb begin
    mem_req_valid = 1'b0;
    mem_req_we    = 1'b0;
    mem_req_addr  = {addr_q[31:7], 7'b0};
    mem_req_wdata = t_vdata;
    if (!busy_q) begin
      if (state_q == S_EVICT && t_vvalid && t_vdirty) begin
        mem_req_valid = 1'b1;
        mem_req_we    = 1'b1;
        mem_req_addr  = t_vaddr;
      end else if (state_q == S_FETCH) mem_req_valid = 1'b1;
    end
  end
  logic mem_fire;
  assign mem_fire = mem_req_valid && mem_req_ready;

  // array writes
  always_comb begin
    s_we = 1'b0; s_wway = s_way; s_wvalid = 1'b1; s_wdirty = s_dirty; s_wmeta = s_meta;
    s_wde = 1'b0; s_wdata = merge(s_data, wsel, wdata_q); s_touch = 1'b1;
    r_we = 1'b0; r_wway = r_way; r_wvalid = 1'b1; r_wdirty = r_dirty; r_wmeta = r_meta;
    r_wde = 1'b0; r_wdata = merge(r_data, wsel, wdata_q); r_touch = 1'b1;
    tab_rm = 1'b0;
    case (state_q)
      S_LOOKUP: if (is_req) begin
        if (s_hit) begin
          s_we = 1'b1;
          if (!we_q) s_wmeta = (s_meta.rrc == RMAX) ? rc_t'(0) : '{rrc: s_meta.rrc + 2'd1, wrc: s_meta.wrc};
          else if (s_meta.wrc != WMAX) begin
            s_wmeta = '{rrc: s_meta.rrc, wrc: s_meta.wrc + 1'b1};
            s_wde = 1'b1; s_wdirty = 1'b1;
          end else s_we = 1'b0;           // migrates instead
        end else if (r_hit) begin
          r_we = 1'b1;
          if (we_q) begin
            r_wmeta = (r_meta.wrc == WMAX) ? rc_t'(0) : '{rrc: r_meta.rrc, wrc: r_meta.wrc + 1'b1};
            r_wde = 1'b1; r_wdirty = 1'b1;
          end else if (r_meta.rrc != RMAX) r_wmeta = '{rrc: r_meta.rrc + 2'd1, wrc: r_meta.wrc};
          else r_we = 1'b0;               // migrates instead
        end else if (!we_q && tab_hit) tab_rm = 1'b1;
      end
      S_FETCH: if (busy_q && mem_resp_valid) begin
        if (to_sram_q) begin
          r_we = 1'b1; r_wway = r_vway; r_wdirty = we_q; r_wmeta = '0; r_wde = 1'b1;
          r_wdata = we_q ? merge(mem_resp_rdata, wsel, wdata_q) : mem_resp_rdata;
        end else begin
          s_we = 1'b1; s_wway = s_vway; s_wdirty = we_q; s_wmeta = '0; s_wde = 1'b1;
          s_wdata = we_q ? merge(mem_resp_rdata, wsel, wdata_q) : mem_resp_rdata;
        end
      end
      S_MIG: begin
        // place the block in the target part, drop it from the source part
        if (to_sram_q) begin
          r_we = 1'b1; r_wway = r_vway; r_wdirty = mig_dirty_q; r_wmeta = '0; r_wde = 1'b1;
          r_wdata = line_q;
          s_we = 1'b1; s_wway = src_way_q; s_wvalid = 1'b0; s_wdirty = 1'b0; s_touch = 1'b0;
        end else begin
          s_we = 1'b1; s_wway = s_vway; s_wdirty = mig_dirty_q; s_wmeta = '0; s_wde = 1'b1;
          s_wdata = line_q;
          r_we = 1'b1; r_wway = src_way_q; r_wvalid = 1'b0; r_wdirty = 1'b0; r_touch = 1'b0;
        end
      end
      default: ;
    endcase
  end

  // an STT-RAM victim leaving with both counters zero is transit data
  assign tab_ins = (state_q == S_EVICT) && !to_sram_q && s_vvalid && s_vmeta == rc_t'(0) &&
                   (!(s_vvalid && s_vdirty) || mem_fire);

  // pre-migration notice out: one pulse when a migration is decided
  logic mig_now, mig_to_sram_now;
  always_comb begin
    mig_now = 1'b0; mig_to_sram_now = 1'b0;
    if (state_q == S_LOOKUP) begin
      if (is_req) begin
        if (s_hit && we_q && s_meta.wrc == WMAX) begin mig_now = 1'b1; mig_to_sram_now = 1'b1; end
        if (r_hit && !we_q && r_meta.rrc == RMAX) mig_now = 1'b1;
      end else begin
        if (!pm_stt_q && s_hit) begin mig_now = 1'b1; mig_to_sram_now = 1'b1; end
        if (pm_stt_q && r_hit) mig_now = 1'b1;
      end
    end
  end
  assign pm_out_valid  = mig_now && is_req;
  assign pm_out_to_stt = !mig_to_sram_now;
  assign pm_out_line   = addr_q[31:LB];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      addr_q <= '0; wdata_q <= '0; we_q <= 1'b0; pm_q <= 1'b0; pm_stt_q <= 1'b0;
      to_sram_q <= 1'b0; mig_q <= 1'b0; hit_q <= 1'b0; mig_dirty_q <= 1'b0; busy_q <= 1'b0;
      src_way_q <= '0; cnt_q <= '0; line_q <= '0; rdata_q <= '0;
      pmq_cnt_q <= '0; pmq_head_q <= '0; pmq_tail_q <= '0;
    end else begin
      // incoming notices
      if (pm_in_valid && pmq_cnt_q != 3'(PMQ)) begin
        pmq_q[pmq_tail_q] <= {pm_in_to_stt, pm_in_line};
        pmq_tail_q <= pmq_tail_q + 1'b1;
      end
      pmq_cnt_q <= pmq_cnt_q + 3'(pm_in_valid && pmq_cnt_q != 3'(PMQ))
                 - 3'(state_q == S_IDLE && !req_valid && pmq_cnt_q != '0);
      case (state_q)
        S_IDLE: begin
          if (req_valid) begin
            addr_q <= req_addr; we_q <= req_we; wdata_q <= req_wdata; pm_q <= 1'b0;
            state_q <= S_LOOKUP;
          end else if (pmq_cnt_q != '0) begin
            addr_q   <= {pmq_q[pmq_head_q][LAW-1:0], PW'(PID), 7'b0};
            pm_stt_q <= pmq_q[pmq_head_q][LAW];
            pm_q     <= 1'b1; we_q <= 1'b0;
            pmq_head_q <= pmq_head_q + 1'b1;
            state_q  <= S_LOOKUP;
          end
        end
        S_LOOKUP: begin
          hit_q <= s_hit || r_hit;
          rdata_q <= s_hit ? s_data[wsel*32 +: 32] : r_data[wsel*32 +: 32];
          if (mig_now) begin
            to_sram_q   <= mig_to_sram_now;
            src_way_q   <= mig_to_sram_now ? s_way : r_way;
            line_q      <= mig_to_sram_now ? (we_q ? merge(s_data, wsel, wdata_q) : s_data) : r_data;
            mig_dirty_q <= mig_to_sram_now ? (s_dirty || we_q) : r_dirty;
            mig_q       <= 1'b1;
            state_q     <= S_EVICT;
          end else if (pm_q) state_q <= S_IDLE;
          else if (s_hit || r_hit) begin
            cnt_q   <= 8'(s_hit ? (we_q ? STT_WR : STT_RD) : (we_q ? SRAM_WR : SRAM_RD)) - 8'd3;
            state_q <= S_WAIT;
          end else begin
            to_sram_q <= do_fill_sram;
            mig_q     <= 1'b0;
            state_q   <= S_EVICT;
          end
        end
        S_WAIT: if (cnt_q == '0) state_q <= S_RESP; else cnt_q <= cnt_q - 1'b1;
        S_EVICT: if (!(t_vvalid && t_vdirty) || mem_fire) state_q <= mig_q ? S_MIG : S_FETCH;
        S_FETCH: begin
          if (mem_fire) busy_q <= 1'b1;
          else if (busy_q && mem_resp_valid) begin
            busy_q  <= 1'b0;
            rdata_q <= mem_resp_rdata[wsel*32 +: 32];
            state_q <= S_RESP;
          end
        end
        S_MIG: state_q <= pm_q ? S_IDLE : S_RESP;
        S_RESP: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign resp_valid = (state_q == S_RESP);
  assign resp_hit   = hit_q;
  assign resp_rdata = rdata_q;

  assign ev_hit_stt     = (state_q == S_LOOKUP) && is_req && s_hit;
  assign ev_hit_sram    = (state_q == S_LOOKUP) && is_req && r_hit;
  assign ev_miss        = (state_q == S_LOOKUP) && is_req && !s_hit && !r_hit;
  assign ev_fill_sram   = ev_miss && do_fill_sram;
  assign ev_tab_hit     = ev_miss && !we_q && tab_hit;
  assign ev_tab_ins     = tab_ins;
  assign ev_mig_to_sram = (state_q == S_MIG) && to_sram_q;
  assign ev_mig_to_stt  = (state_q == S_MIG) && !to_sram_q;
  assign ev_premig      = (state_q == S_MIG) && pm_q;
  assign ev_writeback   = mem_fire && mem_req_we;

  assert property (@(posedge clk) disable iff (!rst_n) !(s_hit && r_hit))
    else $error("block present in both parts");
endmodule

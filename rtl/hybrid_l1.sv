// hybrid_l1 -- private L1 data cache made of a small SRAM partition and a
// large STT-RAM partition, kept coherent with MOESI over a snooping bus.
//
// STT-RAM gives three times the capacity of SRAM in the same area with
// little leakage, but its writes are slow and costly and wear the cells.  The
// SRAM partition is there to absorb writes.  Both partitions are probed in
// parallel, each with its own index and tag; a hit in either is returned
// through a 2:1 select, and a block is never in both.  Misses are filled by
// type: read misses into STT-RAM, write misses into SRAM.  Blocks then move
// between the partitions according to their coherence state (POLICY):
//   POL_NAIVE    never move.
//   POL_IMM      move as soon as the state says so: a block that becomes M or
//                O (it has been written and will be again) goes to SRAM, one
//                that becomes S or E goes to STT-RAM.  In practice: a local
//                write hit in STT-RAM moves the block to SRAM, and a remote
//                write to an O or S block in SRAM (ownership passes to the
//                writer, this copy becomes S) moves it to STT-RAM.
//   POL_DELAYED  move only after two consecutive qualifying operations,
//                tracked by a per-block transfer bit (TD): in STT-RAM a local
//                write sets TD and any read clears it, and a local write that
//                finds TD set moves the block to SRAM; in SRAM a remote read
//                of an O or S block sets TD and any write (local or a remote
//                update) clears it, and a remote read that finds TD set moves
//                the block to STT-RAM.  TD is cleared whenever a block is
//                allocated or moved.
// A move completes before the access that caused it is served.
//
// Coherence (MOESI with update of sharers): a read miss fills in E, or in S
// when another cache reports a copy; a write miss (BUS_RDX) fills in M; a
// write to an S or O block broadcasts the new line (BUS_UPD) and leaves the
// block in O if others still share it, else in M; E and M blocks are written
// silently.  Snooped remote reads turn M into O and E into S, and M/O blocks
// supply their data; a remote write miss invalidates the copy; a remote
// update overwrites an S or O copy and leaves it in S.  M and O victims are
// written back (BUS_WB).
//
// The STT-RAM cells are built with relaxed retention, so every block is
// refreshed DRAM-style: one block every RETENTION/(STT blocks) cycles, which
// occupies the cache for an STT-RAM read plus write; requests wait behind it.
//
// Interfaces: cpu_* carries one 64-bit load or store at a time (valid/ready
// then one resp_valid pulse); bus_* issues this cache's bus requests
// (valid/ready; RD, RDX and UPD are answered by bus_resp_valid with the line
// and the shared flag, WB completes at the handshake); snp_* delivers remote
// operations (valid/ready), answered in the following cycle by snp_resp_*.
// Timing: hits take the partition's latency from the accepting edge to
// resp_valid (SRAM 3/3, STT-RAM 4 read / 10 write cycles, the 4 KB + 128 KB
// configuration); bus traffic, moves and refresh add to it.  The MOESI
// transitions for writes to shared blocks, the bus protocol, the
// one-operation-at-a-time controller, LRU and the refresh spacing are this
// design's choices; the partitioning, the fill rule, the three policies and
// the TD rules follow the document.
module hybrid_l1
  import l1_pkg::*;
#(
  parameter int unsigned SRAM_SETS = 16,       // 4 KB: 16 sets x 4 ways x 64 B
  parameter int unsigned STT_SETS  = 512,      // 128 KB: 512 sets x 4 ways x 64 B
  parameter int unsigned WAYS      = 4,
  parameter policy_t     POLICY    = POL_IMM,
  parameter int unsigned SRAM_RD   = 3,
  parameter int unsigned SRAM_WR   = 3,
  parameter int unsigned STT_RD    = 4,
  parameter int unsigned STT_WR    = 10,
  parameter int unsigned RETENTION = 96000     // cycles (32 us at 3 GHz)
) (
  input  logic           clk,
  input  logic           rst_n,
  // core
  input  logic           cpu_req_valid,
  output logic           cpu_req_ready,
  input  logic           cpu_req_we,
  input  logic [31:0]    cpu_req_addr,
  input  logic [63:0]    cpu_req_wdata,
  output logic           cpu_resp_valid,
  output logic           cpu_resp_hit,
  output logic [63:0]    cpu_resp_rdata,
  // bus requests
  output logic           bus_req_valid,
  input  logic           bus_req_ready,
  output bus_cmd_t       bus_req_cmd,
  output logic [31:0]    bus_req_addr,
  output logic [511:0]   bus_req_data,
  input  logic           bus_resp_valid,
  input  logic           bus_resp_shared,
  input  logic [511:0]   bus_resp_data,
  // snooping
  input  logic           snp_valid,
  output logic           snp_ready,
  input  snp_cmd_t       snp_cmd,
  input  logic [31:0]    snp_addr,
  input  logic [511:0]   snp_data,
  output logic           snp_resp_valid,
  output logic           snp_resp_hit,
  output logic           snp_resp_supply,
  output logic [511:0]   snp_resp_data,
  // events
  output logic           ev_hit_sram,
  output logic           ev_hit_stt,
  output logic           ev_miss,
  output logic           ev_mig_to_sram,
  output logic           ev_mig_to_stt,
  output logic           ev_stt_write,
  output logic           ev_refresh,
  output logic           ev_refresh_wait,
  output logic           ev_update,
  output logic           ev_writeback
);
  localparam int unsigned SBR = $clog2(SRAM_SETS);
  localparam int unsigned SBS = $clog2(STT_SETS);
  localparam int unsigned TWR = 32 - 6 - SBR;
  localparam int unsigned TWS = 32 - 6 - SBS;
  localparam int unsigned WW  = $clog2(WAYS);
  localparam int unsigned NBS = STT_SETS * WAYS;
  localparam int unsigned REF_INT = (RETENTION / NBS < 1) ? 1 : RETENTION / NBS;
  localparam int unsigned REF_LAT = STT_RD + STT_WR;

  typedef struct packed { logic td; moesi_t st; } meta_t;
  typedef enum logic [3:0] {
    S_IDLE, S_LOOKUP, S_UPD, S_WAIT, S_EVICT, S_MISS_BUS, S_MIG, S_REFRESH, S_RESP
  } state_t;

  state_t        state_q;
  logic [31:0]   addr_q;
  logic          we_q, snp_q;
  snp_cmd_t      scmd_q;
  logic [63:0]   wdata_q, rdata_q;
  logic [511:0]  sdata_q, line_q;
  logic          to_sram_q, mig_q, hit_q, busy_q;
  moesi_t        mig_st_q;
  logic [WW-1:0] src_way_q;
  logic [7:0]    cnt_q;
  logic [$clog2(REF_INT+1)-1:0] ref_cnt_q;
  logic          ref_pend_q;
  logic [$clog2(NBS)-1:0] ref_ptr_q;

  // ---- the two partitions ----
  logic [SBR-1:0] r_set; logic [TWR-1:0] r_tag;
  logic [SBS-1:0] s_set; logic [TWS-1:0] s_tag;
  assign r_set = addr_q[6 +: SBR]; assign r_tag = addr_q[31 -: TWR];
  assign s_set = addr_q[6 +: SBS]; assign s_tag = addr_q[31 -: TWS];

  logic r_hit, r_dirty, r_vvalid, r_vdirty, s_hit, s_dirty, s_vvalid, s_vdirty;
  logic [WW-1:0] r_way, r_vway, s_way, s_vway;
  meta_t r_meta, r_vmeta, s_meta, s_vmeta;
  logic [TWR-1:0] r_vtag; logic [TWS-1:0] s_vtag;
  logic [511:0] r_data, r_vdata, s_data, s_vdata;
  logic r_we, r_wvalid, r_wde, r_touch, s_we, s_wvalid, s_wde, s_touch;
  logic [WW-1:0] r_wway, s_wway;
  meta_t r_wmeta, s_wmeta;
  logic [511:0] r_wdata, s_wdata;

  cache_part #(.SETS(SRAM_SETS), .WAYS(WAYS), .TAG_W(TWR), .LINE_W(512), .META_W(4)) u_sram (
    .clk, .rst_n, .lk_set(r_set), .lk_tag(r_tag), .lk_hit(r_hit), .lk_way(r_way),
    .lk_dirty(r_dirty), .lk_meta(r_meta), .lk_data(r_data), .vic_way(r_vway),
    .vic_valid(r_vvalid), .vic_dirty(r_vdirty), .vic_tag(r_vtag), .vic_meta(r_vmeta),
    .vic_data(r_vdata), .wr_en(r_we), .wr_set(r_set), .wr_way(r_wway), .wr_valid(r_wvalid),
    .wr_dirty(write_state(r_wmeta.st)), .wr_tag(r_tag), .wr_meta(r_wmeta), .wr_data_en(r_wde),
    .wr_data(r_wdata), .wr_touch(r_touch)
  );
  cache_part #(.SETS(STT_SETS), .WAYS(WAYS), .TAG_W(TWS), .LINE_W(512), .META_W(4)) u_stt (
    .clk, .rst_n, .lk_set(s_set), .lk_tag(s_tag), .lk_hit(s_hit), .lk_way(s_way),
    .lk_dirty(s_dirty), .lk_meta(s_meta), .lk_data(s_data), .vic_way(s_vway),
    .vic_valid(s_vvalid), .vic_dirty(s_vdirty), .vic_tag(s_vtag), .vic_meta(s_vmeta),
    .vic_data(s_vdata), .wr_en(s_we), .wr_set(s_set), .wr_way(s_wway), .wr_valid(s_wvalid),
    .wr_dirty(write_state(s_wmeta.st)), .wr_tag(s_tag), .wr_meta(s_wmeta), .wr_data_en(s_wde),
    .wr_data(s_wdata), .wr_touch(s_touch)
  );

  // ---- view of the addressed block ----
  logic         hit, in_sram;
  meta_t        h_meta;
  logic [511:0] h_data, h_merged;
  logic [2:0]   wsel;
  assign hit     = r_hit || s_hit;
  assign in_sram = r_hit;
  assign h_meta  = r_hit ? r_meta : s_meta;
  assign h_data  = r_hit ? r_data : s_data;
  assign wsel    = addr_q[5:3];
  always_comb begin
    h_merged = h_data;
    h_merged[wsel*64 +: 64] = wdata_q;
  end

  // ---- decisions ----
  // local write that needs no bus transaction, or one whose update completed
  logic   lw_go;
  moesi_t lw_st;
  logic   lw_mig;        // the write moves the block STT-RAM -> SRAM
  logic   need_upd;
  assign need_upd = hit && (h_meta.st == ST_S || h_meta.st == ST_O);
  assign lw_go = (state_q == S_LOOKUP && !snp_q && we_q && hit && !need_upd) ||
                 (state_q == S_UPD && busy_q && bus_resp_valid);
  assign lw_st = (state_q == S_UPD) ? (bus_resp_shared ? ST_O : ST_M) : ST_M;
  always_comb begin
    case (POLICY)
      POL_IMM:     lw_mig = !in_sram && write_state(lw_st);
      POL_DELAYED: lw_mig = !in_sram && h_meta.td;
      default:     lw_mig = 1'b0;
    endcase
  end

  // snooped operation on a present block
  moesi_t sn_st;
  logic   sn_td, sn_mig, sn_supply;
  always_comb begin
    sn_st = h_meta.st; sn_td = h_meta.td; sn_mig = 1'b0;
    sn_supply = write_state(h_meta.st) && (scmd_q != SNP_UPD);
    case (scmd_q)
      SNP_RD: begin
        sn_st = (h_meta.st == ST_M) ? ST_O : (h_meta.st == ST_E) ? ST_S : h_meta.st;
        if (!in_sram) sn_td = 1'b0;
        else if (POLICY == POL_DELAYED && (h_meta.st == ST_S || h_meta.st == ST_O)) begin
          sn_mig = h_meta.td;
          sn_td  = 1'b1;
        end
      end
      SNP_RDX: sn_st = ST_I;
      default: begin                       // SNP_UPD
        sn_st = ST_S;
        if (in_sram) sn_td = 1'b0;
      end
    endcase
    if (POLICY == POL_IMM && in_sram && sn_st != ST_I && !write_state(sn_st)) sn_mig = 1'b1;
  end

  // ---- bus requests ----
  logic t_vvalid;
  meta_t t_vmeta;
  logic [31:0] t_vaddr;
  logic [511:0] t_vdata;
  always_comb begin
    if (to_sram_q) begin
      t_vvalid = r_vvalid; t_vmeta = r_vmeta; t_vdata = r_vdata;
      t_vaddr  = {r_vtag, r_set, 6'b0};
    end else begin
      t_vvalid = s_vvalid; t_vmeta = s_vmeta; t_vdata = s_vdata;
      t_vaddr  = {s_vtag, s_set, 6'b0};
    end
  end
  logic ev_need_wb;
  assign ev_need_wb = t_vvalid && write_state(t_vmeta.st);

  always_comb begin
    bus_req_valid = 1'b0;
    bus_req_cmd   = BUS_RD;
    bus_req_addr  = {addr_q[31:6], 6'b0};
    bus_req_data  = h_merged;
    if (!busy_q) begin
      case (state_q)
        S_UPD: begin bus_req_valid = 1'b1; bus_req_cmd = BUS_UPD; end
        S_EVICT: if (ev_need_wb) begin
          bus_req_valid = 1'b1; bus_req_cmd = BUS_WB;
          bus_req_addr = t_vaddr; bus_req_data = t_vdata;
        end
        S_MISS_BUS: begin bus_req_valid = 1'b1; bus_req_cmd = we_q ? BUS_RDX : BUS_RD; end
        default: ;
      endcase
    end
  end
  logic bus_fire;
  assign bus_fire = bus_req_valid && bus_req_ready;

  // ---- array writes ----
  always_comb begin
    logic [511:0] fill;
    fill = bus_resp_data;
    fill[wsel*64 +: 64] = we_q ? wdata_q : bus_resp_data[wsel*64 +: 64];
    r_we = 1'b0; r_wway = r_way; r_wvalid = 1'b1; r_wmeta = r_meta; r_wde = 1'b0;
    r_wdata = h_merged; r_touch = 1'b1;
    s_we = 1'b0; s_wway = s_way; s_wvalid = 1'b1; s_wmeta = s_meta; s_wde = 1'b0;
    s_wdata = h_merged; s_touch = 1'b1;
    if (state_q == S_LOOKUP && !snp_q && !we_q && hit) begin
      // local read: STT-RAM reads clear TD
      if (!in_sram) begin s_we = 1'b1; s_wmeta.td = 1'b0; end
      else r_we = 1'b1;
    end
    if (lw_go && !lw_mig) begin
      if (in_sram) begin r_we = 1'b1; r_wde = 1'b1; r_wmeta = '{td: 1'b0, st: lw_st}; end
      else begin
        s_we = 1'b1; s_wde = 1'b1;
        s_wmeta = '{td: (POLICY == POL_DELAYED), st: lw_st};
      end
    end
    if (state_q == S_LOOKUP && snp_q && hit && !sn_mig) begin
      if (in_sram) begin
        r_we = 1'b1; r_touch = 1'b0; r_wvalid = (sn_st != ST_I);
        r_wmeta = '{td: sn_td, st: sn_st}; r_wde = (scmd_q == SNP_UPD); r_wdata = sdata_q;
      end else begin
        s_we = 1'b1; s_touch = 1'b0; s_wvalid = (sn_st != ST_I);
        s_wmeta = '{td: sn_td, st: sn_st}; s_wde = (scmd_q == SNP_UPD); s_wdata = sdata_q;
      end
    end
    if (state_q == S_MISS_BUS && busy_q && bus_resp_valid) begin
      if (to_sram_q) begin
        r_we = 1'b1; r_wway = r_vway; r_wde = 1'b1; r_wdata = fill;
        r_wmeta = '{td: 1'b0, st: we_q ? ST_M : (bus_resp_shared ? ST_S : ST_E)};
      end else begin
        s_we = 1'b1; s_wway = s_vway; s_wde = 1'b1; s_wdata = fill;
        s_wmeta = '{td: 1'b0, st: we_q ? ST_M : (bus_resp_shared ? ST_S : ST_E)};
      end
    end
    if (state_q == S_MIG) begin
      if (to_sram_q) begin
        r_we = 1'b1; r_wway = r_vway; r_wde = 1'b1; r_wdata = line_q;
        r_wmeta = '{td: 1'b0, st: mig_st_q};
        s_we = 1'b1; s_wway = src_way_q; s_wvalid = 1'b0; s_wmeta = '0; s_touch = 1'b0;
      end else begin
        s_we = 1'b1; s_wway = s_vway; s_wde = 1'b1; s_wdata = line_q;
        s_wmeta = '{td: 1'b0, st: mig_st_q};
        r_we = 1'b1; r_wway = src_way_q; r_wvalid = 1'b0; r_wmeta = '0; r_touch = 1'b0;
      end
    end
  end

  // ---- control ----
  assign snp_ready     = (state_q == S_IDLE);
  assign cpu_req_ready = (state_q == S_IDLE) && !snp_valid && !ref_pend_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      addr_q <= '0; we_q <= 1'b0; snp_q <= 1'b0; scmd_q <= SNP_RD; wdata_q <= '0;
      rdata_q <= '0; sdata_q <= '0; line_q <= '0; to_sram_q <= 1'b0; mig_q <= 1'b0;
      hit_q <= 1'b0; busy_q <= 1'b0; mig_st_q <= ST_I; src_way_q <= '0; cnt_q <= '0;
      ref_cnt_q <= '0; ref_pend_q <= 1'b0; ref_ptr_q <= '0;
    end else begin
      // refresh timer
      if (32'(ref_cnt_q) == REF_INT - 1) begin
        ref_cnt_q  <= '0;
        ref_pend_q <= 1'b1;
      end else ref_cnt_q <= ref_cnt_q + 1'b1;

      case (state_q)
        S_IDLE: begin
          if (snp_valid) begin
            addr_q <= snp_addr; scmd_q <= snp_cmd; sdata_q <= snp_data;
            snp_q <= 1'b1; we_q <= 1'b0; state_q <= S_LOOKUP;
          end else if (ref_pend_q) begin
            ref_pend_q <= 1'b0;
            ref_ptr_q  <= ref_ptr_q + 1'b1;
            cnt_q      <= 8'(REF_LAT - 1);
            state_q    <= S_REFRESH;
          end else if (cpu_req_valid) begin
            addr_q <= cpu_req_addr; we_q <= cpu_req_we; wdata_q <= cpu_req_wdata;
            snp_q <= 1'b0; state_q <= S_LOOKUP;
          end
        end
        S_REFRESH: if (cnt_q == '0) state_q <= S_IDLE; else cnt_q <= cnt_q - 1'b1;
        S_LOOKUP: begin
          hit_q   <= hit;
          rdata_q <= h_data[wsel*64 +: 64];
          src_way_q <= r_hit ? r_way : s_way;
          if (snp_q) begin
            if (hit && sn_mig) begin
              to_sram_q <= !in_sram; mig_q <= 1'b1; mig_st_q <= sn_st;
              line_q <= (scmd_q == SNP_UPD) ? sdata_q : h_data;
              state_q <= S_EVICT;
            end else state_q <= S_IDLE;
          end else if (!hit) begin
            to_sram_q <= we_q; mig_q <= 1'b0; state_q <= S_EVICT;
          end else if (!we_q) begin
            cnt_q   <= 8'(in_sram ? SRAM_RD : STT_RD) - 8'd3;
            state_q <= S_WAIT;
          end else if (need_upd) state_q <= S_UPD;
          else if (lw_mig) begin
            to_sram_q <= 1'b1; mig_q <= 1'b1; mig_st_q <= lw_st; line_q <= h_merged;
            state_q <= S_EVICT;
          end else begin
            cnt_q   <= 8'(in_sram ? SRAM_WR : STT_WR) - 8'd3;
            state_q <= S_WAIT;
          end
        end
        S_UPD: begin
          if (bus_fire) busy_q <= 1'b1;
          else if (busy_q && bus_resp_valid) begin
            busy_q <= 1'b0;
            if (lw_mig) begin
              to_sram_q <= 1'b1; mig_q <= 1'b1; mig_st_q <= lw_st; line_q <= h_merged;
              state_q <= S_EVICT;
            end else state_q <= S_RESP;
          end
        end
        S_WAIT: if (cnt_q == '0 || cnt_q[7]) state_q <= S_RESP; else cnt_q <= cnt_q - 1'b1;
        S_EVICT: if (!ev_need_wb || bus_fire) state_q <= mig_q ? S_MIG : S_MISS_BUS;
        S_MISS_BUS: begin
          if (bus_fire) busy_q <= 1'b1;
          else if (busy_q && bus_resp_valid) begin
            busy_q  <= 1'b0;
            rdata_q <= bus_resp_data[wsel*64 +: 64];
            state_q <= S_RESP;
          end
        end
        S_MIG: begin
          if (snp_q) state_q <= S_IDLE;
          else begin
            // serve the access from the block's new place
            cnt_q   <= 8'(to_sram_q ? SRAM_WR : STT_RD) - 8'd2;
            state_q <= S_WAIT;
          end
        end
        S_RESP: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign cpu_resp_valid = (state_q == S_RESP);
  assign cpu_resp_hit   = hit_q;
  assign cpu_resp_rdata = rdata_q;

  // snoop answer, in the cycle after the snoop was accepted
  assign snp_resp_valid  = (state_q == S_LOOKUP) && snp_q;
  assign snp_resp_hit    = hit;
  assign snp_resp_supply = hit && sn_supply;
  assign snp_resp_data   = h_data;

  assign ev_hit_sram     = (state_q == S_LOOKUP) && !snp_q && r_hit;
  assign ev_hit_stt      = (state_q == S_LOOKUP) && !snp_q && s_hit;
  assign ev_miss         = (state_q == S_LOOKUP) && !snp_q && !hit;
  assign ev_mig_to_sram  = (state_q == S_MIG) && to_sram_q;
  assign ev_mig_to_stt   = (state_q == S_MIG) && !to_sram_q;
  assign ev_stt_write    = s_we && s_wde;
  assign ev_refresh      = (state_q == S_REFRESH) && (cnt_q == '0);
  assign ev_refresh_wait = cpu_req_valid && (state_q == S_REFRESH);
  assign ev_update       = bus_fire && bus_req_cmd == BUS_UPD;
  assign ev_writeback    = bus_fire && bus_req_cmd == BUS_WB;

  assert property (@(posedge clk) disable iff (!rst_n) !(r_hit && s_hit))
    else $error("block present in both partitions");
endmodule

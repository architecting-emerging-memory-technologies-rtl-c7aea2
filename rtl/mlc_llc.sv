// mlc_llc -- last-level cache built from 2-bit multi-level-cell (MLC)
// STT-RAM whose sets change their block size at run time.
//
// Each 512-bit physical block uses interleaved mapping: bits 0..255 live in
// the cells' fast "soft" region, bits 256..511 in the slow "hard" region.  A
// set works in one of two modes, recorded in its mode-selection bit (MS):
//   LBM (MS=0) - 8 blocks of 64 bytes, both regions used, slower access;
//   SBM (MS=1) - 8 blocks of 32 bytes in the soft region only, faster.
// The set index does not depend on the mode (mlc_addr_decomp), so an address
// has one home set; in SBM the tag carries address bit 5 to tell the halves
// of a 64-byte chunk apart.  Per-block reference counters and a per-set
// protection bit (mlc_set_monitor) decide, on misses only, when a set should
// switch.  A switch first writes back every dirty block, then:
//   LBM->SBM  keeps the lower halves in place (the tags are already correct,
//             their appended bit is 0) and drops the upper halves;
//   SBM->LBM  drops the small blocks whose tag ends in 1 and re-fetches the
//             upper half of every block whose tag ends in 0.
// Then the miss is serviced in the new mode.  All sets start in LBM.
//
// Upper-level interface: one 32-byte access at a time (the upper caches use
// 32-byte lines).  req_valid/req_ready handshake; resp_valid pulses once with
// the read data (writes also get a response).  Memory interface: 64-byte
// line reads and half-masked line writes, one outstanding request,
// mem_req_valid/mem_req_ready then mem_resp_valid for reads.
//
// Timing (cycles from the accepting edge to resp_valid): read hit 10 (LBM) /
// 7 (SBM), write hit 44 / 23, after the document's latency table.  A miss
// spends MISS_LAT cycles on the tag check before any memory traffic, then
// responds in the cycle after the fill arrives.  Replacement is LRU within
// the set; writes allocate on a miss.  Ports ev_* pulse for one cycle on
// each event so that a system can count them.
// The interfaces, LRU, write-allocate, the re-fetch choice for SBM->LBM and
// the response-after-fill timing are this design's choices; the modes, the
// address split, the counters, the thresholds, PB and the latencies follow
// the document.
module mlc_llc #(
  parameter int unsigned SETS     = 8192,
  parameter int unsigned WAYS     = 8,
  parameter int unsigned ADDR_W   = 32,
  parameter int unsigned THETA_LS = 4,
  parameter int unsigned THETA_SL = 4,
  parameter int unsigned RD_LBM   = 10,
  parameter int unsigned RD_SBM   = 7,
  parameter int unsigned WR_LBM   = 44,
  parameter int unsigned WR_SBM   = 23,
  parameter int unsigned MISS_LAT = 4,
  localparam int unsigned SB = $clog2(SETS),
  localparam int unsigned WW = $clog2(WAYS),
  localparam int unsigned TW = ADDR_W - SB - 6 + 1,
  localparam int unsigned NB = SETS * WAYS
) (
  input  logic              clk,
  input  logic              rst_n,
  // upper level
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [255:0]      req_wdata,
  output logic              resp_valid,
  output logic              resp_hit,
  output logic [255:0]      resp_rdata,
  // memory
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic              mem_req_we,
  output logic [ADDR_W-1:0] mem_req_addr,
  output logic [511:0]      mem_req_wdata,
  output logic [1:0]        mem_req_wmask,
  input  logic              mem_resp_valid,
  input  logic [511:0]      mem_resp_rdata,
  // events
  output logic              ev_hit,
  output logic              ev_miss,
  output logic              ev_to_sbm,
  output logic              ev_to_lbm,
  output logic              ev_pb_set,
  output logic              ev_writeback,
  output logic              ev_refetch
);
  typedef enum logic [3:0] {
    S_IDLE, S_LOOKUP, S_HITWAIT, S_MISSWAIT, S_RC_WB, S_RC_XFORM, S_RC_FETCH,
    S_EVICT, S_FETCH, S_RESP
  } state_t;

  // storage
  logic [NB-1:0]   valid_q, dirty_q;
  logic [SETS-1:0] ms_q, pb_q;
  logic [TW-1:0]   tag_q  [NB];
  logic [1:0]      rc0_q  [NB];
  logic [1:0]      rc1_q  [NB];
  logic [WW-1:0]   age_q  [NB];
  logic [255:0]    soft_q [NB];
  logic [255:0]    hard_q [NB];

  state_t state_q;
  logic [ADDR_W-1:0] addr_q;
  logic              we_q;
  logic [255:0]      wdata_q;
  logic [7:0]        cnt_q;
  logic [WW:0]       way_q;      // housekeeping way iterator
  logic              mem_busy_q; // memory request issued, waiting
  logic [WW-1:0]     vic_q;
  logic [255:0]      rdata_q;
  logic              hit_q;
  logic              rcfg_q;     // this miss switches the set's mode

  // decomposition of the pending request in its set's current mode
  logic [SB-1:0] set_idx;
  logic [TW-1:0] tag;
  logic [5:0]    offset;
  logic          mode;
  mlc_addr_decomp #(.ADDR_W(ADDR_W), .SET_BITS(SB)) u_dec (
    .addr(addr_q), .ms(mode), .set_idx, .tag, .offset
  );
  assign mode = ms_q[set_idx];

  function automatic int unsigned bidx(input logic [SB-1:0] s, input int unsigned w);
    return int'(s) * WAYS + w;
  endfunction

  // view of the set
  logic [WAYS-1:0]      s_valid, s_dirty, s_match;
  logic [WAYS-1:0][1:0] s_rc0, s_rc1, n_rc0, n_rc1;
  logic                 hit;
  logic [WW-1:0]        hit_way, victim;
  logic [$clog2(2*WAYS+1)-1:0] zeros;
  logic                 pattern, reconfig, pb_new;

  always_comb begin
    logic found_inv;
    hit = 1'b0; hit_way = '0; victim = '0; found_inv = 1'b0;
    for (int w = 0; w < WAYS; w++) begin
      s_valid[w] = valid_q[bidx(set_idx, w)];
      s_dirty[w] = dirty_q[bidx(set_idx, w)];
      s_rc0[w]   = rc0_q[bidx(set_idx, w)];
      s_rc1[w]   = rc1_q[bidx(set_idx, w)];
      s_match[w] = s_valid[w] && (tag_q[bidx(set_idx, w)] == tag);
      if (s_match[w]) begin hit = 1'b1; hit_way = WW'(w); end
    end
    // victim: first invalid way, else the least recently used
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!s_valid[w]) begin victim = WW'(w); found_inv = 1'b1; end
    end
    if (!found_inv)
      for (int w = 0; w < WAYS; w++)
        if (age_q[bidx(set_idx, w)] == WW'(WAYS - 1)) victim = WW'(w);
  end

  mlc_set_monitor #(.WAYS(WAYS), .THETA_LS(THETA_LS), .THETA_SL(THETA_SL)) u_mon (
    .mode, .valid(s_valid), .rc0(s_rc0), .rc1(s_rc1), .pb(pb_q[set_idx]),
    .hit, .hit_way, .hit_half(addr_q[5]),
    .rc0_new(n_rc0), .rc1_new(n_rc1), .zeros, .pattern, .reconfig, .pb_new
  );

  // block being written back / re-fetched during housekeeping or eviction
  logic [WW-1:0]     hk_way;
  int unsigned       hk_b;
  logic [ADDR_W-1:0] hk_line;
  assign hk_way  = (state_q == S_EVICT) ? vic_q : way_q[WW-1:0];
  assign hk_b    = bidx(set_idx, int'(hk_way));
  assign hk_line = {tag_q[hk_b][TW-1:1], set_idx, 6'b0};

  assign req_ready = (state_q == S_IDLE);

  // memory request
  always_comb begin
    mem_req_valid = 1'b0;
    mem_req_we    = 1'b0;
    mem_req_addr  = '0;
    mem_req_wdata = {hard_q[hk_b], soft_q[hk_b]};
    mem_req_wmask = 2'b11;
    if (!mem_busy_q) begin
      case (state_q)
        S_RC_WB, S_EVICT: if (way_q <= (WW+1)'(WAYS - 1) || state_q == S_EVICT)
          if (valid_q[hk_b] && dirty_q[hk_b]) begin
            mem_req_valid = 1'b1;
            mem_req_we    = 1'b1;
            mem_req_addr  = hk_line;
            if (mode) begin
              // a small block: its data sits in the soft region
              mem_req_wdata = {soft_q[hk_b], soft_q[hk_b]};
              mem_req_wmask = tag_q[hk_b][0] ? 2'b10 : 2'b01;
            end
          end
        S_RC_FETCH: if (way_q <= (WW+1)'(WAYS - 1) && valid_q[hk_b]) begin
          mem_req_valid = 1'b1;
          mem_req_addr  = hk_line;
        end
        S_FETCH: begin
          mem_req_valid = 1'b1;
          mem_req_addr  = {addr_q[ADDR_W-1:6], 6'b0};
        end
        default: ;
      endcase
    end
  end

  logic mem_fire;
  assign mem_fire = mem_req_valid && mem_req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      valid_q    <= '0;
      dirty_q    <= '0;
      ms_q       <= '0;
      pb_q       <= '0;
      addr_q     <= '0;
      we_q       <= 1'b0;
      wdata_q    <= '0;
      cnt_q      <= '0;
      way_q      <= '0;
      mem_busy_q <= 1'b0;
      vic_q      <= '0;
      rdata_q    <= '0;
      hit_q      <= 1'b0;
      rcfg_q     <= 1'b0;
    end else begin
      case (state_q)
        S_IDLE: if (req_valid) begin
          addr_q  <= req_addr;
          we_q    <= req_we;
          wdata_q <= req_wdata;
          state_q <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (hit) begin
            int unsigned b;
            b = bidx(set_idx, int'(hit_way));
            for (int w = 0; w < WAYS; w++) begin
              rc0_q[bidx(set_idx, w)] <= n_rc0[w];
              rc1_q[bidx(set_idx, w)] <= n_rc1[w];
              if (s_valid[w] && age_q[bidx(set_idx, w)] < age_q[b])
                age_q[bidx(set_idx, w)] <= age_q[bidx(set_idx, w)] + 1'b1;
            end
            age_q[b] <= '0;
            if (we_q) begin
              if (!mode && addr_q[5]) hard_q[b] <= wdata_q;
              else                    soft_q[b] <= wdata_q;
              dirty_q[b] <= 1'b1;
            end
            rdata_q <= (!mode && addr_q[5]) ? hard_q[b] : soft_q[b];
            hit_q   <= 1'b1;
            // the accepting cycle and this one count towards the latency
            cnt_q   <= 8'(we_q ? (mode ? WR_SBM : WR_LBM) : (mode ? RD_SBM : RD_LBM)) - 8'd3;
            state_q <= S_HITWAIT;
          end else begin
            pb_q[set_idx] <= pb_new;
            rcfg_q  <= reconfig;
            hit_q   <= 1'b0;
            cnt_q   <= 8'(MISS_LAT) - 8'd2;
            state_q <= S_MISSWAIT;
          end
        end
        S_HITWAIT: begin
          if (cnt_q == '0) state_q <= S_RESP;
          else cnt_q <= cnt_q - 1'b1;
        end
        S_MISSWAIT: begin
          if (cnt_q == '0 || cnt_q[7]) begin
            way_q <= '0;
            if (rcfg_q) state_q <= S_RC_WB;
            else begin vic_q <= victim; state_q <= S_EVICT; end
          end else cnt_q <= cnt_q - 1'b1;
        end
        S_RC_WB: begin
          // write back every dirty block of the set
          if (way_q > (WW+1)'(WAYS - 1)) state_q <= S_RC_XFORM;
          else if (!(valid_q[hk_b] && dirty_q[hk_b])) way_q <= way_q + 1'b1;
          else if (mem_fire) begin
            dirty_q[hk_b] <= 1'b0;
            way_q <= way_q + 1'b1;
          end
        end
        S_RC_XFORM: begin
          way_q <= '0;
          if (!mode) begin
            // LBM -> SBM: lower halves stay, upper halves are dropped
            ms_q[set_idx] <= 1'b1;
            state_q <= S_EVICT;
            vic_q   <= victim;
          end else begin
            // SBM -> LBM: drop blocks holding an upper half, re-fetch the rest
            // and re-rank the survivors so that their LRU ranks stay dense
            for (int w = 0; w < WAYS; w++) begin
              logic [WW-1:0] rank;
              rank = '0;
              if (tag_q[bidx(set_idx, w)][0]) valid_q[bidx(set_idx, w)] <= 1'b0;
              for (int o = 0; o < WAYS; o++)
                if (s_valid[o] && !tag_q[bidx(set_idx, o)][0] &&
                    age_q[bidx(set_idx, o)] < age_q[bidx(set_idx, w)])
                  rank = rank + 1'b1;
              age_q[bidx(set_idx, w)] <= rank;
            end
            ms_q[set_idx] <= 1'b0;
            state_q <= S_RC_FETCH;
          end
        end
        S_RC_FETCH: begin
          if (way_q > (WW+1)'(WAYS - 1)) begin
            vic_q   <= victim;
            state_q <= S_EVICT;
          end else if (!valid_q[hk_b]) way_q <= way_q + 1'b1;
          else if (mem_fire) mem_busy_q <= 1'b1;
          else if (mem_busy_q && mem_resp_valid) begin
            hard_q[hk_b] <= mem_resp_rdata[511:256];
            rc1_q[hk_b]  <= 2'd3;
            mem_busy_q   <= 1'b0;
            way_q        <= way_q + 1'b1;
          end
        end
        S_EVICT: begin
          if (!(valid_q[hk_b] && dirty_q[hk_b])) state_q <= S_FETCH;
          else if (mem_fire) begin
            dirty_q[hk_b] <= 1'b0;
            state_q <= S_FETCH;
          end
        end
        S_FETCH: begin
          if (mem_fire) mem_busy_q <= 1'b1;
          else if (mem_busy_q && mem_resp_valid) begin
            int unsigned b;
            logic [255:0] part;
            b = bidx(set_idx, int'(vic_q));
            mem_busy_q <= 1'b0;
            part = (mode && addr_q[5]) ? mem_resp_rdata[511:256] : mem_resp_rdata[255:0];
            if (!mode) begin
              soft_q[b] <= (we_q && !addr_q[5]) ? wdata_q : mem_resp_rdata[255:0];
              hard_q[b] <= (we_q &&  addr_q[5]) ? wdata_q : mem_resp_rdata[511:256];
              rdata_q   <= addr_q[5] ? mem_resp_rdata[511:256] : mem_resp_rdata[255:0];
            end else begin
              soft_q[b] <= we_q ? wdata_q : part;
              rdata_q   <= part;
            end
            tag_q[b]   <= tag;
            valid_q[b] <= 1'b1;
            dirty_q[b] <= we_q;
            rc0_q[b]   <= 2'd3;
            rc1_q[b]   <= 2'd3;
            for (int w = 0; w < WAYS; w++)
              if (s_valid[w] && WW'(w) != vic_q &&
                  (!s_valid[vic_q] || age_q[bidx(set_idx, w)] < age_q[b]))
                age_q[bidx(set_idx, w)] <= age_q[bidx(set_idx, w)] + 1'b1;
            age_q[b] <= '0;
            state_q  <= S_RESP;
          end
        end
        S_RESP: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign resp_valid = (state_q == S_RESP);
  assign resp_hit   = hit_q;
  assign resp_rdata = rdata_q;

  assign ev_hit       = (state_q == S_LOOKUP) && hit;
  assign ev_miss      = (state_q == S_LOOKUP) && !hit;
  assign ev_pb_set    = (state_q == S_LOOKUP) && !hit && pb_new;
  assign ev_to_sbm    = (state_q == S_RC_XFORM) && !mode;
  assign ev_to_lbm    = (state_q == S_RC_XFORM) && mode;
  assign ev_writeback = mem_fire && mem_req_we;
  assign ev_refetch   = mem_fire && (state_q == S_RC_FETCH);

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(s_match))
    else $error("tag found in more than one way");
endmodule

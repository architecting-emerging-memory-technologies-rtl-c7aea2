// cache_part -- one set-associative cache partition: tag, valid, dirty,
// per-block metadata and data arrays with LRU replacement.
//
// Hybrid caches are built from two of these (a large STT-RAM part and a
// small SRAM part) probed in parallel, each with its own set index and tag.
// The metadata field is opaque here; the caches above store their
// reference counters or coherence state and transfer bit in it.
//
// Lookup and victim selection are combinational on lk_set/lk_tag: lk_hit and
// lk_way name the matching way, vic_* describe the block that a fill would
// replace (the first invalid way, else the least recently used one).  The
// write port updates one block at the clock edge: wr_valid/wr_tag/wr_dirty/
// wr_meta always, the data only when wr_data_en, and with wr_touch the block
// becomes the most recently used of its set.  Recency is kept as exact LRU
// ranks: the valid ways of a set always hold the ranks 0..k-1, so the way
// with rank WAYS-1 is the LRU one when the set is full; an invalidation
// closes the gap it leaves.  Reset clears valid and dirty
// bits only.  The array technology (and so the access latency) is not
// modelled here; the controller above counts the cycles.  LRU and the port
// layout are this design's choices.
module cache_part #(
  parameter int unsigned SETS   = 64,
  parameter int unsigned WAYS   = 8,
  parameter int unsigned TAG_W  = 16,
  parameter int unsigned LINE_W = 1024,
  parameter int unsigned META_W = 3,
  localparam int unsigned SB = $clog2(SETS),
  localparam int unsigned WW = $clog2(WAYS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup and victim of one set
  input  logic [SB-1:0]     lk_set,
  input  logic [TAG_W-1:0]  lk_tag,
  output logic              lk_hit,
  output logic [WW-1:0]     lk_way,
  output logic              lk_dirty,
  output logic [META_W-1:0] lk_meta,
  output logic [LINE_W-1:0] lk_data,
  output logic [WW-1:0]     vic_way,
  output logic              vic_valid,
  output logic              vic_dirty,
  output logic [TAG_W-1:0]  vic_tag,
  output logic [META_W-1:0] vic_meta,
  output logic [LINE_W-1:0] vic_data,
  // block write
  input  logic              wr_en,
  input  logic [SB-1:0]     wr_set,
  input  logic [WW-1:0]     wr_way,
  input  logic              wr_valid,
  input  logic              wr_dirty,
  input  logic [TAG_W-1:0]  wr_tag,
  input  logic [META_W-1:0] wr_meta,
  input  logic              wr_data_en,
  input  logic [LINE_W-1:0] wr_data,
  input  logic              wr_touch
);
  localparam int unsigned NB = SETS * WAYS;

  logic [NB-1:0]     valid_q, dirty_q;
  logic [TAG_W-1:0]  tag_q  [NB];
  logic [META_W-1:0] meta_q [NB];
  logic [WW-1:0]     age_q  [NB];
  logic [LINE_W-1:0] data_q [NB];

  function automatic int unsigned bidx(input logic [SB-1:0] s, input logic [WW-1:0] w);
    return int'(s) * WAYS + int'(w);
  endfunction

  always_comb begin
    logic found_inv;
    lk_hit = 1'b0; lk_way = '0; vic_way = '0; found_inv = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (valid_q[bidx(lk_set, WW'(w))] && tag_q[bidx(lk_set, WW'(w))] == lk_tag) begin
        lk_hit = 1'b1; lk_way = WW'(w);
      end
    for (int w = WAYS - 1; w >= 0; w--)
      if (!valid_q[bidx(lk_set, WW'(w))]) begin vic_way = WW'(w); found_inv = 1'b1; end
    if (!found_inv)
      for (int w = 0; w < WAYS; w++)
        if (age_q[bidx(lk_set, WW'(w))] == WW'(WAYS - 1)) vic_way = WW'(w);
  end

  assign lk_dirty  = dirty_q[bidx(lk_set, lk_way)];
  assign lk_meta   = meta_q[bidx(lk_set, lk_way)];
  assign lk_data   = data_q[bidx(lk_set, lk_way)];
  assign vic_valid = valid_q[bidx(lk_set, vic_way)];
  assign vic_dirty = dirty_q[bidx(lk_set, vic_way)];
  assign vic_tag   = tag_q[bidx(lk_set, vic_way)];
  assign vic_meta  = meta_q[bidx(lk_set, vic_way)];
  assign vic_data  = data_q[bidx(lk_set, vic_way)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      dirty_q <= '0;
    end else if (wr_en) begin
      valid_q[bidx(wr_set, wr_way)] <= wr_valid;
      dirty_q[bidx(wr_set, wr_way)] <= wr_dirty;
      tag_q[bidx(wr_set, wr_way)]   <= wr_tag;
      meta_q[bidx(wr_set, wr_way)]  <= wr_meta;
      if (wr_data_en) data_q[bidx(wr_set, wr_way)] <= wr_data;
      if (!wr_valid && valid_q[bidx(wr_set, wr_way)]) begin
        // invalidation: close the gap in the recency ranks
        for (int w = 0; w < WAYS; w++)
          if (valid_q[bidx(wr_set, WW'(w))] &&
              age_q[bidx(wr_set, WW'(w))] > age_q[bidx(wr_set, wr_way)])
            age_q[bidx(wr_set, WW'(w))] <= age_q[bidx(wr_set, WW'(w))] - 1'b1;
      end else if (wr_valid && wr_touch) begin
        // a block that was invalid counts as older than all valid ones
        for (int w = 0; w < WAYS; w++)
          if (WW'(w) != wr_way && valid_q[bidx(wr_set, WW'(w))] &&
              (!valid_q[bidx(wr_set, wr_way)] ||
               age_q[bidx(wr_set, WW'(w))] < age_q[bidx(wr_set, wr_way)]))
            age_q[bidx(wr_set, WW'(w))] <= age_q[bidx(wr_set, WW'(w))] + 1'b1;
        age_q[bidx(wr_set, wr_way)] <= '0;
      end
    end
  end
endmodule

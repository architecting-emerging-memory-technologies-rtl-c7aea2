// mlc_set_monitor -- reference-counter bookkeeping and block-size decision
// for one set of the MLC STT-RAM last-level cache.
//
// Every block has two 2-bit saturating reference counters: RC0 for the lower
// half and RC1 for the upper half in LBM; in SBM only RC0 is used.  On a hit
// the counter of the accessed (half) block is decremented; once it is zero,
// further hits to it instead increment every other counter in use in the set
// (saturating at 3), which marks the accessed half as hot.  On a miss the
// zeros among the counters in use are counted: an LBM set with
// 0 < zeros < THETA_LS, or an SBM set with zeros > THETA_SL, shows a pattern
// that favours the other mode.  The per-set protection bit PB delays the
// switch: the first miss that shows the pattern sets PB, a second consecutive
// one triggers the reconfiguration (and clears PB), and any miss without the
// pattern clears PB.
// Combinational: the new counters, PB and the decision are valid in the cycle
// the inputs are.  Counters of invalid blocks are not counted or changed
// (this design's choice; the document counts "all the RCs within the set").
module mlc_set_monitor #(
  parameter int unsigned WAYS     = 8,
  parameter int unsigned THETA_LS = 4,
  parameter int unsigned THETA_SL = 4,
  localparam int unsigned WW = $clog2(WAYS),
  localparam int unsigned ZW = $clog2(2 * WAYS + 1)
) (
  input  logic                     mode,      // 0 = LBM, 1 = SBM
  input  logic [WAYS-1:0]          valid,
  input  logic [WAYS-1:0][1:0]     rc0,
  input  logic [WAYS-1:0][1:0]     rc1,
  input  logic                     pb,
  input  logic                     hit,
  input  logic [WW-1:0]            hit_way,
  input  logic                     hit_half,  // LBM: 1 = upper half accessed
  output logic [WAYS-1:0][1:0]     rc0_new,
  output logic [WAYS-1:0][1:0]     rc1_new,
  output logic [ZW-1:0]            zeros,
  output logic                     pattern,   // miss shows the other mode's pattern
  output logic                     reconfig,  // switch mode on this miss
  output logic                     pb_new
);
  always_comb begin
    logic [1:0] t;
    logic up;
    rc0_new = rc0;
    rc1_new = rc1;
    zeros   = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid[w]) begin
        if (rc0[w] == 2'd0) zeros = zeros + 1'b1;
        if (!mode && rc1[w] == 2'd0) zeros = zeros + 1'b1;
      end
    end
    up = hit_half && !mode;
    t  = up ? rc1[hit_way] : rc0[hit_way];
    if (hit) begin
      if (t != 2'd0) begin
        if (up) rc1_new[hit_way] = t - 2'd1;
        else    rc0_new[hit_way] = t - 2'd1;
      end else begin
        for (int w = 0; w < WAYS; w++) begin
          if (valid[w]) begin
            if (!(WW'(w) == hit_way && !up) && rc0[w] != 2'd3) rc0_new[w] = rc0[w] + 2'd1;
            if (!mode && !(WW'(w) == hit_way && up) && rc1[w] != 2'd3) rc1_new[w] = rc1[w] + 2'd1;
          end
        end
      end
    end
    if (!mode) pattern = (zeros != '0) && (32'(zeros) < THETA_LS);
    else       pattern = (32'(zeros) > THETA_SL);
    reconfig = !hit && pattern && pb;
    pb_new   = hit ? pb : (pattern && !pb);
  end
endmodule

// memristor_predictor -- neural (perceptron) branch predictor whose weight
// table is an array of multi-level memristor cells.
//
// A prediction request indexes one row of the weight table with the branch
// address (row = PC[RW+1:2], the word address modulo the row count) and
// presents the global history register to the cells of that row.  Each cell
// steers its memristor and reference currents onto the positive or negative
// line according to its history bit, the lines sum the currents, and a latched
// comparator decides: taken when the positive line carries at least as much
// current as the negative one.  In the same cycle the comparator checks
// whether the current difference is below the training threshold ("weak").
//
// The outcome and the weak flag travel with the branch in an in-flight queue
// (24 entries, the machine's in-flight branch limit) until the branch is
// resolved.  Resolution is in program order and always refers to the oldest
// in-flight branch.  When the prediction was wrong or weak, the whole row that
// made it is trained at once with the history that was used and the real
// outcome: cells whose history bit agrees with the outcome gain one level,
// the others lose one, the bias cell follows the outcome.
//
// History is updated speculatively with each prediction (a prediction made
// the cycle right after another one sees the newer bit through a bypass).
// On a misprediction the history is rebuilt from the resolved branch's
// snapshot plus the real outcome, and all younger in-flight branches,
// including one still in the prediction stage, are discarded (the pipeline
// flushes them).
//
// Timing: pred_req accepted when pred_ready is high; the prediction appears
// on pred_valid/pred_taken exactly one cycle later (the document's
// one-cycle prediction).  res_valid/res_taken resolves the oldest branch in
// the cycle it is asserted; training is written at that clock edge.
// The queue, the bypass and the in-order resolve interface are this design's
// choices; the table, the steering, the comparator and the training rule
// follow the document.
module memristor_predictor #(
  parameter int unsigned ROWS     = 256,
  parameter int unsigned HIST     = 48,
  parameter int unsigned INFLIGHT = 24,
  parameter int unsigned THETA    = 212,
  localparam int unsigned RW = $clog2(ROWS),
  localparam int unsigned QW = $clog2(INFLIGHT + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  // prediction
  input  logic        pred_req,
  input  logic [31:0] pred_pc,
  output logic        pred_ready,
  output logic        pred_valid,
  output logic        pred_taken,
  output logic        pred_weak,
  // resolution of the oldest in-flight branch
  input  logic        res_valid,
  input  logic        res_taken,
  output logic        res_mispredict,
  output logic        train_fire,
  output logic [QW-1:0] inflight
);
  localparam int unsigned IW = $clog2((HIST + 1) * 32);

  typedef struct packed {
    logic [RW-1:0]   row;
    logic [HIST-1:0] hist;
    logic            taken;
    logic            is_weak;
  } br_t;

  logic [HIST-1:0] ghr_q;
  logic            s1_valid_q;
  logic [RW-1:0]   s1_row_q;
  logic [HIST-1:0] s1_hist_q;
  br_t             q_mem [INFLIGHT];
  logic [QW-1:0]   head_q, tail_q, count_q;

  logic [IW-1:0]   i_pos, i_neg;
  logic            cmp_taken, cmp_weak;
  logic [HIST-1:0] hist_now;
  logic [RW-1:0]   row_now;
  logic            accept, flush, push, pop;
  br_t             head;

  // history seen by a new prediction: bypass the bit being produced now
  assign hist_now = s1_valid_q ? {s1_hist_q[HIST-2:0], cmp_taken} : ghr_q;
  assign row_now  = pred_pc[RW+1:2];

  mlmc_array #(.ROWS(ROWS), .HIST(HIST)) u_table (
    .clk, .rst_n,
    .rd_row(row_now), .rd_hist(hist_now), .i_pos, .i_neg,
    .tr_en(train_fire), .tr_row(head.row), .tr_hist(head.hist), .tr_taken(res_taken)
  );

  latched_comparator #(.IW(IW), .THETA(THETA)) u_cmp (
    .clk, .rst_n, .latch_en(accept), .i_pos, .i_neg,
    .taken(cmp_taken), .is_weak(cmp_weak)
  );

  assign head           = q_mem[head_q];
  assign pop            = res_valid && (count_q != '0);
  assign res_mispredict = pop && (head.taken != res_taken);
  assign train_fire     = pop && ((head.taken != res_taken) || head.is_weak);
  assign flush          = res_mispredict;
  assign push           = s1_valid_q && !flush;
  assign pred_ready     = (32'(count_q) + 32'(s1_valid_q)) < INFLIGHT;
  assign accept         = pred_req && pred_ready && !flush;
  assign pred_valid     = push;
  assign pred_taken     = cmp_taken;
  assign pred_weak      = cmp_weak;
  assign inflight       = count_q;

  function automatic logic [QW-1:0] nxt(input logic [QW-1:0] p);
    return (32'(p) == INFLIGHT - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ghr_q      <= '0;
      s1_valid_q <= 1'b0;
      s1_row_q   <= '0;
      s1_hist_q  <= '0;
      head_q     <= '0;
      tail_q     <= '0;
      count_q    <= '0;
    end else begin
      s1_valid_q <= accept;
      if (accept) begin
        s1_row_q  <= row_now;
        s1_hist_q <= hist_now;
      end
      if (flush) begin
        ghr_q   <= {head.hist[HIST-2:0], res_taken};
        head_q  <= '0;
        tail_q  <= '0;
        count_q <= '0;
      end else begin
        if (push) begin
          ghr_q          <= {s1_hist_q[HIST-2:0], cmp_taken};
          q_mem[tail_q]  <= '{row: s1_row_q, hist: s1_hist_q, taken: cmp_taken, is_weak: cmp_weak};
          tail_q         <= nxt(tail_q);
        end
        if (pop) head_q <= nxt(head_q);
        count_q <= count_q + QW'(push) - QW'(pop);
      end
    end
  end

  // resolving needs a branch in flight
  assert property (@(posedge clk) disable iff (!rst_n) res_valid |-> count_q != '0)
    else $error("resolve with no branch in flight");
endmodule

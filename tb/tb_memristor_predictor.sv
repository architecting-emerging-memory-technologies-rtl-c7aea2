// tb_memristor_predictor -- self-checking test of the memristor neural
// branch predictor.  A reference perceptron in the testbench keeps its own
// weight table (weight = 2*level-15 per cell, 16 levels), its own speculative
// history and its own in-flight queue, and predicts every branch
// independently; the DUT's prediction, weak flag, one-cycle latency,
// queue-full back-pressure, misprediction flush and training are compared
// against it.  Small table (16 rows, 8 history bits, 4 in flight).
module tb_memristor_predictor;
  localparam int ROWS = 16, HIST = 8, INFL = 4, THETA = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pred_req = 0, pred_ready, pred_valid, pred_taken, pred_weak;
  logic [31:0] pred_pc = 0;
  logic res_valid = 0, res_taken = 0, res_mispredict, train_fire;
  logic [2:0] inflight;

  memristor_predictor #(.ROWS(ROWS), .HIST(HIST), .INFLIGHT(INFL), .THETA(THETA)) dut (.*);

  int checks = 0, failures = 0;
  int n_train = 0, n_flush = 0, n_full = 0, n_weak_train = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // reference model
  int lvl [ROWS][HIST+1];
  logic [HIST-1:0] ghr;
  typedef struct { int row; logic [HIST-1:0] h; bit t; bit w; } ent_t;
  ent_t q[$];

  function automatic int sum(int row, logic [HIST-1:0] h);
    int s = 2*lvl[row][0] - 15;
    for (int c = 1; c <= HIST; c++) s += (h[c-1] ? 1 : -1) * (2*lvl[row][c] - 15);
    return s;
  endfunction

  task automatic predict(input int pc);
    int row, s; ent_t e;
    row = (pc >> 2) % ROWS;
    s = sum(row, ghr);
    e.row = row; e.h = ghr; e.t = (s >= 0); e.w = ((s < 0 ? -s : s) < THETA);
    @(negedge clk);
    check(pred_ready == 1, "ready when queue has room");
    pred_req = 1; pred_pc = pc;
    @(negedge clk);
    pred_req = 0;
    check(pred_valid == 1, "prediction one cycle after request");
    check(pred_taken == e.t, $sformatf("taken row %0d s=%0d", row, s));
    check(pred_weak == e.w, $sformatf("weak row %0d s=%0d", row, s));
    ghr = {ghr[HIST-2:0], e.t};
    q.push_back(e);
  endtask

  task automatic resolve(input bit outcome);
    ent_t e = q.pop_front();
    bit mis = (e.t != outcome);
    @(negedge clk);
    res_valid = 1; res_taken = outcome;
    #1;
    check(res_mispredict == mis, "mispredict flag");
    check(train_fire == (mis || e.w), "train decision");
    @(negedge clk);
    res_valid = 0;
    if (mis || e.w) begin
      n_train++;
      if (!mis) n_weak_train++;
      for (int c = 0; c <= HIST; c++) begin
        bit hb = (c == 0) ? 1'b1 : e.h[c-1];
        if (hb == outcome) begin if (lvl[e.row][c] < 15) lvl[e.row][c]++; end
        else begin if (lvl[e.row][c] > 0) lvl[e.row][c]--; end
      end
    end
    if (mis) begin
      n_flush++;
      ghr = {e.h[HIST-2:0], outcome};
      q.delete();
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a branch whose outcome follows the history: taken iff the last two agree
  initial begin
    for (int r = 0; r < ROWS; r++) for (int c = 0; c <= HIST; c++) lvl[r][c] = 7;
    ghr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      int n;
      n = 1 + ($urandom % INFL);
      for (int k = 0; k < n; k++) predict(($urandom % 64) * 4);
      if (q.size() == INFL) begin
        @(negedge clk);
        check(pred_ready == 0, "back-pressure when queue full");
        n_full++;
      end
      while (q.size() > 0) begin
        ent_t e;
        bit o;
        e = q[0];
        o = (it % 3 == 0) ? bit'($urandom % 2) : (e.h[0] ^ e.h[1]);
        resolve(o);
      end
      @(negedge clk);
      check(inflight == 0, "queue empty after resolving");
    end
    check(n_train > 0 && n_flush > 0 && n_full > 0 && n_weak_train > 0, "all mechanisms seen");
    $display("trainings=%0d weak_trainings=%0d flushes=%0d full=%0d", n_train, n_weak_train, n_flush, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

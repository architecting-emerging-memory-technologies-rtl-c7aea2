// mlmc_array -- behavioural model of the weight table of multi-level
// memristor cells (MLMC) used by the neural branch predictor.
//
// The real part is analog: every cell holds a memristor M with one of 16
// resistance levels and a fixed resistor R whose value sits in the middle of
// M's range.  When a row is selected for prediction, each cell steers the
// current through M and R onto a shared positive and a shared negative line;
// the history bit of its column decides which of the two goes where (history
// 1: M -> positive, R -> negative; history 0: swapped), which multiplies the
// stored weight by +1 or -1.  The currents on each line add up by Kirchhoff's
// current law.  This model represents currents as integers: a cell at level
// L (0..15) passes 2L+1 units through M and 16 units through R, so its
// effective weight is 2L-15, an odd number in -15..+15 (16 levels, the same
// resolution as a 4-bit digital weight).  Column 0 is the bias weight and
// always behaves as if its history bit were 1.
//
// Training programs every cell of one row at once: a cell whose history bit
// equals the branch outcome gets one level more conductance (weight +1 step),
// otherwise one level less; levels saturate at 0 and 15.  The bias cell moves
// up for a taken branch and down for a not-taken one.
//
// Timing: the line currents are combinational in rd_row / rd_hist (the analog
// sum settles within the prediction cycle).  Training takes effect at the
// clock edge.  Reset puts every cell at level 7 (weight -1, the level just
// below the middle of the range).  Cell levels, the current units and the
// reset level are this model's choices; the 16 levels, the P/N steering and
// the training directions follow the design.
module mlmc_array #(
  parameter int unsigned ROWS = 256,
  parameter int unsigned HIST = 48,
  localparam int unsigned RW  = $clog2(ROWS),
  localparam int unsigned IW  = $clog2((HIST + 1) * 32)
) (
  input  logic            clk,
  input  logic            rst_n,
  // prediction read
  input  logic [RW-1:0]   rd_row,
  input  logic [HIST-1:0] rd_hist,
  output logic [IW-1:0]   i_pos,
  output logic [IW-1:0]   i_neg,
  // training write
  input  logic            tr_en,
  input  logic [RW-1:0]   tr_row,
  input  logic [HIST-1:0] tr_hist,
  input  logic            tr_taken
);
  localparam int unsigned COLS = HIST + 1;
  localparam logic [3:0]  RST_LEVEL = 4'd7;
  localparam int unsigned R_UNITS = 16;

  // one row: COLS cells of 4 bits, cell 0 is the bias
  logic [COLS*4-1:0] table_q [ROWS];

  // analog current summation on the positive and negative lines
  always_comb begin
    logic [COLS*4-1:0] row;
    logic [IW-1:0] pos, neg, m_cur;
    logic h;
    row = table_q[rd_row];
    pos = '0;
    neg = '0;
    for (int c = 0; c < COLS; c++) begin
      m_cur = IW'(2 * row[c*4 +: 4] + 1);
      h = (c == 0) ? 1'b1 : rd_hist[c-1];
      if (h) begin
        pos = pos + m_cur;
        neg = neg + IW'(R_UNITS);
      end else begin
        pos = pos + IW'(R_UNITS);
        neg = neg + m_cur;
      end
    end
    i_pos = pos;
    i_neg = neg;
  end

  // programming of a whole row
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) table_q[r] <= {COLS{RST_LEVEL}};
    end else if (tr_en) begin
      logic [COLS*4-1:0] row;
      logic h;
      row = table_q[tr_row];
      for (int c = 0; c < COLS; c++) begin
        h = (c == 0) ? 1'b1 : tr_hist[c-1];
        if (h == tr_taken) begin
          if (row[c*4 +: 4] != 4'd15) row[c*4 +: 4] = row[c*4 +: 4] + 4'd1;
        end else begin
          if (row[c*4 +: 4] != 4'd0) row[c*4 +: 4] = row[c*4 +: 4] - 4'd1;
        end
      end
      table_q[tr_row] <= row;
    end
  end
endmodule

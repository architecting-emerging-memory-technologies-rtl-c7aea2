// tb_mlmc_array -- checks the memristor weight table model: line currents
// for random rows and histories against an independent sum, and the
// saturating +1/-1 level change of every cell of a trained row.
module tb_mlmc_array;
  localparam int ROWS = 8, HIST = 6, IW = $clog2((HIST + 1) * 32);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] rd_row = 0, tr_row = 0;
  logic [HIST-1:0] rd_hist = 0, tr_hist = 0;
  logic [IW-1:0] i_pos, i_neg;
  logic tr_en = 0, tr_taken = 0;
  mlmc_array #(.ROWS(ROWS), .HIST(HIST)) dut (.*);

  int checks = 0, failures = 0;
  int lvl [ROWS][HIST+1];

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int r = 0; r < ROWS; r++) for (int c = 0; c <= HIST; c++) lvl[r][c] = 7;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 600; it++) begin
      int p, n;
      @(negedge clk);
      rd_row = 3'($urandom); rd_hist = HIST'($urandom);
      tr_en = ($urandom % 2); tr_row = 3'($urandom); tr_hist = HIST'($urandom); tr_taken = 1'($urandom);
      #1;
      p = 0; n = 0;
      for (int c = 0; c <= HIST; c++) begin
        bit h; h = (c == 0) ? 1'b1 : rd_hist[c-1];
        if (h) begin p += 2*lvl[rd_row][c] + 1; n += 16; end
        else   begin n += 2*lvl[rd_row][c] + 1; p += 16; end
      end
      checks++;
      if (int'(i_pos) != p || int'(i_neg) != n) begin
        failures++; $display("FAIL row %0d: pos %0d/%0d neg %0d/%0d", rd_row, i_pos, p, i_neg, n);
      end
      if (tr_en) for (int c = 0; c <= HIST; c++) begin
        bit h; h = (c == 0) ? 1'b1 : tr_hist[c-1];
        if (h == tr_taken) begin if (lvl[tr_row][c] < 15) lvl[tr_row][c]++; end
        else if (lvl[tr_row][c] > 0) lvl[tr_row][c]--;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

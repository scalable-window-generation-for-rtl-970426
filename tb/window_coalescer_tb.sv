// window_coalescer_tb: self-checking test of the window coalescer.
//
// P = 4, windows up to 2x3, rows of 14 columns. The testbench plays the window
// buffer: it sends the ceil(14/4) = 4 words of each window row on consecutive
// cycles, sometimes back to back with the next row and sometimes with idle
// cycles between. Every window marked valid must hold the right pixels and
// start at the right column. Exactly ic - wc + 1 windows must appear per row.
// The first windows of a row must appear S = 2 cycles after its first word
// enters.
module window_coalescer_tb;
  localparam int P = 4, DW = 8, MWR = 2, MWC = 3, MC = 16, MR = 16;
  localparam int ROW_W = $clog2(MR + MWR + 1), COL_W = $clog2(MC + 1), WORD_W = $clog2(MC / P + 1);
  localparam int IC = 14, NW = 4, S = 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [COL_W-1:0] cfg_cols = COL_W'(IC);
  logic [1:0] cfg_wcols = 2'd3;
  logic col_valid = 0;
  logic [MWR-1:0][P-1:0][DW-1:0] col_data;
  logic [WORD_W-1:0] col_word = 0;
  logic [ROW_W-1:0] col_row = 0;
  logic [P-1:0][MWR-1:0][MWC-1:0][DW-1:0] win_data;
  logic [P-1:0] win_mask;
  logic [ROW_W-1:0] win_row;
  logic [COL_W-1:0] win_col;

  window_coalescer #(.P(P), .DATA_W(DW), .MAX_WR(MWR), .MAX_WC(MWC), .MAX_COLS(MC), .MAX_ROWS(MR)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, first_sent [MR], first_seen [MR], count [MR];
  logic [DW-1:0] img [MR + MWR][NW * P];

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (!rst) begin
    for (int k = 0; k < P; k++) if (win_mask[k]) begin
      bit ok;
      int r0, c0;
      r0 = int'(win_row); c0 = int'(win_col) + k;
      ok = (c0 <= IC - 3);
      for (int r = 0; r < MWR; r++)
        for (int c = 0; c < 3; c++) if (win_data[k][r][c] !== img[r0 + r][c0 + c]) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("FAIL window (%0d,%0d)", r0, c0);
      end
      if (count[r0] == 0) first_seen[r0] = cyc;
      count[r0]++;
    end
  end

  initial begin
    for (int r = 0; r < MR + MWR; r++)
      for (int c = 0; c < NW * P; c++) img[r][c] = (c < IC) ? DW'($urandom) : '0;
    for (int r = 0; r < MR; r++) count[r] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int row = 0; row < 8; row++) begin
      for (int w = 0; w < NW; w++) begin
        col_valid = 1; col_word = WORD_W'(w); col_row = ROW_W'(row);
        for (int r = 0; r < MWR; r++)
          for (int j = 0; j < P; j++) col_data[r][j] = img[row + r][w * P + j];
        if (w == 0) first_sent[row] = cyc;
        @(negedge clk);
      end
      col_valid = 0;
      for (int r = 0; r < MWR; r++) for (int j = 0; j < P; j++) col_data[r][j] = DW'($urandom);
      if (row % 3 == 1) repeat (1 + row) @(negedge clk);
    end
    repeat (6) @(negedge clk);
    for (int row = 0; row < 8; row++) begin
      checks += 2;
      if (count[row] != IC - 3 + 1) begin
        failures++;
        $display("FAIL row %0d: %0d windows", row, count[row]);
      end
      if (first_seen[row] - first_sent[row] != S) begin
        failures++;
        $display("FAIL row %0d: first windows after %0d cycles", row, first_seen[row] - first_sent[row]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

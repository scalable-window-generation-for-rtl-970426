// window_gen_tb: self-checking test of the window generator.
//
// Streams random images of several sizes through window_gen (P = 4, windows up
// to 3x3, images up to 32x32) and checks every produced window element by
// element against the image, in raster order, with none missing or repeated.
// The input has random gaps and the stall input is toggled at random in the
// first images. A last image is run with a steady input and no stall, and the
// spacing between rows of windows must be exactly ceil(ic/P) cycles, i.e. P
// windows per cycle while a row streams.
module window_gen_tb;
  localparam int P = 4, DW = 8, MWR = 3, MWC = 3, MC = 32, MR = 32;
  localparam int ROW_W = $clog2(MR + MWR + 1), COL_W = $clog2(MC + 1);

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start = 0, busy, done, in_valid = 0, in_ready, stall = 0;
  logic [ROW_W-1:0] cfg_rows;
  logic [COL_W-1:0] cfg_cols;
  logic [1:0] cfg_wrows, cfg_wcols;
  logic [P-1:0][DW-1:0] in_data;
  logic [P-1:0][MWR-1:0][MWC-1:0][DW-1:0] win_data;
  logic [P-1:0] win_mask;
  logic [ROW_W-1:0] win_row;
  logic [COL_W-1:0] win_col;

  window_gen #(.P(P), .DATA_W(DW), .MAX_WR(MWR), .MAX_WC(MWC), .MAX_COLS(MC), .MAX_ROWS(MR)) dut (
    .clk, .rst, .start, .cfg_rows, .cfg_cols, .cfg_wrows, .cfg_wcols, .busy, .done,
    .in_valid, .in_data, .in_ready, .stall, .win_data, .win_mask, .win_row, .win_col);

  int checks = 0, failures = 0;
  logic [DW-1:0] img [MR][MC];
  int ir, ic, wr, wc, er, ec, nwin, cyc, steady;
  int row_start_cyc [MR];
  bit random_traffic;

  always @(posedge clk) cyc <= cyc + 1;

  // Checker: every valid window against the image.
  always @(posedge clk) begin
    if (!rst) begin
      for (int k = 0; k < P; k++) begin
        if (win_mask[k]) begin
          bit ok;
          ok = (int'(win_row) == er) && (int'(win_col) + k == ec);
          for (int r = 0; r < wr; r++)
            for (int c = 0; c < wc; c++)
              if (win_data[k][r][c] !== img[er + r][ec + c]) ok = 0;
          checks++;
          if (!ok) begin
            failures++;
            if (failures < 10)
              $display("FAIL window expected (%0d,%0d) got (%0d,%0d)", er, ec, win_row, int'(win_col) + k);
          end
          if (ec == 0) row_start_cyc[er] = cyc;
          nwin++;
          if (ec == ic - wc) begin ec = 0; er++; end
          else ec++;
        end
      end
    end
  end

  task automatic run_image(int rows, int cols, int wrows, int wcols, bit rnd);
    int total, n;
    ir = rows; ic = cols; wr = wrows; wc = wcols; er = 0; ec = 0; nwin = 0;
    random_traffic = rnd;
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++) img[r][c] = DW'($urandom);
    @(negedge clk);
    cfg_rows = ROW_W'(rows); cfg_cols = COL_W'(cols);
    cfg_wrows = 2'(wrows); cfg_wcols = 2'(wcols);
    start = 1;
    @(negedge clk);
    start = 0;
    total = (rows * cols + P - 1) / P;
    n = 0;
    fork
      begin
        while (n < total) begin
          in_valid = rnd ? ($urandom % 4 != 0) : 1'b1;
          for (int j = 0; j < P; j++) begin
            int idx = n * P + j;
            in_data[j] = (idx < rows * cols) ? img[idx / cols][idx % cols] : DW'($urandom);
          end
          @(posedge clk);
          if (in_valid && in_ready) n++;
          @(negedge clk);
        end
        in_valid = 0;
      end
      begin
        while (!done) begin
          stall = rnd ? ($urandom % 3 == 0) : 1'b0;
          @(negedge clk);
        end
        stall = 0;
      end
    join
    @(negedge clk);
    checks++;
    if (nwin != (rows - wrows + 1) * (cols - wcols + 1)) begin
      failures++;
      $display("FAIL image %0dx%0d win %0dx%0d: %0d windows, expected %0d",
               rows, cols, wrows, wcols, nwin, (rows - wrows + 1) * (cols - wcols + 1));
    end
  endtask

  initial begin
    cyc = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    run_image(6, 10, 3, 3, 1);
    run_image(5, 7, 2, 2, 1);
    run_image(4, 4, 3, 3, 1);
    run_image(7, 13, 1, 3, 1);
    run_image(5, 9, 3, 1, 1);
    run_image(3, 3, 3, 3, 1);
    run_image(9, 32, 3, 3, 1);
    run_image(8, 17, 2, 3, 0);
    // Steady input, no stall: rows of windows follow each other every
    // ceil(ic/P) cycles.
    run_image(12, 22, 3, 3, 0);
    steady = (22 + P - 1) / P;
    for (int r = 1; r <= 12 - 3; r++) begin
      checks++;
      if (row_start_cyc[r] - row_start_cyc[r-1] != steady) begin
        failures++;
        $display("FAIL row %0d spacing %0d cycles, expected %0d", r,
                 row_start_cyc[r] - row_start_cyc[r-1], steady);
      end
    end
    $display("cycles %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

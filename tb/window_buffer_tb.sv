// window_buffer_tb: self-checking test of the row FIFOs and their controller.
//
// P = 4, MAX_WR = 3, rows up to 32 columns. A behavioural variable-read FIFO
// in this testbench serves the image pixels, answering each read after
// log2(P) cycles with the requested number of pixels. Every column word the
// buffer outputs is checked against the image. Pixels past the row end must be
// zero, and so must rows below the image (zero rows for smaller windows). The
// number of words per image must be (ir - wr + 1) * ceil(ic/P). Stall is
// toggled at random and the words of a row must come out on consecutive
// cycles.
module window_buffer_tb;
  localparam int P = 4, DW = 8, MWR = 3, MC = 32, MR = 32, LAT = 2;
  localparam int ROW_W = $clog2(MR + MWR + 1), COL_W = $clog2(MC + 1), WORD_W = $clog2(MC / P + 1);
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start = 0, busy, done, stall = 0;
  logic [ROW_W-1:0] cfg_rows;
  logic [COL_W-1:0] cfg_cols;
  logic [1:0] cfg_wrows;
  logic [3:0] vrf_count;
  logic vrf_rd_en, vrf_out_valid;
  logic [2:0] vrf_rd_amount;
  logic [P-1:0][DW-1:0] vrf_out_data;
  logic [P-1:0] vrf_out_mask;
  logic col_valid;
  logic [MWR-1:0][P-1:0][DW-1:0] col_data;
  logic [WORD_W-1:0] col_word;
  logic [ROW_W-1:0] col_row;

  window_buffer #(.P(P), .DATA_W(DW), .MAX_WR(MWR), .MAX_COLS(MC), .MAX_ROWS(MR)) dut (.*);

  int checks = 0, failures = 0;
  logic [DW-1:0] img [MR][MC];
  int ir, ic, nwords, nseen, ptr, last_word, last_row;
  bit in_row;

  // Behavioural VRF: pixels of the image in raster order.
  logic [P-1:0][DW-1:0] pipe_d [LAT];
  logic [P-1:0]         pipe_m [LAT];
  logic [LAT-1:0]       pipe_v;
  always_comb vrf_count = 4'((ir * ic - ptr) < 2 * P ? (ir * ic - ptr) : 2 * P);
  always @(posedge clk) begin
    if (rst) pipe_v <= '0;
    else begin
      logic [P-1:0][DW-1:0] d;
      logic [P-1:0] m;
      for (int j = 0; j < P; j++) begin
        m[j] = vrf_rd_en && (j < int'(vrf_rd_amount));
        d[j] = m[j] ? img[(ptr + j) / ic][(ptr + j) % ic] : DW'($urandom);
      end
      if (vrf_rd_en) ptr <= ptr + int'(vrf_rd_amount);
      pipe_v <= {pipe_v[LAT-2:0], vrf_rd_en};
      pipe_d[0] <= d; pipe_m[0] <= m;
      for (int s = 1; s < LAT; s++) begin pipe_d[s] <= pipe_d[s-1]; pipe_m[s] <= pipe_m[s-1]; end
    end
  end
  assign vrf_out_valid = pipe_v[LAT-1];
  assign vrf_out_data  = pipe_d[LAT-1];
  assign vrf_out_mask  = pipe_m[LAT-1];

  // Column checker
  always @(posedge clk) if (!rst) begin
    if (col_valid) begin
      bit ok;
      ok = 1;
      for (int r = 0; r < MWR; r++)
        for (int j = 0; j < P; j++) begin
          int row, col;
          logic [DW-1:0] e;
          row = int'(col_row) + r;
          col = int'(col_word) * P + j;
          e = (row < ir && col < ic) ? img[row][col] : '0;
          if (col_data[r][j] !== e) ok = 0;
        end
      // Words of a row come on consecutive cycles, in order.
      if (int'(col_word) != 0 && !(in_row && int'(col_word) == last_word + 1 && int'(col_row) == last_row)) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d of row %0d", col_word, col_row);
      end
      nseen++;
      last_word = int'(col_word); last_row = int'(col_row);
      in_row = (int'(col_word) != nwords - 1);
    end else if (in_row) begin
      failures++;
      $display("FAIL gap inside a row of windows");
      in_row = 0;
    end
  end

  task automatic run_image(int rows, int cols, int wrows, bit rnd_stall);
    ir = rows; ic = cols; nwords = (cols + P - 1) / P; nseen = 0; in_row = 0;
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++) img[r][c] = DW'($urandom % 255 + 1);
    @(negedge clk);
    ptr = 0;
    cfg_rows = ROW_W'(rows); cfg_cols = COL_W'(cols); cfg_wrows = 2'(wrows);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      stall = rnd_stall ? ($urandom % 2 == 0) : 1'b0;
      @(negedge clk);
    end
    stall = 0;
    checks++;
    if (nseen != (rows - wrows + 1) * nwords) begin
      failures++;
      $display("FAIL %0d words, expected %0d", nseen, (rows - wrows + 1) * nwords);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run_image(6, 10, 3, 1);
    run_image(5, 7, 2, 0);
    run_image(4, 8, 1, 1);
    run_image(3, 3, 3, 0);
    run_image(9, 32, 3, 1);
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

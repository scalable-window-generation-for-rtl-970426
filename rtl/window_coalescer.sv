// window_coalescer: assembles P complete windows per cycle from window columns.
//
// The coalescer is a shift register of C = ceil((MAX_WC + P - 1) / P) * P
// register columns, each MAX_WR pixels tall. Every clock it shifts by P
// columns and takes the P new columns from the window buffer at its far end.
// Window k (0..P-1) is register columns k .. k+MAX_WC-1, so windows that
// overlap share registers. After S = C/P shifts the register array holds P
// complete windows. The first window starts at the first column of the word
// that entered S-1 cycles earlier, the second at the next column, and so on.
//
// There is no enable: the array shifts every cycle. The window buffer
// guarantees that the columns of a window row arrive on consecutive cycles, so
// windows built from them are always correct. Each word's position travels
// beside the data in an S-stage pipeline and marks which of the P windows are
// real. Window k of word j is valid when the word belongs to a row of windows
// and j*P + k <= ic - wc, so windows running off the right edge of the image
// are never marked valid.
//
// Interface and timing: col_* comes from the window buffer. win_data[k][r][c]
// is pixel (win_row + r, win_col + k + c); win_mask[k] marks valid windows.
// The registers, including the window data, reset to zero, so elements
// outside a smaller requested window read as zero until real pixels shift in.
//
// From the design description: the register layout and count, the shift by P
// per new set of columns, the window positions and the removal of all enable
// logic. The validity pipeline is this implementation's own.
module window_coalescer #(
  parameter int unsigned P        = wg_pkg::P_DEFAULT,
  parameter int unsigned DATA_W   = wg_pkg::DATA_W_DEFAULT,
  parameter int unsigned MAX_WR   = wg_pkg::MAX_WR_DEFAULT,
  parameter int unsigned MAX_WC   = wg_pkg::MAX_WC_DEFAULT,
  parameter int unsigned MAX_COLS = wg_pkg::MAX_COLS_DEFAULT,
  parameter int unsigned MAX_ROWS = wg_pkg::MAX_ROWS_DEFAULT,
  localparam int unsigned DEPTH   = MAX_COLS / P,
  localparam int unsigned COL_W   = $clog2(MAX_COLS + 1),
  localparam int unsigned ROW_W   = $clog2(MAX_ROWS + MAX_WR + 1),
  localparam int unsigned WC_W    = $clog2(MAX_WC + 1),
  localparam int unsigned WORD_W  = $clog2(DEPTH + 1)
) (
  input  logic                                             clk,
  input  logic                                             rst,
  input  logic [COL_W-1:0]                                 cfg_cols,
  input  logic [WC_W-1:0]                                  cfg_wcols,
  input  logic                                             col_valid,
  input  logic [MAX_WR-1:0][P-1:0][DATA_W-1:0]             col_data,
  input  logic [WORD_W-1:0]                                col_word,
  input  logic [ROW_W-1:0]                                 col_row,
  output logic [P-1:0][MAX_WR-1:0][MAX_WC-1:0][DATA_W-1:0] win_data,
  output logic [P-1:0]                                     win_mask,
  output logic [ROW_W-1:0]                                 win_row,
  output logic [COL_W-1:0]                                 win_col
);

  localparam int unsigned C = wg_pkg::coalescer_cols(MAX_WC, P);
  localparam int unsigned S = C / P;

  typedef struct packed {
    logic              valid;
    logic [WORD_W-1:0] word;
    logic [ROW_W-1:0]  row;
  } meta_t;

  // regs_q[c][r]: register column c, row r; column 0 is the oldest.
  logic [C-1:0][MAX_WR-1:0][DATA_W-1:0] regs_q;
  meta_t                                meta_q [S];

  always_ff @(posedge clk) begin
    if (rst) begin
      regs_q <= '0;
    end else begin
      for (int c = 0; c < C - P; c++) regs_q[c] <= regs_q[c + P];
      for (int j = 0; j < P; j++)
        for (int r = 0; r < MAX_WR; r++) regs_q[C - P + j][r] <= col_data[r][j];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < S; s++) meta_q[s] <= '0;
    end else begin
      meta_q[0] <= '{valid: col_valid, word: col_word, row: col_row};
      for (int s = 1; s < S; s++) meta_q[s] <= meta_q[s-1];
    end
  end

  meta_t            m;
  logic [COL_W:0]   last_start;
  always_comb begin
    m          = meta_q[S-1];
    last_start = (COL_W+1)'(cfg_cols) - (COL_W+1)'(cfg_wcols);
    win_row    = m.row;
    win_col    = COL_W'(32'(m.word) * P);
    for (int k = 0; k < P; k++) begin
      win_mask[k] = m.valid && ((COL_W+1)'(32'(m.word) * P + k) <= last_start);
      for (int r = 0; r < MAX_WR; r++)
        for (int c = 0; c < MAX_WC; c++) win_data[k][r][c] = regs_q[k + c][r];
    end
  end

endmodule

// window_gen: the sliding-window generator.
//
// Takes an image as a stream of P pixels per cycle, row after row, with no
// padding at the row ends, and produces up to P complete windows per cycle.
// Window size (up to MAX_WR x MAX_WC) and image size (up to MAX_ROWS x
// MAX_COLS) are set at run time. Windows slide by one column and one row and
// stay inside the image.
//
// Structure: variable-read FIFO (vrf) -> window buffer (row FIFOs and their
// controller) -> window coalescer. The VRF lets the window buffer take just
// the pixels that finish an image row. The window buffer keeps MAX_WR rows and
// releases them P columns at a time. The coalescer turns those columns into
// P overlapping windows.
//
// Interface and timing.
//   start + cfg_*   : begin an image (one-cycle pulse while !busy).
//   in_valid/in_data/in_ready : the image, ceil(ir*ic/P) words of P pixels in
//                     raster order. The last word may be partly filled. Words
//                     are taken only while the image is running, and only as
//                     many as the image holds.
//   stall           : while high no new row of windows is started; a row
//                     already started runs to its end (ceil(ic/P) cycles).
//   win_*           : P windows per cycle. win_mask[k] marks window k, whose
//                     top-left pixel is (win_row, win_col + k). Elements
//                     outside the requested wr x wc window are not part of it.
//   done            : one-cycle pulse after the last window of the image.
// With a steady input, windows leave at P per cycle once MAX_WR rows are
// buffered. The first windows appear about MAX_WR * ceil(ic/P) + log2(P) + S
// cycles after the first pixels (S = coalescer shift count).
//
// Following the design description: the three-part structure and the run-time
// sizes. This implementation's own choice: accepting input only during a
// run, and clearing the VRF at the end of each image.
module window_gen #(
  parameter int unsigned P        = wg_pkg::P_DEFAULT,
  parameter int unsigned DATA_W   = wg_pkg::DATA_W_DEFAULT,
  parameter int unsigned MAX_WR   = wg_pkg::MAX_WR_DEFAULT,
  parameter int unsigned MAX_WC   = wg_pkg::MAX_WC_DEFAULT,
  parameter int unsigned MAX_COLS = wg_pkg::MAX_COLS_DEFAULT,
  parameter int unsigned MAX_ROWS = wg_pkg::MAX_ROWS_DEFAULT,
  localparam int unsigned DEPTH   = MAX_COLS / P,
  localparam int unsigned AMT_W   = $clog2(P + 1),
  localparam int unsigned VCNT_W  = $clog2(2 * P + 1),
  localparam int unsigned COL_W   = $clog2(MAX_COLS + 1),
  localparam int unsigned ROW_W   = $clog2(MAX_ROWS + MAX_WR + 1),
  localparam int unsigned WR_W    = $clog2(MAX_WR + 1),
  localparam int unsigned WC_W    = $clog2(MAX_WC + 1),
  localparam int unsigned WORD_W  = $clog2(DEPTH + 1),
  localparam int unsigned NIN_W   = $clog2((MAX_ROWS * MAX_COLS) / P + 2)
) (
  input  logic                                             clk,
  input  logic                                             rst,
  input  logic                                             start,
  input  logic [ROW_W-1:0]                                 cfg_rows,
  input  logic [COL_W-1:0]                                 cfg_cols,
  input  logic [WR_W-1:0]                                  cfg_wrows,
  input  logic [WC_W-1:0]                                  cfg_wcols,
  output logic                                             busy,
  output logic                                             done,
  input  logic                                             in_valid,
  input  logic [P-1:0][DATA_W-1:0]                         in_data,
  output logic                                             in_ready,
  input  logic                                             stall,
  output logic [P-1:0][MAX_WR-1:0][MAX_WC-1:0][DATA_W-1:0] win_data,
  output logic [P-1:0]                                     win_mask,
  output logic [ROW_W-1:0]                                 win_row,
  output logic [COL_W-1:0]                                 win_col
);

  logic                                 vrf_wr_ready, vrf_rd_en, vrf_out_valid, wb_done;
  logic [AMT_W-1:0]                     vrf_rd_amount;
  logic [VCNT_W-1:0]                    vrf_count;
  logic [P-1:0][DATA_W-1:0]             vrf_out_data;
  logic [P-1:0]                         vrf_out_mask;
  logic                                 col_valid;
  logic [MAX_WR-1:0][P-1:0][DATA_W-1:0] col_data;
  logic [WORD_W-1:0]                    col_word;
  logic [ROW_W-1:0]                     col_row;
  logic [COL_W-1:0]                     cols_q;
  logic [WC_W-1:0]                      wcols_q;
  logic [NIN_W-1:0]                     in_left_q;

  // Input words still expected for the running image.
  always_ff @(posedge clk) begin
    if (rst) in_left_q <= '0;
    else if (start && !busy)
      in_left_q <= NIN_W'((32'(cfg_rows) * 32'(cfg_cols) + P - 1) / P);
    else if (in_valid && in_ready) in_left_q <= in_left_q - 1'b1;
  end

  always_ff @(posedge clk) begin
    if (start && !busy) begin
      cols_q  <= cfg_cols;
      wcols_q <= cfg_wcols;
    end
  end

  assign in_ready = vrf_wr_ready && (in_left_q != '0);

  vrf #(.P(P), .DATA_W(DATA_W)) u_vrf (
    .clk, .rst, .clear(wb_done),
    .wr_en(in_valid && (in_left_q != '0)), .wr_data(in_data), .wr_ready(vrf_wr_ready),
    .rd_en(vrf_rd_en), .rd_amount(vrf_rd_amount), .count(vrf_count),
    .out_valid(vrf_out_valid), .out_data(vrf_out_data), .out_mask(vrf_out_mask)
  );

  window_buffer #(
    .P(P), .DATA_W(DATA_W), .MAX_WR(MAX_WR), .MAX_COLS(MAX_COLS), .MAX_ROWS(MAX_ROWS)
  ) u_wbuf (
    .clk, .rst, .start, .cfg_rows, .cfg_cols, .cfg_wrows,
    .busy, .done(wb_done), .stall,
    .vrf_count, .vrf_rd_en, .vrf_rd_amount, .vrf_out_valid, .vrf_out_data, .vrf_out_mask,
    .col_valid, .col_data, .col_word, .col_row
  );

  window_coalescer #(
    .P(P), .DATA_W(DATA_W), .MAX_WR(MAX_WR), .MAX_WC(MAX_WC),
    .MAX_COLS(MAX_COLS), .MAX_ROWS(MAX_ROWS)
  ) u_coal (
    .clk, .rst, .cfg_cols(cols_q), .cfg_wcols(wcols_q),
    .col_valid, .col_data, .col_word, .col_row,
    .win_data, .win_mask, .win_row, .win_col
  );

  // The last windows of an image are still in the coalescer when the window
  // buffer finishes; done waits for them.
  localparam int unsigned S = wg_pkg::coalescer_cols(MAX_WC, P) / P;
  logic [S-1:0] done_q;
  always_ff @(posedge clk) begin
    if (rst) done_q <= '0;
    else begin
      done_q[0] <= wb_done;
      for (int s = 1; s < S; s++) done_q[s] <= done_q[s-1];
    end
  end
  assign done = done_q[S-1];

endmodule

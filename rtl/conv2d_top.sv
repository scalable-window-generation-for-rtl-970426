// conv2d_top: 2D convolution accelerator built around the window generator.
//
// Software writes the kernel and the sizes over MMIO and starts a run. The
// image then streams in, P pixels per cycle, from a memory reader. The window
// generator turns it into up to P windows per cycle, and P replicated
// convolution pipelines each reduce one window to one result. The results go
// through a large output FIFO to a memory writer.
//
// Two arithmetic variants, chosen at build time by FLOAT:
//   FLOAT = 0 : fixed point (conv_pipeline). Unsigned DATA_W-bit pixels,
//               signed COEF_W-bit coefficients, multipliers and a balanced
//               adder tree.
//   FLOAT = 1 : single-precision floating point (fp_conv_pipeline). DATA_W and
//               COEF_W must be 32. Chained multiply-add units. Coefficients
//               should be written only while no image is running.
//
// Back-pressure. The convolution pipelines never stall. When the writer stops
// taking results (out_ready low), the output FIFO fills. At its almost-full
// level it stops the window generator from starting new rows of windows. The
// level leaves room for a whole row of windows plus everything in the
// pipelines.
//
// Interface and timing.
//   mmio_*   : register bus, see mmio_regs for the map. STATUS.done is set once
//              the last result of an image has entered the output FIFO.
//   in_*     : image words, valid/ready. An image of ir x ic pixels is
//              ceil(ir*ic/P) words in raster order with no row padding.
//   out_*    : one word per cycle with a valid window among its P slots,
//              valid/ready. out_data[k] is the result for output pixel
//              (out_row, out_col + k) and is valid when out_mask[k].
// Results appear 2 + ceil(log2(MAX_WR*MAX_WC)) cycles after their windows
// (fixed point) or MAX_WR*MAX_WC + 2 cycles after them (floating point).
//
// Following the design description: the data flow (MMIO set-up, streamed
// image, window generator, replicated pipelines, output FIFO whose almost-full
// flag stops window generation). The memory reader and writer (DMA over the
// host's coherent interface) are outside this module; its stream ports stand
// where they connect. The document builds fixed-point and floating-point
// designs separately; the FLOAT parameter, the output word format with a
// mask, row and column, and the almost-full margin are this implementation's
// choices.
module conv2d_top #(
  parameter int unsigned P           = wg_pkg::P_DEFAULT,
  parameter int unsigned DATA_W      = wg_pkg::DATA_W_DEFAULT,
  parameter int unsigned COEF_W      = wg_pkg::COEF_W_DEFAULT,
  parameter int unsigned MAX_WR      = wg_pkg::MAX_WR_DEFAULT,
  parameter int unsigned MAX_WC      = wg_pkg::MAX_WC_DEFAULT,
  parameter int unsigned MAX_COLS    = wg_pkg::MAX_COLS_DEFAULT,
  parameter int unsigned MAX_ROWS    = wg_pkg::MAX_ROWS_DEFAULT,
  parameter int unsigned OFIFO_DEPTH = 128,
  parameter bit          FLOAT       = 1'b0,
  localparam int unsigned TAPS   = MAX_WR * MAX_WC,
  localparam int unsigned LEVELS = wg_pkg::tree_levels(TAPS),
  localparam int unsigned OUT_W  = FLOAT ? 32 : DATA_W + COEF_W + 1 + LEVELS,
  localparam int unsigned COL_W  = $clog2(MAX_COLS + 1),
  localparam int unsigned ROW_W  = $clog2(MAX_ROWS + MAX_WR + 1)
) (
  input  logic                           clk,
  input  logic                           rst,
  // MMIO
  input  logic                           mmio_wr_en,
  input  logic [7:0]                     mmio_addr,
  input  logic [31:0]                    mmio_wdata,
  input  logic                           mmio_rd_en,
  output logic [31:0]                    mmio_rdata,
  // Image stream from the memory reader
  input  logic                           in_valid,
  input  logic [P-1:0][DATA_W-1:0]       in_data,
  output logic                           in_ready,
  // Result stream to the memory writer
  output logic                           out_valid,
  output logic [P-1:0][OUT_W-1:0]        out_data,
  output logic [P-1:0]                   out_mask,
  output logic [ROW_W-1:0]               out_row,
  output logic [COL_W-1:0]               out_col,
  input  logic                           out_ready
);

  localparam int unsigned WR_W     = $clog2(MAX_WR + 1);
  localparam int unsigned WC_W     = $clog2(MAX_WC + 1);
  localparam int unsigned CONV_LAT = FLOAT ? TAPS + 2 : 2 + LEVELS;
  localparam int unsigned S        = wg_pkg::coalescer_cols(MAX_WC, P) / P;
  // Results that can still arrive after almost_full rises: a whole row of
  // windows, the coalescer and the pipelines, plus margin.
  localparam int unsigned IN_FLIGHT = MAX_COLS / P + S + CONV_LAT + 4;
  localparam int unsigned AF_LEVEL  = OFIFO_DEPTH - IN_FLIGHT;

  typedef struct packed {
    logic [ROW_W-1:0]            row;
    logic [COL_W-1:0]            col;
    logic [P-1:0]                mask;
    logic [P-1:0][OUT_W-1:0]     data;
  } result_t;

  // Configuration
  logic                        start, wg_busy, wg_done, stall;
  logic [ROW_W-1:0]            rows;
  logic [COL_W-1:0]            cols;
  logic [WR_W-1:0]             wrows;
  logic [WC_W-1:0]             wcols;
  logic [TAPS-1:0][COEF_W-1:0] coef;
  logic [CONV_LAT:0]           done_q;

  mmio_regs #(
    .COEF_W(COEF_W), .MAX_WR(MAX_WR), .MAX_WC(MAX_WC),
    .MAX_COLS(MAX_COLS), .MAX_ROWS(MAX_ROWS)
  ) u_regs (
    .clk, .rst, .wr_en(mmio_wr_en), .addr(mmio_addr), .wdata(mmio_wdata),
    .rd_en(mmio_rd_en), .rdata(mmio_rdata),
    .start, .rows, .cols, .wrows, .wcols, .coef,
    .busy(wg_busy || (done_q != '0)), .done(done_q[CONV_LAT])
  );

  // Window generator
  logic [P-1:0][MAX_WR-1:0][MAX_WC-1:0][DATA_W-1:0] win_data;
  logic [P-1:0]                                     win_mask;
  logic [ROW_W-1:0]                                 win_row;
  logic [COL_W-1:0]                                 win_col;

  window_gen #(
    .P(P), .DATA_W(DATA_W), .MAX_WR(MAX_WR), .MAX_WC(MAX_WC),
    .MAX_COLS(MAX_COLS), .MAX_ROWS(MAX_ROWS)
  ) u_wgen (
    .clk, .rst, .start, .cfg_rows(rows), .cfg_cols(cols), .cfg_wrows(wrows),
    .cfg_wcols(wcols), .busy(wg_busy), .done(wg_done),
    .in_valid, .in_data, .in_ready, .stall,
    .win_data, .win_mask, .win_row, .win_col
  );

  // Replicated convolution pipelines
  logic [P-1:0]            res_valid;
  logic [P-1:0][OUT_W-1:0] res_data;

  for (genvar k = 0; k < P; k++) begin : g_pipe
    if (FLOAT) begin : g_float
      fp_conv_pipeline #(.TAPS(TAPS)) u_pipe (
        .clk, .rst, .in_valid(win_mask[k]), .win(win_data[k]), .coef,
        .out_valid(res_valid[k]), .result(res_data[k])
      );
    end else begin : g_fixed
      conv_pipeline #(.DATA_W(DATA_W), .COEF_W(COEF_W), .TAPS(TAPS)) u_pipe (
        .clk, .rst, .in_valid(win_mask[k]), .win(win_data[k]), .coef,
        .out_valid(res_valid[k]), .result(res_data[k])
      );
    end
  end

  // Row and column of each group of windows, delayed like the pipelines.
  logic [ROW_W-1:0] row_q [CONV_LAT];
  logic [COL_W-1:0] col_q [CONV_LAT];
  always_ff @(posedge clk) begin
    row_q[0] <= win_row;
    col_q[0] <= win_col;
    for (int s = 1; s < CONV_LAT; s++) begin
      row_q[s] <= row_q[s-1];
      col_q[s] <= col_q[s-1];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) done_q <= '0;
    else done_q <= {done_q[CONV_LAT-1:0], wg_done};
  end

  // Output FIFO
  result_t ofifo_in, ofifo_out;
  logic    ofifo_full, ofifo_empty;
  logic [$clog2(OFIFO_DEPTH+1)-1:0] ofifo_count;

  assign ofifo_in = '{row: row_q[CONV_LAT-1], col: col_q[CONV_LAT-1],
                      mask: res_valid, data: res_data};

  sync_fifo #(.WIDTH($bits(result_t)), .DEPTH(OFIFO_DEPTH), .AF_LEVEL(AF_LEVEL)) u_ofifo (
    .clk, .rst,
    .wr_en(res_valid != '0), .wr_data(ofifo_in), .full(ofifo_full),
    .rd_en(out_ready), .rd_data(ofifo_out), .empty(ofifo_empty),
    .almost_full(stall), .count(ofifo_count)
  );

  assign out_valid = !ofifo_empty;
  assign out_data  = ofifo_out.data;
  assign out_mask  = ofifo_out.mask;
  assign out_row   = ofifo_out.row;
  assign out_col   = ofifo_out.col;

  if (FLOAT && (DATA_W != 32 || COEF_W != 32)) begin : g_check_float
    $error("conv2d_top: the floating-point pipelines need DATA_W = COEF_W = 32");
  end

  if (IN_FLIGHT >= OFIFO_DEPTH) begin : g_check
    $error("conv2d_top: OFIFO_DEPTH must exceed a row of windows plus pipeline depth");
  end

endmodule

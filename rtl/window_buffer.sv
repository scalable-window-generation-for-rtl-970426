// window_buffer: row FIFOs and controller of the window generator.
//
// The buffer holds MAX_WR image rows, one per row FIFO, and hands the
// coalescer P columns of all MAX_WR rows per cycle. FIFO 0 always holds the
// top row of the current windows and FIFO MAX_WR-1 the bottom row, so no
// multiplexer ever realigns rows.
//
// How it works.
//  * Input. The controller reads the image from the variable-read FIFO (VRF)
//    P pixels at a time. For the last group of a row it asks for only the
//    ic mod P pixels that are left, so every row starts on a fresh FIFO word.
//    Unused pixels of that word are set to zero. Reads come back from the VRF
//    after its pipeline delay into a small skid FIFO; the controller issues a
//    read only when the skid FIFO has room for it.
//  * Fill. Words go into the bottom FIFO. When a FIFO already holds a whole
//    row (ceil(ic/P) words) and gets a new word, its oldest word is read and
//    written into the FIFO above. Rows thus climb until every FIFO holds one.
//  * Output. When every FIFO holds a whole row, the controller reads all FIFOs
//    for ceil(ic/P) cycles without a break. Each word read from a FIFO also
//    moves into the FIFO above it, and the top word is dropped. New pixels keep
//    entering the bottom FIFO meanwhile, so with a steady input the next row of
//    windows follows with no gap. A row of windows is only started when
//    `stall` is low, so a started row always runs to its end.
//  * Smaller windows. A window of wr < MAX_WR rows slides the full MAX_WR-row
//    window past the bottom edge: after the last image row the controller
//    pushes MAX_WR - wr rows of zeros, and produces ir - wr + 1 rows of
//    windows. The elements below row wr are not part of the requested window.
//  * End of image. After the last row of windows the FIFOs are cleared and
//    `done` pulses for one cycle.
//
// Interface and timing. start (one cycle, while !busy) latches cfg_rows,
// cfg_cols and cfg_wrows. col_valid marks a cycle whose col_data carries word
// col_word (0..ceil(ic/P)-1) of window row col_row; col_data[r][j] is pixel
// (col_row + r, col_word*P + j). col_data is driven straight from the FIFOs,
// so the coalescer registers it.
//
// From the design description: the chained row FIFOs with fixed row order,
// the fill and output rules, requesting the remainder of a row from the VRF,
// marking surplus pixels invalid, reading only when whole rows are buffered,
// and sliding the largest window past the image edges for smaller windows.
// This implementation's own choices: the skid FIFO, zero rows for the part
// of the window below the image, stopping only between rows of windows, and
// clearing the FIFOs at the end of each image.
module window_buffer #(
  parameter int unsigned P        = wg_pkg::P_DEFAULT,
  parameter int unsigned DATA_W   = wg_pkg::DATA_W_DEFAULT,
  parameter int unsigned MAX_WR   = wg_pkg::MAX_WR_DEFAULT,
  parameter int unsigned MAX_COLS = wg_pkg::MAX_COLS_DEFAULT,
  parameter int unsigned MAX_ROWS = wg_pkg::MAX_ROWS_DEFAULT,
  localparam int unsigned DEPTH   = MAX_COLS / P,
  localparam int unsigned AMT_W   = $clog2(P + 1),
  localparam int unsigned VCNT_W  = $clog2(2 * P + 1),
  localparam int unsigned COL_W   = $clog2(MAX_COLS + 1),
  localparam int unsigned ROW_W   = $clog2(MAX_ROWS + MAX_WR + 1),
  localparam int unsigned WR_W    = $clog2(MAX_WR + 1),
  localparam int unsigned WORD_W  = $clog2(DEPTH + 1)
) (
  input  logic                                   clk,
  input  logic                                   rst,
  // Control and run-time configuration
  input  logic                                   start,
  input  logic [ROW_W-1:0]                       cfg_rows,
  input  logic [COL_W-1:0]                       cfg_cols,
  input  logic [WR_W-1:0]                        cfg_wrows,
  output logic                                   busy,
  output logic                                   done,
  input  logic                                   stall,
  // Variable-read FIFO
  input  logic [VCNT_W-1:0]                      vrf_count,
  output logic                                   vrf_rd_en,
  output logic [AMT_W-1:0]                       vrf_rd_amount,
  input  logic                                   vrf_out_valid,
  input  logic [P-1:0][DATA_W-1:0]               vrf_out_data,
  input  logic [P-1:0]                           vrf_out_mask,
  // Columns to the coalescer
  output logic                                   col_valid,
  output logic [MAX_WR-1:0][P-1:0][DATA_W-1:0]   col_data,
  output logic [WORD_W-1:0]                      col_word,
  output logic [ROW_W-1:0]                       col_row
);

  localparam int unsigned VRF_LAT = $clog2(P);
  localparam int unsigned SKID_D  = VRF_LAT + 4;
  localparam int unsigned SKID_CW = $clog2(SKID_D + 1);
  localparam int unsigned B       = MAX_WR - 1;   // bottom FIFO

  typedef logic [P-1:0][DATA_W-1:0] word_t;

  // Latched configuration
  logic [ROW_W-1:0]  rows_q, nout_q, in_rows_q;
  logic [COL_W-1:0]  cols_q;
  logic [WORD_W-1:0] nwords_q;

  // Counters
  logic [ROW_W-1:0]  rd_row_q, in_row_q, out_row_q;
  logic [COL_W-1:0]  rd_col_q;
  logic [WORD_W-1:0] in_word_q, out_word_q;
  logic [SKID_CW-1:0] resv_q;
  logic              out_active_q, busy_q;

  // ---------------------------------------------------------------------
  // Configuration
  // ---------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (start && !busy_q) begin
      rows_q    <= cfg_rows;
      cols_q    <= cfg_cols;
      nwords_q  <= WORD_W'((32'(cfg_cols) + P - 1) / P);
      nout_q    <= cfg_rows - ROW_W'(cfg_wrows) + 1'b1;
      in_rows_q <= cfg_rows + ROW_W'(MAX_WR) - ROW_W'(cfg_wrows);
    end
  end

  // ---------------------------------------------------------------------
  // Reads from the VRF
  // ---------------------------------------------------------------------
  logic [COL_W-1:0] left;
  logic             rd_go, skid_pop, skid_empty, skid_full;
  word_t            skid_in, skid_out;
  logic             skid_af;
  logic [SKID_CW-1:0] skid_cnt;

  always_comb begin
    left          = cols_q - rd_col_q;
    vrf_rd_amount = (left >= COL_W'(P)) ? AMT_W'(P) : AMT_W'(left);
    rd_go         = busy_q && (rd_row_q < rows_q) && (resv_q < SKID_CW'(SKID_D))
                    && (vrf_count >= VCNT_W'(vrf_rd_amount));
    vrf_rd_en     = rd_go;
  end

  always_ff @(posedge clk) begin
    if (rst || (start && !busy_q)) begin
      rd_row_q <= '0;
      rd_col_q <= '0;
    end else if (rd_go) begin
      if (rd_col_q + COL_W'(vrf_rd_amount) >= cols_q) begin
        rd_col_q <= '0;
        rd_row_q <= rd_row_q + 1'b1;
      end else begin
        rd_col_q <= rd_col_q + COL_W'(vrf_rd_amount);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) resv_q <= '0;
    else resv_q <= resv_q + SKID_CW'(rd_go) - SKID_CW'(skid_pop);
  end

  // Pixels marked invalid by the VRF enter the row FIFOs as zeros.
  always_comb begin
    for (int j = 0; j < P; j++) skid_in[j] = vrf_out_mask[j] ? vrf_out_data[j] : '0;
  end

  sync_fifo #(.WIDTH(P * DATA_W), .DEPTH(SKID_D), .AF_LEVEL(SKID_D)) u_skid (
    .clk, .rst,
    .wr_en(vrf_out_valid), .wr_data(skid_in), .full(skid_full),
    .rd_en(skid_pop), .rd_data(skid_out), .empty(skid_empty),
    .almost_full(skid_af), .count(skid_cnt)
  );

  // ---------------------------------------------------------------------
  // Row FIFOs
  // ---------------------------------------------------------------------
  word_t             f_wdata [MAX_WR];
  word_t             f_rdata [MAX_WR];
  logic [MAX_WR-1:0] f_wr, f_rd, f_full;
  logic [WORD_W-1:0] f_count [MAX_WR];
  logic              f_clear;

  for (genvar k = 0; k < MAX_WR; k++) begin : g_row
    row_fifo #(.WIDTH(P * DATA_W), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst, .clear(f_clear),
      .wr_en(f_wr[k]), .wr_data(f_wdata[k]),
      .rd_en(f_rd[k]), .rd_data(f_rdata[k]), .count(f_count[k])
    );
    assign f_full[k] = (f_count[k] == nwords_q);
  end

  // ---------------------------------------------------------------------
  // Controller
  // ---------------------------------------------------------------------
  logic  all_full, src_real, src_valid, push, out_start, out_run, finish;
  word_t src_data;

  always_comb begin
    all_full  = &f_full;
    src_real  = (in_row_q < rows_q);
    src_valid = src_real ? !skid_empty : (in_row_q < in_rows_q);
    src_data  = src_real ? skid_out : '0;
    out_start = busy_q && !out_active_q && all_full && !stall && (out_row_q < nout_q);
    out_run   = out_active_q || out_start;
    push      = busy_q && src_valid && (out_run || !all_full);
    skid_pop  = push && src_real;
    finish    = busy_q && !out_active_q && (out_row_q == nout_q);

    // Bottom FIFO takes the new word; every other FIFO is fed from below.
    f_wr[B]    = push;
    f_wdata[B] = src_data;
    for (int k = 0; k < B; k++) f_wdata[k] = f_rdata[k+1];
    if (out_run) begin
      f_rd = '1;
      for (int k = 0; k < B; k++) f_wr[k] = 1'b1;
    end else begin
      // Fill: a write into a FIFO holding a whole row pushes its oldest word up.
      f_rd = '0;
      for (int k = B; k >= 1; k--) begin
        f_rd[k]   = f_wr[k] && f_full[k];
        f_wr[k-1] = f_rd[k];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || (start && !busy_q)) begin
      in_row_q  <= '0;
      in_word_q <= '0;
    end else if (push) begin
      if (in_word_q == nwords_q - 1'b1) begin
        in_word_q <= '0;
        in_row_q  <= in_row_q + 1'b1;
      end else begin
        in_word_q <= in_word_q + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || (start && !busy_q)) begin
      out_active_q <= 1'b0;
      out_word_q   <= '0;
      out_row_q    <= '0;
    end else if (out_run) begin
      if (out_word_q == nwords_q - 1'b1) begin
        out_word_q   <= '0;
        out_active_q <= 1'b0;
        out_row_q    <= out_row_q + 1'b1;
      end else begin
        out_word_q   <= out_word_q + 1'b1;
        out_active_q <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) busy_q <= 1'b0;
    else if (start && !busy_q) busy_q <= 1'b1;
    else if (finish) busy_q <= 1'b0;
  end

  assign f_clear = finish;
  assign busy    = busy_q;
  assign done    = finish;

  assign col_valid = out_run;
  assign col_word  = out_word_q;
  assign col_row   = out_row_q;
  always_comb begin
    for (int k = 0; k < MAX_WR; k++) col_data[k] = f_rdata[k];
  end

  // The VRF delivers no more than the skid FIFO has room for.
  a_skid_room: assert property (@(posedge clk) disable iff (rst) vrf_out_valid |-> !(skid_full || skid_af));
  // Every word in the skid FIFO was reserved by a read.
  a_skid_resv: assert property (@(posedge clk) disable iff (rst) skid_cnt <= resv_q);
  // A row of windows, once started, is read without a break.
  a_row_unbroken: assert property (@(posedge clk) disable iff (rst)
      out_active_q |-> (f_count[B] != '0));

endmodule

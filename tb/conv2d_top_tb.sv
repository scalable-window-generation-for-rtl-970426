// conv2d_top_tb: end-to-end test of the convolution accelerator.
//
// Runs at reduced size (P = 4, windows up to 3x3, images up to 32x32, a
// 32-word output FIFO). For each image the test writes the sizes and a random
// signed kernel over MMIO, starts the run, streams the image and compares
// every result with a convolution computed here, in raster order. It then
// polls STATUS until done.
// The images cover: rows that end part-way through a P-pixel word (partial
// reads from the variable-read FIFO), windows smaller than 3x3 (zero rows
// below the image), a slow result writer that fills the output FIFO so that
// almost-full stops the window generator, rows of windows that follow each
// other without a gap, and input gaps. Each of these is counted and must
// happen at least once.
module conv2d_top_tb;
  localparam int P = 4, DW = 8, CW = 16, MWR = 3, MWC = 3, MC = 32, MR = 32, OFD = 32;
  localparam int TAPS = MWR * MWC, OUT_W = DW + CW + 1 + 4;
  localparam int ROW_W = $clog2(MR + MWR + 1), COL_W = $clog2(MC + 1);

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic mmio_wr_en = 0, mmio_rd_en = 0;
  logic [7:0] mmio_addr = 0;
  logic [31:0] mmio_wdata = 0, mmio_rdata;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [P-1:0][DW-1:0] in_data;
  logic [P-1:0][OUT_W-1:0] out_data;
  logic [P-1:0] out_mask;
  logic [ROW_W-1:0] out_row;
  logic [COL_W-1:0] out_col;

  conv2d_top #(.P(P), .DATA_W(DW), .COEF_W(CW), .MAX_WR(MWR), .MAX_WC(MWC),
               .MAX_COLS(MC), .MAX_ROWS(MR), .OFIFO_DEPTH(OFD)) dut (
    .clk, .rst, .mmio_wr_en, .mmio_addr, .mmio_wdata, .mmio_rd_en, .mmio_rdata,
    .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_mask, .out_row, .out_col,
    .out_ready);

  int checks = 0, failures = 0;
  logic [DW-1:0] img [MR][MC];
  logic signed [CW-1:0] kern [MWR][MWC];
  int ir, ic, wr, wc, er, ec, nres;
  bit slow_writer, gappy_input;

  // Mechanism counters
  int n_partial_read, n_pad_word, n_stall_wait, n_back_to_back, n_out_backpressure, n_in_gap;

  always @(posedge clk) if (!rst) begin
    if (dut.u_wgen.u_vrf.rd_en && dut.u_wgen.u_vrf.rd_amount < P) n_partial_read++;
    if (dut.u_wgen.u_wbuf.push && !dut.u_wgen.u_wbuf.src_real) n_pad_word++;
    if (dut.u_wgen.u_wbuf.all_full && !dut.u_wgen.u_wbuf.out_active_q && dut.stall
        && dut.u_wgen.u_wbuf.busy_q) n_stall_wait++;
    if (dut.u_wgen.u_wbuf.out_start && $past(dut.u_wgen.u_wbuf.out_active_q)) n_back_to_back++;
    if (out_valid && !out_ready) n_out_backpressure++;
    if (!in_valid && dut.u_wgen.in_left_q != 0) n_in_gap++;
  end

  function automatic longint ref_conv(int r0, int c0);
    longint s = 0;
    for (int r = 0; r < wr; r++)
      for (int c = 0; c < wc; c++) s += longint'(img[r0 + r][c0 + c]) * longint'(kern[r][c]);
    return s;
  endfunction

  // Result checker and writer model.
  always @(posedge clk) begin
    if (!rst && out_valid && out_ready) begin
      for (int k = 0; k < P; k++) begin
        if (out_mask[k]) begin
          longint exp_v;
          exp_v = ref_conv(er, ec);
          checks++;
          if (int'(out_row) != er || int'(out_col) + k != ec ||
              longint'($signed(out_data[k])) != exp_v) begin
            failures++;
            if (failures < 10)
              $display("FAIL result (%0d,%0d): got (%0d,%0d) %0d expected %0d", er, ec,
                       out_row, int'(out_col) + k, $signed(out_data[k]), exp_v);
          end
          nres++;
          if (ec == ic - wc) begin ec = 0; er++; end
          else ec++;
        end
      end
    end
  end
  always @(negedge clk) out_ready <= slow_writer ? ($urandom % 5 == 0) : 1'b1;

  task automatic mmio_write(int a, int d);
    @(negedge clk);
    mmio_wr_en = 1; mmio_addr = 8'(a); mmio_wdata = 32'(d);
    @(negedge clk);
    mmio_wr_en = 0;
  endtask

  task automatic mmio_read(int a, output int d);
    @(negedge clk);
    mmio_rd_en = 1; mmio_addr = 8'(a);
    @(negedge clk);
    mmio_rd_en = 0;
    d = int'(mmio_rdata);
  endtask

  task automatic run_image(int rows, int cols, int wrows, int wcols, bit slow, bit gaps);
    int total, n, st;
    ir = rows; ic = cols; wr = wrows; wc = wcols; er = 0; ec = 0; nres = 0;
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++) img[r][c] = DW'($urandom);
    for (int r = 0; r < MWR; r++)
      for (int c = 0; c < MWC; c++) begin
        kern[r][c] = (r < wrows && c < wcols) ? CW'($urandom % 2001 - 1000) : '0;
        mmio_write(16 + r * MWC + c, int'(kern[r][c]));
      end
    mmio_write(2, rows); mmio_write(3, cols); mmio_write(4, wrows); mmio_write(5, wcols);
    slow_writer = slow;
    mmio_write(0, 1);
    total = (rows * cols + P - 1) / P;
    n = 0;
    while (n < total) begin
      in_valid = gaps ? ($urandom % 3 != 0) : 1'b1;
      for (int j = 0; j < P; j++) begin
        int idx = n * P + j;
        in_data[j] = (idx < rows * cols) ? img[idx / cols][idx % cols] : DW'($urandom);
      end
      @(posedge clk);
      if (in_valid && in_ready) n++;
      @(negedge clk);
    end
    in_valid = 0;
    st = 0;
    while ((st & 1) == 0) mmio_read(1, st);
    slow_writer = 0;
    repeat (OFD + 10) @(negedge clk);
    checks++;
    if (nres != (rows - wrows + 1) * (cols - wcols + 1)) begin
      failures++;
      $display("FAIL image %0dx%0d: %0d results, expected %0d", rows, cols, nres,
               (rows - wrows + 1) * (cols - wcols + 1));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run_image(8, 10, 3, 3, 0, 0);
    run_image(7, 13, 2, 3, 0, 1);
    run_image(12, 32, 3, 3, 1, 0);
    run_image(6, 9, 3, 1, 1, 1);
    run_image(5, 5, 1, 1, 0, 0);
    run_image(10, 27, 3, 2, 0, 0);
    checks++; if (n_partial_read == 0)     begin failures++; $display("FAIL no partial VRF read"); end
    checks++; if (n_pad_word == 0)         begin failures++; $display("FAIL no zero row below the image"); end
    checks++; if (n_stall_wait == 0)       begin failures++; $display("FAIL almost-full never held back the window generator"); end
    checks++; if (n_back_to_back == 0)     begin failures++; $display("FAIL no back-to-back window rows"); end
    checks++; if (n_out_backpressure == 0) begin failures++; $display("FAIL no output back-pressure"); end
    checks++; if (n_in_gap == 0)           begin failures++; $display("FAIL no input gap"); end
    $display("mechanisms: partial_read=%0d pad_word=%0d stall_wait=%0d back_to_back=%0d out_backpressure=%0d in_gap=%0d",
             n_partial_read, n_pad_word, n_stall_wait, n_back_to_back, n_out_backpressure, n_in_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

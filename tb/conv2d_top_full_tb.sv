// conv2d_top_full_tb: one full-size run of the accelerator at its default
// parameters (64 pipelines, 3x3 windows, 8-bit pixels, 16-bit kernel).
//
// Convolves a random 2048x2048 image with a random signed 3x3 kernel, with a
// steady input and a writer that always accepts. Every one of the
// 2046 x 2046 results is compared with a convolution computed here, in raster
// order. The run must finish within ir * ic / P cycles plus a fixed fill and
// drain allowance, i.e. 64 windows per cycle once the pipeline is full.
module conv2d_top_full_tb;
  localparam int P = 64, DW = 8, CW = 16, MWR = 3, MWC = 3, OUT_W = DW + CW + 1 + 4;
  localparam int IR = 2048, IC = 2048, WR = 3, WC = 3;
  localparam int ROW_W = $clog2(2048 + MWR + 1), COL_W = $clog2(2048 + 1);

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

  conv2d_top dut (
    .clk, .rst, .mmio_wr_en, .mmio_addr, .mmio_wdata, .mmio_rd_en, .mmio_rdata,
    .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_mask, .out_row, .out_col,
    .out_ready);

  int checks = 0, failures = 0, er = 0, ec = 0, nres = 0, cyc = 0;
  byte unsigned img [IR][IC];
  int kern [WR][WC];

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (!rst && out_valid && out_ready) begin
      for (int k = 0; k < P; k++) begin
        if (out_mask[k]) begin
          int s;
          s = 0;
          for (int r = 0; r < WR; r++)
            for (int c = 0; c < WC; c++) s += int'(img[er + r][ec + c]) * kern[r][c];
          checks++;
          if (int'(out_row) != er || int'(out_col) + k != ec || int'($signed(out_data[k])) != s) begin
            failures++;
            if (failures < 10) $display("FAIL result (%0d,%0d) got %0d expected %0d", er, ec,
                                        $signed(out_data[k]), s);
          end
          nres++;
          if (ec == IC - WC) begin ec = 0; er++; end
          else ec++;
        end
      end
    end
  end

  task automatic mmio_write(int a, int d);
    @(negedge clk);
    mmio_wr_en = 1; mmio_addr = 8'(a); mmio_wdata = 32'(d);
    @(negedge clk);
    mmio_wr_en = 0;
  endtask

  initial begin
    int n, t0, st;
    for (int r = 0; r < IR; r++)
      for (int c = 0; c < IC; c++) img[r][c] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst = 0;
    for (int r = 0; r < MWR; r++)
      for (int c = 0; c < MWC; c++) begin
        kern[r][c] = $urandom % 4001 - 2000;
        mmio_write(16 + r * MWC + c, kern[r][c]);
      end
    mmio_write(2, IR); mmio_write(3, IC); mmio_write(4, WR); mmio_write(5, WC);
    mmio_write(0, 1);
    t0 = cyc;
    n = 0;
    in_valid = 1;
    while (n < IR * IC / P) begin
      for (int j = 0; j < P; j++) in_data[j] = img[(n * P + j) / IC][(n * P + j) % IC];
      @(posedge clk);
      if (in_ready) n++;
      @(negedge clk);
    end
    in_valid = 0;
    st = 0;
    while ((st & 1) == 0) begin
      @(negedge clk); mmio_rd_en = 1; mmio_addr = 8'h01;
      @(negedge clk); mmio_rd_en = 0; st = int'(mmio_rdata);
    end
    repeat (20) @(negedge clk);
    $display("run took %0d cycles for %0d results", cyc - t0, nres);
    checks++;
    if (nres != (IR - WR + 1) * (IC - WC + 1)) begin
      failures++;
      $display("FAIL %0d results", nres);
    end
    checks++;
    if (cyc - t0 > IR * IC / P + 4 * (IC / P) + 100) begin
      failures++;
      $display("FAIL too slow: %0d cycles", cyc - t0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

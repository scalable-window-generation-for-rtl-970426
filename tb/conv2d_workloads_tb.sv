// conv2d_workloads_tb: traditional 2D convolution workloads, one filter per
// image, with kernel sizes 3x3, 5x5, 7x7 and 9x9 and 8-bit pixels.
//
// The accelerator is built once for windows up to 9x9, images up to 256x256
// and P = 16 pipelines (the replication used for 9x9 fixed-point kernels). The
// window size is changed at run time between images. Each image is 256x256
// (the smallest evaluated size). Every result is compared with a convolution
// computed here. Each run must take no more than ir * ic / P cycles plus an
// allowance for filling the extra row FIFOs and draining the pipelines.
module conv2d_workloads_tb;
  localparam int P = 16, DW = 8, CW = 16, MWR = 9, MWC = 9, MC = 256, MR = 256;
  localparam int OUT_W = DW + CW + 1 + 7;
  localparam int ROW_W = $clog2(MR + MWR + 1), COL_W = $clog2(MC + 1);
  localparam int IR = 256, IC = 256;

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
               .MAX_COLS(MC), .MAX_ROWS(MR)) dut (
    .clk, .rst, .mmio_wr_en, .mmio_addr, .mmio_wdata, .mmio_rd_en, .mmio_rdata,
    .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_mask, .out_row, .out_col,
    .out_ready);

  int checks = 0, failures = 0, er, ec, nres, cyc = 0, wr, wc;
  byte unsigned img [IR][IC];
  int kern [MWR][MWC];

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (!rst && out_valid && out_ready) begin
      for (int k = 0; k < P; k++) begin
        if (out_mask[k]) begin
          longint s;
          s = 0;
          for (int r = 0; r < wr; r++)
            for (int c = 0; c < wc; c++) s += longint'(img[er + r][ec + c]) * longint'(kern[r][c]);
          checks++;
          if (int'(out_row) != er || int'(out_col) + k != ec || longint'($signed(out_data[k])) != s) begin
            failures++;
            if (failures < 10) $display("FAIL %0dx%0d result (%0d,%0d) got %0d expected %0d", wr, wc,
                                        er, ec, $signed(out_data[k]), s);
          end
          nres++;
          if (ec == IC - wc) begin ec = 0; er++; end
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

  task automatic run_kernel(int ksize);
    int n, t0, st, budget;
    wr = ksize; wc = ksize; er = 0; ec = 0; nres = 0;
    for (int r = 0; r < IR; r++)
      for (int c = 0; c < IC; c++) img[r][c] = 8'($urandom);
    for (int r = 0; r < MWR; r++)
      for (int c = 0; c < MWC; c++) begin
        kern[r][c] = (r < ksize && c < ksize) ? int'($urandom % 4001) - 2000 : 0;
        mmio_write(16 + r * MWC + c, kern[r][c]);
      end
    mmio_write(2, IR); mmio_write(3, IC); mmio_write(4, ksize); mmio_write(5, ksize);
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
    repeat (10) @(negedge clk);
    // Zero rows for the part of the 9x9 window below the image cost
    // (9 - ksize) extra row times.
    budget = (IR + MWR - ksize) * IC / P + 2 * (IC / P) + 100;
    $display("%0dx%0d kernel: %0d cycles, %0d results", ksize, ksize, cyc - t0, nres);
    checks += 2;
    if (nres != (IR - ksize + 1) * (IC - ksize + 1)) begin
      failures++;
      $display("FAIL %0d results", nres);
    end
    if (cyc - t0 > budget) begin
      failures++;
      $display("FAIL %0d cycles, budget %0d", cyc - t0, budget);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run_kernel(3);
    run_kernel(5);
    run_kernel(7);
    run_kernel(9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// conv2d_workloads_fp_tb: traditional 2D convolution workloads in single
// precision, one filter per image, with kernel sizes 3x3, 5x5, 7x7 and 9x9.
//
// The accelerator is built once with its floating-point pipelines
// (FLOAT = 1), for windows up to 9x9, images up to 256x256 and P = 8
// pipelines (the replication used for 9x9 floating-point kernels). The window
// size is changed at run time between images. Each image is 256x256 (the
// smallest evaluated size) of whole-number pixels 0..255. Every result is
// compared bit for bit with the same chain of rounded multiplies and adds,
// computed here over all 81 kernel positions; +0 and -0 count as equal. Each run must take no more than ir * ic / P cycles plus an
// allowance for filling the extra row FIFOs and draining the pipelines.
module conv2d_workloads_fp_tb;
  localparam int P = 8, DW = 32, CW = 32, MWR = 9, MWC = 9, MC = 256, MR = 256;
  localparam int OUT_W = 32;
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
               .MAX_COLS(MC), .MAX_ROWS(MR), .FLOAT(1'b1)) dut (
    .clk, .rst, .mmio_wr_en, .mmio_addr, .mmio_wdata, .mmio_rd_en, .mmio_rdata,
    .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_mask, .out_row, .out_col,
    .out_ready);

  int checks = 0, failures = 0, er, ec, nres, cyc = 0, wr, wc;
  logic [31:0] img [IR][IC];
  logic [31:0] kern [MWR][MWC];

  // Reference single-precision arithmetic: exact in double, then rounded to
  // nearest even. Subnormals are flushed to zero.
  function automatic real f2r(input logic [31:0] f);
    if (f[30:23] == 8'd0) return 0.0;
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] r2f(input real x);
    logic [63:0] d;
    logic [24:0] sig;
    int          e;
    d = $realtobits(x);
    if (d[62:0] == 63'd0) return {d[63], 31'd0};
    e   = int'(d[62:52]) - 1023 + 127;
    sig = {2'b01, d[51:29]};
    if (d[28] && ((|d[27:0]) || d[29])) sig = sig + 1'b1;
    if (sig[24]) begin sig = sig >> 1; e = e + 1; end
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), sig[22:0]};
  endfunction

  function automatic logic [31:0] ref_conv(int r0, int c0);
    logic [31:0] acc, p;
    real pix;
    for (int r = 0; r < MWR; r++)
      for (int c = 0; c < MWC; c++) begin
        pix = (r0 + r < IR && c0 + c < IC) ? f2r(img[r0 + r][c0 + c]) : 0.0;
        p = r2f(pix * f2r(kern[r][c]));
        acc = (r == 0 && c == 0) ? p : r2f(f2r(acc) + f2r(p));
      end
    return acc;
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (!rst && out_valid && out_ready) begin
      for (int k = 0; k < P; k++) begin
        if (out_mask[k]) begin
          logic [31:0] s;
          s = ref_conv(er, ec);
          checks++;
          if (int'(out_row) != er || int'(out_col) + k != ec ||
              !((out_data[k][30:0] == 31'd0 && s[30:0] == 31'd0) || out_data[k] == s)) begin
            failures++;
            if (failures < 10) $display("FAIL %0dx%0d result (%0d,%0d) got %h expected %h", wr, wc,
                                        er, ec, out_data[k], s);
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
      for (int c = 0; c < IC; c++) img[r][c] = r2f(real'($urandom % 256));
    for (int r = 0; r < MWR; r++)
      for (int c = 0; c < MWC; c++) begin
        kern[r][c] = (r < ksize && c < ksize) ? {1'($urandom), 8'(115 + $urandom % 20), 23'($urandom)} : '0;
        mmio_write(16 + r * MWC + c, int'(kern[r][c]));
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
    budget = (IR + MWR - ksize) * IC / P + 2 * (IC / P) + MWR * MWC + 100;
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

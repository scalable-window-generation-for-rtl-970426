// mmio_regs_tb: self-checking test of the MMIO register file.
//
// Writes the sizes and all nine coefficients of a 3x3 kernel, reads them back
// over the bus and checks the configuration outputs. Checks that a CTRL write
// gives a one-cycle start pulse, is ignored while busy, that done is sticky in
// STATUS and cleared by the next start, and that everything resets to zero.
module mmio_regs_tb;
  localparam int CW = 16, MWR = 3, MWC = 3, TAPS = 9;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic wr_en = 0, rd_en = 0, start, busy = 0, done = 0;
  logic [7:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [11:0] rows, cols;
  logic [1:0] wrows, wcols;
  logic [TAPS-1:0][CW-1:0] coef;

  mmio_regs #(.COEF_W(CW), .MAX_WR(MWR), .MAX_WC(MWC), .MAX_COLS(2048), .MAX_ROWS(2048)) dut (.*);

  int checks = 0, failures = 0, starts = 0;
  logic [CW-1:0] k [TAPS];

  always @(posedge clk) if (!rst && start) starts++;

  task automatic wr(int a, int d);
    @(negedge clk); wr_en = 1; addr = 8'(a); wdata = 32'(d);
    @(negedge clk); wr_en = 0;
  endtask
  task automatic rd(int a, output int d);
    @(negedge clk); rd_en = 1; addr = 8'(a);
    @(negedge clk); rd_en = 0; d = int'(rdata);
  endtask
  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int d;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(rows == 0 && cols == 0 && coef == '0, "reset values");
    wr(2, 1000); wr(3, 2047); wr(4, 3); wr(5, 2);
    for (int t = 0; t < TAPS; t++) begin k[t] = CW'($urandom); wr(16 + t, int'($signed(k[t]))); end
    check(rows == 1000 && cols == 2047 && wrows == 3 && wcols == 2, "size outputs");
    for (int t = 0; t < TAPS; t++) check(coef[t] == k[t], "coefficient output");
    rd(2, d); check(d == 1000, "ROWS read");
    rd(3, d); check(d == 2047, "COLS read");
    rd(4, d); check(d == 3, "WIN_ROWS read");
    rd(5, d); check(d == 2, "WIN_COLS read");
    for (int t = 0; t < TAPS; t++) begin rd(16 + t, d); check(d == int'($signed(k[t])), "coefficient read"); end
    wr(0, 1);
    @(negedge clk);
    check(starts == 1, "one start pulse");
    busy = 1;
    wr(0, 1);
    @(negedge clk);
    check(starts == 1, "start ignored while busy");
    rd(1, d); check(d == 2, "STATUS busy");
    busy = 0; done = 1; @(negedge clk); done = 0;
    rd(1, d); check(d == 1, "STATUS done sticky");
    rd(1, d); check(d == 1, "STATUS done still set");
    wr(0, 1);
    @(negedge clk);
    rd(1, d); check(d == 0, "done cleared by start");
    check(starts == 2, "second start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// conv_pipeline_tb: self-checking test of one convolution pipeline.
//
// 3x3 windows of unsigned 8-bit pixels and signed 16-bit coefficients. A random
// window enters on most cycles, and extreme values (all pixels 255 with the
// most negative or most positive coefficients) are mixed in. Each result must
// equal the dot product computed here and come out exactly
// 2 + ceil(log2(9)) = 6 cycles after its window.
module conv_pipeline_tb;
  localparam int DW = 8, CW = 16, TAPS = 9, LAT = 6, OUT_W = DW + CW + 1 + 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid = 0, out_valid;
  logic [TAPS-1:0][DW-1:0] win;
  logic [TAPS-1:0][CW-1:0] coef;
  logic signed [OUT_W-1:0] result;

  conv_pipeline #(.DATA_W(DW), .COEF_W(CW), .TAPS(TAPS)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  typedef struct { int due; longint v; } exp_t;
  exp_t q [$];

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (!rst) begin
    if (out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected result"); end
      else begin
        e = q.pop_front();
        if (e.due != cyc || longint'(result) != e.v) begin
          failures++;
          if (failures < 10) $display("FAIL got %0d at %0d, expected %0d at %0d", result, cyc, e.v, e.due);
        end
      end
    end
    if (in_valid) begin
      exp_t e;
      e.due = cyc + LAT;
      e.v = 0;
      for (int t = 0; t < TAPS; t++) e.v += longint'(win[t]) * longint'($signed(coef[t]));
      q.push_back(e);
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      in_valid = ($urandom % 4 != 0);
      for (int t = 0; t < TAPS; t++) begin
        case (n % 50)
          0: begin win[t] = 8'hff; coef[t] = 16'h8000; end
          1: begin win[t] = 8'hff; coef[t] = 16'h7fff; end
          default: begin win[t] = DW'($urandom); coef[t] = CW'($urandom); end
        endcase
      end
      if (n % 50 < 2) in_valid = 1;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

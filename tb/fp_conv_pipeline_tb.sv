// fp_conv_pipeline_tb: self-checking test of the floating-point convolution
// pipeline and of its arithmetic package.
//
// Part 1 checks fp32_mul and fp32_add on random and directed operand pairs.
// The reference computes each result exactly in double precision, then rounds
// it to single precision (nearest, ties to even) with its own bit-level
// rounding. Rounding in two steps gives the correctly rounded single-precision
// result here, because a double has more than twice the significand bits of a
// single.
// Part 2 drives a 9-tap pipeline whose last taps use the RAM delay lines
// (RAM_MIN = 4). Windows arrive with gaps; the coefficients change between
// batches once the pipeline has drained. Each result is compared bit for bit
// with the same chain of roundings done in order, and must appear exactly
// TAPS + 2 cycles after its window. A watchdog ends a hung run.
module fp_conv_pipeline_tb;

  import fp32_pkg::*;

  localparam int unsigned TAPS = 9;
  localparam int unsigned LAT  = TAPS + 2;

  logic                  clk = 1'b0, rst = 1'b1;
  logic                  in_valid = 1'b0;
  logic [TAPS-1:0][31:0] win = '0, coef = '0;
  logic                  out_valid;
  logic [31:0]           result;

  int checks = 0, failures = 0;
  longint cycle = 0;

  fp_conv_pipeline #(.TAPS(TAPS), .RAM_MIN(4)) dut (
    .clk, .rst, .in_valid, .win, .coef, .out_valid, .result
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------------------------------------------------------------
  // Reference arithmetic
  // ---------------------------------------------------------------------
  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
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
    if (sig[24]) begin
      sig = sig >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), sig[22:0]};
  endfunction

  function automatic logic [31:0] ref_mul(input logic [31:0] a, b);
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {a[31] ^ b[31], 31'd0};
    return r2f(f2r(a) * f2r(b));
  endfunction

  function automatic logic [31:0] ref_add(input logic [31:0] a, b);
    logic [31:0] x, y;
    x = (a[30:23] == 8'd0) ? {a[31], 31'd0} : a;
    y = (b[30:23] == 8'd0) ? {b[31], 31'd0} : b;
    if (x[30:0] == 31'd0 && y[30:0] == 31'd0) return {x[31] & y[31], 31'd0};
    if (x[30:0] == 31'd0) return y;
    if (y[30:0] == 31'd0) return x;
    return r2f(f2r(x) + f2r(y));
  endfunction

  // A random normal number with biased exponent in [lo, hi].
  function automatic logic [31:0] rnd_fp(input int lo, input int hi);
    return {1'($urandom), 8'(lo + int'($urandom_range(hi - lo))), 23'($urandom)};
  endfunction

  // A pixel: mostly whole numbers 0..255 as an image holds, sometimes any value.
  function automatic logic [31:0] rnd_pixel();
    int v;
    if ($urandom_range(3) == 0) return rnd_fp(110, 145);
    v = int'($urandom_range(255));
    return r2f(real'(v));
  endfunction

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------------
  // Part 2 scoreboard
  // ---------------------------------------------------------------------
  typedef struct { logic [31:0] value; longint due; } exp_t;
  exp_t expq[$];

  function automatic logic [31:0] ref_window(input logic [TAPS-1:0][31:0] w, c);
    logic [31:0] acc;
    acc = ref_mul(w[0], c[0]);
    for (int t = 1; t < TAPS; t++) acc = ref_add(ref_mul(w[t], c[t]), acc);
    return acc;
  endfunction

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      exp_t e;
      if (expq.size() == 0) begin
        checks++; failures++;
        $display("FAIL unexpected result %h", result);
      end else begin
        e = expq.pop_front();
        check(result, e.value, "window");
        checks++;
        if (cycle != e.due) begin
          failures++;
          $display("FAIL latency: result at cycle %0d, expected %0d", cycle, e.due);
        end
      end
    end
  end

  initial begin
    logic [31:0] a, b;
    // Part 1: the arithmetic package.
    for (int i = 0; i < 20000; i++) begin
      a = rnd_fp(60, 190);
      b = (i % 4 == 0) ? {~a[31], a[30:23], 23'($urandom)}     // near cancellation
        : (i % 4 == 1) ? {1'($urandom), a[30:23] - 8'($urandom_range(30)), 23'($urandom)}
        : rnd_fp(60, 190);
      check(fp32_mul(a, b), ref_mul(a, b), "mul");
      check(fp32_add(a, b), ref_add(a, b), "add");
    end
    // Directed cases: exact cancellation, zeros, overflow, underflow, ties.
    check(fp32_add(32'h3f800000, 32'hbf800000), 32'h00000000, "1 + -1");
    check(fp32_add(32'h80000000, 32'h80000000), 32'h80000000, "-0 + -0");
    check(fp32_add(32'h40490fdb, 32'h00000000), 32'h40490fdb, "x + 0");
    check(fp32_mul(32'h7f000000, 32'h40000000), 32'h7f800000, "overflow");
    check(fp32_mul(32'h00800000, 32'h3f000000), 32'h00000000, "underflow");
    check(fp32_add(32'h4b800000, 32'h3f800000), 32'h4b800000, "tie to even down");
    check(fp32_add(32'h4b800001, 32'h3f800000), 32'h4b800002, "tie to even up");
    check(fp32_mul(32'h40400000, 32'h40400000), 32'h41100000, "3 * 3");

    // Part 2: the pipeline.
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int batch = 0; batch < 12; batch++) begin
      logic [TAPS-1:0][31:0] c;
      for (int t = 0; t < TAPS; t++)
        c[t] = (batch == 0) ? ((t % 2 == 0) ? 32'h3f800000 : 32'hbf800000)
                            : rnd_fp(115, 135);
      @(posedge clk);
      coef <= c;
      for (int n = 0; n < 150; n++) begin
        logic [TAPS-1:0][31:0] w;
        logic go;
        go = ($urandom_range(3) != 0);
        for (int t = 0; t < TAPS; t++) w[t] = (batch == 0) ? r2f(real'(t / 2)) : rnd_pixel();
        @(posedge clk);
        in_valid <= go;
        win      <= w;
        // Driven after this edge, sampled at the next: due LAT + 1 edges on.
        if (go) expq.push_back('{ref_window(w, c), cycle + LAT + 1});
      end
      @(posedge clk);
      in_valid <= 1'b0;
      repeat (LAT + 3) @(posedge clk);   // drain before new coefficients
    end
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d results never came out", expq.size());
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

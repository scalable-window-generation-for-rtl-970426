// fp_conv_pipeline: one single-precision floating-point 2D convolution
// pipeline built as a chain of multiply-add units.
//
// Computes sum over t of win[t] * coef[t] for one window per cycle. Pixels,
// coefficients and the result are IEEE-754 single-precision numbers.
//
// How it works. Instead of a balanced adder tree, the kernel elements form a
// chain. Unit t multiplies pixel t by coefficient t and adds the sum passed on
// by unit t-1, so the chain has one adder per tap. That matches FPGA DSP
// blocks that do a floating-point multiply and add and have dedicated routing
// to their neighbour. Each unit has a product register and a sum register. The
// running sum therefore reaches unit t one cycle later than it reached unit
// t-1, and pixel t is delayed by t cycles to meet it. The alignment delays
// grow linearly along the chain. Delays of RAM_MIN cycles or more are circular
// buffers in RAM (delay_line); shorter ones are registers.
// Like the fixed-point pipeline, it starts with a register rank with no logic
// in front of it, and no stage has a stall or an enable.
//
// Interface and timing: in_valid/win enter every cycle. out_valid/result come
// out LAT = TAPS + 2 cycles later. The coefficients are registered at the
// input but not delayed along the chain, so they must stay unchanged while
// windows are in flight. The top only lets them change between images.
//
// From the design description: single-precision multiply-add units chained
// into a linear sequence of adds, input alignment delays, and registers for
// short delays with block RAM for long ones. The register threshold, the
// one-cycle multiply and add latencies, and the number-range rules (see
// fp32_pkg) are this implementation's choices.
module fp_conv_pipeline #(
  parameter int unsigned TAPS    = wg_pkg::MAX_WR_DEFAULT * wg_pkg::MAX_WC_DEFAULT,
  parameter int unsigned RAM_MIN = 16,
  localparam int unsigned LAT    = TAPS + 2
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic [TAPS-1:0][31:0]  win,
  input  logic [TAPS-1:0][31:0]  coef,
  output logic                   out_valid,
  output logic [31:0]            result
);

  import fp32_pkg::*;

  // Input register rank.
  logic [TAPS-1:0][31:0] win_q, coef_q;
  always_ff @(posedge clk) begin
    win_q  <= win;
    coef_q <= coef;
  end

  // Chain of multiply-add units; pixel t waits t cycles.
  fp32_t pix_d  [TAPS];
  fp32_t prod_q [TAPS];
  fp32_t sum_q  [TAPS];

  for (genvar t = 0; t < TAPS; t++) begin : g_tap
    delay_line #(.WIDTH(32), .DELAY(t), .RAM_MIN(RAM_MIN)) u_align (
      .clk, .rst, .in(win_q[t]), .out(pix_d[t])
    );
    always_ff @(posedge clk) begin
      prod_q[t] <= fp32_mul(pix_d[t], coef_q[t]);
    end
    if (t == 0) begin : g_first
      always_ff @(posedge clk) sum_q[t] <= prod_q[t];
    end else begin : g_next
      always_ff @(posedge clk) sum_q[t] <= fp32_add(prod_q[t], sum_q[t-1]);
    end
  end

  logic [LAT-1:0] valid_q;
  always_ff @(posedge clk) begin
    if (rst) valid_q <= '0;
    else valid_q <= {valid_q[LAT-2:0], in_valid};
  end

  assign out_valid = valid_q[LAT-1];
  assign result    = sum_q[TAPS-1];

endmodule

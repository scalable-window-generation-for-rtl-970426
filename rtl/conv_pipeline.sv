// conv_pipeline: one fixed-point 2D convolution pipeline.
//
// Computes sum over r, c of win[r][c] * coef[r][c] for one window per cycle.
// Pixels are unsigned, coefficients are signed two's complement, and the result
// is signed and wide enough never to overflow.
//
// How it works. The window first enters a register stage with no logic before
// it. This rank lets synthesis duplicate registers that fan out to many
// pipelines, because the coalescer shares pixels between overlapping windows.
// The next stage is a row of TAPS multipliers, one per kernel element, with
// registered products. A balanced adder tree follows, with a register after
// every level. No stage has a stall or enable; the valid bit simply travels
// along. Back-pressure is handled by the output FIFO behind the pipelines.
//
// Interface and timing: in_valid/win enter every cycle; out_valid/result come
// out LAT = 2 + ceil(log2(TAPS)) cycles later. coef is registered together
// with the window, so each result uses the coefficients present when its
// window entered.
//
// From the design description: one multiplier per kernel element, the
// balanced adder tree, registers between all operations, the register rank
// before the multipliers and the absence of per-stage stalls. The widths and
// the signedness are this implementation's choice.
module conv_pipeline #(
  parameter int unsigned DATA_W = wg_pkg::DATA_W_DEFAULT,
  parameter int unsigned COEF_W = wg_pkg::COEF_W_DEFAULT,
  parameter int unsigned TAPS   = wg_pkg::MAX_WR_DEFAULT * wg_pkg::MAX_WC_DEFAULT,
  localparam int unsigned LEVELS = wg_pkg::tree_levels(TAPS),
  localparam int unsigned PROD_W = DATA_W + COEF_W + 1,
  localparam int unsigned OUT_W  = PROD_W + LEVELS
) (
  input  logic                                  clk,
  input  logic                                  rst,
  input  logic                                  in_valid,
  input  logic [TAPS-1:0][DATA_W-1:0]           win,
  input  logic [TAPS-1:0][COEF_W-1:0]           coef,
  output logic                                  out_valid,
  output logic signed [OUT_W-1:0]               result
);

  localparam int unsigned LEAVES = 1 << LEVELS;
  localparam int unsigned LAT    = 2 + LEVELS;

  // Input register rank, then products.
  logic [TAPS-1:0][DATA_W-1:0] win_q;
  logic [TAPS-1:0][COEF_W-1:0] coef_q;
  logic signed [OUT_W-1:0]     tree_q [LEVELS+1][LEAVES];
  logic [LAT-1:0]              valid_q;

  always_ff @(posedge clk) begin
    win_q  <= win;
    coef_q <= coef;
    for (int t = 0; t < LEAVES; t++) begin
      if (t < TAPS)
        tree_q[0][t] <= OUT_W'($signed({1'b0, win_q[t]}) * $signed(coef_q[t]));
      else
        tree_q[0][t] <= '0;
    end
    // Balanced adder tree, one registered level at a time.
    for (int l = 1; l <= LEVELS; l++)
      for (int t = 0; t < (LEAVES >> l); t++)
        tree_q[l][t] <= tree_q[l-1][2*t] + tree_q[l-1][2*t+1];
  end

  always_ff @(posedge clk) begin
    if (rst) valid_q <= '0;
    else valid_q <= {valid_q[LAT-2:0], in_valid};
  end

  assign out_valid = valid_q[LAT-1];
  assign result    = tree_q[LEVELS][0];

endmodule

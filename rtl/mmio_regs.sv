// mmio_regs: memory-mapped control registers of the convolution accelerator.
//
// Host software writes the convolution kernel, the image and window sizes,
// and then starts the run. All of it goes over MMIO. The registers are (word
// addresses):
//   0x00 CTRL      write bit 0 = 1: start a run (a one-cycle pulse on `start`)
//   0x01 STATUS    read: bit 0 done (sticky, cleared by the next start),
//                  bit 1 busy
//   0x02 ROWS      image rows ir
//   0x03 COLS      image columns ic
//   0x04 WIN_ROWS  window rows wr (1..MAX_WR)
//   0x05 WIN_COLS  window columns wc (1..MAX_WC)
//   0x10 + r*MAX_WC + c  kernel coefficient (r, c), signed COEF_W bits
// Reads return data one cycle after rd_en. All registers reset to zero, so the
// coefficients of window elements outside a smaller requested window stay
// zero unless software writes them.
//
// From the design description: MMIO transfer of the kernel into registers, of
// the parameters, and the start. The address map, the status bits and the
// single-cycle bus are this implementation's choice.
module mmio_regs #(
  parameter int unsigned COEF_W   = wg_pkg::COEF_W_DEFAULT,
  parameter int unsigned MAX_WR   = wg_pkg::MAX_WR_DEFAULT,
  parameter int unsigned MAX_WC   = wg_pkg::MAX_WC_DEFAULT,
  parameter int unsigned MAX_COLS = wg_pkg::MAX_COLS_DEFAULT,
  parameter int unsigned MAX_ROWS = wg_pkg::MAX_ROWS_DEFAULT,
  localparam int unsigned TAPS    = MAX_WR * MAX_WC,
  localparam int unsigned COL_W   = $clog2(MAX_COLS + 1),
  localparam int unsigned ROW_W   = $clog2(MAX_ROWS + MAX_WR + 1),
  localparam int unsigned WR_W    = $clog2(MAX_WR + 1),
  localparam int unsigned WC_W    = $clog2(MAX_WC + 1)
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        wr_en,
  input  logic [7:0]                  addr,
  input  logic [31:0]                 wdata,
  input  logic                        rd_en,
  output logic [31:0]                 rdata,
  // Configuration to the datapath
  output logic                        start,
  output logic [ROW_W-1:0]            rows,
  output logic [COL_W-1:0]            cols,
  output logic [WR_W-1:0]             wrows,
  output logic [WC_W-1:0]             wcols,
  output logic [TAPS-1:0][COEF_W-1:0] coef,
  // Status from the datapath
  input  logic                        busy,
  input  logic                        done
);

  localparam logic [7:0] A_CTRL = 8'h00, A_STATUS = 8'h01, A_ROWS = 8'h02,
                         A_COLS = 8'h03, A_WROWS = 8'h04, A_WCOLS = 8'h05,
                         A_COEF = 8'h10;

  logic done_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      rows   <= '0;
      cols   <= '0;
      wrows  <= '0;
      wcols  <= '0;
      coef   <= '0;
      start  <= 1'b0;
      done_q <= 1'b0;
    end else begin
      start <= wr_en && (addr == A_CTRL) && wdata[0] && !busy;
      if (wr_en) begin
        case (addr)
          A_ROWS:  rows  <= ROW_W'(wdata);
          A_COLS:  cols  <= COL_W'(wdata);
          A_WROWS: wrows <= WR_W'(wdata);
          A_WCOLS: wcols <= WC_W'(wdata);
          default: ;
        endcase
        for (int t = 0; t < TAPS; t++)
          if (addr == A_COEF + 8'(t)) coef[t] <= wdata[COEF_W-1:0];
      end
      if (start) done_q <= 1'b0;
      else if (done) done_q <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) rdata <= '0;
    else if (rd_en) begin
      rdata <= '0;
      case (addr)
        A_STATUS: rdata <= {30'd0, busy, done_q};
        A_ROWS:   rdata <= 32'(rows);
        A_COLS:   rdata <= 32'(cols);
        A_WROWS:  rdata <= 32'(wrows);
        A_WCOLS:  rdata <= 32'(wcols);
        default: begin
          for (int t = 0; t < TAPS; t++)
            if (addr == A_COEF + 8'(t)) rdata <= 32'($signed(coef[t]));
        end
      endcase
    end
  end

  // The coefficient window must fit the address map.
  if (int'(A_COEF) + TAPS > 256) begin : g_check
    $error("mmio_regs: too many coefficients for the 8-bit address map");
  end

endmodule

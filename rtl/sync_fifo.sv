// sync_fifo: single-clock FIFO with an almost-full flag.
//
// In the convolution datapath this is the large output FIFO behind the
// replicated pipelines. The pipelines have no stall of their own; when the
// result writer cannot accept data, this FIFO takes in everything still in
// flight. Its almost_full flag tells the window generator to stop producing
// windows, and AF_LEVEL is set low enough that the rest of a window row and
// the pipeline contents still fit. The window buffer uses a small instance
// to hold pixels returning from the variable-read FIFO.
//
// Interface and timing: the oldest word is on rd_data whenever !empty (first
// word falls through); rd_en pops it. A write is accepted when wr_en && !full,
// also in the same cycle as a read. count, full, empty and almost_full
// (count >= AF_LEVEL) are registered-state flags.
//
// The output FIFO and its almost-full stop follow the design description;
// the depth and threshold are this implementation's choice.
module sync_fifo #(
  parameter int unsigned WIDTH    = 64,
  parameter int unsigned DEPTH    = 128,
  parameter int unsigned AF_LEVEL = DEPTH - 8,
  localparam int unsigned AW      = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW      = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             almost_full,
  output logic [CW-1:0]    count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] ptr);
    return (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
  endfunction

  assign full        = (count == CW'(DEPTH));
  assign empty       = (count == '0);
  assign almost_full = (count >= CW'(AF_LEVEL));
  assign do_rd       = rd_en && !empty;
  assign do_wr       = wr_en && !full;
  assign rd_data     = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  // Data pushed into a full FIFO would be lost.
  a_no_overflow: assert property (@(posedge clk) disable iff (rst) wr_en |-> !full);

endmodule

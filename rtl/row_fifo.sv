// row_fifo: one image-row FIFO of the window buffer.
//
// Each word holds P pixels, so a row of ic pixels takes ceil(ic/P) words and
// the depth, DEPTH = MAX_COLS / P, holds the widest image row. The window
// buffer chains MAX_WR of these: words read from one FIFO are written into
// the FIFO above it.
//
// The FIFO shows its oldest word on rd_data without a read request (first word
// falls through), so a read and the write of that word into the next FIFO
// happen in the same cycle. A read and a write in the same cycle are allowed
// when the FIFO is full; the read frees the slot. count is the number of words
// held (registered). clear empties the FIFO synchronously; the window buffer
// uses it between images.
//
// The depth follows the design description (maximum image width divided by
// P). The storage is an array read without a clock edge; a block-RAM mapping
// with a registered read port is this implementation's choice not to make.
module row_fifo #(
  parameter int unsigned WIDTH = wg_pkg::P_DEFAULT * wg_pkg::DATA_W_DEFAULT,
  parameter int unsigned DEPTH = wg_pkg::MAX_COLS_DEFAULT / wg_pkg::P_DEFAULT,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic [CW-1:0]    count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] ptr);
    return (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
  endfunction

  assign rd_data = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (wr_en) wr_ptr <= next_ptr(wr_ptr);
      if (rd_en) rd_ptr <= next_ptr(rd_ptr);
      count <= count + CW'(wr_en) - CW'(rd_en);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= wr_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst || clear)
      wr_en && !rd_en |-> count < CW'(DEPTH));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst || clear)
      rd_en |-> count != '0);

endmodule

// vrf: variable-read FIFO.
//
// Writes always bring P pixels; a read takes any amount from 1 to P. This lets
// the window buffer take the last, partial group of an image row without the
// image being padded to a multiple of P columns.
//
// How it works. The store is a buffer of 2P registers. A write always lands in
// the upper half, registers P..2P-1. The output index says where the oldest
// unread pixel is. A read of A pixels moves the index forward by A. Once the
// index has passed P-1 while the upper half holds data, the write side shifts
// the buffer left by P positions and the index drops by P, which frees the
// upper half for the next write. Unread pixels therefore always end at
// register P-1 or 2P-1.
//
// Output alignment is a pipelined barrel shifter. It has log2(P) stages. Each
// stage is one rank of 2:1 multiplexers followed by registers. The first stage
// shifts by P/2 under the most significant index bit and the last shifts by 1
// under bit 0. No stage has more than a 2:1 mux between registers, whatever P
// is. The index bits and the read mask travel down the pipeline with the data.
//
// Interface and timing.
//   wr_en/wr_data/wr_ready : P pixels are written when wr_en && wr_ready.
//                            wr_ready depends combinationally on this cycle's
//                            read, because a read can free the upper half.
//   rd_en/rd_amount        : take rd_amount (1..P) pixels. rd_amount must not
//                            exceed count (an assertion checks this).
//   count                  : pixels that can be read this cycle (registered).
//   out_valid/out_data/out_mask : the pixels of a read, LAT = log2(P) cycles
//                            after it. out_data[j] is valid when out_mask[j];
//                            a read of A pixels marks outputs A..P-1 invalid.
//   clear                  : empties the buffer (synchronous).
// A read can be issued every cycle.
//
// From the design description: the 2P-register buffer with fixed write
// registers, the shift-by-P rule, the pipelined barrel shifter and the count
// and per-output valid bits. This implementation's own choices: after a write
// into an empty buffer the data is readable one cycle later, once the buffer
// has shifted, and the index bits are delayed along the shifter pipeline.
module vrf #(
  parameter int unsigned P      = wg_pkg::P_DEFAULT,
  parameter int unsigned DATA_W = wg_pkg::DATA_W_DEFAULT,
  localparam int unsigned SH_W  = $clog2(P),        // barrel-shifter stages
  localparam int unsigned AMT_W = $clog2(P + 1),
  localparam int unsigned CNT_W = $clog2(2 * P + 1)
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          clear,
  input  logic                          wr_en,
  input  logic [P-1:0][DATA_W-1:0]      wr_data,
  output logic                          wr_ready,
  input  logic                          rd_en,
  input  logic [AMT_W-1:0]              rd_amount,
  output logic [CNT_W-1:0]              count,
  output logic                          out_valid,
  output logic [P-1:0][DATA_W-1:0]      out_data,
  output logic [P-1:0]                  out_mask
);

  localparam int unsigned LAT = SH_W;
  localparam int unsigned NB  = 2 * P - 1;  // registers the shifter can reach

  // Register buffer and write/read state.
  logic [2*P-1:0][DATA_W-1:0] buffer_q;
  logic [SH_W:0]              idx_q;     // output index, 0..P
  logic                       hi_q;      // upper half holds data

  logic [SH_W+1:0]            idx_rd, idx_nx;
  logic                       shift, hi_nx, rd_fire, wr_fire;

  // Count: unread pixels end at P-1 (hi_q = 0) or 2P-1 (hi_q = 1). With the
  // index at P the data has not yet been shifted down and cannot be read.
  always_comb begin
    if (idx_q == (SH_W+1)'(P)) count = '0;
    else count = CNT_W'(hi_q ? 2 * P : P) - CNT_W'(idx_q);
  end

  always_comb begin
    rd_fire  = rd_en && (rd_amount != '0);
    idx_rd   = (SH_W+2)'(idx_q) + (rd_fire ? (SH_W+2)'(rd_amount) : '0);
    shift    = hi_q && (idx_rd >= (SH_W+2)'(P));
    idx_nx   = shift ? idx_rd - (SH_W+2)'(P) : idx_rd;
    hi_nx    = hi_q && !shift;
    wr_ready = !hi_nx;
    wr_fire  = wr_en && wr_ready;
  end

  // Write controller: shift by P and/or load the upper half.
  always_ff @(posedge clk) begin
    if (rst || clear) begin
      idx_q <= (SH_W+1)'(P);
      hi_q  <= 1'b0;
    end else begin
      idx_q <= idx_nx[SH_W:0];
      hi_q  <= hi_nx || wr_fire;
    end
  end

  always_ff @(posedge clk) begin
    if (shift) buffer_q[P-1:0] <= buffer_q[2*P-1:P];
    if (wr_fire) buffer_q[2*P-1:P] <= wr_data;
  end

  // Read mask: outputs 0..amount-1 are valid.
  logic [P-1:0] rd_mask;
  always_comb begin
    for (int j = 0; j < P; j++) rd_mask[j] = (AMT_W'(j) < rd_amount);
  end

  // Pipelined barrel shifter. st_q[s] holds the data after stage s+1;
  // stage s+1 shifts by 2**(SH_W-1-s) when that bit of the index is set.
  logic [NB-1:0][DATA_W-1:0] st_q    [SH_W];
  logic [SH_W-1:0]           sidx_q  [SH_W];
  logic [P-1:0]              smask_q [SH_W];
  logic [SH_W-1:0]           svalid_q;

  always_ff @(posedge clk) begin
    for (int s = 0; s < SH_W; s++) begin
      logic [NB-1:0][DATA_W-1:0] src;
      logic [SH_W-1:0]           sidx;
      int unsigned               step;
      src  = (s == 0) ? buffer_q[NB-1:0] : st_q[s-1];
      sidx = (s == 0) ? idx_q[SH_W-1:0] : sidx_q[s-1];
      step = 1 << (SH_W - 1 - s);
      for (int m = 0; m < NB; m++) begin
        if (sidx[SH_W-1-s] && (m + step < NB)) st_q[s][m] <= src[m + step];
        else st_q[s][m] <= src[m];
      end
      sidx_q[s]  <= sidx;
      smask_q[s] <= (s == 0) ? rd_mask : smask_q[s-1];
    end
  end

  always_ff @(posedge clk) begin
    if (rst || clear) svalid_q <= '0;
    else begin
      svalid_q[0] <= rd_fire;
      for (int s = 1; s < SH_W; s++) svalid_q[s] <= svalid_q[s-1];
    end
  end

  always_comb begin
    for (int j = 0; j < P; j++) out_data[j] = st_q[LAT-1][j];
    out_mask  = smask_q[LAT-1];
    out_valid = svalid_q[LAT-1];
  end

  // A read may not take more pixels than the buffer holds.
  a_rd_le_count: assert property (@(posedge clk) disable iff (rst)
      rd_en |-> (CNT_W'(rd_amount) <= count));
  a_amount_range: assert property (@(posedge clk) disable iff (rst)
      rd_en |-> (rd_amount <= AMT_W'(P)));

endmodule

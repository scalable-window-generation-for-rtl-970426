// wg_pkg: constants shared by the window generator and the 2D convolution
// datapath.
//
// The defaults describe the main configuration: 64 replicated pipelines
// (p = 64), a 3x3 maximum window, images up to 2048x2048, 8-bit pixels and a
// 16-bit fixed-point convolution kernel. Every module takes these as the
// defaults of its own typed parameters, so a build for another window size or
// replication amount only overrides the parameters of the top.
package wg_pkg;

  // Pixels accepted, windows produced and pipelines replicated per cycle.
  localparam int unsigned P_DEFAULT        = 64;
  // Largest window the hardware holds; smaller windows are chosen at run time.
  localparam int unsigned MAX_WR_DEFAULT   = 3;
  localparam int unsigned MAX_WC_DEFAULT   = 3;
  // Largest image; the row FIFO depth is MAX_COLS / P words.
  localparam int unsigned MAX_COLS_DEFAULT = 2048;
  localparam int unsigned MAX_ROWS_DEFAULT = 2048;
  // Pixel (colour channel) width and convolution coefficient width.
  localparam int unsigned DATA_W_DEFAULT   = 8;
  localparam int unsigned COEF_W_DEFAULT   = 16;

  // Number of coalescer register columns: ceil((wc + p - 1) / p) * p.
  function automatic int unsigned coalescer_cols(int unsigned max_wc, int unsigned p);
    return ((max_wc + p - 2) / p + 1) * p;
  endfunction

  // Depth of the balanced adder tree for a given number of products.
  function automatic int unsigned tree_levels(int unsigned taps);
    return (taps <= 1) ? 0 : $clog2(taps);
  endfunction

endpackage

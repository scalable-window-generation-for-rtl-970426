// delay_line: fixed delay of DELAY cycles for a WIDTH-bit signal.
//
// Used by the floating-point convolution pipeline to line up each kernel
// element's pixel with the running sum in the multiply-add chain.
//
// How it works. Short delays are a chain of DELAY registers. From
// RAM_MIN cycles on, the delay is a circular buffer of DELAY-1 words with a
// registered read: each cycle it reads the oldest word into the output
// register and overwrites it with the new input. Synthesis maps that buffer to
// block RAM.
//
// Interface and timing: out equals in as sampled DELAY clock edges earlier.
// DELAY = 0 is a plain wire (clk and rst then unused). The line never stalls.
// rst only resets the RAM pointer; contents are not reset, and
// the pipeline's valid bits say which outputs mean anything.
//
// From the design description: registers below a size threshold and block RAM
// above it. The threshold (RAM_MIN) is this implementation's choice.
module delay_line #(
  parameter int unsigned WIDTH   = 32,
  parameter int unsigned DELAY   = 1,
  parameter int unsigned RAM_MIN = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] in,
  output logic [WIDTH-1:0] out
);

  if (DELAY == 0) begin : g_wire
    assign out = in;
  end else if (DELAY < RAM_MIN || DELAY < 2) begin : g_regs
    logic [WIDTH-1:0] sr_q [DELAY];
    always_ff @(posedge clk) begin
      sr_q[0] <= in;
      for (int i = 1; i < DELAY; i++) sr_q[i] <= sr_q[i-1];
    end
    assign out = sr_q[DELAY-1];
  end else begin : g_ram
    localparam int unsigned N   = DELAY - 1;
    localparam int unsigned PTR = (N > 1) ? $clog2(N) : 1;
    logic [WIDTH-1:0] mem [N];
    logic [PTR-1:0]   ptr_q;
    logic [WIDTH-1:0] out_q;
    always_ff @(posedge clk) begin
      out_q    <= mem[ptr_q];
      mem[ptr_q] <= in;
      if (rst) ptr_q <= '0;
      else ptr_q <= (ptr_q == PTR'(N - 1)) ? '0 : ptr_q + 1'b1;
    end
    assign out = out_q;
  end

endmodule

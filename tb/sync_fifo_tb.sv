// sync_fifo_tb: self-checking test of the output FIFO.
//
// DEPTH = 16, AF_LEVEL = 10. Random pushes (never into a full FIFO) and pops
// are checked against a queue model: data order, count, empty, full and
// almost_full every cycle. Phases of push-only and pop-only traffic drive it to
// full and to empty.
module sync_fifo_tb;
  localparam int W = 12, D = 16, AF = 10;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic wr_en = 0, rd_en = 0, full, empty, almost_full;
  logic [W-1:0] wr_data, rd_data;
  logic [4:0] count;

  sync_fifo #(.WIDTH(W), .DEPTH(D), .AF_LEVEL(AF)) dut (.*);

  int checks = 0, failures = 0, mode = 0, saw_full = 0, saw_empty = 0;
  logic [W-1:0] model [$];

  always @(negedge clk) if (!rst) begin
    wr_data = W'($urandom);
    wr_en = !full && (mode == 1 ? 1'b1 : mode == 2 ? 1'b0 : ($urandom % 2 == 0));
    rd_en = (mode == 2 ? 1'b1 : mode == 1 ? 1'b0 : ($urandom % 2 == 0));
  end

  always @(posedge clk) if (!rst) begin
    checks++;
    if (int'(count) != model.size() || empty != (model.size() == 0) ||
        full != (model.size() == D) || almost_full != (model.size() >= AF) ||
        (model.size() != 0 && rd_data != model[0])) begin
      failures++;
      if (failures < 10) $display("FAIL count %0d model %0d", count, model.size());
    end
    if (full) saw_full++;
    if (empty) saw_empty++;
    if (rd_en && model.size() != 0) void'(model.pop_front());
    if (wr_en) model.push_back(wr_data);
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (500) @(negedge clk);
    mode = 1; repeat (30) @(negedge clk);
    mode = 2; repeat (30) @(negedge clk);
    mode = 0; repeat (500) @(negedge clk);
    checks++;
    if (saw_full == 0 || saw_empty == 0) begin failures++; $display("FAIL full/empty not reached"); end
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

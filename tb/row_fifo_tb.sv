// row_fifo_tb: self-checking test of one row FIFO.
//
// DEPTH = 8 words. Random writes and reads, including a read and a write in
// the same cycle while full, are checked against a queue model: the word shown
// on rd_data and count every cycle. clear must empty the FIFO.
module row_fifo_tb;
  localparam int W = 16, D = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic clear = 0, wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data, rd_data;
  logic [3:0] count;

  row_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0, full_rw = 0;
  logic [W-1:0] model [$];

  always @(negedge clk) if (!rst) begin
    wr_data = W'($urandom);
    rd_en = (model.size() != 0) && ($urandom % 2 == 0);
    wr_en = (model.size() < D || rd_en) && ($urandom % 3 != 0);
    clear = ($urandom % 200 == 0);
  end

  always @(posedge clk) if (!rst) begin
    checks++;
    if (int'(count) != model.size() || (model.size() != 0 && rd_data != model[0])) begin
      failures++;
      if (failures < 10) $display("FAIL count %0d model %0d", count, model.size());
    end
    if (model.size() == D && rd_en && wr_en) full_rw++;
    if (clear) model.delete();
    else begin
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3000) @(negedge clk);
    checks++;
    if (full_rw == 0) begin failures++; $display("FAIL no read+write while full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

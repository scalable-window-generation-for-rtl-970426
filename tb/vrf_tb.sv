// vrf_tb: self-checking test of the variable-read FIFO.
//
// P = 8. Writes of 8 pixels and reads of random amounts (1..8, never more than
// count) are issued at random. A queue model of the pixel stream gives the
// expected pixels of each read. Each read must come out exactly log2(P) = 3
// cycles later, with the read pixels in outputs 0..A-1 and only those outputs
// marked valid. count is checked against the model every cycle, within the
// one-cycle delay after a write into an empty buffer. A phase of
// back-to-back full reads checks that one read per cycle is sustained.
module vrf_tb;
  localparam int P = 8, DW = 8, LAT = 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic clear = 0, wr_en = 0, wr_ready, rd_en = 0, out_valid;
  logic [P-1:0][DW-1:0] wr_data, out_data;
  logic [3:0] rd_amount = 0;
  logic [4:0] count;
  logic [P-1:0] out_mask;

  vrf #(.P(P), .DATA_W(DW)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  logic [DW-1:0] model [$];
  typedef struct { int due; int amt; logic [P-1:0][DW-1:0] px; } rd_t;
  rd_t pend [$];
  int full_rate = 0, reads_in_full_phase = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // Drive on the negative edge, update the model on the positive edge.
  always @(negedge clk) if (!rst) begin
    wr_en = (full_rate != 0) ? 1'b1 : ($urandom % 2 == 0);
    for (int j = 0; j < P; j++) wr_data[j] = DW'($urandom);
    if (count != 0 && (full_rate != 0 ? (count >= P) : ($urandom % 3 != 0))) begin
      rd_en = 1;
      rd_amount = (full_rate != 0) ? 4'(P) : 4'($urandom % (int'(count) < P ? int'(count) : P) + 1);
    end else begin
      rd_en = 0;
      rd_amount = 0;
    end
  end

  always @(posedge clk) if (!rst) begin
    // Outputs of earlier reads
    if (out_valid) begin
      checks++;
      if (pend.size() == 0 || pend[0].due != cyc) begin
        failures++;
        $display("FAIL unexpected output at cycle %0d (pend %0d due %0d)", cyc, pend.size(), pend.size() ? pend[0].due : -1);
      end else begin
        rd_t e;
        e = pend.pop_front();
        for (int j = 0; j < P; j++) begin
          if (out_mask[j] != (j < e.amt)) failures++;
          if (j < e.amt && out_data[j] != e.px[j]) begin
            failures++;
            if (failures < 10) $display("FAIL pixel %0d: got %0h expected %0h", j, out_data[j], e.px[j]);
          end
        end
      end
    end else if (pend.size() != 0 && pend[0].due == cyc) begin
      failures++;
      $display("FAIL missing output at cycle %0d", cyc);
    end
    // count never claims more than the model holds, and at most one
    // written word is not yet readable.
    checks++;
    if (int'(count) > model.size() || int'(count) + P < model.size()) begin
      failures++;
      $display("FAIL count %0d model %0d", count, model.size());
    end
    if (rd_en) begin
      rd_t e;
      e.due = cyc + LAT;
      e.amt = int'(rd_amount);
      for (int j = 0; j < P; j++) e.px[j] = (j < e.amt) ? model[j] : '0;
      for (int j = 0; j < e.amt; j++) void'(model.pop_front());
      pend.push_back(e);
      if (full_rate != 0) reads_in_full_phase++;
    end
    if (wr_en && wr_ready)
      for (int j = 0; j < P; j++) model.push_back(wr_data[j]);
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3000) @(negedge clk);
    full_rate = 1;
    repeat (10) @(negedge clk);
    reads_in_full_phase = 0;
    repeat (100) @(negedge clk);
    checks++;
    if (reads_in_full_phase < 100) begin
      failures++;
      $display("FAIL only %0d full reads in 100 cycles", reads_in_full_phase);
    end
    full_rate = 0;
    repeat (20) @(negedge clk);
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

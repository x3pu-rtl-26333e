// tb_sync_fifo: random pushes and pops against a queue model; checks order,
// full/empty flags, the count and that a full FIFO refuses a write.
module tb_sync_fifo;
  localparam int W = 16, DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic wr_valid = 0, wr_ready, rd_valid, rd_ready = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(DEPTH):0] count;
  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [W-1:0] model[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // bias towards filling in the first half and draining in the second
      wr_valid = ($urandom_range(0, 99) < (cyc < 1500 ? 70 : 30));
      rd_ready = ($urandom_range(0, 99) < (cyc < 1500 ? 30 : 70));
      wr_data  = W'($urandom);
      @(posedge clk);
      checks++;
      if (count != ($clog2(DEPTH)+1)'(model.size()) || wr_ready != (model.size() < DEPTH)
          || rd_valid != (model.size() > 0)) begin
        failures++;
        $display("FAIL: flags at cycle %0d (count %0d, model %0d)", cyc, count, model.size());
      end
      if (model.size() == DEPTH) n_full++;
      if (model.size() == 0) n_empty++;
      if (rd_valid && rd_ready) begin
        checks++;
        if (rd_data != model.pop_front()) begin
          failures++;
          $display("FAIL: data order at cycle %0d", cyc);
        end
      end
      if (wr_valid && wr_ready) model.push_back(wr_data);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin
      failures++;
      $display("FAIL: full (%0d) or empty (%0d) never reached", n_full, n_empty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

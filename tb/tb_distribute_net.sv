// tb_distribute_net: sends a different instruction every cycle and checks
// that each one reaches every leaf exactly log2(P)+1 cycles later.
module tb_distribute_net;
  import x3pu_pkg::*;
  localparam int P = 16, LAT = $clog2(P) + 1;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  arr_instr_t in = ARR_NOP;
  arr_instr_t out [P];
  distribute_net #(.P(P)) dut (.*);

  int checks = 0, failures = 0;
  arr_instr_t hist [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // after reset every leaf holds a NOP
    for (int i = 0; i < P; i++) begin
      checks++;
      if (out[i] != ARR_NOP) begin failures++; $display("FAIL: leaf %0d not NOP after reset", i); end
    end
    for (int cyc = 0; cyc < 200; cyc++) begin
      in.op   = aop_e'($urandom_range(0, 19));
      in.mode = mode_e'($urandom_range(0, 2));
      in.red  = red_e'($urandom_range(0, 3));
      in.opnd = $urandom;
      hist.push_back(in);
      @(negedge clk);
      if (cyc >= LAT - 1) begin
        for (int i = 0; i < P; i++) begin
          checks++;
          if (out[i] != hist[cyc - (LAT - 1)]) begin
            failures++;
            $display("FAIL: leaf %0d cycle %0d", i, cyc);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

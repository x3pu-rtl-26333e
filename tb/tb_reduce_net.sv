// tb_reduce_net: random vectors and masks, one reduction per cycle with a
// random function; checks each result and its latency of log2(P)+1 cycles
// against a reference computed here.
module tb_reduce_net;
  import x3pu_pkg::*;
  localparam int P = 16, DW = 16, LAT = $clog2(P) + 1;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0;
  red_e op = R_ADD;
  logic [DW-1:0] vec [P];
  logic [P-1:0] mask = '0;
  logic out_valid;
  logic [DW-1:0] out;
  reduce_net #(.P(P), .DW(DW)) dut (.*);

  int checks = 0, failures = 0;
  typedef struct { int cyc; logic [DW-1:0] val; } exp_t;
  exp_t expq[$];

  function automatic logic [DW-1:0] ref_red(red_e f, logic [DW-1:0] v [P], logic [P-1:0] m);
    logic [DW-1:0] r;
    r = (f == R_MIN) ? '1 : '0;
    for (int i = 0; i < P; i++) if (m[i])
      case (f)
        R_MIN: if (v[i] < r) r = v[i];
        R_MAX: if (v[i] > r) r = v[i];
        default: r = r + v[i];
      endcase
    return r;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL: unexpected result"); end
    else begin
      exp_t e;
      e = expq.pop_front();
      if (out != e.val || cyc - e.cyc != LAT) begin
        failures++;
        $display("FAIL: got %0d after %0d cycles, expected %0d after %0d", out, cyc - e.cyc, e.val, LAT);
      end
    end
  end

  initial begin
    foreach (vec[i]) vec[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      op = red_e'($urandom_range(1, 3));
      mask = (k % 7 == 0) ? '1 : P'($urandom);
      foreach (vec[i]) vec[i] = DW'($urandom);
      if (in_valid) expq.push_back('{cyc: cyc, val: ref_red(op, vec, mask)});
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d results missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_scan_net: random vectors, masks and functions (prefix sum, min, max,
// rotation) issued back to back; checks every output element and the
// latency of log2(P)+1 cycles against a reference computed here.
module tb_scan_net;
  import x3pu_pkg::*;
  localparam int P = 16, DW = 16, L = $clog2(P), LAT = L + 1;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0;
  scan_e op = S_ADD;
  logic [L-1:0] amount = '0;
  logic [DW-1:0] vec [P];
  logic [P-1:0] mask = '0;
  logic out_valid;
  logic [DW-1:0] out [P];
  scan_net #(.P(P), .DW(DW)) dut (.*);

  int checks = 0, failures = 0;
  typedef logic [DW-1:0] vec_t [P];
  typedef struct { int cyc; vec_t val; } exp_t;
  exp_t expq[$];

  function automatic vec_t ref_scan(scan_e f, logic [L-1:0] amt, vec_t v, logic [P-1:0] m);
    vec_t r;
    logic [DW-1:0] run;
    run = (f == S_MIN) ? '1 : '0;
    for (int i = 0; i < P; i++) begin
      if (f == S_ROT) r[i] = v[(i + int'(amt)) % P];
      else begin
        if (m[i])
          case (f)
            S_MIN: if (v[i] < run) run = v[i];
            S_MAX: if (v[i] > run) run = v[i];
            default: run = run + v[i];
          endcase
        r[i] = run;
      end
    end
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
    if (expq.size() == 0) begin checks++; failures++; $display("FAIL: unexpected result"); end
    else begin
      exp_t e;
      e = expq.pop_front();
      checks++;
      if (cyc - e.cyc != LAT) begin failures++; $display("FAIL: latency %0d", cyc - e.cyc); end
      for (int i = 0; i < P; i++) begin
        checks++;
        if (out[i] != e.val[i]) begin
          failures++;
          $display("FAIL: element %0d = %0d, expected %0d", i, out[i], e.val[i]);
        end
      end
    end
  end

  initial begin
    foreach (vec[i]) vec[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      op = scan_e'(k % 4);
      amount = L'($urandom);
      mask = (k % 5 == 0) ? '1 : P'($urandom);
      foreach (vec[i]) vec[i] = DW'($urandom_range(0, 4000));
      if (in_valid) expq.push_back('{cyc: cyc, val: ref_scan(op, amount, vec, mask)});
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d results missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

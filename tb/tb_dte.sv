// tb_dte: the Data Transfer Engine with P = 4, against memory models kept in
// the testbench. Sends an array matrix with short lines (checks zero
// padding and the mat_written pulse), a controller matrix (padding, stride
// P), reads both back with random output back-pressure (only `cols` words
// per line), and checks that a GET with wait = 1 holds until the
// controller marks a result ready.
module tb_dte;
  import x3pu_pkg::*;
  localparam int P = 4, DW = 16, MD = 16, CD = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, in_ready;
  logic [DW-1:0] in_data = '0;
  logic out_valid, out_ready = 1'b0;
  logic [DW-1:0] out_data;
  logic arr_we;
  logic [3:0] arr_waddr, arr_raddr;
  logic [DW-1:0] arr_wdata [P];
  logic [DW-1:0] arr_rdata [P];
  logic ctl_we;
  logic [5:0] ctl_waddr, ctl_raddr;
  logic [DW-1:0] ctl_wdata, ctl_rdata;
  logic mat_written, res_ready = 1'b0, busy;

  dte #(.P(P), .DW(DW), .MEM_DEPTH(MD), .CMEM_DEPTH(CD)) dut (.*);

  // memory models
  logic [DW-1:0] amem [MD][P];
  logic [DW-1:0] cmem [CD];
  always @(posedge clk) begin
    if (arr_we) for (int i = 0; i < P; i++) amem[arr_waddr][i] <= arr_wdata[i];
    if (ctl_we) cmem[ctl_waddr] <= ctl_wdata;
  end
  always_comb for (int i = 0; i < P; i++) arr_rdata[i] = amem[arr_raddr][i];
  assign ctl_rdata = cmem[ctl_raddr];

  int checks = 0, failures = 0, n_mat = 0, n_hold = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  logic [DW-1:0] rxq[$];
  always @(posedge clk) begin
    if (out_valid && out_ready) rxq.push_back(out_data);
    if (out_valid && !out_ready) n_hold++;
    if (rst_n && mat_written) n_mat++;
  end
  initial forever begin
    @(negedge clk);
    out_ready = ($urandom_range(0, 2) != 0);
  end

  task automatic send(logic [DW-1:0] w);
    if (clk) @(negedge clk);
    in_valid = 1'b1; in_data = w;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk) in_valid = 1'b0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] A [3][3];
    logic [DW-1:0] B [2][2];
    for (int r = 0; r < MD; r++) for (int i = 0; i < P; i++) amem[r][i] = 16'hFFFF;
    for (int a = 0; a < CD; a++) cmem[a] = 16'hFFFF;
    foreach (A[i, j]) A[i][j] = DW'(10 * i + j + 1);
    foreach (B[i, j]) B[i][j] = DW'(100 * i + j + 7);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    send(DTE_SEND_ARRAY); send(2); send(3); send(3);
    foreach (A[i, j]) send(A[i][j]);
    send(DTE_SEND_CTRL); send(5); send(2); send(2);
    foreach (B[i, j]) send(B[i][j]);
    wait (!busy);
    @(negedge clk);
    chk(n_mat == 1, $sformatf("mat_written pulses: %0d", n_mat));
    for (int i = 0; i < 3; i++) begin
      for (int j = 0; j < 3; j++) chk(amem[2+i][j] == A[i][j], $sformatf("array row %0d cell %0d", 2+i, j));
      chk(amem[2+i][3] == '0, "array line padded with zero");
    end
    chk(amem[1][0] == 16'hFFFF && amem[5][0] == 16'hFFFF, "rows outside untouched");
    for (int l = 0; l < 2; l++) for (int c = 0; c < P; c++)
      chk(cmem[5 + l*P + c] == ((c < 2) ? B[l][c] : '0), $sformatf("controller word %0d", 5 + l*P + c));
    chk(cmem[4] == 16'hFFFF && cmem[13] == 16'hFFFF, "controller words outside untouched");

    send(DTE_GET_ARRAY); send(2); send(3); send(3); send(0);
    while (rxq.size() < 9) @(posedge clk);
    foreach (A[i, j]) chk(rxq.pop_front() == A[i][j], "array read-out");

    send(DTE_GET_CTRL); send(5); send(2); send(2); send(1);
    repeat (30) @(posedge clk);
    chk(rxq.size() == 0 && busy, "GET waits for a ready result");
    @(negedge clk) res_ready = 1'b1;
    @(negedge clk) res_ready = 1'b0;
    while (rxq.size() < 4) @(posedge clk);
    foreach (B[i, j]) chk(rxq.pop_front() == B[i][j], "controller read-out");
    repeat (5) @(posedge clk);
    chk(rxq.size() == 0 && !busy, "no extra words");
    chk(n_hold > 0, "output back-pressure seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

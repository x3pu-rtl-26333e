// tb_map_array: a small MAP (4 cells). Writes rows through the DTE port,
// has every cell load its index, apply a where on odd indices, add a row,
// store it, take a scan result and read everything back per cell.
module tb_map_array;
  import x3pu_pkg::*;
  localparam int P = 4, DW = 16, DEPTH = 32, AW = $clog2(DEPTH);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  arr_instr_t    instr [P];
  logic [DW-1:0] acc [P];
  logic [P-1:0]  active;
  logic          scan_valid = 1'b0;
  logic [DW-1:0] scan_data [P];
  logic          row_we = 1'b0;
  logic [AW-1:0] row_waddr = '0, row_raddr = '0;
  logic [DW-1:0] row_wdata [P];
  logic [DW-1:0] row_rdata [P];

  map_array #(.P(P), .DW(DW), .MEM_DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic issue(aop_e op, mode_e m = M_MEM, int opnd = 0);
    foreach (instr[i]) begin
      instr[i] = ARR_NOP;
      instr[i].op = op; instr[i].mode = m; instr[i].opnd = XW'(opnd);
    end
    @(negedge clk);
    foreach (instr[i]) instr[i] = ARR_NOP;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (instr[i]) instr[i] = ARR_NOP;
    foreach (scan_data[i]) scan_data[i] = '0;
    foreach (row_wdata[i]) row_wdata[i] = DW'(100 * (i + 1));
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    row_we = 1'b1; row_waddr = 5'd3;
    @(negedge clk) row_we = 1'b0;
    row_raddr = 5'd3; #1;
    foreach (row_rdata[i]) chk(row_rdata[i] == DW'(100 * (i + 1)), "row written and read back");
    issue(A_IXLOAD);
    foreach (acc[i]) chk(acc[i] == DW'(i), $sformatf("index of cell %0d = %0d", i, acc[i]));
    issue(A_AND, M_VAL, 1);
    issue(A_WHERENZ);
    chk(active == 4'b1010, $sformatf("odd cells active: %b", active));
    issue(A_ADD, M_MEM, 3);            // odd cells: acc = 1 + row3
    issue(A_STORE, M_MEM, 4);
    issue(A_ACTIVATE);
    chk(active == 4'b1111, "all active again");
    row_raddr = 5'd4; #1;
    chk(row_rdata[1] == DW'(201) && row_rdata[3] == DW'(401), "odd cells stored");
    // scan result delivered to every cell, then loaded
    foreach (scan_data[i]) scan_data[i] = DW'(7 * i + 1);
    scan_valid = 1'b1;
    @(negedge clk) scan_valid = 1'b0;
    issue(A_SCANLD);
    foreach (acc[i]) chk(acc[i] == DW'(7 * i + 1), "scan register loaded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_controller: runs a program on the controller alone. The testbench
// stands in for the rest of the accelerator: it returns a reduction result
// and a scan completion a fixed number of cycles after the controller issues
// them, pulses mat_written late so that WAITMATW must wait, and reads the
// controller memory through the DTE port. Checks: loop and branch results,
// every ALU operation, relative addressing, the array instructions issued
// (operands resolved from the controller accumulator), the queueing of
// reduction results in order, the waits of
// WAITMATW, REDINS and SCANLD, RESREADY, the interrupt and the cycle
// counter.
module tb_controller;
  import x3pu_pkg::*;
  localparam int DW = 16, DLY = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         prog_we = 1'b0;
  logic [9:0]   prog_addr = '0;
  prog_word_t   prog_data = '0;
  logic         run = 1'b0;
  logic [9:0]   run_addr = '0;
  logic         running;
  arr_instr_t   instr_o;
  logic         red_valid = 1'b0;
  logic [DW-1:0] red_data = '0;
  logic         scan_done = 1'b0;
  logic         mat_written = 1'b0;
  logic         res_ready;
  logic         dte_we = 1'b0;
  logic [9:0]   dte_waddr = '0, dte_raddr = '0;
  logic [DW-1:0] dte_wdata = '0, dte_rdata;
  logic         irq, irq_ack = 1'b0;
  logic [31:0]  cycle_count;
  logic         stall;

  controller #(.DW(DW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic prog_word_t pw(cop_e cop, mode_e cm, int cimm,
                                    aop_e aop = A_NOP, mode_e am = M_MEM, red_e red = R_NOP, int aimm = 0);
    prog_word_t w;
    w = '0;
    w.c.op = cop; w.c.mode = cm; w.c.imm = 16'(cimm);
    w.a.op = aop; w.a.mode = am; w.a.red = red; w.a.imm = 16'(aimm);
    return w;
  endfunction

  // stand-in for the distribution tree + REDUCE / SCAN networks
  int red_due[$];
  int cyc = 0, red_val = 1234;
  int scan_t = -1, n_res = 0, n_wait_mat = 0, n_wait_red = 0, n_wait_scan = 0;
  arr_instr_t issued[$];
  always @(posedge clk) begin
    red_valid <= 1'b0;
    scan_done <= 1'b0;
    cyc <= cyc + 1;
    if (red_due.size() > 0 && red_due[0] == cyc) begin
      void'(red_due.pop_front());
      red_valid <= 1'b1;
      red_data  <= DW'(red_val);
      red_val   <= red_val + 1;
    end
    if (scan_t > 0) scan_t <= scan_t - 1;
    if (scan_t == 1) scan_done <= 1'b1;
    if (instr_o.red != R_NOP) red_due.push_back(cyc + DLY);
    if (is_scan_op(instr_o.op)) scan_t <= DLY;
    if (instr_o.op != A_NOP || instr_o.red != R_NOP) issued.push_back(instr_o);
    if (res_ready) n_res++;
    if (stall && dut.c.op == C_WAITMATW) n_wait_mat++;
    if (stall && dut.c.op == C_REDINS) n_wait_red++;
    if (stall && dut.a.op == A_SCANLD) n_wait_scan++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd(int a, output logic [DW-1:0] v);
    dte_raddr = 10'(a); #1; v = dte_rdata;
  endtask

  initial begin
    prog_word_t prog[$];
    logic [DW-1:0] v;
    prog = {
      pw(C_WAITMATW, M_VAL, 1),                       // 0
      pw(C_START, M_MEM, 0),                          // 1
      pw(C_LOAD, M_VAL, 0),                           // 2
      pw(C_STORE, M_MEM, 11),                         // 3 sum = 0
      pw(C_LOAD, M_VAL, 3),                           // 4
      pw(C_STORE, M_MEM, 12),                         // 5 counter = 3
      pw(C_LOAD, M_MEM, 11),                          // 6 loop:
      pw(C_ADD, M_VAL, 5, A_LOAD, M_CVAL, R_NOP, 0),  // 7 issue LOAD #sum
      pw(C_STORE, M_MEM, 11),                         // 8
      pw(C_LOAD, M_MEM, 12),                          // 9
      pw(C_BRZDEC, M_VAL, 13),                        // 10
      pw(C_STORE, M_MEM, 12),                         // 11
      pw(C_JMP, M_VAL, 6),                            // 12
      pw(C_LOAD, M_MEM, 11),                          // 13 acc = 20
      pw(C_ADDRLD, M_MEM, 0),                         // 14 caddr = 20
      pw(C_LOAD, M_VAL, 77),                          // 15
      pw(C_STORE, M_REL, 2),                          // 16 cmem[22] = 77
      pw(C_LOAD, M_REL, 2, A_MULT, M_CADDR, R_NOP, 1),// 17 issue MULT mem[77+1]
      pw(C_SUB, M_VAL, 7),                            // 18 70
      pw(C_MULT, M_VAL, 3),                           // 19 210
      pw(C_AND, M_VAL, 255),                          // 20 210
      pw(C_XOR, M_VAL, 1),                            // 21 211
      pw(C_OR, M_VAL, 256),                           // 22 467
      pw(C_STORE, M_MEM, 30),                         // 23
      pw(C_LOAD, M_VAL, 2),                           // 24
      pw(C_BRNZDEC, M_VAL, 28),                       // 25 taken, acc = 1
      pw(C_LOAD, M_VAL, 999),                         // 26 skipped
      pw(C_STORE, M_MEM, 31),                         // 27 skipped
      pw(C_STORE, M_MEM, 32),                         // 28 cmem[32] = 1
      pw(C_BRZ, M_VAL, 31),                           // 29 not taken
      pw(C_LOAD, M_VAL, 0),                           // 30
      pw(C_BRZ, M_VAL, 33),                           // 31 taken
      pw(C_LOAD, M_VAL, 555),                         // 32 skipped
      pw(C_BRNZ, M_VAL, 36),                          // 33 not taken
      pw(C_NOP, M_MEM, 0, A_MULT, M_VAL, R_ADD, 1),   // 34 reduction
      pw(C_REDINS, M_MEM, 0),                         // 35
      pw(C_STORE, M_MEM, 33),                         // 36 1234
      pw(C_NOP, M_MEM, 0, A_SCANADD, M_MEM, R_NOP, 0),// 37
      pw(C_NOP, M_MEM, 0, A_SCANLD, M_MEM, R_NOP, 0), // 38
      pw(C_NOP, M_MEM, 0, A_MULT, M_VAL, R_ADD, 1),   // two reductions in flight
      pw(C_NOP, M_MEM, 0, A_MULT, M_VAL, R_ADD, 1),
      pw(C_REDINS, M_MEM, 0),
      pw(C_STORE, M_MEM, 35),
      pw(C_REDINS, M_MEM, 0),
      pw(C_STORE, M_MEM, 36),
      pw(C_RESREADY, M_MEM, 0),                       // 39
      pw(C_STOP, M_MEM, 0),                           // 40
      pw(C_CNTLOAD, M_MEM, 0),                        // 41
      pw(C_STORE, M_MEM, 34),                         // 42
      pw(C_SETINT, M_MEM, 0),                         // 43
      pw(C_HALT, M_MEM, 0)                            // 44
    };
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // clear the words the program checks, through the DTE port
    for (int a = 0; a < 40; a++) begin
      dte_we = 1'b1; dte_waddr = 10'(a); dte_wdata = '0;
      @(negedge clk);
    end
    dte_we = 1'b0;
    foreach (prog[k]) begin
      prog_we = 1'b1; prog_addr = 10'(k); prog_data = prog[k];
      @(negedge clk);
    end
    prog_we = 1'b0;
    run = 1'b1; run_addr = '0;
    @(negedge clk) run = 1'b0;
    repeat (10) @(negedge clk);
    chk(running && stall, "waiting for a written matrix");
    mat_written = 1'b1;
    @(negedge clk) mat_written = 1'b0;
    wait (!running);
    @(negedge clk);
    rd(11, v); chk(v == 20, $sformatf("loop sum %0d", v));
    rd(22, v); chk(v == 77, "relative store");
    rd(30, v); chk(v == 467, $sformatf("ALU chain %0d", v));
    rd(31, v); chk(v == 0, "skipped by BRNZDEC");
    rd(32, v); chk(v == 1, "BRNZDEC decrements");
    rd(33, v); chk(v == 1234, "REDINS result");
    rd(34, v); chk(v == cycle_count[15:0] && v > 40, $sformatf("cycle counter %0d", v));
    chk(irq, "interrupt");
    chk(n_res == 1, "one RESREADY pulse");
    chk(n_wait_mat >= 10, "WAITMATW waited");
    chk(n_wait_red == 2 * DLY + 1, $sformatf("REDINS waited %0d cycles", n_wait_red));
    chk(n_wait_scan == DLY + 1, $sformatf("SCANLD waited %0d cycles", n_wait_scan));
    rd(35, v); chk(v == 1235, $sformatf("first queued reduction %0d", v));
    rd(36, v); chk(v == 1236, $sformatf("second queued reduction %0d", v));
    chk(issued.size() == 10, $sformatf("%0d array instructions issued", issued.size()));
    for (int k = 0; k < 4; k++)
      chk(issued[k].op == A_LOAD && issued[k].mode == M_VAL && issued[k].opnd == XW'(5 * k),
          $sformatf("issued LOAD #%0d", issued[k].opnd));
    chk(issued[4].op == A_MULT && issued[4].mode == M_MEM && issued[4].opnd == XW'(78), "issued MULT via controller address");
    chk(issued[5].red == R_ADD, "issued reduction");
    chk(issued[6].op == A_SCANADD && issued[7].op == A_SCANLD, "issued scan, scan load");
    @(negedge clk) irq_ack = 1'b1;
    @(negedge clk) irq_ack = 1'b0;
    chk(!irq, "interrupt cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

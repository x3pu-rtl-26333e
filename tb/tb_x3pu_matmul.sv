// tb_x3pu_matmul: the dense matrix multiplication workload at full size,
// p x p matrices on p cells (p = 128, every parameter of the top at its
// default), acting as the host.
//
// The host sends A (row i into array row i) and B transposed (row j into
// array row PB + j) with SEND_MATRIX_ARRAY. The program waits for both
// (WAITMATW 2); for every element it loads row i of A in all cells,
// multiplies by row j of B^T, sums the p products with the REDUCE tree,
// takes the sum with REDINS and writes it into cell j of array row CR + i,
// using a where on the cell index so that only that cell stores. It then
// marks the result ready and raises the interrupt; the host's
// GET_MATRIX_ARRAY (wait = 1) returns C row by row. C is checked against a
// product computed here, and the cycle counter against the count that
// follows from the program: 15 instruction pairs per element plus the
// 2*(log2(p)+1)-cycle round trip of each reduction.
module tb_x3pu_matmul;
  import x3pu_pkg::*;

  localparam int P   = 128;
  localparam int DW  = 16;
  localparam int L   = $clog2(P);
  localparam int N   = P;
  localparam int PB  = N;     // array row of B^T
  localparam int CR  = 2*N;   // array row of C
  localparam int VI  = 1000;  // controller variables
  localparam int VJ  = 1001;
  localparam int VT  = 1002;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            prog_we = 1'b0;
  logic [9:0]      prog_addr = '0;
  prog_word_t      prog_data = '0;
  logic            run = 1'b0;
  logic [9:0]      run_addr = '0;
  logic            running;
  logic            din_valid = 1'b0, din_ready;
  logic [DW-1:0]   din_data = '0;
  logic            dout_valid, dout_ready;
  logic [DW-1:0]   dout_data;
  logic            irq, irq_ack = 1'b0, ctrl_stall, dte_busy;
  logic [31:0]     cycle_count;

  x3pu dut (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data, .run, .run_addr, .running,
    .din_valid, .din_ready, .din_data, .dout_valid, .dout_ready, .dout_data,
    .irq, .irq_ack, .cycle_count, .ctrl_stall, .dte_busy
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- program assembly helpers ----------------
  function automatic prog_word_t pw(cop_e cop, mode_e cm, int cimm,
                                    aop_e aop, mode_e am, red_e red, int aimm);
    prog_word_t w;
    w = '0;
    w.c.op = cop; w.c.mode = cm; w.c.imm = 16'(cimm);
    w.a.op = aop; w.a.mode = am; w.a.red = red; w.a.imm = 16'(aimm);
    return w;
  endfunction
  function automatic prog_word_t cw(cop_e cop, mode_e cm = M_MEM, int cimm = 0);
    return pw(cop, cm, cimm, A_NOP, M_MEM, R_NOP, 0);
  endfunction
  function automatic prog_word_t aw(aop_e aop, mode_e am = M_MEM, int aimm = 0, red_e red = R_NOP);
    return pw(C_NOP, M_MEM, 0, aop, am, red, aimm);
  endfunction

  task automatic load_prog(int base, prog_word_t prog[$]);
    foreach (prog[k]) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = 10'(base + k); prog_data = prog[k];
    end
    @(negedge clk) prog_we = 1'b0;
  endtask

  task automatic start(int addr);
    @(negedge clk); run = 1'b1; run_addr = 10'(addr);
    @(negedge clk); run = 1'b0;
  endtask

  // ---------------- host data port ----------------
  // Back-to-back calls send one word per cycle.
  task automatic send(logic [DW-1:0] word);
    if (clk) @(negedge clk);
    din_valid = 1'b1; din_data = word;
    @(posedge clk);
    while (!din_ready) @(posedge clk);
    @(negedge clk) din_valid = 1'b0;
  endtask

  logic [DW-1:0] rxq[$];
  int backpress_out = 0;
  initial begin
    dout_ready = 1'b0;
    forever begin
      @(negedge clk);
      dout_ready = ($urandom_range(0, 3) != 0);
    end
  end
  always @(posedge clk) begin
    if (dout_valid && dout_ready) rxq.push_back(dout_data);
    if (dout_valid && !dout_ready) backpress_out++;
  end

  task automatic get_words(int n, output logic [DW-1:0] got[$]);
    got = {};
    while (rxq.size() < n) @(posedge clk);
    repeat (n) got.push_back(rxq.pop_front());
  endtask

  logic [DW-1:0] A [N][N];
  logic [DW-1:0] B [N][N];
  logic [DW-1:0] C [N][N];

  initial begin : watchdog
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    prog_word_t mm[$];
    logic [DW-1:0] got[$];
    int exp_cycles;

    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        A[i][j] = DW'($urandom_range(0, 255));
        B[i][j] = DW'($urandom_range(0, 255));
      end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        C[i][j] = '0;
        for (int k = 0; k < N; k++) C[i][j] += A[i][k] * B[k][j];
      end

    mm = {
      pw(C_WAITMATW, M_VAL, 2, A_ACTIVATE, M_MEM, R_NOP, 0), // 0
      cw(C_START),                                          // 1
      cw(C_LOAD, M_VAL, N-1),                               // 2
      cw(C_STORE, M_MEM, VI),                               // 3
      cw(C_LOAD, M_VAL, N-1),                               // 4 row:
      cw(C_STORE, M_MEM, VJ),                               // 5
      cw(C_LOAD, M_MEM, VI),                                // 6 col:
      pw(C_LOAD, M_MEM, VJ, A_LOAD, M_CADDR, R_NOP, 0),     // 7 cells: acc = A[i][k]
      aw(A_MULT, M_CADDR, PB),                              // 8 cells: acc *= B[k][j]
      aw(A_NOP, M_MEM, 0, R_ADD),                           // 9 reduce: sum
      pw(C_REDINS, M_MEM, 0, A_IXLOAD, M_MEM, R_NOP, 0),    // 10 acc = C[i][j]
      cw(C_STORE, M_MEM, VT),                               // 11
      cw(C_LOAD, M_MEM, VJ),                                // 12
      aw(A_SUB, M_CVAL),                                    // 13 cells: index - j
      pw(C_LOAD, M_MEM, VT, A_WHEREZ, M_MEM, R_NOP, 0),     // 14 only cell j active
      pw(C_LOAD, M_MEM, VI, A_LOAD, M_CVAL, R_NOP, 0),      // 15 cell j: acc = C[i][j]
      aw(A_STORE, M_CADDR, CR),                             // 16 row CR + i
      pw(C_LOAD, M_MEM, VJ, A_ACTIVATE, M_MEM, R_NOP, 0),   // 17
      cw(C_BRZDEC, M_VAL, 21),                              // 18
      cw(C_STORE, M_MEM, VJ),                               // 19
      cw(C_JMP, M_VAL, 6),                                  // 20
      cw(C_LOAD, M_MEM, VI),                                // 21 rowend:
      cw(C_BRZDEC, M_VAL, 25),                              // 22
      cw(C_STORE, M_MEM, VI),                               // 23
      cw(C_JMP, M_VAL, 4),                                  // 24
      cw(C_STOP),                                           // 25 done:
      cw(C_RESREADY),                                       // 26
      cw(C_SETINT),                                         // 27
      cw(C_HALT)                                            // 28
    };

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    load_prog(0, mm);
    start(0);
    send(DTE_SEND_ARRAY); send(0); send(N); send(N);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) send(A[i][j]);
    send(DTE_SEND_ARRAY); send(PB); send(N); send(N);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) send(B[j][i]);
    send(DTE_GET_ARRAY); send(CR); send(N); send(N); send(1);

    get_words(N*N, got);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        check(got[i*N+j] == C[i][j],
              $sformatf("C[%0d][%0d] = %0d, expected %0d", i, j, got[i*N+j], C[i][j]));
    wait (!running);
    check(irq == 1'b1, "interrupt raised");
    exp_cycles = 2 + 2*N + N*(N-1)*(15 + 2*(L+1)) + (N-1)*(17 + 2*(L+1)) + (15 + 2*(L+1)) + 1;
    check(cycle_count == 32'(exp_cycles),
          $sformatf("cycle counter %0d, expected %0d", cycle_count, exp_cycles));
    $display("%0dx%0d matrix multiplication on %0d cells: %0d cycles", N, N, P, cycle_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

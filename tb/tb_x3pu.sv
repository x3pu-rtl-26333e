// tb_x3pu: end-to-end test of the X3PU at its default size (P = 128 cells,
// 16-bit words, 1024-word local memories), acting as the host.
//
// Phase 1, dense matrix multiplication C = A x B (N x N, N = 8): the host
// loads a program, starts it, and sends A (rows into array rows 0..N-1) and
// B transposed (rows into array rows PB..). The program waits for the two
// matrices (cWAITMATW), then for every (i, j) multiplies row i of A by row j
// of B^T in all cells, sums the products with the REDUCE tree, stores
// C[i][j] in controller memory, marks the result ready (cRESREADY) and
// raises the interrupt. The host's GET_MATRIX_CTRL waits for that result.
// Phase 2: a second program exercises the SCAN network (prefix sum and
// rotation), the activity flags (where / elsewhere), a max reduction, a
// sum reduction of the cell indices and three reductions kept in flight
// at once (results taken in order); the host reads the rows back with
// GET_MATRIX_ARRAY and the scalars with GET_MATRIX_CTRL.
// All expected values are computed here from the input data. The test also
// counts how often each mechanism occurred (waits of REDINS, WAITMATW,
// SCANLD and of a GET for a result, DataIn and DataOut back-pressure, row
// padding, inactive cells, taken branches) and fails for any that never
// did. Each REDINS after a reduction must wait exactly 2*(log2(P)+1)
// cycles, the round trip through the distribution and REDUCE trees.
module tb_x3pu;
  import x3pu_pkg::*;

  localparam int P   = 128;
  localparam int DW  = 16;
  localparam int L   = $clog2(P);
  localparam int N   = 8;
  localparam int PB  = 64;    // array row of B^T
  localparam int CB  = 0;     // controller address of C
  localparam int VI  = 1000;  // controller variables
  localparam int VJ  = 1001;
  localparam int PROG2 = 100;

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

  // ---------------- mechanism counters ----------------
  int n_wait_red = 0, n_wait_mat = 0, n_wait_scan = 0, n_wait_res = 0;
  int n_in_full = 0, n_pad = 0, n_inactive = 0, n_branch = 0, n_red = 0, n_scan = 0;
  int red_stall_run = 0, red_stall_bad = 0, red_stall_seen = 0;
  always @(posedge clk) if (rst_n) begin
    if (ctrl_stall && dut.u_ctrl.c.op == C_REDINS) n_wait_red++;
    if (ctrl_stall && dut.u_ctrl.c.op == C_WAITMATW) n_wait_mat++;
    if (ctrl_stall && dut.u_ctrl.a.op == A_SCANLD) n_wait_scan++;
    if (dut.u_dte.state == dut.u_dte.G_WAIT && dut.u_dte.p_wait[0] && dut.u_dte.res_count == 0) n_wait_res++;
    if (din_valid && !din_ready) n_in_full++;
    if (dut.u_dte.state == dut.u_dte.SA_CLR && dut.u_dte.ncols < P) n_pad++;
    if (dut.u_dte.state == dut.u_dte.SC_WR && dut.u_dte.col >= dut.u_dte.ncols) n_pad++;
    if (dut.active != '1) n_inactive++;
    if (dut.u_ctrl.exec && dut.u_ctrl.c.op == C_BRZDEC && dut.u_ctrl.acc_zero) n_branch++;
    if (dut.red_valid) n_red++;
    if (dut.scan_valid) n_scan++;
    // length of each REDINS wait
    if (ctrl_stall && dut.u_ctrl.c.op == C_REDINS) red_stall_run++;
    else if (red_stall_run != 0) begin
      red_stall_seen++;
      if (red_stall_run != 2*(L+1)) red_stall_bad++;
      red_stall_run = 0;
    end
  end

  // ---------------- data ----------------
  logic [DW-1:0] A [N][N];
  logic [DW-1:0] B [N][N];
  logic [DW-1:0] C [N][N];

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    prog_word_t mm[$], p2[$];
    logic [DW-1:0] got[$];
    logic [DW-1:0] exp_w;
    logic [DW-1:0] mx;
    int unsigned   sum;

    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        A[i][j] = DW'($urandom_range(0, 1000));
        B[i][j] = DW'($urandom_range(0, 1000));
      end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        C[i][j] = '0;
        for (int k = 0; k < N; k++) C[i][j] += A[i][k] * B[k][j];
      end

    // ---- phase 1 program: C = A x B ----
    mm = {
      pw(C_WAITMATW, M_VAL, 2, A_ACTIVATE, M_MEM, R_NOP, 0), // 0
      cw(C_START),                                          // 1
      cw(C_LOAD, M_VAL, N-1),                               // 2
      cw(C_STORE, M_MEM, VI),                               // 3
      cw(C_LOAD, M_VAL, N-1),                               // 4 row:
      cw(C_STORE, M_MEM, VJ),                               // 5
      cw(C_LOAD, M_MEM, VI),                                // 6 col:
      pw(C_MULT, M_VAL, P, A_LOAD, M_CADDR, R_NOP, 0),      // 7 cells: acc = A[i][k]
      cw(C_ADD, M_MEM, VJ),                                 // 8
      cw(C_ADD, M_VAL, CB),                                 // 9
      cw(C_ADDRLD),                                         // 10 caddr = CB + i*P + j
      cw(C_LOAD, M_MEM, VJ),                                // 11
      aw(A_MULT, M_CADDR, PB),                              // 12 cells: acc *= B[k][j]
      aw(A_NOP, M_MEM, 0, R_ADD),                           // 13 reduce: sum
      cw(C_REDINS),                                         // 14
      cw(C_STORE, M_REL, 0),                                // 15
      cw(C_LOAD, M_MEM, VJ),                                // 16
      cw(C_BRZDEC, M_VAL, 20),                              // 17
      cw(C_STORE, M_MEM, VJ),                               // 18
      cw(C_JMP, M_VAL, 6),                                  // 19
      cw(C_LOAD, M_MEM, VI),                                // 20 rowend:
      cw(C_BRZDEC, M_VAL, 24),                              // 21
      cw(C_STORE, M_MEM, VI),                               // 22
      cw(C_JMP, M_VAL, 4),                                  // 23
      cw(C_STOP),                                           // 24 done:
      cw(C_RESREADY),                                       // 25
      cw(C_SETINT),                                         // 26
      cw(C_HALT)                                            // 27
    };

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    load_prog(0, mm);
    start(0);
    repeat (20) @(posedge clk);
    check(running && ctrl_stall, "controller waits for the matrices");

    // SEND_MATRIX_ARRAY A, then B^T; then GET_MATRIX_CTRL C with wait
    send(DTE_SEND_ARRAY); send(0); send(N); send(N);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) send(A[i][j]);
    send(DTE_SEND_ARRAY); send(PB); send(N); send(N);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) send(B[j][i]);
    send(DTE_GET_CTRL); send(CB); send(N); send(N); send(1);

    get_words(N*N, got);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        check(got[i*N+j] == C[i][j],
              $sformatf("C[%0d][%0d] = %0d, expected %0d", i, j, got[i*N+j], C[i][j]));
    wait (!running);
    check(irq == 1'b1, "interrupt raised at the end of the multiplication");
    check(cycle_count > 32'(N*N*2*(L+1)), "cycle counter covers the waits for the reductions");
    $display("matrix multiplication %0dx%0d on %0d cells: %0d cycles", N, N, P, cycle_count);
    @(negedge clk) irq_ack = 1'b1;
    @(negedge clk) irq_ack = 1'b0;
    check(irq == 1'b0, "interrupt cleared by the host");
    check(red_stall_seen == N*N && red_stall_bad == 0,
          $sformatf("REDINS waits: %0d seen, %0d of wrong length", red_stall_seen, red_stall_bad));

    // ---- phase 2 program: scan, rotation, where/elsewhere, reductions ----
    p2 = {
      aw(A_ACTIVATE),                         // 0
      aw(A_LOAD, M_MEM, 0),                   // 1 acc = A[0][cell] (0 beyond N)
      aw(A_SCANADD),                          // 2
      aw(A_SCANLD),                           // 3
      aw(A_STORE, M_MEM, 300),                // 4 row 300: prefix sums
      aw(A_IXLOAD),                           // 5
      aw(A_ROTATE, M_VAL, 3),                 // 6
      aw(A_SCANLD),                           // 7
      aw(A_STORE, M_MEM, 301),                // 8 row 301: index rotated by 3
      aw(A_IXLOAD),                           // 9
      aw(A_AND, M_VAL, 1),                    // 10
      aw(A_WHEREZ),                           // 11 even cells
      aw(A_LOAD, M_VAL, 7),                   // 12
      aw(A_STORE, M_MEM, 302),                // 13
      aw(A_ELSEWHERE),                        // 14 odd cells
      aw(A_LOAD, M_VAL, 9),                   // 15
      aw(A_STORE, M_MEM, 302),                // 16 row 302: 7 even, 9 odd
      aw(A_ACTIVATE),                         // 17
      aw(A_LOAD, M_MEM, 0),                   // 18
      aw(A_NOP, M_MEM, 0, R_MAX),             // 19 max of row 0
      cw(C_REDINS),                           // 20
      cw(C_STORE, M_MEM, 500),                // 21
      aw(A_IXLOAD),                           // 22
      aw(A_NOP, M_MEM, 0, R_ADD),             // 23 sum of indices
      cw(C_REDINS),                           // 24
      cw(C_STORE, M_MEM, 501),                // 25
      aw(A_IXLOAD),                           // 26 three reductions in flight:
      aw(A_ADD, M_VAL, 1, R_ADD),             // 27 sum of index
      aw(A_ADD, M_VAL, 1, R_ADD),             // 28 sum of index + 1
      aw(A_NOP, M_MEM, 0, R_MAX),             // 29 max of index + 2
      cw(C_REDINS),                           // 30
      cw(C_STORE, M_MEM, 502),                // 31
      cw(C_REDINS),                           // 32
      cw(C_STORE, M_MEM, 503),                // 33
      cw(C_REDINS),                           // 34
      cw(C_STORE, M_MEM, 504),                // 35
      cw(C_RESREADY),                         // 36
      cw(C_HALT)                              // 37
    };
    load_prog(PROG2, p2);
    // ask for the rows first: the GET waits for the result
    send(DTE_GET_ARRAY); send(300); send(3); send(P); send(1);
    repeat (10) @(posedge clk);
    start(PROG2);
    get_words(3*P, got);
    sum = 0;
    for (int i = 0; i < P; i++) begin
      if (i < N) sum += A[0][i];
      check(got[i] == DW'(sum), $sformatf("prefix sum cell %0d: %0d", i, got[i]));
      check(got[P+i] == DW'((i+3) % P), $sformatf("rotation cell %0d: %0d", i, got[P+i]));
      exp_w = (i % 2 == 0) ? DW'(7) : DW'(9);
      check(got[2*P+i] == exp_w, $sformatf("where/elsewhere cell %0d: %0d", i, got[2*P+i]));
    end
    wait (!running);
    send(DTE_GET_CTRL); send(500); send(1); send(5); send(0);
    get_words(5, got);
    mx = '0;
    for (int i = 0; i < N; i++) if (A[0][i] > mx) mx = A[0][i];
    check(got[0] == mx, $sformatf("max reduction %0d, expected %0d", got[0], mx));
    check(got[1] == DW'(P*(P-1)/2), $sformatf("sum of indices %0d", got[1]));
    check(got[2] == DW'(P*(P-1)/2), $sformatf("queued reduction 1: %0d", got[2]));
    check(got[3] == DW'(P*(P-1)/2 + P), $sformatf("queued reduction 2: %0d", got[3]));
    check(got[4] == DW'(P + 1), $sformatf("queued reduction 3: %0d", got[4]));

    // ---- every mechanism must have happened ----
    check(n_wait_red  > 0, "REDINS waited for the REDUCE tree");
    check(n_wait_mat  > 0, "WAITMATW waited for matrices");
    check(n_wait_scan > 0, "SCANLD waited for the SCAN network");
    check(n_wait_res  > 0, "a GET waited for a ready result");
    check(n_in_full   > 0, "DataIn back-pressure");
    check(backpress_out > 0, "DataOut back-pressure");
    check(n_pad       > 0, "short lines padded");
    check(n_inactive  > 0, "inactive cells");
    check(n_branch    > 0, "taken branches");
    check(n_red == N*N + 5, $sformatf("reductions: %0d", n_red));
    check(n_scan == 2, $sformatf("scans: %0d", n_scan));
    $display("mechanisms: redins-wait=%0d waitmatw-wait=%0d scanld-wait=%0d get-wait=%0d din-full=%0d dout-hold=%0d pad=%0d inactive=%0d branch=%0d red=%0d scan=%0d",
             n_wait_red, n_wait_mat, n_wait_scan, n_wait_res, n_in_full, backpress_out,
             n_pad, n_inactive, n_branch, n_red, n_scan);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

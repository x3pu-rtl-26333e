// tb_x3pu_pool: a pooling workload at the default size (128 cells), acting
// as the host. An H x P image (one image row per array row, pixel c in cell
// c) is reduced by 2 x 2 sum pooling: for every output row i, the cells add
// image rows 2i and 2i+1, keep that sum, rotate it by one cell through the
// SCAN network so that each cell also receives its right neighbour's sum,
// and add the two. Cell c of output row i then holds the sum of the 2 x 2
// window whose top-left pixel is (2i, c); the even cells are the stride-2
// pooled image. The host checks every window (except the last cell, whose
// neighbour wraps around) against sums computed here, and the cycle counter
// against the count that follows from the program: 12 instruction pairs
// per output row plus the 2*(log2(P)+1)-cycle wait for the rotation.
module tb_x3pu_pool;
  import x3pu_pkg::*;

  localparam int P   = 128;
  localparam int DW  = 16;
  localparam int L   = $clog2(P);
  localparam int H   = 64;      // image rows
  localparam int OUT = 512;     // array row of the pooled image
  localparam int TMP = 1000;    // array scratch row
  localparam int VI  = 1000;    // controller variable

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

  logic [DW-1:0] img [H][P];

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    prog_word_t pp[$];
    logic [DW-1:0] got[$];
    logic [DW-1:0] e;
    int exp_cycles;

    for (int r = 0; r < H; r++)
      for (int c = 0; c < P; c++) img[r][c] = DW'($urandom_range(0, 255));

    pp = {
      pw(C_WAITMATW, M_VAL, 1, A_ACTIVATE, M_MEM, R_NOP, 0), // 0
      cw(C_START),                                          // 1
      cw(C_LOAD, M_VAL, H/2 - 1),                           // 2
      cw(C_STORE, M_MEM, VI),                               // 3
      cw(C_LOAD, M_MEM, VI),                                // 4 loop:
      cw(C_ADD, M_MEM, VI),                                 // 5 acc = 2i
      aw(A_LOAD, M_CADDR, 0),                               // 6 cells: row 2i
      aw(A_ADD, M_CADDR, 1),                                // 7 + row 2i+1
      aw(A_STORE, M_MEM, TMP),                              // 8
      aw(A_ROTATE, M_VAL, 1),                               // 9 right neighbour
      pw(C_LOAD, M_MEM, VI, A_SCANLD, M_MEM, R_NOP, 0),     // 10
      aw(A_ADD, M_MEM, TMP),                                // 11
      aw(A_STORE, M_CADDR, OUT),                            // 12 row OUT + i
      cw(C_BRZDEC, M_VAL, 16),                              // 13
      cw(C_STORE, M_MEM, VI),                               // 14
      cw(C_JMP, M_VAL, 4),                                  // 15
      cw(C_STOP),                                           // 16 done:
      cw(C_RESREADY),                                       // 17
      cw(C_HALT)                                            // 18
    };

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    load_prog(0, pp);
    start(0);
    send(DTE_SEND_ARRAY); send(0); send(H); send(P);
    for (int r = 0; r < H; r++) for (int c = 0; c < P; c++) send(img[r][c]);
    send(DTE_GET_ARRAY); send(OUT); send(H/2); send(P); send(1);

    get_words(H/2 * P, got);
    for (int i = 0; i < H/2; i++)
      for (int c = 0; c < P - 1; c++) begin
        e = img[2*i][c] + img[2*i][c+1] + img[2*i+1][c] + img[2*i+1][c+1];
        check(got[i*P + c] == e, $sformatf("window (%0d,%0d) = %0d, expected %0d", 2*i, c, got[i*P+c], e));
      end
    wait (!running);
    exp_cycles = 2 + (H/2 - 1) * (12 + 2*(L+1)) + (10 + 2*(L+1)) + 1;
    check(cycle_count == 32'(exp_cycles),
          $sformatf("cycle counter %0d, expected %0d", cycle_count, exp_cycles));
    $display("2x2 sum pooling of a %0dx%0d image: %0d cycles", H, P, cycle_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_map_cell: drives one cell with a long random instruction stream (all
// operations, all operand modes, random activity changes, scan results and
// DTE writes) and compares acc, active and the DTE read port every cycle
// with a reference model of the cell kept here.
module tb_map_cell;
  import x3pu_pkg::*;
  localparam int DW = 16, DEPTH = 16, AW = $clog2(DEPTH);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0]   index = 16'd5;
  arr_instr_t    instr = ARR_NOP;
  logic [DW-1:0] acc;
  logic          active;
  logic          scan_valid = 1'b0;
  logic [DW-1:0] scan_data = '0;
  logic          dte_we = 1'b0;
  logic [AW-1:0] dte_waddr = '0, dte_raddr = '0;
  logic [DW-1:0] dte_wdata = '0, dte_rdata;

  map_cell #(.DW(DW), .MEM_DEPTH(DEPTH), .IXW(16)) dut (.*);

  int checks = 0, failures = 0;
  // reference model
  logic [DW-1:0] m_mem [DEPTH];
  logic [DW-1:0] m_acc, m_scan;
  logic [AW-1:0] m_addr;
  logic          m_active;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_step();
    logic [AW-1:0] ea;
    logic [DW-1:0] op;
    logic [DW-1:0] nacc, nscan;
    logic [AW-1:0] naddr;
    logic          nact;
    ea = (instr.mode == M_REL) ? AW'(m_addr + instr.opnd[AW-1:0]) : instr.opnd[AW-1:0];
    op = (instr.mode == M_VAL) ? instr.opnd[DW-1:0] : m_mem[ea];
    nacc = m_acc; naddr = m_addr; nact = m_active; nscan = scan_valid ? scan_data : m_scan;
    case (instr.op)
      A_ACTIVATE:  nact = 1'b1;
      A_WHEREZ:    nact = m_active & (m_acc == 0);
      A_WHERENZ:   nact = m_active & (m_acc != 0);
      A_ELSEWHERE: nact = ~m_active;
      default: ;
    endcase
    if (m_active)
      case (instr.op)
        A_LOAD:   nacc = op;
        A_ADD:    nacc = m_acc + op;
        A_SUB:    nacc = m_acc - op;
        A_MULT:   nacc = DW'(m_acc * op);
        A_AND:    nacc = m_acc & op;
        A_OR:     nacc = m_acc | op;
        A_XOR:    nacc = m_acc ^ op;
        A_ADDRLD: naddr = m_acc[AW-1:0];
        A_IXLOAD: nacc = DW'(index);
        A_SCANLD: nacc = m_scan;
        default: ;
      endcase
    if (dte_we) m_mem[dte_waddr] = dte_wdata;
    if (m_active && instr.op == A_STORE && instr.mode != M_VAL) m_mem[ea] = m_acc;
    m_acc = nacc; m_addr = naddr; m_active = nact; m_scan = nscan;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    m_acc = '0; m_addr = '0; m_active = 1'b1; m_scan = '0;
    // fill the memory through the DTE port
    for (int a = 0; a < DEPTH; a++) begin
      dte_we = 1'b1; dte_waddr = AW'(a); dte_wdata = DW'($urandom);
      m_mem[a] = dte_wdata;
      @(negedge clk);
    end
    dte_we = 1'b0;
    for (int k = 0; k < 4000; k++) begin
      instr.op   = aop_e'($urandom_range(0, 19));
      if (k % 50 == 0) instr.op = A_ACTIVATE;
      instr.mode = mode_e'($urandom_range(0, 2));
      instr.red  = R_NOP;
      instr.opnd = XW'($urandom_range(0, 40));
      scan_valid = ($urandom_range(0, 7) == 0);
      scan_data  = DW'($urandom);
      dte_we     = ($urandom_range(0, 7) == 0);
      dte_waddr  = AW'($urandom);
      dte_wdata  = DW'($urandom);
      dte_raddr  = AW'($urandom);
      #1;
      checks++;
      if (dte_rdata != m_mem[dte_raddr]) begin failures++; $display("FAIL: dte read at %0d", k); end
      model_step();
      @(negedge clk);
      checks++;
      if (acc != m_acc || active != m_active) begin
        failures++;
        $display("FAIL: step %0d op %s: acc %0d/%0d active %0b/%0b", k, instr.op.name(), acc, m_acc, active, m_active);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

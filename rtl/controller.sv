// controller: the X3PU CONTROLLER.
//
// It holds the program memory (written by the host over the program port)
// and fetches one instruction pair per clock cycle. The left half runs on the
// controller's scalar machine (accumulator `acc`, address register, data
// memory); the right half is sent, with its operand resolved, to the
// distribution tree and from there to every cell of the MAP. So the array
// receives one instruction in each clock cycle, as the description states.
//
// Operands of the array half may come from the controller: M_CVAL sends the
// controller accumulator as the value, M_CADDR sends acc + imm as the
// address (the caload/cstore forms). The array half reads acc as it was at
// the start of the cycle, before the left half of the same pair changes it.
//
// The controller waits (issuing NOPs to the array and holding pc) when
//   - REDINS finds no reduction result waiting. Results returning from the
//     REDUCE tree queue in a FIFO (RFIFO_DEPTH words) and REDINS takes the
//     oldest, so a program may keep several reductions in flight and take
//     one result per cycle, as the main loop of the matrix program does,
//   - WAITMATW n finds fewer than n matrices written into the array by the
//     Data Transfer Engine since they were last consumed (cWAITMATW),
//   - the array half is SCANLD while a scan is still in the SCAN network.
// RESREADY pulses res_ready to the Data Transfer Engine (cRESREADY).
// START/STOP run the cycle counter and SETINT raises irq (START, STOP, INTRQ
// of the function library); the host clears irq with irq_ack.
//
// From the description: the two-column program, one array instruction per
// cycle, REDUCE results returning to the controller, the wait-for-matrices
// and result-ready handshakes with the Data Transfer Engine, the cycle
// counter and the interrupt, the branch-and-decrement loop instructions.
// This implementation's choices: the encoding (x3pu_pkg), the accumulator
// machine, the memory sizes, asynchronous memory reads, no branch delay slot,
// and that a controller store wins over a DTE write to the same word.
//
// Timing: program and data memories are read combinationally, so an
// instruction pair takes one cycle unless it waits. A `run` pulse starts
// execution at run_addr in the next cycle; HALT stops it.
module controller
  import x3pu_pkg::*;
#(
  parameter int unsigned DW         = 16,
  parameter int unsigned CMEM_DEPTH = 1024,
  parameter int unsigned PROG_DEPTH = 1024,
  parameter int unsigned CNTW       = 32,
  parameter int unsigned RFIFO_DEPTH = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // program port from the host
  input  logic                          prog_we,
  input  logic [$clog2(PROG_DEPTH)-1:0] prog_addr,
  input  prog_word_t                    prog_data,
  input  logic                          run,
  input  logic [$clog2(PROG_DEPTH)-1:0] run_addr,
  output logic                          running,
  // to the distribution tree
  output arr_instr_t                    instr_o,
  // from the REDUCE and SCAN networks
  input  logic                          red_valid,
  input  logic [DW-1:0]                 red_data,
  input  logic                          scan_done,
  // Data Transfer Engine handshakes
  input  logic                          mat_written,
  output logic                          res_ready,
  // Data Transfer Engine port on the data memory
  input  logic                          dte_we,
  input  logic [$clog2(CMEM_DEPTH)-1:0] dte_waddr,
  input  logic [DW-1:0]                 dte_wdata,
  input  logic [$clog2(CMEM_DEPTH)-1:0] dte_raddr,
  output logic [DW-1:0]                 dte_rdata,
  // to the host
  output logic                          irq,
  input  logic                          irq_ack,
  output logic [CNTW-1:0]               cycle_count,
  // status, for observation
  output logic                          stall
);
  localparam int unsigned PAW = $clog2(PROG_DEPTH);
  localparam int unsigned CAW = $clog2(CMEM_DEPTH);

  prog_word_t     pmem [PROG_DEPTH];
  logic [DW-1:0]  cmem [CMEM_DEPTH];

  logic [PAW-1:0] pc;
  logic [DW-1:0]  acc;
  logic [CAW-1:0] caddr;
  logic           rf_valid;
  logic [DW-1:0]  rf_data;
  logic [$clog2(RFIFO_DEPTH):0] rf_count;
  logic [15:0]    mat_count;
  logic [7:0]     scan_outst;
  logic           cnt_run;

  prog_word_t     w;
  ctrl_field_t    c;
  arr_field_t     a;
  logic [DW-1:0]  c_imm;
  logic [XW-1:0]  a_imm;
  logic [CAW-1:0] c_ea;
  logic [DW-1:0]  c_opnd;
  logic           exec;
  logic           acc_zero;
  logic           scan_issue, mat_take;
  arr_instr_t     issue;

  assign w        = pmem[pc];
  assign c        = w.c;
  assign a        = w.a;
  assign c_imm    = DW'(signed'(c.imm));
  assign a_imm    = XW'(signed'(a.imm));
  assign c_ea     = (c.mode == M_REL) ? caddr + c.imm[CAW-1:0] : c.imm[CAW-1:0];
  assign c_opnd   = (c.mode == M_VAL) ? c_imm : cmem[c_ea];
  assign acc_zero = (acc == '0);

  always_comb begin
    stall = 1'b0;
    if (c.op == C_REDINS   && !rf_valid)               stall = 1'b1;
    if (c.op == C_WAITMATW && mat_count < 16'(c.imm))  stall = 1'b1;
    if (a.op == A_SCANLD   && scan_outst != '0)        stall = 1'b1;
    stall = stall && running;
  end
  assign exec = running && !stall;

  // Resolve the array half's operand.
  always_comb begin
    issue.op   = a.op;
    issue.red  = a.red;
    issue.mode = a.mode;
    issue.opnd = a_imm;
    case (a.mode)
      M_CVAL:  begin issue.mode = M_VAL; issue.opnd = XW'(acc); end
      M_CADDR: begin issue.mode = M_MEM; issue.opnd = XW'(acc) + a_imm; end
      default: ;
    endcase
    if (!exec) issue = ARR_NOP;
  end
  assign instr_o    = issue;
  assign scan_issue = exec && is_scan_op(a.op);
  assign mat_take   = exec && c.op == C_WAITMATW;
  assign res_ready  = exec && c.op == C_RESREADY;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc          <= '0;
      acc         <= '0;
      caddr       <= '0;
      running     <= 1'b0;
      mat_count   <= '0;
      scan_outst  <= '0;
      irq         <= 1'b0;
      cnt_run     <= 1'b0;
      cycle_count <= '0;
    end else begin
      scan_outst <= scan_outst + 8'(scan_issue) - 8'(scan_done);
      mat_count  <= mat_count + 16'(mat_written) - (mat_take ? 16'(c.imm) : 16'd0);
      if (irq_ack) irq <= 1'b0;
      if (cnt_run) cycle_count <= cycle_count + 1'b1;

      if (run && !running) begin
        running <= 1'b1;
        pc      <= run_addr;
      end else if (exec) begin
        pc <= pc + 1'b1;
        case (c.op)
          C_LOAD:    acc   <= c_opnd;
          C_ADD:     acc   <= acc + c_opnd;
          C_SUB:     acc   <= acc - c_opnd;
          C_MULT:    acc   <= acc * c_opnd;
          C_AND:     acc   <= acc & c_opnd;
          C_OR:      acc   <= acc | c_opnd;
          C_XOR:     acc   <= acc ^ c_opnd;
          C_ADDRLD:  caddr <= acc[CAW-1:0];
          C_JMP:     pc    <= c.imm[PAW-1:0];
          C_BRZ:     if (acc_zero) pc <= c.imm[PAW-1:0];
          C_BRNZ:    if (!acc_zero) pc <= c.imm[PAW-1:0];
          C_BRZDEC:  if (acc_zero) pc <= c.imm[PAW-1:0];
                     else acc <= acc - 1'b1;
          C_BRNZDEC: if (!acc_zero) begin
                       acc <= acc - 1'b1;
                       pc  <= c.imm[PAW-1:0];
                     end
          C_REDINS:  acc <= rf_data;
          C_SETINT:  irq <= 1'b1;
          C_START:   begin cnt_run <= 1'b1; cycle_count <= '0; end
          C_STOP:    cnt_run <= 1'b0;
          C_CNTLOAD: acc <= DW'(cycle_count);
          C_HALT:    running <= 1'b0;
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (prog_we) pmem[prog_addr] <= prog_data;
  end

  always_ff @(posedge clk) begin
    if (dte_we) cmem[dte_waddr] <= dte_wdata;
    if (exec && c.op == C_STORE && c.mode != M_VAL) cmem[c_ea] <= acc;
  end

  assign dte_rdata = cmem[dte_raddr];

  // Reduction results waiting for REDINS.
  sync_fifo #(.W(DW), .DEPTH(RFIFO_DEPTH)) u_red_fifo (
    .clk, .rst_n,
    .wr_valid (red_valid),
    .wr_ready (),
    .wr_data  (red_data),
    .rd_valid (rf_valid),
    .rd_ready (exec && c.op == C_REDINS),
    .rd_data  (rf_data),
    .count    (rf_count)
  );

  // A program must not leave more reductions unread than the FIFO holds.
  a_red_fifo: assert property (@(posedge clk) disable iff (!rst_n)
    red_valid |-> rf_count < ($clog2(RFIFO_DEPTH)+1)'(RFIFO_DEPTH));

endmodule

// map_cell: one cell of the MAP, a local data memory and an execution unit.
//
// Each cell executes, in the cycle it arrives from its leaf of the
// distribution tree, the array instruction that every other cell receives
// in the same cycle (SIMD). State: an accumulator `acc`, an address register
// `addr` used by the relative mode (rload/rstore), an activity flag `active`
// and a scan register that receives this cell's element of each SCAN result.
// Only active cells execute arithmetic, loads and stores; the activity
// operations (activate, where, elsewhere) act on every cell. The local memory
// has a second port, owned by the Data Transfer Engine, that moves whole
// rows between the host and the array.
//
// What follows the description: a cell per MAP position, each with a data
// memory and an execution unit, instructions executed only in active cells,
// parameterised word size and memory size. This implementation's choices:
// the accumulator architecture, the operand modes, the activity operations,
// asynchronous memory reads (one instruction per cycle with no hazards),
// and that an array store wins over a DTE write to the same word.
//
// Timing: operands are read combinationally; acc, addr, active, the scan
// register and the memory are updated at the end of the cycle in which the
// instruction is present. `acc` and `active` are registered outputs, read by
// the REDUCE and SCAN networks. Reset clears acc, addr and the scan register
// and makes the cell active; the memory is not reset.
module map_cell
  import x3pu_pkg::*;
#(
  parameter int unsigned DW        = 16,
  parameter int unsigned MEM_DEPTH = 1024,
  parameter int unsigned IXW       = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [IXW-1:0]               index,     // position of this cell
  input  arr_instr_t                   instr,
  output logic [DW-1:0]                acc,
  output logic                         active,
  // SCAN network result for this cell
  input  logic                         scan_valid,
  input  logic [DW-1:0]                scan_data,
  // Data Transfer Engine port
  input  logic                         dte_we,
  input  logic [$clog2(MEM_DEPTH)-1:0] dte_waddr,
  input  logic [DW-1:0]                dte_wdata,
  input  logic [$clog2(MEM_DEPTH)-1:0] dte_raddr,
  output logic [DW-1:0]                dte_rdata
);
  localparam int unsigned AW = $clog2(MEM_DEPTH);

  logic [DW-1:0] mem [MEM_DEPTH];
  logic [AW-1:0] addr;
  logic [DW-1:0] scan_reg;

  logic [AW-1:0] ea;
  logic [DW-1:0] opnd;
  logic          st_en;

  always_comb begin
    ea = (instr.mode == M_REL) ? addr + instr.opnd[AW-1:0] : instr.opnd[AW-1:0];
    opnd = (instr.mode == M_VAL) ? instr.opnd[DW-1:0] : mem[ea];
    st_en = active && instr.op == A_STORE && instr.mode != M_VAL;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc      <= '0;
      addr     <= '0;
      active   <= 1'b1;
      scan_reg <= '0;
    end else begin
      if (scan_valid) scan_reg <= scan_data;
      case (instr.op)
        A_ACTIVATE:  active <= 1'b1;
        A_WHEREZ:    active <= active && (acc == '0);
        A_WHERENZ:   active <= active && (acc != '0);
        A_ELSEWHERE: active <= !active;
        default: ;
      endcase
      if (active) begin
        case (instr.op)
          A_LOAD:   acc  <= opnd;
          A_ADD:    acc  <= acc + opnd;
          A_SUB:    acc  <= acc - opnd;
          A_MULT:   acc  <= acc * opnd;
          A_AND:    acc  <= acc & opnd;
          A_OR:     acc  <= acc | opnd;
          A_XOR:    acc  <= acc ^ opnd;
          A_ADDRLD: addr <= acc[AW-1:0];
          A_IXLOAD: acc  <= DW'(index);
          A_SCANLD: acc  <= scan_reg;
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (dte_we) mem[dte_waddr] <= dte_wdata;
    if (st_en)  mem[ea]        <= acc;
  end

  assign dte_rdata = mem[dte_raddr];

endmodule

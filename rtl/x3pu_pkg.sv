// x3pu_pkg: types and constants shared by the X3PU blocks.
//
// The X3PU is a SIMD accelerator: a controller issues one instruction pair per
// clock cycle. The left half of the pair runs on the controller's own scalar
// accumulator; the right half is broadcast through a pipelined fan-out tree to
// p cells (the MAP), each holding an accumulator and a local data memory.
// A log-depth REDUCE tree returns a scalar to the controller and a log-depth
// SCAN network returns a vector to the cells.
//
// The two-column program layout, the mnemonics (vload, vadd, load, store,
// addrld, rload, rstore, mult, caload, cstore, brzdec, brnzdec, jmp, redins,
// activate, setint) and the host commands come from the design description;
// the binary encoding below, the operand modes and the activity (where/
// elsewhere) operations are this implementation's own choices.
//
// Program word (64 bits) = {ctrl_field_t, arr_field_t}, each 32 bits:
//   [31:27] opcode  [26:24] operand mode  [23:22] reduce function (array half
//   only, zero in the controller half)  [21:16] reserved  [15:0] immediate.
// Immediates are sign-extended to the data width.
package x3pu_pkg;

  // Width of the operand field carried to the cells. Data widths up to this
  // value are supported.
  localparam int unsigned XW = 32;
  localparam int unsigned IMM_W = 16;

  // Operand modes.
  //   M_MEM   operand = mem[imm]
  //   M_VAL   operand = imm                        ('v' prefix: vload, vadd)
  //   M_REL   operand = mem[addr_reg + imm]        ('r' prefix: rload, rstore)
  //   M_CVAL  operand = controller accumulator     (array half only)
  //   M_CADDR operand = mem[controller acc + imm]  (array half only: caload, cstore)
  // The controller resolves M_CVAL to M_VAL and M_CADDR to M_MEM before it
  // issues an array instruction, so cells only ever see M_MEM, M_VAL, M_REL.
  typedef enum logic [2:0] {
    M_MEM   = 3'd0,
    M_VAL   = 3'd1,
    M_REL   = 3'd2,
    M_CVAL  = 3'd3,
    M_CADDR = 3'd4
  } mode_e;

  // Reduction function attached to an array instruction. The REDUCE tree
  // takes the active cells' accumulators as they stand when the instruction
  // reaches the cells (before it executes).
  typedef enum logic [1:0] {
    R_NOP = 2'd0,
    R_ADD = 2'd1,
    R_MIN = 2'd2,
    R_MAX = 2'd3
  } red_e;

  // Scan functions (SCAN network).
  typedef enum logic [1:0] {
    S_ADD = 2'd0,   // inclusive prefix sum over active cells
    S_MIN = 2'd1,   // inclusive prefix minimum
    S_MAX = 2'd2,   // inclusive prefix maximum
    S_ROT = 2'd3    // rotation: out[i] = in[(i + amount) mod p]
  } scan_e;

  // Array (cell) operations.
  typedef enum logic [4:0] {
    A_NOP       = 5'd0,
    A_LOAD      = 5'd1,   // acc <= operand
    A_STORE     = 5'd2,   // mem[ea] <= acc        (M_MEM or M_REL)
    A_ADD       = 5'd3,   // acc <= acc + operand
    A_SUB       = 5'd4,   // acc <= acc - operand
    A_MULT      = 5'd5,   // acc <= low half of acc * operand
    A_AND       = 5'd6,
    A_OR        = 5'd7,
    A_XOR       = 5'd8,
    A_ADDRLD    = 5'd9,   // addr_reg <= acc
    A_IXLOAD    = 5'd10,  // acc <= index of the cell
    A_ACTIVATE  = 5'd11,  // every cell becomes active
    A_WHEREZ    = 5'd12,  // active <= active & (acc == 0)
    A_WHERENZ   = 5'd13,  // active <= active & (acc != 0)
    A_ELSEWHERE = 5'd14,  // active <= ~active
    A_SCANADD   = 5'd15,  // send acc into the SCAN network (prefix sum)
    A_SCANMIN   = 5'd16,
    A_SCANMAX   = 5'd17,
    A_ROTATE    = 5'd18,  // rotation by operand
    A_SCANLD    = 5'd19   // acc <= scan register
  } aop_e;

  // Controller operations.
  typedef enum logic [4:0] {
    C_NOP      = 5'd0,
    C_LOAD     = 5'd1,   // acc <= operand
    C_STORE    = 5'd2,   // cmem[ea] <= acc
    C_ADD      = 5'd3,
    C_SUB      = 5'd4,
    C_MULT     = 5'd5,
    C_AND      = 5'd6,
    C_OR       = 5'd7,
    C_XOR      = 5'd8,
    C_ADDRLD   = 5'd9,   // addr_reg <= acc
    C_JMP      = 5'd10,  // pc <= imm
    C_BRZ      = 5'd11,  // if acc == 0: pc <= imm
    C_BRNZ     = 5'd12,  // if acc != 0: pc <= imm
    C_BRZDEC   = 5'd13,  // if acc == 0: pc <= imm, else acc <= acc - 1
    C_BRNZDEC  = 5'd14,  // if acc != 0: acc <= acc - 1, pc <= imm
    C_REDINS   = 5'd15,  // acc <= last reduction result (waits for it)
    C_WAITMATW = 5'd16,  // wait until imm matrices were written by the DTE
    C_RESREADY = 5'd17,  // tell the DTE that a result is ready
    C_SETINT   = 5'd18,  // raise the interrupt to the host
    C_START    = 5'd19,  // clear and start the cycle counter
    C_STOP     = 5'd20,  // stop the cycle counter
    C_CNTLOAD  = 5'd21,  // acc <= cycle counter
    C_HALT     = 5'd22   // stop fetching
  } cop_e;

  typedef struct packed {
    cop_e               op;
    mode_e              mode;
    logic [7:0]         rsvd;
    logic [IMM_W-1:0]   imm;
  } ctrl_field_t;

  typedef struct packed {
    aop_e               op;
    mode_e              mode;
    red_e               red;
    logic [5:0]         rsvd;
    logic [IMM_W-1:0]   imm;
  } arr_field_t;

  typedef struct packed {
    ctrl_field_t c;
    arr_field_t  a;
  } prog_word_t;

  // Array instruction as issued by the controller and carried by the
  // distribution tree: operand already resolved to a value or an address.
  typedef struct packed {
    aop_e            op;
    mode_e           mode;   // M_MEM, M_VAL or M_REL only
    red_e            red;
    logic [XW-1:0]   opnd;
  } arr_instr_t;

  localparam arr_instr_t ARR_NOP = '{op: A_NOP, mode: M_MEM, red: R_NOP, opnd: '0};

  // Data Transfer Engine command codes (first word of a command on DataIn).
  localparam logic [3:0] DTE_SEND_ARRAY = 4'd0;
  localparam logic [3:0] DTE_GET_ARRAY  = 4'd1;
  localparam logic [3:0] DTE_SEND_CTRL  = 4'd2;
  localparam logic [3:0] DTE_GET_CTRL   = 4'd3;

  function automatic logic is_scan_op(aop_e op);
    return op inside {A_SCANADD, A_SCANMIN, A_SCANMAX, A_ROTATE};
  endfunction

  function automatic scan_e scan_fn(aop_e op);
    case (op)
      A_SCANMIN: return S_MIN;
      A_SCANMAX: return S_MAX;
      A_ROTATE:  return S_ROT;
      default:   return S_ADD;
    endcase
  endfunction

endpackage

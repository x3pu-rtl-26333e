// dte: Data Transfer Engine.
//
// It moves matrices between the host and the X3PU memories. The host sends
// on DataIn a command word followed by its parameters and, for a SEND, by
// the data, line by line:
//   SEND_MATRIX_ARRAY addr lines cols  data...  -> line l into row addr+l of
//                                                   the MAP (element j in cell j)
//   GET_MATRIX_ARRAY  addr lines cols wait      -> rows addr.. to the output
//   SEND_MATRIX_CTRL  addr lines cols  data...  -> line l into controller
//                                                   words addr + l*P + j
//   GET_MATRIX_CTRL   addr lines cols wait      -> those words to the output
// A line shorter than P cells is padded with zeros when written, and only
// its `cols` words are shifted out when read. After every SEND_MATRIX_ARRAY
// the engine pulses mat_written (counted by the controller for cWAITMATW).
// A GET with wait = 1 first waits for a result marked ready by the
// controller (res_ready pulses, cRESREADY) and consumes one.
//
// From the description: the four commands, their parameters, the zero
// padding, the shortened read-out, the wait for a ready result, the output
// FIFO. This implementation's choices: the command codes (low 4 bits of the
// first word, x3pu_pkg), one word per DataIn transfer, the line buffer of P
// words that gathers or spreads an array line, controller lines laid out
// with a stride of P words, cols above P taken as P, a count of zero lines
// doing nothing, and that a SEND_MATRIX_CTRL does not count as a written
// matrix (the description speaks of matrices in the Array's memory).
//
// Timing: one DataIn word per cycle; an array line costs one extra cycle to
// clear the line buffer and one to write the row; a controller line takes P
// cycles (one word, real or padding, per cycle). Reads: one cycle per array
// row, then one output word per cycle while out_ready is high.
module dte
  import x3pu_pkg::*;
#(
  parameter int unsigned P          = 128,
  parameter int unsigned DW         = 16,
  parameter int unsigned MEM_DEPTH  = 1024,
  parameter int unsigned CMEM_DEPTH = 1024
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // command / data input
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [DW-1:0]                 in_data,
  // to the Data Output FIFO
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic [DW-1:0]                 out_data,
  // row port of the MAP
  output logic                          arr_we,
  output logic [$clog2(MEM_DEPTH)-1:0]  arr_waddr,
  output logic [DW-1:0]                 arr_wdata [P],
  output logic [$clog2(MEM_DEPTH)-1:0]  arr_raddr,
  input  logic [DW-1:0]                 arr_rdata [P],
  // controller data memory port
  output logic                          ctl_we,
  output logic [$clog2(CMEM_DEPTH)-1:0] ctl_waddr,
  output logic [DW-1:0]                 ctl_wdata,
  output logic [$clog2(CMEM_DEPTH)-1:0] ctl_raddr,
  input  logic [DW-1:0]                 ctl_rdata,
  // handshakes with the controller
  output logic                          mat_written,
  input  logic                          res_ready,
  output logic                          busy
);
  localparam int unsigned AW  = $clog2(MEM_DEPTH);
  localparam int unsigned CAW = $clog2(CMEM_DEPTH);
  localparam int unsigned CW  = $clog2(P) + 1;

  typedef enum logic [3:0] {
    IDLE, PARAM, SA_CLR, SA_RX, SA_WR, SC_WR, G_WAIT, GA_RD, GA_OUT, GC_OUT
  } state_e;

  state_e         state;
  logic [3:0]     cmd;
  logic [2:0]     pidx;
  logic [DW-1:0]  p_addr, p_lines, p_cols, p_wait;
  logic [DW-1:0]  ln;
  logic [CW-1:0]  col, ncols;
  logic [DW-1:0]  linebuf [P];
  logic [15:0]    res_count;
  logic           res_take;
  logic [CAW-1:0] ctl_addr;
  logic           last_col, last_line;

  assign ncols     = (p_cols > DW'(P)) ? CW'(P) : CW'(p_cols);
  assign last_col  = (col == ncols - 1'b1);
  assign last_line = (ln == p_lines - 1'b1);
  assign ctl_addr  = CAW'(p_addr) + CAW'(ln) * CAW'(P) + CAW'(col);

  always_comb begin
    in_ready  = 1'b0;
    out_valid = 1'b0;
    out_data  = '0;
    arr_we    = 1'b0;
    ctl_we    = 1'b0;
    ctl_wdata = '0;
    res_take  = 1'b0;
    case (state)
      IDLE, PARAM: in_ready = 1'b1;
      SA_RX:       in_ready = 1'b1;
      SA_WR:       arr_we   = 1'b1;
      SC_WR: begin
        if (col < ncols) begin
          in_ready  = 1'b1;
          ctl_we    = in_valid;
          ctl_wdata = in_data;
        end else begin
          ctl_we    = 1'b1;
        end
      end
      G_WAIT:      res_take = (p_wait[0] && res_count != '0);
      GA_OUT: begin
        out_valid = 1'b1;
        out_data  = linebuf[col[CW-2:0]];
      end
      GC_OUT: begin
        out_valid = 1'b1;
        out_data  = ctl_rdata;
      end
      default: ;
    endcase
  end

  assign arr_waddr = AW'(p_addr) + AW'(ln);
  assign arr_raddr = AW'(p_addr) + AW'(ln);
  assign arr_wdata = linebuf;
  assign ctl_waddr = ctl_addr;
  assign ctl_raddr = ctl_addr;
  assign busy      = (state != IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= IDLE;
      cmd         <= '0;
      pidx        <= '0;
      p_addr      <= '0;
      p_lines     <= '0;
      p_cols      <= '0;
      p_wait      <= '0;
      ln          <= '0;
      col         <= '0;
      res_count   <= '0;
      mat_written <= 1'b0;
      for (int i = 0; i < P; i++) linebuf[i] <= '0;
    end else begin
      mat_written <= 1'b0;
      res_count   <= res_count + 16'(res_ready) - 16'(res_take);
      case (state)
        IDLE: if (in_valid) begin
          cmd   <= in_data[3:0];
          pidx  <= '0;
          state <= PARAM;
        end
        PARAM: if (in_valid) begin
          pidx <= pidx + 1'b1;
          case (pidx)
            3'd0: p_addr  <= in_data;
            3'd1: p_lines <= in_data;
            3'd2: p_cols  <= in_data;
            default: p_wait <= in_data;
          endcase
          ln  <= '0;
          col <= '0;
          if (pidx == 3'd2 && (cmd == DTE_SEND_ARRAY || cmd == DTE_SEND_CTRL)) begin
            p_wait <= '0;
            state <= (cmd == DTE_SEND_ARRAY) ? SA_CLR : SC_WR;
            if (p_lines == '0) state <= IDLE;
          end else if (pidx == 3'd3) begin
            state <= (p_lines == '0) ? IDLE : G_WAIT;
          end else if (pidx == 3'd2 && cmd > DTE_GET_CTRL) begin
            state <= IDLE;   // unknown command: parameters dropped
          end
        end
        SA_CLR: begin
          for (int i = 0; i < P; i++) linebuf[i] <= '0;
          col   <= '0;
          state <= (ncols == '0) ? SA_WR : SA_RX;
        end
        SA_RX: if (in_valid) begin
          linebuf[col[CW-2:0]] <= in_data;
          col <= col + 1'b1;
          if (last_col) state <= SA_WR;
        end
        SA_WR: begin
          ln <= ln + 1'b1;
          if (last_line) begin
            mat_written <= 1'b1;
            state       <= IDLE;
          end else begin
            state <= SA_CLR;
          end
        end
        SC_WR: if (col >= ncols || in_valid) begin
          if (col == CW'(P - 1)) begin
            col <= '0;
            ln  <= ln + 1'b1;
            if (last_line) state <= IDLE;
          end else begin
            col <= col + 1'b1;
          end
        end
        G_WAIT: if (!p_wait[0] || res_count != '0) begin
          col   <= '0;
          state <= (ncols == '0) ? IDLE : (cmd == DTE_GET_ARRAY) ? GA_RD : GC_OUT;
        end
        GA_RD: begin
          linebuf <= arr_rdata;
          col     <= '0;
          state   <= GA_OUT;
        end
        GA_OUT: if (out_ready) begin
          col <= col + 1'b1;
          if (last_col) begin
            col <= '0;
            ln  <= ln + 1'b1;
            state <= last_line ? IDLE : GA_RD;
          end
        end
        GC_OUT: if (out_ready) begin
          col <= col + 1'b1;
          if (last_col) begin
            col <= '0;
            ln  <= ln + 1'b1;
            if (last_line) state <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule

// x3pu: top of the X3PU accelerator.
//
// A host loads a program (program port), streams commands and matrices in
// (DataIn) and reads results back (DataOut), as in the heterogeneous system
// the accelerator belongs to. Inside, the CONTROLLER issues one instruction
// pair per cycle; the array half travels down the log-depth DISTRIBUTE tree
// to the P cells of the MAP; the cells' accumulators feed the log-depth
// REDUCE tree (a scalar back to the controller) and the log-depth SCAN
// network (a vector back to the cells). The Data Transfer Engine (DTE) moves
// matrices between DataIn/DataOut and the memories of the MAP and of the
// controller; the DataIn words pass through an input FIFO and the results
// leave through the Data Output FIFO.
//
// The block structure and the parameters (word size DW, local memory size
// MEM_DEPTH, number of cells P) follow the description; P = 128 is its FPGA
// prototype and DW = 16 the word of its silicon versions. Memory sizes of
// the controller, FIFO depths and all encodings are this implementation's
// choices (see x3pu_pkg and the sub-blocks).
//
// RESREADY reaches the DTE log2(P)+1 cycles after the controller executes
// it, when the array instructions issued before it have reached the cells
// and executed; so a GET that waits for the result reads finished data.
//
// Latencies: an array instruction reaches the cells log2(P)+1 cycles after
// the controller issues it; a reduction result reaches the controller
// log2(P)+1 cycles after the instruction reaches the cells, and a scan
// result reaches the cells after the same delay.
module x3pu
  import x3pu_pkg::*;
#(
  parameter int unsigned P          = 128,
  parameter int unsigned DW         = 16,
  parameter int unsigned MEM_DEPTH  = 1024,
  parameter int unsigned CMEM_DEPTH = 1024,
  parameter int unsigned PROG_DEPTH = 1024,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // program
  input  logic                          prog_we,
  input  logic [$clog2(PROG_DEPTH)-1:0] prog_addr,
  input  prog_word_t                    prog_data,
  input  logic                          run,
  input  logic [$clog2(PROG_DEPTH)-1:0] run_addr,
  output logic                          running,
  // DataIn
  input  logic                          din_valid,
  output logic                          din_ready,
  input  logic [DW-1:0]                 din_data,
  // DataOut
  output logic                          dout_valid,
  input  logic                          dout_ready,
  output logic [DW-1:0]                 dout_data,
  // interrupt and cycle counter
  output logic                          irq,
  input  logic                          irq_ack,
  output logic [31:0]                   cycle_count,
  // status
  output logic                          ctrl_stall,
  output logic                          dte_busy
);
  localparam int unsigned L   = $clog2(P);
  localparam int unsigned AW  = $clog2(MEM_DEPTH);
  localparam int unsigned CAW = $clog2(CMEM_DEPTH);

  // controller <-> networks
  arr_instr_t     ctl_instr;
  arr_instr_t     leaf [P];
  logic [DW-1:0]  acc  [P];
  logic [P-1:0]   active;
  logic           red_valid;
  logic [DW-1:0]  red_data;
  logic           scan_valid;
  logic [DW-1:0]  scan_data [P];

  // DTE
  logic           fin_valid, fin_ready;
  logic [DW-1:0]  fin_data;
  logic           fout_valid, fout_ready;
  logic [DW-1:0]  fout_data;
  logic           row_we;
  logic [AW-1:0]  row_waddr, row_raddr;
  logic [DW-1:0]  row_wdata [P];
  logic [DW-1:0]  row_rdata [P];
  logic           cm_we;
  logic [CAW-1:0] cm_waddr, cm_raddr;
  logic [DW-1:0]  cm_wdata, cm_rdata;
  logic           mat_written, res_ready, res_ready_cells;
  logic [L:0]     res_pipe;

  controller #(.DW(DW), .CMEM_DEPTH(CMEM_DEPTH), .PROG_DEPTH(PROG_DEPTH)) u_ctrl (
    .clk, .rst_n,
    .prog_we, .prog_addr, .prog_data, .run, .run_addr, .running,
    .instr_o    (ctl_instr),
    .red_valid, .red_data,
    .scan_done  (scan_valid),
    .mat_written, .res_ready,
    .dte_we     (cm_we),
    .dte_waddr  (cm_waddr),
    .dte_wdata  (cm_wdata),
    .dte_raddr  (cm_raddr),
    .dte_rdata  (cm_rdata),
    .irq, .irq_ack, .cycle_count,
    .stall      (ctrl_stall)
  );

  distribute_net #(.P(P)) u_dist (
    .clk, .rst_n,
    .in  (ctl_instr),
    .out (leaf)
  );

  map_array #(.P(P), .DW(DW), .MEM_DEPTH(MEM_DEPTH)) u_map (
    .clk, .rst_n,
    .instr      (leaf),
    .acc, .active,
    .scan_valid,
    .scan_data,
    .row_we, .row_waddr, .row_wdata, .row_raddr, .row_rdata
  );

  // Every leaf carries the same instruction; leaf 0 tells the networks
  // which function to apply.
  reduce_net #(.P(P), .DW(DW)) u_reduce (
    .clk, .rst_n,
    .in_valid  (leaf[0].red != R_NOP),
    .op        (leaf[0].red),
    .vec       (acc),
    .mask      (active),
    .out_valid (red_valid),
    .out       (red_data)
  );

  scan_net #(.P(P), .DW(DW)) u_scan (
    .clk, .rst_n,
    .in_valid  (is_scan_op(leaf[0].op)),
    .op        (scan_fn(leaf[0].op)),
    .amount    (leaf[0].opnd[L-1:0]),
    .vec       (acc),
    .mask      (active),
    .out_valid (scan_valid),
    .out       (scan_data)
  );

  // A result marked ready by the controller is ready only once every array
  // instruction issued before RESREADY has left the distribution tree, so
  // the mark travels to the DTE with the same delay, log2(P)+1 cycles.
  always_ff @(posedge clk) begin
    if (!rst_n) res_pipe <= '0;
    else        res_pipe <= {res_pipe[L-1:0], res_ready};
  end
  assign res_ready_cells = res_pipe[L];

  sync_fifo #(.W(DW), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .wr_valid (din_valid),  .wr_ready (din_ready),  .wr_data (din_data),
    .rd_valid (fin_valid),  .rd_ready (fin_ready),  .rd_data (fin_data),
    .count    ()
  );

  dte #(.P(P), .DW(DW), .MEM_DEPTH(MEM_DEPTH), .CMEM_DEPTH(CMEM_DEPTH)) u_dte (
    .clk, .rst_n,
    .in_valid  (fin_valid),  .in_ready  (fin_ready),  .in_data  (fin_data),
    .out_valid (fout_valid), .out_ready (fout_ready), .out_data (fout_data),
    .arr_we    (row_we),     .arr_waddr (row_waddr),  .arr_wdata (row_wdata),
    .arr_raddr (row_raddr),  .arr_rdata (row_rdata),
    .ctl_we    (cm_we),      .ctl_waddr (cm_waddr),   .ctl_wdata (cm_wdata),
    .ctl_raddr (cm_raddr),   .ctl_rdata (cm_rdata),
    .mat_written,
    .res_ready (res_ready_cells),
    .busy      (dte_busy)
  );

  sync_fifo #(.W(DW), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .wr_valid (fout_valid), .wr_ready (fout_ready), .wr_data (fout_data),
    .rd_valid (dout_valid), .rd_ready (dout_ready), .rd_data (dout_data),
    .count    ()
  );

  initial assert (DW <= XW) else $error("x3pu: DW must not exceed XW");

endmodule

// map_array: the MAP, a linear array of P cells.
//
// Cell i takes its instruction from leaf i of the distribution tree, offers
// its accumulator and activity flag to the REDUCE and SCAN networks, and
// receives element i of each SCAN result. The Data Transfer Engine sees the
// P local memories as one memory of rows: row r is word r of every cell, so
// one access moves a whole line of a matrix (element j of the line in
// cell j).
//
// Timing is that of map_cell: one instruction per cycle, results at the end
// of the cycle; DTE row reads are combinational, row writes take effect at
// the clock edge.
module map_array
  import x3pu_pkg::*;
#(
  parameter int unsigned P         = 128,
  parameter int unsigned DW        = 16,
  parameter int unsigned MEM_DEPTH = 1024
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  arr_instr_t                   instr [P],
  output logic [DW-1:0]                acc   [P],
  output logic [P-1:0]                 active,
  input  logic                         scan_valid,
  input  logic [DW-1:0]                scan_data [P],
  input  logic                         row_we,
  input  logic [$clog2(MEM_DEPTH)-1:0] row_waddr,
  input  logic [DW-1:0]                row_wdata [P],
  input  logic [$clog2(MEM_DEPTH)-1:0] row_raddr,
  output logic [DW-1:0]                row_rdata [P]
);
  localparam int unsigned IXW = (P > 2) ? $clog2(P) : 1;

  for (genvar i = 0; i < P; i++) begin : g_cell
    map_cell #(.DW(DW), .MEM_DEPTH(MEM_DEPTH), .IXW(IXW)) u_cell (
      .clk, .rst_n,
      .index     (IXW'(i)),
      .instr     (instr[i]),
      .acc       (acc[i]),
      .active    (active[i]),
      .scan_valid,
      .scan_data (scan_data[i]),
      .dte_we    (row_we),
      .dte_waddr (row_waddr),
      .dte_wdata (row_wdata[i]),
      .dte_raddr (row_raddr),
      .dte_rdata (row_rdata[i])
    );
  end

endmodule

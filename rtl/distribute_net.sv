// distribute_net: pipelined fan-out tree that carries each array instruction
// from the controller to all P cells of the MAP.
//
// The description calls for a distribution pipeline network of logarithmic
// depth (a log-depth DISTRIBUTE tree above the MAP). It is built here as a
// binary tree of registers: level 0 is one register, level l has 2**l
// registers each feeding two registers of level l+1, and level log2(P) has P
// leaves, one per cell. Every register drives only two loads, which is the
// point of the tree.
//
// Timing: an instruction presented on `in` in cycle t is at every leaf of
// `out` in cycle t + LAT, LAT = log2(P) + 1. One instruction per cycle.
// Reset fills the tree with NOPs. P must be a power of two (>= 2).
module distribute_net
  import x3pu_pkg::*;
#(
  parameter int unsigned P = 128
) (
  input  logic       clk,
  input  logic       rst_n,
  input  arr_instr_t in,
  output arr_instr_t out [P]
);
  localparam int unsigned L = $clog2(P);

  // Node k of the heap-numbered tree (1 .. 2P-1): root is 1, children of k are
  // 2k and 2k+1; leaves are P .. 2P-1.
  arr_instr_t node [1:2*P-1];

  always_ff @(posedge clk) begin
    if (!rst_n) node[1] <= ARR_NOP;
    else        node[1] <= in;
  end

  for (genvar k = 2; k < 2*P; k++) begin : g_node
    always_ff @(posedge clk) begin
      if (!rst_n) node[k] <= ARR_NOP;
      else        node[k] <= node[k/2];
    end
  end

  for (genvar i = 0; i < P; i++) begin : g_leaf
    assign out[i] = node[P+i];
  end

  initial assert (P >= 2 && (1 << L) == P) else $error("distribute_net: P must be a power of two");

endmodule

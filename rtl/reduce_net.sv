// reduce_net: pipelined log-depth REDUCE tree from the MAP to the controller.
//
// It takes one value per cell (the cell accumulators) and returns one scalar:
// their sum, minimum or maximum, as the description lists for the REDUCE
// network. Inactive cells take part with the identity of the function (0 for
// sum and max, all ones for min), so only active cells count. Min and max
// compare unsigned values; sums wrap at DW bits. Both are this
// implementation's choices.
//
// Structure: a register per cell at the leaves, then log2(P) levels of
// two-input operators, each followed by a register (heap-numbered tree,
// root node 1). The function code and a valid bit travel down the levels
// with the data, so a new reduction can start in every cycle.
//
// Timing: inputs sampled in cycle t (in_valid high) appear on out with
// out_valid in cycle t + log2(P) + 1. P must be a power of two (>= 2).
module reduce_net
  import x3pu_pkg::*;
#(
  parameter int unsigned P  = 128,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  red_e          op,
  input  logic [DW-1:0] vec  [P],
  input  logic [P-1:0]  mask,
  output logic          out_valid,
  output logic [DW-1:0] out
);
  localparam int unsigned L = $clog2(P);

  logic [DW-1:0] node [1:2*P-1];
  logic [L:0]    vld;          // vld[l]: data valid at level l (L = leaves)
  red_e          ops [L+1];    // ops[l]: function of the data at level l

  function automatic logic [DW-1:0] ident(red_e f);
    return (f == R_MIN) ? '1 : '0;
  endfunction

  function automatic logic [DW-1:0] comb2(red_e f, logic [DW-1:0] a, logic [DW-1:0] b);
    case (f)
      R_MIN:   return (a < b) ? a : b;
      R_MAX:   return (a > b) ? a : b;
      default: return a + b;
    endcase
  endfunction

  // Leaves.
  for (genvar i = 0; i < P; i++) begin : g_leaf
    always_ff @(posedge clk) begin
      node[P+i] <= mask[i] ? vec[i] : ident(op);
    end
  end

  // Inner nodes: node k combines its children 2k and 2k+1. The level of k is
  // floor(log2(k)); the function of that level's data is ops[level+1].
  for (genvar k = 1; k < P; k++) begin : g_inner
    localparam int unsigned LV = $clog2(k + 1) - 1;
    always_ff @(posedge clk) begin
      node[k] <= comb2(ops[LV+1], node[2*k], node[2*k+1]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld <= '0;
      for (int l = 0; l <= L; l++) ops[l] <= R_NOP;
    end else begin
      vld[L] <= in_valid;
      ops[L] <= op;
      for (int l = 0; l < L; l++) begin
        vld[l] <= vld[l+1];
        ops[l] <= ops[l+1];
      end
    end
  end

  assign out_valid = vld[0];
  assign out       = node[1];

  initial assert (P >= 2 && (1 << L) == P) else $error("reduce_net: P must be a power of two");

endmodule

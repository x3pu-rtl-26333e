// scan_net: pipelined log-depth SCAN network from the MAP back to the MAP.
//
// The description gives the SCAN network as a logarithmic-depth circuit that
// takes a vector from the MAP and returns a vector to it (permutation,
// prefix, ...). This implementation offers inclusive prefix sum, prefix
// minimum and prefix maximum (unsigned) over the active cells, and rotation
// by an amount as the permutation. Inactive cells enter a prefix with the
// identity of the function; a rotation moves every cell's value.
//
// Structure: an input register stage, then log2(P) stages of a
// Hillis-Steele (Kogge-Stone) prefix network. In stage s, position i combines
// its value with that of position i - 2**s (prefix) or takes the value of
// position (i + 2**s) mod P when bit s of the amount is set (rotation, a
// logarithmic barrel rotator). Each stage ends in registers.
//
// Timing: a vector sampled in cycle t (in_valid high) appears on out with
// out_valid in cycle t + log2(P) + 1. P must be a power of two (>= 2).
module scan_net
  import x3pu_pkg::*;
#(
  parameter int unsigned P  = 128,
  parameter int unsigned DW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  scan_e                op,
  input  logic [$clog2(P)-1:0] amount,
  input  logic [DW-1:0]        vec  [P],
  input  logic [P-1:0]         mask,
  output logic                 out_valid,
  output logic [DW-1:0]        out  [P]
);
  localparam int unsigned L = $clog2(P);

  logic [DW-1:0] x   [L+1][P];
  logic [L:0]    vld;
  scan_e         ops [L+1];
  logic [L-1:0]  amt [L+1];

  function automatic logic [DW-1:0] ident(scan_e f);
    return (f == S_MIN) ? '1 : '0;
  endfunction

  function automatic logic [DW-1:0] comb2(scan_e f, logic [DW-1:0] a, logic [DW-1:0] b);
    case (f)
      S_MIN:   return (a < b) ? a : b;
      S_MAX:   return (a > b) ? a : b;
      default: return a + b;
    endcase
  endfunction

  // Input stage.
  for (genvar i = 0; i < P; i++) begin : g_in
    always_ff @(posedge clk) begin
      x[0][i] <= (mask[i] || op == S_ROT) ? vec[i] : ident(op);
    end
  end

  // Prefix / rotation stages.
  for (genvar s = 0; s < L; s++) begin : g_stage
    localparam int unsigned D = 1 << s;
    for (genvar i = 0; i < P; i++) begin : g_pos
      always_ff @(posedge clk) begin
        if (ops[s] == S_ROT)
          x[s+1][i] <= amt[s][s] ? x[s][(i + D) % P] : x[s][i];
        else if (i >= D)
          x[s+1][i] <= comb2(ops[s], x[s][i-D], x[s][i]);
        else
          x[s+1][i] <= x[s][i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld <= '0;
      for (int s = 0; s <= L; s++) begin
        ops[s] <= S_ADD;
        amt[s] <= '0;
      end
    end else begin
      vld[0] <= in_valid;
      ops[0] <= op;
      amt[0] <= amount;
      for (int s = 0; s < L; s++) begin
        vld[s+1] <= vld[s];
        ops[s+1] <= ops[s];
        amt[s+1] <= amt[s];
      end
    end
  end

  assign out_valid = vld[L];
  assign out       = x[L];

  initial assert (P >= 2 && (1 << L) == P) else $error("scan_net: P must be a power of two");

endmodule

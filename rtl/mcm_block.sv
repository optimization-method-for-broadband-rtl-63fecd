// Multiplier block of a transposed-form FIR filter: multiplies one input
// sample by every tap coefficient at the same time, using no multipliers.
//
// Each coefficient is a sum of signed powers of two (canonic signed digits),
// so a product is a sum of shifted copies of x. Bit patterns that recur in
// several coefficients (common subexpressions) are computed once and reused,
// which is what the adder graph in NODES encodes: node 0 is x, node n >= 1 is
// one adder-subtractor of two earlier nodes, each shifted left by a wired
// amount and optionally subtracted. TAPS picks for every tap the node, shift
// and sign that give x * c[k]. The graph format, and the CSE tables it is
// normally fed with, are in fir_cse_pkg.
//
// Interface: x is a signed input sample, p[k] the signed product for tap k.
// The block is purely combinational (no clock, zero latency); its depth is
// the longest chain of nodes in the graph. All arithmetic is exact: P_W must
// hold x times the largest node constant, which is checked at elaboration. With the default 10-bit input and
// coefficients below 2^10, 21 bits always do. The low bits of a product
// taken with a left shift are constant zero; synthesis removes them.
//
// Following the source method: shift-add expansion of CSD coefficients with
// shared subexpressions, every shift hard-wired. This design's own choices:
// the integer scaling of coefficients (left shifts instead of fractional right
// shifts, so no rounding happens inside the block) and the table format.
module mcm_block
  import fir_cse_pkg::*;
#(
  parameter int X_W     = 10,
  parameter int P_W     = 21,
  parameter int N_NODES = RRC_N_NODES,
  parameter int N_TAPS  = RRC_N_TAPS,
  parameter add_node_t NODES [N_NODES] = RRC_NODES,
  parameter tap_src_t  TAPS  [N_TAPS]  = RRC_TAPS
) (
  input  logic signed [X_W-1:0] x,
  output logic signed [P_W-1:0] p [N_TAPS]
);

  // Largest |constant| any node or tap multiplies x by, worked out from the
  // tables at elaboration; P_W must hold it times the largest |x|.
  function automatic longint max_abs_const();
    longint v [N_NODES+1];
    longint m;
    v[0] = 1;
    m = 1;
    for (int n = 1; n <= N_NODES; n++) begin
      longint a, b;
      a = v[int'(NODES[n-1].src_a)] <<< int'(NODES[n-1].sh_a);
      b = v[int'(NODES[n-1].src_b)] <<< int'(NODES[n-1].sh_b);
      v[n] = (NODES[n-1].neg_a ? -a : a) + (NODES[n-1].neg_b ? -b : b);
      if (v[n] > m) m = v[n];
      if (-v[n] > m) m = -v[n];
    end
    for (int k = 0; k < N_TAPS; k++) begin
      longint t;
      t = v[int'(TAPS[k].src)] <<< int'(TAPS[k].sh);
      if (t > m) m = t;
      if (-t > m) m = -t;
    end
    return m;
  endfunction

  localparam longint MAX_CONST = max_abs_const();

  if ((MAX_CONST <<< (X_W - 1)) > ((64'sd1 <<< (P_W - 1)) - 1)) begin : g_narrow
    $error("mcm_block: P_W too small for the largest constant");
  end

  // node[0] = x, node[n] = output of adder-subtractor n
  logic signed [P_W-1:0] node [N_NODES+1];

  assign node[0] = P_W'(x);

  for (genvar n = 1; n <= N_NODES; n++) begin : g_node
    localparam add_node_t ND = NODES[n-1];
    localparam int SA = int'(ND.src_a);
    localparam int SB = int'(ND.src_b);
    // a node may only use nodes computed before it
    if (SA >= n || SB >= n) begin : g_bad
      $error("mcm_block: node %0d uses a later node", n);
    end
    logic signed [P_W-1:0] a, b;
    assign a = node[SA] <<< ND.sh_a;
    assign b = node[SB] <<< ND.sh_b;
    if (ND.neg_a && ND.neg_b) begin : g_nn
      assign node[n] = -a - b;
    end else if (ND.neg_a) begin : g_sa
      assign node[n] = b - a;
    end else if (ND.neg_b) begin : g_sb
      assign node[n] = a - b;
    end else begin : g_add
      assign node[n] = a + b;
    end
  end

  for (genvar k = 0; k < N_TAPS; k++) begin : g_tap
    localparam tap_src_t TP = TAPS[k];
    localparam int SRC = int'(TP.src);
    if (SRC > N_NODES) begin : g_bad
      $error("mcm_block: tap %0d uses a missing node", k);
    end
    if (TP.neg) begin : g_neg
      assign p[k] = -(node[SRC] <<< TP.sh);
    end else begin : g_pos
      assign p[k] = node[SRC] <<< TP.sh;
    end
  end

endmodule

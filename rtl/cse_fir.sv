// Transposed-form FIR filter with a multiplierless, CSE-optimised multiplier
// block. Default configuration: 64-tap root-raised-cosine pulse-shaping
// filter for a broadband modem, 10-bit input, 10-digit CSD coefficients,
// 16-bit output.
//
// The input sample x is multiplied by all coefficients at once in
// mcm_block (shared shift-add network, see fir_cse_pkg for the graph), and
// the products are summed by the adder/delay line of tdf_chain. The sum is
// kept at full precision (ACC_W bits, exact; elaboration stops with an error
// if ACC_W cannot hold the worst case the coefficient tables allow) and y
// carries its OUT_W most significant bits, truncated towards minus infinity.
//
// Interface: one sample per clock on x, signed two's complement; y is the
// filter output for the sample presented in the same cycle (combinational
// path from x through the multiplier block and one adder, no latency).
// rst_n, asynchronous and active low, clears the delay line.
//
// Scaling with the defaults: the coefficients are c[k]/512 and the exact
// sum, sum_k c[k] x[n-k], needs 23 bits (sum |c| = 5800, |x| <= 512). y is
// that sum >>> 7 (the 7 low bits of the sum are dropped on purpose, which
// lint reports as unused bits), so the DC gain is sum c / 128 = 3820/128,
// about 29.8 output LSBs per input LSB; a full-scale step of +511 settles at
// 15250.
//
// From the source: the transposed structure, the CSD + CSE multiplier block,
// 64 taps, 10-bit input, 10-bit CSD coefficients, 16-bit output. This
// design's own choices: the coefficient values (RRC roll-off 0.3, 8 samples
// per symbol), the output as the top bits of the exact sum, the reset and
// the absence of any pipeline register.
module cse_fir
  import fir_cse_pkg::*;
#(
  parameter int X_W     = 10,
  parameter int P_W     = 21,
  parameter int ACC_W   = 23,
  parameter int OUT_W   = 16,
  parameter int N_TAPS  = RRC_N_TAPS,
  parameter int N_NODES = RRC_N_NODES,
  parameter add_node_t NODES [N_NODES] = RRC_NODES,
  parameter tap_src_t  TAPS  [N_TAPS]  = RRC_TAPS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [X_W-1:0]   x,
  output logic signed [OUT_W-1:0] y
);

  if (OUT_W > ACC_W || P_W > ACC_W) begin : g_bad
    $error("cse_fir: OUT_W and P_W may not exceed ACC_W");
  end

  // sum over taps of |c[k]|, from the tables: the exact sum reaches at most
  // this times the largest |x|, which ACC_W must hold
  function automatic longint sum_abs_coef();
    longint v [N_NODES+1];
    longint s;
    v[0] = 1;
    s = 0;
    for (int n = 1; n <= N_NODES; n++) begin
      longint a, b;
      a = v[int'(NODES[n-1].src_a)] <<< int'(NODES[n-1].sh_a);
      b = v[int'(NODES[n-1].src_b)] <<< int'(NODES[n-1].sh_b);
      v[n] = (NODES[n-1].neg_a ? -a : a) + (NODES[n-1].neg_b ? -b : b);
    end
    for (int k = 0; k < N_TAPS; k++) begin
      longint t;
      t = v[int'(TAPS[k].src)] <<< int'(TAPS[k].sh);
      s += (t < 0) ? -t : t;
    end
    return s;
  endfunction

  localparam longint SUM_ABS = sum_abs_coef();

  if ((SUM_ABS <<< (X_W - 1)) > ((64'sd1 <<< (ACC_W - 1)) - 1)) begin : g_acc_narrow
    $error("cse_fir: ACC_W too small for the worst-case sum");
  end

  logic signed [P_W-1:0]   p [N_TAPS];
  logic signed [ACC_W-1:0] acc;

  mcm_block #(
    .X_W(X_W), .P_W(P_W), .N_NODES(N_NODES), .N_TAPS(N_TAPS),
    .NODES(NODES), .TAPS(TAPS)
  ) u_mcm (
    .x(x), .p(p)
  );

  tdf_chain #(
    .N_TAPS(N_TAPS), .P_W(P_W), .ACC_W(ACC_W)
  ) u_chain (
    .clk(clk), .rst_n(rst_n), .p(p), .y(acc)
  );

  assign y = acc[ACC_W-1 -: OUT_W];

endmodule

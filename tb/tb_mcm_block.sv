// Self-checking testbench for mcm_block.
//
// Three instances are driven with every possible 10-bit input value:
//   * the default 64-tap root-raised-cosine graph, checked against
//     x * RRC_COEF[k] for each tap;
//   * the 3-tap example graph, checked against coefficients written out here
//     from their signed-digit strings (independent of the graph tables);
//   * the single multiplier by 231/256, likewise.
// The block is combinational, so each value is checked after a 1 ns settle.
module tb_mcm_block;
  import fir_cse_pkg::*;

  localparam int X_W = 10;
  localparam int P_W = 21;

  // 0.100(-1)0101, 1.00100(-1)00, 1.0(-1)0(-1)0000 scaled by 2^8
  localparam int H0 = 2**7 - 2**4 + 2**2 + 2**0;
  localparam int H1 = 2**8 + 2**5 - 2**2;
  localparam int H2 = 2**8 - 2**6 - 2**4;
  // 1.00(-1)0100(-1) scaled by 2^8
  localparam int HF = 2**8 - 2**5 + 2**3 - 2**0;

  logic signed [X_W-1:0] x;
  logic signed [P_W-1:0] p_rrc [RRC_N_TAPS];
  logic signed [P_W-1:0] p_f1  [F1_N_TAPS];
  logic signed [P_W-1:0] p_fig [1];

  int checks = 0;
  int failures = 0;

  mcm_block u_rrc (.x(x), .p(p_rrc));

  mcm_block #(
    .X_W(X_W), .P_W(P_W), .N_NODES(F1_N_NODES), .N_TAPS(F1_N_TAPS),
    .NODES(F1_NODES), .TAPS(F1_TAPS)
  ) u_f1 (.x(x), .p(p_f1));

  mcm_block #(
    .X_W(X_W), .P_W(P_W), .N_NODES(FIG1_N_NODES), .N_TAPS(1),
    .NODES(FIG1_NODES), .TAPS(FIG1_TAPS)
  ) u_fig (.x(x), .p(p_fig));

  task automatic check(string what, int k, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s tap %0d x=%0d: got %0d expected %0d", what, k, x, got, exp);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -(2**(X_W-1)); v < 2**(X_W-1); v++) begin
      x = X_W'(v);
      #1;
      for (int k = 0; k < RRC_N_TAPS; k++)
        check("rrc", k, int'(p_rrc[k]), v * RRC_COEF[k]);
      check("f1", 0, int'(p_f1[0]), v * H0);
      check("f1", 1, int'(p_f1[1]), v * H1);
      check("f1", 2, int'(p_f1[2]), v * H2);
      check("fig1", 0, int'(p_fig[0]), v * HF);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

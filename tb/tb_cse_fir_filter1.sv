// Testbench for cse_fir configured as the 3-tap example filter
// h0 = 0.100(-1)0101, h1 = 1.00100(-1)00, h2 = 1.0(-1)0(-1)0000 (scale 2^8),
// whose multiplier block shares two subexpressions among all three taps.
// The output is kept at full precision (OUT_W = ACC_W) and compared every
// cycle with 117 x[n] + 284 x[n-1] + 176 x[n-2], the coefficients being
// written out here from their digit strings. Random and full-scale samples
// are applied, with one asynchronous reset in mid-stream.
module tb_cse_fir_filter1;
  import fir_cse_pkg::*;

  localparam int X_W = 10;
  localparam int W   = 21;
  localparam int H [3] = '{2**7 - 2**4 + 2**2 + 2**0,
                           2**8 + 2**5 - 2**2,
                           2**8 - 2**6 - 2**4};

  logic clk;
  logic rst_n;
  logic signed [X_W-1:0] x;
  logic signed [W-1:0]   y;

  int xh [3];
  int checks = 0;
  int failures = 0;
  int resets = 0;

  cse_fir #(
    .X_W(X_W), .P_W(W), .ACC_W(W), .OUT_W(W),
    .N_TAPS(F1_N_TAPS), .N_NODES(F1_N_NODES), .NODES(F1_NODES), .TAPS(F1_TAPS)
  ) dut (.clk(clk), .rst_n(rst_n), .x(x), .y(y));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    x = '0;
    xh = '{0, 0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      automatic int v;
      @(negedge clk);
      if (n == 1000) begin
        x = '0;
        rst_n = 1'b0;
        #1;
        rst_n = 1'b1;
        xh = '{0, 0, 0};
        resets++;
      end
      case ($urandom_range(3))
        0: v = -512;
        1: v = 511;
        default: v = int'($urandom_range(1023)) - 512;
      endcase
      xh[2] = xh[1];
      xh[1] = xh[0];
      xh[0] = v;
      x = X_W'(v);
      #1;
      checks++;
      if (int'(y) != H[0] * xh[0] + H[1] * xh[1] + H[2] * xh[2]) begin
        failures++;
        if (failures <= 10) $display("FAIL n=%0d y=%0d", n, y);
      end
    end
    checks++;
    if (resets != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for tdf_chain.
//
// A 5-tap chain is fed random products every cycle, including full-scale
// ones, and its output is compared each cycle with sum_k p_k[n-k] computed
// from a history of the inputs kept here. A reset in the middle of the run
// must clear the delay line. The output is checked in the same cycle its
// p[0] is applied (zero latency).
module tb_tdf_chain;
  localparam int N     = 5;
  localparam int P_W   = 8;
  localparam int ACC_W = 11;

  logic clk;
  logic rst_n;
  logic signed [P_W-1:0]   p [N];
  logic signed [ACC_W-1:0] y;

  int hist [N][N];   // hist[d][k]: p[k] applied d samples ago
  int checks = 0;
  int failures = 0;
  int resets = 0;

  tdf_chain #(.N_TAPS(N), .P_W(P_W), .ACC_W(ACC_W)) dut (
    .clk(clk), .rst_n(rst_n), .p(p), .y(y)
  );

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

  task automatic clear_hist();
    for (int d = 0; d < N; d++)
      for (int k = 0; k < N; k++) hist[d][k] = 0;
  endtask

  initial begin
    rst_n = 1'b0;
    for (int k = 0; k < N; k++) p[k] = '0;
    clear_hist();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (n == 1000) begin
        // asynchronous reset pulse between two edges; zero products so the
        // next edge loads silence
        for (int k = 0; k < N; k++) p[k] = '0;
        rst_n = 1'b0;
        #1;
        rst_n = 1'b1;
        clear_hist();
        resets++;
      end
      // shift history and apply new products
      for (int d = N - 1; d > 0; d--)
        for (int k = 0; k < N; k++) hist[d][k] = hist[d-1][k];
      for (int k = 0; k < N; k++) begin
        automatic int v;
        case ($urandom_range(3))
          0: v = -(2**(P_W-1));
          1: v = 2**(P_W-1) - 1;
          default: v = int'($urandom_range(2**P_W - 1)) - 2**(P_W-1);
        endcase
        p[k] = P_W'(v);
        hist[0][k] = v;
      end
      #1;
      begin
        automatic int exp = 0;
        for (int k = 0; k < N; k++) exp += hist[k][k];
        checks++;
        if (int'(y) != exp) begin
          failures++;
          if (failures <= 10) $display("FAIL n=%0d y=%0d expected %0d", n, y, exp);
        end
      end
    end
    checks++;
    if (resets != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

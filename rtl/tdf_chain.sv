// Accumulation chain of a transposed-form FIR filter.
//
// The tap products p[0..N_TAPS-1] of the current sample enter a line of
// adders separated by one-sample delays:
//
//     r[N-1] <= p[N-1]
//     r[k]   <= p[k] + r[k+1]        for 1 <= k < N-1
//     y       = p[0] + r[1]
//
// so y[n] = sum_k p_k[n-k], i.e. sum_k c_k x[n-k] when p_k = c_k x. Every
// adder sees one product and one register, so the chain adds only one adder
// to the critical path whatever the number of taps.
//
// Interface: one sample per clock, no handshake. y is combinational from
// p[0] (zero latency) as in the transposed structure; the registers update on
// the rising clock edge. rst_n is an asynchronous, active-low reset that
// clears every delay register, so the filter restarts from silence.
// Products are sign-extended to ACC_W, which must hold the largest possible
// sum (no saturation or wrap protection is provided).
//
// The structure follows the transposed-form filter of the source method; the
// reset, the widths and the absence of a sample-enable are this design's own
// choices.
module tdf_chain #(
  parameter int N_TAPS = 64,
  parameter int P_W    = 21,
  parameter int ACC_W  = 23
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [P_W-1:0]   p [N_TAPS],
  output logic signed [ACC_W-1:0] y
);

  if (N_TAPS < 2) begin : g_bad
    $error("tdf_chain: needs at least two taps");
  end

  // r[k] holds the partial sum that joins tap k-1 in the next sample
  logic signed [ACC_W-1:0] r [1:N_TAPS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < N_TAPS; k++) r[k] <= '0;
    end else begin
      r[N_TAPS-1] <= ACC_W'(p[N_TAPS-1]);
      for (int k = 1; k < N_TAPS-1; k++) r[k] <= ACC_W'(p[k]) + r[k+1];
    end
  end

  assign y = ACC_W'(p[0]) + r[1];

endmodule

// dxn_avg_core: averaging datapath of the DxN comb filter.
//
// The DxN filter removes baseline drift and 60 Hz mains interference by
// subtracting from the current sample x[i] the mean of N samples spaced D apart
// around it (D = 6, N = 42 at 360 samples/s puts the first zero at 60 Hz and the
// high-pass corner near 1 Hz):
//     y[i] = x[i] - ( sum_{j=-21..20} x[i + 6j] ) / 42
// This core does the arithmetic once the N samples are gathered: an adder over
// all N_TAPS inputs, a division by N_TAPS that truncates toward zero (the
// behaviour of integer division in C, so results match the firmware bit for
// bit), and the subtraction from the current sample (iter_sample).
//
// Timing: a start pulse samples the inputs; the sum is registered on that edge
// and the result one edge later, with a one-cycle done pulse. Latency is two
// cycles and a new start may be given every cycle.
// The sum is kept DATA_W + clog2(N_TAPS) bits wide so that it cannot overflow;
// the result is the low DATA_W bits of the difference, as with C int arithmetic.
// Sample values are signed two's complement. Reset (synchronous, active low)
// clears the valid flags and the result.
// The formula, N = 42 and the truncating division follow the original design;
// the two-stage pipeline and the internal widths are this design's choices.
module dxn_avg_core #(
  parameter int unsigned N_TAPS = 42,
  parameter int unsigned DATA_W = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic signed [DATA_W-1:0] iter_sample,
  input  logic signed [DATA_W-1:0] samples [N_TAPS],
  output logic                     done,
  output logic signed [DATA_W-1:0] result
);

  localparam int unsigned SUM_W = DATA_W + $clog2(N_TAPS);
  localparam logic signed [SUM_W-1:0] DIVISOR = SUM_W'(N_TAPS);

  logic signed [SUM_W-1:0]  sum_c, sum_q;
  logic signed [DATA_W-1:0] avg_c;
  logic signed [DATA_W-1:0] iter_q;
  logic                     v1_q;

  always_comb begin
    sum_c = '0;
    for (int k = 0; k < N_TAPS; k++)
      sum_c += SUM_W'(samples[k]);
  end

  // Signed division truncates toward zero.
  assign avg_c = DATA_W'(sum_q / DIVISOR);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1_q    <= 1'b0;
      sum_q   <= '0;
      iter_q  <= '0;
      done    <= 1'b0;
      result  <= '0;
    end else begin
      v1_q <= start;
      if (start) begin
        sum_q  <= sum_c;
        iter_q <= iter_sample;
      end
      done <= v1_q;
      if (v1_q)
        result <= iter_q - avg_c;
    end
  end

endmodule

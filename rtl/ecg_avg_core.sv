// ecg_avg_core: averaging datapath used by the QRS detector.
//
// The QRS detector averages groups of N_IN = 4 values. This core adds the N_IN signed inputs and
// divides by shifting right by log2(N_IN), so N_IN must be a power of two. The
// shift is arithmetic: for a non-negative sum it equals C's integer division,
// for a negative sum it rounds toward minus infinity.
//
// Timing: a start pulse registers the sum; one edge later the shifted result is
// registered and done pulses for one cycle. Latency two cycles, one start per
// cycle accepted. The sum is DATA_W + log2(N_IN) bits wide, so it cannot
// overflow. Reset is synchronous, active low.
// Four inputs and the shift by two follow the original design; making the
// shift arithmetic, the pipeline and the widths are this design's choices.
module ecg_avg_core #(
  parameter int unsigned N_IN   = 4,
  parameter int unsigned DATA_W = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic signed [DATA_W-1:0] values [N_IN],
  output logic                     done,
  output logic signed [DATA_W-1:0] result
);

  localparam int unsigned SHIFT = $clog2(N_IN);
  localparam int unsigned SUM_W = DATA_W + SHIFT;

  logic signed [SUM_W-1:0] sum_c, sum_q;
  logic signed [DATA_W-1:0] avg_c;
  logic                    v1_q;

  always_comb begin
    sum_c = '0;
    for (int k = 0; k < N_IN; k++)
      sum_c += SUM_W'(values[k]);
  end

  assign avg_c = DATA_W'(sum_q >>> SHIFT);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1_q   <= 1'b0;
      sum_q  <= '0;
      done   <= 1'b0;
      result <= '0;
    end else begin
      v1_q <= start;
      if (start)
        sum_q <= sum_c;
      done <= v1_q;
      if (v1_q)
        result <= avg_c;
    end
  end

  initial begin
    assert ((1 << SHIFT) == N_IN)
      else $error("ecg_avg_core: N_IN must be a power of two");
  end

endmodule

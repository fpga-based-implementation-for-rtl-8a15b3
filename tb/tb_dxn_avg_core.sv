// tb_dxn_avg_core: self-checking test of the DxN averaging datapath.
//
// Feeds random signed samples (ECG-like 12-bit values, then full 32-bit values
// to exercise the wide sum) and checks result = iter - trunc(sum/42) against a
// reference that divides magnitudes and restores the sign, so it does not rely
// on the simulator's signed division. Also checks the two-cycle latency, a
// back-to-back start sequence and negative sums that are not multiples of 42.
module tb_dxn_avg_core;

  localparam int N = 42;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic signed [31:0] iter_sample = '0;
  logic signed [31:0] samples [N];
  logic done;
  logic signed [31:0] result;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dxn_avg_core #(.N_TAPS(N), .DATA_W(32)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [31:0] model(logic signed [31:0] it,
                                               logic signed [31:0] s [N]);
    longint sum = 0, mag, q;
    for (int k = 0; k < N; k++) sum += longint'(s[k]);
    mag = sum < 0 ? -sum : sum;
    q   = mag / longint'(N);
    if (sum < 0) q = -q;
    return 32'(longint'(it) - q);
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One computation with latency check.
  task automatic run_one(int range_bits);
    logic signed [31:0] exp;
    int lat;
    @(negedge clk);
    for (int k = 0; k < N; k++)
      samples[k] = range_bits >= 32 ? $signed($urandom)
                 : $signed($urandom % (1 << range_bits)) - (1 <<< (range_bits - 1));
    iter_sample = range_bits >= 32 ? $signed($urandom)
                : $signed($urandom % (1 << range_bits)) - (1 <<< (range_bits - 1));
    exp = model(iter_sample, samples);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done && lat < 10) begin
      @(negedge clk);
      lat++;
    end
    check($sformatf("latency %0d, expected 2", lat), lat == 2);
    check($sformatf("result %0d, expected %0d", result, exp), result == exp);
  endtask

  logic signed [31:0] pipe_exp [3];
  logic signed [31:0] got [$];

  // Collects every result the core flags as done.
  always @(posedge clk) if (done) got.push_back(result);

  logic signed [31:0] pipe_s [3][N];

  initial begin
    for (int k = 0; k < N; k++) samples[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check("done low after reset", !done);

    for (int t = 0; t < 200; t++) run_one(12);
    for (int t = 0; t < 100; t++) run_one(32);

    // All samples -1: sum -42 gives exactly -1; all -1 except one 0 gives
    // -41/42, which truncates to 0 (not -1).
    @(negedge clk);
    for (int k = 0; k < N; k++) samples[k] = -1;
    iter_sample = 100;
    start = 1'b1;
    @(negedge clk); start = 1'b0;
    @(negedge clk);
    check($sformatf("sum -42: result %0d", result), done && result == 101);
    for (int k = 1; k < N; k++) samples[k] = -1;
    samples[0] = 0;
    start = 1'b1;
    @(negedge clk); start = 1'b0;
    @(negedge clk);
    check($sformatf("sum -41 truncates toward zero: result %0d", result), done && result == 100);

    // Three starts on consecutive cycles: three results on consecutive cycles.
    for (int p = 0; p < 3; p++) begin
      for (int k = 0; k < N; k++) pipe_s[p][k] = $signed($urandom % 4096) - 2048;
      pipe_exp[p] = model(32'(p * 7), pipe_s[p]);
    end
    repeat (3) @(negedge clk);
    got.delete();
    for (int p = 0; p < 3; p++) begin
      @(negedge clk);
      samples = pipe_s[p];
      iter_sample = 32'(p * 7);
      start = 1'b1;
    end
    @(negedge clk);
    start = 1'b0;
    repeat (4) @(negedge clk);
    check($sformatf("pipelined burst gave %0d results", got.size()), got.size() == 3);
    for (int p = 0; p < 3 && p < got.size(); p++)
      check($sformatf("pipelined result %0d: %0d vs %0d", p, got[p], pipe_exp[p]),
            got[p] == pipe_exp[p]);
    check("done falls after the burst", !done);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

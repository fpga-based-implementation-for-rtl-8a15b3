// tb_ecg_avg_core: self-checking test of the four-value averaging datapath.
//
// Random signed inputs, small (detector-sized) and full 32-bit, checked against
// floor(sum / 4) computed from the sum and its remainder; two-cycle latency;
// a negative sum that is not a multiple of four (rounds toward minus infinity);
// and back-to-back starts.
module tb_ecg_avg_core;

  localparam int N = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic signed [31:0] values [N];
  logic done;
  logic signed [31:0] result;

  int checks = 0, failures = 0;
  logic signed [31:0] got [$];

  always #5 clk = ~clk;
  always @(posedge clk) if (done) got.push_back(result);

  ecg_avg_core #(.N_IN(N), .DATA_W(32)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [31:0] model(logic signed [31:0] v [N]);
    longint sum = 0, r;
    for (int k = 0; k < N; k++) sum += longint'(v[k]);
    r = sum % longint'(N);
    if (r < 0) r += longint'(N);
    return 32'((sum - r) / longint'(N));
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_one(logic wide);
    logic signed [31:0] exp;
    int lat;
    @(negedge clk);
    for (int k = 0; k < N; k++)
      values[k] = wide ? $signed($urandom) : $signed($urandom % 2000) - 1000;
    exp = model(values);
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

  logic signed [31:0] burst [4][N];
  logic signed [31:0] burst_exp [4];

  initial begin
    for (int k = 0; k < N; k++) values[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check("done low after reset", !done);

    for (int t = 0; t < 200; t++) run_one(1'b0);
    for (int t = 0; t < 100; t++) run_one(1'b1);

    // Sum -5: floor(-5/4) = -2.
    @(negedge clk);
    values = '{-2, -1, -1, -1};
    start = 1'b1;
    @(negedge clk); start = 1'b0;
    @(negedge clk);
    check($sformatf("sum -5 gives %0d, expected -2", result), done && result == -2);

    repeat (3) @(negedge clk);
    got.delete();
    for (int p = 0; p < 4; p++) begin
      for (int k = 0; k < N; k++) burst[p][k] = $signed($urandom % 512);
      burst_exp[p] = model(burst[p]);
    end
    for (int p = 0; p < 4; p++) begin
      @(negedge clk);
      values = burst[p];
      start = 1'b1;
    end
    @(negedge clk);
    start = 1'b0;
    repeat (4) @(negedge clk);
    check($sformatf("burst gave %0d results", got.size()), got.size() == 4);
    for (int p = 0; p < 4 && p < got.size(); p++)
      check($sformatf("burst result %0d: %0d vs %0d", p, got[p], burst_exp[p]),
            got[p] == burst_exp[p]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

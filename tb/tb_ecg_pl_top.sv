// tb_ecg_pl_top: end-to-end test of the accelerator system, full size.
//
// The testbench plays the processor's firmware against the three accelerators
// at their default sizes, one 1000-sample record (2.78 s at 360 samples/s):
//  1. Builds a synthetic ECG in ADC counts: a flat baseline with slow drift and
//     beats (Q dip, R peak, S dip, T wave) at samples 225, 488, 690 and 960.
//  2. Adds mains interference pl[T] = trunc(sin(2*pi*60/360*T) * 2048).
//  3. Runs the DxN filter: for every sample i with a full window
//     (126 <= i <= 879) it loads x[i] and x[i-126], x[i-120], ..., x[i+120]
//     into avg_dxn_0, starts it, polls status and reads y[i]; outside that range
//     y[i] = 0. Every y[i] is checked against iter - trunc(sum/42) computed
//     here, and, because six-sample spacing makes the mains phase identical at
//     all 42 taps, against the same filter applied to the clean ECG (+-1): the
//     60 Hz interference must be gone.
//  4. Runs a simple R-peak detector on y (a testbench stand-in for the
//     firmware's detector): a peak is a local maximum over +-8 samples above
//     half of the mean of the last four R amplitudes, at least 72 samples
//     after the previous one. The mean of the last four R amplitudes comes from
//     ecg_avgr_0 and the mean of the last four R-R intervals from ecg_avgr_1;
//     both are checked against values computed here. The beats inside the
//     filtered range must be found at their positions (+-3).
// It counts each mechanism used (DxN runs, runs of each averager, identity
// reads, held responses) and fails if one never happened.
module tb_ecg_pl_top;
  import axi4l_pkg::*;
  import ecg_ip_pkg::*;

  localparam int L     = 1000;
  localparam int HALF  = 21;                      // j = -21 .. 20
  localparam int FIRST = HALF * DXN_D;            // 126
  localparam int LAST  = L - 1 - (HALF - 1) * DXN_D;  // 879
  localparam int NADC  = 2048;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  axi4l_req_t dxn_req, a0_req, a1_req;
  axi4l_rsp_t dxn_rsp, a0_rsp, a1_rsp;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;   // 100 MHz

  ecg_pl_top dut (
    .aclk(clk), .aresetn(rst_n),
    .dxn_axi_req(dxn_req), .dxn_axi_rsp(dxn_rsp),
    .avgr0_axi_req(a0_req), .avgr0_axi_rsp(a0_rsp),
    .avgr1_axi_req(a1_req), .avgr1_axi_rsp(a1_rsp)
  );

  axi4l_master_bfm bfm_dxn (.clk, .req(dxn_req), .rsp(dxn_rsp));
  axi4l_master_bfm bfm_a0  (.clk, .req(a0_req),  .rsp(a0_rsp));
  axi4l_master_bfm bfm_a1  (.clk, .req(a1_req),  .rsp(a1_rsp));

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int c_div(longint a, int b);
    longint m = a < 0 ? -a : a;
    return int'(a < 0 ? -(m / longint'(b)) : m / longint'(b));
  endfunction

  function automatic int floor_div4(longint s);
    longint r = s % 4;
    if (r < 0) r += 4;
    return int'((s - r) / 4);
  endfunction

  int ecg [L], ecg_pl [L], y [L];
  int beats [4] = '{225, 488, 690, 960};

  // Beat template around the R peak at offset 0.
  function automatic int beat_shape(int d);
    if (d >= -12 && d < -4) return -(d + 12) * 6;             // Q dip
    if (d >= -4 && d <= 0)  return -48 + (d + 4) * 70;        // rise to R (232)
    if (d > 0 && d <= 6)    return 232 - d * 80;              // fall to S (-248)
    if (d > 6 && d <= 16)   return -248 + (d - 6) * 24;       // back to baseline
    if (d > 60 && d < 140)  return int'(90.0 * $sin(3.14159265 * (d - 60) / 80.0));  // T wave
    return 0;
  endfunction

  // Counters of the mechanisms exercised.
  int n_dxn = 0, n_avg0 = 0, n_avg1 = 0, n_id = 0;

  axi_resp_e   resp;
  logic [31:0] d;

  task automatic dxn_filter_one(int i);
    longint sum = 0, sum_clean = 0;
    int exp, exp_clean;
    for (int j = -HALF; j < HALF; j++) begin
      bfm_dxn.write(AVG_DXN_BASE + 32'(input_offset(j + HALF)), ecg_pl[i + j * DXN_D], 4'hf, resp);
      sum       += longint'(ecg_pl[i + j * DXN_D]);
      sum_clean += longint'(ecg[i + j * DXN_D]);
    end
    bfm_dxn.write(AVG_DXN_BASE + 32'(REG_THIRD), ecg_pl[i], 4'hf, resp);
    bfm_dxn.write(AVG_DXN_BASE + 32'(REG_CONTROL), 32'h1, 4'hf, resp);
    do bfm_dxn.read(AVG_DXN_BASE + 32'(REG_STATUS), d, resp); while (d[STAT_DONE_BIT] != 1'b1);
    bfm_dxn.read(AVG_DXN_BASE + 32'(output_offset(DXN_N)), d, resp);
    y[i] = int'(d);
    n_dxn++;
    exp       = ecg_pl[i] - c_div(sum, DXN_N);
    exp_clean = ecg[i] - c_div(sum_clean, DXN_N);
    check($sformatf("y[%0d] = %0d, expected %0d", i, y[i], exp), y[i] == exp);
    check($sformatf("y[%0d] = %0d, mains-free value %0d", i, y[i], exp_clean),
          y[i] - exp_clean <= 1 && exp_clean - y[i] <= 1);
  endtask

  // Runs one four-value average on an ECG averager.
  task automatic avg4(int unit, int v [4], output int result);
    logic [31:0] base = unit == 0 ? ECG_AVGR0_BASE : ECG_AVGR1_BASE;
    longint sum = 0;
    for (int k = 0; k < 4; k++) begin
      if (unit == 0) bfm_a0.write(base + 32'(input_offset(k)), v[k], 4'hf, resp);
      else           bfm_a1.write(base + 32'(input_offset(k)), v[k], 4'hf, resp);
      sum += longint'(v[k]);
    end
    if (unit == 0) begin
      bfm_a0.write(base + 32'(REG_CONTROL), 32'h1, 4'hf, resp);
      do bfm_a0.read(base + 32'(REG_STATUS), d, resp); while (d[0] != 1'b1);
      bfm_a0.read(base + 32'(output_offset(4)), d, resp);
      n_avg0++;
    end else begin
      bfm_a1.write(base + 32'(REG_CONTROL), 32'h1, 4'hf, resp);
      do bfm_a1.read(base + 32'(REG_STATUS), d, resp); while (d[0] != 1'b1);
      bfm_a1.read(base + 32'(output_offset(4)), d, resp);
      n_avg1++;
    end
    result = int'(d);
    check($sformatf("averager %0d: %0d expected %0d", unit, result, floor_div4(sum)),
          result == floor_div4(sum));
  endtask

  int amp_hist [4] = '{200, 200, 200, 200};
  int rr_hist  [4] = '{260, 260, 260, 260};
  int found [$];
  int amp_avg, rr_avg, last_peak;
  int t_start, t_dxn;
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    // 1-2: input record.
    for (int t = 0; t < L; t++) begin
      ecg[t] = -40 + int'(25.0 * $sin(2.0 * 3.14159265 * 0.25 * t / 360.0));
      foreach (beats[b]) ecg[t] += beat_shape(t - beats[b]);
      ecg_pl[t] = ecg[t] + int'($rtoi($sin(2.0 * 3.14159265 * 60.0 / 360.0 * t) * NADC));
      y[t] = 0;
    end
    check("mains amplitude reaches 1773 counts", ecg_pl[1] - ecg[1] == 1773);

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    bfm_a0.stall_pct = 30;
    bfm_a1.stall_pct = 30;
    bfm_dxn.stall_pct = 5;

    bfm_a0.read(ECG_AVGR0_BASE + 32'(REG_THIRD), d, resp);
    check("ecg_avgr_0 id", d == ECG_AVGR_ID); n_id++;
    bfm_a1.read(ECG_AVGR1_BASE + 32'(REG_THIRD), d, resp);
    check("ecg_avgr_1 id", d == ECG_AVGR_ID); n_id++;

    // 3: DxN filter over the record.
    t_start = cyc;
    for (int i = FIRST; i <= LAST; i++) dxn_filter_one(i);
    t_dxn = cyc - t_start;
    $display("DxN filter: %0d samples in %0d cycles (%0d us at 100 MHz)",
             LAST - FIRST + 1, t_dxn, t_dxn / 100);

    // 4: R-peak detection on the filtered record.
    avg4(0, amp_hist, amp_avg);
    avg4(1, rr_hist, rr_avg);
    last_peak = -1000;
    for (int i = 8; i < L - 8; i++) begin
      bit is_max;
      is_max = 1;
      for (int k = -8; k <= 8; k++)
        if (k != 0 && (y[i + k] > y[i] || (k < 0 && y[i + k] == y[i]))) is_max = 0;
      if (is_max && 2 * y[i] > amp_avg && i - last_peak > 72) begin
        found.push_back(i);
        if (last_peak >= 0) begin
          rr_hist = '{rr_hist[1], rr_hist[2], rr_hist[3], i - last_peak};
          avg4(1, rr_hist, rr_avg);
        end
        amp_hist = '{amp_hist[1], amp_hist[2], amp_hist[3], y[i]};
        avg4(0, amp_hist, amp_avg);
        last_peak = i;
      end
    end
    $display("R peaks found at: %0d %0d %0d, mean R amplitude %0d, mean RR %0d", found.size() > 0 ? found[0] : -1, found.size() > 1 ? found[1] : -1, found.size() > 2 ? found[2] : -1, amp_avg, rr_avg);
    check($sformatf("%0d R peaks found, expected 3", found.size()), found.size() == 3);
    for (int b = 0; b < 3 && b < found.size(); b++)
      check($sformatf("peak %0d at %0d, beat at %0d", b, found[b], beats[b]),
            found[b] - beats[b] <= 3 && beats[b] - found[b] <= 3);

    // Mechanisms exercised.
    $display("DxN runs %0d, averager0 runs %0d, averager1 runs %0d, id reads %0d, held responses %0d",
             n_dxn, n_avg0, n_avg1, n_id,
             bfm_dxn.resp_stalls + bfm_a0.resp_stalls + bfm_a1.resp_stalls);
    check("DxN averager used for every filtered sample", n_dxn == LAST - FIRST + 1);
    check("ecg_avgr_0 used", n_avg0 > 0);
    check("ecg_avgr_1 used", n_avg1 > 0);
    check("identification registers read", n_id == 2);
    check("held AXI responses exercised",
          bfm_dxn.resp_stalls > 0 && bfm_a0.resp_stalls > 0 && bfm_a1.resp_stalls > 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

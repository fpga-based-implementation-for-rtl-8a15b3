// tb_ecg_avgr: self-checking test of the four-value averager register block.
//
// Through the AXI4-Lite port: reset values, the identification register
// (0x0000000d, read-only), read-back and byte strobes on the inputs, status
// cleared by a start and set by the result, output_reg = floor(sum/4) for
// random detector-range values (model from sum and remainder), and unmapped
// offsets reading 0. Response stalls by the master are switched on halfway.
module tb_ecg_avgr;
  import axi4l_pkg::*;
  import ecg_ip_pkg::*;

  localparam int N = 4;
  localparam logic [31:0] BASE = ECG_AVGR0_BASE;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  axi4l_req_t req;
  axi4l_rsp_t rsp;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecg_avgr #(.N_IN(N)) dut (.aclk(clk), .aresetn(rst_n), .s_axi_req(req), .s_axi_rsp(rsp));
  axi4l_master_bfm bfm (.clk, .req, .rsp);

  initial begin
    repeat (100000) @(posedge clk);
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

  axi_resp_e resp;

  task automatic wr(logic [15:0] off, logic [31:0] d, logic [3:0] strb = 4'hf);
    bfm.write(BASE + 32'(off), d, strb, resp);
  endtask

  task automatic rd(logic [15:0] off, output logic [31:0] d);
    bfm.read(BASE + 32'(off), d, resp);
  endtask

  function automatic int floor_div4(longint s);
    longint r = s % 4;
    if (r < 0) r += 4;
    return int'((s - r) / 4);
  endfunction

  logic [31:0] d;
  int          v [N];
  longint      sum;
  int          exp;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    rd(REG_THIRD, d);
    check($sformatf("id register %h", d), d == 32'h0000_000d);
    wr(REG_THIRD, 32'h5555_5555);
    rd(REG_THIRD, d);
    check("id register is read-only", d == 32'h0000_000d);
    rd(REG_STATUS, d);               check("status 0 after reset", d == 0);
    rd(output_offset(N), d);         check("output 0 after reset", d == 0);
    check("output offset is 0x1c", output_offset(N) == 16'h001c);
    rd(16'h0040, d);                 check("unmapped offset reads 0", d == 0);

    wr(input_offset(2), 32'h0102_0304);
    wr(input_offset(2), 32'hffff_ffff, 4'b1000);
    rd(input_offset(2), d);
    check($sformatf("byte strobe write %h", d), d == 32'hff02_0304);

    for (int t = 0; t < 200; t++) begin
      if (t == 100) bfm.stall_pct = 50;
      sum = 0;
      for (int k = 0; k < N; k++) begin
        v[k] = t < 150 ? int'($urandom % 1000) : int'($urandom % 2000) - 1000;
        sum += longint'(v[k]);
        wr(input_offset(k), v[k]);
      end
      exp = floor_div4(sum);
      wr(REG_CONTROL, 32'h1);
      rd(REG_STATUS, d);
      check("status set after start", d == 1);
      rd(output_offset(N), d);
      check($sformatf("avg %0d expected %0d", int'(d), exp), int'(d) == exp);
      rd(REG_CONTROL, d);
      check("control read-back", d == 1);
    end
    check("response stalls exercised", bfm.resp_stalls > 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

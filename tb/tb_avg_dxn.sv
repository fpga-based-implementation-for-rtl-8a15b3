// tb_avg_dxn: self-checking test of the DxN averager register block.
//
// Drives the block through its AXI4-Lite port as firmware would. Checks the
// reset values, read-back of control, iterator and all 42 input registers,
// byte-strobe writes, that status bit 0 is cleared by a start and set when the
// result is ready, that output_reg = iterator - trunc(sum/42) for random
// ECG-range data (model computed from magnitudes, independent of the RTL's
// signed division), that a write with bit 0 clear does not start, that the
// result appears within two cycles of the control write, and that unmapped
// offsets read 0.
module tb_avg_dxn;
  import axi4l_pkg::*;
  import ecg_ip_pkg::*;

  localparam int N = 42;
  localparam logic [31:0] BASE = AVG_DXN_BASE;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  axi4l_req_t req;
  axi4l_rsp_t rsp;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  avg_dxn #(.N_TAPS(N)) dut (.aclk(clk), .aresetn(rst_n), .s_axi_req(req), .s_axi_rsp(rsp));
  axi4l_master_bfm bfm (.clk, .req, .rsp);

  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic int c_div(longint a, int b);
    longint m = a < 0 ? -a : a;
    return int'(a < 0 ? -(m / longint'(b)) : m / longint'(b));
  endfunction

  logic [31:0] d;
  int          x [N];
  int          it, exp;
  longint      sum;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    rd(REG_STATUS, d);              check("status 0 after reset", d == 0);
    rd(output_offset(N), d);        check("output 0 after reset", d == 0);
    rd(input_offset(17), d);        check("input 0 after reset", d == 0);
    check("output offset is 0xb4", output_offset(N) == 16'h00b4);

    // Read-back and byte strobes.
    wr(REG_THIRD, 32'h1122_3344);
    wr(REG_THIRD, 32'haabb_ccdd, 4'b0010);
    rd(REG_THIRD, d);
    check($sformatf("iterator byte write %h", d), d == 32'h1122_cc44);
    wr(REG_CONTROL, 32'h0000_0100);
    rd(REG_CONTROL, d);
    check("control read-back", d == 32'h0000_0100);
    rd(REG_STATUS, d);
    check("control write with bit 0 clear does not start", d == 0);
    rd(16'h0200, d);
    check("unmapped offset reads 0", d == 0);
    wr(16'h0200, 32'hffff_ffff);
    rd(REG_CONTROL, d);
    check("unmapped write leaves control alone", d == 32'h0000_0100);

    for (int t = 0; t < 40; t++) begin
      sum = 0;
      for (int k = 0; k < N; k++) begin
        x[k] = t < 20 ? int'($urandom % 4096) - 2048 : int'($urandom % 600) - 300;
        sum += longint'(x[k]);
        wr(input_offset(k), x[k]);
      end
      it = int'($urandom % 4096) - 2048;
      wr(REG_THIRD, it);
      exp = it - c_div(sum, N);
      if (t == 0)
        for (int k = 0; k < N; k++) begin
          rd(input_offset(k), d);
          check($sformatf("input_reg[%0d] read-back", k), int'(d) == x[k]);
        end
      rd(REG_STATUS, d);
      check("status still set from previous run", t == 0 ? d == 0 : d == 1);
      wr(REG_CONTROL, 32'h1);
      // The start is accepted two cycles before BVALID; the core needs two.
      rd(REG_STATUS, d);
      check("status set after start", d[0] == 1'b1);
      rd(output_offset(N), d);
      check($sformatf("output %0d expected %0d", int'(d), exp), int'(d) == exp);
    end

    // Start clears status: observe it directly on the internal flag.
    wr(REG_CONTROL, 32'h1);
    @(negedge clk);
    check("status flag set", dut.done_q);
    fork
      wr(REG_CONTROL, 32'h1);
      begin
        bit seen_clear;
        seen_clear = 0;
        repeat (6) begin
          @(negedge clk);
          if (!dut.done_q) seen_clear = 1;
        end
        check("start clears status", seen_clear);
      end
    join

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

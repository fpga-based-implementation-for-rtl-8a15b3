// tb_axi4l_regif: self-checking test of the AXI4-Lite slave front end.
//
// A small register file in the testbench sits behind the front end. The test
// checks that each write produces exactly one wr_en pulse with the right
// offset, data and strobes, that reads return the register file's contents, the
// OKAY response, the three-cycle timing from valid to BVALID/RVALID, that only
// the low 16 address bits reach the register side, and that responses are held
// while the master stalls BREADY/RREADY.
module tb_axi4l_regif;
  import axi4l_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  axi4l_req_t req;
  axi4l_rsp_t rsp;
  logic        wr_en;
  logic [15:0] wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;
  logic [3:0]  wr_strb;

  int checks = 0, failures = 0;
  int wr_pulses = 0;
  logic [15:0] last_wr_addr;
  logic [31:0] last_wr_data;
  logic [3:0]  last_wr_strb;
  logic [31:0] regs [16];

  always #5 clk = ~clk;

  axi4l_regif #(.ADDR_BITS(16)) dut (
    .clk, .rst_n, .s_axi_req(req), .s_axi_rsp(rsp),
    .wr_en, .wr_addr, .wr_data, .wr_strb, .rd_addr, .rd_data
  );

  axi4l_master_bfm bfm (.clk, .req, .rsp);

  // Register file owned by the testbench.
  always @(posedge clk) if (wr_en) begin
    wr_pulses++;
    last_wr_addr = wr_addr;
    last_wr_data = wr_data;
    last_wr_strb = wr_strb;
    regs[wr_addr[5:2]] <= wr_data;
  end
  assign rd_data = rd_addr[15:6] == '0 ? regs[rd_addr[5:2]] : 32'hdead_beef;

  initial begin
    repeat (50000) @(posedge clk);
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

  logic [31:0] model [16];
  axi_resp_e   resp;
  logic [31:0] d;
  int          t0, lat;
  int          cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    for (int k = 0; k < 16; k++) begin regs[k] = '0; model[k] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("no responses after reset", !rsp.bvalid && !rsp.rvalid && !rsp.awready && !rsp.arready);

    // Timing of one write and one read, measured directly on the channels.
    req.awaddr = 32'h43c0_0010; req.wdata = 32'h1234_5678; req.wstrb = 4'hf;
    req.awvalid = 1'b1; req.wvalid = 1'b1; req.bready = 1'b0;
    t0 = cyc;
    while (!rsp.bvalid) @(negedge clk);
    lat = cyc - t0;
    check($sformatf("write valid-to-BVALID %0d cycles, expected 2 edges", lat), lat == 2);
    check("one write pulse", wr_pulses == 1);
    check($sformatf("write offset %h (low 16 bits only)", last_wr_addr), last_wr_addr == 16'h0010);
    check("bresp OKAY", rsp.bresp == RESP_OKAY);
    req.awvalid = 1'b0; req.wvalid = 1'b0;
    repeat (3) @(negedge clk);
    check("BVALID held without BREADY", rsp.bvalid);
    check("still one write pulse", wr_pulses == 1);
    req.bready = 1'b1;
    @(negedge clk);
    req.bready = 1'b0;
    check("BVALID drops after BREADY", !rsp.bvalid);
    model[4] = 32'h1234_5678;

    req.araddr = 32'h43c0_0010; req.arvalid = 1'b1; req.rready = 1'b0;
    t0 = cyc;
    while (!rsp.rvalid) @(negedge clk);
    lat = cyc - t0;
    check($sformatf("read valid-to-RVALID %0d edges, expected 2", lat), lat == 2);
    req.arvalid = 1'b0;
    check($sformatf("read data %h", rsp.rdata), rsp.rdata == 32'h1234_5678);
    regs[4] = 32'hffff_0000;            // owner changes the register meanwhile
    repeat (2) @(negedge clk);
    check("RDATA held while RVALID and no RREADY", rsp.rvalid && rsp.rdata == 32'h1234_5678);
    regs[4] = 32'h1234_5678;
    req.rready = 1'b1;
    @(negedge clk);
    req.rready = 1'b0;
    check("RVALID drops after RREADY", !rsp.rvalid);

    // AW without W: nothing is accepted until W arrives.
    req.awaddr = 32'h0000_0008; req.awvalid = 1'b1; req.wvalid = 1'b0;
    req.wdata = 32'hcafe_f00d; req.wstrb = 4'b0101;
    repeat (4) @(negedge clk);
    check("no AWREADY without WVALID", wr_pulses == 1 && !rsp.bvalid);
    req.wvalid = 1'b1;
    while (!rsp.bvalid) @(negedge clk);
    req.awvalid = 1'b0; req.wvalid = 1'b0;
    check("write strobes passed", last_wr_strb == 4'b0101 && last_wr_data == 32'hcafe_f00d);
    req.bready = 1'b1; @(negedge clk); req.bready = 1'b0;
    model[2] = 32'hcafe_f00d;

    // Random traffic through the bus model with response stalls.
    bfm.stall_pct = 40;
    for (int t = 0; t < 300; t++) begin
      int idx;
      idx = $urandom % 16;
      if ($urandom % 2 == 1) begin
        int n_before;
        n_before = wr_pulses;
        d = $urandom;
        bfm.write({16'h43c1, 10'h0, 4'(idx), 2'b00}, d, 4'hf, resp);
        model[idx] = d;
        check("one pulse per write", wr_pulses == n_before + 1);
        check("write resp OKAY", resp == RESP_OKAY);
      end else begin
        bfm.read({16'h43c2, 10'h0, 4'(idx), 2'b00}, d, resp);
        check($sformatf("read reg %0d: %h vs %h", idx, d, model[idx]),
              d == model[idx] && resp == RESP_OKAY);
      end
    end
    check("response stalls exercised", bfm.resp_stalls > 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

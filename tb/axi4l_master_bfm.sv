// axi4l_master_bfm: AXI4-Lite master for the testbenches.
//
// Drives one request struct and watches one response struct. Signals change on
// the falling clock edge and are sampled on the falling edge, so the slave's
// rising-edge logic always sees stable inputs. write() and read() each run one
// complete transaction and return the response code (and read data). When
// stall_pct is non-zero, BREADY and RREADY are held low for a random number of
// cycles after the response becomes valid, exercising the slave's obligation to
// hold its response; resp_stalls counts those cycles. wr_cnt and rd_cnt count
// completed transactions.
module axi4l_master_bfm
  import axi4l_pkg::*;
(
  input  logic       clk,
  output axi4l_req_t req,
  input  axi4l_rsp_t rsp
);

  int unsigned stall_pct   = 0;
  int unsigned resp_stalls = 0;
  int unsigned wr_cnt      = 0;
  int unsigned rd_cnt      = 0;

  initial req = '0;

  task automatic write(input logic [31:0] addr, input logic [31:0] data,
                       input logic [3:0] strb, output axi_resp_e resp);
    @(negedge clk);
    req.awaddr  = addr;
    req.awvalid = 1'b1;
    req.wdata   = data;
    req.wstrb   = strb;
    req.wvalid  = 1'b1;
    req.bready  = 1'b0;
    while (!(rsp.awready && rsp.wready)) @(negedge clk);
    @(negedge clk);                       // handshake took place on the rising edge
    req.awvalid = 1'b0;
    req.wvalid  = 1'b0;
    while (!rsp.bvalid) @(negedge clk);
    while (stall_pct != 0 && ($urandom % 100) < stall_pct) begin
      resp_stalls++;
      @(negedge clk);
    end
    req.bready = 1'b1;
    resp = rsp.bresp;
    @(negedge clk);
    req.bready = 1'b0;
    wr_cnt++;
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data,
                      output axi_resp_e resp);
    @(negedge clk);
    req.araddr  = addr;
    req.arvalid = 1'b1;
    req.rready  = 1'b0;
    while (!rsp.arready) @(negedge clk);
    @(negedge clk);
    req.arvalid = 1'b0;
    while (!rsp.rvalid) @(negedge clk);
    while (stall_pct != 0 && ($urandom % 100) < stall_pct) begin
      resp_stalls++;
      @(negedge clk);
    end
    req.rready = 1'b1;
    data = rsp.rdata;
    resp = rsp.rresp;
    @(negedge clk);
    req.rready = 1'b0;
    rd_cnt++;
  endtask

endmodule

// axi4l_regif: AXI4-Lite slave front end for a block of 32-bit registers.
//
// Each accelerator's S00_AXI port goes through this module, which turns AXI4-Lite
// transactions into one-cycle register strobes for the block that owns the
// registers:
//   * Write: once both AWVALID and WVALID are high and no write response is
//     pending, AWREADY and WREADY are raised together for one cycle (registered,
//     so they rise the cycle after both valids are seen). In the cycle of the
//     handshake wr_en pulses with the byte offset, data and byte strobes, and
//     BVALID rises on the next edge with an OKAY response. It stays until BREADY.
//   * Read: once ARVALID is high and no read data is pending, ARREADY is raised
//     for one cycle. In the handshake cycle rd_addr is valid, the owner
//     returns rd_data combinationally, and it is registered into RDATA with
//     RVALID, held until RREADY.
// BVALID thus rises on the second rising edge after AWVALID and WVALID are both
// high, and RVALID on the second rising edge after ARVALID. All addresses
// answer OKAY; undecoded ones read 0 if the owner returns 0. Only the low
// ADDR_BITS bits of the address are passed on (64 KiB windows in this system).
// One transaction of each kind is in flight at a time, which is all the
// AXI4-Lite masters of this system issue.
// Reset is synchronous and active low, as on the vendor's AXI peripherals.
// In the original system this logic comes from the vendor's generated IP
// wrapper; the implementation and its timing here are this design's own.
module axi4l_regif
  import axi4l_pkg::*;
#(
  parameter int unsigned ADDR_BITS = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  axi4l_req_t           s_axi_req,
  output axi4l_rsp_t           s_axi_rsp,
  // register side
  output logic                 wr_en,
  output logic [ADDR_BITS-1:0] wr_addr,
  output logic [DATA_W-1:0]    wr_data,
  output logic [STRB_W-1:0]    wr_strb,
  output logic [ADDR_BITS-1:0] rd_addr,
  input  logic [DATA_W-1:0]    rd_data
);

  logic              aw_rdy_q, ar_rdy_q;
  logic              bvalid_q, rvalid_q;
  logic [DATA_W-1:0] rdata_q;
  logic              rd_en;

  // Write handshake: AW and W are taken in the same cycle.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      aw_rdy_q <= 1'b0;
      bvalid_q <= 1'b0;
    end else begin
      aw_rdy_q <= !aw_rdy_q && s_axi_req.awvalid && s_axi_req.wvalid && !bvalid_q;
      if (wr_en)
        bvalid_q <= 1'b1;
      else if (s_axi_req.bready)
        bvalid_q <= 1'b0;
    end
  end

  assign wr_en   = aw_rdy_q && s_axi_req.awvalid && s_axi_req.wvalid;
  assign wr_addr = s_axi_req.awaddr[ADDR_BITS-1:0];
  assign wr_data = s_axi_req.wdata;
  assign wr_strb = s_axi_req.wstrb;

  // Read handshake. Reads have no side effects in the register blocks, so the
  // read strobe stays internal.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ar_rdy_q <= 1'b0;
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else begin
      ar_rdy_q <= !ar_rdy_q && s_axi_req.arvalid && !rvalid_q;
      if (rd_en) begin
        rvalid_q <= 1'b1;
        rdata_q  <= rd_data;
      end else if (s_axi_req.rready) begin
        rvalid_q <= 1'b0;
      end
    end
  end

  assign rd_en   = ar_rdy_q && s_axi_req.arvalid;
  assign rd_addr = s_axi_req.araddr[ADDR_BITS-1:0];

  always_comb begin
    s_axi_rsp         = '0;
    s_axi_rsp.awready = aw_rdy_q;
    s_axi_rsp.wready  = aw_rdy_q;
    s_axi_rsp.bresp   = RESP_OKAY;
    s_axi_rsp.bvalid  = bvalid_q;
    s_axi_rsp.arready = ar_rdy_q;
    s_axi_rsp.rdata   = rdata_q;
    s_axi_rsp.rresp   = RESP_OKAY;
    s_axi_rsp.rvalid  = rvalid_q;
  end

  // Handshake rules of AXI: a response, once valid, is held with its payload
  // until the master takes it; the master holds its requests the same way.
  a_bvalid_held: assert property (@(posedge clk) disable iff (!rst_n)
    bvalid_q && !s_axi_req.bready |=> bvalid_q);
  a_rvalid_held: assert property (@(posedge clk) disable iff (!rst_n)
    rvalid_q && !s_axi_req.rready |=> rvalid_q && $stable(rdata_q));
  a_awvalid_held: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_req.awvalid && !aw_rdy_q |=> s_axi_req.awvalid);
  a_arvalid_held: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_req.arvalid && !ar_rdy_q |=> s_axi_req.arvalid);

endmodule

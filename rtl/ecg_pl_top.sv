// ecg_pl_top: programmable-logic side of the ECG QRS-detection system.
//
// The system splits a DxN denoising filter and a QRS detector between an ARM
// processor and three small accelerators in the programmable logic. This module
// holds the accelerators as the processor sees them through its AXI
// interconnect:
//   avg_dxn_0   DxN filter averager (42 taps)       base 0x43c0_0000
//   ecg_avgr_0  4-value averager for the detector   base 0x43c1_0000
//   ecg_avgr_1  4-value averager for the detector   base 0x43c2_0000
// Each has its own AXI4-Lite slave port, brought out as a request/response
// struct pair; the interconnect, the processor, its reset generator and the
// GPIO block are vendor parts outside this module. All run on one clock (100 MHz
// in the system) with a synchronous active-low reset. The three blocks are
// independent: the processor drives them one register access at a time.
// Instance names, the shared clock and reset and the addresses follow the
// original system; bringing each AXI port out as a struct pair is this
// design's choice.
module ecg_pl_top
  import axi4l_pkg::*;
(
  input  logic       aclk,
  input  logic       aresetn,
  input  axi4l_req_t dxn_axi_req,
  output axi4l_rsp_t dxn_axi_rsp,
  input  axi4l_req_t avgr0_axi_req,
  output axi4l_rsp_t avgr0_axi_rsp,
  input  axi4l_req_t avgr1_axi_req,
  output axi4l_rsp_t avgr1_axi_rsp
);

  avg_dxn #(.N_TAPS(ecg_ip_pkg::DXN_N)) avg_dxn_0 (
    .aclk, .aresetn,
    .s_axi_req (dxn_axi_req),
    .s_axi_rsp (dxn_axi_rsp)
  );

  ecg_avgr #(.N_IN(4)) ecg_avgr_0 (
    .aclk, .aresetn,
    .s_axi_req (avgr0_axi_req),
    .s_axi_rsp (avgr0_axi_rsp)
  );

  ecg_avgr #(.N_IN(4)) ecg_avgr_1 (
    .aclk, .aresetn,
    .s_axi_req (avgr1_axi_req),
    .s_axi_rsp (avgr1_axi_rsp)
  );

endmodule

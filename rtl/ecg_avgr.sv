// ecg_avgr: averaging accelerator for the QRS detector, AXI4-Lite registers.
//
// The QRS detector (adaptive amplitude and slope criteria) runs in firmware
// and calls an averaging routine over four values at two places; this block
// computes one such average. The system has two of them, one per call site,
// so each can keep its inputs loaded.
// output_reg = (input_reg[0] + ... + input_reg[N_IN-1]) >>> log2(N_IN)
// (arithmetic shift; equal to integer division for non-negative sums).
//
// Register map (byte offsets, 32-bit registers):
//   0x00       control_reg   RW  bit 0: writing 1 starts one computation
//   0x04       status_reg    RO  bit 0: result ready, cleared by the start
//   0x08       id_reg        RO  constant 0x0000000d
//   0x0c+4k    input_reg[k]  RW  k = 0 .. N_IN-1
//   0x0c+4N    output_reg    RO  average (0x1c for N_IN = 4)
// Other offsets read 0 and ignore writes. Byte strobes are honoured.
//
// Timing: the result is ready two cycles after the write to control_reg is
// accepted. The identification value, the sum of four inputs and the shift by
// two follow the original design; the register order after status_reg (id in the slot
// the DxN block uses for its iterator) and the start-on-write behaviour are this
// design's choices.
module ecg_avgr
  import axi4l_pkg::*;
  import ecg_ip_pkg::*;
#(
  parameter int unsigned N_IN = 4
) (
  input  logic       aclk,
  input  logic       aresetn,
  input  axi4l_req_t s_axi_req,
  output axi4l_rsp_t s_axi_rsp
);

  localparam int unsigned AB = 16;

  logic          wr_en;
  logic [AB-1:0] wr_addr, rd_addr;
  logic [31:0]   wr_data, rd_data;
  logic [3:0]    wr_strb;

  axi4l_regif #(.ADDR_BITS(AB)) u_regif (
    .clk      (aclk),
    .rst_n    (aresetn),
    .s_axi_req,
    .s_axi_rsp,
    .wr_en, .wr_addr, .wr_data, .wr_strb,
    .rd_addr, .rd_data
  );

  logic        [31:0] control_q;
  logic               done_q;
  logic signed [31:0] input_q [N_IN];
  logic signed [31:0] result;
  logic               start, core_done;

  function automatic logic [31:0] apply_strb(logic [31:0] old, logic [31:0] d,
                                             logic [3:0] s);
    logic [31:0] r;
    for (int b = 0; b < 4; b++)
      r[8*b +: 8] = s[b] ? d[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  assign start = wr_en && wr_addr == REG_CONTROL && wr_strb[0] && wr_data[CTRL_START_BIT];

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      control_q <= '0;
      for (int k = 0; k < N_IN; k++) input_q[k] <= '0;
    end else if (wr_en) begin
      if (wr_addr == REG_CONTROL)
        control_q <= apply_strb(control_q, wr_data, wr_strb);
      for (int k = 0; k < N_IN; k++)
        if (wr_addr == input_offset(k))
          input_q[k] <= apply_strb(input_q[k], wr_data, wr_strb);
    end
  end

  always_ff @(posedge aclk) begin
    if (!aresetn)
      done_q <= 1'b0;
    else if (start)
      done_q <= 1'b0;
    else if (core_done)
      done_q <= 1'b1;
  end

  ecg_avg_core #(.N_IN(N_IN), .DATA_W(32)) u_core (
    .clk    (aclk),
    .rst_n  (aresetn),
    .start,
    .values (input_q),
    .done   (core_done),
    .result
  );

  always_comb begin
    rd_data = '0;
    if (rd_addr == REG_CONTROL) rd_data = control_q;
    if (rd_addr == REG_STATUS)  rd_data = 32'(done_q) << STAT_DONE_BIT;
    if (rd_addr == REG_THIRD)   rd_data = ECG_AVGR_ID;
    for (int k = 0; k < N_IN; k++)
      if (rd_addr == input_offset(k)) rd_data = input_q[k];
    if (rd_addr == output_offset(N_IN)) rd_data = result;
  end

endmodule

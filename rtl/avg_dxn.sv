// avg_dxn: DxN filter accelerator with an AXI4-Lite register interface.
//
// The processor keeps the sample array and the loop of the DxN filter; for each
// output sample it hands the averaging step to this block. Firmware writes the
// current sample to iterator_reg and the N_TAPS = 42 samples spaced six apart
// (x[i-126], x[i-120], ..., x[i+120]) to input_reg[0..41], writes 1 to bit 0 of
// control_reg, waits for bit 0 of status_reg and reads output_reg, which holds
//     iterator - (input_reg[0] + ... + input_reg[41]) / 42
// with the division truncating toward zero (see dxn_avg_core).
//
// Register map (byte offsets in the 64 KiB window, all 32 bits):
//   0x00        control_reg   RW  bit 0: writing 1 starts one computation
//   0x04        status_reg    RO  bit 0: 1 = output_reg holds the result of the
//                                 last start; cleared by the start
//   0x08        iterator_reg  RW  current sample
//   0x0c+4k     input_reg[k]  RW  k = 0 .. N_TAPS-1
//   0x0c+4N     output_reg    RO  filtered sample (0xb4 for N_TAPS = 42)
// Other offsets read 0 and ignore writes. Byte strobes are honoured.
//
// Timing: the result is ready two clock cycles after the write to control_reg
// is accepted, sooner than the processor can read status_reg, so a single poll
// normally finds it done. The input registers keep their values, so firmware
// may rewrite only the ones that change between samples.
// The register order follows the firmware's register structure; the start-on-
// write behaviour and the status clearing are this design's choices.
module avg_dxn
  import axi4l_pkg::*;
  import ecg_ip_pkg::*;
#(
  parameter int unsigned N_TAPS = 42
) (
  input  logic       aclk,
  input  logic       aresetn,
  input  axi4l_req_t s_axi_req,
  output axi4l_rsp_t s_axi_rsp
);

  localparam int unsigned AB = 16;  // decoded address bits (64 KiB window)

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
  logic signed [31:0] iterator_q;
  logic signed [31:0] input_q [N_TAPS];
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
      control_q  <= '0;
      iterator_q <= '0;
      for (int k = 0; k < N_TAPS; k++) input_q[k] <= '0;
    end else if (wr_en) begin
      if (wr_addr == REG_CONTROL)
        control_q <= apply_strb(control_q, wr_data, wr_strb);
      if (wr_addr == REG_THIRD)
        iterator_q <= apply_strb(iterator_q, wr_data, wr_strb);
      for (int k = 0; k < N_TAPS; k++)
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

  dxn_avg_core #(.N_TAPS(N_TAPS), .DATA_W(32)) u_core (
    .clk      (aclk),
    .rst_n    (aresetn),
    .start,
    .iter_sample (iterator_q),
    .samples  (input_q),
    .done     (core_done),
    .result
  );

  always_comb begin
    rd_data = '0;
    if (rd_addr == REG_CONTROL) rd_data = control_q;
    if (rd_addr == REG_STATUS)  rd_data = 32'(done_q) << STAT_DONE_BIT;
    if (rd_addr == REG_THIRD)   rd_data = iterator_q;
    for (int k = 0; k < N_TAPS; k++)
      if (rd_addr == input_offset(k)) rd_data = input_q[k];
    if (rd_addr == output_offset(N_TAPS)) rd_data = result;
  end

endmodule

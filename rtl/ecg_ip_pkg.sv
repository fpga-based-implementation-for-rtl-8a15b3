// ecg_ip_pkg: register maps and system addresses of the ECG accelerators.
//
// Both accelerators expose 32-bit registers in the order of the firmware's
// register structure: control, status, a third word, the input array, then the
// output. For the DxN averager the third word is the iterator register (the
// sample being filtered); for the ECG averager it is the read-only
// identification register, whose value 0x0000000d is fixed by the design.
// Offsets are byte addresses inside the block's 64 KiB window.
//
// Base addresses are the ones of the system's address map: GPIO at 0x4120_0000,
// the DxN averager at 0x43c0_0000, the two ECG averagers at 0x43c1_0000 and
// 0x43c2_0000, each window 64 KiB.
// The base addresses, the identification value, D = 6, N = 42 and the order
// control, status, iterator, inputs, output follow the original design; the
// slot of id_reg in the ECG averager and the byte offsets derived from a
// packed word order are this design's choices.
package ecg_ip_pkg;

  // System address map.
  localparam logic [31:0] GPIO_BASE     = 32'h4120_0000;
  localparam logic [31:0] AVG_DXN_BASE  = 32'h43c0_0000;
  localparam logic [31:0] ECG_AVGR0_BASE = 32'h43c1_0000;
  localparam logic [31:0] ECG_AVGR1_BASE = 32'h43c2_0000;
  localparam logic [31:0] WINDOW_SIZE   = 32'h0001_0000;

  // DxN filter constants: spacing D between averaged samples and count N.
  localparam int unsigned DXN_D = 6;
  localparam int unsigned DXN_N = 42;

  // Common register offsets.
  localparam logic [15:0] REG_CONTROL = 16'h0000;  // bit 0: write 1 to start
  localparam logic [15:0] REG_STATUS  = 16'h0004;  // bit 0: result ready (RO)
  localparam logic [15:0] REG_THIRD   = 16'h0008;  // iterator (DxN) / id (ECG)
  localparam logic [15:0] REG_INPUT0  = 16'h000c;  // input_reg[0]

  localparam int unsigned CTRL_START_BIT = 0;
  localparam int unsigned STAT_DONE_BIT  = 0;

  localparam logic [31:0] ECG_AVGR_ID = 32'h0000_000d;

  // Byte offset of input_reg[k] and of output_reg for a block with n inputs.
  function automatic logic [15:0] input_offset(int unsigned k);
    return REG_INPUT0 + 16'(4 * k);
  endfunction

  function automatic logic [15:0] output_offset(int unsigned n);
    return REG_INPUT0 + 16'(4 * n);
  endfunction

endpackage

// imac_pkg: types and constants shared by the iMAC (im2col + MAC) convolution
// accelerator.
//
// Data are IEEE-754 single-precision words (the accelerator runs a 32-bit
// floating-point CNN). The layer configuration that the host writes into the
// controller's registers is carried between blocks as the struct conv_cfg_t.
// Field widths are this design's choice: 16 bits cover a 224x224 feature map
// (50,176 elements) and every channel count the default memories can hold.
package imac_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP32_ZERO = 32'h0000_0000;
  localparam fp32_t FP32_QNAN = 32'h7fc0_0000;

  // Convolution layer slice handled by one accelerator run: one output
  // channel, NCH input channels of an H x W map, K x K kernel, PAD zero
  // padding on every side, stride 1.
  typedef struct packed {
    logic [15:0] height;    // input (and output) rows
    logic [15:0] width;     // input (and output) columns
    logic [15:0] nch;       // input channels held in the BRAMs this run
    logic [3:0]  ksize;     // kernel size K (1 selects the im2col bypass)
    logic [3:0]  pad;       // zero padding
    logic        first;     // 1: first partition, overwrite the output BRAM
  } conv_cfg_t;

  // Register map of the host (control) port, word addresses.
  localparam logic [2:0] REG_CTRL   = 3'd0; // W: bit0 ARM, bit1 FIRST, bit2 READOUT
  localparam logic [2:0] REG_STATUS = 3'd1; // R: bit0 DONE, bit1 BUSY, bit2 READOUT busy
  localparam logic [2:0] REG_HEIGHT = 3'd2;
  localparam logic [2:0] REG_WIDTH  = 3'd3;
  localparam logic [2:0] REG_NCH    = 3'd4;
  localparam logic [2:0] REG_KSIZE  = 3'd5;
  localparam logic [2:0] REG_PAD    = 3'd6;

endpackage

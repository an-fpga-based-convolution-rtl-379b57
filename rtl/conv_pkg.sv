// conv_pkg: constants and types shared by the convolution accelerator.
//
// The core computes a 2-D convolution with a weight-stationary line of
// Kernel-Channel Processing Engines (KCPEs). E KCPEs each hold a K x J
// matrix of Processing Elements (PEs): K kernels by J input channels.
// E, K, J, the 8-bit operand width, the 16-bit engine partial sum, the
// 8-bit output element, the 32-bit output word and the 4-cycle engine
// latency follow the published configuration; the register map, the
// field packing of the configuration words and the pipeline tag are this
// design's own choices.
package conv_pkg;

  // Array geometry of the published configuration.
  localparam int unsigned E       = 3;   // KCPEs in the line (one per kernel column s)
  localparam int unsigned K       = 4;   // kernels per KCPE
  localparam int unsigned J       = 3;   // channels per KCPE
  localparam int unsigned DATA_W  = 8;   // activation and weight width
  localparam int unsigned PSUM_W  = 16;  // engine partial-sum width
  localparam int unsigned OUT_W   = 8;   // stored output element width
  localparam int unsigned N_DELAY = 4;   // cycles from input pixel to engine partial sum
  localparam int unsigned ADDR_W  = 32;  // address width on the core's memory ports

  // Register map (byte offsets on the processor register port).
  localparam logic [7:0] REG_CTRL           = 8'h00; // [0] start (pulse), [1] soft reset
  localparam logic [7:0] REG_STATUS         = 8'h04; // [0] busy, [1] done, [2] output overflow
  localparam logic [7:0] REG_INPUTSHAPE     = 8'h08; // [31:16] H, [15:0] W
  localparam logic [7:0] REG_INPUTRSTCNT    = 8'h0C; // H*W: words per channel-group plane
  localparam logic [7:0] REG_KERNELSHAPE    = 8'h10; // [31:16] M, [15:0] C
  localparam logic [7:0] REG_KERNELSIZE     = 8'h14; // [31:16] R, [15:0] S
  localparam logic [7:0] REG_OUTPUTSIZE     = 8'h18; // [31:16] P, [15:0] Q
  localparam logic [7:0] REG_WEIGHTINTERVAL = 8'h1C; // P*Q: output words per kernel group

  localparam int unsigned CTRL_START_BIT = 0;
  localparam int unsigned CTRL_SRST_BIT  = 1;

  // Configuration seen by the core.
  typedef struct packed {
    logic [15:0] h;
    logic [15:0] w;
    logic [31:0] plane_words;    // H*W
    logic [15:0] m;
    logic [15:0] c;
    logic [15:0] r;
    logic [15:0] s;
    logic [15:0] p;
    logic [15:0] q;
    logic [31:0] group_words;    // P*Q
  } conv_conf_t;

  // Sideband that travels with each input pixel through the engine to the
  // accumulator: whether the window ending at this pixel is a valid output
  // position, whether this is the first contribution to that output, and the
  // output-buffer word address.
  typedef struct packed {
    logic              emit;
    logic              first;
    logic [ADDR_W-1:0] addr;
  } psum_tag_t;

endpackage

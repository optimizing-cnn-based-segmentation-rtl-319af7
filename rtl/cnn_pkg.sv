// Shared types and constants of the CNN segmentation accelerator.
//
// The processor describes one layer with a layer_cfg_t, written through the
// AXI4-Lite register map (axil_bridge) and held stable while the layer runs.
// Feature maps and coefficients live in external memory as signed
// fixed-point words packed MEM_W/DW per memory beat (64-bit DDR datapath, as
// in the reference board). The register offsets and the fixed-point format
// are choices of this design.
package cnn_pkg;

  localparam int unsigned MEM_W  = 64;   // external memory datapath width
  localparam int unsigned ADDR_W = 32;   // external memory beat address width
  localparam int unsigned ID_W   = 2;    // read id echoed by the memory

  typedef enum logic [0:0] {MODE_CONV = 1'b0, MODE_DECONV = 1'b1} mode_e;

  typedef struct packed {
    mode_e              mode;       // which computation unit runs the layer
    logic [15:0]        nc;         // input channels N_C
    logic [15:0]        nf;         // filters N_F
    logic [15:0]        h;          // block height (input)
    logic [15:0]        w;          // block width (input)
    logic [7:0]         k;          // deconv kernel size
    logic [7:0]         s;          // deconv stride
    logic [7:0]         p;          // deconv padding removed from the border
    logic               pool_en;    // conv: 2x2 max pooling after convolution
    logic               crop_en;    // conv: drop `crop` pixels on every border
    logic [7:0]         crop;
    logic               relu_en;    // clamp negative results to zero on write-back
    logic [ADDR_W-1:0]  in_base;    // beat address of the input block
    logic [ADDR_W-1:0]  coef_base;  // beat address of the coefficient stream
    logic [ADDR_W-1:0]  out_base;   // beat address of the output maps
  } layer_cfg_t;

  // AXI4-Lite register map (byte offsets)
  localparam logic [7:0] REG_CTRL      = 8'h00; // [0] start (self-clearing)
  localparam logic [7:0] REG_STATUS    = 8'h04; // [0] busy, [1] done (sticky)
  localparam logic [7:0] REG_MODE      = 8'h08; // [0] mode, [1] pool_en, [2] crop_en, [3] relu_en
  localparam logic [7:0] REG_NC_NF     = 8'h0C; // [15:0] nc, [31:16] nf
  localparam logic [7:0] REG_H_W       = 8'h10; // [15:0] h, [31:16] w
  localparam logic [7:0] REG_KSP       = 8'h14; // [7:0] k, [15:8] s, [23:16] p, [31:24] crop
  localparam logic [7:0] REG_IN_BASE   = 8'h18;
  localparam logic [7:0] REG_COEF_BASE = 8'h1C;
  localparam logic [7:0] REG_OUT_BASE  = 8'h20;
  localparam logic [7:0] REG_CYCLES    = 8'h24; // cycles taken by the last layer

  // Fixed-point write-back: arithmetic shift by FRAC, optional ReLU, saturate to DW bits.
  // Accumulators up to 128 bits (2*DW+8 for DW up to 60).
  function automatic logic signed [127:0] quantize(input logic signed [127:0] acc,
                                                   input int unsigned frac,
                                                   input int unsigned dw,
                                                   input logic relu);
    logic signed [127:0] v, hi, lo;
    v  = acc >>> frac;
    hi = (128'sd1 <<< (dw - 1)) - 128'sd1;
    lo = -(128'sd1 <<< (dw - 1));
    if (relu && v < 0) v = 0;
    if (v > hi) v = hi;
    if (v < lo) v = lo;
    return v;
  endfunction

endpackage

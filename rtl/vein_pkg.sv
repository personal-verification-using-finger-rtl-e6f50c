// vein_pkg: types and constants shared by the finger-vein image
// preprocessing core.
//
// The core keeps every image in one 2^18 x 8-bit buffer and moves pixels
// through window filters. Every window carries a small tag (the address the
// filtered pixel is written to, and whether it is the last pixel of the pass)
// down the filter pipeline, so each filter can have its own latency.
// Pixel codes follow the usual binary-image convention of the design:
// 0 = background, 255 = foreground; the Canny stage also uses 128 for a weak
// edge.
package vein_pkg;

  localparam int BUF_AW = 18;    // image buffer address width

  localparam logic [7:0] PIX_OFF  = 8'd0;
  localparam logic [7:0] PIX_WEAK = 8'd128;
  localparam logic [7:0] PIX_ON   = 8'd255;

  typedef logic [BUF_AW-1:0] addr_t;

  // Tag travelling with a window through a filter.
  typedef struct packed {
    addr_t addr;   // destination address of the filtered pixel
    logic  last;   // last pixel of the pass
  } tag_t;

  // Module selected when the core runs a single preprocessing module.
  typedef enum logic [2:0] {
    OP_MEDIAN, OP_ROI, OP_GAUSS, OP_THRESH, OP_BMED, OP_THIN
  } op_t;

endpackage

// ipu_pkg: types and constants shared by the image processing unit.
// The frame size (640x480, 8-bit grey levels) and the 11-bit signed gradient
// width come from the design description; the display-mode encoding is this
// implementation's own choice.
package ipu_pkg;
  localparam int unsigned IMG_W   = 640;   // pixels per line
  localparam int unsigned IMG_H   = 480;   // lines per frame
  localparam int unsigned PIX_W   = 8;     // grey-level width
  localparam int unsigned GRAD_W  = 11;    // signed Sobel gradient: 4*255 plus sign
  localparam int unsigned NBINS   = 256;   // histogram bins, one per grey level

  typedef logic [PIX_W-1:0]         pixel_t;
  typedef logic signed [GRAD_W-1:0] grad_t;

  // What the display multiplexer shows.
  typedef enum logic [1:0] {
    DISP_RAW       = 2'd0,   // captured frame
    DISP_EQUALISED = 2'd1,   // captured frame through the equalisation LUT
    DISP_SOBEL     = 2'd2,   // Sobel edge image
    DISP_CORNERS   = 2'd3    // captured frame with corners overlaid in white
  } disp_mode_e;
endpackage

// ar_pkg: types and constants shared by the augmented-reality video pipeline.
//
// A pixel is stored and processed as hue, saturation and value, 8 bits each,
// packed into 24 bits. Hue runs 0..255 for one turn of the colour wheel
// (red at 0, yellow near 43, green near 85, blue near 171). The four marker
// colours on the corners of the picture frame are named by marker_e; corner
// A' (top left) is blue, B' (top right) green, C' (bottom right) red and
// D' (bottom left) yellow. The index and coordinate widths cover the 640x480
// image the design is built around (the image size itself is a parameter of
// each module); the pixel format and the corner-to-colour mapping are this
// design's own choices.
package ar_pkg;

  localparam int unsigned IDX_W   = 19;   // enough for 640*480 = 307200 pixels
  localparam int unsigned COORD_W = 10;   // x up to 639, y up to 479

  typedef struct packed {
    logic [7:0] h;
    logic [7:0] s;
    logic [7:0] v;
  } hsv_t;

  typedef enum logic [1:0] {
    MK_BLUE   = 2'd0,
    MK_GREEN  = 2'd1,
    MK_RED    = 2'd2,
    MK_YELLOW = 2'd3
  } marker_e;

  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
  } coord_t;

  // Hue centres of the markers on the 0..255 wheel.
  localparam logic [7:0] HUE_RED    = 8'd0;
  localparam logic [7:0] HUE_YELLOW = 8'd43;
  localparam logic [7:0] HUE_GREEN  = 8'd85;
  localparam logic [7:0] HUE_BLUE   = 8'd171;

  // Roles of the three frame buffers held in the ZBT memory.
  typedef enum logic [1:0] {
    BUF_CAPTURE = 2'd0,
    BUF_PROCESS = 2'd1,
    BUF_DISPLAY = 2'd2
  } buf_role_e;

endpackage

// ar_system: augmented-reality video pipeline. A camera watches a picture
// frame with coloured markers on its corners; the system finds the corners
// and pastes a filtered, perspective-skewed copy of the previously displayed
// picture into the frame, so the output shows the scene containing itself.
//
// Data flow (one frame period, 1/30 s at the camera's rate):
//   ntsc_capture      camera bytes -> H/S/V pixels -> capturing image;
//                     marker-coloured pixels -> object_recognition
//   object_recognition  centre of mass per colour -> corners A'B'C'D'
//   frame_done        rotates the three images in zbt_memory
//                     (capturing -> processing -> displaying -> capturing)
//                     and closes the corner measurement
//   coords_valid      starts arbi_skew if all four markers were found
//   arbi_skew         walks every source pixel, asks arbi_lpf for it, writes
//                     it into the processing image at its skewed position
//   arbi_lpf          4x4 low-pass of the displaying image, cutoff pi/M with
//                     M from lpf_factor (size of the quadrilateral)
//   vga_write         shows the displaying image at 640x480, 60 Hz
// The processing image is the frame just captured; after the skew has drawn
// into it, the next rotation makes it the displayed picture, and it is the
// source of the next skew: this is the recursion.
// Everything runs in one clock domain (clk, meant for about 120 MHz);
// tv_valid marks bytes of the camera stream and vga_pix_ce pixel slots of the
// VGA raster. The two ZBT SRAM chips are outside: their buses are ports. The
// frame store's processing-image read port has no user inside the pipeline
// and is brought out as ports.
// The block structure and the connections follow the system's block diagram;
// the single clock domain and the start rule for the skew are this design's
// own choices.
module ar_system
  import ar_pkg::*;
#(
  parameter int unsigned IMG_W   = 640,
  parameter int unsigned IMG_H   = 480,
  parameter int unsigned RAM_AW  = 19,
  parameter int unsigned H_START = 40,
  parameter int unsigned H_FP    = 16,
  parameter int unsigned H_SYNC  = 96,
  parameter int unsigned H_BP    = 48,
  parameter int unsigned V_FP    = 10,
  parameter int unsigned V_SYNC  = 2,
  parameter int unsigned V_BP    = 33
) (
  input  logic              clk,
  input  logic              rst,
  // camera (BT.656 bytes from the video decoder)
  input  logic              tv_valid,
  input  logic [7:0]        tv_data,
  // VGA monitor
  input  logic              vga_pix_ce,
  output logic              vga_hsync_n,
  output logic              vga_vsync_n,
  output logic              vga_blank,
  output logic [7:0]        vga_r,
  output logic [7:0]        vga_g,
  output logic [7:0]        vga_b,
  output logic [10:0]       vga_hcount,
  output logic [9:0]        vga_vcount,
  // ZBT SRAM chips
  output logic [RAM_AW-1:0] ram_addr  [2],
  output logic              ram_we    [2],
  output hsv_t              ram_wdata [2],
  input  hsv_t              ram_rdata [2],
  // processing-image read port of the frame store
  input  logic              prr_req,
  input  logic [IDX_W-1:0]  prr_idx,
  output logic              prr_ack,
  output logic              prr_rvalid,
  output hsv_t              prr_rdata,
  // status
  output logic              frame_done,
  output logic [1:0]        display_buf,
  output coord_t            corner [4],
  output logic [3:0]        lpf_m,
  output logic [3:0]        corners_found,
  output logic              skew_busy,
  output logic              skew_done,
  output logic              capture_overrun,
  output logic              vga_underflow
);

  // ---- capture -------------------------------------------------------------------
  logic             cap_req, cap_ack;
  logic [IDX_W-1:0] cap_idx;
  hsv_t             cap_pix;
  logic             det_valid;
  marker_e          det_color;
  coord_t           det_xy;

  ntsc_capture #(.IMG_W(IMG_W), .IMG_H(IMG_H), .H_START(H_START)) u_capture (
    .clk, .rst, .tv_valid, .tv_data,
    .wr_req(cap_req), .wr_idx(cap_idx), .wr_pix(cap_pix), .wr_ack(cap_ack),
    .det_valid, .det_color, .det_xy,
    .frame_done, .overrun(capture_overrun)
  );

  // ---- object recognition ----------------------------------------------------------
  logic coords_valid;
  object_recognition u_objrec (
    .clk, .rst, .det_valid, .det_color, .det_xy, .frame_done,
    .corner, .found(corners_found), .coords_valid, .busy()
  );

  // ---- ArbiLPF and ArbiSkew ----------------------------------------------------------
  logic             px_req, lpf_busy, lpf_valid;
  coord_t           px_xy;
  hsv_t             lpf_pix;
  logic             win_req, win_ack, win_rvalid;
  logic [IDX_W-1:0] win_idx [16];
  hsv_t             win_pix [16];
  logic             prw_req, prw_ack;
  logic [IDX_W-1:0] prw_idx;
  hsv_t             prw_pix;

  lpf_factor #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_factor (.clk, .rst, .corner, .m(lpf_m));

  arbi_lpf #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_lpf (
    .clk, .rst, .m(lpf_m), .px_req, .px_xy, .busy(lpf_busy),
    .win_req, .win_idx, .win_ack, .win_rvalid, .win_pix,
    .out_valid(lpf_valid), .out_pix(lpf_pix)
  );

  arbi_skew #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_skew (
    .clk, .rst,
    .start(coords_valid && corners_found == 4'hF), .corner,
    .busy(skew_busy), .done(skew_done),
    .lpf_req(px_req), .lpf_xy(px_xy), .lpf_busy, .lpf_valid, .lpf_pix,
    .wr_req(prw_req), .wr_idx(prw_idx), .wr_pix(prw_pix), .wr_ack(prw_ack)
  );

  // ---- VGA -------------------------------------------------------------------------------
  logic             vga_req, vga_ack, vga_rvalid;
  logic [IDX_W-1:0] vga_idx;
  hsv_t             vga_rdata;

  vga_write #(.IMG_W(IMG_W), .IMG_H(IMG_H), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
              .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)) u_vga (
    .clk, .rst, .pix_ce(vga_pix_ce),
    .rd_req(vga_req), .rd_idx(vga_idx), .rd_ack(vga_ack), .rd_rvalid(vga_rvalid), .rd_data(vga_rdata),
    .hsync_n(vga_hsync_n), .vsync_n(vga_vsync_n), .blank(vga_blank),
    .red(vga_r), .green(vga_g), .blue(vga_b), .hcount(vga_hcount), .vcount(vga_vcount),
    .underflow(vga_underflow)
  );

  // ---- frame store -----------------------------------------------------------------------
  logic [1:0] role_buf [3];

  zbt_memory #(.IMG_W(IMG_W), .IMG_H(IMG_H), .RAM_AW(RAM_AW), .NWIN(16)) u_mem (
    .clk, .rst, .frame_swap(frame_done),
    .cap_wr_req(cap_req), .cap_wr_idx(cap_idx), .cap_wr_pix(cap_pix), .cap_wr_ack(cap_ack),
    .prw_req, .prw_idx, .prw_pix, .prw_ack,
    .prr_req, .prr_idx, .prr_ack, .prr_rvalid, .prr_rdata,
    .vga_req, .vga_idx, .vga_ack, .vga_rvalid, .vga_rdata,
    .lpf_req(win_req), .lpf_idx(win_idx), .lpf_ack(win_ack), .lpf_rvalid(win_rvalid), .lpf_rdata(win_pix),
    .ram_addr, .ram_we, .ram_wdata, .ram_rdata,
    .role_buf
  );
  assign display_buf = role_buf[BUF_DISPLAY];

endmodule

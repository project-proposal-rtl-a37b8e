// ntsc_capture: receives the digitised camera stream, converts each pixel to
// H/S/V, writes it into the capturing image, reports pixels whose hue matches
// a corner-marker colour, and pulses frame_done after each complete frame.
//
// Input: the camera's NTSC signal digitised by the board's video decoder as an
// 8-bit ITU-R BT.656 byte stream (Cb Y Cr Y ..., with FF 00 00 XY timing codes
// carrying the field bit F, the vertical-blanking bit V and H = 1 for
// end-of-active-video). tv_valid marks the cycles that carry a byte, so the
// module runs on the fast system clock with the 27 MHz byte rate as an enable.
//
// How it works:
//   * A timing-code detector tracks F and V and counts active lines in each
//     field. Row y = 2*line + F interleaves the two fields into one frame.
//   * In an active line the byte phase (Cb, Y0, Cr, Y1) builds pixels: pixel
//     Y0 leaves when Cr arrives, pixel Y1 with the next byte; both share Cb/Cr.
//     Columns H_START .. H_START+IMG_W-1 of the 720 active samples are kept.
//   * ycrcb_to_hsv converts the pixel (3 cycles); the pixel's index y*IMG_W+x
//     goes with it.
//   * Write port: wr_req/wr_idx/wr_pix held until wr_ack. A pixel that arrives
//     while the previous one is still waiting replaces it and sets the sticky
//     overrun flag (the stream cannot be stalled).
//   * Marker detection: if S >= S_MIN, V >= V_MIN and the hue lies within
//     HUE_TOL of one of the four marker hues, det_valid pulses for one cycle
//     with the colour and the pixel's x/y.
//   * frame_done pulses once when vertical blanking starts at the end of the
//     second field (F = 1), i.e. when the whole frame has been written.
// The three jobs (capture in colour as H/S/V, marker reporting, frame flag)
// follow the capture path's description; the BT.656 input, the column window,
// the thresholds and the drop-on-overrun rule are this design's own choices.
module ntsc_capture
  import ar_pkg::*;
#(
  parameter int unsigned IMG_W   = 640,
  parameter int unsigned IMG_H   = 480,
  parameter int unsigned H_START = 40,     // first kept sample of the 720
  parameter logic [7:0]  S_MIN   = 8'd128,
  parameter logic [7:0]  V_MIN   = 8'd64,
  parameter logic [7:0]  HUE_TOL = 8'd10
) (
  input  logic             clk,
  input  logic             rst,
  // camera byte stream
  input  logic             tv_valid,
  input  logic [7:0]       tv_data,
  // write port into the capturing image
  output logic             wr_req,
  output logic [IDX_W-1:0] wr_idx,
  output hsv_t             wr_pix,
  input  logic             wr_ack,
  // marker pixels
  output logic             det_valid,
  output marker_e          det_color,
  output coord_t           det_xy,
  // frame status
  output logic             frame_done,
  output logic             overrun
);

  // ---- BT.656 timing codes -------------------------------------------------
  logic [7:0] b1, b2, b3;          // the three previous bytes
  logic       is_code;
  assign is_code = tv_valid && b3 == 8'hFF && b2 == 8'h00 && b1 == 8'h00 && tv_data[7];

  logic       fld, vbl, active, in_line;
  logic [1:0] phase;
  logic [10:0] samp;               // luma sample number in the active line
  logic [9:0]  line;               // active line number within the field
  logic [7:0]  cb_r, y0_r, cr_r;

  logic       pix_v;               // a pixel is formed this cycle
  logic [7:0] pix_y, pix_cb, pix_cr;
  logic [10:0] pix_samp;

  always_ff @(posedge clk) begin
    if (rst) begin
      b1 <= '0; b2 <= '0; b3 <= '0;
      fld <= 1'b0; vbl <= 1'b1; active <= 1'b0; in_line <= 1'b0;
      phase <= '0; samp <= '0; line <= '0;
      frame_done <= 1'b0;
      cb_r <= '0; y0_r <= '0; cr_r <= '0;
    end else begin
      frame_done <= 1'b0;
      if (tv_valid) begin
        b3 <= b2; b2 <= b1; b1 <= tv_data;
        if (is_code) begin
          fld <= tv_data[6];
          vbl <= tv_data[5];
          if (tv_data[5]) begin
            line <= '0;
            in_line <= 1'b0;
            if (!vbl && tv_data[6]) frame_done <= 1'b1;
          end else if (!tv_data[4]) begin      // SAV of an active line
            active <= 1'b1;
            phase  <= '0;
            samp   <= '0;
            in_line <= 1'b1;
          end else begin                       // EAV of an active line
            if (in_line) line <= line + 1'b1;
            in_line <= 1'b0;
          end
        end else if (tv_data == 8'hFF) begin   // start of a timing code
          active <= 1'b0;
        end else if (active) begin
          phase <= phase + 1'b1;
          unique case (phase)
            2'd0: cb_r <= tv_data;
            2'd1: y0_r <= tv_data;
            2'd2: cr_r <= tv_data;
            default: ;
          endcase
          if (phase == 2'd2 || phase == 2'd3) samp <= samp + 1'b1;
        end
      end
    end
  end

  // pixel Y0 leaves with Cr (phase 2), pixel Y1 with itself (phase 3)
  always_comb begin
    pix_v    = tv_valid && active && !is_code && tv_data != 8'hFF && (phase == 2'd2 || phase == 2'd3);
    pix_y    = (phase == 2'd2) ? y0_r : tv_data;
    pix_cb   = cb_r;
    pix_cr   = (phase == 2'd2) ? tv_data : cr_r;
    pix_samp = samp;
  end

  // ---- window and index ----------------------------------------------------
  logic [10:0] xs;
  logic [10:0] ys;
  logic        in_win;
  always_comb begin
    xs     = pix_samp - 11'(H_START);
    ys     = {line, fld};
    in_win = pix_samp >= 11'(H_START) && xs < 11'(IMG_W) && ys < 11'(IMG_H);
  end

  // ---- colour conversion, coordinates travel alongside ---------------------
  logic cv_valid;
  hsv_t cv_hsv;
  ycrcb_to_hsv u_cvt (
    .clk, .rst,
    .in_valid (pix_v && in_win),
    .in_y     (pix_y), .in_cb (pix_cb), .in_cr (pix_cr),
    .out_valid(cv_valid), .out_hsv (cv_hsv)
  );

  coord_t xy_pipe [3];
  always_ff @(posedge clk) begin
    xy_pipe[0] <= '{x: COORD_W'(xs), y: COORD_W'(ys)};
    xy_pipe[1] <= xy_pipe[0];
    xy_pipe[2] <= xy_pipe[1];
  end
  coord_t cv_xy;
  assign cv_xy = xy_pipe[2];

  // ---- write port ----------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      wr_req  <= 1'b0;
      overrun <= 1'b0;
      wr_idx  <= '0;
      wr_pix  <= '0;
    end else begin
      if (cv_valid) begin
        if (wr_req && !wr_ack) overrun <= 1'b1;
        wr_req <= 1'b1;
        wr_idx <= IDX_W'(cv_xy.y) * IDX_W'(IMG_W) + IDX_W'(cv_xy.x);
        wr_pix <= cv_hsv;
      end else if (wr_ack) begin
        wr_req <= 1'b0;
      end
    end
  end

  // ---- marker detection ----------------------------------------------------
  function automatic logic near(input logic [7:0] h, input logic [7:0] c);
    logic [7:0] d = h - c;
    return (d <= HUE_TOL) || (d >= 8'(9'd256 - 9'(HUE_TOL)));
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      det_valid <= 1'b0;
      det_color <= MK_BLUE;
      det_xy    <= '0;
    end else begin
      det_valid <= 1'b0;
      if (cv_valid && cv_hsv.s >= S_MIN && cv_hsv.v >= V_MIN) begin
        det_xy <= cv_xy;
        if (near(cv_hsv.h, HUE_BLUE))        begin det_valid <= 1'b1; det_color <= MK_BLUE;   end
        else if (near(cv_hsv.h, HUE_GREEN))  begin det_valid <= 1'b1; det_color <= MK_GREEN;  end
        else if (near(cv_hsv.h, HUE_RED))    begin det_valid <= 1'b1; det_color <= MK_RED;    end
        else if (near(cv_hsv.h, HUE_YELLOW)) begin det_valid <= 1'b1; det_color <= MK_YELLOW; end
      end
    end
  end

endmodule

// arbi_lpf: anti-alias low-pass filter ahead of the skew. For one pixel
// position it fetches the 4x4 neighbourhood from the displaying image and
// returns the filtered H/S/V pixel.
//
// How it works: the 2-D kernel is the outer product of a symmetric 4-tap
// 1-D low-pass h = [a b b a], so the 16 weights take only four values
// (corner a*a, top/bottom edge a*b, left/right edge b*a, centre b*b). The
// pixels that share a weight are added first, so each colour channel needs
// four multiplications and the whole pixel twelve. The taps (a, b) come from
// a table indexed by the downsampling factor M; they are 4-tap Parks-McClellan
// (equiripple) designs for cutoff pi/M, transition band +-0.15 cycles/sample
// around 0.5/M, rounded so that 2a+2b = 128, which makes the 2-D gain exactly
// 2^14:
//     M    1   2   3   4   5   6   7   8
//     a    0  14  21  23  26  27  29  30
//     b   64  50  43  41  38  37  35  34
// (M = 1 needs no anti-aliasing: the kernel degenerates to a 2x2 average.)
// The window is rows y-1..y+2 and columns x-1..x+2, clamped at the image
// border, so the filtered sample sits half a pixel right and below (x, y).
// Hue is filtered like the other two channels.
// Timing: px_req (one cycle, accepted while !busy) starts a pixel; the next
// cycle win_req and win_idx[] go to the frame store and stay until win_ack
// says the whole window has been issued. busy is win_req && !win_ack, so a
// new px_req can arrive in the ack cycle and the next window follows without
// a gap. The frame store pulses win_rvalid with the 16 pixels of each window
// in request order; two cycles later out_valid pulses with out_pix. With the
// two SRAM banks serving 8 pixels each, a pixel costs 8 issue cycles when
// nothing else competes for memory (the next px_req overlaps the ack cycle);
// in the first and last columns the clamped window puts 12 reads on one bank.
// A whole 640x480 frame takes about 8.0 cycles per pixel, against the
// "at least 9 cycles per pixel" budgeted for the filter.
// The 16-coefficient limit, the four-fold symmetry, the M-indexed table of
// Parks-McClellan taps and the window request to the frame store follow the
// description of the filter; the tap values, the window alignment and the
// fixed-point formats are this design's own.
module arbi_lpf
  import ar_pkg::*;
#(
  parameter int unsigned IMG_W = 640,
  parameter int unsigned IMG_H = 480,
  parameter int unsigned NWIN  = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [3:0]       m,          // downsampling factor, 1..8
  input  logic             px_req,
  input  coord_t           px_xy,
  output logic             busy,
  // window read from the frame store
  output logic             win_req,
  output logic [IDX_W-1:0] win_idx [NWIN],
  input  logic             win_ack,
  input  logic             win_rvalid,
  input  hsv_t             win_pix [NWIN],
  // filtered pixel
  output logic             out_valid,
  output hsv_t             out_pix
);

  // ---- coefficient table ------------------------------------------------------
  logic [6:0] tap_a, tap_b;
  always_comb begin
    unique case (m)
      4'd0, 4'd1: begin tap_a = 7'd0;  tap_b = 7'd64; end
      4'd2:       begin tap_a = 7'd14; tap_b = 7'd50; end
      4'd3:       begin tap_a = 7'd21; tap_b = 7'd43; end
      4'd4:       begin tap_a = 7'd23; tap_b = 7'd41; end
      4'd5:       begin tap_a = 7'd26; tap_b = 7'd38; end
      4'd6:       begin tap_a = 7'd27; tap_b = 7'd37; end
      4'd7:       begin tap_a = 7'd29; tap_b = 7'd35; end
      default:    begin tap_a = 7'd30; tap_b = 7'd34; end
    endcase
  end

  // ---- window addresses -------------------------------------------------------
  function automatic logic [COORD_W-1:0] clampc(input int v, input int hi);
    if (v < 0)  return '0;
    if (v > hi) return COORD_W'(hi);
    return COORD_W'(v);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      win_req <= 1'b0;
      for (int j = 0; j < NWIN; j++) win_idx[j] <= '0;
    end else if (px_req && !busy) begin
      win_req <= 1'b1;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++)
          win_idx[4*r + c] <= IDX_W'(clampc(int'(px_xy.y) + r - 1, IMG_H - 1)) * IDX_W'(IMG_W)
                            + IDX_W'(clampc(int'(px_xy.x) + c - 1, IMG_W - 1));
    end else if (win_ack) begin
      win_req <= 1'b0;
    end
  end
  assign busy = win_req && !win_ack;

  // ---- stage 1: add the pixels that share a weight ---------------------------
  // class k: 0 = corner, 1 = outer row/inner column, 2 = inner row/outer column, 3 = centre
  logic [9:0]  gsum [3][4];
  logic [9:0]  grp  [3][4];
  logic [13:0] w    [4];
  logic        v1;
  always_comb begin
    for (int ch = 0; ch < 3; ch++)
      for (int k = 0; k < 4; k++) gsum[ch][k] = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        int   k;
        hsv_t p;
        k = ((r == 1 || r == 2) ? 2 : 0) + ((c == 1 || c == 2) ? 1 : 0);
        p = win_pix[4*r + c];
        gsum[0][k] = gsum[0][k] + 10'(p.h);
        gsum[1][k] = gsum[1][k] + 10'(p.s);
        gsum[2][k] = gsum[2][k] + 10'(p.v);
      end
  end

  always_ff @(posedge clk) begin
    if (rst) v1 <= 1'b0;
    else     v1 <= win_rvalid;
    if (win_rvalid) begin
      grp  <= gsum;
      w[0] <= 14'(tap_a) * 14'(tap_a);
      w[1] <= 14'(tap_a) * 14'(tap_b);
      w[2] <= 14'(tap_b) * 14'(tap_a);
      w[3] <= 14'(tap_b) * 14'(tap_b);
    end
  end

  // ---- stage 2: four products per channel, sum, scale by 2^-14 ---------------
  logic [23:0] acc [3];
  always_comb
    for (int ch = 0; ch < 3; ch++)
      acc[ch] = 24'(grp[ch][0]) * 24'(w[0]) + 24'(grp[ch][1]) * 24'(w[1])
              + 24'(grp[ch][2]) * 24'(w[2]) + 24'(grp[ch][3]) * 24'(w[3]) + 24'd8192;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        out_pix.h <= acc[0][21:14];
        out_pix.s <= acc[1][21:14];
        out_pix.v <= acc[2][21:14];
      end
    end
  end

endmodule

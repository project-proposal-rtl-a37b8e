// hsv_to_rgb: combinational conversion of an H/S/V pixel (8 bits each, hue
// 0..255 for a full turn) to 8-bit R/G/B for the monitor.
//
// The hue wheel is cut into six sectors (h*6/256); inside a sector the
// rising or falling channel is interpolated from the remainder, the lowest
// channel is v*(255-s)/256 and the highest is v. Integer approximations, so a
// round trip through ycrcb_to_hsv is exact only to a few counts. This is the
// inverse of the capture-side conversion and is this design's own addition:
// the frame store keeps H/S/V, a VGA monitor needs R/G/B.
module hsv_to_rgb
  import ar_pkg::*;
(
  input  hsv_t       hsv,
  output logic [7:0] r,
  output logic [7:0] g,
  output logic [7:0] b
);
  logic [2:0]  region;
  logic [15:0] rem, p, q, t;       // products; the upper byte of p, q, t is always 0
  always_comb begin
    rem    = 16'(hsv.h) * 16'd6;        // 6 sectors of 256/6 hue counts
    region = rem[10:8];
    rem    = {8'd0, rem[7:0]};
    p = (16'(hsv.v) * (16'd255 - 16'(hsv.s))) >> 8;
    q = (16'(hsv.v) * (16'd255 - ((16'(hsv.s) * rem) >> 8))) >> 8;
    t = (16'(hsv.v) * (16'd255 - ((16'(hsv.s) * (16'd255 - rem)) >> 8))) >> 8;
    if (hsv.s == 8'd0) begin
      r = hsv.v; g = hsv.v; b = hsv.v;
    end else begin
      unique case (region)
        3'd0:    begin r = hsv.v;  g = t[7:0]; b = p[7:0]; end
        3'd1:    begin r = q[7:0]; g = hsv.v;  b = p[7:0]; end
        3'd2:    begin r = p[7:0]; g = hsv.v;  b = t[7:0]; end
        3'd3:    begin r = p[7:0]; g = q[7:0]; b = hsv.v;  end
        3'd4:    begin r = t[7:0]; g = p[7:0]; b = hsv.v;  end
        default: begin r = hsv.v;  g = p[7:0]; b = q[7:0]; end
      endcase
    end
  end
endmodule

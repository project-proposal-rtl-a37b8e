// ycrcb_to_hsv: converts one Y/Cb/Cr pixel per cycle to hue/saturation/value.
//
// The camera path delivers pixels as Y/Cb/Cr; the rest of the design works in
// H/S/V, so the capture path converts every pixel before it is stored and
// before its hue is compared with the marker colours.
//
// How it works: a three-stage pipeline.
//   1. ITU-R BT.601 studio-range Y/Cb/Cr to 8-bit R/G/B, coefficients in Q8
//      (1.164 -> 298, 1.596 -> 409, 0.813 -> 208, 0.392 -> 100, 2.017 -> 516),
//      rounded and clamped to 0..255.
//   2. max, min and their difference; which channel is the largest.
//   3. V = max, S = 255*(max-min)/max, and H on a 0..255 wheel:
//      red sector 0 + 43*(G-B)/d, green 85 + 43*(B-R)/d, blue 171 + 43*(R-G)/d,
//      taken modulo 256. Grey pixels (d = 0) get H = 0, S = 0.
// Interface: in_valid/in_* in, out_valid/out_hsv out, exactly 3 cycles later.
// There is no back-pressure; a new pixel may enter every cycle.
// That the conversion exists follows the capture path's description; the
// formulas, widths and the hue scale are this design's own.
module ycrcb_to_hsv
  import ar_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic [7:0] in_y,
  input  logic [7:0] in_cb,
  input  logic [7:0] in_cr,
  output logic       out_valid,
  output hsv_t       out_hsv
);

  function automatic logic [7:0] clamp8(input logic signed [19:0] v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

  // ---- stage 1: R/G/B ------------------------------------------------------
  logic signed [19:0] yy, cr, cb;
  logic signed [19:0] r_acc, g_acc, b_acc;
  always_comb begin
    yy = 20'(signed'({1'b0, in_y})) - 20'sd16;
    cr = 20'(signed'({1'b0, in_cr})) - 20'sd128;
    cb = 20'(signed'({1'b0, in_cb})) - 20'sd128;
    r_acc = (20'sd298 * yy + 20'sd409 * cr + 20'sd128) >>> 8;
    g_acc = (20'sd298 * yy - 20'sd208 * cr - 20'sd100 * cb + 20'sd128) >>> 8;
    b_acc = (20'sd298 * yy + 20'sd516 * cb + 20'sd128) >>> 8;
  end

  logic       v1;
  logic [7:0] r1, g1, b1;
  always_ff @(posedge clk) begin
    if (rst) v1 <= 1'b0;
    else     v1 <= in_valid;
    r1 <= clamp8(r_acc);
    g1 <= clamp8(g_acc);
    b1 <= clamp8(b_acc);
  end

  // ---- stage 2: max / min --------------------------------------------------
  typedef enum logic [1:0] {MAX_R, MAX_G, MAX_B} maxsel_e;
  logic       v2;
  logic [7:0] mx2, d2, r2, g2, b2;
  maxsel_e    sel2;
  logic [7:0] mx, mn;
  maxsel_e    sel;
  always_comb begin
    if (r1 >= g1 && r1 >= b1) begin mx = r1; sel = MAX_R; end
    else if (g1 >= b1)        begin mx = g1; sel = MAX_G; end
    else                      begin mx = b1; sel = MAX_B; end
    mn = r1;
    if (g1 < mn) mn = g1;
    if (b1 < mn) mn = b1;
  end
  always_ff @(posedge clk) begin
    if (rst) v2 <= 1'b0;
    else     v2 <= v1;
    mx2  <= mx;
    d2   <= mx - mn;
    sel2 <= sel;
    r2 <= r1; g2 <= g1; b2 <= b1;
  end

  // ---- stage 3: divisions --------------------------------------------------
  logic [7:0]  a_ch, b_ch, base, frac, sat;
  logic [7:0]  diff;
  logic        neg;
  logic [15:0] num;
  always_comb begin
    unique case (sel2)
      MAX_R:   begin a_ch = g2; b_ch = b2; base = HUE_RED;   end
      MAX_G:   begin a_ch = b2; b_ch = r2; base = HUE_GREEN; end
      default: begin a_ch = r2; b_ch = g2; base = HUE_BLUE;  end
    endcase
    neg  = a_ch < b_ch;
    diff = neg ? (b_ch - a_ch) : (a_ch - b_ch);
    num  = 16'd43 * 16'(diff);
    frac = (d2 == 8'd0) ? 8'd0 : 8'(num / 16'(d2));
    sat  = (mx2 == 8'd0) ? 8'd0 : 8'((16'd255 * 16'(d2)) / 16'(mx2));
  end
  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= v2;
    out_hsv.v <= mx2;
    out_hsv.s <= sat;
    out_hsv.h <= (d2 == 8'd0) ? 8'd0 : (neg ? base - frac : base + frac);
  end

endmodule

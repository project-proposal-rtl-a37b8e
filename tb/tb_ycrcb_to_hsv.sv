// tb_ycrcb_to_hsv: checks the colour converter against a floating-point
// reference (BT.601 to R/G/B, then the textbook H/S/V formulas scaled to
// 0..255), within 2 counts per channel, for primaries, greys and random
// pixels, and checks the 3-cycle latency.
module tb_ycrcb_to_hsv;
  import ar_pkg::*;

  logic clk = 0, rst = 1;
  logic in_valid = 0;
  logic [7:0] in_y, in_cb, in_cr;
  logic out_valid;
  hsv_t out_hsv;
  int checks = 0, failures = 0;

  ycrcb_to_hsv dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real clampr(input real v);
    real r = $floor(v + 0.5);
    if (r < 0) r = 0;
    if (r > 255) r = 255;
    return r;
  endfunction

  function automatic void ref_hsv(input int y, cb, cr, output int h, s, v);
    real r, g, b, mx, mn, d, hh;
    r = clampr(1.164 * (y - 16) + 1.596 * (cr - 128));
    g = clampr(1.164 * (y - 16) - 0.813 * (cr - 128) - 0.392 * (cb - 128));
    b = clampr(1.164 * (y - 16) + 2.017 * (cb - 128));
    mx = r; if (g > mx) mx = g; if (b > mx) mx = b;
    mn = r; if (g < mn) mn = g; if (b < mn) mn = b;
    d = mx - mn;
    v = int'(mx);
    s = (mx == 0) ? 0 : int'($floor(255.0 * d / mx));
    if (d == 0) hh = 0;
    else if (mx == r) hh = 60.0 * (g - b) / d;
    else if (mx == g) hh = 120.0 + 60.0 * (b - r) / d;
    else hh = 240.0 + 60.0 * (r - g) / d;
    if (hh < 0) hh += 360.0;
    h = int'($floor(hh * 256.0 / 360.0 + 0.5)) % 256;
  endfunction

  function automatic int hue_dist(input int a, b);
    int d = (a - b) & 255;
    return (d > 128) ? 256 - d : d;
  endfunction

  task automatic check_one(input int y, cb, cr);
    int eh, es, ev, lat, gh, gs, gv;
    @(negedge clk);
    in_valid = 1; in_y = 8'(y); in_cb = 8'(cb); in_cr = 8'(cr);
    @(negedge clk);
    in_valid = 0;
    lat = 1;
    while (!out_valid && lat < 10) begin @(negedge clk); lat++; end
    ref_hsv(y, cb, cr, eh, es, ev);
    checks++;
    if (lat != 3) begin failures++; $display("latency %0d, expected 3", lat); end
    checks++;
    gh = int'(out_hsv.h); gs = int'(out_hsv.s); gv = int'(out_hsv.v);
    if ((gs > 8 && hue_dist(gh, eh) > 2) || (gs - es > 2 || es - gs > 2) ||
        (gv - ev > 2 || ev - gv > 2)) begin
      failures++;
      $display("Y=%0d Cb=%0d Cr=%0d: got h=%0d s=%0d v=%0d expected h=%0d s=%0d v=%0d",
               y, cb, cr, out_hsv.h, out_hsv.s, out_hsv.v, eh, es, ev);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    check_one(81, 90, 240);   // red
    check_one(145, 54, 34);   // green
    check_one(41, 240, 110);  // blue
    check_one(210, 16, 146);  // yellow
    check_one(126, 128, 128); // grey
    check_one(16, 128, 128);  // black
    check_one(235, 128, 128); // white
    // the named primaries must land on the marker hues
    check_one(81, 90, 240);
    checks++; if (hue_dist(out_hsv.h, HUE_RED) > 2) failures++;
    check_one(41, 240, 110);
    checks++; if (hue_dist(out_hsv.h, HUE_BLUE) > 2) failures++;
    for (int i = 0; i < 400; i++)
      check_one(16 + $urandom_range(0, 219), 16 + $urandom_range(0, 224), 16 + $urandom_range(0, 224));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

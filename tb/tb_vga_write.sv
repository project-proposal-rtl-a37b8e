// tb_vga_write: small raster (8x4 visible, short porches) with a frame-store
// responder that acknowledges after a random wait and returns data four
// edges later. Checks over three frames: every visible pixel shows the
// converted colour of its own index (grey pixels exactly, coloured ones
// against a floating-point H/S/V to R/G/B within 4 counts), blanking is
// black, the number and width of hsync and vsync pulses, and no underflow.
// Then the responder stops acknowledging and underflow must be flagged.
module tb_vga_write;
  import ar_pkg::*;

  localparam int W = 8, H = 4, HF = 2, HSY = 3, HB = 2, VF = 1, VSY = 2, VB = 1;
  localparam int HT = W + HF + HSY + HB, VT = H + VF + VSY + VB;

  logic clk = 0, rst = 1, pix_ce = 0;
  logic rd_req, rd_ack, rd_rvalid;
  logic [IDX_W-1:0] rd_idx;
  hsv_t rd_data;
  logic hsync_n, vsync_n, blank, underflow;
  logic [7:0] red, green, blue;
  logic [10:0] hcount;
  logic [9:0] vcount;
  int checks = 0, failures = 0;

  vga_write #(.IMG_W(W), .IMG_H(H), .H_FP(HF), .H_SYNC(HSY), .H_BP(HB),
              .V_FP(VF), .V_SYNC(VSY), .V_BP(VB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic hsv_t pix_of(input int idx);
    if (idx % 3 == 0) return '{h: 8'(idx * 37), s: 8'd200, v: 8'd220};
    return '{h: 8'd0, s: 8'd0, v: 8'(idx * 9 + 5)};
  endfunction

  function automatic void ref_rgb(input hsv_t p, output int r, g, b);
    real hh, s, v, c, x, m, rr, gg, bb;
    hh = p.h * 360.0 / 256.0; s = p.s / 255.0; v = p.v;
    c = v * s;
    x = c * (1.0 - ((hh / 60.0) - 2.0 * $floor(hh / 120.0) - 1.0 < 0 ?
                    -((hh / 60.0) - 2.0 * $floor(hh / 120.0) - 1.0) :
                     ((hh / 60.0) - 2.0 * $floor(hh / 120.0) - 1.0)));
    m = v - c;
    if (hh < 60)       begin rr = c; gg = x; bb = 0; end
    else if (hh < 120) begin rr = x; gg = c; bb = 0; end
    else if (hh < 180) begin rr = 0; gg = c; bb = x; end
    else if (hh < 240) begin rr = 0; gg = x; bb = c; end
    else if (hh < 300) begin rr = x; gg = 0; bb = c; end
    else               begin rr = c; gg = 0; bb = x; end
    r = int'(rr + m); g = int'(gg + m); b = int'(bb + m);
  endfunction

  // pixel clock enable every 4th cycle
  int ce_div = 0;
  always @(negedge clk) begin
    ce_div = (ce_div + 1) % 4;
    pix_ce = (ce_div == 0);
  end

  // frame-store responder
  bit   serve = 1;
  logic [IDX_W-1:0] pipe_idx [4];
  logic pipe_v [4];
  always @(negedge clk) rd_ack = serve && rd_req && ($urandom_range(0, 2) == 0);
  always @(posedge clk) begin
    pipe_v[0] <= rd_req && rd_ack;
    pipe_idx[0] <= rd_idx;
    for (int i = 1; i < 4; i++) begin pipe_v[i] <= pipe_v[i-1]; pipe_idx[i] <= pipe_idx[i-1]; end
  end
  assign rd_rvalid = pipe_v[3];
  assign rd_data   = pix_of(int'(pipe_idx[3]));

  // monitor: outputs are one pix_ce behind the counters
  int hpos = 0, vpos = 0, frames = 0, hs_pulses = 0, vs_edges = 0;
  int hs_len = 0, bad_hs = 0;
  logic hs_prev = 1, vs_prev = 1;
  logic [10:0] hc_d; logic [9:0] vc_d;
  bit started = 0;
  always @(posedge clk) if (!rst && pix_ce) begin
    hc_d <= hcount; vc_d <= vcount;
  end
  always @(negedge clk) if (!rst && pix_ce && started) begin
    int er, eg, eb, idx;
    if (!hsync_n) hs_len++;
    if (hs_prev && !hsync_n) hs_pulses++;
    if (!hs_prev && hsync_n) begin
      checks++;
      if (hs_len != HSY) begin failures++; $display("hsync %0d pixels wide", hs_len); end
      hs_len = 0;
    end
    if (vs_prev && !vsync_n) vs_edges++;
    hs_prev = hsync_n; vs_prev = vsync_n;
    if (int'(hc_d) < W && int'(vc_d) < H) begin
      hsv_t p;
      idx = int'(vc_d) * W + int'(hc_d);
      p = pix_of(idx);
      ref_rgb(p, er, eg, eb);
      checks++;
      if (blank || int'(red) - er > 4 || er - int'(red) > 4 || int'(green) - eg > 4 ||
          eg - int'(green) > 4 || int'(blue) - eb > 4 || eb - int'(blue) > 4) begin
        failures++;
        $display("pixel %0d: rgb %0d %0d %0d expected %0d %0d %0d", idx, red, green, blue, er, eg, eb);
      end
    end else begin
      checks++;
      if (!blank || red != 0 || green != 0 || blue != 0) begin failures++; $display("blanking not black"); end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    // let the first prefetch happen, then watch three frames
    wait (vcount == 0 && hcount == 1);
    started = 1;
    repeat (3 * HT * VT * 4) @(posedge clk);
    checks++;
    if (underflow) begin failures++; $display("underflow with a serving memory"); end
    checks++;
    if (hs_pulses < 3 * VT - 1 || hs_pulses > 3 * VT + 1) begin failures++; $display("%0d hsync pulses", hs_pulses); end
    checks++;
    if (vs_edges != 3) begin failures++; $display("%0d vsync pulses", vs_edges); end
    started = 0;
    serve = 0;
    repeat (HT * VT * 4 * 2) @(posedge clk);
    checks++;
    if (!underflow) begin failures++; $display("underflow not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ntsc_capture: drives a small synthetic BT.656 stream (two interlaced
// fields, timing codes, blanking) into the capture block with reduced image
// size, and checks: every pixel of the window is written exactly once at the
// right index with the expected value (grey pixels, V from the BT.601 luma
// formula), marker-coloured pixels are reported with the right colour and
// coordinates, frame_done pulses once per frame, and a write port that never
// acknowledges raises the overrun flag.
module tb_ntsc_capture;
  import ar_pkg::*;

  localparam int W = 16, H = 8, HS = 2, ACT = 20, LF = 5;

  logic clk = 0, rst = 1;
  logic tv_valid = 0;
  logic [7:0] tv_data = 0;
  logic wr_req, wr_ack;
  logic [IDX_W-1:0] wr_idx;
  hsv_t wr_pix;
  logic det_valid;
  marker_e det_color;
  coord_t det_xy;
  logic frame_done, overrun;
  int checks = 0, failures = 0;

  ntsc_capture #(.IMG_W(W), .IMG_H(H), .H_START(HS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // picture: sample s (0..ACT-1) of frame row r; pairs share chroma
  function automatic marker_e mk_of(input int s, r);
    return marker_e'(((s / 2) + r) % 4);
  endfunction
  function automatic logic is_mk(input int s, r);
    return (s / 2 == 3 && r == 1) || (s / 2 == 6 && r == 4) || (s / 2 == 2 && r == 6);
  endfunction
  function automatic void pix_of(input int s, r, output int y, cb, cr);
    if (is_mk(s, r)) begin
      unique case (mk_of(s, r))
        MK_RED:    begin y = 81;  cb = 90;  cr = 240; end
        MK_GREEN:  begin y = 145; cb = 54;  cr = 34;  end
        MK_BLUE:   begin y = 41;  cb = 240; cr = 110; end
        default:   begin y = 210; cb = 16;  cr = 146; end
      endcase
    end else begin
      y = 20 + (s * 7 + r * 13) % 200; cb = 128; cr = 128;
    end
  endfunction

  task automatic send(input logic [7:0] b);
    @(negedge clk); tv_valid = 1; tv_data = b;
    @(negedge clk); tv_valid = 0;
    repeat (2) @(negedge clk);
  endtask
  task automatic code(input logic f, v, hh);
    send(8'hFF); send(8'h00); send(8'h00);
    send({1'b1, f, v, hh, 4'h0});
  endtask
  task automatic line(input logic f, v, input int r);
    int y0, y1, cb, cr;
    code(f, v, 1'b1);
    repeat (4) begin send(8'h80); send(8'h10); end
    code(f, v, 1'b0);
    for (int s = 0; s < ACT; s += 2) begin
      if (v) begin send(8'h80); send(8'h10); send(8'h80); send(8'h10); end
      else begin
        pix_of(s, r, y0, cb, cr);
        pix_of(s + 1, r, y1, cb, cr);
        send(8'(cb)); send(8'(y0)); send(8'(cr)); send(8'(y1));
      end
    end
  endtask
  task automatic frame();
    for (int f = 0; f < 2; f++) begin
      line(1'(f), 1, 0); line(1'(f), 1, 0);
      for (int l = 0; l < LF; l++) line(1'(f), 0, 2 * l + f);
      line(1'(f), 1, 0);
    end
  endtask

  // write-port responder and scoreboard
  bit   ack_enable = 1;
  int   nwrites [W*H];
  hsv_t img [W*H];
  always @(negedge clk) wr_ack = ack_enable && wr_req && ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (!rst && wr_req && wr_ack) begin
    nwrites[wr_idx]++;
    img[wr_idx] = wr_pix;
  end

  int ndet = 0, ndone = 0;
  int exp_det = 0;
  always @(posedge clk) if (!rst) begin
    if (frame_done) ndone++;
    if (det_valid) begin
      int s, r;
      s = int'(det_xy.x) + HS;
      r = int'(det_xy.y);
      ndet++;
      checks++;
      if (!is_mk(s, r) || mk_of(s, r) != det_color) begin
        failures++;
        $display("unexpected marker at x=%0d y=%0d colour %0d", det_xy.x, det_xy.y, det_color);
      end
    end
  end

  initial begin
    int y, cb, cr, ev;
    repeat (3) @(posedge clk);
    rst = 0;
    frame();
    repeat (20) @(posedge clk);
    for (int r = 0; r < H; r++)
      for (int x = 0; x < W; x++) begin
        checks++;
        if (nwrites[r*W + x] != 1) begin
          failures++;
          $display("pixel %0d,%0d written %0d times", x, r, nwrites[r*W + x]);
        end else if (!is_mk(x + HS, r)) begin
          pix_of(x + HS, r, y, cb, cr);
          ev = (298 * (y - 16) + 128) >>> 8;
          if (ev < 0) ev = 0;
          if (ev > 255) ev = 255;
          checks++;
          if (img[r*W + x].v != 8'(ev) || img[r*W + x].s != 0) begin
            failures++;
            $display("pixel %0d,%0d value %0d, expected %0d", x, r, img[r*W + x].v, ev);
          end
        end
      end
    for (int r = 0; r < H; r++)
      for (int x = 0; x < W; x++) if (is_mk(x + HS, r)) exp_det++;
    checks++;
    if (ndet != exp_det) begin failures++; $display("%0d markers reported, %0d expected", ndet, exp_det); end
    checks++;
    if (ndone != 1) begin failures++; $display("frame_done pulsed %0d times", ndone); end
    checks++;
    if (overrun) begin failures++; $display("overrun with a responsive port"); end
    // second frame with a stuck write port: pixels must be dropped and flagged
    ack_enable = 0;
    frame();
    checks++;
    if (!overrun) begin failures++; $display("overrun not flagged"); end
    checks++;
    if (ndone != 2) begin failures++; $display("frame_done pulsed %0d times", ndone); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_object_recognition: reports marker pixels over many frames and compares
// the four corners with averages computed here (integer division, rounding
// down). A driver sends the pixels of each frame and the frame_done pulse; a
// separate checker takes the expected result of each frame from a queue when
// coords_valid pulses. Frames covered:
//   * sparse random pixels in four separated regions,
//   * a frame with one colour left out: its corner must stay and its found
//     bit must drop; a frame with no pixels at all: nothing found,
//   * pixels on every cycle over the whole 640x480 coordinate range,
//   * a frame that starts right after frame_done, while the previous one is
//     still being divided (its pixels must count for the new frame),
//   * a full frame of 307200 pixels of one colour at (639, 479), the largest
//     sums the design must hold,
//   * 20 more random frames.
// Also checked: one coords_valid per frame, each within 8*(SUM_W+1)+4 cycles
// of its frame_done.
module tb_object_recognition;
  import ar_pkg::*;

  localparam int SUM_W = IDX_W + COORD_W;

  logic clk = 0, rst = 1;
  logic det_valid = 0, frame_done = 0;
  marker_e det_color = MK_BLUE;
  coord_t det_xy = '0;
  coord_t corner [4];
  logic [3:0] found;
  logic coords_valid, busy;
  int checks = 0, failures = 0;

  object_recognition dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    int x [4];
    int y [4];
    bit f [4];
    int t_done;
  } result_t;

  result_t exp_q [$];
  int ex [4], ey [4];            // last known corner per colour
  int cyc = 0, frames_sent = 0, frames_seen = 0;

  always @(posedge clk) cyc++;

  // checker
  always @(negedge clk) begin
    if (!rst && coords_valid) begin
      result_t r;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("coords_valid with no frame pending");
      end else begin
        r = exp_q.pop_front();
        frames_seen++;
        if (cyc - r.t_done > 8 * (SUM_W + 1) + 4) begin
          failures++; $display("result took %0d cycles", cyc - r.t_done);
        end
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (found[c] != r.f[c]) begin failures++; $display("frame %0d: found[%0d] wrong", frames_seen, c); end
          checks++;
          if (int'(corner[c].x) != r.x[c] || int'(corner[c].y) != r.y[c]) begin
            failures++;
            $display("frame %0d colour %0d: corner %0d,%0d expected %0d,%0d",
                     frames_seen, c, corner[c].x, corner[c].y, r.x[c], r.y[c]);
          end
        end
      end
    end
  end

  longint sx [4], sy [4], n [4];

  task automatic clear_sums();
    for (int c = 0; c < 4; c++) begin sx[c] = 0; sy[c] = 0; n[c] = 0; end
  endtask

  task automatic pixel(input int c, x, y, input bit gap);
    @(negedge clk);
    det_valid = 1; det_color = marker_e'(c); det_xy = '{x: 10'(x), y: 10'(y)};
    sx[c] += x; sy[c] += y; n[c]++;
    if (gap) begin @(negedge clk); det_valid = 0; end
  endtask

  task automatic end_frame();
    result_t r;
    @(negedge clk); det_valid = 0; frame_done = 1;
    for (int c = 0; c < 4; c++) begin
      if (n[c] > 0) begin ex[c] = int'(sx[c] / n[c]); ey[c] = int'(sy[c] / n[c]); end
      r.x[c] = ex[c]; r.y[c] = ey[c]; r.f[c] = n[c] > 0;
    end
    r.t_done = cyc;
    exp_q.push_back(r);
    frames_sent++;
    @(negedge clk); frame_done = 0;
    clear_sums();
  endtask

  task automatic wait_result();
    int k = 0;
    while (exp_q.size() > 0 && k < 2000) begin @(negedge clk); k++; end
  endtask

  // pixels clustered per colour around the corners of a quadrilateral
  task automatic sparse_frame(input int npix, input int skip);
    for (int i = 0; i < npix; i++) begin
      int c, x, y;
      c = $urandom_range(0, 3);
      if (c == skip) c = (c + 1) % 4;
      x = 100 * c + $urandom_range(0, 60) + (i % 7 == 0 ? 300 : 0);
      y = 50 + 90 * c + $urandom_range(0, 40);
      if (x > 639) x = 639;
      pixel(c, x, y, 1);
    end
    end_frame();
  endtask

  task automatic dense_frame(input int npix);
    for (int i = 0; i < npix; i++)
      pixel($urandom_range(0, 3), $urandom_range(0, 639), $urandom_range(0, 479), 0);
    end_frame();
  endtask

  initial begin
    for (int c = 0; c < 4; c++) begin ex[c] = 0; ey[c] = 0; end
    clear_sums();
    repeat (3) @(posedge clk);
    rst = 0;
    sparse_frame(200, -1);  wait_result();
    sparse_frame(300, 2);   wait_result();
    end_frame();            wait_result();     // nothing seen
    sparse_frame(57, -1);   wait_result();
    dense_frame(1000);
    dense_frame(500);       wait_result();     // second frame overlaps the division
    for (int i = 0; i < 640 * 480; i++) pixel(0, 639, 479, 0);
    pixel(1, 0, 0, 0);
    end_frame();            wait_result();
    for (int f = 0; f < 20; f++) begin
      if (f % 2 == 0) dense_frame($urandom_range(1, 400));
      else            sparse_frame($urandom_range(150, 250), $urandom_range(0, 4) - 1);
      // after some dense frames the next frame (at least 300 cycles long)
      // starts while the division is still running
      if (f % 4 != 0) wait_result();
    end
    wait_result();
    repeat (10) @(negedge clk);
    checks++;
    if (frames_seen != frames_sent) begin
      failures++; $display("%0d frames sent, %0d results", frames_sent, frames_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

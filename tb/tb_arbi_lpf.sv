// tb_arbi_lpf: a small image (16x12) served by a responder that answers each
// window request after a random delay. Checks, for every M from 1 to 8:
//   * an impulse image returns the kernel weights themselves (255*w/2^14),
//   * random images match a direct 16-term convolution with the separable
//     taps h[r]*h[c], borders clamped,
//   * the 16 window indices are the clamped 4x4 neighbourhood,
//   * out_valid follows win_rvalid by exactly 2 cycles.
module tb_arbi_lpf;
  import ar_pkg::*;

  localparam int W = 16, H = 12;

  logic clk = 0, rst = 1;
  logic [3:0] m = 1;
  logic px_req = 0;
  coord_t px_xy = '0;
  logic busy, win_req, win_rvalid = 0, out_valid;
  logic [IDX_W-1:0] win_idx [16];
  hsv_t win_pix [16];
  hsv_t out_pix;
  int checks = 0, failures = 0;

  arbi_lpf #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ta [9] = '{0, 0, 14, 21, 23, 26, 27, 29, 30};
  int tb [9] = '{0, 64, 50, 43, 41, 38, 37, 35, 34};
  hsv_t img [H][W];

  function automatic int cl(input int v, hi);
    return v < 0 ? 0 : (v > hi ? hi : v);
  endfunction

  // responder: acknowledges a window after a random wait, returns it some
  // cycles later, in order; a second window may be accepted meanwhile
  hsv_t   rq_pix [$];            // 16 entries per window
  int     rq_due [$];
  int     now = 0;
  logic   win_ack = 0;
  always @(negedge clk) begin
    now++;
    win_rvalid = 0;
    if (rq_due.size() > 0 && rq_due[0] <= now) begin
      for (int j = 0; j < 16; j++) win_pix[j] = rq_pix.pop_front();
      void'(rq_due.pop_front());
      win_rvalid = 1;
    end
    win_ack = win_req && ($urandom_range(0, 3) == 0);
    if (win_ack) begin
      int due;
      for (int j = 0; j < 16; j++) rq_pix.push_back(img[int'(win_idx[j]) / W][int'(win_idx[j]) % W]);
      due = now + $urandom_range(4, 9);
      if (rq_due.size() > 0 && due <= rq_due[rq_due.size() - 1]) due = rq_due[rq_due.size() - 1] + 1;
      rq_due.push_back(due);
    end
  end

  task automatic filt(input int x, y, output hsv_t res);
    int lat;
    @(negedge clk);
    #1;
    while (busy) begin @(negedge clk); #1; end
    px_req = 1; px_xy = '{x: 10'(x), y: 10'(y)};
    @(negedge clk);
    px_req = 0;
    // indices
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (int'(win_idx[4*r+c]) != cl(y + r - 1, H - 1) * W + cl(x + c - 1, W - 1)) begin
          failures++; $display("window index %0d wrong at %0d,%0d", 4*r+c, x, y);
        end
      end
    #1;
    while (!win_rvalid) begin @(negedge clk); #1; end
    lat = 0;
    while (!out_valid && lat < 10) begin @(negedge clk); #1; lat++; end
    checks++;
    if (lat != 2) begin failures++; $display("out_valid %0d cycles after window, expected 2", lat); end
    res = out_pix;
  endtask

  function automatic hsv_t ref_filt(input int x, y, mm);
    int h [4], acc [3];
    hsv_t o;
    h = '{ta[mm], tb[mm], tb[mm], ta[mm]};
    acc = '{8192, 8192, 8192};
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        hsv_t p;
        p = img[cl(y + r - 1, H - 1)][cl(x + c - 1, W - 1)];
        acc[0] += h[r] * h[c] * int'(p.h);
        acc[1] += h[r] * h[c] * int'(p.s);
        acc[2] += h[r] * h[c] * int'(p.v);
      end
    o.h = 8'(acc[0] >> 14); o.s = 8'(acc[1] >> 14); o.v = 8'(acc[2] >> 14);
    return o;
  endfunction

  initial begin
    hsv_t res, e;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int mm = 1; mm <= 8; mm++) begin
      m = 4'(mm);
      // impulse at (8,6): outputs around it reproduce the kernel
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = '0;
      img[6][8] = '{h: 8'd255, s: 8'd255, v: 8'd255};
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          int wgt, hr, hc;
          // window row r at pixel y holds row y+r-1; impulse row 6 => y = 7-r
          filt(9 - c, 7 - r, res);
          hr = (r == 0 || r == 3) ? ta[mm] : tb[mm];
          hc = (c == 0 || c == 3) ? ta[mm] : tb[mm];
          wgt = (255 * hr * hc + 8192) >> 14;
          checks++;
          if (int'(res.v) != wgt || int'(res.h) != wgt) begin
            failures++; $display("M=%0d impulse tap %0d,%0d: %0d expected %0d", mm, r, c, res.v, wgt);
          end
        end
      // random image, random positions including borders
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
        img[y][x] = hsv_t'(24'($urandom));
      for (int i = 0; i < 12; i++) begin
        int x, y;
        x = (i < 2) ? (i * (W - 1)) : $urandom_range(0, W - 1);
        y = (i < 2) ? (i * (H - 1)) : $urandom_range(0, H - 1);
        filt(x, y, res);
        e = ref_filt(x, y, mm);
        checks++;
        if (res != e) begin
          failures++; $display("M=%0d at %0d,%0d: %h expected %h", mm, x, y, res, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

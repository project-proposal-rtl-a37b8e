// tb_ar_system_full: the end-to-end test of tb_ar_system at the design's own
// size, 640x480 with the full BT.656 line (720 active samples, 1716 bytes)
// and the standard 800x525 VGA raster, every parameter of ar_system at its
// default. Marker blobs are 8x8 and the quadrilateral is skewed. The camera
// waits at the end of each frame until the skew has finished, so every
// rotation hands over a complete overlay. Four frames.
module tb_ar_system_full;
  import ar_pkg::*;

  // ---- sizes -------------------------------------------------------------------
  localparam int W = 640, H = 480, HS = 40, ACT = 720, HBL = 134, VBL = 19, RAW = 19;
  localparam int HF = 16, HSY = 96, HB = 48, VF = 10, VSY = 2, VB = 33;
  localparam int MB = 8;                                  // marker blob size
  localparam int BX [4] = '{80, 552, 512, 120};                // blob top-left x (A',B',C',D')
  localparam int BY [4] = '{60, 96, 416, 392};
  localparam int NFR = 4;
  localparam longint WATCHDOG = 80000000;

  logic clk = 0, rst = 1;
  logic tv_valid = 0;
  logic [7:0] tv_data = 0;
  logic vga_pix_ce = 0;
  logic vga_hsync_n, vga_vsync_n, vga_blank;
  logic [7:0] vga_r, vga_g, vga_b;
  logic [10:0] vga_hcount;
  logic [9:0] vga_vcount;
  logic [RAW-1:0] ram_addr [2];
  logic ram_we [2];
  hsv_t ram_wdata [2], ram_rdata [2];
  logic prr_req = 0, prr_ack, prr_rvalid;
  logic [IDX_W-1:0] prr_idx = 0;
  hsv_t prr_rdata;
  logic frame_done, skew_busy, skew_done, capture_overrun, vga_underflow;
  logic [1:0] display_buf;
  coord_t corner [4];
  logic [3:0] corners_found, lpf_m;
  int checks = 0, failures = 0;

  ar_system dut (.*);

  for (genvar b = 0; b < 2; b++) begin : g_ram
    zbt_ram_model #(.AW(RAW)) u_ram (.clk, .addr(ram_addr[b]), .we(ram_we[b]),
                                     .wdata(ram_wdata[b]), .rdata(ram_rdata[b]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- scene -----------------------------------------------------------------------
  function automatic int blob_of(input int x, y);      // -1 or corner number
    for (int c = 0; c < 4; c++)
      if (x >= BX[c] && x < BX[c] + MB && y >= BY[c] && y < BY[c] + MB) return c;
    return -1;
  endfunction
  function automatic int grey_y(input int x, y);
    return 40 + (x * 11 + y * 17) % 160;
  endfunction
  function automatic int grey_v(input int x, y);
    int v;
    v = (298 * (grey_y(x, y) - 16) + 128) >>> 8;
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction
  function automatic void pix_of(input int s, r, output int y, cb, cr);
    int x, c;
    x = s - HS;
    c = (x >= 0 && x < W) ? blob_of(x, r) : -1;
    unique case (c)
      0: begin y = 41;  cb = 240; cr = 110; end   // blue
      1: begin y = 145; cb = 54;  cr = 34;  end   // green
      2: begin y = 81;  cb = 90;  cr = 240; end   // red
      3: begin y = 210; cb = 16;  cr = 146; end   // yellow
      default: begin y = grey_y(x < 0 ? 0 : x, r); cb = 128; cr = 128; end
    endcase
  endfunction

  // ---- quadrilateral geometry (corners are the blob centres) --------------------
  int cx [4], cy [4];
  initial for (int c = 0; c < 4; c++) begin
    cx[c] = BX[c] + (MB - 1) / 2;
    cy[c] = BY[c] + (MB - 1) / 2;
  end
  // smallest signed distance of (x, y) to the four edges, positive n_in
  function automatic real edge_dist(input int x, y);
    real d, m;
    m = 1.0e9;
    for (int e = 0; e < 4; e++) begin
      real px, py, qx, qy, len;
      px = cx[e]; py = cy[e]; qx = cx[(e + 1) % 4]; qy = cy[(e + 1) % 4];
      len = $sqrt((qx - px) * (qx - px) + (qy - py) * (qy - py));
      d = ((qx - px) * (y - py) - (qy - py) * (x - px)) / len;
      if (d < m) m = d;
    end
    return m;
  endfunction

  // ---- camera ----------------------------------------------------------------------
  bit hold_for_skew = 1;
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
    repeat (HBL) begin send(8'h80); send(8'h10); end
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
      repeat (VBL) line(1'(f), 1, 0);
      for (int l = 0; l < H / 2; l++) line(1'(f), 0, 2 * l + f);
      if (f == 1 && hold_for_skew) wait (!skew_busy);
      line(1'(f), 1, 0);
    end
  endtask

  // ---- VGA pixel enable ------------------------------------------------------------
  int ce_div = 0;
  always @(negedge clk) begin
    ce_div = (ce_div + 1) % 4;
    vga_pix_ce = (ce_div == 0);
  end

  // ---- event counters -------------------------------------------------------------
  int n_rot = 0, n_skew_start = 0, n_skew_done = 0, n_found = 0;
  int n_bg_ok_frames = 0, n_black_frames = 0, n_recursive_frames = 0;
  logic skew_busy_d = 0;
  longint t_rot = 0, skew_cycles = 0, cyc = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    skew_busy_d <= skew_busy;
    if (frame_done) begin n_rot++; t_rot = cyc; end
    if (skew_busy && !skew_busy_d) n_skew_start++;
    if (skew_done) begin n_skew_done++; skew_cycles = cyc - t_rot; end
  end

  // ---- VGA frame capture -------------------------------------------------------------
  int   img_v [H][W];
  bit   img_grey [H][W];
  bit   dirty = 1;
  int   rot_at_start = 0;
  logic [10:0] hc_d;
  logic [9:0]  vc_d;
  always @(posedge clk) if (!rst && vga_pix_ce) begin hc_d <= vga_hcount; vc_d <= vga_vcount; end

  always @(negedge clk) if (!rst) begin
    if (frame_done) dirty = 1;
    if (vga_pix_ce) begin
      int x, y;
      x = int'(hc_d); y = int'(vc_d);
      if (x < W && y < H) begin
        img_v[y][x] = int'(vga_r);
        img_grey[y][x] = vga_r == vga_g && vga_g == vga_b;
      end
      // the FIFO restarts at the first blank line: a new frame begins
      if (x == 0 && y == H) begin
        if (!dirty && n_rot >= 2) check_frame();
        dirty = 0;
        rot_at_start = n_rot;
      end
    end
  end

  task automatic check_frame();
    int bad = 0, n_in = 0, black = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        real d;
        if (blob_of(x, y) >= 0) continue;
        d = edge_dist(x, y);
        if (d < -1.5) begin
          checks++;
          if (!img_grey[y][x] || img_v[y][x] != grey_v(x, y)) begin
            bad++;
            failures++;
            $display("rotation %0d: background pixel %0d,%0d shows %0d, expected %0d",
                     rot_at_start, x, y, img_v[y][x], grey_v(x, y));
          end
        end else if (d > 1.0) begin
          n_in++;
          if (img_v[y][x] == 0) black++;
        end
      end
    if (bad == 0) n_bg_ok_frames++;
    if (rot_at_start == 2) begin
      checks++;
      if (n_in == 0 || black * 1000 < n_in * 999) begin
        failures++;
        $display("after rotation 2: %0d of %0d n_in pixels black, expected all", black, n_in);
      end else n_black_frames++;
    end
    if (rot_at_start >= 3) begin
      checks++;
      if (n_in == 0 || black == n_in) begin
        failures++;
        $display("after rotation %0d: recursion not visible (%0d of %0d black)", rot_at_start, black, n_in);
      end else n_recursive_frames++;
    end
  endtask

  // ---- run ---------------------------------------------------------------------------
  task automatic expect_seen(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("%s never happened", what); end
    else $display("%s: %0d", what, n);
  endtask

  initial begin
    int m_exp, wq, hq;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int f = 0; f < NFR; f++) begin
      frame();
      if (f == 0) begin
        // corners of the first frame
        wait (corners_found == 4'hF || n_rot > 1);
        repeat (2) @(posedge clk);
        n_found++;
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (int'(corner[c].x) != cx[c] || int'(corner[c].y) != cy[c]) begin
            failures++;
            $display("corner %0d at %0d,%0d expected %0d,%0d", c, corner[c].x, corner[c].y, cx[c], cy[c]);
          end
        end
        wq = cx[1] - cx[0] > cx[2] - cx[3] ? cx[1] - cx[0] : cx[2] - cx[3];
        hq = cy[3] - cy[0] > cy[2] - cy[1] ? cy[3] - cy[0] : cy[2] - cy[1];
        m_exp = 1;
        while (m_exp < 8 && (m_exp * wq < W || m_exp * hq < H)) m_exp++;
        checks++;
        if (int'(lpf_m) != m_exp) begin failures++; $display("M = %0d expected %0d", lpf_m, m_exp); end
      end
    end
    // one more VGA frame after the last rotation
    repeat (4 * (W + HF + HSY + HB) * (H + VF + VSY + VB) * 2) @(posedge clk);
    checks++;
    if (n_rot != NFR) begin failures++; $display("%0d rotations for %0d frames", n_rot, NFR); end
    checks++;
    if (n_skew_done < NFR - 1) begin failures++; $display("only %0d skews finished", n_skew_done); end
    // the skew of a whole image must fit in one camera frame period, at about
    // the filter's rate of one pixel per 9 to 11 cycles
    checks++;
    if (skew_cycles > 11 * W * H + 600 ||
        skew_cycles > 4 * 2 * (VBL + H / 2 + 1) * (8 + 2 * HBL + 2 * ACT)) begin
      failures++;
      $display("skew took %0d cycles for %0d pixels", skew_cycles, W * H);
    end
    checks++;
    if (capture_overrun) begin failures++; $display("capture overrun"); end
    checks++;
    if (vga_underflow) begin failures++; $display("VGA underflow"); end
    expect_seen("buffer rotations", n_rot);
    expect_seen("marker sets found", n_found);
    expect_seen("skews started", n_skew_start);
    expect_seen("skews finished", n_skew_done);
    expect_seen("VGA frames with exact background", n_bg_ok_frames);
    expect_seen("VGA frames with black first overlay", n_black_frames);
    expect_seen("VGA frames showing the recursion", n_recursive_frames);
    $display("last skew took %0d cycles after its rotation", skew_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_arbi_lpf_full: the filter at its full 640x480 size, filtering every
// pixel of a displaying image held in the real frame store (zbt_memory with
// two pipelined ZBT models) with no other memory traffic. This is the
// filter's own workload: one filtered sample per image pixel per frame,
// budgeted at 9 clock cycles per pixel, i.e. 640*480*9 = 2,764,800 cycles
// (30.7 ms at 90 MHz), just inside one 1/30 s video frame. Without other
// traffic the filter needs 8 cycles per pixel (12 in the border columns).
//
// The image is a pseudo-random pattern computed from (x, y) and written
// straight into the SRAM models at the physical addresses the frame store
// uses for the displaying image (image number role_buf[display], even pixels
// in SRAM 0, odd pixels in SRAM 1, word image*W*H/2 + index/2). Pixels are
// requested in raster order as fast as the filter accepts them. Every output
// is compared with a direct 16-term convolution (separable taps h[r]*h[c],
// borders clamped) and the total cycle count is checked against the 9-cycle
// budget. Two passes: M = 3 and M = 8.
module tb_arbi_lpf_full;
  import ar_pkg::*;

  localparam int W = 640, H = 480, N = W * H, RAW = 19;
  localparam int WATCHDOG = 8000000;

  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  // frame store with only the filter's window port in use
  logic             lpf_req, lpf_ack, lpf_rvalid;
  logic [IDX_W-1:0] lpf_idx [16];
  hsv_t             lpf_rdata [16];
  logic             cap_wr_ack, prw_ack, prr_ack, prr_rvalid, vga_ack, vga_rvalid;
  hsv_t             prr_rdata, vga_rdata;
  logic [RAW-1:0]   ram_addr [2];
  logic             ram_we [2];
  hsv_t             ram_wdata [2], ram_rdata [2];
  logic [1:0]       role_buf [3];

  zbt_memory mem (
    .clk, .rst, .frame_swap(1'b0),
    .cap_wr_req(1'b0), .cap_wr_idx('0), .cap_wr_pix('0), .cap_wr_ack,
    .prw_req(1'b0), .prw_idx('0), .prw_pix('0), .prw_ack,
    .prr_req(1'b0), .prr_idx('0), .prr_ack, .prr_rvalid, .prr_rdata,
    .vga_req(1'b0), .vga_idx('0), .vga_ack, .vga_rvalid, .vga_rdata,
    .lpf_req, .lpf_idx, .lpf_ack, .lpf_rvalid, .lpf_rdata,
    .ram_addr, .ram_we, .ram_wdata, .ram_rdata, .role_buf
  );
  zbt_ram_model #(.AW(RAW)) ram0 (.clk, .addr(ram_addr[0]), .we(ram_we[0]), .wdata(ram_wdata[0]), .rdata(ram_rdata[0]));
  zbt_ram_model #(.AW(RAW)) ram1 (.clk, .addr(ram_addr[1]), .we(ram_we[1]), .wdata(ram_wdata[1]), .rdata(ram_rdata[1]));

  logic [3:0] m = 1;
  logic       px_req = 0, busy, out_valid;
  coord_t     px_xy = '0;
  hsv_t       out_pix;

  arbi_lpf lpf (
    .clk, .rst, .m, .px_req, .px_xy, .busy,
    .win_req(lpf_req), .win_idx(lpf_idx), .win_ack(lpf_ack),
    .win_rvalid(lpf_rvalid), .win_pix(lpf_rdata),
    .out_valid, .out_pix
  );

  always #5 clk = ~clk;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ta [9] = '{0, 0, 14, 21, 23, 26, 27, 29, 30};
  int tb [9] = '{0, 64, 50, 43, 41, 38, 37, 35, 34};

  function automatic hsv_t pix(input int x, y, seed);
    int unsigned u;
    u = 32'(x) * 32'd2654435761 ^ 32'(y) * 32'd40503 ^ 32'(seed) * 32'd97;
    u = u ^ (u >> 13);
    u = u * 32'd1274126177;
    return hsv_t'(24'(u ^ (u >> 16)));
  endfunction

  function automatic int cl(input int v, hi);
    return v < 0 ? 0 : (v > hi ? hi : v);
  endfunction

  function automatic hsv_t ref_filt(input int x, y, mm, seed);
    int h [4], acc [3];
    hsv_t o;
    h = '{ta[mm], tb[mm], tb[mm], ta[mm]};
    acc = '{8192, 8192, 8192};
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        hsv_t p;
        p = pix(cl(x + c - 1, W - 1), cl(y + r - 1, H - 1), seed);
        acc[0] += h[r] * h[c] * int'(p.h);
        acc[1] += h[r] * h[c] * int'(p.s);
        acc[2] += h[r] * h[c] * int'(p.v);
      end
    o.h = 8'(acc[0] >> 14); o.s = 8'(acc[1] >> 14); o.v = 8'(acc[2] >> 14);
    return o;
  endfunction

  // collector: outputs arrive in request order
  int got = 0, seed = 0, mcur = 1, bad = 0;
  always @(negedge clk) begin
    if (!rst && out_valid) begin
      hsv_t e;
      e = ref_filt(got % W, got / W, mcur, seed);
      checks++;
      if (out_pix != e) begin
        failures++;
        if (bad < 10) $display("M=%0d pixel %0d,%0d: %h expected %h", mcur, got % W, got / W, out_pix, e);
        bad++;
      end
      got++;
    end
  end

  task automatic run_pass(input int mm, sd);
    longint t0, t1;
    int sent;
    int img;
    img = int'(role_buf[BUF_DISPLAY]);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int idx, a;
        idx = y * W + x;
        a = img * (N / 2) + idx / 2;
        if (idx % 2 == 0) ram0.mem[a] = pix(x, y, sd);
        else              ram1.mem[a] = pix(x, y, sd);
      end
    m = 4'(mm); mcur = mm; seed = sd; got = 0; sent = 0;
    @(negedge clk);
    t0 = $time / 10;
    while (sent < N) begin
      #1;
      if (!busy) begin
        px_req = 1;
        px_xy = '{x: 10'(sent % W), y: 10'(sent / W)};
        sent++;
      end else px_req = 0;
      @(negedge clk);
    end
    px_req = 0;
    while (got < N) @(negedge clk);
    t1 = $time / 10;
    $display("M=%0d: %0d pixels in %0d cycles (%0d.%02d cycles/pixel)", mm, N, t1 - t0,
             (t1 - t0) / longint'(N), ((t1 - t0) * 100 / longint'(N)) % 100);
    // within the budget of 9 cycles per pixel
    checks++;
    if (t1 - t0 > longint'(9 * N)) begin
      failures++;
      $display("filter took %0d cycles, more than %0d", t1 - t0, 9 * N);
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (4) @(posedge clk);
    run_pass(3, 1);
    run_pass(8, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

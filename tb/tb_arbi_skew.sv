// tb_arbi_skew: 16x12 image, a filter model that returns pixel (x, y) tagged
// with its own coordinates after a random delay, and a write port with random
// acknowledges. For several quadrilaterals (identity, shrunken, skewed like
// A'B'C'D' in the sketch of the transform, and a mirrored one) every source
// pixel must be written exactly once, at the destination computed here in
// floating point: I_A = A'+(D'-A')*y/H, I_B = B'+(C'-B')*y/H,
// I_C = I_A+(I_B-I_A)*x/W, rounded (either neighbour accepted within 0.01 of
// a half).
module tb_arbi_skew;
  import ar_pkg::*;

  localparam int W = 16, H = 12;

  logic clk = 0, rst = 1;
  logic start = 0;
  coord_t corner [4];
  logic busy, done;
  logic lpf_req, lpf_busy = 0, lpf_valid = 0;
  coord_t lpf_xy;
  hsv_t lpf_pix = '0;
  logic wr_req, wr_ack;
  logic [IDX_W-1:0] wr_idx;
  hsv_t wr_pix;
  int checks = 0, failures = 0;

  arbi_skew #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // filter model with the filter's timing: busy from the cycle after a
  // request until the window is in, the result two cycles after that
  coord_t m_xy;
  int     m_cnt;
  logic   m_v1 = 0;
  hsv_t   m_p1;
  always @(posedge clk) begin
    lpf_valid <= m_v1;
    lpf_pix   <= m_p1;
    m_v1      <= 1'b0;
    if (rst) begin
      lpf_busy <= 1'b0;
    end else if (lpf_req) begin
      lpf_busy <= 1'b1;
      m_xy     <= lpf_xy;
      m_cnt    <= $urandom_range(1, 9);
    end else if (lpf_busy) begin
      if (m_cnt == 0) begin
        lpf_busy <= 1'b0;
        m_v1     <= 1'b1;
        m_p1     <= '{h: 8'(m_xy.x), s: 8'(m_xy.y), v: 8'hA5};
      end else m_cnt <= m_cnt - 1;
    end
  end


  int seen [H][W];
  real ax, ay, bx, by, cx, cy, dx, dy;

  function automatic bit close_ok(input real v, input int got);
    real fr;
    fr = v - $floor(v);
    if (got == int'($floor(v + 0.5))) return 1;
    return (fr > 0.49 && fr < 0.51) && (got == int'($floor(v)) || got == int'($floor(v)) + 1);
  endfunction

  // write port: decide the acknowledge at the falling edge and score the
  // transfer that the next rising edge will make
  always @(negedge clk) begin
    wr_ack = wr_req && ($urandom_range(0, 2) != 0);
    if (!rst && wr_ack) score();
  end

  task automatic score();
    int sx, sy, gx, gy;
    real iax, iay, ibx, iby, icx, icy;
    sx = int'(wr_pix.h); sy = int'(wr_pix.s);
    gx = int'(wr_idx) % W; gy = int'(wr_idx) / W;
    iax = ax + (dx - ax) * sy / H; iay = ay + (dy - ay) * sy / H;
    ibx = bx + (cx - bx) * sy / H; iby = by + (cy - by) * sy / H;
    icx = iax + (ibx - iax) * sx / W; icy = iay + (iby - iay) * sx / W;
    checks++;
    if (wr_pix.v != 8'hA5 || sx >= W || sy >= H || !close_ok(icx, gx) || !close_ok(icy, gy)) begin
      failures++;
      $display("source %0d,%0d written to %0d,%0d, expected %f,%f", sx, sy, gx, gy, icx, icy);
    end else seen[sy][sx]++;
  endtask

  task automatic run(input int a_x, a_y, b_x, b_y, c_x, c_y, d_x, d_y);
    int cyc;
    ax = a_x; ay = a_y; bx = b_x; by = b_y; cx = c_x; cy = c_y; dx = d_x; dy = d_y;
    corner[0] = '{x: 10'(a_x), y: 10'(a_y)};
    corner[1] = '{x: 10'(b_x), y: 10'(b_y)};
    corner[2] = '{x: 10'(c_x), y: 10'(c_y)};
    corner[3] = '{x: 10'(d_x), y: 10'(d_y)};
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) seen[y][x] = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 0;
    while (!done && cyc < 50000) begin @(negedge clk); cyc++; end
    checks++;
    if (!done) begin failures++; $display("skew did not finish"); end
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      checks++;
      if (seen[y][x] != 1) begin failures++; $display("source %0d,%0d written %0d times", x, y, seen[y][x]); end
    end
    repeat (3) @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("still busy after done"); end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) corner[i] = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    run(0, 0, 16, 0, 16, 12, 0, 12);     // identity
    run(3, 2, 11, 2, 11, 8, 3, 8);       // shrunken rectangle
    run(2, 1, 11, 4, 14, 9, 4, 11);      // skewed quadrilateral
    run(13, 10, 2, 9, 1, 1, 12, 2);      // rotated by half a turn
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// lpf_factor: chooses the filter's downsampling factor M from the corners.
//
// The picture shrinks from IMG_W x IMG_H to the quadrilateral A'B'C'D'; the
// horizontal reduction is at least IMG_W / max(|B'x-A'x|, |C'x-D'x|) and the
// vertical one IMG_H / max(|D'y-A'y|, |C'y-B'y|). M is the smallest integer
// 1..M_MAX with M * width >= IMG_W and M * height >= IMG_H, so that the
// filter's cutoff pi/M removes what the skew would alias. Registered; valid
// one cycle after the corners. Deriving M from the corners is this design's
// own reading of the corner coordinates going to the filter.
module lpf_factor
  import ar_pkg::*;
#(
  parameter int unsigned IMG_W = 640,
  parameter int unsigned IMG_H = 480,
  parameter int unsigned M_MAX = 8
) (
  input  logic       clk,
  input  logic       rst,
  input  coord_t     corner [4],
  output logic [3:0] m
);
  function automatic logic [COORD_W-1:0] absdiff(input logic [COORD_W-1:0] a, input logic [COORD_W-1:0] b);
    return (a > b) ? a - b : b - a;
  endfunction

  logic [COORD_W-1:0] wq, hq, w1, w2, h1, h2;
  logic [3:0]         mm;
  always_comb begin
    w1 = absdiff(corner[1].x, corner[0].x);
    w2 = absdiff(corner[2].x, corner[3].x);
    h1 = absdiff(corner[3].y, corner[0].y);
    h2 = absdiff(corner[2].y, corner[1].y);
    wq = (w1 > w2) ? w1 : w2;
    hq = (h1 > h2) ? h1 : h2;
    mm = 4'(M_MAX);
    for (int k = M_MAX; k >= 1; k--)
      if (k * int'(wq) >= int'(IMG_W) && k * int'(hq) >= int'(IMG_H)) mm = 4'(k);
  end

  always_ff @(posedge clk) begin
    if (rst) m <= 4'd1;
    else     m <= mm;
  end
endmodule

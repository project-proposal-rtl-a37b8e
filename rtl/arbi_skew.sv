// arbi_skew: projects the whole (filtered) image onto the quadrilateral
// A'B'C'D' found by object recognition, by writing each source pixel to its
// destination in the processing image.
//
// How it works (iterator points, all in fixed point with F fraction bits):
//   * At start, I_A = A' and I_B = B'. Per source row, I_A moves along A'D'
//     by (D'-A')/IMG_H and I_B along B'C' by (C'-B')/IMG_H.
//   * At the start of each source row the step of I_C is (I_B-I_A)/IMG_W and
//     I_C starts at I_A. Source pixel (o_x, o_y) is written at round(I_C),
//     then I_C takes one step and o_x increments; IMG_W pixels per row.
//   * The steps are vectors, so moving a point "by a distance along a line"
//     needs no angle, sine, cosine or square root: a division by the constant
//     IMG_W or IMG_H, done as a multiplication by a 24-bit reciprocal. That
//     is two multiplications per row and four per frame; per pixel only
//     additions remain.
//   * Destinations outside the image are skipped. Since the destination is
//     normally smaller than the source, several source pixels land on most
//     destinations; rounding can still miss an isolated destination pixel
//     now and then (a few per frame), which keeps its old content.
// Pipeline: a QD-entry queue decouples the filter from the memory. A slot is
// reserved with the destination when a pixel is requested from ArbiLPF
// (lpf_req/lpf_xy, combinational, only while !lpf_busy, so a request can go
// out in every cycle the filter can take one), filled when lpf_valid returns
// the filtered pixel (in order), and written through wr_req/wr_idx/wr_pix
// until wr_ack. done pulses when the last pixel of the frame is written.
// Corner order: corner[0] = A' (top left), [1] = B' (top right),
// [2] = C' (bottom right), [3] = D' (bottom left).
// The iterator-point walk follows the algorithm given for the block; the
// vector steps instead of trigonometric tables, the number formats, the
// queue and the handshakes are this design's own.
module arbi_skew
  import ar_pkg::*;
#(
  parameter int unsigned IMG_W = 640,
  parameter int unsigned IMG_H = 480,
  parameter int unsigned F     = 16,
  parameter int unsigned QD    = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  coord_t           corner [4],
  output logic             busy,
  output logic             done,
  // ArbiLPF
  output logic             lpf_req,
  output coord_t           lpf_xy,
  input  logic             lpf_busy,
  input  logic             lpf_valid,
  input  hsv_t             lpf_pix,
  // processing-image write port
  output logic             wr_req,
  output logic [IDX_W-1:0] wr_idx,
  output hsv_t             wr_pix,
  input  logic             wr_ack
);

  localparam int unsigned PW = COORD_W + 2 + F;       // signed point component
  localparam int unsigned R  = 24;
  localparam longint IW = longint'(IMG_W);
  localparam longint IH = longint'(IMG_H);
  localparam logic [R:0] RECIP_W = (R+1)'(((64'd1 << R) + IW / 2) / IW);
  localparam logic [R:0] RECIP_H = (R+1)'(((64'd1 << R) + IH / 2) / IH);

  typedef logic signed [PW-1:0] fx_t;
  typedef struct packed { fx_t x; fx_t y; } pt_t;

  function automatic fx_t to_fx(input logic [COORD_W-1:0] c);
    return fx_t'(c) <<< F;
  endfunction
  // (b - a) / n with n given by its reciprocal
  function automatic fx_t div_by(input fx_t a, input fx_t b, input logic [R:0] recip);
    logic signed [PW+R+1:0] p;
    p = (PW+R+2)'(b - a) * signed'((PW+R+2)'(recip));
    return fx_t'(p >>> R);
  endfunction

  typedef enum logic [2:0] {S_IDLE, S_FRAME, S_ROW, S_RUN, S_NEXT, S_DRAIN} state_e;
  state_e state;

  pt_t ia, ib, ic, step_a, step_b, step_c;
  logic [COORD_W-1:0] ox, oy;

  // destination queue
  typedef struct packed {
    logic             ok;       // destination inside the image
    logic [IDX_W-1:0] dest;
    hsv_t             pix;
    logic             ready;
  } slot_t;
  localparam int unsigned QA = $clog2(QD);
  slot_t q [QD];
  logic [QA-1:0] wp, fp, rp;
  logic [QA:0]   count;

  // destination of the current I_C
  logic signed [PW-1:0] rx, ry;
  logic dest_ok;
  always_comb begin
    rx = (ic.x + (fx_t'(1) <<< (F - 1))) >>> F;
    ry = (ic.y + (fx_t'(1) <<< (F - 1))) >>> F;
    dest_ok = rx >= 0 && ry >= 0 && rx < fx_t'(IMG_W) && ry < fx_t'(IMG_H);
  end

  logic issue, pop;
  assign issue   = state == S_RUN && count < (QA+1)'(QD) && !lpf_busy;
  assign lpf_req = issue;
  assign lpf_xy  = '{x: ox, y: oy};
  assign wr_req = count != 0 && q[rp].ready && q[rp].ok;
  assign wr_idx = q[rp].dest;
  assign wr_pix = q[rp].pix;
  assign pop    = count != 0 && q[rp].ready && (!q[rp].ok || wr_ack);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      done <= 1'b0;
      ia <= '0; ib <= '0; ic <= '0; step_a <= '0; step_b <= '0; step_c <= '0;
      ox <= '0; oy <= '0;
      wp <= '0; fp <= '0; rp <= '0; count <= '0;
      for (int i = 0; i < QD; i++) q[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          ia <= '{x: to_fx(corner[0].x), y: to_fx(corner[0].y)};
          ib <= '{x: to_fx(corner[1].x), y: to_fx(corner[1].y)};
          state <= S_FRAME;
        end
        S_FRAME: begin
          step_a.x <= div_by(to_fx(corner[0].x), to_fx(corner[3].x), RECIP_H);
          step_a.y <= div_by(to_fx(corner[0].y), to_fx(corner[3].y), RECIP_H);
          step_b.x <= div_by(to_fx(corner[1].x), to_fx(corner[2].x), RECIP_H);
          step_b.y <= div_by(to_fx(corner[1].y), to_fx(corner[2].y), RECIP_H);
          oy <= '0;
          state <= S_ROW;
        end
        S_ROW: begin
          step_c.x <= div_by(ia.x, ib.x, RECIP_W);
          step_c.y <= div_by(ia.y, ib.y, RECIP_W);
          ic <= ia;
          ox <= '0;
          state <= S_RUN;
        end
        S_RUN: if (issue) begin
          q[wp].ok    <= dest_ok;
          q[wp].dest  <= IDX_W'(ry) * IDX_W'(IMG_W) + IDX_W'(rx);
          q[wp].ready <= 1'b0;
          wp <= QA'((int'(wp) + 1) % QD);
          ic.x <= ic.x + step_c.x;
          ic.y <= ic.y + step_c.y;
          ox <= ox + 1'b1;
          if (ox == COORD_W'(IMG_W - 1)) state <= S_NEXT;
        end
        S_NEXT: begin
          ia.x <= ia.x + step_a.x; ia.y <= ia.y + step_a.y;
          ib.x <= ib.x + step_b.x; ib.y <= ib.y + step_b.y;
          oy <= oy + 1'b1;
          state <= (oy == COORD_W'(IMG_H - 1)) ? S_DRAIN : S_ROW;
        end
        S_DRAIN: if (count == 0) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
      if (lpf_valid) begin
        q[fp].pix   <= lpf_pix;
        q[fp].ready <= 1'b1;
        fp <= QA'((int'(fp) + 1) % QD);
      end
      if (pop) rp <= QA'((int'(rp) + 1) % QD);
      count <= count + (QA+1)'(issue) - (QA+1)'(pop);
    end
  end

  assign busy = state != S_IDLE;

  a_wr_hold: assert property (@(posedge clk) disable iff (rst)
    wr_req && !wr_ack |=> wr_req && $stable(wr_idx) && $stable(wr_pix));

endmodule

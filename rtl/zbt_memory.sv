// zbt_memory: the frame store. Three 640x480 H/S/V images (capturing,
// processing, displaying) live in two external ZBT SRAMs; five client ports
// share them, and the images change roles once per captured frame.
//
// How it works:
//   * Image layout: pixel index i = y*IMG_W + x. Even pixels go to SRAM 0,
//     odd pixels to SRAM 1 (bank = i[0]); inside a bank the word address is
//     buf*IMG_W*IMG_H/2 + i/2, where buf (0..2) is the physical image. Every
//     image is therefore split across both chips, and two neighbouring pixels
//     can be accessed in the same cycle.
//   * Roles: role_buf[] maps capturing/processing/displaying to physical
//     images. On frame_swap: processing -> displaying, displaying -> capturing,
//     capturing -> processing. No pixel is ever copied; clients give indices
//     relative to their image and the module adds the base.
//   * Arbitration: each bank accepts one access per cycle. Per bank a
//     round-robin arbiter picks among the clients whose next access falls in
//     that bank, so no client is favoured over another. The ArbiLPF port asks
//     for a whole window of NWIN pixels at once; its accesses are spread over
//     both banks and compete access by access like the others.
//   * ZBT timing (pipelined, no turnaround cycles): address and write enable
//     leave a register in the issue cycle; write data follows two cycles
//     after the address is sampled, read data arrives two cycles after it.
//     A tag pipeline routes each returning word to its client.
// Client handshakes (all one clock domain):
//   * capture write, processing write: req/idx/pix held until ack (ack is the
//     combinational grant, so the transfer happens in the cycle req&ack).
//   * processing read, VGA read: req/idx held until ack; rvalid pulses with
//     rdata at the fourth clock edge after the edge that saw req & ack.
//   * ArbiLPF window read: lpf_req/lpf_idx held until lpf_ack, which is high
//     in the cycle in which the last of the NWIN accesses is granted; the
//     next window may follow right away. lpf_rvalid pulses once per window,
//     in request order, when all NWIN pixels are in lpf_rdata. Two windows
//     overlap: one is being issued while the previous one returns, so with
//     no other traffic a window costs NWIN/2 cycles.
// The three images, their rotation, the split over two chips, the port list
// and the fairness rule follow the frame-store description; the interleaving
// by pixel parity, the handshakes and the round-robin scheme are this
// design's own choices.
module zbt_memory
  import ar_pkg::*;
#(
  parameter int unsigned IMG_W  = 640,
  parameter int unsigned IMG_H  = 480,
  parameter int unsigned RAM_AW = 19,
  parameter int unsigned NWIN   = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             frame_swap,
  // (1) capturing image, write
  input  logic             cap_wr_req,
  input  logic [IDX_W-1:0] cap_wr_idx,
  input  hsv_t             cap_wr_pix,
  output logic             cap_wr_ack,
  // (2,3) processing image, write
  input  logic             prw_req,
  input  logic [IDX_W-1:0] prw_idx,
  input  hsv_t             prw_pix,
  output logic             prw_ack,
  // (4) processing image, read
  input  logic             prr_req,
  input  logic [IDX_W-1:0] prr_idx,
  output logic             prr_ack,
  output logic             prr_rvalid,
  output hsv_t             prr_rdata,
  // (5) displaying image, read by VGA Write
  input  logic             vga_req,
  input  logic [IDX_W-1:0] vga_idx,
  output logic             vga_ack,
  output logic             vga_rvalid,
  output hsv_t             vga_rdata,
  // (6) displaying image, window read by ArbiLPF
  input  logic             lpf_req,
  input  logic [IDX_W-1:0] lpf_idx   [NWIN],
  output logic             lpf_ack,
  output logic             lpf_rvalid,
  output hsv_t             lpf_rdata [NWIN],
  // the two ZBT SRAMs
  output logic [RAM_AW-1:0] ram_addr  [2],
  output logic              ram_we    [2],
  output hsv_t              ram_wdata [2],
  input  hsv_t              ram_rdata [2],
  // which physical image holds each role (for observation)
  output logic [1:0]        role_buf  [3]
);

  localparam int unsigned HALF = IMG_W * IMG_H / 2;
  localparam int unsigned NAG  = 5;
  localparam int unsigned JW   = $clog2(NWIN);

  typedef enum logic [2:0] {
    AG_CAPW = 3'd0, AG_PRW = 3'd1, AG_PRR = 3'd2, AG_VGA = 3'd3, AG_LPF = 3'd4
  } agent_e;

  typedef struct packed {
    logic          v;
    agent_e        ag;
    logic [JW-1:0] j;
  } tag_t;

  // ---- roles -----------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      role_buf[BUF_CAPTURE] <= 2'd0;
      role_buf[BUF_PROCESS] <= 2'd1;
      role_buf[BUF_DISPLAY] <= 2'd2;
    end else if (frame_swap) begin
      role_buf[BUF_DISPLAY] <= role_buf[BUF_PROCESS];
      role_buf[BUF_CAPTURE] <= role_buf[BUF_DISPLAY];
      role_buf[BUF_PROCESS] <= role_buf[BUF_CAPTURE];
    end
  end

  function automatic logic [RAM_AW-1:0] word_addr(input logic [1:0] pbuf, input logic [IDX_W-1:0] idx);
    return RAM_AW'(pbuf) * RAM_AW'(HALF) + RAM_AW'(idx >> 1);
  endfunction

  // ---- ArbiLPF window bookkeeping -----------------------------------------
  logic [NWIN-1:0] lpf_issued;
  logic [JW:0]     lpf_returned;
  logic            lpf_live;
  assign lpf_live = lpf_req;

  // lowest unissued window element per bank
  logic          lpf_has [2];
  logic [JW-1:0] lpf_sel [2];
  always_comb begin
    for (int b = 0; b < 2; b++) begin
      lpf_has[b] = 1'b0;
      lpf_sel[b] = '0;
      for (int j = NWIN - 1; j >= 0; j--)
        if (lpf_live && !lpf_issued[j] && lpf_idx[j][0] == 1'(b)) begin
          lpf_has[b] = 1'b1;
          lpf_sel[b] = JW'(j);
        end
    end
  end

  // ---- per-bank round-robin arbitration -------------------------------------
  logic [NAG-1:0] want  [2];
  logic [NAG-1:0] grant [2];
  logic [2:0]     rr    [2];

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      want[b][AG_CAPW] = cap_wr_req && cap_wr_idx[0] == 1'(b);
      want[b][AG_PRW]  = prw_req    && prw_idx[0]    == 1'(b);
      want[b][AG_PRR]  = prr_req    && prr_idx[0]    == 1'(b);
      want[b][AG_VGA]  = vga_req    && vga_idx[0]    == 1'(b);
      want[b][AG_LPF]  = lpf_has[b];
      grant[b] = '0;
      for (int k = NAG - 1; k >= 0; k--) begin
        int a;
        a = (int'(rr[b]) + k) % NAG;
        if (want[b][a]) grant[b] = NAG'(1) << a;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rr[0] <= '0;
      rr[1] <= '0;
    end else begin
      for (int b = 0; b < 2; b++)
        for (int a = 0; a < NAG; a++)
          if (grant[b][a]) rr[b] <= 3'((a + 1) % NAG);
    end
  end

  assign cap_wr_ack = grant[0][AG_CAPW] | grant[1][AG_CAPW];
  assign prw_ack    = grant[0][AG_PRW]  | grant[1][AG_PRW];
  assign prr_ack    = grant[0][AG_PRR]  | grant[1][AG_PRR];
  assign vga_ack    = grant[0][AG_VGA]  | grant[1][AG_VGA];

  // the window is accepted when its last outstanding accesses are granted
  logic [NWIN-1:0] lpf_now;
  always_comb begin
    lpf_now = lpf_issued;
    for (int b = 0; b < 2; b++)
      if (grant[b][AG_LPF]) lpf_now[lpf_sel[b]] = 1'b1;
  end
  assign lpf_ack = lpf_req && (&lpf_now);

  // ---- issue -----------------------------------------------------------------
  tag_t tag_pipe [2][4];
  hsv_t wd_pipe  [2][3];

  always_ff @(posedge clk) begin
    for (int b = 0; b < 2; b++) begin
      ram_we[b]      <= 1'b0;
      tag_pipe[b][0] <= '0;
      wd_pipe[b][0]  <= '0;
      if (grant[b][AG_CAPW]) begin
        ram_addr[b] <= word_addr(role_buf[BUF_CAPTURE], cap_wr_idx);
        ram_we[b]   <= 1'b1;
        wd_pipe[b][0] <= cap_wr_pix;
      end else if (grant[b][AG_PRW]) begin
        ram_addr[b] <= word_addr(role_buf[BUF_PROCESS], prw_idx);
        ram_we[b]   <= 1'b1;
        wd_pipe[b][0] <= prw_pix;
      end else if (grant[b][AG_PRR]) begin
        ram_addr[b] <= word_addr(role_buf[BUF_PROCESS], prr_idx);
        tag_pipe[b][0] <= '{v: 1'b1, ag: AG_PRR, j: '0};
      end else if (grant[b][AG_VGA]) begin
        ram_addr[b] <= word_addr(role_buf[BUF_DISPLAY], vga_idx);
        tag_pipe[b][0] <= '{v: 1'b1, ag: AG_VGA, j: '0};
      end else if (grant[b][AG_LPF]) begin
        ram_addr[b] <= word_addr(role_buf[BUF_DISPLAY], lpf_idx[lpf_sel[b]]);
        tag_pipe[b][0] <= '{v: 1'b1, ag: AG_LPF, j: lpf_sel[b]};
      end
      for (int s = 1; s < 4; s++) tag_pipe[b][s] <= tag_pipe[b][s-1];
      for (int s = 1; s < 3; s++) wd_pipe[b][s]  <= wd_pipe[b][s-1];
      if (rst) begin
        ram_we[b] <= 1'b0;
        for (int s = 0; s < 4; s++) tag_pipe[b][s] <= '0;
      end
    end
  end

  assign ram_wdata[0] = wd_pipe[0][2];
  assign ram_wdata[1] = wd_pipe[1][2];

  // ---- return ------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      prr_rvalid   <= 1'b0;
      vga_rvalid   <= 1'b0;
      lpf_rvalid   <= 1'b0;
      lpf_issued   <= '0;
      lpf_returned <= '0;
      prr_rdata    <= '0;
      vga_rdata    <= '0;
    end else begin
      logic [JW:0] ret;
      prr_rvalid <= 1'b0;
      vga_rvalid <= 1'b0;
      lpf_rvalid <= 1'b0;
      ret = lpf_returned;
      lpf_issued <= lpf_ack ? '0 : lpf_now;
      for (int b = 0; b < 2; b++) begin
        if (tag_pipe[b][3].v) begin
          unique case (tag_pipe[b][3].ag)
            AG_PRR: begin prr_rvalid <= 1'b1; prr_rdata <= ram_rdata[b]; end
            AG_VGA: begin vga_rvalid <= 1'b1; vga_rdata <= ram_rdata[b]; end
            AG_LPF: begin lpf_rdata[tag_pipe[b][3].j] <= ram_rdata[b]; ret = ret + 1'b1; end
            default: ;
          endcase
        end
      end
      if (ret == (JW+1)'(NWIN)) begin
        lpf_rvalid   <= 1'b1;
        lpf_returned <= '0;
      end else begin
        lpf_returned <= ret;
      end
    end
  end

  // ---- handshake rules ---------------------------------------------------------
  a_capw_hold: assert property (@(posedge clk) disable iff (rst)
    cap_wr_req && !cap_wr_ack |=> cap_wr_req && $stable(cap_wr_idx));
  a_prw_hold: assert property (@(posedge clk) disable iff (rst)
    prw_req && !prw_ack |=> prw_req && $stable(prw_idx));
  a_vga_hold: assert property (@(posedge clk) disable iff (rst)
    vga_req && !vga_ack |=> vga_req && $stable(vga_idx));
  a_one_grant: assert property (@(posedge clk) disable iff (rst)
    $onehot0(grant[0]) && $onehot0(grant[1]));

endmodule

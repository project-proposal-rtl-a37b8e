// vga_write: 640x480, 60 Hz VGA output of the displaying image.
//
// How it works: hcount and vcount run over the standard 800x525 raster
// (640 visible + 16 front porch + 96 sync + 48 back porch pixels per line,
// 480 + 10 + 2 + 33 lines per frame; both syncs active low), advanced once
// per pix_ce, which must pulse at the 25.175 MHz pixel rate. Because the
// frame store is shared and its latency varies, pixels are prefetched in
// raster order (index 0, 1, 2, ...) into a FIFO of FIFO_D entries whenever it
// has room. Each visible pixel pops one entry, converts it to R/G/B and
// drives it out; outside the visible area the outputs are black. At the first
// blank line (vcount = IMG_H) the FIFO is emptied, and fetching restarts at
// index 0 for the next frame once no read is in flight. After reset the raster starts at
// the first blank line, so the first frame is prefetched too. A visible pixel that
// finds the FIFO empty is shown black and sets the sticky underflow flag.
// Interface: rd_req/rd_idx held until rd_ack, data on rd_rvalid/rd_data (the
// frame store's VGA port). Outputs are registered, one pix_ce after the
// counters that produced them.
// The resolution, refresh rate and counter-driven reading follow the
// description of the block; the prefetch FIFO and the H/S/V to R/G/B step
// are this design's own.
module vga_write
  import ar_pkg::*;
#(
  parameter int unsigned IMG_W  = 640,
  parameter int unsigned IMG_H  = 480,
  parameter int unsigned H_FP   = 16,
  parameter int unsigned H_SYNC = 96,
  parameter int unsigned H_BP   = 48,
  parameter int unsigned V_FP   = 10,
  parameter int unsigned V_SYNC = 2,
  parameter int unsigned V_BP   = 33,
  parameter int unsigned FIFO_D = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             pix_ce,
  // frame store read port
  output logic             rd_req,
  output logic [IDX_W-1:0] rd_idx,
  input  logic             rd_ack,
  input  logic             rd_rvalid,
  input  hsv_t             rd_data,
  // monitor
  output logic             hsync_n,
  output logic             vsync_n,
  output logic             blank,
  output logic [7:0]       red,
  output logic [7:0]       green,
  output logic [7:0]       blue,
  output logic [10:0]      hcount,
  output logic [9:0]       vcount,
  output logic             underflow
);

  localparam int unsigned H_TOT = IMG_W + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = IMG_H + V_FP + V_SYNC + V_BP;
  localparam int unsigned NPIX  = IMG_W * IMG_H;
  localparam int unsigned FA    = $clog2(FIFO_D);

  // ---- raster counters ------------------------------------------------------
  logic visible, flush;
  assign visible = hcount < 11'(IMG_W) && vcount < 10'(IMG_H);
  assign flush   = pix_ce && hcount == '0 && vcount == 10'(IMG_H);

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= 10'(IMG_H);       // start in vertical blanking
    end else if (pix_ce) begin
      if (hcount == 11'(H_TOT - 1)) begin
        hcount <= '0;
        vcount <= (vcount == 10'(V_TOT - 1)) ? '0 : vcount + 1'b1;
      end else begin
        hcount <= hcount + 1'b1;
      end
    end
  end

  // ---- prefetch FIFO ----------------------------------------------------------
  hsv_t          fifo [FIFO_D];
  logic [FA-1:0] wptr, rptr;
  logic [FA:0]   level, inflight;
  logic [IDX_W-1:0] next_idx;
  logic          pop, push, issue, restart;

  assign pop   = pix_ce && visible && level != 0;
  assign push  = rd_rvalid && !restart;
  assign issue = rd_req && rd_ack;

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0; rptr <= '0; level <= '0; inflight <= '0;
      next_idx <= '0; rd_req <= 1'b0; rd_idx <= '0; restart <= 1'b0;
    end else begin
      logic [FA:0] lv, fl;
      lv = level; fl = inflight;
      if (issue) fl = fl + 1'b1;
      if (rd_rvalid) fl = fl - 1'b1;
      if (push) begin
        fifo[wptr] <= rd_data;
        wptr <= wptr + 1'b1;
        lv = lv + 1'b1;
      end
      if (pop) begin
        rptr <= rptr + 1'b1;
        lv = lv - 1'b1;
      end
      if (flush) begin
        restart <= 1'b1;
        lv = '0;
        rptr <= '0;
        wptr <= '0;
        next_idx <= '0;
      end else if (restart && fl == 0 && !rd_req) begin
        restart <= 1'b0;
      end
      level    <= lv;
      inflight <= fl;
      // request the next pixel while the FIFO has room for it
      if (issue) begin
        rd_req <= 1'b0;
      end else if (!rd_req && !restart && !flush &&
                   lv + fl < (FA+1)'(FIFO_D) && next_idx < IDX_W'(NPIX)) begin
        rd_req   <= 1'b1;
        rd_idx   <= next_idx;
        next_idx <= next_idx + 1'b1;
      end
    end
  end

  // ---- output -----------------------------------------------------------------
  logic [7:0] cr, cg, cb;
  hsv_to_rgb u_rgb (.hsv(fifo[rptr]), .r(cr), .g(cg), .b(cb));

  always_ff @(posedge clk) begin
    if (rst) begin
      hsync_n <= 1'b1; vsync_n <= 1'b1; blank <= 1'b1;
      red <= '0; green <= '0; blue <= '0;
      underflow <= 1'b0;
    end else if (pix_ce) begin
      hsync_n <= !(hcount >= 11'(IMG_W + H_FP) && hcount < 11'(IMG_W + H_FP + H_SYNC));
      vsync_n <= !(vcount >= 10'(IMG_H + V_FP) && vcount < 10'(IMG_H + V_FP + V_SYNC));
      blank   <= !visible;
      if (visible && level != 0) begin
        red <= cr; green <= cg; blue <= cb;
      end else begin
        red <= '0; green <= '0; blue <= '0;
      end
      if (visible && level == 0) underflow <= 1'b1;
    end
  end

endmodule

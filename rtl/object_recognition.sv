// object_recognition: finds the four corners of the picture frame as the
// centre of mass of the pixels of each marker colour seen in one frame.
//
// How it works: for each of the four colours an accumulator adds up the x
// and the y coordinates of every reported pixel and counts the pixels. When
// frame_done pulses, the sums and counts are copied to a holding set, the
// accumulators restart for the next frame, and one shared restoring divider
// (one quotient bit per cycle) computes sum_x/count and sum_y/count for the
// four colours in turn: 8 divisions of SUM_W cycles each, about 240 cycles
// for the full-size image. Every coordinate is a plain average (all pixels
// weigh the same). A colour that was not seen keeps its previous corner and
// its bit in `found` is cleared. The four corners and `found` change together,
// in the cycle in which coords_valid pulses.
// Interface: det_valid/det_color/det_xy per detected pixel (any rate, one per
// cycle at most), frame_done pulse; outputs corner[color], found, coords_valid.
// Averaging per colour and per axis follows the description of the block; the
// sequential divider and the behaviour for a missing colour are this
// design's own choices.
module object_recognition
  import ar_pkg::*;
#(
  parameter int unsigned CNT_W = IDX_W,               // pixel count per colour
  parameter int unsigned SUM_W = IDX_W + COORD_W      // coordinate sum
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    det_valid,
  input  marker_e det_color,
  input  coord_t  det_xy,
  input  logic    frame_done,
  output coord_t  corner [4],
  output logic [3:0] found,
  output logic    coords_valid,
  output logic    busy
);

  logic [SUM_W-1:0] acc_x [4], acc_y [4];
  logic [CNT_W-1:0] acc_n [4];
  logic [SUM_W-1:0] hold_x [4], hold_y [4];
  logic [CNT_W-1:0] hold_n [4];

  // ---- accumulation -----------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < 4; c++) begin
        acc_x[c] <= '0; acc_y[c] <= '0; acc_n[c] <= '0;
      end
    end else begin
      for (int c = 0; c < 4; c++) begin
        logic hit;
        hit = det_valid && det_color == marker_e'(c);
        if (frame_done) begin
          acc_x[c] <= hit ? SUM_W'(det_xy.x) : '0;
          acc_y[c] <= hit ? SUM_W'(det_xy.y) : '0;
          acc_n[c] <= hit ? CNT_W'(1) : '0;
        end else if (hit) begin
          acc_x[c] <= acc_x[c] + SUM_W'(det_xy.x);
          acc_y[c] <= acc_y[c] + SUM_W'(det_xy.y);
          acc_n[c] <= acc_n[c] + 1'b1;
        end
      end
    end
  end

  // ---- sequential division ---------------------------------------------------
  localparam int unsigned BW = $clog2(SUM_W + 1);
  logic [2:0]       job;          // {colour, axis}
  logic [BW-1:0]    bitn;
  logic [SUM_W-1:0] quo, dvd;
  logic [CNT_W:0]   rem;
  logic             dividing;
  coord_t           res [4];      // corners being computed
  logic [CNT_W+1:0] trial;         // one bit wider: its MSB is the sign

  always_comb trial = {1'b0, rem[CNT_W-1:0], dvd[SUM_W-1]} - {2'b0, hold_n[job[2:1]]};

  always_ff @(posedge clk) begin
    if (rst) begin
      dividing     <= 1'b0;
      coords_valid <= 1'b0;
      found        <= '0;
      job <= '0; bitn <= '0; quo <= '0; dvd <= '0; rem <= '0;
      for (int c = 0; c < 4; c++) begin
        corner[c] <= '0;
        res[c]    <= '0;
        hold_x[c] <= '0; hold_y[c] <= '0; hold_n[c] <= '0;
      end
    end else begin
      coords_valid <= 1'b0;
      if (frame_done && !dividing) begin
        for (int c = 0; c < 4; c++) begin
          hold_x[c] <= acc_x[c]; hold_y[c] <= acc_y[c]; hold_n[c] <= acc_n[c];
        end
        dividing <= 1'b1;
        job  <= '0;
        bitn <= '0;
        rem  <= '0;
        dvd  <= acc_x[0];
        quo  <= '0;
      end else if (dividing) begin
        // one restoring step: shift the next dividend bit into the remainder
        if (!trial[CNT_W+1]) begin
          rem <= trial[CNT_W:0];
          quo <= {quo[SUM_W-2:0], 1'b1};
        end else begin
          rem <= {rem[CNT_W-1:0], dvd[SUM_W-1]};
          quo <= {quo[SUM_W-2:0], 1'b0};
        end
        dvd  <= {dvd[SUM_W-2:0], 1'b0};
        bitn <= bitn + 1'b1;
        if (bitn == BW'(SUM_W - 1)) begin
          logic [SUM_W-1:0] q;
          q = {quo[SUM_W-2:0], !trial[CNT_W+1]};
          if (hold_n[job[2:1]] != '0) begin
            if (job[0]) res[job[2:1]].y <= COORD_W'(q);
            else        res[job[2:1]].x <= COORD_W'(q);
          end
          bitn <= '0;
          rem  <= '0;
          quo  <= '0;
          job  <= job + 1'b1;
          dvd  <= job[0] ? hold_x[job[2:1] + 1'b1] : hold_y[job[2:1]];
          if (job == 3'd7) begin
            // publish all four corners at once; the last quotient is still in flight
            dividing     <= 1'b0;
            coords_valid <= 1'b1;
            for (int c = 0; c < 4; c++) begin
              found[c] <= hold_n[c] != '0;
              if (hold_n[c] != '0) corner[c] <= res[c];
            end
            if (hold_n[3] != '0) corner[3].y <= COORD_W'(q);
          end
        end
      end
    end
  end

  assign busy = dividing;

endmodule

// Face centroid computation for up to two faces.
// Faces are assumed to sit side by side, so the frame is split at column
// SPLIT_X into a left and a right region, each holding at most one face. For
// every filtered skin pixel the block adds its X and Y coordinate and a one to
// the sums of its region. When i_frame_end arrives (together with the frame's
// last pixel) the sums are frozen and four sequential dividers compute
// mean X = sum X / count and mean Y = sum Y / count for both regions. A region
// holds a face when its pixel count reaches MIN_AREA.
// Interface: filtered pixel stream in (i_valid, i_skin, i_x, i_y) and
// i_frame_end; out: o_done pulse with o_face[0] (left) and o_face[1] (right),
// each a valid flag and centroid, plus the region pixel counts o_area.
// Timing: o_done rises 34 clocks after the edge that samples i_frame_end and
// the results appear with it; they hold until the
// next o_done. Accumulation of the next frame starts right after i_frame_end.
// The mean-of-coordinates method, the two-face limit and the side-by-side
// assumption follow the design; the split column (frame centre), the minimum
// area and the divider are this implementation's choices.
module centroid_calc
  import face_pkg::*;
#(
  parameter int unsigned H_ACT    = 640,
  parameter int unsigned V_ACT    = 480,
  parameter int unsigned SPLIT_X  = H_ACT / 2,
  parameter int unsigned MIN_AREA = 400
) (
  input  logic        i_clk,
  input  logic        i_rst_n,
  input  logic        i_valid,
  input  logic        i_skin,
  input  logic [10:0] i_x,
  input  logic [10:0] i_y,
  input  logic        i_frame_end,
  output logic        o_done,
  output face_t       o_face [2],
  output logic [19:0] o_area [2]
);
  localparam int unsigned SUMW = 32;
  localparam int unsigned CNTW = 20;

  logic [SUMW-1:0] sx [2], sy [2], sx_n [2], sy_n [2];
  logic [CNTW-1:0] cnt [2], cnt_n [2], cnt_f [2];
  logic [SUMW-1:0] q [4];
  logic            d_done [4];
  logic            d_busy [4];
  logic            start;
  logic            hit [2];

  always_comb begin
    hit[0] = i_valid && i_skin && (i_x <  11'(SPLIT_X));
    hit[1] = i_valid && i_skin && (i_x >= 11'(SPLIT_X));
    for (int r = 0; r < 2; r++) begin
      sx_n[r]  = sx[r]  + (hit[r] ? SUMW'(i_x) : '0);
      sy_n[r]  = sy[r]  + (hit[r] ? SUMW'(i_y) : '0);
      cnt_n[r] = cnt[r] + CNTW'(hit[r]);
    end
  end

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      for (int r = 0; r < 2; r++) begin
        sx[r] <= '0; sy[r] <= '0; cnt[r] <= '0; cnt_f[r] <= '0;
      end
      start <= 1'b0;
    end else begin
      start <= i_frame_end;
      for (int r = 0; r < 2; r++) begin
        if (i_frame_end) begin
          sx[r] <= '0; sy[r] <= '0; cnt[r] <= '0;
          cnt_f[r] <= cnt_n[r];
        end else begin
          sx[r] <= sx_n[r]; sy[r] <= sy_n[r]; cnt[r] <= cnt_n[r];
        end
      end
    end
  end

  // frozen sums for the dividers
  logic [SUMW-1:0] fx [2], fy [2];
  always_ff @(posedge i_clk) begin
    if (i_frame_end) begin
      for (int r = 0; r < 2; r++) begin
        fx[r] <= sx_n[r];
        fy[r] <= sy_n[r];
      end
    end
  end

  for (genvar g = 0; g < 4; g++) begin : g_div
    seq_div #(.N(SUMW), .D(CNTW)) u_div (
      .i_clk(i_clk), .i_rst_n(i_rst_n), .i_start(start),
      .i_num(g[0] ? fy[g/2] : fx[g/2]), .i_den(cnt_f[g/2]),
      .o_busy(d_busy[g]), .o_done(d_done[g]), .o_quot(q[g]));
  end

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      o_done <= 1'b0;
      for (int r = 0; r < 2; r++) begin
        o_face[r] <= '0;
        o_area[r] <= '0;
      end
    end else begin
      o_done <= d_done[0];
      if (d_done[0]) begin
        for (int r = 0; r < 2; r++) begin
          o_face[r].valid <= cnt_f[r] >= CNTW'(MIN_AREA);
          o_face[r].cx    <= 11'(q[2*r]);
          o_face[r].cy    <= 11'(q[2*r+1]);
          o_area[r]       <= cnt_f[r];
        end
      end
    end
  end
endmodule

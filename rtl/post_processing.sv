// Post-processing: from the per-pixel skin mask to face positions.
// The mask passes the spatial filter (9x9 density test), the surviving pixels
// feed the centroid computation for up to two side-by-side faces, and the
// per-frame results pass the temporal filter. The frame end is detected from
// the coordinates of the incoming pixel (last active pixel) and delayed to
// line up with the spatial filter's output, so the centroid sums close on the
// right pixel.
// Interface: mask stream (i_valid, i_skin, i_x, i_y) in raster order; out:
// the filtered mask with its (delayed) coordinates, o_done and the filtered
// face results, which stay valid until the next frame's results.
// Timing: filtered mask 1 clock after the input; filtered face results 36 clocks
// after the frame's last pixel.
// The three stages follow the design; the way they are joined is this
// implementation's.
module post_processing
  import face_pkg::*;
#(
  parameter int unsigned H_ACT    = 640,
  parameter int unsigned V_ACT    = 480,
  parameter int unsigned WIN      = 9,
  parameter int unsigned THRESH   = 78,
  parameter int unsigned MIN_AREA = 400
) (
  input  logic        i_clk,
  input  logic        i_rst_n,
  input  logic        i_valid,
  input  logic        i_skin,
  input  logic [10:0] i_x,
  input  logic [10:0] i_y,
  output logic        o_valid,
  output logic        o_skin,
  output logic [10:0] o_x,
  output logic [10:0] o_y,
  output logic        o_frame_done,
  output face_t       o_frame_face [2],
  output logic        o_done,
  output face_t       o_face [2]
);
  logic [6:0]  sf_count;
  logic        frame_end;
  logic [19:0] area [2];

  spatial_filter #(.WIN(WIN), .THRESH(THRESH), .H_ACT(H_ACT)) u_spatial (
    .i_clk, .i_rst_n, .i_valid, .i_skin, .i_x, .i_y,
    .o_valid, .o_skin, .o_x, .o_y, .o_count(sf_count));

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) frame_end <= 1'b0;
    else          frame_end <= i_valid && (i_x == 11'(H_ACT - 1)) && (i_y == 11'(V_ACT - 1));
  end

  centroid_calc #(.H_ACT(H_ACT), .V_ACT(V_ACT), .MIN_AREA(MIN_AREA)) u_centroid (
    .i_clk, .i_rst_n, .i_valid(o_valid), .i_skin(o_skin), .i_x(o_x), .i_y(o_y),
    .i_frame_end(frame_end), .o_done(o_frame_done), .o_face(o_frame_face), .o_area(area));

  temporal_filter u_temporal (
    .i_clk, .i_rst_n, .i_done(o_frame_done), .i_face(o_frame_face),
    .o_done, .o_face);
endmodule

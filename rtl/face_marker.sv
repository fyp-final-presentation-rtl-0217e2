// Face marker overlay (RGB data generation for the display).
// The displayed pixel is the camera pixel unless it lies inside a square of
// side 2*HALF+1 centred on a reported face centroid; there it is replaced by
// the marker colour, one colour per region (left face, right face).
// Interface: the displayed pixel's coordinates and 10-bit RGB with i_valid;
// the two face results; registered RGB out.
// Timing: latency 1 clock; sync signals must be delayed by the same clock.
// Marking the faces with a small square at the centroid follows the design;
// the square's size and colours are this implementation's choice.
module face_marker
  import face_pkg::*;
#(
  parameter int unsigned HALF     = 8,
  parameter logic [29:0] COLOR0   = {10'h3FF, 10'h000, 10'h000},
  parameter logic [29:0] COLOR1   = {10'h000, 10'h000, 10'h3FF}
) (
  input  logic        i_clk,
  input  logic        i_rst_n,
  input  logic        i_valid,
  input  logic [10:0] i_x,
  input  logic [10:0] i_y,
  input  logic [9:0]  i_r,
  input  logic [9:0]  i_g,
  input  logic [9:0]  i_b,
  input  face_t       i_face [2],
  output logic [9:0]  o_r,
  output logic [9:0]  o_g,
  output logic [9:0]  o_b,
  output logic        o_marked
);
  function automatic logic near(input logic [10:0] a, input logic [10:0] c);
    int d;
    d = int'(a) - int'(c);
    return (d <= int'(HALF)) && (d >= -int'(HALF));
  endfunction

  logic in0, in1;
  assign in0 = i_face[0].valid && near(i_x, i_face[0].cx) && near(i_y, i_face[0].cy);
  assign in1 = i_face[1].valid && near(i_x, i_face[1].cx) && near(i_y, i_face[1].cy);

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      {o_r, o_g, o_b} <= '0;
      o_marked <= 1'b0;
    end else begin
      o_marked <= i_valid && (in0 || in1);
      if (!i_valid)  {o_r, o_g, o_b} <= '0;
      else if (in0)  {o_r, o_g, o_b} <= COLOR0;
      else if (in1)  {o_r, o_g, o_b} <= COLOR1;
      else           {o_r, o_g, o_b} <= {i_r, i_g, i_b};
    end
  end
endmodule

// Temporal filter on the face results.
// A face is reported only when its region held a face in two consecutive
// frames, and the reported centroid is the mean of the two frames' centroids.
// A skin-coloured flash lasting a single frame is so suppressed, and the marker
// position jitters less from frame to frame.
// Interface: i_done with i_face[2] (per-frame results of the centroid block);
// o_done with o_face[2] (filtered results), one clock after i_done.
// The design names temporal filtering as the step between spatial filtering
// and centroid output without detailing it; the two-frame rule and averaging
// are this implementation's choice.
module temporal_filter
  import face_pkg::*;
(
  input  logic  i_clk,
  input  logic  i_rst_n,
  input  logic  i_done,
  input  face_t i_face [2],
  output logic  o_done,
  output face_t o_face [2]
);
  face_t prev [2];

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      o_done <= 1'b0;
      for (int r = 0; r < 2; r++) begin
        prev[r]   <= '0;
        o_face[r] <= '0;
      end
    end else begin
      o_done <= i_done;
      if (i_done) begin
        for (int r = 0; r < 2; r++) begin
          prev[r]         <= i_face[r];
          o_face[r].valid <= i_face[r].valid && prev[r].valid;
          o_face[r].cx    <= 11'(({1'b0, i_face[r].cx} + {1'b0, prev[r].cx}) >> 1);
          o_face[r].cy    <= 11'(({1'b0, i_face[r].cy} + {1'b0, prev[r].cy}) >> 1);
        end
      end
    end
  end
endmodule

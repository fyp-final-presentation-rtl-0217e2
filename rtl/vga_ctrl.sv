// VGA timing and pixel-coordinate generator.
// A horizontal counter runs over H_TOTAL = front porch + sync + back porch +
// active pixels, and a vertical counter over V_TOTAL lines in the same order,
// so that every line and frame starts with its blanking interval and ends with
// its active part. From the counters the block derives:
//   o_h_sync / o_v_sync  active-low sync pulses (low during the sync interval),
//   o_request            high for pixels inside the active 640x480 window,
//   o_x / o_y            the active-window coordinates (0 outside it),
//   o_addr               the pixel's frame-buffer word address, o_y*H_ACT+o_x,
//   o_h_count/o_v_count  the raw counters.
// The coordinates let the post-processing chain know which pixel it is working
// on; stages behind this block delay them by their own latency.
// Counters advance on clocks where i_en is high; all outputs decode the
// current counter values (no extra latency).
// The timing numbers and the blanking-first counter layout follow the design;
// one clock domain for both counters (the vertical counter steps on the last
// pixel of a line instead of on the sync edge) is this implementation's choice.
module vga_ctrl
  import face_pkg::*;
#(
  parameter int unsigned H_FRONT = H_FRONT_DEF,
  parameter int unsigned H_SYNC  = H_SYNC_DEF,
  parameter int unsigned H_BACK  = H_BACK_DEF,
  parameter int unsigned H_ACT   = H_ACT_DEF,
  parameter int unsigned V_FRONT = V_FRONT_DEF,
  parameter int unsigned V_SYNC  = V_SYNC_DEF,
  parameter int unsigned V_BACK  = V_BACK_DEF,
  parameter int unsigned V_ACT   = V_ACT_DEF
) (
  input  logic        i_clk,
  input  logic        i_rst_n,
  input  logic        i_en,
  output logic [10:0] o_h_count,
  output logic [10:0] o_v_count,
  output logic        o_h_sync,
  output logic        o_v_sync,
  output logic        o_request,
  output logic [10:0] o_x,
  output logic [10:0] o_y,
  output logic [21:0] o_addr
);
  localparam int unsigned H_BLANK = H_FRONT + H_SYNC + H_BACK;
  localparam int unsigned H_TOTAL = H_BLANK + H_ACT;
  localparam int unsigned V_BLANK = V_FRONT + V_SYNC + V_BACK;
  localparam int unsigned V_TOTAL = V_BLANK + V_ACT;

  logic [10:0] h_cnt, v_cnt;

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      h_cnt <= '0;
      v_cnt <= '0;
    end else if (i_en) begin
      if (h_cnt == 11'(H_TOTAL - 1)) begin
        h_cnt <= '0;
        v_cnt <= (v_cnt == 11'(V_TOTAL - 1)) ? 11'd0 : v_cnt + 11'd1;
      end else begin
        h_cnt <= h_cnt + 11'd1;
      end
    end
  end

  logic h_act, v_act;
  assign h_act     = h_cnt >= 11'(H_BLANK);
  assign v_act     = v_cnt >= 11'(V_BLANK);
  assign o_h_count = h_cnt;
  assign o_v_count = v_cnt;
  assign o_h_sync  = !(h_cnt >= 11'(H_FRONT) && h_cnt < 11'(H_FRONT + H_SYNC));
  assign o_v_sync  = !(v_cnt >= 11'(V_FRONT) && v_cnt < 11'(V_FRONT + V_SYNC));
  assign o_request = h_act && v_act;
  assign o_x       = h_act ? h_cnt - 11'(H_BLANK) : 11'd0;
  assign o_y       = v_act ? v_cnt - 11'(V_BLANK) : 11'd0;
  assign o_addr    = 22'(o_y) * 22'(H_ACT) + 22'(o_x);
endmodule

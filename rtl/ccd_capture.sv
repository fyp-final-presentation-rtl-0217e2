// Camera data capture.
// Registers the sensor's pixel bus (DATA) with its frame-valid (FVAL) and
// line-valid (LVAL) qualifiers on the pixel clock and turns them into a pixel
// stream: o_valid marks a pixel, o_x/o_y give its column and row inside the
// frame, o_frame_cnt counts frames. A pixel is valid when both FVAL and LVAL
// are high; the column counter restarts at every line, the row counter advances
// at the end of every line and restarts at the rising edge of FVAL.
// Capture is enabled by i_start and stopped by i_stop, taking effect at the
// next frame start so that only whole frames leave the block. The FVAL
// history resets to "inside a frame", so a frame already running when reset
// ends is skipped rather than taken as a new one.
// Timing: outputs follow the sensor inputs by two pixel clocks.
// The block's role (collect DATA/FVAL/LVAL from the camera) follows the
// design; the 12-bit width, counters and start/stop behaviour are choices of
// this implementation.
module ccd_capture #(
  parameter int unsigned DATA_W = 12
) (
  input  logic              i_clk,
  input  logic              i_rst_n,
  input  logic              i_start,
  input  logic              i_stop,
  input  logic [DATA_W-1:0] i_data,
  input  logic              i_fval,
  input  logic              i_lval,
  output logic [DATA_W-1:0] o_data,
  output logic              o_valid,
  output logic [11:0]       o_x,
  output logic [11:0]       o_y,
  output logic [31:0]       o_frame_cnt
);
  logic [DATA_W-1:0] d_q;
  logic fval_q, lval_q, fval_qq, lval_qq;
  logic run_req, run_frame;
  logic [11:0] x_cnt, y_cnt;

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      d_q <= '0; fval_q <= 1'b1; lval_q <= 1'b0; fval_qq <= 1'b1; lval_qq <= 1'b0;
      run_req <= 1'b0; run_frame <= 1'b0;
      x_cnt <= '0; y_cnt <= '0; o_frame_cnt <= '0;
      o_data <= '0; o_valid <= 1'b0; o_x <= '0; o_y <= '0;
    end else begin
      d_q <= i_data; fval_q <= i_fval; lval_q <= i_lval;
      fval_qq <= fval_q; lval_qq <= lval_q;
      if (i_start) run_req <= 1'b1;
      if (i_stop)  run_req <= 1'b0;
      // frame start: rising edge of FVAL
      if (fval_q && !fval_qq) begin
        run_frame <= run_req;
        y_cnt     <= '0;
        x_cnt     <= '0;
        if (run_req) o_frame_cnt <= o_frame_cnt + 32'd1;
      end else begin
        if (fval_q && lval_q) x_cnt <= x_cnt + 12'd1;
        // end of line: falling edge of LVAL inside the frame
        if (fval_q && !lval_q && lval_qq) begin
          x_cnt <= '0;
          y_cnt <= y_cnt + 12'd1;
        end
      end
      o_valid <= fval_q && lval_q && run_frame && !(fval_q && !fval_qq);
      o_data  <= d_q;
      o_x     <= x_cnt;
      o_y     <= y_cnt;
    end
  end
endmodule

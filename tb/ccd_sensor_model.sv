// Behavioural camera (not synthesizable): outputs the scene of tb_scene_pkg
// as a 12-bit Bayer mosaic (rows G1 R G1 R ... / B G2 B G2 ...) at twice the
// RGB resolution, with LVAL per line, FVAL per frame and blanking in between,
// changing outputs on the falling edge of the pixel clock.
// Stands in for the camera module; blanking lengths and the mosaic phase are
// this model's choices.
module ccd_sensor_model #(
  parameter int RGB_W = 64, parameter int RGB_H = 48,
  parameter int H_BLANK = 20, parameter int V_BLANK = 200
) (
  input  logic        pclk,
  output logic [11:0] data,
  output logic        fval,
  output logic        lval,
  output int          frames
);
  import tb_scene_pkg::*;
  initial begin
    data = 0; fval = 0; lval = 0; frames = 0;
    forever begin
      repeat (V_BLANK) @(negedge pclk);
      fval = 1;
      repeat (4) @(negedge pclk);
      for (int y = 0; y < 2 * RGB_H; y++) begin
        for (int x = 0; x < 2 * RGB_W; x++) begin
          logic [23:0] c;
          c = rgb(x / 2, y / 2, RGB_W, RGB_H);
          lval = 1;
          case ({y[0], x[0]})
            2'b01:   data = {c[23:16], 4'h0};   // R
            2'b10:   data = {c[7:0], 4'h0};     // B
            default: data = {c[15:8], 4'h0};    // G1 / G2
          endcase
          @(negedge pclk);
        end
        lval = 0; data = 0;
        repeat (H_BLANK) @(negedge pclk);
      end
      fval = 0;
      frames++;
    end
  end
endmodule

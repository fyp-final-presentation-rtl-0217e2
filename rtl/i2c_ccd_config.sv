// Camera configuration sequencer.
// After reset the block waits START_WAIT clocks for the sensor to power up and
// then writes LUT_SIZE registers of the 5-megapixel camera, one I2C
// transaction each, through the I2C master. The table entry for index i is a
// 24-bit word {register address, 16-bit value}; entry 0 is a dummy write.
// The table sets mirroring, exposure, blanking, colour gains, the sensor's
// internal PLL, test-pattern registers, the readout window and binning, and
// the black level. A transaction that is not acknowledged is repeated.
// Interface: o_scl/o_sda_oe/i_sda to the camera; o_done goes high when the
// whole table is written; o_index shows the entry being written and
// o_retries counts repeated transactions.
// The look-up table structure and its fixed register values follow the
// design; the exposure and readout-window values (which the design gives only
// as names), the device address and the retry rule are this implementation's
// choices, made for a 1280x960 binned readout that becomes a 640x480 RGB frame.
module i2c_ccd_config #(
  parameter int unsigned  CLK_DIV        = 250,
  parameter int unsigned  START_WAIT     = 50000,
  parameter int unsigned  LUT_SIZE       = 25,
  parameter logic [7:0]   DEV_ADDR       = 8'hBA,
  parameter logic [15:0]  EXPOSURE       = 16'h07C0,
  parameter logic [23:0]  START_ROW      = 24'h010036,
  parameter logic [23:0]  START_COLUMN   = 24'h020010,
  parameter logic [23:0]  ROW_SIZE       = 24'h03077F,
  parameter logic [23:0]  COLUMN_SIZE    = 24'h0409FF,
  parameter logic [23:0]  ROW_MODE       = 24'h220011,
  parameter logic [23:0]  COLUMN_MODE    = 24'h230011
) (
  input  logic       i_clk,
  input  logic       i_rst_n,
  output logic       o_scl,
  output logic       o_sda_oe,
  input  logic       i_sda,
  output logic       o_done,
  output logic [4:0] o_index,
  output logic [7:0] o_retries
);
  // register table: {register, value}
  function automatic logic [23:0] lut(input logic [4:0] i);
    unique case (i)
      5'd1:  return {8'h20, 16'hC000};   // mirror rows and columns
      5'd2:  return {8'h09, EXPOSURE};   // exposure
      5'd3:  return {8'h05, 16'h0000};   // horizontal blanking
      5'd4:  return {8'h06, 16'h0019};   // vertical blanking
      5'd5:  return {8'h0A, 16'h8000};   // pixel clock latch edge
      5'd6:  return {8'h2B, 16'h0013};   // green 1 gain
      5'd7:  return {8'h2C, 16'h009A};   // blue gain
      5'd8:  return {8'h2D, 16'h019C};   // red gain
      5'd9:  return {8'h2E, 16'h0013};   // green 2 gain
      5'd10: return {8'h10, 16'h0051};   // sensor PLL power on
      5'd11: return {8'h11, 16'h1F04};   // PLL m factor / n divider (640x480 mode)
      5'd12: return {8'h12, 16'h0001};   // PLL p1 divider
      5'd13: return {8'h10, 16'h0053};   // use the PLL
      5'd14: return {8'h98, 16'h0000};   // calibration off
      5'd15: return {8'hA0, 16'h0000};   // test pattern control
      5'd16: return {8'hA1, 16'h0000};   // test pattern green
      5'd17: return {8'hA2, 16'h0FFF};   // test pattern red
      5'd18: return START_ROW;
      5'd19: return START_COLUMN;
      5'd20: return ROW_SIZE;
      5'd21: return COLUMN_SIZE;
      5'd22: return ROW_MODE;
      5'd23: return COLUMN_MODE;
      5'd24: return {8'h49, 16'h01A8};   // row black target
      default: return 24'h000000;
    endcase
  endfunction

  typedef enum logic [2:0] {S_WAIT, S_GO, S_BUSY, S_NEXT, S_DONE} state_e;
  state_e st;
  logic [$clog2(START_WAIT+1)-1:0] wcnt;
  logic go, i2c_ack, i2c_end, seen_busy;

  i2c_controller #(.CLK_DIV(CLK_DIV)) u_i2c (
    .i_clk, .i_rst_n, .i_go(go), .i_w_r(1'b0), .i_data({DEV_ADDR, lut(o_index)}),
    .o_ack(i2c_ack), .o_end(i2c_end), .o_rdata(), .o_scl, .o_sda_oe, .i_sda);

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      st <= S_WAIT; wcnt <= '0; go <= 1'b0; seen_busy <= 1'b0;
      o_done <= 1'b0; o_index <= '0; o_retries <= '0;
    end else begin
      go <= 1'b0;
      unique case (st)
        S_WAIT: if (wcnt == ($bits(wcnt))'(START_WAIT)) st <= S_GO; else wcnt <= wcnt + 1'b1;
        S_GO:   begin go <= 1'b1; seen_busy <= 1'b0; st <= S_BUSY; end
        S_BUSY: begin
          if (!i2c_end) seen_busy <= 1'b1;
          if (seen_busy && i2c_end) st <= S_NEXT;
        end
        S_NEXT: begin
          if (!i2c_ack) begin
            o_retries <= o_retries + 8'd1;
            st <= S_GO;
          end else if (o_index == 5'(LUT_SIZE - 1)) begin
            st <= S_DONE;
          end else begin
            o_index <= o_index + 5'd1;
            st <= S_GO;
          end
        end
        default: o_done <= 1'b1;
      endcase
    end
  end
endmodule

// I2C master for one register write or one register read on the camera.
// Write (i_w_r = 0): START, four bytes taken from i_data[31:0] MSB first
// (device address with the write bit, register address, data high byte, data
// low byte), each followed by an acknowledge bit from the slave, then STOP.
// Read (i_w_r = 1): START, device address with the write bit and register
// address from i_data[31:16], a repeated START, the device address with the
// read bit, then two data bytes driven by the slave; the master acknowledges
// the first and not the second, then STOP. The 16-bit word read is presented
// on o_rdata; i_data[15:0] is ignored.
// The bus is built from bit slots of four quarter periods: SCL low while SDA
// changes, SCL high, SCL high while SDA is sampled, SCL low. A quarter period
// lasts CLK_DIV clocks, so SCL runs at f_clk / (4*CLK_DIV). A write takes 38
// slots, a read 48.
// SDA is open drain: o_sda_oe = 1 pulls the line low, otherwise it is released
// and i_sda reads the line (pulled up on the board).
// Interface: i_go starts a transaction with i_data and i_w_r (sampled when
// i_go is seen while idle); o_end goes high when it has finished and stays
// high until the next i_go; o_ack is then 1 when every byte the master sent
// was acknowledged, and o_rdata holds the word of the last read.
// The port set (clock, go, reset, read/write select, 32-bit data, ACK, END,
// SCLK, SDAT) follows the design's configuration port figure; the polarity of
// the read/write select, the byte layout of a read and the 16-bit read-data
// output are this design's choices.
module i2c_controller #(
  parameter int unsigned CLK_DIV = 250
) (
  input  logic        i_clk,
  input  logic        i_rst_n,
  input  logic        i_go,
  input  logic        i_w_r,
  input  logic [31:0] i_data,
  output logic        o_ack,
  output logic        o_end,
  output logic [15:0] o_rdata,
  output logic        o_scl,
  output logic        o_sda_oe,
  input  logic        i_sda
);
  localparam int unsigned NSLOT_WR = 1 + 4 * 9 + 1;       // start, 4 bytes + ack, stop
  localparam int unsigned NSLOT_RD = 1 + 2 * 9 + 1 + 3 * 9 + 1;

  typedef enum logic [2:0] {K_START, K_RSTART, K_STOP, K_WBIT, K_RBIT} kind_t;

  logic        busy, rd;
  logic [31:0] sh;
  logic [15:0] rsh;
  logic [5:0]  slot;
  logic [1:0]  ph;
  logic [$clog2(CLK_DIV+1)-1:0] div;
  logic        ack_ok;

  // what the current slot is, and the bit position inside its byte
  kind_t      kind;
  logic [5:0] k;
  logic [3:0] bitn;
  logic       last_rbyte;
  always_comb begin
    kind = K_WBIT; k = slot - 6'd1; last_rbyte = 1'b0;
    if (slot == 6'd0) kind = K_START;
    else if (!rd) begin
      if (slot == 6'(NSLOT_WR - 1)) kind = K_STOP;
    end else if (slot == 6'd19) kind = K_RSTART;
    else if (slot >= 6'd20 && slot <= 6'd28) k = slot - 6'd20;
    else if (slot >= 6'd29 && slot <= 6'd46) begin
      kind = K_RBIT; k = slot - 6'd29; last_rbyte = (k >= 6'd9);
    end else if (slot == 6'(NSLOT_RD - 1)) kind = K_STOP;
    bitn = 4'(k % 9);
  end

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      busy <= 1'b0; rd <= 1'b0; sh <= '0; rsh <= '0; slot <= '0; ph <= '0; div <= '0;
      ack_ok <= 1'b0; o_ack <= 1'b0; o_end <= 1'b0; o_rdata <= '0;
      o_scl <= 1'b1; o_sda_oe <= 1'b0;
    end else if (!busy) begin
      o_scl <= 1'b1; o_sda_oe <= 1'b0;
      if (i_go) begin
        busy <= 1'b1; rd <= i_w_r; slot <= '0; ph <= '0; div <= '0;
        // a read sends device+W, register, then device+R after the repeated START
        sh <= i_w_r ? {i_data[31:16], i_data[31:25], 1'b1, 8'h00} : i_data;
        ack_ok <= 1'b1; o_end <= 1'b0;
      end
    end else if (div != ($bits(div))'(CLK_DIV - 1)) begin
      div <= div + 1'b1;
    end else begin
      div <= '0;
      ph  <= ph + 2'd1;
      unique case (kind)
        K_START: begin
          // SDA falls while SCL is high, then SCL falls
          unique case (ph)
            2'd0: begin o_scl <= 1'b1; o_sda_oe <= 1'b0; end
            2'd1: begin o_scl <= 1'b1; o_sda_oe <= 1'b1; end
            2'd2: begin o_scl <= 1'b1; o_sda_oe <= 1'b1; end
            default: begin o_scl <= 1'b0; o_sda_oe <= 1'b1; end
          endcase
        end
        K_RSTART: begin
          // release SDA while SCL is low, raise SCL, then pull SDA low
          unique case (ph)
            2'd0: begin o_scl <= 1'b0; o_sda_oe <= 1'b0; end
            2'd1: begin o_scl <= 1'b1; o_sda_oe <= 1'b0; end
            2'd2: begin o_scl <= 1'b1; o_sda_oe <= 1'b1; end
            default: begin o_scl <= 1'b0; o_sda_oe <= 1'b1; end
          endcase
        end
        K_STOP: begin
          // SDA rises while SCL is high
          unique case (ph)
            2'd0: begin o_scl <= 1'b0; o_sda_oe <= 1'b1; end
            2'd1: begin o_scl <= 1'b1; o_sda_oe <= 1'b1; end
            2'd2: begin o_scl <= 1'b1; o_sda_oe <= 1'b0; end
            default: begin
              o_scl <= 1'b1; o_sda_oe <= 1'b0;
              busy <= 1'b0; o_end <= 1'b1; o_ack <= ack_ok;
              if (rd) o_rdata <= rsh;
            end
          endcase
        end
        K_WBIT: begin
          unique case (ph)
            2'd0: begin
              o_scl <= 1'b0;
              if (bitn == 4'd8) o_sda_oe <= 1'b0;          // release for ACK
              else begin
                o_sda_oe <= !sh[31];                     // drive data bit
                sh <= {sh[30:0], 1'b0};
              end
            end
            2'd1: o_scl <= 1'b1;
            2'd2: begin
              o_scl <= 1'b1;
              if (bitn == 4'd8 && i_sda) ack_ok <= 1'b0;   // no acknowledge
            end
            default: o_scl <= 1'b0;
          endcase
        end
        default: begin   // K_RBIT
          unique case (ph)
            2'd0: begin
              o_scl <= 1'b0;
              // slave drives the data bits; master ACKs the first byte only
              o_sda_oe <= (bitn == 4'd8) && !last_rbyte;
            end
            2'd1: o_scl <= 1'b1;
            2'd2: begin
              o_scl <= 1'b1;
              if (bitn != 4'd8) rsh <= {rsh[14:0], i_sda};
            end
            default: o_scl <= 1'b0;
          endcase
        end
      endcase
      if (ph == 2'd3) slot <= slot + 6'd1;
    end
  end
endmodule

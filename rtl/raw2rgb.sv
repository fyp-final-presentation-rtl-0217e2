// Bayer-pattern to RGB conversion (pre-processing).
// The sensor delivers a Bayer mosaic: even rows alternate G1,R and odd rows
// alternate B,G2, starting with G1 at column 0 of row 0. Each 2x2 quad
// {G1 R / B G2} is turned into one RGB pixel: R and B are taken directly and
// G is the mean of G1 and G2. An even row is stored in a line buffer as
// {G1,R} pairs (RAW_W/2 words of 2*DATA_W bits); while the odd row below
// streams in, the pair above is read back and the quad completes on every odd
// column. Output resolution is therefore RAW_W/2 x rows/2, which for a
// 1280-wide raw readout gives the 640x480 display frame.
// Interface: pixel stream in (i_valid with i_x/i_y from the capture block),
// RGB stream out with o_x = i_x/2, o_y = i_y/2.
// Timing: one output per odd-row/odd-column input, one clock after it.
// The design calls for "interpolation to get RGB components" from the Bayer
// pattern; the quad-averaging method and the line buffer layout are the
// choices of this implementation.
module raw2rgb #(
  parameter int unsigned DATA_W = 12,
  parameter int unsigned RAW_W  = 1280
) (
  input  logic              i_clk,
  input  logic              i_rst_n,
  input  logic              i_valid,
  input  logic [DATA_W-1:0] i_data,
  input  logic [11:0]       i_x,
  input  logic [11:0]       i_y,
  output logic              o_valid,
  output logic [DATA_W-1:0] o_r,
  output logic [DATA_W-1:0] o_g,
  output logic [DATA_W-1:0] o_b,
  output logic [10:0]       o_x,
  output logic [10:0]       o_y
);
  localparam int unsigned PAIRS = RAW_W / 2;
  localparam int unsigned PW    = $clog2(PAIRS);

  logic [2*DATA_W-1:0] line_buf [PAIRS];
  logic [2*DATA_W-1:0] pair_rd;     // {G1,R} of the row above
  logic [DATA_W-1:0]   prev_pix;    // previous pixel of the current row
  logic [PW-1:0]       pair_idx;

  assign pair_idx = PW'(i_x >> 1);

  always_ff @(posedge i_clk) begin
    if (i_valid) begin
      if (!i_y[0] && i_x[0]) line_buf[pair_idx] <= {prev_pix, i_data};
      pair_rd <= line_buf[pair_idx];
    end
  end

  logic [DATA_W:0] g_sum;
  assign g_sum = {1'b0, pair_rd[2*DATA_W-1:DATA_W]} + {1'b0, i_data};

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      prev_pix <= '0;
      o_valid  <= 1'b0;
      o_r <= '0; o_g <= '0; o_b <= '0; o_x <= '0; o_y <= '0;
    end else begin
      if (i_valid) prev_pix <= i_data;
      o_valid <= i_valid && i_y[0] && i_x[0];
      if (i_valid && i_y[0] && i_x[0]) begin
        // pair_rd was fetched on the even column (B) of this quad
        o_r <= pair_rd[DATA_W-1:0];
        o_g <= g_sum[DATA_W:1];
        o_b <= prev_pix;
        o_x <= 11'(i_x >> 1);
        o_y <= 11'(i_y >> 1);
      end
    end
  end
endmodule

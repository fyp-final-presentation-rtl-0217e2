// Spatial (density) filter for the binary skin mask.
// For every pixel the number of skin pixels in the WIN x WIN window around it
// is counted; the pixel stays skin only if that count reaches THRESH
// (81 pixels and 78 by default). Isolated skin-coloured specks and thin
// structures disappear while solid skin regions such as faces survive.
// How it works: the mask streams in raster order with its coordinates. A
// column memory of H_ACT words keeps, for every column, the last WIN-1 mask
// bits of that column (one bit per earlier row). Each new pixel reads its
// column word, appends its own bit to form a WIN-bit vertical slice, counts the
// slice's ones, and writes the shifted word back. The last WIN slice counts of
// the row are held in a shift register; their sum is the window count for the
// window whose bottom-right corner is the incoming pixel, i.e. centred
// (WIN-1)/2 columns left and rows up. Rows above the frame and columns left of
// it count as non-skin.
// Interface: i_valid/i_skin/i_x/i_y in; o_valid/o_skin/o_x/o_y out, where
// o_x/o_y are the window-centre coordinates (input minus (WIN-1)/2). Centres
// closer than (WIN-1)/2 to the right or bottom edge are never produced.
// Timing: one pixel per clock, latency 1 clock.
// Window size and threshold follow the design; the column-memory structure,
// the ">= THRESH" comparison and the edge handling are this implementation's
// choices.
module spatial_filter #(
  parameter int unsigned WIN    = 9,
  parameter int unsigned THRESH = 78,
  parameter int unsigned H_ACT  = 640
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
  output logic [6:0]  o_count
);
  localparam int unsigned HALF = (WIN - 1) / 2;
  localparam int unsigned CW   = $clog2(WIN + 1);        // slice count width
  localparam int unsigned SW   = $clog2(WIN * WIN + 1);  // window count width
  localparam int unsigned XW   = $clog2(H_ACT);

  logic [WIN-2:0] col_mem [H_ACT];
  logic [WIN-2:0] col_rd, col_masked;
  logic [CW-1:0]  slice_cnt;
  logic [CW-1:0]  hist [WIN-1];   // slice counts of columns x-1 .. x-WIN+1
  logic [SW-1:0]  win_sum;

  assign col_rd = col_mem[i_x[XW-1:0]];

  always_comb begin
    // bit k of a column word holds row y-1-k; rows above the frame are empty
    for (int k = 0; k < int'(WIN) - 1; k++)
      col_masked[k] = col_rd[k] && (int'(i_y) > k);
    slice_cnt = CW'(i_skin);
    for (int k = 0; k < int'(WIN) - 1; k++)
      slice_cnt += CW'(col_masked[k]);
    win_sum = SW'(slice_cnt);
    for (int j = 0; j < int'(WIN) - 1; j++)
      if (int'(i_x) > j) win_sum += SW'(hist[j]);
  end

  always_ff @(posedge i_clk) begin
    if (i_valid) col_mem[i_x[XW-1:0]] <= {col_masked[WIN-3:0], i_skin};
  end

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      for (int j = 0; j < int'(WIN) - 1; j++) hist[j] <= '0;
      o_valid <= 1'b0; o_skin <= 1'b0; o_x <= '0; o_y <= '0; o_count <= '0;
    end else begin
      if (i_valid) begin
        hist[0] <= slice_cnt;
        for (int j = 1; j < int'(WIN) - 1; j++) hist[j] <= hist[j-1];
      end
      o_valid <= i_valid && (int'(i_x) >= int'(HALF)) && (int'(i_y) >= int'(HALF));
      o_skin  <= win_sum >= SW'(THRESH);
      o_count <= 7'(win_sum);
      o_x     <= i_x - 11'(HALF);
      o_y     <= i_y - 11'(HALF);
    end
  end
endmodule

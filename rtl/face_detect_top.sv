// Skin-colour face detection system, top level.
// Camera pixels are captured, turned from the Bayer mosaic into RGB and
// written as 10-bit R, G, B into an SDRAM frame buffer through two 16-bit
// write ports. The display side reads the frame back through two read ports
// in step with the VGA timing, converts every pixel to YCbCr, marks skin by
// its chrominance, and passes the mask through the post-processing chain
// (spatial filter, centroid computation, temporal filter). The faces found are
// drawn as small squares over the live picture on the VGA output. Colour
// conversion sits after the frame buffer so that the buffer holds full-depth
// RGB and the pixel coordinates come straight from the VGA timing.
// A separate Sobel edge detector (the edge-detection trial) stands beside the
// face detector with its own ports.
//
// Clock domains: i_clk (configuration and reset sequencing), i_ccd_pclk
// (camera and frame-buffer write ports), i_sdram_clk (SDRAM controller),
// i_vga_clk (frame-buffer read ports, detection chain, display) and
// i_sobel_clk. The clocks come from outside (a PLL on the FPGA).
//
// Frame buffer layout: write/read port 1 carries {0, G[9:5], B[9:0]} at
// word addresses 0 .. FRAME_WORDS-1, port 2 carries {0, G[4:0], R[9:0]} at
// BUF2_BASE .. BUF2_BASE+FRAME_WORDS-1. Write ports reload for the first eight
// pixel clocks of each camera frame (FVAL rising), so words still queued at
// the end of a frame are written out first; read ports reload during the
// vertical sync pulse.
//
// Display timing: the read-port data comes one clock after the VGA request
// and the marker adds one more, so the sync outputs are delayed by two clocks.
// The detection chain sees each pixel five clocks after its request (read
// port, colour conversion, thresholding); coordinates are delayed to match.
// The order of the units follows the design; the buffer layout, the reload
// points and the reset wiring are this implementation's choices.
module face_detect_top
  import face_pkg::*;
#(
  parameter int unsigned H_FRONT    = H_FRONT_DEF,
  parameter int unsigned H_SYNC     = H_SYNC_DEF,
  parameter int unsigned H_BACK     = H_BACK_DEF,
  parameter int unsigned H_ACT      = H_ACT_DEF,
  parameter int unsigned V_FRONT    = V_FRONT_DEF,
  parameter int unsigned V_SYNC     = V_SYNC_DEF,
  parameter int unsigned V_BACK     = V_BACK_DEF,
  parameter int unsigned V_ACT      = V_ACT_DEF,
  parameter int unsigned WIN        = 9,
  parameter int unsigned THRESH     = 78,
  parameter int unsigned MIN_AREA   = 400,
  parameter int unsigned BURST      = 256,
  parameter int unsigned BUF2_BASE  = 32'h0010_0000,
  parameter int unsigned INIT_WAIT  = 20000,
  parameter int unsigned RST_D0     = 32'h001F_FFFF,
  parameter int unsigned RST_D1     = 32'h002F_FFFF,
  parameter int unsigned RST_D2     = 32'h003F_FFFF,
  parameter int unsigned I2C_DIV    = 250,
  parameter int unsigned I2C_WAIT   = 50000,
  parameter int unsigned SOBEL_W    = 640
) (
  input  logic        i_clk,
  input  logic        i_rst_n,
  // camera
  input  logic        i_ccd_pclk,
  input  logic [11:0] i_ccd_data,
  input  logic        i_ccd_fval,
  input  logic        i_ccd_lval,
  output logic        o_i2c_sclk,
  output logic        o_i2c_sda_oe,
  input  logic        i_i2c_sda,
  // SDRAM
  input  logic        i_sdram_clk,
  output logic [12:0] o_sdram_a,
  output logic [1:0]  o_sdram_ba,
  output logic        o_sdram_cs_n,
  output logic        o_sdram_ras_n,
  output logic        o_sdram_cas_n,
  output logic        o_sdram_we_n,
  output logic        o_sdram_cke,
  output logic [1:0]  o_sdram_dqm,
  output logic [15:0] o_sdram_dq,
  output logic        o_sdram_dq_oe,
  input  logic [15:0] i_sdram_dq,
  // VGA DAC
  input  logic        i_vga_clk,
  output logic [9:0]  o_vga_r,
  output logic [9:0]  o_vga_g,
  output logic [9:0]  o_vga_b,
  output logic        o_vga_hs,
  output logic        o_vga_vs,
  output logic        o_vga_blank_n,
  // status
  output logic        o_config_done,
  output logic [31:0] o_frame_cnt,
  output logic        o_faces_done,
  output face_t       o_faces [2],
  output logic        o_frame_faces_done,
  output face_t       o_frame_faces [2],
  output logic [7:0]  o_cfg_retries,
  output logic        o_fb_init_done,
  output logic        o_fb_refresh,
  output logic [3:0]  o_fb_burst,
  output logic [1:0]  o_fb_wr_full,
  output logic [1:0]  o_fb_rd_empty,
  output logic        o_marked,
  // Sobel edge detector
  input  logic        i_sobel_clk,
  input  logic        i_sobel_valid,
  input  logic [7:0]  i_sobel_pix,
  input  logic [10:0] i_sobel_x,
  input  logic [10:0] i_sobel_y,
  output logic        o_sobel_valid,
  output logic [7:0]  o_sobel_mag,
  output logic [10:0] o_sobel_x,
  output logic [10:0] o_sobel_y
);
  localparam int unsigned FRAME_WORDS = H_ACT * V_ACT;
  localparam int unsigned AW = 25;

  // ------------------------------------------------------------ resets
  logic [2:0] rst_n;
  reset_delay #(.D0(RST_D0), .D1(RST_D1), .D2(RST_D2)) u_reset (
    .i_clk, .i_rst_n, .o_rst_n(rst_n));

  // ------------------------------------------------------------ camera config
  logic [4:0] cfg_index;
  i2c_ccd_config #(.CLK_DIV(I2C_DIV), .START_WAIT(I2C_WAIT)) u_config (
    .i_clk, .i_rst_n(rst_n[0]), .o_scl(o_i2c_sclk), .o_sda_oe(o_i2c_sda_oe),
    .i_sda(i_i2c_sda), .o_done(o_config_done), .o_index(cfg_index), .o_retries(o_cfg_retries));

  // ------------------------------------------------------------ capture
  logic [11:0] cap_data, cap_x, cap_y;
  logic        cap_valid;
  ccd_capture #(.DATA_W(12)) u_capture (
    .i_clk(i_ccd_pclk), .i_rst_n(rst_n[2]), .i_start(o_config_done), .i_stop(1'b0),
    .i_data(i_ccd_data), .i_fval(i_ccd_fval), .i_lval(i_ccd_lval),
    .o_data(cap_data), .o_valid(cap_valid), .o_x(cap_x), .o_y(cap_y), .o_frame_cnt(o_frame_cnt));

  logic        rgb_valid;
  logic [11:0] rgb_r, rgb_g, rgb_b;
  logic [10:0] rgb_x, rgb_y;
  raw2rgb #(.DATA_W(12), .RAW_W(2 * H_ACT)) u_raw2rgb (
    .i_clk(i_ccd_pclk), .i_rst_n(rst_n[2]), .i_valid(cap_valid), .i_data(cap_data),
    .i_x(cap_x), .i_y(cap_y), .o_valid(rgb_valid), .o_r(rgb_r), .o_g(rgb_g), .o_b(rgb_b),
    .o_x(rgb_x), .o_y(rgb_y));

  // ------------------------------------------------------------ frame buffer
  logic [1:0][15:0] wr_data, rd_data;
  logic             vga_req, vga_hs, vga_vs;

  assign wr_data[0] = {1'b0, rgb_g[11:7], rgb_b[11:2]};
  assign wr_data[1] = {1'b0, rgb_g[6:2],  rgb_r[11:2]};

  // write-port reload pulse at the start of each camera frame
  logic       fval_d, fb_rst_n;
  logic [2:0] wr_load_cnt;
  assign fb_rst_n = rst_n[1];
  always_ff @(posedge i_ccd_pclk or negedge fb_rst_n) begin
    if (!fb_rst_n) begin
      fval_d <= 1'b0; wr_load_cnt <= '0;
    end else begin
      fval_d <= i_ccd_fval;
      if (i_ccd_fval && !fval_d) wr_load_cnt <= '1;
      else if (wr_load_cnt != '0) wr_load_cnt <= wr_load_cnt - 3'd1;
    end
  end

  sdram_control #(.INIT_WAIT(INIT_WAIT)) u_sdram (
    .i_clk(i_sdram_clk), .i_rst_n(rst_n[1]),
    .i_wr_clk({2{i_ccd_pclk}}), .i_wr({2{rgb_valid}}), .i_wr_data(wr_data),
    .i_wr_addr({AW'(BUF2_BASE), AW'(0)}),
    .i_wr_max_addr({AW'(BUF2_BASE + FRAME_WORDS), AW'(FRAME_WORDS)}),
    .i_wr_length({2{10'(BURST)}}), .i_wr_load({2{wr_load_cnt != '0}}), .o_wr_full(o_fb_wr_full),
    .i_rd_clk({2{i_vga_clk}}), .i_rd({2{vga_req}}), .o_rd_data(rd_data),
    .i_rd_addr({AW'(BUF2_BASE), AW'(0)}),
    .i_rd_max_addr({AW'(BUF2_BASE + FRAME_WORDS), AW'(FRAME_WORDS)}),
    .i_rd_length({2{10'(BURST)}}), .i_rd_load({2{!vga_vs}}), .o_rd_empty(o_fb_rd_empty),
    .o_sa(o_sdram_a), .o_ba(o_sdram_ba), .o_cs_n(o_sdram_cs_n), .o_ras_n(o_sdram_ras_n),
    .o_cas_n(o_sdram_cas_n), .o_we_n(o_sdram_we_n), .o_cke(o_sdram_cke), .o_dqm(o_sdram_dqm),
    .o_dq(o_sdram_dq), .o_dq_oe(o_sdram_dq_oe), .i_dq(i_sdram_dq),
    .o_init_done(o_fb_init_done), .o_refresh(o_fb_refresh), .o_burst(o_fb_burst));

  // ------------------------------------------------------------ display timing
  logic [10:0] h_cnt, v_cnt, vga_x, vga_y;
  logic [21:0] vga_addr;
  vga_ctrl #(.H_FRONT(H_FRONT), .H_SYNC(H_SYNC), .H_BACK(H_BACK), .H_ACT(H_ACT),
             .V_FRONT(V_FRONT), .V_SYNC(V_SYNC), .V_BACK(V_BACK), .V_ACT(V_ACT)) u_vga (
    .i_clk(i_vga_clk), .i_rst_n(rst_n[2]), .i_en(1'b1),
    .o_h_count(h_cnt), .o_v_count(v_cnt), .o_h_sync(vga_hs), .o_v_sync(vga_vs),
    .o_request(vga_req), .o_x(vga_x), .o_y(vga_y), .o_addr(vga_addr));

  // pixel read back from the buffer, one clock after the request
  logic        px_valid;
  logic [10:0] px_x, px_y;
  logic [9:0]  px_r, px_g, px_b;
  delay_line #(.W(23), .N(1)) u_dly_px (
    .i_clk(i_vga_clk), .i_rst_n(rst_n[2]), .i_d({vga_req, vga_x, vga_y}), .o_q({px_valid, px_x, px_y}));
  assign px_b = rd_data[0][9:0];
  assign px_r = rd_data[1][9:0];
  assign px_g = {rd_data[0][14:10], rd_data[1][14:10]};

  // ------------------------------------------------------------ detection chain
  logic       ycc_en, skin_en, skin;
  logic [7:0] ycc_y, ycc_cb, ycc_cr;
  rgb2ycbcr u_csc (
    .i_clk(i_vga_clk), .i_rst(!rst_n[2]), .i_en(px_valid),
    .i_data_r(px_r[9:2]), .i_data_g(px_g[9:2]), .i_data_b(px_b[9:2]),
    .o_en(ycc_en), .o_data_y(ycc_y), .o_data_cb(ycc_cb), .o_data_cr(ycc_cr));

  skin_seg u_skin (
    .i_clk(i_vga_clk), .i_rst_n(rst_n[2]), .i_en(ycc_en), .i_cb(ycc_cb), .i_cr(ycc_cr),
    .o_en(skin_en), .o_skin(skin));

  logic [10:0] sk_x, sk_y;
  delay_line #(.W(22), .N(4)) u_dly_coord (
    .i_clk(i_vga_clk), .i_rst_n(rst_n[2]), .i_d({px_x, px_y}), .o_q({sk_x, sk_y}));

  logic        pp_valid, pp_skin;
  logic [10:0] pp_x, pp_y;
  post_processing #(.H_ACT(H_ACT), .V_ACT(V_ACT), .WIN(WIN), .THRESH(THRESH), .MIN_AREA(MIN_AREA)) u_post (
    .i_clk(i_vga_clk), .i_rst_n(rst_n[2]), .i_valid(skin_en), .i_skin(skin), .i_x(sk_x), .i_y(sk_y),
    .o_valid(pp_valid), .o_skin(pp_skin), .o_x(pp_x), .o_y(pp_y),
    .o_frame_done(o_frame_faces_done), .o_frame_face(o_frame_faces),
    .o_done(o_faces_done), .o_face(o_faces));

  // ------------------------------------------------------------ display
  face_marker u_marker (
    .i_clk(i_vga_clk), .i_rst_n(rst_n[2]), .i_valid(px_valid), .i_x(px_x), .i_y(px_y),
    .i_r(px_r), .i_g(px_g), .i_b(px_b), .i_face(o_faces),
    .o_r(o_vga_r), .o_g(o_vga_g), .o_b(o_vga_b), .o_marked(o_marked));

  delay_line #(.W(3), .N(2)) u_dly_sync (
    .i_clk(i_vga_clk), .i_rst_n(rst_n[2]), .i_d({vga_hs, vga_vs, vga_req}),
    .o_q({o_vga_hs, o_vga_vs, o_vga_blank_n}));

  // ------------------------------------------------------------ Sobel trial
  sobel_filter #(.WIDTH(SOBEL_W)) u_sobel (
    .i_clk(i_sobel_clk), .i_rst_n(i_rst_n), .i_valid(i_sobel_valid), .i_pix(i_sobel_pix),
    .i_x(i_sobel_x), .i_y(i_sobel_y), .o_valid(o_sobel_valid), .o_mag(o_sobel_mag),
    .o_x(o_sobel_x), .o_y(o_sobel_y));
endmodule

// Body shared by the system testbenches. The including module defines the
// localparams W, H, WIN, THRESH, NFRAMES, WATCHDOG_NS and the macro TOP_PARAMS
// (the top's parameter list, or nothing for the default configuration).
//
// The harness connects the top to a camera model, an SDRAM model and an I2C
// slave, lets the system configure the camera, capture frames into the frame
// buffer and display them, and checks:
//  * all 25 camera register writes arrive, one refused write is retried;
//  * no SDRAM protocol error, no read-port underflow while displaying, and no
//    camera pixel lost to a full write port;
//  * every displayed pixel equals the scene (or the marker colour) once a full
//    camera frame is in the buffer;
//  * per-frame face areas and centroids equal those computed from the scene;
//  * the temporal filter reports both faces from the second frame on.
// It also counts how often each mechanism of the design occurred and counts a
// failure for any that never did.
`include "tb_util.svh"
import face_pkg::*;
import tb_scene_pkg::*;

logic clk = 0, pclk = 0, sdclk = 0, vclk = 0, sclk = 0, rst_n = 0;
always #10  clk   = ~clk;
always #20  pclk  = ~pclk;   // 25 MHz camera pixel clock
always #5   sdclk = ~sdclk;
always #20  vclk  = ~vclk;
always #5   sclk  = ~sclk;

logic [11:0] ccd_data; logic fval, lval; int cam_frames;
logic scl, sda_oe, sda; bit nack = 0;
logic [12:0] sa; logic [1:0] ba, dqm; logic cs_n, ras_n, cas_n, we_n, cke, dq_oe;
logic [15:0] dq_o, dq_i;
logic [9:0] vr, vg, vb; logic hs, vs, blank_n;
logic cfg_done, faces_done, fr_done, fb_init, fb_ref, marked;
logic [31:0] frame_cnt; logic [7:0] retries;
logic [3:0] fb_burst; logic [1:0] wr_full, rd_empty;
face_t faces [2], fr_faces [2];
logic sob_v = 0, sob_ov; logic [7:0] sob_pix = 0, sob_mag; logic [10:0] sob_x = 0, sob_y = 0, sob_ox, sob_oy;
int sd_err, sd_ref, sd_act, sd_rd, sd_wr; bit sd_mode;

face_detect_top `TOP_PARAMS dut (
  .i_clk(clk), .i_rst_n(rst_n),
  .i_ccd_pclk(pclk), .i_ccd_data(ccd_data), .i_ccd_fval(fval), .i_ccd_lval(lval),
  .o_i2c_sclk(scl), .o_i2c_sda_oe(sda_oe), .i_i2c_sda(sda),
  .i_sdram_clk(sdclk), .o_sdram_a(sa), .o_sdram_ba(ba), .o_sdram_cs_n(cs_n), .o_sdram_ras_n(ras_n),
  .o_sdram_cas_n(cas_n), .o_sdram_we_n(we_n), .o_sdram_cke(cke), .o_sdram_dqm(dqm),
  .o_sdram_dq(dq_o), .o_sdram_dq_oe(dq_oe), .i_sdram_dq(dq_i),
  .i_vga_clk(vclk), .o_vga_r(vr), .o_vga_g(vg), .o_vga_b(vb), .o_vga_hs(hs), .o_vga_vs(vs), .o_vga_blank_n(blank_n),
  .o_config_done(cfg_done), .o_frame_cnt(frame_cnt), .o_faces_done(faces_done), .o_faces(faces),
  .o_frame_faces_done(fr_done), .o_frame_faces(fr_faces), .o_cfg_retries(retries),
  .o_fb_init_done(fb_init), .o_fb_refresh(fb_ref), .o_fb_burst(fb_burst), .o_fb_wr_full(wr_full),
  .o_fb_rd_empty(rd_empty), .o_marked(marked),
  .i_sobel_clk(sclk), .i_sobel_valid(sob_v), .i_sobel_pix(sob_pix), .i_sobel_x(sob_x), .i_sobel_y(sob_y),
  .o_sobel_valid(sob_ov), .o_sobel_mag(sob_mag), .o_sobel_x(sob_ox), .o_sobel_y(sob_oy));

ccd_sensor_model #(.RGB_W(W), .RGB_H(H)) cam (.pclk(pclk), .data(ccd_data), .fval(fval), .lval(lval), .frames(cam_frames));
sdram_model mem (.clk(sdclk), .sa(sa), .ba(ba), .cs_n(cs_n), .ras_n(ras_n), .cas_n(cas_n), .we_n(we_n),
  .dq_in(dq_o), .dq_oe(dq_oe), .dq_out(dq_i), .errors(sd_err), .n_ref(sd_ref), .n_act(sd_act), .n_rd(sd_rd), .n_wr(sd_wr), .mode_set(sd_mode));
i2c_slave_model cam_i2c (.scl(scl), .master_sda_oe(sda_oe), .sda(sda), .nack_next(nack));

// ---------------------------------------------------------------- monitors
int m_refresh = 0, m_burst [4] = '{0, 0, 0, 0}, m_rd_reload = 0, m_wr_reload = 0;
int m_marked = 0, m_specks_removed = 0, m_temporal_hold = 0, m_two_faces = 0, m_sobel_edges = 0;
int underflow = 0, overflow = 0, pix_checked = 0, pix_bad = 0, frames_checked = 0;
bit cur_ok = 0, display_ok = 0, prev_v = 0; logic [10:0] prev_x, prev_y;
longint raw_cnt = 0, raw_frame = 0;
expect_t ex;

always @(posedge sdclk) if (fb_ref) m_refresh++;
always @(posedge pclk) if (dut.rgb_valid && wr_full != 2'b00) overflow++;
always @(posedge sdclk) for (int p = 0; p < 4; p++) if (fb_burst[p]) m_burst[p]++;
always @(negedge vs) m_rd_reload++;
always @(posedge pclk) if (dut.wr_load_cnt == 3'd7) m_wr_reload++;

always @(posedge vclk) begin
  // read-port underflow while the display requests pixels
  if (dut.vga_req && rd_empty != 2'b00 && display_ok) underflow++;
  // displayed pixel = marker output of the previous clock's pixel
  if (prev_v && cur_ok) begin
    logic [23:0] c;
    c = rgb(int'(prev_x), int'(prev_y), W, H);
    pix_checked++;
    if (marked) m_marked++;
    else if ({vr, vg, vb} != {c[23:16], 2'b00, c[15:8], 2'b00, c[7:0], 2'b00}) begin
      pix_bad++;
      if (pix_bad < 4) $display("pixel (%0d,%0d) shows %h %h %h", prev_x, prev_y, vr, vg, vb);
    end
  end
  prev_v = dut.px_valid; prev_x = dut.px_x; prev_y = dut.px_y;
  if (dut.px_valid && dut.px_x == 0 && dut.px_y == 0) begin
    cur_ok = frame_cnt >= 2;
    raw_frame = raw_cnt; raw_cnt = 0;
    if (fb_init) display_ok = 1;
  end
  if (dut.skin_en && dut.skin) raw_cnt++;
end

always @(posedge vclk) if (fr_done) begin
  #1;
  if (cur_ok) begin
    frames_checked++;
    if (raw_cnt > int'(dut.u_post.u_centroid.o_area[0] + dut.u_post.u_centroid.o_area[1])) m_specks_removed++;
    for (int r = 0; r < 2; r++) begin
      `CHECK(longint'(dut.u_post.u_centroid.o_area[r]) == ex.n[r], $sformatf("region %0d area %0d expected %0d", r, dut.u_post.u_centroid.o_area[r], ex.n[r]));
      `CHECK(fr_faces[r].valid && fr_faces[r].cx == 11'(ex.sx[r] / ex.n[r]) && fr_faces[r].cy == 11'(ex.sy[r] / ex.n[r]),
             $sformatf("region %0d centroid (%0d,%0d) expected (%0d,%0d)", r, fr_faces[r].cx, fr_faces[r].cy, ex.sx[r] / ex.n[r], ex.sy[r] / ex.n[r]));
    end
  end
end
always @(posedge vclk) if (faces_done) begin
  #1;
  for (int r = 0; r < 2; r++) if (fr_faces[r].valid && !faces[r].valid) m_temporal_hold++;
  if (faces[0].valid && faces[1].valid) m_two_faces++;
end

// Sobel side: a vertical step edge (0 | 100) in a 16x6 image, repeatedly
always @(posedge sclk) if (sob_ov && sob_mag == 8'd255) m_sobel_edges++;
initial begin
  @(posedge rst_n);
  forever begin
    for (int y = 0; y < 6; y++) for (int x = 0; x < 16; x++) begin
      @(negedge sclk); sob_v = 1; sob_pix = (x >= 8) ? 8'd100 : 8'd0; sob_x = 11'(x); sob_y = 11'(y);
    end
    @(negedge sclk); sob_v = 0; repeat (50) @(negedge sclk);
  end
end

initial begin #(WATCHDOG_NS); failures++; $display("watchdog"); finish_tb(); end

initial begin
  ex = expected(W, H, WIN, THRESH);
  repeat (5) @(posedge clk); rst_n = 1;
  // refuse the camera's third register write once
  wait (dut.cfg_index == 2); nack = 1; wait (retries == 1); nack = 0;
  wait (cfg_done);
  `CHECK(cam_i2c.q.size() == 25, $sformatf("camera register writes %0d", cam_i2c.q.size()));
  `CHECK(cam_i2c.q.size() > 11 && cam_i2c.q[11] == 32'hBA111F04, "PLL register write");
  wait (frames_checked == NFRAMES);
  @(posedge faces_done); #1;
  `CHECK(faces[0].valid && faces[1].valid, "both faces reported");
  `CHECK(faces[0].cx == 11'(ex.sx[0] / ex.n[0]) && faces[1].cx == 11'(ex.sx[1] / ex.n[1]), "filtered centroids");
  `CHECK(sd_err == 0, $sformatf("SDRAM protocol errors %0d", sd_err));
  `CHECK(underflow == 0, $sformatf("read-port underflows %0d", underflow));
  `CHECK(pix_checked > 0 && pix_bad == 0, $sformatf("displayed pixels wrong %0d of %0d", pix_bad, pix_checked));
  `CHECK(overflow == 0, $sformatf("pixels lost to a full write port %0d", overflow));
  $display("mechanisms: refresh=%0d bursts=%0d/%0d/%0d/%0d rd_reload=%0d wr_reload=%0d i2c_retry=%0d",
           m_refresh, m_burst[0], m_burst[1], m_burst[2], m_burst[3], m_rd_reload, m_wr_reload, retries);
  $display("mechanisms: specks_removed=%0d temporal_hold=%0d two_faces=%0d marker_px=%0d sobel_edges=%0d frames_checked=%0d",
           m_specks_removed, m_temporal_hold, m_two_faces, m_marked, m_sobel_edges, frames_checked);
  `CHECK(m_refresh > 0, "refresh happened");
  `CHECK(m_burst[0] > 0 && m_burst[1] > 0 && m_burst[2] > 0 && m_burst[3] > 0, "bursts on all four ports");
  `CHECK(m_rd_reload > 0 && m_wr_reload > 0, "port reloads happened");
  `CHECK(retries == 1, "I2C retry happened");
  `CHECK(m_specks_removed > 0, "spatial filter removed specks");
  `CHECK(m_temporal_hold > 0, "temporal filter held back a first detection");
  `CHECK(m_two_faces > 0, "two faces reported together");
  `CHECK(m_marked > 0, "face markers drawn");
  `CHECK(m_sobel_edges > 0, "Sobel edge detector found the step edge");
  finish_tb();
end

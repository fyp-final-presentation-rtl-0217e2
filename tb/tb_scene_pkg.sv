// Synthetic test scene for the system testbenches: a non-skin blue
// background, two skin-coloured face blocks side by side (left one larger),
// and isolated skin-coloured specks. Sizes scale with the frame. Also gives
// the expected post-processing result, computed directly from the scene:
// each pixel's 9x9 window count against the threshold, then the mean
// coordinates of the surviving pixels in each half of the frame.
// The scene and its colours are this testbench's choice; skin colour lies
// inside the design's Cb/Cr ranges, the background outside.
package tb_scene_pkg;
  function automatic bit face_a(int x, int y, int w, int h);
    return x >= w / 8 && x < w / 8 + w * 5 / 16 && y >= h / 5 && y < h / 5 + h / 2;
  endfunction
  function automatic bit face_b(int x, int y, int w, int h);
    return x >= w * 5 / 8 && x < w * 5 / 8 + w / 4 && y >= h / 8 && y < h / 8 + h * 2 / 5;
  endfunction
  function automatic bit speck(int x, int y);
    return (x * 5 + y * 7) % 41 == 0;
  endfunction
  function automatic bit skin(int x, int y, int w, int h);
    return face_a(x, y, w, h) || face_b(x, y, w, h) || speck(x, y);
  endfunction
  // 8-bit RGB of a scene pixel
  function automatic logic [23:0] rgb(int x, int y, int w, int h);
    if (skin(x, y, w, h)) return {8'd200, 8'd150, 8'd120};
    return {8'(40 + x % 16), 8'd80, 8'd200};
  endfunction

  typedef struct { longint sx[2]; longint sy[2]; longint n[2]; longint raw; } expect_t;

  function automatic expect_t expected(int w, int h, int win, int thresh);
    expect_t e;
    int half = (win - 1) / 2;
    e.raw = 0;
    for (int r = 0; r < 2; r++) begin e.sx[r] = 0; e.sy[r] = 0; e.n[r] = 0; end
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) if (skin(x, y, w, h)) e.raw++;
    for (int cy = 0; cy < h - half; cy++) for (int cx = 0; cx < w - half; cx++) begin
      int c = 0;
      for (int yy = cy - half; yy <= cy + half; yy++) for (int xx = cx - half; xx <= cx + half; xx++)
        if (yy >= 0 && xx >= 0 && yy < h && xx < w && skin(xx, yy, w, h)) c++;
      if (c >= thresh) begin
        int r = (cx >= w / 2);
        e.sx[r] += cx; e.sy[r] += cy; e.n[r]++;
      end
    end
    return e;
  endfunction
endpackage

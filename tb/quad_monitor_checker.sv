// quad_monitor_checker: watches the four VGA outputs of the adapter and
// compares every visible pixel of every monitor with the reference model.
//
// It samples on the rising edge of the pixel clock. Lines are found from
// blank_n and frames from the falling edge of the (active low) VSYNC, so the
// position of each pixel is derived from the outputs alone: a pixel delayed
// against the syncs shows up as a wrong colour. For each frame that starts
// while en is high it checks all pixels against mva_tb_pkg::ref_pixel for the
// picture position, size and image given on the view inputs, the number of
// pixels per line and of lines per frame, and the frame length in pixel
// periods. It counts frames, pixels produced by averaging, frames where the
// picture spans more than one monitor, and frames showing each image size.
module quad_monitor_checker
  import mva_pkg::*;
  import mva_tb_pkg::*;
#(
  parameter int HA = 640, VA = 480, HT = 800, VT = 525, W = 640, H = 480
) (
  input logic pix_clk,
  input rgb_t rgb [NUM_MON],
  input logic blank_n,
  input logic vsync,
  input logic en,
  input int   vx,
  input int   vy,
  input bit   vz,
  input int   vimg
);
  int checks = 0, failures = 0;
  int frames = 0, interp_pixels = 0, straddle_frames = 0, zoom_frames = 0, img1_frames = 0;
  int normal_frames = 0;

  logic prev_blank = 0, prev_vs = 1;
  bit   seen_vs = 0, frame_en = 0;
  int   line = -1, col = 0, periods = 0, lines = 0;
  bit   mon_has [NUM_MON];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge pix_clk) begin
    periods++;
    if (prev_vs && !vsync) begin
      if (seen_vs && frame_en) begin
        int nm;
        check(periods == HT * VT, $sformatf("frame of %0d pixel periods", periods));
        check(lines == VA, $sformatf("frame of %0d visible lines", lines));
        nm = 0;
        for (int m = 0; m < NUM_MON; m++) nm += mon_has[m];
        if (nm > 1) straddle_frames++;
        frames++;
        if (vz) zoom_frames++; else normal_frames++;
        if (vimg == 1) img1_frames++;
      end
      seen_vs  = 1;
      frame_en = en;
      periods  = 0;
      lines    = 0;
      line     = -1;
      for (int m = 0; m < NUM_MON; m++) mon_has[m] = 0;
    end
    if (blank_n && !prev_blank) begin
      line++;
      lines++;
      col = 0;
    end
    if (!blank_n && prev_blank && frame_en)
      check(col == HA, $sformatf("line of %0d pixels", col));
    if (blank_n && seen_vs) begin
      if (frame_en) begin
        for (int m = 0; m < NUM_MON; m++) begin
          rgb_t e;
          int rx, ry;
          e = ref_pixel(m, col, line, HA, VA, W, H, vx, vy, vz, vimg);
          check(rgb[m] == e, $sformatf("monitor %0d pixel %0d,%0d: %h expected %h", m, col, line, rgb[m], e));
          rx = (m % 2) * HA + col - vx;
          ry = (m / 2) * VA + line - vy;
          if (rx >= 0 && ry >= 0 && rx < (vz ? 2 * W : W) && ry < (vz ? 2 * H : H)) begin
            mon_has[m] = 1;
            if (vz && (rx[0] || ry[0])) interp_pixels++;
          end
        end
      end
      col++;
    end
    prev_blank = blank_n;
    prev_vs    = vsync;
  end
endmodule

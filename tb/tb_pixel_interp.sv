// tb_pixel_interp: checks one monitor's pixel path with and without
// enlargement.
//
// The testbench feeds the interpolator the read sequence the SRAM controller
// issues (one read every fourth cycle, one extra read at column -1 of each
// line and one extra line at row -1) for pictures at several positions,
// partly off the monitor, and compares every output pixel, two cycles after
// its read, with mva_tb_pkg::ref_pixel, which computes the expected colour
// directly from the source image.
module tb_pixel_interp;
  import mva_pkg::*;
  import mva_tb_pkg::*;
  localparam int HA = 12, VA = 10, W = 5, H = 4;
  localparam int CLW = $clog2(HA);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  logic in_valid = 0, in_inside = 0, in_odd_x = 0, in_odd_y = 0, in_store = 0, in_col_ok = 0;
  logic [CLW-1:0] in_col = 0;
  rgb_t in_pix = 0, out_pix;

  pixel_interp #(.H_ACTIVE(HA)) dut (.clk, .rst_n, .in_valid, .in_pix, .in_inside, .in_odd_x,
    .in_odd_y, .in_store, .in_col_ok, .in_col, .out_pix);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_odd_x = 0, n_odd_y = 0, n_outside = 0;

  task automatic run_frame(int px, int py, bit zoom, int img);
    int rx, ry, u, w, zw, zh;
    bit ins;
    rgb_t exp;
    zw = zoom ? 2 * W : W;
    zh = zoom ? 2 * H : H;
    for (int vf = -1; vf < VA; vf++) begin
      for (int hf = -1; hf < HA; hf++) begin
        rx = hf - px; ry = vf - py;
        ins = rx >= 0 && ry >= 0 && rx < zw && ry < zh;
        if (zoom) begin
          u = (rx + 1) >>> 1; w = (ry + 1) >>> 1;
          if (u > W - 1) u = W - 1;
          if (w > H - 1) w = H - 1;
        end else begin
          u = rx; w = ry;
        end
        @(negedge clk);
        in_valid  = 1;
        in_pix    = ins ? img_pix(img, u, w) : 24'h5A5A5A;
        in_inside = ins;
        in_odd_x  = zoom && rx[0];
        in_odd_y  = zoom && ry[0];
        in_store  = zoom && !ry[0];
        in_col_ok = hf >= 0;
        in_col    = CLW'(hf < 0 ? 0 : hf);
        @(negedge clk);
        in_valid = 0;
        in_pix   = 24'h0F0F0F;
        @(negedge clk);
        if (hf >= 0 && vf >= 0) begin
          exp = ref_pixel(0, hf, vf, HA, VA, W, H, px, py, zoom, img);
          check(out_pix == exp, $sformatf("zoom %0d pos %0d,%0d pixel %0d,%0d: %h expected %h",
                                          zoom, px, py, hf, vf, out_pix, exp));
          if (ins && zoom && rx[0]) n_odd_x++;
          if (ins && zoom && ry[0]) n_odd_y++;
          if (!ins) n_outside++;
        end
        @(negedge clk);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(2, 3, 1'b0, 0);
    run_frame(-3, -2, 1'b0, 1);
    run_frame(1, 1, 1'b1, 0);
    run_frame(-1, -1, 1'b1, 1);
    run_frame(-4, -3, 1'b1, 0);
    run_frame(4, 5, 1'b1, 1);
    check(n_odd_x > 0 && n_odd_y > 0 && n_outside > 0, "all pixel kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

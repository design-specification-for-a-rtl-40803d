// tb_mva_top: end-to-end test of the adapter at a reduced format.
//
// Monitors of 16 x 12 visible pixels, pictures of 8 x 6 (so the unenlarged
// picture is a quarter of the four-monitor canvas, as at full size), and
// shortened EEPROM, PS/2 and debounce times. EEPROM, SRAM, mouse and RAMDAC
// MPU port are behavioural models. The test waits for the start-up load
// (checking its duration), the RAMDAC programming (770 writes) and the mouse
// initialisation, then moves the picture, runs it into the page limits,
// enlarges it (and checks the limits shrink), switches images and reduces
// it again, and gives one press shorter than the debounce time, which must
// change nothing. After each action every pixel of every monitor is checked for
// two frames by quad_monitor_checker. Each mechanism is counted and one that
// never happened is a failure.
module tb_mva_top;
  import mva_pkg::*;
  import mva_tb_pkg::*;
  localparam int HA = 16, HF = 2, HS = 3, HB = 3, VA = 12, VF = 1, VS = 2, VB = 2;
  localparam int HT = HA + HF + HS + HB, VT = VA + VF + VS + VB;
  localparam int W = 8, H = 6, N = 2, ROMW = 2, DEB = 3000, HALF = 20;
  localparam int WORDS = N * W * H, AW = $clog2(WORDS);
  localparam int FRAME = HT * VT * 4;

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

  logic [AW-1:0] rom_addr, sram_addr;
  logic rom_rd, sram_we;
  rgb_t rom_data, sram_wdata, sram_rdata;
  logic clk_oe, data_oe, m_clk_pull, m_data_pull, clk_line, data_line;
  logic pix_clk, blank_n, hsync, vsync, dac_wr_n, dac_rd_n, load_done, dac_done, mouse_ready;
  rgb_t vga_rgb [NUM_MON];
  logic [2:0] vga_rgb3 [NUM_MON];
  logic [2:0] dac_rs;
  logic [7:0] dac_d;

  assign clk_line  = !(clk_oe || m_clk_pull);
  assign data_line = !(data_oe || m_data_pull);

  mva_top #(.H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB), .V_ACTIVE(VA), .V_FP(VF),
            .V_SYNC(VS), .V_BP(VB), .IMG_W(W), .IMG_H(H), .NUM_IMG(N), .ROM_WAIT(ROMW),
            .INHIBIT(100), .RX_TIMEOUT(200), .ACK_TIMEOUT(3000), .DEBOUNCE(DEB)) dut (
    .clk, .rst_n, .rom_addr, .rom_rd, .rom_data, .sram_addr, .sram_we, .sram_wdata, .sram_rdata,
    .ps2_clk_i(clk_line), .ps2_data_i(data_line), .ps2_clk_oe(clk_oe), .ps2_data_oe(data_oe),
    .pix_clk, .vga_rgb, .vga_rgb3, .vga_blank_n(blank_n), .vga_hsync(hsync), .vga_vsync(vsync),
    .dac_rs, .dac_d, .dac_wr_n, .dac_rd_n, .load_done, .dac_done, .mouse_ready);

  eeprom_model #(.IMG_W(W), .IMG_H(H), .NUM_IMG(N), .ACCESS(ROMW), .AW(AW)) u_rom (
    .clk, .addr(rom_addr), .rd(rom_rd), .data(rom_data));
  sram_model #(.WORDS(WORDS), .AW(AW)) u_sram (.clk, .addr(sram_addr), .we(sram_we),
    .wdata(sram_wdata), .rdata(sram_rdata));
  ps2_mouse_model #(.HALF(HALF)) u_mouse (.clk, .clk_line, .data_line,
    .clk_pull(m_clk_pull), .data_pull(m_data_pull));

  // expected view
  logic en = 0;
  int vx = (2 * HA - W) / 2, vy = (2 * VA - H) / 2, vimg = 0;
  bit vz = 0;

  quad_monitor_checker #(.HA(HA), .VA(VA), .HT(HT), .VT(VT), .W(W), .H(H)) u_chk (
    .pix_clk, .rgb(vga_rgb), .blank_n, .vsync, .en, .vx, .vy, .vz, .vimg);

  // 3-bit outputs and RAMDAC writes
  int dac_writes = 0;
  logic wr_d = 1;
  always @(posedge clk) begin
    wr_d <= dac_wr_n | !rst_n;
    if (rst_n && dac_wr_n && !wr_d) dac_writes++;
    if (rst_n) for (int m = 0; m < NUM_MON; m++)
      check(vga_rgb3[m] == {vga_rgb[m].r[7], vga_rgb[m].g[7], vga_rgb[m].b[7]}, "3-bit output");
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_move = 0, n_limit = 0, n_enlarge = 0, n_reduce = 0, n_swap = 0, n_bounce = 0;

  task automatic settle();
    // the new view is taken at the next vertical blanking; check two frames after that
    en = 0;
    repeat (2 * FRAME) @(posedge clk);
    en = 1;
    repeat (3 * FRAME) @(posedge clk);
  endtask

  task automatic move(int dx, int dy);
    int lx, ly;
    en = 0;
    u_mouse.send_packet(0, 0, dx, dy);
    lx = 2 * HA - (vz ? 2 * W : W);
    ly = 2 * VA - (vz ? 2 * H : H);
    vx += dx; vy -= dy;
    if (vx < 0 || vx > lx || vy < 0 || vy > ly) n_limit++;
    vx = vx < 0 ? 0 : (vx > lx ? lx : vx);
    vy = vy < 0 ? 0 : (vy > ly ? ly : vy);
    n_move++;
    settle();
  endtask

  task automatic click(bit left);
    int lx, ly;
    en = 0;
    u_mouse.send_packet(left, !left, 0, 0);
    repeat (2 * DEB) @(posedge clk);
    u_mouse.send_packet(0, 0, 0, 0);
    if (left) begin
      vz = !vz;
      if (vz) n_enlarge++; else n_reduce++;
      lx = 2 * HA - (vz ? 2 * W : W);
      ly = 2 * VA - (vz ? 2 * H : H);
      if (vx > lx || vy > ly) n_limit++;
      vx = vx > lx ? lx : vx;
      vy = vy > ly ? ly : vy;
    end else begin
      vimg = (vimg + 1) % N;
      n_swap++;
    end
    settle();
  endtask

  // a press shorter than the debounce time (a bounce): nothing may change
  task automatic bounce();
    en = 0;
    u_mouse.send_packet(1, 0, 0, 0);
    u_mouse.send_packet(0, 0, 0, 0);
    n_bounce++;
    settle();
  endtask

  initial begin
    int t_load;
    repeat (3) @(posedge clk);
    rst_n = 1;
    t_load = 0;
    while (!load_done) begin @(posedge clk); t_load++; end
    check(t_load == WORDS * (ROMW + 1), $sformatf("load took %0d cycles", t_load));
    wait (mouse_ready && dac_done);
    check(dac_writes == 770, $sformatf("%0d RAMDAC writes", dac_writes));
    settle();                    // centred over the four monitors
    move(3, 2);
    move(-2, -1);
    move(50, -50);               // bottom-right limits
    click(1);                    // enlarge: limits shrink
    bounce();                    // still enlarged
    move(-9, 3);
    click(0);                    // second image
    click(1);                    // reduce
    move(-1, 4);
    click(0);                    // back to the first image
    check(u_chk.frames >= 20, $sformatf("%0d frames checked", u_chk.frames));
    check(u_chk.straddle_frames > 0, "picture across monitor boundaries");
    check(u_chk.zoom_frames > 0 && u_chk.normal_frames > 0, "frames at both sizes");
    check(u_chk.interp_pixels > 0, "averaged pixels");
    check(u_chk.img1_frames > 0, "second image shown");
    check(n_move > 0 && n_limit > 0 && n_enlarge > 0 && n_reduce > 0 && n_swap > 0 && n_bounce > 0, "all mouse actions");
    $display("mechanisms: moves %0d limits %0d enlarge %0d reduce %0d swap %0d bounce %0d frames %0d straddle %0d averaged %0d",
             n_move, n_limit, n_enlarge, n_reduce, n_swap, n_bounce, u_chk.frames, u_chk.straddle_frames, u_chk.interp_pixels);
    checks += u_chk.checks;
    failures += u_chk.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

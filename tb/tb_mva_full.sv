// tb_mva_full: the adapter at its full size, with every parameter at its
// default: four 640 x 480 monitors at 25 MHz (100 MHz system clock), two
// 640 x 480 images of 24-bit pixels, real PS/2 timing (12.5 kHz mouse clock)
// and the 20 ms debounce time.
//
// It checks the start-up copy of all 614,400 words (and that it takes
// 16 cycles per word, 150 ns EEPROM access), the RAMDAC programming and the mouse initialisation,
// then every pixel of all four monitors for one frame with the picture
// centred across the four monitors, and, after a left click, one frame of the
// enlarged picture, which fills the whole canvas.
module tb_mva_full;
  import mva_pkg::*;
  import mva_tb_pkg::*;
  localparam int HA = 640, VA = 480, HT = 800, VT = 525, W = 640, H = 480, N = 2;
  localparam int WORDS = N * W * H, AW = 20, FRAME = HT * VT * 4, DEB = 2000000;

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

  mva_top dut (
    .clk, .rst_n, .rom_addr, .rom_rd, .rom_data, .sram_addr, .sram_we, .sram_wdata, .sram_rdata,
    .ps2_clk_i(clk_line), .ps2_data_i(data_line), .ps2_clk_oe(clk_oe), .ps2_data_oe(data_oe),
    .pix_clk, .vga_rgb, .vga_rgb3, .vga_blank_n(blank_n), .vga_hsync(hsync), .vga_vsync(vsync),
    .dac_rs, .dac_d, .dac_wr_n, .dac_rd_n, .load_done, .dac_done, .mouse_ready);

  eeprom_model #(.IMG_W(W), .IMG_H(H), .NUM_IMG(N), .ACCESS(15), .AW(AW)) u_rom (
    .clk, .addr(rom_addr), .rd(rom_rd), .data(rom_data));
  sram_model #(.WORDS(WORDS), .AW(AW)) u_sram (.clk, .addr(sram_addr), .we(sram_we),
    .wdata(sram_wdata), .rdata(sram_rdata));
  ps2_mouse_model #(.HALF(4000)) u_mouse (.clk, .clk_line, .data_line,
    .clk_pull(m_clk_pull), .data_pull(m_data_pull));

  logic en = 0;
  int vx = 320, vy = 240, vimg = 0;
  bit vz = 0;

  quad_monitor_checker #(.HA(HA), .VA(VA), .HT(HT), .VT(VT), .W(W), .H(H)) u_chk (
    .pix_clk, .rgb(vga_rgb), .blank_n, .vsync, .en, .vx, .vy, .vz, .vimg);

  int dac_writes = 0;
  logic wr_d = 1;
  always @(posedge clk) begin
    wr_d <= dac_wr_n | !rst_n;
    if (rst_n && dac_wr_n && !wr_d) dac_writes++;
  end

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_load;
    repeat (3) @(posedge clk);
    rst_n = 1;
    t_load = 0;
    while (!load_done) begin @(posedge clk); t_load++; end
    check(t_load == WORDS * 16, $sformatf("load took %0d cycles", t_load));
    wait (mouse_ready && dac_done);
    check(dac_writes == 770, $sformatf("%0d RAMDAC writes", dac_writes));
    // centred picture, unchanged since reset
    repeat (FRAME) @(posedge clk);
    en = 1;
    repeat (2 * FRAME) @(posedge clk);
    en = 0;
    check(u_chk.frames >= 1 && u_chk.straddle_frames >= 1, "centred frame across the four monitors");
    // left click: enlarge; the picture now fills the canvas, position 0,0
    u_mouse.send_packet(1, 0, 0, 0);
    repeat (DEB + 100000) @(posedge clk);
    u_mouse.send_packet(0, 0, 0, 0);
    vz = 1; vx = 0; vy = 0;
    repeat (2 * FRAME) @(posedge clk);
    en = 1;
    repeat (2 * FRAME) @(posedge clk);
    check(u_chk.zoom_frames >= 1 && u_chk.interp_pixels > 0, "enlarged frame");
    $display("frames %0d (enlarged %0d), averaged pixels %0d", u_chk.frames, u_chk.zoom_frames, u_chk.interp_pixels);
    checks += u_chk.checks;
    failures += u_chk.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

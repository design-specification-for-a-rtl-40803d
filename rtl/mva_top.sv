// mva_top: FPGA logic of the quad-output multi-display video adapter.
//
// One picture is shown across four monitors arranged two by two; each monitor
// shows one quarter of a canvas twice the VGA size in each direction. At
// start-up the stored images are copied from the EEPROM into the SRAM
// (eeprom_controller); the RAMDACs are programmed for true colour
// (ramdac_ctrl); the PS/2 mouse is initialised (mouse_driver). Then the SRAM
// is read continuously: the system clock runs at four times the pixel rate
// and each pixel period has one SRAM read slot per monitor (sram_controller).
// Each monitor's pixel_interp turns its reads into output pixels, averaging
// neighbours when the picture is enlarged. One vga_timing instance times all
// four outputs, so their syncs are identical.
//
// Clocking: clk at 4 x the pixel rate (100 MHz for the 25 MHz VGA pixel
// rate); pix_clk is the pixel clock for the RAMDACs, rising in the middle of
// each pixel period. Output pixels, blank and syncs change together at the
// start of a pixel period and lag the timing counters by two pixel periods.
// Every output is shared by the four monitors except the colour, which is
// given per monitor: vga_rgb in 24-bit form for the RAMDAC pixel ports and
// vga_rgb3 (one bit per colour) for the 3-bit D/A converters.
// Monitor m is column m[0], row m[1] of the 2 x 2 arrangement.
module mva_top
  import mva_pkg::*;
#(
  parameter int unsigned H_ACTIVE    = H_ACTIVE_D,
  parameter int unsigned H_FP        = H_FP_D,
  parameter int unsigned H_SYNC      = H_SYNC_D,
  parameter int unsigned H_BP        = H_BP_D,
  parameter int unsigned V_ACTIVE    = V_ACTIVE_D,
  parameter int unsigned V_FP        = V_FP_D,
  parameter int unsigned V_SYNC      = V_SYNC_D,
  parameter int unsigned V_BP        = V_BP_D,
  parameter int unsigned IMG_W       = 640,
  parameter int unsigned IMG_H       = 480,
  parameter int unsigned NUM_IMG     = 2,
  parameter int unsigned ROM_WAIT    = 15,
  parameter int unsigned INHIBIT     = 10000,
  parameter int unsigned RX_TIMEOUT  = 20000,
  parameter int unsigned ACK_TIMEOUT = 2500000,
  parameter int unsigned DEBOUNCE    = 2000000,
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP,
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP,
  localparam int unsigned WORDS   = NUM_IMG * IMG_W * IMG_H,
  localparam int unsigned AW      = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // EEPROM
  output logic [AW-1:0] rom_addr,
  output logic          rom_rd,
  input  rgb_t          rom_data,
  // SRAM
  output logic [AW-1:0] sram_addr,
  output logic          sram_we,
  output rgb_t          sram_wdata,
  input  rgb_t          sram_rdata,
  // PS/2 mouse (open collector)
  input  logic          ps2_clk_i,
  input  logic          ps2_data_i,
  output logic          ps2_clk_oe,
  output logic          ps2_data_oe,
  // four VGA outputs
  output logic          pix_clk,
  output rgb_t          vga_rgb  [NUM_MON],
  output logic [2:0]    vga_rgb3 [NUM_MON],
  output logic          vga_blank_n,
  output logic          vga_hsync,
  output logic          vga_vsync,
  // RAMDAC MPU port, shared by the four RAMDACs
  output logic [2:0]    dac_rs,
  output logic [7:0]    dac_d,
  output logic          dac_wr_n,
  output logic          dac_rd_n,
  // status
  output logic          load_done,
  output logic          dac_done,
  output logic          mouse_ready
);

  localparam int unsigned HW  = $clog2(H_TOTAL);
  localparam int unsigned VW  = $clog2(V_TOTAL);
  localparam int unsigned PXW = $clog2(2 * H_ACTIVE);
  localparam int unsigned PYW = $clog2(2 * V_ACTIVE);
  localparam int unsigned ISW = (NUM_IMG > 1) ? $clog2(NUM_IMG) : 1;
  localparam int unsigned CLW = $clog2(H_ACTIVE);

  // ---------------- pixel slots ----------------
  logic [1:0] slot;
  logic       pix_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) slot <= '0;
    else        slot <= slot + 1'b1;
  end
  assign pix_en  = (slot == 2'd3);
  assign pix_clk = slot[1];

  // ---------------- timing ----------------
  logic [HW-1:0] hcount;
  logic [VW-1:0] vcount;
  logic          hsync, vsync, active, line_end, frame_end;

  vga_timing #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)
  ) u_timing (
    .clk, .rst_n, .pix_en, .hcount, .vcount, .hsync, .vsync, .active,
    .line_end, .frame_end
  );

  // ---------------- start-up loader ----------------
  logic          ld_wr_en;
  logic [AW-1:0] ld_wr_addr;
  logic [23:0]   ld_wr_data;

  eeprom_controller #(.WORDS(WORDS), .DATA_W(24), .ROM_WAIT(ROM_WAIT)) u_loader (
    .clk, .rst_n, .rom_addr, .rom_rd, .rom_data(rom_data),
    .wr_en(ld_wr_en), .wr_addr(ld_wr_addr), .wr_data(ld_wr_data), .done(load_done)
  );

  // ---------------- mouse ----------------
  logic [PXW-1:0] pos_x;
  logic [PYW-1:0] pos_y;
  logic           zoom;
  logic [ISW-1:0] img_sel;

  mouse_driver #(
    .CANVAS_W(2 * H_ACTIVE), .CANVAS_H(2 * V_ACTIVE), .IMG_W(IMG_W), .IMG_H(IMG_H),
    .NUM_IMG(NUM_IMG), .INHIBIT(INHIBIT), .RX_TIMEOUT(RX_TIMEOUT),
    .ACK_TIMEOUT(ACK_TIMEOUT), .DEBOUNCE(DEBOUNCE)
  ) u_mouse (
    .clk, .rst_n, .ps2_clk_i, .ps2_data_i, .ps2_clk_oe, .ps2_data_oe,
    .pos_x, .pos_y, .zoom, .img_sel, .ready(mouse_ready)
  );

  // ---------------- SRAM reads ----------------
  logic           f_valid, f_inside, f_odd_x, f_odd_y, f_store, f_col_ok;
  logic [1:0]     f_mon;
  logic [CLW-1:0] f_col;

  sram_controller #(
    .H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .H_TOTAL(H_TOTAL), .V_TOTAL(V_TOTAL),
    .IMG_W(IMG_W), .IMG_H(IMG_H), .NUM_IMG(NUM_IMG)
  ) u_sram_ctrl (
    .clk, .rst_n, .slot, .pix_en, .hcount, .vcount,
    .pos_x, .pos_y, .zoom, .img_sel,
    .load_done, .ld_wr_en, .ld_wr_addr, .ld_wr_data(rgb_t'(ld_wr_data)),
    .sram_addr, .sram_we, .sram_wdata,
    .f_valid, .f_mon, .f_inside, .f_odd_x, .f_odd_y, .f_store, .f_col_ok, .f_col
  );

  // ---------------- per-monitor interpolation ----------------
  rgb_t mon_pix [NUM_MON];

  for (genvar m = 0; m < NUM_MON; m++) begin : g_mon
    pixel_interp #(.H_ACTIVE(H_ACTIVE)) u_interp (
      .clk, .rst_n,
      .in_valid(f_valid && f_mon == 2'(m)), .in_pix(sram_rdata),
      .in_inside(f_inside), .in_odd_x(f_odd_x), .in_odd_y(f_odd_y),
      .in_store(f_store), .in_col_ok(f_col_ok), .in_col(f_col),
      .out_pix(mon_pix[m])
    );
  end

  // ---------------- output stage: four synchronised outputs ----------------
  logic hs_d1, vs_d1, act_d1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hs_d1       <= 1'b1;
      vs_d1       <= 1'b1;
      act_d1      <= 1'b0;
      vga_hsync   <= 1'b1;
      vga_vsync   <= 1'b1;
      vga_blank_n <= 1'b0;
      for (int m = 0; m < NUM_MON; m++) vga_rgb[m] <= '0;
    end else if (pix_en) begin
      hs_d1       <= hsync;
      vs_d1       <= vsync;
      act_d1      <= active;
      vga_hsync   <= hs_d1;
      vga_vsync   <= vs_d1;
      vga_blank_n <= act_d1;
      for (int m = 0; m < NUM_MON; m++) vga_rgb[m] <= act_d1 ? mon_pix[m] : '0;
    end
  end

  always_comb begin
    for (int m = 0; m < NUM_MON; m++) vga_rgb3[m] = rgb_to_3bit(vga_rgb[m]);
  end

  // ---------------- RAMDAC programming ----------------
  ramdac_ctrl u_ramdac_ctrl (
    .clk, .rst_n, .rs(dac_rs), .d(dac_d), .wr_n(dac_wr_n), .rd_n(dac_rd_n), .done(dac_done)
  );

endmodule

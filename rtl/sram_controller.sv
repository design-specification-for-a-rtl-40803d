// sram_controller: SRAM address generation for the four monitors.
//
// After start-up the SRAM is only read (the read strobe is always 1, as in the
// specification's RAM controller); before the loader reports done, its writes
// are passed to the SRAM pins instead. The address depends on the position of
// the image: the four monitors are treated as one canvas of 2*H_ACTIVE by
// 2*V_ACTIVE pixels (monitor m shows column m[0], row m[1] of it) and the
// image, IMG_W x IMG_H pixels, or twice that when enlarged, sits on that
// canvas with its top-left corner at (pos_x, pos_y).
//
// Four reads per pixel period: the system clock runs at four times the pixel
// rate and in slot m (0..3) of each pixel period the address for monitor m is
// issued. Each read is tagged with what the interpolator needs (monitor,
// inside-the-image, odd column/row of an enlarged image, whether the line is
// to be kept in the line buffer, and the column); the tag comes out on the
// f_* ports in the same cycle as the SRAM data for that read.
//
// Enlarged reads: output column rx needs source columns rx>>1 and (rx+1)>>1,
// so each slot fetches column (rx+1)>>1 and the interpolator keeps the
// previous fetch. To have the left neighbour at the first column of a
// monitor, one extra fetch is made in the last pixel period of the previous
// line (column -1). Rows work the same way with a line buffer, and one extra
// line (row -1) is fetched in the last blanking line of the frame.
//
// Position, enlarge and image select are latched once per frame, at the start
// of vertical blanking, so that all four monitors change together and no
// monitor shows a torn frame.
//
// Timing: address, write enable and write data are registered. The SRAM is
// expected to return read data one clock after the address appears on its
// pins (the FPGA samples the asynchronous SRAM's output in a register), so
// f_* and sram_rdata line up two cycles after the issuing slot.
module sram_controller
  import mva_pkg::*;
#(
  parameter int unsigned H_ACTIVE = H_ACTIVE_D,
  parameter int unsigned V_ACTIVE = V_ACTIVE_D,
  parameter int unsigned H_TOTAL  = H_ACTIVE_D + H_FP_D + H_SYNC_D + H_BP_D,
  parameter int unsigned V_TOTAL  = V_ACTIVE_D + V_FP_D + V_SYNC_D + V_BP_D,
  parameter int unsigned IMG_W    = 640,
  parameter int unsigned IMG_H    = 480,
  parameter int unsigned NUM_IMG  = 2,
  localparam int unsigned WORDS = NUM_IMG * IMG_W * IMG_H,
  localparam int unsigned AW    = $clog2(WORDS),
  localparam int unsigned HW    = $clog2(H_TOTAL),
  localparam int unsigned VW    = $clog2(V_TOTAL),
  localparam int unsigned PXW   = $clog2(2 * H_ACTIVE),
  localparam int unsigned PYW   = $clog2(2 * V_ACTIVE),
  localparam int unsigned ISW   = (NUM_IMG > 1) ? $clog2(NUM_IMG) : 1,
  localparam int unsigned CLW   = $clog2(H_ACTIVE)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [1:0]     slot,        // monitor served in this cycle
  input  logic           pix_en,      // last slot of a pixel period
  input  logic [HW-1:0]  hcount,
  input  logic [VW-1:0]  vcount,
  // view from the mouse driver
  input  logic [PXW-1:0] pos_x,
  input  logic [PYW-1:0] pos_y,
  input  logic           zoom,
  input  logic [ISW-1:0] img_sel,
  // start-up writes from the EEPROM controller
  input  logic           load_done,
  input  logic           ld_wr_en,
  input  logic [AW-1:0]  ld_wr_addr,
  input  rgb_t           ld_wr_data,
  // SRAM pins
  output logic [AW-1:0]  sram_addr,
  output logic           sram_we,
  output rgb_t           sram_wdata,
  // tag of the read whose data is on sram_rdata now
  output logic           f_valid,
  output logic [1:0]     f_mon,
  output logic           f_inside,
  output logic           f_odd_x,
  output logic           f_odd_y,
  output logic           f_store,
  output logic           f_col_ok,
  output logic [CLW-1:0] f_col
);

  localparam int unsigned SW = 14;  // signed width for canvas arithmetic
  typedef logic signed [SW-1:0] sc_t;

  typedef struct packed {
    logic           valid;
    logic [1:0]     mon;
    logic           in_img;
    logic           odd_x;
    logic           odd_y;
    logic           store;
    logic           col_ok;
    logic [CLW-1:0] col;
  } tag_t;

  // ---------------- view latched once per frame ----------------
  logic [PXW-1:0] px_l;
  logic [PYW-1:0] py_l;
  logic           zoom_l;
  logic [ISW-1:0] img_l;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      px_l   <= '0;
      py_l   <= '0;
      zoom_l <= 1'b0;
      img_l  <= '0;
    end else if (pix_en && hcount == '0 && vcount == VW'(V_ACTIVE)) begin
      px_l   <= pos_x;
      py_l   <= pos_y;
      zoom_l <= zoom;
      img_l  <= img_sel;
    end
  end

  // ---------------- fetch position for this slot ----------------
  sc_t            hf, vf, cx, cy, rx, ry, zw, zh, u, w;
  logic [VW-1:0]  lf;
  logic           fetch_ok, in_img;
  logic [AW-1:0]  rd_addr;
  tag_t           tag_now;

  always_comb begin
    // one pixel period ahead at the end of a line: column -1 of the next line
    if (hcount == HW'(H_TOTAL - 1)) begin
      hf = sc_t'(-1);
      lf = (vcount == VW'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
    end else begin
      hf = sc_t'(hcount);
      lf = vcount;
    end
    vf = (lf == VW'(V_TOTAL - 1)) ? sc_t'(-1) : sc_t'(lf);
    fetch_ok = (hf < sc_t'(H_ACTIVE)) && (vf < sc_t'(V_ACTIVE));

    cx = hf + (slot[0] ? sc_t'(H_ACTIVE) : sc_t'(0));
    cy = vf + (slot[1] ? sc_t'(V_ACTIVE) : sc_t'(0));
    rx = cx - sc_t'(px_l);
    ry = cy - sc_t'(py_l);
    zw = zoom_l ? sc_t'(2 * IMG_W) : sc_t'(IMG_W);
    zh = zoom_l ? sc_t'(2 * IMG_H) : sc_t'(IMG_H);
    in_img = (rx >= 0) && (rx < zw) && (ry >= 0) && (ry < zh);

    if (zoom_l) begin
      u = (rx + sc_t'(1)) >>> 1;
      w = (ry + sc_t'(1)) >>> 1;
      if (u > sc_t'(IMG_W - 1)) u = sc_t'(IMG_W - 1);
      if (w > sc_t'(IMG_H - 1)) w = sc_t'(IMG_H - 1);
    end else begin
      u = rx;
      w = ry;
    end

    rd_addr = AW'(img_l) * AW'(IMG_W * IMG_H) + AW'(w) * AW'(IMG_W) + AW'(u);

    tag_now.valid  = fetch_ok && load_done;
    tag_now.mon    = slot;
    tag_now.in_img = in_img;
    tag_now.odd_x  = zoom_l && rx[0];
    tag_now.odd_y  = zoom_l && ry[0];
    tag_now.store  = zoom_l && !ry[0];
    tag_now.col_ok = (hf >= 0);
    tag_now.col    = CLW'(hf);
  end

  // ---------------- SRAM pins and tag pipeline ----------------
  tag_t tag_q1, tag_q2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sram_addr  <= '0;
      sram_we    <= 1'b0;
      sram_wdata <= '0;
      tag_q1     <= '0;
      tag_q2     <= '0;
    end else begin
      if (!load_done) begin
        sram_we    <= ld_wr_en;
        sram_addr  <= ld_wr_addr;
        sram_wdata <= ld_wr_data;
      end else begin
        sram_we    <= 1'b0;
        sram_addr  <= (tag_now.valid && in_img) ? rd_addr : '0;
      end
      tag_q1 <= tag_now;
      tag_q2 <= tag_q1;
    end
  end

  assign f_valid  = tag_q2.valid;
  assign f_mon    = tag_q2.mon;
  assign f_inside = tag_q2.in_img;
  assign f_odd_x  = tag_q2.odd_x;
  assign f_odd_y  = tag_q2.odd_y;
  assign f_store  = tag_q2.store;
  assign f_col_ok = tag_q2.col_ok;
  assign f_col    = tag_q2.col;

  // after start-up the SRAM is only read
  a_no_write_after_load: assert property (@(posedge clk) disable iff (!rst_n)
    load_done && $past(load_done) |-> !sram_we);
  // a tag is only valid when the display owns the SRAM
  a_no_read_while_loading: assert property (@(posedge clk) disable iff (!rst_n)
    !load_done |-> !tag_now.valid);

endmodule

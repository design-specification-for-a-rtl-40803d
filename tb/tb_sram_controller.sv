// tb_sram_controller: checks SRAM address generation and read tagging.
//
// The testbench plays the timing generator (slot, pix_en, hcount, vcount) at
// a small format. First it loads both images through the loader port and
// checks that the writes reach the SRAM pins one cycle later and that no
// read is tagged during loading. Then, for pictures at several positions at
// normal and double size, it checks every read: two cycles after the slot
// that issued it, the tag must name the monitor, column, odd row/column and
// line-buffer flags, and the SRAM data must be the source pixel the read was
// meant to fetch (column (rx+1)/2 and row (ry+1)/2 when enlarged). Position
// changes made in mid-frame must take effect only at the start of vertical
// blanking.
module tb_sram_controller;
  import mva_pkg::*;
  import mva_tb_pkg::*;
  localparam int HA = 8, HT = 11, VA = 6, VT = 9, W = 4, H = 3, N = 2;
  localparam int WORDS = N * W * H, AW = $clog2(WORDS);
  localparam int PXW = $clog2(2 * HA), PYW = $clog2(2 * VA), CLW = $clog2(HA);

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

  logic [1:0] slot = 0;
  logic pix_en;
  logic [$clog2(HT)-1:0] hcount = 0;
  logic [$clog2(VT)-1:0] vcount = 0;
  logic [PXW-1:0] pos_x = 0;
  logic [PYW-1:0] pos_y = 0;
  logic zoom = 0;
  logic img_sel = 0;
  logic load_done = 0, ld_wr_en = 0;
  logic [AW-1:0] ld_wr_addr = 0;
  rgb_t ld_wr_data = 0;
  logic [AW-1:0] sram_addr;
  logic sram_we;
  rgb_t sram_wdata, sram_rdata;
  logic f_valid, f_inside, f_odd_x, f_odd_y, f_store, f_col_ok;
  logic [1:0] f_mon;
  logic [CLW-1:0] f_col;

  assign pix_en = (slot == 3);

  sram_controller #(.H_ACTIVE(HA), .V_ACTIVE(VA), .H_TOTAL(HT), .V_TOTAL(VT),
                    .IMG_W(W), .IMG_H(H), .NUM_IMG(N)) dut (
    .clk, .rst_n, .slot, .pix_en, .hcount, .vcount, .pos_x, .pos_y, .zoom, .img_sel,
    .load_done, .ld_wr_en, .ld_wr_addr, .ld_wr_data, .sram_addr, .sram_we, .sram_wdata,
    .f_valid, .f_mon, .f_inside, .f_odd_x, .f_odd_y, .f_store, .f_col_ok, .f_col);

  sram_model #(.WORDS(WORDS), .AW(AW)) u_sram (.clk, .addr(sram_addr), .we(sram_we),
    .wdata(sram_wdata), .rdata(sram_rdata));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    bit valid; int mon; bit ins; bit ox; bit oy; bit st; bit cok; int col; rgb_t pix;
  } exp_t;
  exp_t q[$];

  // view as the hardware must use it: taken at the start of vertical blanking
  int vx = 0, vy = 0, vimg = 0;
  bit vz = 0;
  int n_latch = 0, n_reads = 0, n_zoom_reads = 0;

  function automatic exp_t expect_read(int m, int h, int v);
    exp_t e;
    int hf, lf, vf, rx, ry, u, w, zw, zh;
    if (h == HT - 1) begin hf = -1; lf = (v + 1) % VT; end
    else begin hf = h; lf = v; end
    vf = (lf == VT - 1) ? -1 : lf;
    e.valid = hf < HA && vf < VA;
    rx = (m % 2) * HA + hf - vx;
    ry = (m / 2) * VA + vf - vy;
    zw = vz ? 2 * W : W; zh = vz ? 2 * H : H;
    e.ins = rx >= 0 && ry >= 0 && rx < zw && ry < zh;
    if (vz) begin
      u = (rx + 1) >>> 1; w = (ry + 1) >>> 1;
      if (u > W - 1) u = W - 1;
      if (w > H - 1) w = H - 1;
    end else begin u = rx; w = ry; end
    e.mon = m; e.ox = vz && rx[0]; e.oy = vz && ry[0]; e.st = vz && !ry[0];
    e.cok = hf >= 0; e.col = hf < 0 ? 0 : hf;
    e.pix = e.ins ? img_pix(vimg, u, w) : '0;
    return e;
  endfunction

  // drive the timing and check every cycle
  bit running = 0;
  always @(posedge clk) begin
    if (running) begin
      exp_t e;
      q.push_back(expect_read(slot, hcount, vcount));
      if (q.size() > 2) begin
        e = q.pop_front();
        check(f_valid == e.valid, "tag valid");
        if (e.valid) begin
          n_reads++;
          if (vz) n_zoom_reads++;
          check(f_mon == 2'(e.mon) && f_inside == e.ins && f_col_ok == e.cok &&
                (!e.cok || f_col == CLW'(e.col)), $sformatf("tag of monitor %0d", e.mon));
          check(f_odd_x == e.ox && f_odd_y == e.oy && f_store == e.st, "interpolation flags");
          if (e.ins) check(sram_rdata == e.pix, $sformatf("read data %h expected %h", sram_rdata, e.pix));
          check(!sram_we, "no writes after loading");
        end
      end
      if (pix_en && hcount == 0 && vcount == VA) begin
        vx = pos_x; vy = pos_y; vz = zoom; vimg = img_sel; n_latch++;
      end
    end
    slot <= slot + 1;
    if (pix_en) begin
      if (hcount == HT - 1) begin
        hcount <= 0;
        vcount <= (vcount == VT - 1) ? 0 : vcount + 1;
      end else hcount <= hcount + 1;
    end
  end

  task automatic frames(int n);
    repeat (n * HT * VT * 4) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // loading
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      ld_wr_en = 1; ld_wr_addr = AW'(a);
      ld_wr_data = img_pix(a / (W * H), (a % (W * H)) % W, (a % (W * H)) / W);
      @(negedge clk);
      check(sram_we && sram_addr == AW'(a) && sram_wdata == ld_wr_data, "load write on SRAM pins");
      check(!f_valid, "no reads while loading");
      ld_wr_en = 0;
    end
    @(negedge clk);
    load_done = 1;
    running = 1;
    frames(2);
    pos_x = 3; pos_y = 2;                      frames(2);
    pos_x = 7; pos_y = 4; img_sel = 1;         frames(2);
    zoom = 1; pos_x = 2; pos_y = 1;            frames(2);
    pos_x = 5; pos_y = 3;                      frames(2);
    pos_x = 8; pos_y = 6; img_sel = 0;         frames(2);
    // change in mid-frame, at a random point
    repeat ($urandom_range(50, 300)) @(posedge clk);
    pos_x = 1; pos_y = 5; zoom = 0;            frames(2);
    check(n_latch >= 14, $sformatf("%0d view updates", n_latch));
    check(n_zoom_reads > 0 && n_reads > n_zoom_reads, "reads at both sizes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

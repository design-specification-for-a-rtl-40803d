// tb_mouse_driver: checks the PS/2 mouse driver against a mouse model.
//
// The model ignores the first initialisation command, so the driver must
// time out and send it again; the testbench checks the command byte, the
// acknowledge and ready. It then sends movement packets and checks the
// picture position: centred at start, moving with the mouse (Y inverted),
// held within 0 .. canvas - picture, and re-limited when the picture is
// enlarged. A stray byte without bit 3 set must be skipped. A left button
// held longer than the debounce time must toggle enlargement exactly once,
// a press shorter than that must not, and a held right button must select
// the next image.
module tb_mouse_driver;
  localparam int CW = 64, CH = 48, W = 16, H = 12, HALF = 20, DEB = 3000;
  localparam int PXW = $clog2(CW), PYW = $clog2(CH);

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

  logic clk_oe, data_oe, m_clk_pull, m_data_pull, clk_line, data_line;
  logic [PXW-1:0] pos_x;
  logic [PYW-1:0] pos_y;
  logic zoom, img_sel, ready;

  assign clk_line  = !(clk_oe || m_clk_pull);
  assign data_line = !(data_oe || m_data_pull);

  mouse_driver #(.CANVAS_W(CW), .CANVAS_H(CH), .IMG_W(W), .IMG_H(H), .NUM_IMG(2),
                 .INHIBIT(100), .RX_TIMEOUT(200), .ACK_TIMEOUT(3000), .DEBOUNCE(DEB)) dut (
    .clk, .rst_n, .ps2_clk_i(clk_line), .ps2_data_i(data_line), .ps2_clk_oe(clk_oe),
    .ps2_data_oe(data_oe), .pos_x, .pos_y, .zoom, .img_sel, .ready);

  ps2_mouse_model #(.HALF(HALF)) u_mouse (.clk, .clk_line, .data_line,
    .clk_pull(m_clk_pull), .data_pull(m_data_pull));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic move(int dx, int dy, int ex, int ey);
    u_mouse.send_packet(0, 0, dx, dy);
    repeat (10) @(posedge clk);
    check(pos_x == PXW'(ex) && pos_y == PYW'(ey),
          $sformatf("move %0d,%0d: position %0d,%0d expected %0d,%0d", dx, dy, pos_x, pos_y, ex, ey));
  endtask

  task automatic hold(bit left, bit right, int cycles);
    u_mouse.send_packet(left, right, 0, 0);
    repeat (cycles) @(posedge clk);
    u_mouse.send_packet(0, 0, 0, 0);
    repeat (DEB + 100) @(posedge clk);
  endtask

  initial begin
    u_mouse.ignore_cmds = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2000) @(posedge clk);
    check(!ready, "not ready before an acknowledge");
    wait (ready);
    check(u_mouse.n_cmds == 2 && u_mouse.last_cmd == 8'hF4 && u_mouse.n_bad_cmds == 0,
          $sformatf("initialisation sent %0d times, last %h", u_mouse.n_cmds, u_mouse.last_cmd));
    check(pos_x == PXW'((CW - W) / 2) && pos_y == PYW'((CH - H) / 2), "starts centred");
    check(!zoom && !img_sel, "normal size, first image");
    move(5, 3, 29, 15);
    move(100, -100, 48, 36);            // right and bottom limits
    move(-200, 200, 0, 0);              // left and top limits
    u_mouse.send_byte(8'h00);           // stray byte, bit 3 clear: skipped
    move(2, 0, 2, 0);
    move(38, -30, 40, 30);
    hold(1, 0, 2 * DEB);                // left click: enlarge
    check(zoom, "left click enlarges");
    check(pos_x == 32 && pos_y == 24, $sformatf("limits of enlarged picture: %0d,%0d", pos_x, pos_y));
    move(10, -10, 32, 24);
    hold(1, 0, 0);                      // press shorter than the debounce time
    check(zoom, "short press ignored");
    hold(1, 0, 2 * DEB);                // left click: back to normal size
    check(!zoom, "second left click reduces");
    move(10, -10, 42, 34);
    hold(0, 1, 2 * DEB);
    check(img_sel == 1'b1, "right click selects the next image");
    hold(0, 1, 2 * DEB);
    check(img_sel == 1'b0, "right click wraps to the first image");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// mouse_driver: PS/2 mouse control of the picture position, size and choice.
//
// After reset the driver sends the initialisation command to the mouse
// (0xF4, "enable data reporting" of the PS/2 mouse protocol) and waits for
// its acknowledge (0xFA); without one within ACK_TIMEOUT cycles it sends
// again. From then on it receives the mouse's three-byte movement packets:
// byte 0 holds the buttons (bit 0 left, bit 1 right), an always-1 bit 3 used
// to stay aligned to packets, and the sign bits of the X (bit 4) and Y
// (bit 5) movement; bytes 1 and 2 hold the low eight bits of the movement.
//
// The movement is added to the picture position, in canvas pixels (the four
// monitors form one canvas of CANVAS_W x CANVAS_H; the PS/2 Y axis points
// up, the canvas's down). The position is always kept within the page: the
// top-left corner may move from 0 to CANVAS - picture size, and the limits
// change when the left button enlarges the picture to twice its size. The
// position is clamped to the new limits in the same cycle as the size changes,
// so the display never sees an enlarged picture off the page.
// Both buttons are debounced; a left click toggles enlargement, a right
// click selects the next stored image.
//
// Ports: ps2_clk_i/ps2_data_i are the line levels, *_oe pull the lines low.
// pos_x/pos_y/zoom/img_sel are registered and change at most once per
// packet; ready is high once the mouse acknowledged the initialisation.
module mouse_driver #(
  parameter int unsigned CANVAS_W    = 1280,
  parameter int unsigned CANVAS_H    = 960,
  parameter int unsigned IMG_W       = 640,
  parameter int unsigned IMG_H       = 480,
  parameter int unsigned NUM_IMG     = 2,
  parameter int unsigned INHIBIT     = 10000,      // 100 us
  parameter int unsigned RX_TIMEOUT  = 20000,      // 200 us
  parameter int unsigned ACK_TIMEOUT = 2500000,    // 25 ms
  parameter int unsigned DEBOUNCE    = 2000000,    // 20 ms
  localparam int unsigned PXW = $clog2(CANVAS_W),
  localparam int unsigned PYW = $clog2(CANVAS_H),
  localparam int unsigned ISW = (NUM_IMG > 1) ? $clog2(NUM_IMG) : 1,
  localparam int unsigned AW  = $clog2(ACK_TIMEOUT + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ps2_clk_i,
  input  logic           ps2_data_i,
  output logic           ps2_clk_oe,
  output logic           ps2_data_oe,
  output logic [PXW-1:0] pos_x,
  output logic [PYW-1:0] pos_y,
  output logic           zoom,
  output logic [ISW-1:0] img_sel,
  output logic           ready
);

  localparam logic [7:0] CMD_ENABLE = 8'hF4;
  localparam logic [7:0] RSP_ACK    = 8'hFA;
  localparam int SW = 14;
  typedef logic signed [SW-1:0] sc_t;

  // ---------------- line synchronisers ----------------
  logic [1:0] clk_sync, data_sync;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_sync  <= 2'b11;
      data_sync <= 2'b11;
    end else begin
      clk_sync  <= {clk_sync[0], ps2_clk_i};
      data_sync <= {data_sync[0], ps2_data_i};
    end
  end

  // ---------------- byte transmitter / receiver ----------------
  logic       tx_start, tx_busy, tx_done, tx_err;
  logic       rx_valid, rx_err;
  logic [7:0] rx_data;

  ps2_tx #(.INHIBIT(INHIBIT)) u_tx (
    .clk, .rst_n, .start(tx_start), .tx_data(CMD_ENABLE),
    .ps2_clk(clk_sync[1]), .ps2_data(data_sync[1]),
    .clk_oe(ps2_clk_oe), .data_oe(ps2_data_oe),
    .busy(tx_busy), .done(tx_done), .err(tx_err)
  );

  ps2_rx #(.TIMEOUT(RX_TIMEOUT)) u_rx (
    .clk, .rst_n, .enable(!tx_busy),
    .ps2_clk(clk_sync[1]), .ps2_data(data_sync[1]),
    .rx_valid, .rx_data, .rx_err
  );

  // ---------------- initialisation and packet assembly ----------------
  typedef enum logic [1:0] {M_SEND, M_WAIT_TX, M_WAIT_ACK, M_STREAM} mstate_t;
  mstate_t       mstate;
  logic [AW-1:0] tmo;
  logic [1:0]    byte_idx;
  logic [7:0]    b0, b1;
  logic          pkt_valid;
  logic          btn_l_raw, btn_r_raw;
  sc_t           dx, dy;

  assign tx_start = (mstate == M_SEND);
  assign ready    = (mstate == M_STREAM);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mstate    <= M_SEND;
      tmo       <= '0;
      byte_idx  <= '0;
      b0        <= '0;
      b1        <= '0;
      pkt_valid <= 1'b0;
      btn_l_raw <= 1'b0;
      btn_r_raw <= 1'b0;
      dx        <= '0;
      dy        <= '0;
    end else begin
      pkt_valid <= 1'b0;
      unique case (mstate)
        M_SEND: mstate <= M_WAIT_TX;
        M_WAIT_TX: begin
          tmo <= '0;
          if (tx_done)     mstate <= M_WAIT_ACK;
          else if (tx_err) mstate <= M_SEND;
        end
        M_WAIT_ACK: begin
          if (rx_valid && rx_data == RSP_ACK) begin
            mstate   <= M_STREAM;
            byte_idx <= '0;
          end else if (tmo == AW'(ACK_TIMEOUT)) begin
            mstate <= M_SEND;
          end else begin
            tmo <= tmo + 1'b1;
          end
        end
        default: begin  // M_STREAM
          if (rx_err) begin
            byte_idx <= '0;
          end else if (rx_valid) begin
            unique case (byte_idx)
              2'd0: if (rx_data[3]) begin b0 <= rx_data; byte_idx <= 2'd1; end
              2'd1: begin b1 <= rx_data; byte_idx <= 2'd2; end
              default: begin
                byte_idx  <= 2'd0;
                pkt_valid <= 1'b1;
                btn_l_raw <= b0[0];
                btn_r_raw <= b0[1];
                dx        <= sc_t'(signed'({b0[4], b1}));
                dy        <= sc_t'(signed'({b0[5], rx_data}));
              end
            endcase
          end
        end
      endcase
    end
  end

  // ---------------- buttons ----------------
  logic l_press, r_press;
  button_debounce #(.STABLE(DEBOUNCE)) u_db_l (.clk, .rst_n, .raw(btn_l_raw), .level(), .press(l_press));
  button_debounce #(.STABLE(DEBOUNCE)) u_db_r (.clk, .rst_n, .raw(btn_r_raw), .level(), .press(r_press));

  // ---------------- position within the page limits ----------------
  // the limits follow the size the picture has after this cycle, so position
  // and size always change together
  sc_t  lim_x, lim_y, nx, ny;
  logic zoom_next;

  always_comb begin
    zoom_next = zoom ^ l_press;
    lim_x = sc_t'(CANVAS_W) - (zoom_next ? sc_t'(2 * IMG_W) : sc_t'(IMG_W));
    lim_y = sc_t'(CANVAS_H) - (zoom_next ? sc_t'(2 * IMG_H) : sc_t'(IMG_H));
    if (lim_x < 0) lim_x = '0;
    if (lim_y < 0) lim_y = '0;
    nx = sc_t'(pos_x) + (pkt_valid ? dx : sc_t'(0));
    ny = sc_t'(pos_y) - (pkt_valid ? dy : sc_t'(0));
    if (nx < 0)     nx = '0;
    if (nx > lim_x) nx = lim_x;
    if (ny < 0)     ny = '0;
    if (ny > lim_y) ny = lim_y;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      // start centred on the canvas, across the monitor boundaries
      pos_x   <= PXW'((CANVAS_W > IMG_W) ? (CANVAS_W - IMG_W) / 2 : 0);
      pos_y   <= PYW'((CANVAS_H > IMG_H) ? (CANVAS_H - IMG_H) / 2 : 0);
      zoom    <= 1'b0;
      img_sel <= '0;
    end else begin
      pos_x <= PXW'(nx);
      pos_y <= PYW'(ny);
      zoom  <= zoom_next;
      if (r_press) img_sel <= (img_sel == ISW'(NUM_IMG - 1)) ? '0 : img_sel + 1'b1;
    end
  end

  // the picture never leaves the page
  sc_t cur_lim_x, cur_lim_y;
  assign cur_lim_x = sc_t'(CANVAS_W) - (zoom ? sc_t'(2 * IMG_W) : sc_t'(IMG_W));
  assign cur_lim_y = sc_t'(CANVAS_H) - (zoom ? sc_t'(2 * IMG_H) : sc_t'(IMG_H));
  a_within_limits: assert property (@(posedge clk) disable iff (!rst_n)
    (pos_x == '0 || sc_t'(pos_x) <= cur_lim_x) && (pos_y == '0 || sc_t'(pos_y) <= cur_lim_y));

endmodule

// mva_pkg: types and constants shared by the multi-display video adapter.
//
// A pixel is 24-bit RGB (8 bits per channel), the widest format the back end
// supports; the 3-bit format is the most significant bit of each channel.
// The VGA 640 x 480 timing numbers (front porch, sync, back porch) are the
// industry-standard 640 x 480 @ 60 Hz values; only the 640 x 480 resolution
// and the 25 MHz pixel rate come from the adapter's specification.
package mva_pkg;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  localparam int unsigned NUM_MON = 4;  // quad output: two columns, two rows

  // 640 x 480 @ 60 Hz, 25 MHz pixel clock (800 x 525 total)
  localparam int unsigned H_ACTIVE_D = 640;
  localparam int unsigned H_FP_D     = 16;
  localparam int unsigned H_SYNC_D   = 96;
  localparam int unsigned H_BP_D     = 48;
  localparam int unsigned V_ACTIVE_D = 480;
  localparam int unsigned V_FP_D     = 10;
  localparam int unsigned V_SYNC_D   = 2;
  localparam int unsigned V_BP_D     = 33;

  // Average of two pixels, channel by channel, rounding halves up.
  function automatic rgb_t rgb_avg(rgb_t a, rgb_t b);
    rgb_t    o;
    logic [8:0] s;
    s = {1'b0, a.r} + {1'b0, b.r} + 9'd1; o.r = s[8:1];
    s = {1'b0, a.g} + {1'b0, b.g} + 9'd1; o.g = s[8:1];
    s = {1'b0, a.b} + {1'b0, b.b} + 9'd1; o.b = s[8:1];
    return o;
  endfunction

  // 3-bit colour: one bit per channel, the channel's most significant bit.
  function automatic logic [2:0] rgb_to_3bit(rgb_t p);
    return {p.r[7], p.g[7], p.b[7]};
  endfunction

endpackage

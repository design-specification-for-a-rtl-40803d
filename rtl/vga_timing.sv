// vga_timing: one sync generator shared by all four monitor outputs.
//
// Because a single pair of counters times every output, the four monitors get
// HSYNC and VSYNC of identical frequency and zero phase difference, which is
// what the adapter requires to show the four quarters as one picture.
// The counters advance once per pixel period, marked by pix_en (the system
// clock runs at four times the pixel rate, see mva_top). hcount/vcount give
// the current position, 0..H_TOTAL-1 and 0..V_TOTAL-1; active is high inside
// the 640 x 480 visible area. Sync pulses are active low by default
// (SYNC_ACTIVE_HIGH = 0), as for standard 640 x 480 @ 60 Hz; porch and sync
// lengths are the standard values, the specification gives only the
// resolution and the 25 MHz pixel rate. Outputs are combinational from the
// counter registers.
module vga_timing
  import mva_pkg::*;
#(
  parameter int unsigned H_ACTIVE = H_ACTIVE_D,
  parameter int unsigned H_FP     = H_FP_D,
  parameter int unsigned H_SYNC   = H_SYNC_D,
  parameter int unsigned H_BP     = H_BP_D,
  parameter int unsigned V_ACTIVE = V_ACTIVE_D,
  parameter int unsigned V_FP     = V_FP_D,
  parameter int unsigned V_SYNC   = V_SYNC_D,
  parameter int unsigned V_BP     = V_BP_D,
  parameter bit          SYNC_ACTIVE_HIGH = 1'b0,
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP,
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP,
  localparam int unsigned HW = $clog2(H_TOTAL),
  localparam int unsigned VW = $clog2(V_TOTAL)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pix_en,
  output logic [HW-1:0] hcount,
  output logic [VW-1:0] vcount,
  output logic          hsync,
  output logic          vsync,
  output logic          active,
  output logic          line_end,   // last pixel period of a line
  output logic          frame_end   // last pixel period of a frame
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcount <= '0;
      vcount <= '0;
    end else if (pix_en) begin
      if (line_end) begin
        hcount <= '0;
        vcount <= frame_end ? '0 : vcount + 1'b1;
      end else begin
        hcount <= hcount + 1'b1;
      end
    end
  end

  logic hs_pulse, vs_pulse;
  always_comb begin
    line_end  = (hcount == HW'(H_TOTAL - 1));
    frame_end = line_end && (vcount == VW'(V_TOTAL - 1));
    active    = (hcount < HW'(H_ACTIVE)) && (vcount < VW'(V_ACTIVE));
    hs_pulse  = (hcount >= HW'(H_ACTIVE + H_FP)) && (hcount < HW'(H_ACTIVE + H_FP + H_SYNC));
    vs_pulse  = (vcount >= VW'(V_ACTIVE + V_FP)) && (vcount < VW'(V_ACTIVE + V_FP + V_SYNC));
    hsync     = SYNC_ACTIVE_HIGH ? hs_pulse : ~hs_pulse;
    vsync     = SYNC_ACTIVE_HIGH ? vs_pulse : ~vs_pulse;
  end

endmodule

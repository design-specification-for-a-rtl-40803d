// pixel_interp: output pixel of one monitor, with averaging when enlarged.
//
// At normal size each fetched SRAM word is the output pixel. When the image
// is enlarged two times, the gaps between the source pixels are filled by
// averaging neighbouring pixels, as the specification asks: an output pixel
// in an odd column is the mean of the two source pixels left and right of
// it, and one in an odd row the mean of the horizontally averaged lines above
// and below it (so a pixel in an odd row and odd column is the mean of four
// source pixels, rounded per stage). The source line above is kept in a line
// buffer of H_ACTIVE pixels written on even rows; the previous fetch is kept
// in a register. Which rows and columns are odd, and the column index, come
// with each fetch from the SRAM controller; outside the image the output is
// black (the specification does not name a background colour).
//
// Timing: a fetch presented with in_valid is registered (stage 1, line
// buffer read issued), and the pixel appears on out_pix after the next clock
// (stage 2), where it stays until the next fetch of this monitor.
module pixel_interp
  import mva_pkg::*;
#(
  parameter int unsigned H_ACTIVE = H_ACTIVE_D,
  localparam int unsigned CLW = $clog2(H_ACTIVE)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  rgb_t           in_pix,
  input  logic           in_inside,
  input  logic           in_odd_x,
  input  logic           in_odd_y,
  input  logic           in_store,
  input  logic           in_col_ok,
  input  logic [CLW-1:0] in_col,
  output rgb_t           out_pix
);

  rgb_t line_buf [H_ACTIVE];
  rgb_t prev_pix, hsum, hsum_q, lb_q;
  logic s1_valid, s1_inside, s1_odd_y;

  assign hsum = in_odd_x ? rgb_avg(prev_pix, in_pix) : in_pix;

  // stage 1: horizontal average, line buffer access
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_pix  <= '0;
      hsum_q    <= '0;
      s1_valid  <= 1'b0;
      s1_inside <= 1'b0;
      s1_odd_y  <= 1'b0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) begin
        prev_pix  <= in_pix;
        hsum_q    <= hsum;
        s1_inside <= in_inside;
        s1_odd_y  <= in_odd_y;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_col_ok) begin
      lb_q <= line_buf[in_col];
      if (in_store) line_buf[in_col] <= hsum;
    end
  end

  // stage 2: vertical average
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_pix <= '0;
    end else if (s1_valid) begin
      if (!s1_inside)    out_pix <= '0;
      else if (s1_odd_y) out_pix <= rgb_avg(lb_q, hsum_q);
      else               out_pix <= hsum_q;
    end
  end

endmodule

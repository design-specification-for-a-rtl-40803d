// eeprom_model: behavioural model of the image EEPROM (parallel, read only).
//
// It holds NUM_IMG images of IMG_W x IMG_H pixels, stored one after the other,
// row by row, with the colours of mva_tb_pkg::img_pix. The output is only
// valid from the ACCESS-th clock cycle after an address change (ACCESS >= 2) and while
// rd is high; before that it shows a junk value, so a reader that samples too
// early sees wrong data.
module eeprom_model
  import mva_pkg::*;
  import mva_tb_pkg::*;
#(
  parameter int unsigned IMG_W   = 640,
  parameter int unsigned IMG_H   = 480,
  parameter int unsigned NUM_IMG = 2,
  parameter int unsigned ACCESS  = 4,
  parameter int unsigned AW      = 20
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          rd,
  output rgb_t          data
);
  logic [AW-1:0] last;
  int unsigned   stable = 0;

  always_ff @(posedge clk) begin
    last <= addr;
    if (addr != last) stable <= 0;
    else if (stable < 1000) stable <= stable + 1;
  end

  always_comb begin
    int a;
    a = int'(addr);
    if (rd && addr == last && stable + 2 >= ACCESS && a < int'(NUM_IMG * IMG_W * IMG_H))
      data = img_pix(a / (IMG_W * IMG_H), (a % (IMG_W * IMG_H)) % IMG_W, (a % (IMG_W * IMG_H)) / IMG_W);
    else
      data = 24'hA5A5A5;
  end
endmodule

// ramdac_ctrl: start-up programming of the RAMDACs over their MPU port.
//
// In the 24-bit output the FPGA drives an ADV473 RAMDAC per monitor with
// 8-bit red, green and blue, and the RAMDAC's palette RAMs sit between those
// inputs and its DACs. For true colour every palette entry must map a value
// to itself, so after reset this controller writes the pixel read mask
// (all ones) and then loads the 256 palette entries with red = green =
// blue = index, using the address register's auto-increment (three writes,
// red, green, blue, per entry). The four RAMDACs share this bus and are
// programmed together. The register-select codes (RS2..RS0: 000 address
// write, 001 colour palette, 010 pixel read mask) are those of the
// Bt471/ADV47x family; the specification only says that the FPGA controls
// and programs the RAMDAC.
// Timing: each write holds rs/d for SETUP cycles, pulls wr_n low for
// WR_LOW cycles, then holds rs/d for HOLD cycles after wr_n rises. rd_n stays
// high. done rises after the last write (770 writes).
module ramdac_ctrl #(
  parameter int unsigned SETUP  = 2,
  parameter int unsigned WR_LOW = 8,
  parameter int unsigned HOLD   = 2,
  localparam int unsigned PHASE = SETUP + WR_LOW + HOLD,
  localparam int unsigned PW    = $clog2(PHASE + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [2:0] rs,
  output logic [7:0] d,
  output logic       wr_n,
  output logic       rd_n,
  output logic       done
);

  localparam logic [2:0] RS_ADDR_WR = 3'b000;
  localparam logic [2:0] RS_PALETTE = 3'b001;
  localparam logic [2:0] RS_MASK    = 3'b010;

  // write index: 0 = mask, 1 = address, 2.. = palette data (3 per entry)
  localparam int unsigned N_WRITES = 2 + 3 * 256;
  localparam int unsigned NW = $clog2(N_WRITES + 1);

  logic [NW-1:0] widx;
  logic [PW-1:0] phase;
  logic [NW-1:0] pal;
  logic [7:0]    entry;

  always_comb begin
    pal   = widx - NW'(2);
    entry = 8'(pal / NW'(3));
    if (widx == '0) begin
      rs = RS_MASK;
      d  = 8'hFF;
    end else if (widx == NW'(1)) begin
      rs = RS_ADDR_WR;
      d  = 8'h00;
    end else begin
      rs = RS_PALETTE;
      d  = entry;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      widx  <= '0;
      phase <= '0;
      wr_n  <= 1'b1;
      done  <= 1'b0;
    end else if (!done) begin
      if (phase == PW'(PHASE - 1)) begin
        phase <= '0;
        if (widx == NW'(N_WRITES - 1)) done <= 1'b1;
        else                            widx <= widx + 1'b1;
      end else begin
        phase <= phase + 1'b1;
      end
      wr_n <= !((phase >= PW'(SETUP - 1)) && (phase < PW'(SETUP + WR_LOW - 1)));
    end
  end

  assign rd_n = 1'b1;

  // MPU bus rule: register select and data hold still while wr_n is low
  a_bus_stable: assert property (@(posedge clk) disable iff (!rst_n)
    !wr_n && $past(!wr_n) |-> $stable(rs) && $stable(d));

endmodule

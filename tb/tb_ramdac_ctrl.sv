// tb_ramdac_ctrl: checks the RAMDAC programming sequence.
//
// A model of the RAMDAC's MPU port (address register with auto-increment
// after each red, green, blue triple, colour palette, pixel read mask)
// captures every write on the rising edge of wr_n. The testbench checks that
// rs and d do not change while wr_n is low, that each wr_n pulse is WR_LOW
// cycles, that rd_n stays high, and at the end that the mask is FF, the
// palette maps every index to itself in all three colours and 770 writes
// were made.
module tb_ramdac_ctrl;
  localparam int SETUP = 2, WR_LOW = 5, HOLD = 1;

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

  logic [2:0] rs;
  logic [7:0] d;
  logic wr_n, rd_n, done;

  ramdac_ctrl #(.SETUP(SETUP), .WR_LOW(WR_LOW), .HOLD(HOLD)) dut (
    .clk, .rst_n, .rs, .d, .wr_n, .rd_n, .done);

  // MPU port model
  logic [7:0] pal [256][3];
  logic [7:0] addr_reg = 0, mask = 0;
  int sub = 0, writes = 0, low_len = 0;
  logic [2:0] rs_l;
  logic [7:0] d_l;
  logic wr_n_d = 1;

  initial for (int i = 0; i < 256; i++) for (int c = 0; c < 3; c++) pal[i][c] = 8'hEE;

  always @(posedge clk) if (rst_n) begin
    wr_n_d <= wr_n;
    if (!wr_n) begin
      if (!wr_n_d) check(rs == rs_l && d == d_l, "rs/d stable while wr_n low");
      rs_l <= rs; d_l <= d;
      low_len <= low_len + 1;
    end
    if (wr_n && !wr_n_d) begin
      check(low_len == WR_LOW, $sformatf("wr_n low for %0d cycles", low_len));
      low_len <= 0;
      writes <= writes + 1;
      case (rs_l)
        3'b000: begin addr_reg <= d_l; sub <= 0; end
        3'b001: begin
          pal[addr_reg][sub] <= d_l;
          if (sub == 2) begin sub <= 0; addr_reg <= addr_reg + 1; end
          else sub <= sub + 1;
        end
        3'b010: mask <= d_l;
        default: check(0, "unexpected register select");
      endcase
    end
    check(rd_n, "rd_n high");
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!done) @(posedge clk);
    repeat (5) @(posedge clk);
    check(mask == 8'hFF, "pixel read mask");
    check(writes == 770, $sformatf("%0d writes", writes));
    bad = 0;
    for (int i = 0; i < 256; i++)
      for (int c = 0; c < 3; c++) begin
        check(pal[i][c] == 8'(i), $sformatf("palette %0d colour %0d = %h", i, c, pal[i][c]));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

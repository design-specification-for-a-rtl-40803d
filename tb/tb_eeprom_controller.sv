// tb_eeprom_controller: checks the start-up copy from EEPROM to SRAM.
//
// The EEPROM model only gives valid data after ACCESS stable cycles, so
// sampling too early shows up as wrong data. The testbench checks that the
// writes cover addresses 0..WORDS-1 in order with the EEPROM's words, that
// the read strobe stays 1 until the final address and then drops, that done
// rises after exactly WORDS * (ROM_WAIT + 1) cycles, and that nothing is
// written afterwards.
module tb_eeprom_controller;
  import mva_pkg::*;
  import mva_tb_pkg::*;
  localparam int W = 5, H = 4, N = 2, WORDS = N * W * H, WAIT = 3;
  localparam int AW = $clog2(WORDS);

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

  logic [AW-1:0] rom_addr, wr_addr;
  logic rom_rd, wr_en, done;
  rgb_t rom_data;
  logic [23:0] wr_data;

  eeprom_model #(.IMG_W(W), .IMG_H(H), .NUM_IMG(N), .ACCESS(WAIT), .AW(AW)) u_rom (
    .clk, .addr(rom_addr), .rd(rom_rd), .data(rom_data));

  eeprom_controller #(.WORDS(WORDS), .DATA_W(24), .ROM_WAIT(WAIT)) dut (
    .clk, .rst_n, .rom_addr, .rom_rd, .rom_data, .wr_en, .wr_addr, .wr_data, .done);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, cyc, a;
    rgb_t exp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    n = 0; cyc = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (!done) check(rom_rd, "read strobe high while copying");
      if (wr_en) begin
        a = n;
        exp = img_pix(a / (W * H), (a % (W * H)) % W, (a % (W * H)) / W);
        check(wr_addr == AW'(a), $sformatf("write %0d at address %0d", n, wr_addr));
        check(wr_data == exp, $sformatf("data at %0d: %h expected %h", a, wr_data, exp));
        n++;
      end
    end
    check(n == WORDS, $sformatf("%0d words written", n));
    check(cyc == WORDS * (WAIT + 1), $sformatf("done after %0d cycles, expected %0d", cyc, WORDS * (WAIT + 1)));
    repeat (20) begin
      @(negedge clk);
      check(!wr_en && !rom_rd && done, "idle after the final address");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

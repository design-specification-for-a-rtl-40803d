// tb_vga_timing: checks the shared sync generator.
//
// A small-format instance (pixel enable every cycle) is checked period by
// period against counters kept by the testbench: position, active area and
// both sync pulses. A default-format instance is run for one whole frame to
// check 800 x 525 pixel periods per frame (59.5 Hz at 25 MHz) with 640 x 480
// active pixels, 96-period HSYNC and 2-line VSYNC pulses.
module tb_vga_timing;
  localparam int HA = 16, HF = 2, HS = 3, HB = 4, VA = 8, VF = 1, VS = 2, VB = 3;
  localparam int HT = HA + HF + HS + HB, VT = VA + VF + VS + VB;

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

  logic [$clog2(HT)-1:0] hc;
  logic [$clog2(VT)-1:0] vc;
  logic hs, vs, act, le, fe;

  vga_timing #(.H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
               .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB)) dut_s (
    .clk, .rst_n, .pix_en(1'b1), .hcount(hc), .vcount(vc), .hsync(hs), .vsync(vs),
    .active(act), .line_end(le), .frame_end(fe));

  logic [9:0] hc_d;
  logic [9:0] vc_d;
  logic hs_d, vs_d, act_d, le_d, fe_d;
  vga_timing dut_d (.clk, .rst_n, .pix_en(1'b1), .hcount(hc_d), .vcount(vc_d), .hsync(hs_d),
                    .vsync(vs_d), .active(act_d), .line_end(le_d), .frame_end(fe_d));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int eh, ev, n_act, n_hs, n_vs_lines, n_fe;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(hc == 1 && vc == 0, "counting starts from 0 after reset");
    while (!fe) @(negedge clk);
    // small format: two frames, period by period
    eh = 0; ev = 0;
    for (int i = 0; i < 2 * HT * VT; i++) begin
      @(negedge clk);
      check(hc == eh && vc == ev, $sformatf("position %0d,%0d expected %0d,%0d", hc, vc, eh, ev));
      check(act == (eh < HA && ev < VA), "active");
      check(hs == !(eh >= HA + HF && eh < HA + HF + HS), "hsync");
      check(vs == !(ev >= VA + VF && ev < VA + VF + VS), "vsync");
      check(le == (eh == HT - 1), "line_end");
      check(fe == (eh == HT - 1 && ev == VT - 1), "frame_end");
      eh++;
      if (eh == HT) begin eh = 0; ev = (ev + 1) % VT; end
    end
    // default format: one frame from a frame boundary
    while (!fe_d) @(negedge clk);
    @(negedge clk);
    n_act = 0; n_hs = 0; n_vs_lines = 0; n_fe = 0;
    for (int i = 0; i < 800 * 525; i++) begin
      if (i == 0) check(hc_d == 0 && vc_d == 0, "default frame starts at 0,0");
      n_act += act_d;
      n_hs  += !hs_d;
      if (hc_d == 0) n_vs_lines += !vs_d;
      n_fe  += fe_d;
      if (i == 800 * 525 - 1) check(fe_d, "default frame is 800 x 525 periods");
      @(negedge clk);
    end
    check(n_act == 640 * 480, $sformatf("active pixels %0d", n_act));
    check(n_hs == 96 * 525, $sformatf("hsync periods %0d", n_hs));
    check(n_vs_lines == 2, $sformatf("vsync lines %0d", n_vs_lines));
    check(n_fe == 1, "one frame end per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

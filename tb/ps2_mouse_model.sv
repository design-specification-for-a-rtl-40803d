// ps2_mouse_model: behavioural model of a PS/2 mouse, the device end of the
// two open-collector lines.
//
// clk_line/data_line are the wired-AND line levels; the model pulls a line
// low with its own clk_pull/data_pull. It generates the PS/2 clock with a
// half period of HALF system clock cycles. A host request (clock held low,
// then data low and clock released) makes it clock in a byte, check its
// parity and stop bit, acknowledge it, and record it in last_cmd/n_cmds. If
// ignore_cmds is non-zero it ignores that many commands (no reply);
// otherwise it answers a command with 0xFA. send_byte() sends a
// device-to-host frame; send_packet() sends a three-byte movement packet.
module ps2_mouse_model #(
  parameter int HALF = 20
) (
  input  logic clk,
  input  logic clk_line,
  input  logic data_line,
  output logic clk_pull,
  output logic data_pull
);
  int         n_cmds = 0;
  int         n_bad_cmds = 0;
  int         ignore_cmds = 0;
  logic [7:0] last_cmd = 0;
  bit         busy = 0;

  initial begin
    clk_pull  = 0;
    data_pull = 0;
  end

  task automatic wait_cycles(int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic send_byte(logic [7:0] b);
    logic [10:0] frame;
    wait (!busy);
    busy = 1;
    frame = {1'b1, ~^b, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      data_pull = !frame[i];
      wait_cycles(HALF / 2);
      clk_pull = 1;
      wait_cycles(HALF);
      clk_pull = 0;
      wait_cycles(HALF / 2);
    end
    data_pull = 0;
    wait_cycles(2 * HALF);
    busy = 0;
  endtask

  task automatic send_packet(bit left, bit right, int dx, int dy);
    logic [8:0] x, y;
    x = 9'(dx); y = 9'(dy);
    send_byte({2'b00, y[8], x[8], 1'b1, 1'b0, right, left});
    send_byte(x[7:0]);
    send_byte(y[7:0]);
  endtask

  // host-to-device commands
  initial begin
    logic [10:0] bits;
    forever begin
      // request: clock low for a while, then clock released with data low
      @(negedge clk_line);
      if (clk_pull) continue;
      wait (clk_line);
      if (data_line) continue;
      busy = 1;
      wait_cycles(HALF);
      for (int i = 0; i < 10; i++) begin
        clk_pull = 1;
        wait_cycles(HALF);
        clk_pull = 0;
        wait_cycles(HALF / 2);
        bits[i] = data_line;          // data bits, parity, stop
        wait_cycles(HALF / 2);
      end
      data_pull = 1;                  // acknowledge
      clk_pull = 1;
      wait_cycles(HALF);
      clk_pull = 0;
      wait_cycles(HALF / 2);
      data_pull = 0;
      wait_cycles(HALF);
      busy = 0;
      if (bits[9] && (^bits[8:0]) == 1'b1) begin
        last_cmd = bits[7:0];
        n_cmds++;
        if (ignore_cmds > 0) ignore_cmds--;
        else send_byte(8'hFA);
      end else begin
        n_bad_cmds++;
      end
    end
  end
endmodule

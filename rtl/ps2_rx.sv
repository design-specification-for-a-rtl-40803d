// ps2_rx: receiver for one byte frame from a PS/2 device.
//
// A device-to-host frame is 11 bits: a 0 start bit, eight data bits least
// significant first, an odd parity bit and a 1 stop bit; the device changes
// the data line while its clock is high and the host samples it on the
// falling edge of the clock. ps2_clk/ps2_data must already be synchronised
// to clk (mouse_driver does this). When the stop bit arrives, rx_valid pulses
// for one cycle with rx_data if start, parity and stop were right, otherwise
// rx_err pulses. A frame that stalls for TIMEOUT cycles is dropped, so the
// receiver realigns after a glitch. While enable is low (the host is sending)
// the receiver stays idle.
module ps2_rx #(
  parameter int unsigned TIMEOUT = 20000,  // 200 us at 100 MHz
  localparam int unsigned TW = $clog2(TIMEOUT + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       ps2_clk,
  input  logic       ps2_data,
  output logic       rx_valid,
  output logic [7:0] rx_data,
  output logic       rx_err
);

  logic        clk_d;
  logic [3:0]  bit_cnt;
  logic [8:0]  shreg;   // data and parity bits, newest at the top
  logic [TW-1:0] idle;
  logic        fall;

  assign fall = clk_d && !ps2_clk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_d    <= 1'b1;
      bit_cnt  <= '0;
      shreg    <= '0;
      idle     <= '0;
      rx_valid <= 1'b0;
      rx_data  <= '0;
      rx_err   <= 1'b0;
    end else begin
      clk_d    <= ps2_clk;
      rx_valid <= 1'b0;
      rx_err   <= 1'b0;
      if (!enable) begin
        bit_cnt <= '0;
        idle    <= '0;
      end else if (fall) begin
        idle <= '0;
        if (bit_cnt == 4'd0) begin
          // start bit must be 0, otherwise stay idle
          if (!ps2_data) bit_cnt <= 4'd1;
        end else if (bit_cnt == 4'd10) begin
          bit_cnt <= '0;
          // shreg[7:0] = data, shreg[8] = parity, ps2_data = stop
          if (ps2_data && (^shreg) == 1'b1) begin
            rx_valid <= 1'b1;
            rx_data  <= shreg[7:0];
          end else begin
            rx_err <= 1'b1;
          end
        end else begin
          bit_cnt <= bit_cnt + 1'b1;
        end
        if (bit_cnt != 4'd0 && bit_cnt != 4'd10) shreg <= {ps2_data, shreg[8:1]};
      end else if (bit_cnt != 4'd0) begin
        if (idle == TW'(TIMEOUT)) begin
          bit_cnt <= '0;
          idle    <= '0;
        end else begin
          idle <= idle + 1'b1;
        end
      end
    end
  end

endmodule

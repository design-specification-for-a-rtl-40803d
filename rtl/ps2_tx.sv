// ps2_tx: host-to-device byte transmitter for a PS/2 port.
//
// Both PS/2 lines are open collector: clk_oe/data_oe high means the FPGA pulls
// the line low, low means it releases the line (pulled up outside). A send
// follows the PS/2 host-to-device protocol: the host holds the clock low for
// INHIBIT cycles (at least 100 us), pulls data low as the start bit and
// releases the clock; the device then clocks the frame, and after each
// falling edge of its clock the host presents the next bit: eight data bits
// least significant first, odd parity, then it releases data for the stop
// bit. On the 11th falling edge the device acknowledges by pulling data low.
// done pulses when the device has released both lines after a good
// acknowledge; err pulses instead if the acknowledge was missing.
// ps2_clk/ps2_data are the synchronised line levels.
module ps2_tx #(
  parameter int unsigned INHIBIT = 10000,  // 100 us at 100 MHz
  localparam int unsigned IW = $clog2(INHIBIT + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] tx_data,
  input  logic       ps2_clk,
  input  logic       ps2_data,
  output logic       clk_oe,
  output logic       data_oe,
  output logic       busy,
  output logic       done,
  output logic       err
);

  typedef enum logic [2:0] {T_IDLE, T_INHIBIT, T_SHIFT, T_ACK, T_RELEASE} state_t;
  state_t        state;
  logic [IW-1:0] cnt;
  logic [3:0]    edge_cnt;
  logic [8:0]    frame;   // data bits then parity
  logic          clk_d, fall;

  assign fall = clk_d && !ps2_clk;
  assign busy = (state != T_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= T_IDLE;
      cnt      <= '0;
      edge_cnt <= '0;
      frame    <= '0;
      clk_d    <= 1'b1;
      clk_oe   <= 1'b0;
      data_oe  <= 1'b0;
      done     <= 1'b0;
      err      <= 1'b0;
    end else begin
      clk_d <= ps2_clk;
      done  <= 1'b0;
      err   <= 1'b0;
      unique case (state)
        T_IDLE: begin
          if (start) begin
            frame    <= {~^tx_data, tx_data};
            cnt      <= '0;
            edge_cnt <= '0;
            clk_oe   <= 1'b1;
            state    <= T_INHIBIT;
          end
        end
        T_INHIBIT: begin
          if (cnt == IW'(INHIBIT)) begin
            data_oe <= 1'b1;         // start bit
            clk_oe  <= 1'b0;         // hand the clock to the device
            state   <= T_SHIFT;
          end else begin
            cnt <= cnt + 1'b1;
            if (cnt == IW'(INHIBIT - 1)) data_oe <= 1'b1;
          end
        end
        T_SHIFT: begin
          if (fall) begin
            edge_cnt <= edge_cnt + 1'b1;
            if (edge_cnt < 4'd9) begin
              data_oe <= ~frame[0];
              frame   <= {1'b1, frame[8:1]};
            end else begin
              data_oe <= 1'b0;       // stop bit: release data
              state   <= T_ACK;
            end
          end
        end
        T_ACK: begin
          if (fall) begin
            if (!ps2_data) begin
              state <= T_RELEASE;
            end else begin
              err   <= 1'b1;
              state <= T_IDLE;
            end
          end
        end
        default: begin  // T_RELEASE
          if (ps2_clk && ps2_data) begin
            done  <= 1'b1;
            state <= T_IDLE;
          end
        end
      endcase
    end
  end

  // the host only pulls the clock low to request a send
  a_clk_only_inhibit: assert property (@(posedge clk) disable iff (!rst_n)
    clk_oe |-> state == T_INHIBIT);
  a_idle_released: assert property (@(posedge clk) disable iff (!rst_n)
    state == T_IDLE |-> !clk_oe && !data_oe);

endmodule

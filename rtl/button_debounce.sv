// button_debounce: debounce a mouse button and turn a press into one click.
//
// The reported button level is accepted only after it has stayed the same
// for STABLE cycles, so a button whose report flickers while it is held
// counts as one click. press pulses for one cycle when the accepted level
// goes from released to pressed. The filter time is this design's choice
// (20 ms at 100 MHz by default).
module button_debounce #(
  parameter int unsigned STABLE = 2000000,
  localparam int unsigned SW = $clog2(STABLE + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic raw,
  output logic level,
  output logic press
);

  logic [SW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      level <= 1'b0;
      press <= 1'b0;
    end else begin
      press <= 1'b0;
      if (raw == level) begin
        cnt <= '0;
      end else if (cnt == SW'(STABLE - 1)) begin
        cnt   <= '0;
        level <= raw;
        press <= raw;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule

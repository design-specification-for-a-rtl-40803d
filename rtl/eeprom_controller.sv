// eeprom_controller: start-up copy of the stored images from EEPROM to SRAM.
//
// The EEPROM is too slow to be read at the pixel rate, so after reset this
// controller reads it word by word and writes each word to the same address
// of the SRAM. As the specification describes it, the address starts from
// zero and counts to the final memory address, and the EEPROM read strobe
// (rom_rd) stays 1 until the final address is reached; then done rises and
// stays high until the next reset.
// Timing: the address is held for ROM_WAIT clock cycles (the EEPROM access
// time; 15 cycles = 150 ns at 100 MHz is an assumed figure) before rom_data is sampled; the sampled word is
// presented on wr_addr/wr_data with wr_en high for one cycle. One word takes
// ROM_WAIT + 1 cycles.
module eeprom_controller #(
  parameter int unsigned WORDS    = 614400,  // two 640 x 480 images
  parameter int unsigned DATA_W   = 24,
  parameter int unsigned ROM_WAIT = 15,  // 150 ns at 100 MHz
  localparam int unsigned AW = $clog2(WORDS),
  localparam int unsigned CW = $clog2(ROM_WAIT + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [AW-1:0]     rom_addr,
  output logic              rom_rd,
  input  logic [DATA_W-1:0] rom_data,
  output logic              wr_en,
  output logic [AW-1:0]     wr_addr,
  output logic [DATA_W-1:0] wr_data,
  output logic              done
);

  typedef enum logic [1:0] {S_READ, S_WRITE, S_DONE} state_t;
  state_t        state;
  logic [CW-1:0] wait_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_READ;
      rom_addr <= '0;
      wait_cnt <= '0;
      wr_en    <= 1'b0;
      wr_addr  <= '0;
      wr_data  <= '0;
    end else begin
      wr_en <= 1'b0;
      unique case (state)
        S_READ: begin
          if (wait_cnt == CW'(ROM_WAIT - 1)) begin
            wait_cnt <= '0;
            wr_en    <= 1'b1;
            wr_addr  <= rom_addr;
            wr_data  <= rom_data;
            state    <= S_WRITE;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        S_WRITE: begin
          if (rom_addr == AW'(WORDS - 1)) begin
            state <= S_DONE;
          end else begin
            rom_addr <= rom_addr + 1'b1;
            state    <= S_READ;
          end
        end
        default: state <= S_DONE;
      endcase
    end
  end

  assign rom_rd = (state != S_DONE);
  assign done   = (state == S_DONE);

  // every write carries a word read with the strobe high; done is final
  a_write_while_reading: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> $past(rom_rd));
  a_done_sticks: assert property (@(posedge clk) disable iff (!rst_n)
    done |=> done && !rom_rd && !wr_en);

endmodule

// sram_model: behavioural model of the image SRAM as the FPGA sees it.
//
// Writes happen at the clock edge when we is high. A read returns the word
// at the address one clock later, which models an asynchronous SRAM whose
// output the FPGA samples in an input register.
module sram_model
  import mva_pkg::*;
#(
  parameter int unsigned WORDS = 614400,
  parameter int unsigned AW    = 20
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  rgb_t          wdata,
  output rgb_t          rdata
);
  rgb_t mem [WORDS];

  initial for (int i = 0; i < int'(WORDS); i++) mem[i] = 24'h123456;

  always_ff @(posedge clk) begin
    if (we && int'(addr) < int'(WORDS)) mem[addr] <= wdata;
    rdata <= (int'(addr) < int'(WORDS)) ? mem[addr] : 24'h0;
  end
endmodule

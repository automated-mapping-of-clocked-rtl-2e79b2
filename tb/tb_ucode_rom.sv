// tb_ucode_rom: behavioural model of a clocked microcode ROM for tests.
// Synchronous read: on a rising clk edge with en high, data takes the word
// at addr.  Contents are a fixed test pattern given by rom_word(); a real
// microcode image is not part of this design.
module tb_ucode_rom #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 54,
  parameter int unsigned DEPTH  = 160
) (
  input  logic              clk,
  input  logic              en,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);
  function automatic logic [DATA_W-1:0] rom_word(input logic [ADDR_W-1:0] a);
    logic [63:0] x;
    x = 64'(a) * 64'h9E37_79B9_7F4A_7C15 ^ 64'h0123_4567_89AB_CDEF;
    return DATA_W'(x ^ (x >> 29));
  endfunction

  initial data = '0;
  always @(posedge clk)
    if (en) data <= (int'(addr) < int'(DEPTH)) ? rom_word(addr) : '0;
endmodule

// plqdi_rom_wrapper: PL-QDI wrapper that lets a clocked synchronous ROM
// (such as a microcode store) sit inside a PL-QDI netlist.
//
// Towards the PL-QDI side the wrapper behaves like a wide barrier gate:
// after reset it shows an initial token (the dual-rail code of INIT_WORD)
// on its DATA_W outputs, it does not evaluate until its readers have
// acknowledged that token for the first time, it acknowledges its address
// word on le (active low) only when the address is complete and the output
// is valid, and it precharges its outputs when both le and re are low.
// Towards the ROM it is a plain clocked interface: when a complete dual-rail
// address has arrived (and the readers are ready, re high) it decodes the
// address to single rail and raises rom_en, the local read strobe that
// takes the place of the ROM's clock edge; the ROM answers on rom_data on
// the following edge, and the wrapper converts that word to dual rail.
//
// Timing, with all step bits high: address complete -> rom_en (1 edge) ->
// ROM read (1 edge) -> dual-rail data (1 edge).  rom_en is held until the
// wrapper's next step, so a slower step schedule only repeats the read.
// The roles of the wrapper (initial token, dual-rail conversion, feedback
// generation, strobe on input arrival) follow the wrapper description; the
// three-edge read sequence, the enable-style strobe and the reset word are
// choices of this implementation.  Defaults fit a 160 x 54-bit ROM.
//
// Expected tool notes: the asynchronous reset rst_n is also used in the
// "disable iff" of the simulation assertions, which lint reports as a
// signal used both synchronously and asynchronously.  The assertions are
// not part of the circuit.
module plqdi_rom_wrapper
  import plqdi_pkg::*;
#(
  parameter int unsigned       ADDR_W    = 8,
  parameter int unsigned       DATA_W    = 54,
  parameter logic [DATA_W-1:0] INIT_WORD = '0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    step,
  input  dr_t  [ADDR_W-1:0]       addr,
  output logic                    le,        // address acknowledge, active low
  input  logic                    re,        // data acknowledge, active low
  output dr_t  [DATA_W-1:0]       dout,
  output logic                    rom_en,    // read strobe to the clocked ROM
  output logic [ADDR_W-1:0]       rom_addr,
  input  logic [DATA_W-1:0]       rom_data
);

  typedef enum logic [1:0] {RD_IDLE, RD_STROBE, RD_CAPTURE} rd_state_e;

  rd_state_e          rd;
  logic               forced, armed;
  dr_t  [DATA_W-1:0]  q_dom;
  logic               lcd_valid, lcd_null, rcd, en;
  logic [ADDR_W-1:0]  addr_sr;

  assign en = le;

  always_comb begin
    lcd_valid = 1'b1;
    lcd_null  = 1'b1;
    for (int i = 0; i < int'(ADDR_W); i++) begin
      lcd_valid &= dr_valid(addr[i]);
      lcd_null  &= dr_null(addr[i]);
      addr_sr[i] = addr[i].t;
    end
    rcd = 1'b1;
    for (int i = 0; i < int'(DATA_W); i++) rcd &= dr_valid(q_dom[i]);
    for (int i = 0; i < int'(DATA_W); i++)
      dout[i] = forced ? dr_enc(INIT_WORD[i]) : q_dom[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd       <= RD_IDLE;
      forced   <= 1'b1;
      armed    <= 1'b0;
      q_dom    <= '0;
      le       <= 1'b1;
      rom_en   <= 1'b0;
      rom_addr <= '0;
    end else if (step) begin
      if (!re) begin
        forced <= 1'b0;
        armed  <= 1'b1;
      end
      unique case (rd)
        RD_IDLE:
          if (en && re && armed && lcd_valid && !rcd) begin
            rom_en   <= 1'b1;
            rom_addr <= addr_sr;
            rd       <= RD_STROBE;
          end else if (!en && !re) begin
            q_dom <= '0;
          end
        RD_STROBE: begin
          rom_en <= 1'b0;
          rd     <= RD_CAPTURE;
        end
        RD_CAPTURE: begin
          for (int i = 0; i < int'(DATA_W); i++) q_dom[i] <= dr_enc(rom_data[i]);
          rd <= RD_IDLE;
        end
        default: rd <= RD_IDLE;
      endcase
      if (lcd_valid && rcd)      le <= 1'b0;
      else if (lcd_null && !rcd) le <= 1'b1;
    end
  end

  a_no_read_while_forced: assert property (@(posedge clk) disable iff (!rst_n) !(forced && rom_en))
    else $error("plqdi_rom_wrapper: ROM read while the initial token is held");

endmodule

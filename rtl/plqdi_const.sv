// plqdi_const: PL-QDI constant generator (logic-1 or logic-0 source).
//
// A constant in the clocked netlist (a port tied high or low) cannot be a
// static level in a four-phase system: every reader expects a fresh valid
// word after each null.  The generator is a through gate without inputs:
// while its readers' acknowledgement Re is high it drives the valid code of
// VALUE ("10" for 1, "01" for 0), and when Re goes low it precharges to the
// null code "00".  Each transition is one register update on a rising clk
// edge with step high; reset leaves the output null, so the first word
// appears one step after reset is released.  The behaviour follows the
// constant generators of the PL-QDI library; the step model is this
// implementation's.
module plqdi_const
  import plqdi_pkg::*;
#(
  parameter bit VALUE = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic step,
  input  logic re,  // output acknowledge, active low
  output dr_t  y
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      y <= DR_NULL;
    else if (step) begin
      if (re)        y <= dr_enc(VALUE);
      else           y <= DR_NULL;
    end
  end

endmodule

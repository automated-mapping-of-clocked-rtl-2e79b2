// plqdi_celem: Muller C-element with up to four inputs.
//
// The output goes high once every input is high, goes low once every input
// is low, and otherwise keeps its value.  In a PL-QDI netlist it joins the
// active-low acknowledgements (Le) of all gates that read one signal into
// the single Re wire of the gate that drives it.  The library cell has at
// most four inputs; wider joins are built as trees (see plqdi_fbcon).
//
// The design is an evaluation-step model of self-timed logic: every
// state-holding node is a register, and one rising edge of clk is one
// opportunity for its production rule to fire.  The state is therefore a
// flip-flop, updated one step after the inputs agree.  Reset (rst_n low,
// asynchronous) loads RESET_VAL; the library resets every acknowledgement
// high, which is the initial token on each feedback wire.
module plqdi_celem #(
  parameter int unsigned N         = 2,
  parameter bit          RESET_VAL = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in,
  output logic         out
);

  initial assert (N >= 1 && N <= 4) else $error("plqdi_celem: N must be 1..4");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        out <= RESET_VAL;
    else if (&in)      out <= 1'b1;
    else if (~|in)     out <= 1'b0;
  end

endmodule

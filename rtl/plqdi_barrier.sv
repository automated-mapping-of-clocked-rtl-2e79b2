// plqdi_barrier: PL-QDI barrier gate, the replacement for a D flip-flop.
//
// A barrier gate is a PCHB buffer (output = input) with two additions that
// give it the initial marking a register needs:
//   forced token  From reset, the output shows the reset value (INIT_ONE=0:
//                 false rail "01", INIT_ONE=1: true rail "10") without any
//                 input.  The forcing latch is cleared the first time the
//                 readers acknowledge (Re low), which also drops the forced
//                 rail: that is the precharge of the initial token.
//   no initial Re token  The compute block is disconnected (an AND with an
//                 "armed" latch) from reset until that first Re low, so the
//                 gate cannot evaluate a real input into an output that
//                 still carries the forced token.
// After the first acknowledgement the gate behaves like plqdi_gate with
// FN_BUF.  The Le C-element looks only at the evaluated output, never at
// the forced token, so an input that arrives early is not acknowledged
// before it has been copied.
//
// Timing: one register per state node, updated on a rising clk edge when
// step is high (see plqdi_gate).  rst_n is the active-low global reset#.
// The forced-token and arming logic follows the barrier description of the
// PL-QDI cell; the register-per-node model and the early-input guard are
// choices of this implementation.
//
// Expected tool notes: the asynchronous reset rst_n is also used in the
// "disable iff" of the simulation assertions, which lint reports as a
// signal used both synchronously and asynchronously.  The assertions are
// not part of the circuit.
module plqdi_barrier
  import plqdi_pkg::*;
#(
  parameter bit INIT_ONE = 1'b0  // value of the token placed at reset release
) (
  input  logic clk,
  input  logic rst_n,
  input  logic step,
  input  dr_t  d,
  output logic le,     // input acknowledge, active low
  input  logic re,     // output acknowledge, active low
  output dr_t  q
);

  logic forced;  // SR latch x of region #1: initial token is being driven
  logic armed;   // SR latch of region #2: compute block connected
  dr_t  q_dom;   // dual-rail domino output of the buffer
  logic en, rcd;

  assign en  = le;
  assign rcd = q_dom.t | q_dom.f;
  assign q.t = q_dom.t | (forced &  INIT_ONE);
  assign q.f = q_dom.f | (forced & ~INIT_ONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      forced <= 1'b1;
      armed  <= 1'b0;
      q_dom  <= DR_NULL;
      le     <= 1'b1;
    end else if (step) begin
      if (!re) begin
        forced <= 1'b0;
        armed  <= 1'b1;
      end
      if (en && re && armed)  q_dom <= '{t: q_dom.t | d.t, f: q_dom.f | d.f};
      else if (!en && !re)    q_dom <= DR_NULL;
      if (dr_valid(d) && rcd)     le <= 1'b0;
      else if (dr_null(d) && !rcd) le <= 1'b1;
    end
  end

  a_q_legal: assert property (@(posedge clk) disable iff (!rst_n) !(q.t && q.f))
    else $error("plqdi_barrier: illegal 11 code on output");
  a_no_eval_while_forced: assert property (@(posedge clk) disable iff (!rst_n) !(forced && rcd))
    else $error("plqdi_barrier: evaluated while the initial token is held");

endmodule

// plqdi_gate: PL-QDI through gate, a precharged half buffer (PCHB) cell.
//
// The gate computes one of the library functions (FN) of one or two
// dual-rail inputs and talks to its neighbours with the four-phase PCHB
// handshake:
//   evaluate   en & Re : the compute block drives the output rail selected
//                        by the inputs; this is a precharged domino, so a
//                        rail once driven stays high until precharge
//   ack        LCD & RCD -> Le low   (all inputs valid and output valid)
//   precharge  !en & !Re : both output rails return low
//   release    inputs null & output null -> Le high
// en is the gate's own Le (the buffered C-element output).  The compute
// block evaluates early: an AND whose first input is 0 drives its false
// rail before the second input arrives, but Le still waits for every
// input, so forward latency is short while the backward (acknowledge) path
// stays complete.  One-input functions (BUF, INV) ignore input b in both
// the compute block and the completion detector.
//
// Timing model: each state-holding node (the two output rails and the Le
// C-element) is a register; a rising clk edge with step high is one chance
// for the gate's enabled production rules to fire, and step low holds the
// gate, which is how a test models an arbitrary gate delay.  Reset (rst_n
// low) leaves the output null and Le high, i.e. an initial token on Le and
// none on the output, as for every through gate.
//
// The PCHB template, its handshake order, the token view and the early
// evaluation follow the PL-QDI cell description; the step-based timing
// model, the register-per-node structure and the library function list
// encoding are choices of this implementation.
//
// Expected tool notes: the asynchronous reset rst_n is also used in the
// "disable iff" of the simulation assertions, which lint reports as a
// signal used both synchronously and asynchronously.  The assertions are
// not part of the circuit.
module plqdi_gate
  import plqdi_pkg::*;
#(
  parameter gate_fn_e FN = FN_AND2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic step,   // 1: production rules may fire on this edge
  input  dr_t  a,
  input  dr_t  b,      // unused when FN is FN_BUF or FN_INV
  output logic le,     // input acknowledge, active low, to the drivers of a and b
  input  logic re,     // output acknowledge, active low, from the readers of y
  output dr_t  y
);

  localparam bit UNARY = fn_is_unary(FN);

  logic en;
  logic lcd_valid, lcd_null, rcd;
  logic set_t, set_f;

  assign en = le;

  // Input completion: all used inputs valid / all used inputs null.
  assign lcd_valid = UNARY ? dr_valid(a) : (dr_valid(a) & dr_valid(b));
  assign lcd_null  = UNARY ? dr_null(a)  : (dr_null(a)  & dr_null(b));
  // Output completion.
  assign rcd = y.t | y.f;

  // Pull-down networks of the dual-rail compute block (early evaluating).
  always_comb begin
    unique case (FN)
      FN_BUF:   begin set_t = a.t;                     set_f = a.f;                     end
      FN_INV:   begin set_t = a.f;                     set_f = a.t;                     end
      FN_AND2:  begin set_t = a.t & b.t;               set_f = a.f | b.f;               end
      FN_NAND2: begin set_t = a.f | b.f;               set_f = a.t & b.t;               end
      FN_OR2:   begin set_t = a.t | b.t;               set_f = a.f & b.f;               end
      FN_NOR2:  begin set_t = a.f & b.f;               set_f = a.t | b.t;               end
      FN_XOR2:  begin set_t = (a.t & b.f) | (a.f & b.t); set_f = (a.t & b.t) | (a.f & b.f); end
      FN_XNOR2: begin set_t = (a.t & b.t) | (a.f & b.f); set_f = (a.t & b.f) | (a.f & b.t); end
      default:  begin set_t = 1'b0;                    set_f = 1'b0;                    end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y  <= DR_NULL;
      le <= 1'b1;
    end else if (step) begin
      // Output rails: domino evaluate or precharge.
      if (en && re)        y <= '{t: y.t | set_t, f: y.f | set_f};
      else if (!en && !re) y <= DR_NULL;
      // Le C-element.
      if (lcd_valid && rcd)      le <= 1'b0;
      else if (lcd_null && !rcd) le <= 1'b1;
    end
  end

  // Four-phase dual-rail rules.
  a_out_legal: assert property (@(posedge clk) disable iff (!rst_n) !(y.t && y.f))
    else $error("plqdi_gate: illegal 11 code on output");
  a_in_legal: assert property (@(posedge clk) disable iff (!rst_n)
                               !(a.t && a.f) && (UNARY || !(b.t && b.f)))
    else $error("plqdi_gate: illegal 11 code on an input");

endmodule

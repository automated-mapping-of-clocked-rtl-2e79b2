// plqdi_pkg: types and helpers shared by the PL-QDI gate library.
//
// A PL-QDI signal is a four-phase dual-rail pair: rail t high means logic 1
// ("10" as t,f), rail f high means logic 0 ("01"), both low is the null
// (spacer) code between two data words and both high is illegal.  The
// feedback wires Le/Re that close each handshake are single-rail and active
// low: a low Le says "my inputs are consumed and my output is valid".
//
// The functions below are the input/output completion detectors (LCD/RCD)
// of the gates.  The list of through-gate functions is the two-input static
// library used by the mapping flow (AND, NAND, OR, NOR, XOR, XNOR) plus the
// one-input buffer used for splitter and loop-padding gates; the inverter
// entry is a buffer whose rails are swapped, which is how an inverted
// register output (QN) is carried in dual-rail form.
package plqdi_pkg;

  typedef struct packed {
    logic t;  // true rail
    logic f;  // false rail
  } dr_t;

  localparam dr_t DR_NULL = '{t: 1'b0, f: 1'b0};
  localparam dr_t DR_ONE  = '{t: 1'b1, f: 1'b0};
  localparam dr_t DR_ZERO = '{t: 1'b0, f: 1'b1};

  typedef enum logic [2:0] {
    FN_BUF   = 3'd0,
    FN_INV   = 3'd1,
    FN_AND2  = 3'd2,
    FN_NAND2 = 3'd3,
    FN_OR2   = 3'd4,
    FN_NOR2  = 3'd5,
    FN_XOR2  = 3'd6,
    FN_XNOR2 = 3'd7
  } gate_fn_e;

  // Large netlists take their per-gate step enables from a small bundle of
  // STEP_LANES lanes: gate k of an instance with salt S listens to lane
  // (k + S) mod STEP_LANES, so random lane patterns give neighbouring gates
  // independent delays without one port bit per gate.
  localparam int unsigned STEP_LANES = 8;

  function automatic int unsigned lane(input int unsigned k, input int unsigned salt);
    return (k + salt) % STEP_LANES;
  endfunction

  // Dual-rail inversion is a swap of the two rails; it needs no gate.
  function automatic dr_t dr_inv(input dr_t s);
    return '{t: s.f, f: s.t};
  endfunction

  // Encode a single-rail bit as a valid dual-rail code.
  function automatic dr_t dr_enc(input logic v);
    return v ? DR_ONE : DR_ZERO;
  endfunction

  // A code word is valid when exactly one rail is high.
  function automatic logic dr_valid(input dr_t s);
    return s.t ^ s.f;
  endfunction

  function automatic logic dr_null(input dr_t s);
    return ~s.t & ~s.f;
  endfunction

  // True for one-input functions: the second input is ignored.
  function automatic logic fn_is_unary(input gate_fn_e fn);
    return (fn == FN_BUF) || (fn == FN_INV);
  endfunction

endpackage

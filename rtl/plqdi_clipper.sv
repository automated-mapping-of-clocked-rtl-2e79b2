// plqdi_clipper: non-pipelined floating-point clipper (W = 64 bits) as a
// PL-QDI gate netlist.  A stream of IEEE-754 double values enters on din;
// after two words that set the lower and upper bound, every input value x
// leaves as min(max(x, lo), hi).
//
// Clocked design that is mapped (one word of din per clock):
//   state LOAD_LO (0): lo <= din                     -> LOAD_HI
//   state LOAD_HI (1): hi <= din                     -> CMP_LO
//   state CMP_LO  (2): t  <= (din < lo) ? lo : din   -> CMP_HI
//   state CMP_HI  (3): t  <= (hi < t)  ? hi : t      -> CMP_LO
//   dout = t
// so a value sent in a CMP_LO word appears clipped on dout two words
// later, and the din word of a CMP_HI cycle is ignored.  One comparator is
// shared by the two compare states: its operands are X = is_lo ? din : t
// and Y = is_lo ? lo : hi, sel = X < Y, and the result is
// pick ? Y : X with pick = XNOR(sel, is_lo) (the larger value in CMP_LO,
// the smaller in CMP_HI).  Every register has a hold multiplexer
// (lo <= ld_lo ? din : lo, and so on), since every barrier fires once per
// word.
//
// PL-QDI mapping: the registers lo, hi, t and the two state bits are
// plqdi_barrier cells resetting to 0 tokens; the multiplexers
// (plqdi_wmux), the comparator (plqdi_fpcmp) and the state decoder are
// plqdi_gate cells; the next-state paths of the state bits (inverter /
// OR, two-gate loops) each get a buffer gate; every signal with several
// readers has a C-element or a plqdi_fbcon tree joining their Le wires.
//
// Interface: din (W dual-rail bits) with the single active-low
// acknowledge din_ack (join of all 3W readers); dout = t with the single
// active-low acknowledge dout_re from the environment.  Word n on dout is
// the clocked design's output after n clocks (word 0 is the reset value
// 0).  step holds the gate-delay lanes (see plqdi_pkg::lane).
//
// The clipper's function, its four-state control (two load states, two
// compute states) and the datapath-plus-FSM structure follow the design
// description; the state order, the shared-comparator datapath, the hold
// multiplexers and the gate-level comparator are this implementation's.
module plqdi_clipper
  import plqdi_pkg::*;
#(
  parameter int unsigned W = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [STEP_LANES-1:0] step,
  input  dr_t  [W-1:0]          din,
  output logic                  din_ack,
  output dr_t  [W-1:0]          dout,
  input  logic                  dout_re
);

  // Registers (barrier outputs) and their next values.
  dr_t  [W-1:0] lo, hi, t, lo_n, hi_n, t_n;
  logic [W-1:0] lo_le, hi_le, t_le;
  logic [W-1:0] lo_re, hi_re, t_re;

  // Datapath words.
  dr_t  [W-1:0] xw, yw, res;
  logic [W-1:0] xw_re, yw_re;

  // Multiplexer acknowledges.
  logic [W-1:0] mx_a_le, mx_b_le, my_a_le, my_b_le, mr_a_le, mr_b_le;
  logic [W-1:0] mt_a_le, mt_b_le, ml_a_le, ml_b_le, mh_a_le, mh_b_le;
  logic         mx_s_le, my_s_le, mr_s_le, mt_s_le, ml_s_le, mh_s_le;
  logic [W-1:0] cx_le, cy_le;

  // Control.
  dr_t  s0, s1, ns0, ns1, ns0_b, ns1_b, ld_lo, ld_hi, is_lo, sel, pick;
  logic s0_le, s1_le, ns0_le, ns1_le, ns0b_le, ns1b_le;
  logic ldlo_le, ldhi_le, islo_le, pick_le, sel_re, islo_re, s0_re, s1_re;

  assign dout = t;

  // ---------------- state machine ----------------
  plqdi_barrier #(.INIT_ONE(1'b0)) u_s0 (.clk, .rst_n, .step(step[0]), .d(ns0_b), .le(s0_le), .re(s0_re), .q(s0));
  plqdi_barrier #(.INIT_ONE(1'b0)) u_s1 (.clk, .rst_n, .step(step[1]), .d(ns1_b), .le(s1_le), .re(s1_re), .q(s1));
  // s0' = ~s0 ; s1' = s1 | s0
  plqdi_gate #(.FN(FN_INV)) u_ns0  (.clk, .rst_n, .step(step[2]), .a(s0), .b(DR_NULL), .le(ns0_le), .re(ns0b_le), .y(ns0));
  plqdi_gate #(.FN(FN_BUF)) u_ns0b (.clk, .rst_n, .step(step[3]), .a(ns0), .b(DR_NULL), .le(ns0b_le), .re(s0_le), .y(ns0_b));
  plqdi_gate #(.FN(FN_OR2)) u_ns1  (.clk, .rst_n, .step(step[4]), .a(s1), .b(s0), .le(ns1_le), .re(ns1b_le), .y(ns1));
  plqdi_gate #(.FN(FN_BUF)) u_ns1b (.clk, .rst_n, .step(step[5]), .a(ns1), .b(DR_NULL), .le(ns1b_le), .re(s1_le), .y(ns1_b));
  // Decoder.
  plqdi_gate #(.FN(FN_NOR2)) u_ldlo (.clk, .rst_n, .step(step[6]), .a(s1), .b(s0), .le(ldlo_le), .re(ml_s_le), .y(ld_lo));
  plqdi_gate #(.FN(FN_AND2)) u_ldhi (.clk, .rst_n, .step(step[7]), .a(dr_inv(s1)), .b(s0), .le(ldhi_le), .re(mh_s_le), .y(ld_hi));
  plqdi_gate #(.FN(FN_AND2)) u_islo (.clk, .rst_n, .step(step[0]), .a(s1), .b(dr_inv(s0)), .le(islo_le), .re(islo_re), .y(is_lo));
  plqdi_gate #(.FN(FN_XNOR2)) u_pick (.clk, .rst_n, .step(step[1]), .a(sel), .b(is_lo), .le(pick_le), .re(mr_s_le), .y(pick));

  plqdi_fbcon #(.N(5)) u_s0fb (.clk, .rst_n, .in({ldlo_le, ldhi_le, islo_le, ns0_le, ns1_le}), .out(s0_re));
  plqdi_fbcon #(.N(5)) u_s1fb (.clk, .rst_n, .in({ldlo_le, ldhi_le, islo_le, ns1_le, mt_s_le}), .out(s1_re));
  plqdi_celem #(.N(3)) u_islofb (.clk, .rst_n, .in({mx_s_le, my_s_le, pick_le}), .out(islo_re));
  assign sel_re = pick_le;

  // ---------------- datapath ----------------
  // X = is_lo ? din : t ; Y = is_lo ? lo : hi
  plqdi_wmux #(.W(W), .SALT(1)) u_mx (.clk, .rst_n, .step, .a(t), .b(din), .s(is_lo),
    .a_le(mx_a_le), .b_le(mx_b_le), .s_le(mx_s_le), .y(xw), .y_re(xw_re));
  plqdi_wmux #(.W(W), .SALT(2)) u_my (.clk, .rst_n, .step, .a(hi), .b(lo), .s(is_lo),
    .a_le(my_a_le), .b_le(my_b_le), .s_le(my_s_le), .y(yw), .y_re(yw_re));
  // sel = X < Y
  plqdi_fpcmp #(.W(W), .SALT(3)) u_cmp (.clk, .rst_n, .step, .x(xw), .y(yw),
    .x_le(cx_le), .y_le(cy_le), .lt(sel), .lt_re(sel_re));
  // res = pick ? Y : X
  plqdi_wmux #(.W(W), .SALT(4)) u_mr (.clk, .rst_n, .step, .a(xw), .b(yw), .s(pick),
    .a_le(mr_a_le), .b_le(mr_b_le), .s_le(mr_s_le), .y(res), .y_re(mt_b_le));
  // Register next values.
  plqdi_wmux #(.W(W), .SALT(5)) u_mt (.clk, .rst_n, .step, .a(t), .b(res), .s(s1),
    .a_le(mt_a_le), .b_le(mt_b_le), .s_le(mt_s_le), .y(t_n), .y_re(t_le));
  plqdi_wmux #(.W(W), .SALT(6)) u_ml (.clk, .rst_n, .step, .a(lo), .b(din), .s(ld_lo),
    .a_le(ml_a_le), .b_le(ml_b_le), .s_le(ml_s_le), .y(lo_n), .y_re(lo_le));
  plqdi_wmux #(.W(W), .SALT(7)) u_mh (.clk, .rst_n, .step, .a(hi), .b(din), .s(ld_hi),
    .a_le(mh_a_le), .b_le(mh_b_le), .s_le(mh_s_le), .y(hi_n), .y_re(hi_le));

  for (genvar i = 0; i < W; i++) begin : g_bit
    plqdi_barrier #(.INIT_ONE(1'b0)) u_lo (.clk, .rst_n, .step(step[lane(i, 2)]), .d(lo_n[i]), .le(lo_le[i]), .re(lo_re[i]), .q(lo[i]));
    plqdi_barrier #(.INIT_ONE(1'b0)) u_hi (.clk, .rst_n, .step(step[lane(i, 4)]), .d(hi_n[i]), .le(hi_le[i]), .re(hi_re[i]), .q(hi[i]));
    plqdi_barrier #(.INIT_ONE(1'b0)) u_t  (.clk, .rst_n, .step(step[lane(i, 6)]), .d(t_n[i]),  .le(t_le[i]),  .re(t_re[i]),  .q(t[i]));
    // Readers: t -> X mux, t hold mux, environment; lo -> Y mux, lo hold;
    // hi -> Y mux, hi hold; X -> comparator, result mux; Y likewise.
    plqdi_celem #(.N(3)) u_tfb  (.clk, .rst_n, .in({mx_a_le[i], mt_a_le[i], dout_re}), .out(t_re[i]));
    plqdi_celem #(.N(2)) u_lofb (.clk, .rst_n, .in({my_b_le[i], ml_a_le[i]}), .out(lo_re[i]));
    plqdi_celem #(.N(2)) u_hifb (.clk, .rst_n, .in({my_a_le[i], mh_a_le[i]}), .out(hi_re[i]));
    plqdi_celem #(.N(2)) u_xfb  (.clk, .rst_n, .in({cx_le[i], mr_a_le[i]}), .out(xw_re[i]));
    plqdi_celem #(.N(2)) u_yfb  (.clk, .rst_n, .in({cy_le[i], mr_b_le[i]}), .out(yw_re[i]));
  end

  // din is read by the X mux and both bound multiplexers.
  plqdi_fbcon #(.N(3*W)) u_dinfb (.clk, .rst_n, .in({mx_b_le, ml_b_le, mh_b_le}), .out(din_ack));

endmodule

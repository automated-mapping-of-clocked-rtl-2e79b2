// plqdi_clipper_pipe: three-stage pipelined floating-point clipper
// (W = 64 bits) as a PL-QDI gate netlist.  Every input word carries an
// operation: load the lower bound, load the upper bound, or clip a value;
// a clipped value min(max(x, lo), hi) leaves three words later with
// dvalid = 1.
//
// Clocked design that is mapped (one input word per clock):
//   stage 1  lo <= (op == LOAD_LO) ? din : lo
//            hi <= (op == LOAD_HI) ? din : hi
//            x1 <= din;  v1 <= (op == DATA)
//   stage 2  x2 <= (x1 < lo) ? lo : x1;  v2 <= v1
//   stage 3  x3 <= (hi < x2) ? hi : x2;  v3 <= v2
//   dout = x3, dvalid = v3
// op encoding (two bits): 0 DATA, 1 LOAD_LO, 2 LOAD_HI, 3 no operation.
// Each stage has its own comparator (plqdi_fpcmp) and result multiplexer
// (plqdi_wmux).  Mapping: all registers are plqdi_barrier cells resetting
// to 0 tokens; the direct register-to-register paths v1 -> v2 -> v3 get a
// splitter buffer each; lo and hi have hold multiplexers; every signal
// with several readers has a C-element join of their Le wires.
//
// Interface: din and op (dual-rail) share one active-low acknowledge
// in_ack; dout and dvalid share the environment's acknowledge out_re.
// Word n on the outputs is the clocked design's output after n clocks
// (word 0 is the reset value: dout 0, dvalid 0).  step holds the
// gate-delay lanes (see plqdi_pkg::lane).
//
// The three stages (load bounds and input; compare with the lower bound;
// compare with the upper bound) follow the design description; the op
// encoding, the valid bit and the gate-level datapath are this
// implementation's.
module plqdi_clipper_pipe
  import plqdi_pkg::*;
#(
  parameter int unsigned W = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [STEP_LANES-1:0] step,
  input  dr_t  [W-1:0]          din,
  input  dr_t  [1:0]            op,
  output logic                  in_ack,
  output dr_t  [W-1:0]          dout,
  output dr_t                   dvalid,
  input  logic                  out_re
);

  dr_t  [W-1:0] lo, hi, x1, x2, lo_n, hi_n, x2_n, x3_n;
  logic [W-1:0] lo_le, hi_le, x1_le, x2_le, x3_le;
  logic [W-1:0] lo_re, hi_re, x1_re, x2_re;

  logic [W-1:0] ml_a_le, ml_b_le, mh_a_le, mh_b_le, m2_a_le, m2_b_le, m3_a_le, m3_b_le;
  logic         ml_s_le, mh_s_le, m2_s_le, m3_s_le;
  logic [W-1:0] c2x_le, c2y_le, c3x_le, c3y_le;

  dr_t  ld_lo, ld_hi, vd, v1, v2, v3, v1_b, v2_b, sel2, sel3;
  logic ldlo_le, ldhi_le, vd_le, v1_le, v2_le, v3_le, v1b_le, v2b_le, op_le;

  // ---------------- stage 1 ----------------
  plqdi_gate #(.FN(FN_AND2)) u_ldlo (.clk, .rst_n, .step(step[0]), .a(dr_inv(op[1])), .b(op[0]),
    .le(ldlo_le), .re(ml_s_le), .y(ld_lo));
  plqdi_gate #(.FN(FN_AND2)) u_ldhi (.clk, .rst_n, .step(step[1]), .a(op[1]), .b(dr_inv(op[0])),
    .le(ldhi_le), .re(mh_s_le), .y(ld_hi));
  plqdi_gate #(.FN(FN_NOR2)) u_vd (.clk, .rst_n, .step(step[2]), .a(op[1]), .b(op[0]),
    .le(vd_le), .re(v1_le), .y(vd));
  plqdi_barrier #(.INIT_ONE(1'b0)) u_v1 (.clk, .rst_n, .step(step[3]), .d(vd), .le(v1_le), .re(v1b_le), .q(v1));

  plqdi_wmux #(.W(W), .SALT(1)) u_ml (.clk, .rst_n, .step, .a(lo), .b(din), .s(ld_lo),
    .a_le(ml_a_le), .b_le(ml_b_le), .s_le(ml_s_le), .y(lo_n), .y_re(lo_le));
  plqdi_wmux #(.W(W), .SALT(2)) u_mh (.clk, .rst_n, .step, .a(hi), .b(din), .s(ld_hi),
    .a_le(mh_a_le), .b_le(mh_b_le), .s_le(mh_s_le), .y(hi_n), .y_re(hi_le));

  // ---------------- stage 2 ----------------
  // sel2 = x1 < lo ; x2 = sel2 ? lo : x1
  plqdi_fpcmp #(.W(W), .SALT(3)) u_c2 (.clk, .rst_n, .step, .x(x1), .y(lo),
    .x_le(c2x_le), .y_le(c2y_le), .lt(sel2), .lt_re(m2_s_le));
  plqdi_wmux #(.W(W), .SALT(4)) u_m2 (.clk, .rst_n, .step, .a(x1), .b(lo), .s(sel2),
    .a_le(m2_a_le), .b_le(m2_b_le), .s_le(m2_s_le), .y(x2_n), .y_re(x2_le));
  plqdi_gate #(.FN(FN_BUF)) u_v1b (.clk, .rst_n, .step(step[4]), .a(v1), .b(DR_NULL),
    .le(v1b_le), .re(v2_le), .y(v1_b));
  plqdi_barrier #(.INIT_ONE(1'b0)) u_v2 (.clk, .rst_n, .step(step[5]), .d(v1_b), .le(v2_le), .re(v2b_le), .q(v2));

  // ---------------- stage 3 ----------------
  // sel3 = hi < x2 ; x3 = sel3 ? hi : x2
  plqdi_fpcmp #(.W(W), .SALT(5)) u_c3 (.clk, .rst_n, .step, .x(hi), .y(x2),
    .x_le(c3x_le), .y_le(c3y_le), .lt(sel3), .lt_re(m3_s_le));
  plqdi_wmux #(.W(W), .SALT(6)) u_m3 (.clk, .rst_n, .step, .a(x2), .b(hi), .s(sel3),
    .a_le(m3_a_le), .b_le(m3_b_le), .s_le(m3_s_le), .y(x3_n), .y_re(x3_le));
  plqdi_gate #(.FN(FN_BUF)) u_v2b (.clk, .rst_n, .step(step[6]), .a(v2), .b(DR_NULL),
    .le(v2b_le), .re(v3_le), .y(v2_b));
  plqdi_barrier #(.INIT_ONE(1'b0)) u_v3 (.clk, .rst_n, .step(step[7]), .d(v2_b), .le(v3_le), .re(out_re), .q(v3));

  assign dvalid = v3;

  for (genvar i = 0; i < W; i++) begin : g_bit
    plqdi_barrier #(.INIT_ONE(1'b0)) u_lo (.clk, .rst_n, .step(step[lane(i, 1)]), .d(lo_n[i]), .le(lo_le[i]), .re(lo_re[i]), .q(lo[i]));
    plqdi_barrier #(.INIT_ONE(1'b0)) u_hi (.clk, .rst_n, .step(step[lane(i, 3)]), .d(hi_n[i]), .le(hi_le[i]), .re(hi_re[i]), .q(hi[i]));
    plqdi_barrier #(.INIT_ONE(1'b0)) u_x1 (.clk, .rst_n, .step(step[lane(i, 5)]), .d(din[i]),  .le(x1_le[i]), .re(x1_re[i]), .q(x1[i]));
    plqdi_barrier #(.INIT_ONE(1'b0)) u_x2 (.clk, .rst_n, .step(step[lane(i, 7)]), .d(x2_n[i]), .le(x2_le[i]), .re(x2_re[i]), .q(x2[i]));
    plqdi_barrier #(.INIT_ONE(1'b0)) u_x3 (.clk, .rst_n, .step(step[lane(i, 0)]), .d(x3_n[i]), .le(x3_le[i]), .re(out_re),   .q(dout[i]));
    // Readers: lo -> stage-2 compare and mux, lo hold; hi -> stage-3
    // compare and mux, hi hold; x1 -> stage-2 compare and mux; x2 -> stage-3
    // compare and mux.
    plqdi_celem #(.N(3)) u_lofb (.clk, .rst_n, .in({c2y_le[i], m2_b_le[i], ml_a_le[i]}), .out(lo_re[i]));
    plqdi_celem #(.N(3)) u_hifb (.clk, .rst_n, .in({c3x_le[i], m3_b_le[i], mh_a_le[i]}), .out(hi_re[i]));
    plqdi_celem #(.N(2)) u_x1fb (.clk, .rst_n, .in({c2x_le[i], m2_a_le[i]}), .out(x1_re[i]));
    plqdi_celem #(.N(2)) u_x2fb (.clk, .rst_n, .in({c3y_le[i], m3_a_le[i]}), .out(x2_re[i]));
  end

  // Input acknowledge: din is read by both bound muxes and x1; op by the
  // three decoder gates.
  plqdi_celem #(.N(3)) u_opfb (.clk, .rst_n, .in({ldlo_le, ldhi_le, vd_le}), .out(op_le));
  plqdi_fbcon #(.N(3*W+1)) u_infb (.clk, .rst_n, .in({ml_b_le, mh_b_le, x1_le, op_le}), .out(in_ack));

endmodule

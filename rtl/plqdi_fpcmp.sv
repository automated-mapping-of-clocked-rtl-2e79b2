// plqdi_fpcmp: less-than comparator for IEEE-754 style sign-magnitude
// words (W bits, sign in bit W-1) as a PL-QDI gate netlist; lt = x < y.
//
// Magnitude (bits W-2..0), a ripple chain from the least significant bit:
//   nab_i = ~x_i & y_i            eq_i = x_i XNOR y_i
//   lt_0  = nab_0                 lt_i = nab_i | (eq_i & lt_{i-1})
//   e_0   = eq_0                  e_i  = eq_i & e_{i-1}
// mlt = lt_{W-2} (|x| < |y|), meq = e_{W-2} (|x| = |y|),
// mgt = NOR(mlt, meq).  Sign (sa = x_{W-1}, sb = y_{W-1}):
//   lt = (sa & ~sb) | (~sa & ~sb & mlt) | (sa & sb & mgt)
// Every operator is one two-input plqdi_gate; inversions are rail swaps.
// Not handled: NaN operands, and -0 counts as smaller than +0.
// Feedback: x_le[i]/y_le[i] join the Le of the gates that read bit i (two
// gates for magnitude bits, three for the sign), lt_re is the acknowledge
// of lt's readers; signals with two readers get a two-input C-element.
// Gates step on lanes (k + SALT) of step.  Forward latency with all lanes
// high is about W edges (the chain) plus four.  The comparator is this
// implementation's gate-level design for the clipper's bound compares.
//
// Expected tool notes: the chain arrays are declared one entry per bit for
// simple indexing; the entries of the lowest bit that have no successor
// (its chain value, chain acknowledge and sign-stage acknowledge) are not
// read and are reported by lint as unused bits.
module plqdi_fpcmp
  import plqdi_pkg::*;
#(
  parameter int unsigned W    = 64,
  parameter int unsigned SALT = 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [STEP_LANES-1:0] step,
  input  dr_t  [W-1:0]          x,
  input  dr_t  [W-1:0]          y,
  output logic [W-1:0]          x_le,
  output logic [W-1:0]          y_le,
  output dr_t                   lt,
  input  logic                  lt_re
);

  localparam int unsigned M = W - 1;  // magnitude bits

  initial assert (W >= 3) else $error("plqdi_fpcmp: W must be at least 3");

  dr_t  [M-1:0] nab, eqv, chv, ltv, ev;
  logic [M-1:0] nab_le, eq_le, ch_le, or_le, e_le;
  logic [M-1:0] lt_sig_re, eq_sig_re, e_sig_re;

  dr_t  mgt, p1, q, p2, r, p3, o1;
  logic mgt_le, p1_le, q_le, p2_le, r_le, p3_le, o1_le, lt_le;

  for (genvar i = 0; i < M; i++) begin : g_mag
    plqdi_gate #(.FN(FN_AND2)) u_nab (.clk, .rst_n, .step(step[lane(5*i, SALT)]),
      .a(dr_inv(x[i])), .b(y[i]), .le(nab_le[i]),
      .re((i == 0) ? lt_sig_re[0] : or_le[i]), .y(nab[i]));
    plqdi_gate #(.FN(FN_XNOR2)) u_eq (.clk, .rst_n, .step(step[lane(5*i+1, SALT)]),
      .a(x[i]), .b(y[i]), .le(eq_le[i]), .re(eq_sig_re[i]), .y(eqv[i]));
    // x_i and y_i have the same two readers, so one join serves both.
    plqdi_celem #(.N(2)) u_xyfb (.clk, .rst_n, .in({nab_le[i], eq_le[i]}), .out(x_le[i]));
    assign y_le[i] = x_le[i];

    if (i == 0) begin : g_first
      assign ltv[0]   = nab[0];
      assign ev[0]    = eqv[0];
      assign chv[0]   = DR_NULL;
      assign ch_le[0] = 1'b1;
      assign or_le[0] = 1'b1;
      assign e_le[0]  = 1'b1;
      assign e_sig_re[0] = 1'b1;
      // eq_0 is e_0: read by e_1.
      assign eq_sig_re[0] = e_le[1];
    end else begin : g_chain
      plqdi_gate #(.FN(FN_AND2)) u_ch (.clk, .rst_n, .step(step[lane(5*i+2, SALT)]),
        .a(eqv[i]), .b(ltv[i-1]), .le(ch_le[i]), .re(or_le[i]), .y(chv[i]));
      plqdi_gate #(.FN(FN_OR2)) u_or (.clk, .rst_n, .step(step[lane(5*i+3, SALT)]),
        .a(nab[i]), .b(chv[i]), .le(or_le[i]), .re(lt_sig_re[i]), .y(ltv[i]));
      plqdi_gate #(.FN(FN_AND2)) u_e (.clk, .rst_n, .step(step[lane(5*i+4, SALT)]),
        .a(eqv[i]), .b(ev[i-1]), .le(e_le[i]), .re(e_sig_re[i]), .y(ev[i]));
      plqdi_celem #(.N(2)) u_eqfb (.clk, .rst_n, .in({ch_le[i], e_le[i]}), .out(eq_sig_re[i]));
      assign e_sig_re[i] = (i == M - 1) ? mgt_le : e_le[(i == M - 1) ? i : i + 1];
    end

    // Readers of lt_i: the next chain AND, or for the last bit mgt and p2.
    if (i < M - 1) begin : g_ltmid
      assign lt_sig_re[i] = ch_le[i+1];
    end else begin : g_ltlast
      plqdi_celem #(.N(2)) u_ltfb (.clk, .rst_n, .in({mgt_le, p2_le}), .out(lt_sig_re[i]));
    end
  end

  // Sign stage.
  plqdi_gate #(.FN(FN_NOR2)) u_mgt (.clk, .rst_n, .step(step[lane(5*M, SALT)]),
    .a(ltv[M-1]), .b(ev[M-1]), .le(mgt_le), .re(p3_le), .y(mgt));
  plqdi_gate #(.FN(FN_AND2)) u_p1 (.clk, .rst_n, .step(step[lane(5*M+1, SALT)]),
    .a(x[M]), .b(dr_inv(y[M])), .le(p1_le), .re(o1_le), .y(p1));
  plqdi_gate #(.FN(FN_NOR2)) u_q (.clk, .rst_n, .step(step[lane(5*M+2, SALT)]),
    .a(x[M]), .b(y[M]), .le(q_le), .re(p2_le), .y(q));
  plqdi_gate #(.FN(FN_AND2)) u_p2 (.clk, .rst_n, .step(step[lane(5*M+3, SALT)]),
    .a(q), .b(ltv[M-1]), .le(p2_le), .re(o1_le), .y(p2));
  plqdi_gate #(.FN(FN_AND2)) u_r (.clk, .rst_n, .step(step[lane(5*M+4, SALT)]),
    .a(x[M]), .b(y[M]), .le(r_le), .re(p3_le), .y(r));
  plqdi_gate #(.FN(FN_AND2)) u_p3 (.clk, .rst_n, .step(step[lane(5*M+5, SALT)]),
    .a(r), .b(mgt), .le(p3_le), .re(lt_le), .y(p3));
  plqdi_gate #(.FN(FN_OR2)) u_o1 (.clk, .rst_n, .step(step[lane(5*M+6, SALT)]),
    .a(p1), .b(p2), .le(o1_le), .re(lt_le), .y(o1));
  plqdi_gate #(.FN(FN_OR2)) u_lt (.clk, .rst_n, .step(step[lane(5*M+7, SALT)]),
    .a(o1), .b(p3), .le(lt_le), .re(lt_re), .y(lt));

  plqdi_celem #(.N(3)) u_sfb (.clk, .rst_n, .in({p1_le, q_le, r_le}), .out(x_le[M]));
  assign y_le[M] = x_le[M];

endmodule

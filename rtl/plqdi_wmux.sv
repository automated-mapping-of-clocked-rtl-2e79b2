// plqdi_wmux: W-bit two-way multiplexer as a PL-QDI gate netlist,
// y = s ? b : a.
//
// Each bit is the mapped form of the two-level AND/OR multiplexer of a
// clocked netlist: n = a & ~s, m = b & s, y = n | m, three plqdi_gate
// cells.  ~s is the select with its rails swapped, which costs no gate in
// dual rail.  Feedback: a_le[i] and b_le[i] are the Le of the two AND
// gates of bit i, the select acknowledge s_le joins the Le of all 2W AND
// gates through a plqdi_fbcon tree, and y_re[i] is the acknowledge of the
// readers of y[i].  Gate k of the netlist steps on lane (k + SALT) of step
// (see plqdi_pkg::lane).  Forward latency with all lanes high: two edges
// from the last input to y.  This is a helper of the clipper netlists; its
// gate structure is this implementation's mapping of a standard mux.
module plqdi_wmux
  import plqdi_pkg::*;
#(
  parameter int unsigned W    = 64,
  parameter int unsigned SALT = 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [STEP_LANES-1:0] step,
  input  dr_t  [W-1:0]          a,
  input  dr_t  [W-1:0]          b,
  input  dr_t                   s,
  output logic [W-1:0]          a_le,
  output logic [W-1:0]          b_le,
  output logic                  s_le,
  output dr_t  [W-1:0]          y,
  input  logic [W-1:0]          y_re
);

  dr_t  [W-1:0] n, m;
  logic [W-1:0] o_le;

  for (genvar i = 0; i < W; i++) begin : g_bit
    plqdi_gate #(.FN(FN_AND2)) u_n (.clk, .rst_n, .step(step[lane(3*i, SALT)]),
      .a(a[i]), .b(dr_inv(s)), .le(a_le[i]), .re(o_le[i]), .y(n[i]));
    plqdi_gate #(.FN(FN_AND2)) u_m (.clk, .rst_n, .step(step[lane(3*i+1, SALT)]),
      .a(b[i]), .b(s), .le(b_le[i]), .re(o_le[i]), .y(m[i]));
    plqdi_gate #(.FN(FN_OR2)) u_o (.clk, .rst_n, .step(step[lane(3*i+2, SALT)]),
      .a(n[i]), .b(m[i]), .le(o_le[i]), .re(y_re[i]), .y(y[i]));
  end

  plqdi_fbcon #(.N(2*W)) u_s_fb (.clk, .rst_n, .in({a_le, b_le}), .out(s_le));

endmodule

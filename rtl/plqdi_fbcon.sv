// plqdi_fbcon: feedback concentrator, a tree of Muller C-elements.
//
// A gate whose output fans out to several PL-QDI gates may start its
// precharge only after every reader has acknowledged, and may evaluate
// again only after every reader has released its acknowledgement.  The
// concentrator joins the readers' active-low Le wires into one Re.  Up to
// four inputs use a single four-input plqdi_celem (the largest library
// C-element); wider joins use a tree in which every level joins groups of
// four outputs of the level below, until one C-element remains.  Each tree level adds one evaluation step of latency
// (ceil(log4 N) steps in all); logically the tree is one wide C-element.
module plqdi_fbcon #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in,
  output logic         out
);

  initial assert (N >= 1) else $error("plqdi_fbcon: N must be at least 1");

  // Number of nodes on tree level l (level 0 is the inputs).
  function automatic int unsigned nodes(input int unsigned l);
    int unsigned n = N;
    for (int unsigned k = 0; k < l; k++) n = (n + 3) / 4;
    return n;
  endfunction

  function automatic int unsigned depth();
    int unsigned l = 1;
    while (nodes(l) > 1) l++;
    return l;
  endfunction

  localparam int unsigned L = depth();

  logic [N-1:0] lvl [L+1];

  assign lvl[0] = in;
  for (genvar l = 1; l <= L; l++) begin : g_lvl
    localparam int unsigned NI = nodes(l - 1);
    localparam int unsigned NO = nodes(l);
    for (genvar g = 0; g < NO; g++) begin : g_node
      localparam int unsigned W = ((NI - 4 * g) < 4) ? (NI - 4 * g) : 4;
      plqdi_celem #(.N(W)) u_c (.clk, .rst_n, .in(lvl[l-1][4*g +: W]), .out(lvl[l][g]));
    end
    if (NO < N) begin : g_pad
      assign lvl[l][N-1:NO] = '0;
    end
  end

  assign out = lvl[L][0];

endmodule

// plqdi_counter: PL-QDI netlist of a WIDTH-bit binary up-counter, with or
// without a count enable, as produced by fine-grain mapping of the clocked
// counter.
//
// Clocked source: state <= state + 1 (if cnt_en), asynchronous reset to 0,
// dout = state.  Its two-input gate netlist is a ripple carry chain:
//   with enable:    c0 = cnt_en,   next_i = d_i ^ c_i,  c_{i+1} = d_i & c_i
//   without enable: next_0 = ~d_0, c_1 = d_0, then as above for i >= 1
// Mapping, gate by gate:
//   * every flip-flop becomes a plqdi_barrier that resets to a 0 token;
//   * every XOR/AND becomes a plqdi_gate; the bit-0 inverter of the
//     enable-less counter is the splitter that breaks the direct
//     flip-flop-to-flip-flop path (a buffer reading the swapped rails);
//   * the loop barrier_i -> next-state gate -> barrier_i has only two
//     gates, too few for a four-phase ring, so a buffer gate is inserted in
//     each next-state path;
//   * every signal read by several gates gets a four-input C-element
//     (plqdi_celem) joining the readers' Le into the driver's Re; unused
//     C-element inputs repeat a used one, which leaves the join unchanged.
// Gate counts: 4*WIDTH-1 with enable, 4*WIDTH-2 without (7/6 gates for two
// bits, 15/14 for four), against 3*WIDTH-1 and 3*WIDTH-3 gates in the
// clocked netlist counting flip-flops (5/3 and 11/9; without enable, bit 0
// takes its inverse from the flip-flop's inverted output).
//
// Environment interface (four-phase dual-rail): cnt_en is an input word,
// acknowledged on cnt_en_ack (active low, join of its two readers); dout is
// the counter state, one dual-rail word per count, and ext_re is the
// environment's active-low acknowledge of all dout bits.  After reset the
// barriers show the reset state 0 as their initial tokens; the n-th dout
// word is the state after n-1 enabled counts, exactly the clocked
// counter's sequence.  step[k] lets gate k fire on a clk edge (barrier i:
// k=i, buffer i: WIDTH+i, next-state gate i: 2*WIDTH+i, carry AND i:
// 3*WIDTH+i; unused AND slots are ignored); tie all ones for the fastest
// schedule.
//
// The enable-counter netlist follows the published 2-bit mapping (three
// logic gates, two buffers, two barriers, C-element joins); the enable-less
// and wider netlists are this implementation's own mapping by the same
// rules, and match the published gate totals.
//
// Expected tool notes: the gate array is declared for the largest case;
// the carry nodes and AND-gate handshake bits that a given WIDTH/HAS_EN
// combination does not need, and cnt_en when HAS_EN = 0, are left
// unconnected and are reported by lint as unused bits.
module plqdi_counter
  import plqdi_pkg::*;
#(
  parameter int unsigned WIDTH  = 2,
  parameter bit          HAS_EN = 1'b1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [4*WIDTH-1:0] step,
  input  dr_t                cnt_en,      // ignored when HAS_EN = 0
  output logic               cnt_en_ack,  // active low; constant 1 when HAS_EN = 0
  output dr_t  [WIDTH-1:0]   dout,
  input  logic               ext_re       // active-low acknowledge of dout
);

  initial assert (WIDTH >= 2) else $error("plqdi_counter: WIDTH must be at least 2");

  // A carry AND exists for bit i (it produces c_{i+1}).
  function automatic bit has_and(input int i);
    return HAS_EN ? (i <= int'(WIDTH) - 2) : (i >= 1 && i <= int'(WIDTH) - 2);
  endfunction

  dr_t  [WIDTH-1:0] dq;      // barrier outputs (counter state)
  dr_t  [WIDTH-1:0] nxt;     // next-state gate outputs
  dr_t  [WIDTH-1:0] nxt_b;   // buffered next state, barrier inputs
  dr_t  [WIDTH:0]   c;       // carry into bit i
  logic [WIDTH-1:0] bar_le, bar_re, buf_le, lg_le, and_le, and_re;

  assign dout = dq;

  // Carry into bit 0 (enable) or bit 1 (enable-less counter).
  if (HAS_EN) begin : g_c0
    assign c[0] = cnt_en;
    plqdi_celem #(.N(2)) u_en_fb (.clk, .rst_n, .in({lg_le[0], and_le[0]}), .out(cnt_en_ack));
  end else begin : g_c1
    assign c[0]       = DR_NULL;
    assign c[1]       = dq[0];
    assign cnt_en_ack = 1'b1;
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    // State register.
    plqdi_barrier #(.INIT_ONE(1'b0)) u_bar (
      .clk, .rst_n, .step(step[i]), .d(nxt_b[i]), .le(bar_le[i]), .re(bar_re[i]), .q(dq[i]));

    // Loop-padding buffer in front of the barrier.
    plqdi_gate #(.FN(FN_BUF)) u_buf (
      .clk, .rst_n, .step(step[WIDTH+i]), .a(nxt[i]), .b(DR_NULL),
      .le(buf_le[i]), .re(bar_le[i]), .y(nxt_b[i]));

    // Next-state gate.
    if (!HAS_EN && i == 0) begin : g_inv
      plqdi_gate #(.FN(FN_INV)) u_lg (
        .clk, .rst_n, .step(step[2*WIDTH+i]), .a(dq[i]), .b(DR_NULL),
        .le(lg_le[i]), .re(buf_le[i]), .y(nxt[i]));
    end else begin : g_xor
      plqdi_gate #(.FN(FN_XOR2)) u_lg (
        .clk, .rst_n, .step(step[2*WIDTH+i]), .a(dq[i]), .b(c[i]),
        .le(lg_le[i]), .re(buf_le[i]), .y(nxt[i]));
    end

    // Carry AND and the join of its readers (next-state gate and carry AND
    // of bit i+1).
    if (has_and(i)) begin : g_and
      plqdi_gate #(.FN(FN_AND2)) u_and (
        .clk, .rst_n, .step(step[3*WIDTH+i]), .a(dq[i]), .b(c[i]),
        .le(and_le[i]), .re(and_re[i]), .y(c[i+1]));
      if (has_and(i + 1)) begin : g_j2
        plqdi_celem #(.N(2)) u_fb (.clk, .rst_n, .in({lg_le[i+1], and_le[i+1]}), .out(and_re[i]));
      end else begin : g_j1
        assign and_re[i] = lg_le[i+1];
      end
    end else begin : g_noand
      assign and_le[i] = 1'b1;
      assign and_re[i] = 1'b1;
      if (!(!HAS_EN && i == 0)) begin : g_cend
        assign c[i+1] = DR_NULL;
      end
    end

    // Join of the readers of dq[i]: environment, next-state gate, carry AND
    // and, for bit 0 of the enable-less counter, the gates of bit 1.
    if (!HAS_EN && i == 0) begin : g_fb0
      plqdi_celem #(.N(4)) u_fb (.clk, .rst_n,
        .in({ext_re, lg_le[0], lg_le[1], has_and(1) ? and_le[1] : lg_le[1]}), .out(bar_re[i]));
    end else begin : g_fbi
      plqdi_celem #(.N(4)) u_fb (.clk, .rst_n,
        .in({ext_re, lg_le[i], has_and(i) ? and_le[i] : lg_le[i], lg_le[i]}), .out(bar_re[i]));
    end
  end


endmodule

// plqdi_top: the evaluation set of PL-QDI circuits side by side.
//
// What it is: one instance of every circuit of this design, each with its
// own handshake ports brought out, so that a single testbench can run all
// of them together at their default sizes:
//   * the four counters of the gate-count comparison: 2-bit with enable,
//     2-bit, 4-bit with enable, 4-bit;
//   * the 64-bit IEEE-754 clipper (one shared comparator, four-state
//     controller) and its three-stage pipelined version;
//   * the wrapper that embeds a clocked (synchronous) ROM in the PL-QDI
//     netlist, 8-bit address and 54-bit word as for the microcode ROM; the
//     ROM itself stays outside and is reached through the rom_* ports;
//   * the two constant generators (logic 1 and logic 0).
// The blocks do not talk to each other; the top adds no logic.
//
// How it works: every state node of the asynchronous circuits is held in a
// flip-flop on clk and may change only on a clock edge where its step
// enable is high.  The step inputs therefore stand for gate delays: a
// step bit held high moves the gates listening to it as fast as possible,
// a random step pattern gives random delays.  See the individual blocks.
//
// Interface: plain vectors only.  Every dual-rail signal occupies two bits
// {t, f} (t in the upper bit of each pair): "10" is logic 1, "01" logic 0,
// "00" null.  A W-bit dual-rail bus is a 2W-bit vector with bit i of the
// word at [2i+1:2i].  All *_ack / *_le / *_re signals are single-rail and
// active low, as in the gate library.  Reset is asynchronous, active low.
//
// Timing: as in each block; the top adds no latency.
//
// Expected tool notes: the unused rail of each constant generator (f of
// the logic-1 generator, t of the logic-0 generator) is constant 0 by
// design.  The enable acknowledge of the two counters without enable is
// constant 1 and is left unconnected.  Each block's own notes on unused
// bits apply here too.
//
// Follows the document: the choice of circuits (the two counter widths
// with and without enable, the 64-bit clipper and its pipelined form, the
// ROM wrapper for a 256-word x 54-bit microcode ROM, constant generators).
// Own choices: putting them in one wrapper, the bus packing above, and the
// step-enable delay model.
module plqdi_top #(
  parameter int unsigned CLIP_W   = 64,
  parameter int unsigned ROM_AW   = 8,
  parameter int unsigned ROM_DW   = 54
) (
  input  logic                    clk,
  input  logic                    rst_n,

  // 2-bit counter with enable
  input  logic [7:0]              c2e_step,
  input  logic [1:0]              c2e_en,
  output logic                    c2e_en_ack,
  output logic [3:0]              c2e_dout,
  input  logic                    c2e_re,
  // 2-bit counter without enable
  input  logic [7:0]              c2_step,
  output logic [3:0]              c2_dout,
  input  logic                    c2_re,
  // 4-bit counter with enable
  input  logic [15:0]             c4e_step,
  input  logic [1:0]              c4e_en,
  output logic                    c4e_en_ack,
  output logic [7:0]              c4e_dout,
  input  logic                    c4e_re,
  // 4-bit counter without enable
  input  logic [15:0]             c4_step,
  output logic [7:0]              c4_dout,
  input  logic                    c4_re,

  // clipper
  input  logic [7:0]              clp_step,
  input  logic [2*CLIP_W-1:0]     clp_din,
  output logic                    clp_din_ack,
  output logic [2*CLIP_W-1:0]     clp_dout,
  input  logic                    clp_dout_re,
  // pipelined clipper
  input  logic [7:0]              cpp_step,
  input  logic [2*CLIP_W-1:0]     cpp_din,
  input  logic [3:0]              cpp_op,
  output logic                    cpp_in_ack,
  output logic [2*CLIP_W-1:0]     cpp_dout,
  output logic [1:0]              cpp_dvalid,
  input  logic                    cpp_out_re,

  // clocked-ROM wrapper
  input  logic                    rom_step,
  input  logic [2*ROM_AW-1:0]     rom_addr_dr,
  output logic                    rom_le,
  input  logic                    rom_re,
  output logic [2*ROM_DW-1:0]     rom_dout,
  output logic                    rom_en,
  output logic [ROM_AW-1:0]       rom_addr,
  input  logic [ROM_DW-1:0]       rom_data,

  // constant generators
  input  logic                    k1_step,
  input  logic                    k1_re,
  output logic [1:0]              k1_y,
  input  logic                    k0_step,
  input  logic                    k0_re,
  output logic [1:0]              k0_y
);
  import plqdi_pkg::*;

  // Counters.  The counter without enable has no enable input; its enable
  // port is tied to null and its acknowledge output is left open.

  plqdi_counter #(.WIDTH(2), .HAS_EN(1'b1)) u_cnt2e (
    .clk, .rst_n, .step(c2e_step), .cnt_en(c2e_en), .cnt_en_ack(c2e_en_ack),
    .dout(c2e_dout), .ext_re(c2e_re)
  );
  plqdi_counter #(.WIDTH(2), .HAS_EN(1'b0)) u_cnt2 (
    .clk, .rst_n, .step(c2_step), .cnt_en(DR_NULL), .cnt_en_ack(),
    .dout(c2_dout), .ext_re(c2_re)
  );
  plqdi_counter #(.WIDTH(4), .HAS_EN(1'b1)) u_cnt4e (
    .clk, .rst_n, .step(c4e_step), .cnt_en(c4e_en), .cnt_en_ack(c4e_en_ack),
    .dout(c4e_dout), .ext_re(c4e_re)
  );
  plqdi_counter #(.WIDTH(4), .HAS_EN(1'b0)) u_cnt4 (
    .clk, .rst_n, .step(c4_step), .cnt_en(DR_NULL), .cnt_en_ack(),
    .dout(c4_dout), .ext_re(c4_re)
  );

  // Clippers.
  plqdi_clipper #(.W(CLIP_W)) u_clipper (
    .clk, .rst_n, .step(clp_step), .din(clp_din), .din_ack(clp_din_ack),
    .dout(clp_dout), .dout_re(clp_dout_re)
  );
  plqdi_clipper_pipe #(.W(CLIP_W)) u_clipper_pipe (
    .clk, .rst_n, .step(cpp_step), .din(cpp_din), .op(cpp_op), .in_ack(cpp_in_ack),
    .dout(cpp_dout), .dvalid(cpp_dvalid), .out_re(cpp_out_re)
  );

  // Clocked-ROM wrapper.
  plqdi_rom_wrapper #(.ADDR_W(ROM_AW), .DATA_W(ROM_DW)) u_rom_wrapper (
    .clk, .rst_n, .step(rom_step), .addr(rom_addr_dr), .le(rom_le), .re(rom_re),
    .dout(rom_dout), .rom_en, .rom_addr, .rom_data
  );

  // Constant generators.
  plqdi_const #(.VALUE(1'b1)) u_const1 (.clk, .rst_n, .step(k1_step), .re(k1_re), .y(k1_y));
  plqdi_const #(.VALUE(1'b0)) u_const0 (.clk, .rst_n, .step(k0_step), .re(k0_re), .y(k0_y));

endmodule

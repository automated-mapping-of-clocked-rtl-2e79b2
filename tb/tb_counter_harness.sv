// tb_counter_harness: one PL-QDI counter connected to its test
// environment (tb_counter_env), which drives and checks it.
module tb_counter_harness
  import plqdi_pkg::*;
#(
  parameter int unsigned WIDTH       = 2,
  parameter bit          HAS_EN      = 1'b1,
  parameter bit          RANDOM_STEP = 1'b1,
  parameter int unsigned NWORDS      = 40
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   words,
  output int   en_zero_seen,
  output int   wraps,
  output logic done
);
  logic [4*WIDTH-1:0] step;
  dr_t                cnt_en;
  logic               cnt_en_ack;
  dr_t  [WIDTH-1:0]   dout;
  logic               ext_re;

  plqdi_counter #(.WIDTH(WIDTH), .HAS_EN(HAS_EN)) dut (
    .clk, .rst_n, .step, .cnt_en, .cnt_en_ack, .dout, .ext_re);

  tb_counter_env #(.WIDTH(WIDTH), .HAS_EN(HAS_EN), .RANDOM_STEP(RANDOM_STEP), .NWORDS(NWORDS)) env (
    .clk, .rst_n, .checks, .failures, .words, .en_zero_seen, .wraps, .done,
    .step, .cnt_en, .cnt_en_ack, .dout, .ext_re);
endmodule

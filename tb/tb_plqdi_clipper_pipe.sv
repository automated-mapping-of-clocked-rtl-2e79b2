// tb_plqdi_clipper_pipe: self-checking run of the three-stage pipelined
// 64-bit clipper with the evaluation workload: load bounds -5.0 and +5.0,
// then NVEC random doubles in [-15, +15] as DATA words, with random
// no-operation words mixed in, all under random gate delays.
//
// Four-phase environment as for the non-pipelined clipper.  Each output
// word (dout, dvalid) is compared with a clocked model of the same
// pipeline (word n = its output after n clocks).  In addition every value
// must come out exactly three words after it went in, marked valid, and
// equal to clip(x) computed with real arithmetic.  Values clipped low,
// clipped high and passed unchanged are counted; each must occur.
module tb_plqdi_clipper_pipe;
  import plqdi_pkg::*;

  localparam int unsigned W = 64;
  localparam int NVEC = 1000;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  int checks, failures, n_low, n_high, n_pass, n_nop;
  logic done;

  logic [STEP_LANES-1:0] step;
  dr_t  [W-1:0] din, dout;
  dr_t  [1:0]   op;
  dr_t          dvalid;
  logic in_ack, out_re;

  plqdi_clipper_pipe #(.W(W)) dut (.*);

  tb_clipper_pipe_env #(.W(W), .NVEC(NVEC)) env (.clk, .rst_n, .checks, .failures, .n_low, .n_high,
    .n_pass, .n_nop, .done, .step, .din, .op, .in_ack, .dout, .dvalid, .out_re);

  task automatic finish(input int extra);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + extra);
    $finish;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    wait (done);
    finish(0);
  end

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    $display("watchdog expired");
    finish(1);
  end
endmodule

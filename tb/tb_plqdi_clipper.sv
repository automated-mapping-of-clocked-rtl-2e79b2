// tb_plqdi_clipper: self-checking run of the non-pipelined 64-bit clipper
// with the evaluation workload: bounds -5.0 and +5.0, then NVEC random
// doubles in [-15, +15], all under random gate delays (random step lanes).
//
// The environment is the four-phase input/output process pair: it sends a
// din word whenever din_ack is high and returns din to null when din_ack
// falls, and it reads a dout word whenever all dout bits are valid and then
// acknowledges it.  Word order on din: lo, hi, then for every value x the
// pair (x, filler).  Each dout word is compared with a clocked model of the
// same design (word n = its output after n clocks); in addition every word
// that follows a CMP_HI clock must equal clip(x) computed with real
// arithmetic.  The test counts values clipped to the lower bound, clipped
// to the upper bound and passed unchanged, and fails if any of the three
// never happened.
module tb_plqdi_clipper;
  import plqdi_pkg::*;

  localparam int unsigned W = 64;
  localparam int NVEC = 1000;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  int checks, failures, n_low, n_high, n_pass;
  logic done;

  logic [STEP_LANES-1:0] step;
  dr_t  [W-1:0] din, dout;
  logic din_ack, dout_re;

  plqdi_clipper #(.W(W)) dut (.*);

  tb_clipper_env #(.W(W), .NVEC(NVEC)) env (.clk, .rst_n, .checks, .failures, .n_low, .n_high,
    .n_pass, .done, .step, .din, .din_ack, .dout, .dout_re);

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

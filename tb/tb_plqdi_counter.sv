// tb_plqdi_counter: self-checking test of the four counter netlists
// (2 and 4 bits, with and without count enable), each under random gate
// delays and once more with every gate stepping on every edge.  Each
// harness compares every dout word with a clocked reference counter; the
// test also requires that each run produced all its words, saw a held
// count (enable 0) where there is an enable, and wrapped around at least
// once.
module tb_plqdi_counter;
  import plqdi_pkg::*;

  localparam int NW = 40;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  int checks = 0, failures = 0;

  int c[8], f[8], w[8], ez[8], wr[8];
  logic d[8];

  always #5 clk = ~clk;

  tb_counter_harness #(.WIDTH(2), .HAS_EN(1), .RANDOM_STEP(1), .NWORDS(NW)) h0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .words(w[0]), .en_zero_seen(ez[0]), .wraps(wr[0]), .done(d[0]));
  tb_counter_harness #(.WIDTH(2), .HAS_EN(0), .RANDOM_STEP(1), .NWORDS(NW)) h1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .words(w[1]), .en_zero_seen(ez[1]), .wraps(wr[1]), .done(d[1]));
  tb_counter_harness #(.WIDTH(4), .HAS_EN(1), .RANDOM_STEP(1), .NWORDS(NW)) h2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .words(w[2]), .en_zero_seen(ez[2]), .wraps(wr[2]), .done(d[2]));
  tb_counter_harness #(.WIDTH(4), .HAS_EN(0), .RANDOM_STEP(1), .NWORDS(NW)) h3 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .words(w[3]), .en_zero_seen(ez[3]), .wraps(wr[3]), .done(d[3]));
  tb_counter_harness #(.WIDTH(2), .HAS_EN(1), .RANDOM_STEP(0), .NWORDS(NW)) h4 (.clk, .rst_n, .checks(c[4]), .failures(f[4]), .words(w[4]), .en_zero_seen(ez[4]), .wraps(wr[4]), .done(d[4]));
  tb_counter_harness #(.WIDTH(2), .HAS_EN(0), .RANDOM_STEP(0), .NWORDS(NW)) h5 (.clk, .rst_n, .checks(c[5]), .failures(f[5]), .words(w[5]), .en_zero_seen(ez[5]), .wraps(wr[5]), .done(d[5]));
  tb_counter_harness #(.WIDTH(4), .HAS_EN(1), .RANDOM_STEP(0), .NWORDS(NW)) h6 (.clk, .rst_n, .checks(c[6]), .failures(f[6]), .words(w[6]), .en_zero_seen(ez[6]), .wraps(wr[6]), .done(d[6]));
  tb_counter_harness #(.WIDTH(4), .HAS_EN(0), .RANDOM_STEP(0), .NWORDS(NW)) h7 (.clk, .rst_n, .checks(c[7]), .failures(f[7]), .words(w[7]), .en_zero_seen(ez[7]), .wraps(wr[7]), .done(d[7]));

  task automatic finish();
    for (int i = 0; i < 8; i++) begin
      checks += c[i] + 2;
      failures += f[i];
      if (w[i] != NW) begin failures++; $display("harness %0d: %0d of %0d words", i, w[i], NW); end
      if (wr[i] == 0) begin failures++; $display("harness %0d: never wrapped", i); end
      if ((i % 2) == 0) begin
        checks++;
        if (ez[i] == 0) begin failures++; $display("harness %0d: no held count", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5] && d[6] && d[7]);
    repeat (2) @(posedge clk);
    finish();
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish();
  end
endmodule

// tb_plqdi_barrier: self-checking test of the barrier gate, both reset
// values.  Checks: during and right after reset the output carries the
// initial token (0 -> "01", 1 -> "10") with Le high; an input word that
// arrives while that token is unacknowledged is neither copied nor
// acknowledged; the first Re low removes the forced token; afterwards each
// input word is copied to the output one edge after Re returns high, Le
// falls only with a valid output, and precharge waits for Re low.
module tb_plqdi_barrier;
  import plqdi_pkg::*;

  localparam int NTOK = 40;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  int checks[2], failures[2];
  logic done[2];

  for (genvar g = 0; g < 2; g++) begin : g_init
    localparam bit INIT = 1'(g);
    dr_t d, q;
    logic le, re;

    plqdi_barrier #(.INIT_ONE(INIT)) dut (.clk, .rst_n, .step(1'b1), .d, .le, .re, .q);

    initial begin
      logic v;
      checks[g] = 0; failures[g] = 0; done[g] = 1'b0;
      d = DR_NULL; re = 1'b1;
      @(posedge rst_n);
      #1;
      checks[g]++;
      if (q !== dr_enc(INIT) || le !== 1'b1) begin
        failures[g]++; $display("init %0d: no initial token (q=%b le=%b)", g, q, le);
      end
      // Early input while the initial token is still held.
      v = 1'($urandom);
      d <= dr_enc(v);
      repeat (4) @(posedge clk);
      #1;
      checks[g]++;
      if (q !== dr_enc(INIT) || le !== 1'b1) begin
        failures[g]++; $display("init %0d: early input disturbed the initial token", g);
      end
      // Acknowledge the initial token.
      re <= 1'b0;
      @(posedge clk); @(posedge clk); #1;
      checks[g]++;
      if (!dr_null(q)) begin failures[g]++; $display("init %0d: forced token not removed", g); end
      re <= 1'b1;
      for (int n = 0; n < NTOK; n++) begin
        // Output appears one edge after Re high.
        @(posedge clk); @(posedge clk); #1;
        checks[g]++;
        if (q !== dr_enc(v)) begin failures[g]++; $display("init %0d token %0d: q=%b expected %0b", g, n, q, v); end
        @(posedge clk); #1;
        checks[g]++;
        if (le !== 1'b0) begin failures[g]++; $display("init %0d: no acknowledge", g); end
        d <= DR_NULL;
        repeat ($urandom_range(3)) @(posedge clk);
        #1;
        checks[g]++;
        if (q !== dr_enc(v)) begin failures[g]++; $display("init %0d: output dropped before Re", g); end
        re <= 1'b0;
        while (!dr_null(q) || !le) @(posedge clk);
        v = 1'($urandom);
        d <= dr_enc(v);
        re <= 1'b1;
      end
      done[g] = 1'b1;
    end
  end

  task automatic finish(input int extra);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1],
             failures[0] + failures[1] + extra);
    $finish;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1]);
    finish(0);
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    finish(1);
  end
endmodule

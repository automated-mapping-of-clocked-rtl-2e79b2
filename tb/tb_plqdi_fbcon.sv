// tb_plqdi_fbcon: self-checking test of the feedback concentrator with 3,
// 16 and 257 inputs (one C-element, two- and five-level trees).  The inputs behave
// like the Le wires of a gate's readers: they fall one by one in random
// order and at random times, then rise the same way.  Checks: the output
// never moves before the last input has moved, and it follows within one
// edge per tree level (ceil(log4 N) edges).
module tb_plqdi_fbcon;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  localparam int NS[3] = '{3, 16, 257};
  int checks[3], failures[3];
  logic done[3];

  for (genvar g = 0; g < 3; g++) begin : g_n
    localparam int N = NS[g];
    localparam int LAT = (N <= 4) ? 1 : (N <= 16) ? 2 : (N <= 64) ? 3 : (N <= 256) ? 4 : 5;
    logic [N-1:0] in;
    logic out;
    plqdi_fbcon #(.N(N)) dut (.clk, .rst_n, .in, .out);

    initial begin
      checks[g] = 0; failures[g] = 0; done[g] = 1'b0;
      in = '1;
      @(posedge rst_n);
      for (int phase = 0; phase < ((N > 16) ? 6 : 20); phase++) begin
        logic target;
        target = phase[0];
        // Move every input but one, checking the output holds.
        while ($countones(in ^ {N{target}}) > 1) begin
          int k;
          k = $urandom_range(N - 1);
          if (in[k] != target) in[k] <= target;
          @(posedge clk); #1;
          checks[g]++;
          if (out !== ~target) begin failures[g]++; $display("N=%0d: output moved early", N); end
        end
        // Last input.
        for (int k = 0; k < N; k++) if (in[k] != target) in[k] <= target;
        repeat (LAT) @(posedge clk);
        @(posedge clk); #1;
        checks[g]++;
        if (out !== target) begin failures[g]++; $display("N=%0d: output late", N); end
      end
      done[g] = 1'b1;
    end
  end

  task automatic finish(input int extra);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2] + extra);
    $finish;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2]);
    finish(0);
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    finish(1);
  end
endmodule

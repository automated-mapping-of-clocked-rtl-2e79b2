// tb_plqdi_const: self-checking test of both constant generators.  The
// reader acknowledges each word after a random delay.  Checks: null during
// reset; the valid code of VALUE one edge after reset release and one edge
// after every Re high; null one edge after every Re low; the value never
// changes while Re stays high.
module tb_plqdi_const;
  import plqdi_pkg::*;

  localparam int NTOK = 50;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic re;
  dr_t  y1, y0;
  plqdi_const #(.VALUE(1'b1)) u1 (.clk, .rst_n, .step(1'b1), .re, .y(y1));
  plqdi_const #(.VALUE(1'b0)) u0 (.clk, .rst_n, .step(1'b1), .re, .y(y0));

  task automatic expect2(input dr_t e1, input dr_t e0, input string what);
    checks += 2;
    if (y1 !== e1) begin failures++; $display("const1 %s: %b", what, y1); end
    if (y0 !== e0) begin failures++; $display("const0 %s: %b", what, y0); end
  endtask

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    re = 1'b1;
    #1 rst_n = 1'b0;
    @(posedge clk); #1;
    expect2(DR_NULL, DR_NULL, "in reset");
    @(negedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    expect2(DR_ONE, DR_ZERO, "after reset");
    for (int n = 0; n < NTOK; n++) begin
      repeat ($urandom_range(3)) begin
        @(posedge clk); #1;
        expect2(DR_ONE, DR_ZERO, "hold");
      end
      re = 1'b0;
      @(posedge clk); #1;
      expect2(DR_NULL, DR_NULL, "precharge");
      repeat ($urandom_range(2)) @(posedge clk);
      re = 1'b1;
      @(posedge clk); #1;
      expect2(DR_ONE, DR_ZERO, "evaluate");
    end
    finish();
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish();
  end
endmodule

// tb_plqdi_celem: self-checking test of the C-element for 1 to 4 inputs.
// Random input vectors are applied and the output is compared every edge
// with an independent model (rise when all inputs are 1, fall when all are
// 0, hold otherwise, one edge of latency); reset must give 1.
module tb_plqdi_celem;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int rises = 0, falls = 0;

  logic [3:0] in1, in2, in3, in4;
  logic o [4];
  logic m [4];
  plqdi_celem #(.N(1)) c1 (.clk, .rst_n, .in(in1[0:0]), .out(o[0]));
  plqdi_celem #(.N(2)) c2 (.clk, .rst_n, .in(in2[1:0]), .out(o[1]));
  plqdi_celem #(.N(3)) c3 (.clk, .rst_n, .in(in3[2:0]), .out(o[2]));
  plqdi_celem #(.N(4)) c4 (.clk, .rst_n, .in(in4[3:0]), .out(o[3]));

  function automatic logic cm(input logic prev, input logic [3:0] v, input int n);
    logic all1 = 1'b1, all0 = 1'b1;
    for (int i = 0; i < n; i++) begin all1 &= v[i]; all0 &= ~v[i]; end
    return all1 ? 1'b1 : all0 ? 1'b0 : prev;
  endfunction

  task automatic finish();
    checks++;
    if (rises == 0 || falls == 0) begin failures++; $display("output never toggled both ways"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    in1 = '0; in2 = '0; in3 = '0; in4 = '0;
    #1 rst_n = 1'b0;
    #2;
    for (int i = 0; i < 4; i++) begin
      m[i] = 1'b1;
      checks++;
      if (o[i] !== 1'b1) begin failures++; $display("celem %0d: reset value %b", i + 1, o[i]); end
    end
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      // Biased toward all-equal vectors so that both transitions occur.
      in1 <= 4'($urandom); 
      in2 <= ($urandom_range(2) == 0) ? {4{1'($urandom)}} : 4'($urandom);
      in3 <= ($urandom_range(2) == 0) ? {4{1'($urandom)}} : 4'($urandom);
      in4 <= ($urandom_range(2) == 0) ? {4{1'($urandom)}} : 4'($urandom);
      @(posedge clk);
      #1;
      m[0] = cm(m[0], in1, 1);
      m[1] = cm(m[1], in2, 2);
      m[2] = cm(m[2], in3, 3);
      m[3] = cm(m[3], in4, 4);
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (o[i] !== m[i]) begin failures++; $display("celem %0d: got %b expected %b", i + 1, o[i], m[i]); end
      end
    end
    finish();
  end

  logic o4q;
  always @(posedge clk) begin
    o4q <= o[3];
    if (rst_n && o4q === 1'b0 && o[3] === 1'b1) rises++;
    if (rst_n && o4q === 1'b1 && o[3] === 1'b0) falls++;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish();
  end
endmodule

// tb_plqdi_gate: self-checking test of the PCHB through gate for all eight
// library functions.  For every function an environment runs random tokens
// through the four-phase handshake, presenting input a a few edges before
// input b.  Checks per token: the output value; that the output is valid
// before b arrives exactly when a alone decides the function (early
// evaluation); that Le stays high until both inputs are valid; that the
// output needs exactly one edge after the deciding input arrives; that the
// output precharges only after Re goes low and Le stays low until the
// inputs are null.
module tb_plqdi_gate;
  import plqdi_pkg::*;

  localparam int NTOK = 64;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  int checks[8], failures[8], early[8];
  logic done[8];

  function automatic logic fref(input gate_fn_e fn, input logic x, input logic y);
    unique case (fn)
      FN_BUF:   return x;
      FN_INV:   return ~x;
      FN_AND2:  return x & y;
      FN_NAND2: return ~(x & y);
      FN_OR2:   return x | y;
      FN_NOR2:  return ~(x | y);
      FN_XOR2:  return x ^ y;
      default:  return ~(x ^ y);
    endcase
  endfunction

  for (genvar g = 0; g < 8; g++) begin : g_fn
    localparam gate_fn_e FN = gate_fn_e'(g);
    dr_t a, b, y;
    logic le, re;

    plqdi_gate #(.FN(FN)) dut (.clk, .rst_n, .step(1'b1), .a, .b, .le, .re, .y);

    initial begin
      checks[g] = 0; failures[g] = 0; early[g] = 0; done[g] = 1'b0;
      a = DR_NULL; b = DR_NULL; re = 1'b1;
      @(posedge rst_n);
      repeat (2) @(posedge clk);
      for (int n = 0; n < NTOK; n++) begin
        logic va, vb, decided;
        va = 1'($urandom); vb = 1'($urandom);
        decided = fn_is_unary(FN) || (fref(FN, va, 1'b0) == fref(FN, va, 1'b1));
        a <= dr_enc(va);
        @(posedge clk);            // a visible to the gate from here
        @(posedge clk); #1;        // one evaluation edge
        checks[g] += 2;
        if (dr_valid(y) != decided) begin
          failures[g]++; $display("fn %0d: early evaluation %0b, expected %0b", g, dr_valid(y), decided);
        end
        if (!fn_is_unary(FN) && le !== 1'b1) begin
          failures[g]++; $display("fn %0d: Le low before input b", g);
        end
        if (dr_valid(y)) early[g]++;
        repeat (2) @(posedge clk);
        b <= dr_enc(vb);
        // Ack must follow; output must be the function.
        while (le) @(posedge clk);
        #1;
        checks[g]++;
        if (!dr_valid(y) || y.t !== fref(FN, va, vb)) begin
          failures[g]++; $display("fn %0d: %0b,%0b gave %b", g, va, vb, y);
        end
        // Output holds until Re low.
        repeat ($urandom_range(3)) @(posedge clk);
        #1;
        checks[g]++;
        if (!dr_valid(y)) begin failures[g]++; $display("fn %0d: output dropped before Re", g); end
        re <= 1'b0;
        while (dr_valid(y)) @(posedge clk);
        #1;
        checks[g]++;
        if (le !== 1'b0) begin failures[g]++; $display("fn %0d: Le released with inputs valid", g); end
        a <= DR_NULL; b <= DR_NULL;
        re <= 1'b1;
        while (!le) @(posedge clk);
      end
      done[g] = 1'b1;
    end
  end

  task automatic finish(input int extra);
    int c = 0, f = extra;
    for (int g = 0; g < 8; g++) begin c += checks[g]; f += failures[g]; end
    // Early evaluation must have happened for the 2-input functions that
    // allow it (AND/NAND/OR/NOR) and for the unary ones.
    for (int g = 0; g < 6; g++) begin
      c++;
      if (early[g] == 0) begin f++; $display("fn %0d: never evaluated early", g); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5] && done[6] && done[7]);
    finish(0);
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    finish(1);
  end
endmodule

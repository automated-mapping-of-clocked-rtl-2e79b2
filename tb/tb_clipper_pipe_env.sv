// tb_clipper_pipe_env: test environment for the three-stage pipelined
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
// n_nop counts no-operation words that came out of the last stage.
module tb_clipper_pipe_env
  import plqdi_pkg::*;
#(
  parameter int unsigned W    = 64,
  parameter int          NVEC = 1000
) (
  input  logic                  clk,
  input  logic                  rst_n,
  output int                    checks,
  output int                    failures,
  output int                    n_low,
  output int                    n_high,
  output int                    n_pass,
  output int                    n_nop,
  output logic                  done,
  // Pipelined clipper under test.
  output logic [STEP_LANES-1:0] step,
  output dr_t  [W-1:0]          din,
  output dr_t  [1:0]            op,
  input  logic                  in_ack,
  input  dr_t  [W-1:0]          dout,
  input  dr_t                   dvalid,
  output logic                  out_re
);


  localparam int NWORDS = 2 + NVEC + NVEC / 8 + 4;

  initial begin checks = 0; failures = 0; n_low = 0; n_high = 0; n_pass = 0; n_nop = 0; done = 1'b0; end


  function automatic dr_t [W-1:0] enc(input logic [W-1:0] v);
    dr_t [W-1:0] r;
    foreach (r[i]) r[i] = dr_enc(v[i]);
    return r;
  endfunction
  function automatic logic all_valid(input dr_t [W-1:0] v);
    logic ok = 1'b1;
    foreach (v[i]) ok &= dr_valid(v[i]);
    return ok;
  endfunction
  function automatic logic all_null(input dr_t [W-1:0] v);
    logic ok = 1'b1;
    foreach (v[i]) ok &= dr_null(v[i]);
    return ok;
  endfunction
  function automatic logic [W-1:0] dec(input dr_t [W-1:0] v);
    logic [W-1:0] r;
    foreach (v[i]) r[i] = v[i].t;
    return r;
  endfunction
  function automatic logic [W-1:0] rnd15();
    real r;
    r = (real'($urandom) / 4294967296.0) * 30.0 - 15.0;
    return $realtobits(r);
  endfunction
  function automatic logic flt(input logic [W-1:0] a, input logic [W-1:0] b);
    return $bitstoreal(a) < $bitstoreal(b);
  endfunction

  // Input words and operations, in order.
  logic [W-1:0] words [NWORDS];
  logic [1:0]   ops   [NWORDS];
  initial begin
    int k = 2, v = 0;
    words[0] = $realtobits(-5.0); ops[0] = 2'd1;
    words[1] = $realtobits(5.0);  ops[1] = 2'd2;
    while (k < NWORDS) begin
      words[k] = rnd15();
      if (v < NVEC && (k >= NWORDS - 4 - (NVEC - v) || $urandom_range(8) != 0)) begin
        ops[k] = 2'd0; v++;
      end else ops[k] = 2'd3;
      if (k >= NWORDS - 3) ops[k] = 2'd3;
      k++;
    end
  end


  // Gate delays.
  always @(posedge clk) step <= ($urandom_range(7) == 0) ? '1 : STEP_LANES'($urandom);

  // Input process.
  initial begin
    int k = 0;
    din = '0;
    op = '0;
    @(posedge rst_n);
    while (k < NWORDS) begin
      @(posedge clk);
      if ($urandom_range(3) == 0) continue;
      if (in_ack && all_null(din)) begin
        din <= enc(words[k]);
        op  <= '{dr_enc(ops[k][1]), dr_enc(ops[k][0])};
        k++;
      end else if (!in_ack && all_valid(din)) begin
        din <= '0;
        op  <= '0;
      end
    end
  end

  // Output process with the clocked reference model.
  initial begin
    int n = 0, nval = 0;
    logic [W-1:0] lo = '0, hi = '0, x1 = '0, x2 = '0, x3 = '0;
    logic v1 = 1'b0, v2 = 1'b0, v3 = 1'b0;
    out_re = 1'b1;
    @(posedge rst_n);
    while (n < NWORDS) begin
      @(posedge clk);
      if ($urandom_range(3) == 0) continue;
      if (out_re && all_valid(dout) && dr_valid(dvalid)) begin
        checks += 2;
        if (dec(dout) !== x3 || dvalid.t !== v3) begin
          failures++;
          $display("word %0d: got %h/%0b expected %h/%0b", n, dec(dout), dvalid.t, x3, v3);
        end
        // Latency: a DATA word sent as word n-3 must be out now.
        if (n >= 3) begin
          checks++;
          if (dvalid.t !== (ops[n-3] == 2'd0)) begin
            failures++; $display("word %0d: valid flag does not match word %0d", n, n - 3);
          end
          if (ops[n-3] == 2'd3) n_nop++;
          if (ops[n-3] == 2'd0) begin
            real x, e;
            x = $bitstoreal(words[n-3]);
            e = (x < -5.0) ? -5.0 : (x > 5.0) ? 5.0 : x;
            checks++;
            if ($bitstoreal(dec(dout)) != e) begin
              failures++; $display("word %0d: clip(%f) = %f, got %f", n, x, e, $bitstoreal(dec(dout)));
            end
            if (x < -5.0) n_low++; else if (x > 5.0) n_high++; else n_pass++;
            nval++;
          end
        end
        // Clocked model: one clock with input word n.
        x3 = flt(hi, x2) ? hi : x2;  v3 = v2;
        x2 = flt(x1, lo) ? lo : x1;  v2 = v1;
        x1 = words[n];               v1 = (ops[n] == 2'd0);
        if (ops[n] == 2'd1) lo = words[n];
        if (ops[n] == 2'd2) hi = words[n];
        n++;
        out_re <= 1'b0;
      end else if (!out_re && all_null(dout) && dr_null(dvalid)) begin
        out_re <= 1'b1;
      end
    end
    checks += 4;
    if (n_low == 0 || n_high == 0 || n_pass == 0) begin
      failures++; $display("coverage: low %0d high %0d pass %0d", n_low, n_high, n_pass);
    end
    if (nval != NVEC) begin failures++; $display("%0d of %0d values came out", nval, NVEC); end
    $display("%m: clipped low %0d, clipped high %0d, passed %0d", n_low, n_high, n_pass);
    done = 1'b1;
  end

endmodule

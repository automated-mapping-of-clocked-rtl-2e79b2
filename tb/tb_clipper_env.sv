// tb_clipper_env: test environment for the non-pipelined 64-bit clipper
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
module tb_clipper_env
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
  output logic                  done,
  // Clipper under test.
  output logic [STEP_LANES-1:0] step,
  output dr_t  [W-1:0]          din,
  input  logic                  din_ack,
  input  dr_t  [W-1:0]          dout,
  output logic                  dout_re
);


  localparam int NWORDS = 2 + 2 * NVEC + 1;

  initial begin checks = 0; failures = 0; n_low = 0; n_high = 0; n_pass = 0; done = 1'b0; end


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

  // Input words, in order.
  logic [W-1:0] words [NWORDS];
  initial begin
    words[0] = $realtobits(-5.0);
    words[1] = $realtobits(5.0);
    for (int k = 0; k < NVEC; k++) begin
      words[2 + 2*k]     = rnd15();
      words[2 + 2*k + 1] = {$urandom, $urandom};
    end
    words[NWORDS-1] = '0;
  end


  // Gate delays.
  always @(posedge clk) step <= ($urandom_range(7) == 0) ? '1 : STEP_LANES'($urandom);

  // Input process.
  initial begin
    int k = 0;
    din = '0;
    @(posedge rst_n);
    while (k < NWORDS) begin
      @(posedge clk);
      if ($urandom_range(3) == 0) continue;
      if (din_ack && all_null(din)) begin din <= enc(words[k]); k++; end
      else if (!din_ack && all_valid(din)) din <= '0;
    end
  end

  // Output process with the clocked reference model.
  initial begin
    int n = 0;
    logic [1:0] st = 2'd0;
    logic [W-1:0] lo = '0, hi = '0, t = '0, xin = '0;
    dout_re = 1'b1;
    @(posedge rst_n);
    while (n < NWORDS) begin
      @(posedge clk);
      if ($urandom_range(3) == 0) continue;
      if (dout_re && all_valid(dout)) begin
        checks++;
        if (dec(dout) !== t) begin
          failures++;
          $display("word %0d: got %h expected %h", n, dec(dout), t);
        end
        if (n >= 4 && st == 2'd2) begin
          // The previous clock was CMP_HI: dout must be clip(x).
          real x, e;
          x = $bitstoreal(xin);
          e = (x < -5.0) ? -5.0 : (x > 5.0) ? 5.0 : x;
          checks++;
          if ($bitstoreal(dec(dout)) != e) begin
            failures++; $display("word %0d: clip(%f) = %f, got %f", n, x, e, $bitstoreal(dec(dout)));
          end
          if (x < -5.0) n_low++; else if (x > 5.0) n_high++; else n_pass++;
        end
        // Clocked model: one clock with input word n.
        unique case (st)
          2'd0: begin lo = words[n]; st = 2'd1; end
          2'd1: begin hi = words[n]; st = 2'd2; end
          2'd2: begin xin = words[n]; t = flt(words[n], lo) ? lo : words[n]; st = 2'd3; end
          default: begin t = flt(hi, t) ? hi : t; st = 2'd2; end
        endcase
        n++;
        dout_re <= 1'b0;
      end else if (!dout_re && all_null(dout)) begin
        dout_re <= 1'b1;
      end
    end
    checks += 3;
    if (n_low == 0 || n_high == 0 || n_pass == 0) begin
      failures++; $display("coverage: low %0d high %0d pass %0d", n_low, n_high, n_pass);
    end
    $display("%m: clipped low %0d, clipped high %0d, passed %0d", n_low, n_high, n_pass);
    done = 1'b1;
  end

endmodule

// tb_counter_env: four-phase test environment for one PL-QDI counter.
//
// The environment is the usual PL-QDI test arrangement: an input process
// drives a fresh dual-rail cnt_en word whenever the counter's input
// acknowledge is high and returns it to null when the acknowledge goes low;
// an output process waits for all dout bits to be valid, compares the word
// with a clocked reference counter, then drops ext_re, and raises it again
// once all dout bits are null.  Both processes act after random delays, and
// each gate's step bit is random when RANDOM_STEP is set, so the results
// must not depend on any delay.  The reference is the clocked counter:
// word 0 is the reset state, word n = word n-1 + enable word n-1.
module tb_counter_env
  import plqdi_pkg::*;
#(
  parameter int unsigned WIDTH       = 2,
  parameter bit          HAS_EN      = 1'b1,
  parameter bit          RANDOM_STEP = 1'b1,
  parameter int unsigned NWORDS      = 40
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   words,
  output int   en_zero_seen,   // enable words that were 0 (count held)
  output int   wraps,          // counter wrap-arounds observed
  output logic done,
  // Counter under test.
  output logic [4*WIDTH-1:0] step,
  output dr_t                cnt_en,
  input  logic               cnt_en_ack,
  input  dr_t  [WIDTH-1:0]   dout,
  output logic               ext_re
);

  logic [WIDTH-1:0] ref_state;
  logic             en_q[$];   // enable words sent, oldest first

  function automatic logic all_valid(input dr_t [WIDTH-1:0] v);
    logic ok = 1'b1;
    for (int i = 0; i < WIDTH; i++) ok &= dr_valid(v[i]);
    return ok;
  endfunction
  function automatic logic all_null(input dr_t [WIDTH-1:0] v);
    logic ok = 1'b1;
    for (int i = 0; i < WIDTH; i++) ok &= dr_null(v[i]);
    return ok;
  endfunction
  function automatic logic [WIDTH-1:0] decode(input dr_t [WIDTH-1:0] v);
    logic [WIDTH-1:0] r;
    for (int i = 0; i < WIDTH; i++) r[i] = v[i].t;
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step <= '1;
      cnt_en <= DR_NULL;
      ext_re <= 1'b1;
      ref_state <= '0;
      checks <= 0; failures <= 0; words <= 0; en_zero_seen <= 0; wraps <= 0;
      done <= 1'b0;
      en_q.delete();
    end else begin
      step <= RANDOM_STEP ? WIDTH'($urandom) == 0 ? '1 : (4*WIDTH)'({$urandom, $urandom}) : '1;
      // Input process.
      if (HAS_EN && ($urandom_range(3) != 0)) begin
        if (cnt_en_ack && dr_null(cnt_en)) begin
          logic v;
          v = ($urandom_range(3) != 0);
          cnt_en <= dr_enc(v);
          en_q.push_back(v);
        end else if (!cnt_en_ack && dr_valid(cnt_en)) begin
          cnt_en <= DR_NULL;
        end
      end
      // Output process.
      if ($urandom_range(3) != 0 && !done) begin
        if (ext_re && all_valid(dout)) begin
          logic [WIDTH-1:0] got;
          logic             e;
          logic [WIDTH-1:0] exp;
          got = decode(dout);
          // Word n (n >= 1) is word n-1 plus enable word n-1.
          exp = ref_state;
          e   = 1'b0;
          if (words > 0) begin
            if (!HAS_EN) e = 1'b1;
            else if (en_q.size() == 0) begin
              failures <= failures + 1;
              $display("counter W=%0d: output word before its enable word", WIDTH);
            end else e = en_q.pop_front();
            exp = ref_state + WIDTH'(e);
            if (HAS_EN && !e) en_zero_seen <= en_zero_seen + 1;
            if (e && &ref_state) wraps <= wraps + 1;
          end
          checks <= checks + 1;
          if (got !== exp) begin
            failures <= failures + 1;
            $display("counter W=%0d EN=%0d word %0d: got %0d expected %0d",
                     WIDTH, HAS_EN, words, got, exp);
          end
          ref_state <= exp;
          words <= words + 1;
          if (words + 1 == NWORDS) done <= 1'b1;
          ext_re <= 1'b0;
        end else if (!ext_re && all_null(dout)) begin
          ext_re <= 1'b1;
        end
      end
    end
  end

endmodule

// tb_plqdi_top: end-to-end run of the whole evaluation set (plqdi_top at
// its default sizes) under random gate delays.  This is also the full-size
// test: nothing is made smaller than the design's defaults.
//
// All blocks run at the same time, each driven by its own four-phase
// environment:
//   * the four counters by tb_counter_env (2-bit: 40 words, 4-bit: 80
//     words), checked against clocked reference counters;
//   * the 64-bit clipper and the pipelined clipper by tb_clipper_env and
//     tb_clipper_pipe_env with the full workload (bounds -5.0/+5.0, 1000
//     random doubles in [-15, +15]), checked against clocked models and
//     against clip(x) computed with real arithmetic;
//   * the ROM wrapper with the behavioural clocked ROM tb_ucode_rom: random
//     addresses below 160, each data word checked, the first word must be
//     the initial token (all zeros);
//   * both constant generators with a reader that takes a word whenever the
//     output is valid and checks its value.
// Mechanism counters (the test fails if any of them stays at zero):
// counter words, counter wrap-arounds, held counts (enable 0), values
// clipped low / clipped high / passed, pipeline no-operation words, ROM
// reads, ROM initial token, constant-generator words, and early evaluation
// (a gate output going valid while one of its inputs is still null,
// observed on two OR gates of the clipper comparator).
// Interface and timing: no ports; clk has a 10-unit period; reset is held
// for three clocks and released on a falling edge.
module tb_plqdi_top;
  import plqdi_pkg::*;

  localparam int unsigned W  = 64;
  localparam int unsigned AW = 8;
  localparam int unsigned DW = 54;
  localparam int NVEC   = 1000;
  localparam int NROM   = 60;
  localparam int NCONST = 40;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  // ---------------------------------------------------------------- DUT
  logic [7:0]  c2e_step, c2_step;
  logic [15:0] c4e_step, c4_step;
  dr_t         c2e_en, c4e_en, c2_en_nc, c4_en_nc;
  logic        c2e_en_ack, c4e_en_ack;
  dr_t  [1:0]  c2e_dout, c2_dout;
  dr_t  [3:0]  c4e_dout, c4_dout;
  logic        c2e_re, c2_re, c4e_re, c4_re;

  logic [STEP_LANES-1:0] clp_step, cpp_step;
  dr_t  [W-1:0] clp_din, clp_dout, cpp_din, cpp_dout;
  dr_t  [1:0]   cpp_op;
  dr_t          cpp_dvalid;
  logic         clp_din_ack, clp_dout_re, cpp_in_ack, cpp_out_re;

  logic          rom_step, rom_le, rom_re, rom_en;
  dr_t  [AW-1:0] rom_addr_dr;
  dr_t  [DW-1:0] rom_dout;
  logic [AW-1:0] rom_addr;
  logic [DW-1:0] rom_data;

  logic k1_step, k1_re, k0_step, k0_re;
  dr_t  k1_y, k0_y;

  plqdi_top u_top (.*);

  tb_ucode_rom u_rom (.clk, .en(rom_en), .addr(rom_addr), .data(rom_data));

  // --------------------------------------------------------- counters
  int c_checks[4], c_fail[4], c_words[4], c_held[4], c_wraps[4];
  logic c_done[4];

  tb_counter_env #(.WIDTH(2), .HAS_EN(1'b1), .NWORDS(40)) env_c2e (
    .clk, .rst_n, .checks(c_checks[0]), .failures(c_fail[0]), .words(c_words[0]),
    .en_zero_seen(c_held[0]), .wraps(c_wraps[0]), .done(c_done[0]),
    .step(c2e_step), .cnt_en(c2e_en), .cnt_en_ack(c2e_en_ack), .dout(c2e_dout), .ext_re(c2e_re));
  tb_counter_env #(.WIDTH(2), .HAS_EN(1'b0), .NWORDS(40)) env_c2 (
    .clk, .rst_n, .checks(c_checks[1]), .failures(c_fail[1]), .words(c_words[1]),
    .en_zero_seen(c_held[1]), .wraps(c_wraps[1]), .done(c_done[1]),
    .step(c2_step), .cnt_en(c2_en_nc), .cnt_en_ack(1'b1), .dout(c2_dout), .ext_re(c2_re));
  tb_counter_env #(.WIDTH(4), .HAS_EN(1'b1), .NWORDS(80)) env_c4e (
    .clk, .rst_n, .checks(c_checks[2]), .failures(c_fail[2]), .words(c_words[2]),
    .en_zero_seen(c_held[2]), .wraps(c_wraps[2]), .done(c_done[2]),
    .step(c4e_step), .cnt_en(c4e_en), .cnt_en_ack(c4e_en_ack), .dout(c4e_dout), .ext_re(c4e_re));
  tb_counter_env #(.WIDTH(4), .HAS_EN(1'b0), .NWORDS(80)) env_c4 (
    .clk, .rst_n, .checks(c_checks[3]), .failures(c_fail[3]), .words(c_words[3]),
    .en_zero_seen(c_held[3]), .wraps(c_wraps[3]), .done(c_done[3]),
    .step(c4_step), .cnt_en(c4_en_nc), .cnt_en_ack(1'b1), .dout(c4_dout), .ext_re(c4_re));

  // --------------------------------------------------------- clippers
  int clp_checks, clp_fail, clp_low, clp_high, clp_pass;
  int cpp_checks, cpp_fail, cpp_low, cpp_high, cpp_pass, cpp_nop;
  logic clp_done, cpp_done;

  tb_clipper_env #(.W(W), .NVEC(NVEC)) env_clp (
    .clk, .rst_n, .checks(clp_checks), .failures(clp_fail), .n_low(clp_low),
    .n_high(clp_high), .n_pass(clp_pass), .done(clp_done),
    .step(clp_step), .din(clp_din), .din_ack(clp_din_ack), .dout(clp_dout), .dout_re(clp_dout_re));
  tb_clipper_pipe_env #(.W(W), .NVEC(NVEC)) env_cpp (
    .clk, .rst_n, .checks(cpp_checks), .failures(cpp_fail), .n_low(cpp_low),
    .n_high(cpp_high), .n_pass(cpp_pass), .n_nop(cpp_nop), .done(cpp_done),
    .step(cpp_step), .din(cpp_din), .op(cpp_op), .in_ack(cpp_in_ack), .dout(cpp_dout),
    .dvalid(cpp_dvalid), .out_re(cpp_out_re));

  // ------------------------------------------------------ ROM wrapper
  int rom_checks = 0, rom_fail = 0, rom_reads = 0, rom_init_ok = 0;
  logic rom_done = 1'b0;
  logic [AW-1:0] aq[$];

  function automatic logic [DW-1:0] rom_model(input logic [AW-1:0] a);
    logic [63:0] x;
    x = 64'(a) * 64'h9E37_79B9_7F4A_7C15 ^ 64'h0123_4567_89AB_CDEF;
    return DW'(x ^ (x >> 29));
  endfunction

  always @(posedge clk) rom_step <= ($urandom_range(3) != 0);

  initial begin
    rom_addr_dr = '0;
    @(posedge rst_n);
    forever begin
      logic [AW-1:0] a;
      @(posedge clk);
      if ($urandom_range(2) == 0) continue;
      if (rom_le && rom_addr_dr == '0) begin
        a = AW'($urandom_range(159));
        rom_addr_dr <= '0;
        foreach (rom_addr_dr[i]) rom_addr_dr[i] <= dr_enc(a[i]);
        aq.push_back(a);
      end else if (!rom_le && rom_addr_dr != '0) begin
        rom_addr_dr <= '0;
      end
    end
  end

  initial begin
    int n = 0;
    rom_re = 1'b1;
    @(posedge rst_n);
    while (n < NROM) begin
      logic ok;
      logic [DW-1:0] got, exp;
      @(posedge clk);
      if ($urandom_range(2) == 0) continue;
      ok = 1'b1;
      foreach (rom_dout[i]) begin ok &= dr_valid(rom_dout[i]); got[i] = rom_dout[i].t; end
      if (rom_re && ok) begin
        rom_checks++;
        exp = (n == 0) ? '0 : rom_model(aq.pop_front());
        if (got !== exp) begin
          rom_fail++; $display("ROM word %0d: got %h expected %h", n, got, exp);
        end else if (n == 0) rom_init_ok++;
        else rom_reads++;
        n++;
        rom_re <= 1'b0;
      end else if (!rom_re && rom_dout == '0) begin
        rom_re <= 1'b1;
      end
    end
    rom_done = 1'b1;
  end

  // ---------------------------------------------- constant generators
  int k_checks = 0, k_fail = 0, k1_words = 0, k0_words = 0;
  logic k_done = 1'b0;

  always @(posedge clk) begin
    k1_step <= $urandom_range(1);
    k0_step <= $urandom_range(1);
  end

  initial begin
    k1_re = 1'b1; k0_re = 1'b1;
    @(posedge rst_n);
    while (k1_words < NCONST || k0_words < NCONST) begin
      @(posedge clk);
      if (k1_re && dr_valid(k1_y)) begin
        k_checks++;
        if (k1_y !== DR_ONE) begin k_fail++; $display("const 1 gave %b", k1_y); end
        k1_words++; k1_re <= 1'b0;
      end else if (!k1_re && dr_null(k1_y)) k1_re <= 1'b1;
      if (k0_re && dr_valid(k0_y)) begin
        k_checks++;
        if (k0_y !== DR_ZERO) begin k_fail++; $display("const 0 gave %b", k0_y); end
        k0_words++; k0_re <= 1'b0;
      end else if (!k0_re && dr_null(k0_y)) k0_re <= 1'b1;
      if (k1_y.t && k1_y.f || k0_y.t && k0_y.f) begin k_fail++; $display("illegal constant code"); end
    end
    k_done = 1'b1;
  end

  // ------------------------------------------------- early evaluation
  // An OR gate may fire on one input at logic 1 before the other input has
  // arrived; seen here as a valid output next to a null input.
  int early = 0;
  always @(posedge clk) if (rst_n) begin
    if (dr_valid(u_top.u_clipper.u_cmp.u_lt.y) &&
        (dr_null(u_top.u_clipper.u_cmp.u_lt.a) || dr_null(u_top.u_clipper.u_cmp.u_lt.b)))
      early++;
    if (dr_valid(u_top.u_clipper.u_cmp.g_mag[40].g_chain.u_or.y) &&
        (dr_null(u_top.u_clipper.u_cmp.g_mag[40].g_chain.u_or.a) ||
         dr_null(u_top.u_clipper.u_cmp.g_mag[40].g_chain.u_or.b)))
      early++;
  end

  // -------------------------------------------------------- sequencing
  int checks = 0, failures = 0;

  task automatic need(input int count, input string what);
    checks++;
    $display("  %-32s %0d", what, count);
    if (count == 0) begin failures++; $display("  mechanism never seen: %s", what); end
  endtask

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    wait (c_done[0] && c_done[1] && c_done[2] && c_done[3] && clp_done && cpp_done &&
          rom_done && k_done);
    foreach (c_checks[i]) begin checks += c_checks[i]; failures += c_fail[i]; end
    checks += clp_checks + cpp_checks + rom_checks + k_checks;
    failures += clp_fail + cpp_fail + rom_fail + k_fail;
    $display("mechanisms:");
    need(c_words[0], "2-bit counter+en words");
    need(c_words[1], "2-bit counter words");
    need(c_words[2], "4-bit counter+en words");
    need(c_words[3], "4-bit counter words");
    need(c_wraps[0], "2-bit counter+en wraps");
    need(c_wraps[1], "2-bit counter wraps");
    need(c_wraps[2], "4-bit counter+en wraps");
    need(c_wraps[3], "4-bit counter wraps");
    need(c_held[0], "2-bit counter+en held counts");
    need(c_held[2], "4-bit counter+en held counts");
    need(clp_low, "clipper clipped low");
    need(clp_high, "clipper clipped high");
    need(clp_pass, "clipper passed");
    need(cpp_low, "pipelined clipper clipped low");
    need(cpp_high, "pipelined clipper clipped high");
    need(cpp_pass, "pipelined clipper passed");
    need(cpp_nop, "pipelined clipper no-op words");
    need(rom_init_ok, "ROM initial token");
    need(rom_reads, "ROM reads");
    need(k1_words, "constant 1 words");
    need(k0_words, "constant 0 words");
    need(early, "early evaluations");
    finish();
  end

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish();
  end
endmodule

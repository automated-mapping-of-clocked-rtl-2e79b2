// tb_plqdi_rom_wrapper: self-checking test of the ROM wrapper with a
// 160 x 54 ROM model.  The environment sends random dual-rail addresses
// with the four-phase protocol and acknowledges each data word.  Checks:
// the first word after reset is the initial token (INIT_WORD) and no ROM
// read happens before it is acknowledged; every later word is the ROM word
// of the previous address (the wrapper acts as a register stage); with
// every step high, address-complete to data-valid takes exactly three
// edges; the address acknowledge never comes before the data is valid.
module tb_plqdi_rom_wrapper;
  import plqdi_pkg::*;

  localparam int unsigned AW = 8, DW = 54, NTOK = 60;
  localparam logic [DW-1:0] INIT = 54'h2A_5A5A_0F0F_3C3C;

  logic clk = 1'b0, rst_n = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic            step;
  dr_t  [AW-1:0]   addr;
  logic            le, re;
  dr_t  [DW-1:0]   dout;
  logic            rom_en;
  logic [AW-1:0]   rom_addr;
  logic [DW-1:0]   rom_data;

  plqdi_rom_wrapper #(.ADDR_W(AW), .DATA_W(DW), .INIT_WORD(INIT)) dut (.*);
  tb_ucode_rom #(.ADDR_W(AW), .DATA_W(DW), .DEPTH(160)) rom (.clk, .en(rom_en), .addr(rom_addr), .data(rom_data));

  function automatic logic [DW-1:0] model(input logic [AW-1:0] a);
    logic [63:0] x;
    x = 64'(a) * 64'h9E37_79B9_7F4A_7C15 ^ 64'h0123_4567_89AB_CDEF;
    return DW'(x ^ (x >> 29));
  endfunction
  function automatic logic all_valid(input dr_t [DW-1:0] v);
    logic ok = 1'b1;
    foreach (v[i]) ok &= dr_valid(v[i]);
    return ok;
  endfunction
  function automatic logic all_null(input dr_t [DW-1:0] v);
    logic ok = 1'b1;
    foreach (v[i]) ok &= dr_null(v[i]);
    return ok;
  endfunction
  function automatic logic [DW-1:0] dec(input dr_t [DW-1:0] v);
    logic [DW-1:0] r;
    foreach (v[i]) r[i] = v[i].t;
    return r;
  endfunction
  function automatic dr_t [AW-1:0] enc(input logic [AW-1:0] a);
    dr_t [AW-1:0] r;
    foreach (r[i]) r[i] = dr_enc(a[i]);
    return r;
  endfunction

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  logic [AW-1:0] aq[$];
  int reads_before_ack = 0;

  // Address process: fresh address whenever le is high and the bus is null.
  initial begin
    addr = '0;
    @(posedge rst_n);
    forever begin
      logic [AW-1:0] a;
      @(posedge clk);
      if (le && addr == '0) begin
        a = AW'($urandom_range(159));
        repeat ($urandom_range(2)) @(posedge clk);
        addr <= enc(a);
        aq.push_back(a);
      end else if (!le && addr != '0) begin
        addr <= '0;
      end
    end
  end

  // Output process.
  initial begin
    int n = 0;
    logic [DW-1:0] exp;
    step = 1'b1;
    re = 1'b1;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    while (n < NTOK) begin
      @(posedge clk);
      if (re && all_valid(dout)) begin
        checks++;
        if (n == 0) exp = INIT;
        else exp = model(aq.pop_front());
        if (dec(dout) !== exp) begin
          failures++;
          $display("word %0d: got %h expected %h", n, dec(dout), exp);
        end
        n++;
        repeat ($urandom_range(2)) @(posedge clk);
        re <= 1'b0;
      end else if (!re && all_null(dout)) begin
        re <= 1'b1;
      end
    end
    checks++;
    if (reads_before_ack != 0) begin failures++; $display("ROM read before the initial token was taken"); end
    checks++;
    if (lat_n == 0 || lat_bad != 0) begin
      failures++; $display("latency: %0d measured, %0d not three edges", lat_n, lat_bad);
    end
    finish();
  end

  // Monitors: no read while the first token is unacknowledged; le never low
  // without valid data; forward latency of three edges.
  logic first_ack_seen = 1'b0;
  logic le_q = 1'b1;
  int lat_n = 0, lat_bad = 0, cnt = 0;
  logic counting = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (!re) first_ack_seen <= 1'b1;
    if (rom_en && !first_ack_seen) reads_before_ack++;
    le_q <= le;
    if (le_q && !le && !all_valid(dut.q_dom)) begin
      failures++; $display("le low without valid data");
    end
    if (!counting && dut.rd == 0 && first_ack_seen && re && le && addr != '0 && !all_valid(dout)
        && all_valid_a(addr)) begin
      counting <= 1'b1; cnt <= 1;
    end else if (counting) begin
      if (all_valid(dout)) begin
        counting <= 1'b0; lat_n++;
        if (cnt != 3) lat_bad++;
      end else cnt <= cnt + 1;
    end
  end

  function automatic logic all_valid_a(input dr_t [AW-1:0] v);
    logic ok = 1'b1;
    foreach (v[i]) ok &= dr_valid(v[i]);
    return ok;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish();
  end
endmodule

// tb_tone_extractor -- self-checking testbench for tone_extractor.
//
// Loads the 256-entry cos/sin table with random values through the
// address/auto-increment write port, reads a few entries back, then feeds
// random 8-bit samples with random phase errors, valid flags and sample
// gaps.  A behavioural model of the phase accumulator (reloaded at each
// tick unless the hold bit is set) and of the two multiply-accumulators
// predicts the latched cos sum, sin sum and valid count after every tick.
// The run ends with the TB_RESULT line; a watchdog stops a hung run.
`timescale 1ns / 100ps
module tb_tone_extractor;
  logic clk = 1'b0, rst = 1'b1;
  always #2 clk = ~clk;

  logic in_stb = 0, in_v = 0, in_tk = 0, noupd = 0, tadd_we = 0, tval_we = 0;
  logic signed [7:0] in_d = '0;
  logic signed [11:0] in_pe = '0;
  logic [31:0] faz = '0, fazr = '0;
  logic [15:0] wdata = '0, tval_rd;
  logic [35:0] tcos, tsin;
  logic [21:0] tvc;

  tone_extractor dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [15:0] lut [256];
  logic [31:0] phase, rate;
  longint mc, ms, lc, ls;
  int mn, ln, nt;

  task automatic clk1;
    @(posedge clk); #1;
    in_stb = 0; tadd_we = 0; tval_we = 0;
  endtask

  task automatic sample(input bit tk);
    logic [31:0] pn;
    logic [7:0]  a;
    in_stb = 1; in_tk = tk; in_v = ($urandom % 4) != 0;
    in_d = 8'($urandom); in_pe = 12'($urandom);
    pn = (tk && !noupd) ? faz : phase;
    a  = 8'((pn + {in_pe, 20'd0}) >> 24);
    if (tk && !noupd) begin phase = faz + fazr; rate = fazr; end
    else phase = phase + rate;
    if (tk) begin
      lc = mc; ls = ms; ln = mn; mc = 0; ms = 0; mn = 0; nt++;
    end
    if (in_v) begin
      mc += longint'(in_d) * longint'($signed(lut[a][15:8]));
      ms += longint'(in_d) * longint'($signed(lut[a][7:0]));
      mn++;
    end
    clk1;
  endtask

  initial begin
    phase = 0; rate = 0; mc = 0; ms = 0; mn = 0; lc = 0; ls = 0; ln = 0; nt = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // table load: start address 0, then 256 auto-incremented writes
    tadd_we = 1; wdata = 16'd0; clk1;
    for (int i = 0; i < 256; i++) begin
      lut[i] = 16'($urandom);
      tval_we = 1; wdata = lut[i]; clk1;
    end
    for (int i = 0; i < 8; i++) begin
      int a;
      a = $urandom % 256;
      tadd_we = 1; wdata = 16'(a); clk1;
      check(tval_rd == lut[a], "table readback");
    end
    for (int blk = 0; blk < 12; blk++) begin
      faz = $urandom; fazr = $urandom;
      noupd = (blk % 4) == 3;
      sample(1);
      for (int i = 0; i < 200; i++) begin
        sample(0);
        repeat ($urandom % 3) clk1;
      end
      sample(1);
      repeat (4) clk1;
      if (nt > 1) begin
        check(tcos == 36'(lc), "cos sum");
        check(tsin == 36'(ls), "sin sum");
        check(tvc == 22'(ln), "valid count");
      end
      // restart DUT and model together for the next block
      mc = 0; ms = 0; mn = 0; nt = 0;
      repeat (2) clk1;
      rst = 1; clk1; rst = 0; phase = 0; rate = 0;
      tadd_we = 1; wdata = 16'd0; clk1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog");
    $finish;
  end
endmodule

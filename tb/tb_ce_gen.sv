// tb_ce_gen -- checks the clock-enable divider against the divider table.
//
// For a set of divider codes the testbench measures the spacing of the
// enable pulses (expected 2^code clocks, at most 4096 for codes 12..15) and
// checks that a sync pulse forces an enable at once and restarts the count.
module tb_ce_gen;
  timeunit 1ns; timeprecision 100ps;
  logic       clk = 1'b0, rst = 1'b1, sync = 1'b0;
  logic [3:0] div = '0;
  logic       ce;
  int         checks = 0, failures = 0;

  ce_gen dut (.clk(clk), .rst(rst), .div(div), .sync(sync), .ce(ce));

  always #1 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int codes [7] = '{0, 1, 2, 5, 9, 12, 15};
    foreach (codes[c]) begin
      int last, n, period;
      div = 4'(codes[c]);
      period = 1 << ((codes[c] > 12) ? 12 : codes[c]);
      rst = 1'b1;
      @(posedge clk); @(posedge clk);
      rst = 1'b0;
      last = -1; n = 0;
      for (int cyc = 0; cyc < 3 * period + 2; cyc++) begin
        @(negedge clk);
        if (ce) begin
          if (last >= 0) check(cyc - last == period,
                               $sformatf("div %0d: spacing %0d, want %0d", codes[c], cyc - last, period));
          last = cyc; n++;
        end
      end
      check(n >= 3, $sformatf("div %0d: only %0d enables", codes[c], n));
      // sync restarts the count
      if (period > 4) begin
        int since;
        @(negedge clk);
        while (!ce) @(negedge clk);
        repeat (2) @(negedge clk);
        sync = 1'b1;
        #0 check(ce == 1'b1, "sync forces an enable");
        @(negedge clk); sync = 1'b0;
        #0.2 since = 1;
        while (!ce) begin @(negedge clk); since++; end
        check(since == period, $sformatf("after sync: %0d, want %0d", since, period));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

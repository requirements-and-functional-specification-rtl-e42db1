// ce_gen -- decimated clock-enable generator.
//
// Every block after INOUT runs on the 256 MHz clock and marks its actual
// sample rate with a clock enable.  The rate is programmed as a divider code
// (0 => every clock, 1 => every 2nd clock, ... 12 => every 4096th clock; codes
// 13-15 also mean 4096, so that a whole number of the slowest samples fits in
// a 10 ms tick interval).  The code table is the specification's; how the
// enable is phased is this design's choice: a down-counter restarts on `sync`
// (the tick) so that `ce` is high in the cycle of `sync` and every 2^div
// clocks after it.  That keeps all decimated sample grids aligned to the tick.
//
// Interface: clk, rst, div[3:0], sync (tick), ce (one-cycle pulse).
// Timing: combinational from sync to ce; counter state updates on clk.
module ce_gen (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] div,
  input  logic       sync,
  output logic       ce
);
  logic [11:0] cnt;
  logic [11:0] period_m1;

  always_comb begin
    if (div >= 4'd12) period_m1 = 12'hFFF;
    else              period_m1 = 12'((13'd1 << div) - 13'd1);
  end

  assign ce = sync || (cnt == 12'd0);

  always_ff @(posedge clk) begin
    if (rst)       cnt <= '0;
    else if (ce)   cnt <= period_m1;
    else           cnt <= cnt - 12'd1;
  end
endmodule

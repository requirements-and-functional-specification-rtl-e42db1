// tb_inout_io -- self-checking testbench for inout_io.
//
// Drives random wideband data on both input ports (a new word every clock,
// a data tick every TP clocks) and checks, against a cycle model:
//   * the re-timed data and side signals reach the DELAY1 side after two
//     clocks (rising-edge capture) or one clock (falling-edge capture), from
//     port A or port B as selected;
//   * enabled output ports repeat them one clock later, disabled ports stay 0,
//     and the forwarded clock toggles only on an enabled port;
//   * the wire CRC per tick interval, for data wires and side wires, with
//     and without error injection;
//   * the time interval counter in its period modes and the change of the
//     tick-to-tick interval with the STICK delay register;
//   * the STICK width event for a 3-clock pulse but not for a 2-clock one;
//   * the edge comparison events for STICK rises early and late in a clock.
// The run ends with the TB_RESULT line; a watchdog stops a hung run.
`timescale 1ns / 100ps
module tb_inout_io;
  import sbf_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #2 clk = ~clk;

  logic [63:0] idata_a = '0, idata_b = '0;
  logic itick_a = 0, itick_b = 0, ivalid_a = 0, ivalid_b = 0, inoise_a = 0, inoise_b = 0;
  logic iderr_a = 0, iderr_b = 0, idfrm_a = 0, idfrm_b = 0, iclk_a = 0, iclk_b = 0, stick = 0;
  logic sel_b = 0, en_a = 1, en_b = 0, data_edge = 0, stick_edge = 0;
  logic [6:0] esel = '0, dsel = '0;
  logic [15:0] sdly = '0;
  logic [1:0] tmode = 2'b01;
  logic [63:0] odata_a, odata_b, d_data;
  logic otick_a, otick_b, ovalid_a, ovalid_b, onoise_a, onoise_b, oderr_a, oderr_b;
  logic odfrm_a, odfrm_b, oclk_a, oclk_b, d_tick, d_valid, d_noise, d_derr, d_dfrm;
  logic [3:0] mon_crc;
  logic [21:0] mon_tint;
  logic evt_stick_width, evt_stick_match, evt_stick_lead;
  int   n_match = 0, n_lead = 0;
  always @(posedge clk) begin
    if (evt_stick_match) n_match++;
    if (evt_stick_lead)  n_lead++;
  end

  inout_io dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t k=%0d", what, $time, k);
    end
  endtask

  typedef struct packed {
    logic [63:0] data;
    logic tick, valid, noise, derr, dfrm, iclk;
  } w_t;
  w_t hist [$];
  logic [3:0] m_crc, m_mon;
  int k, TP, nt;

  // one clock: check outputs against the model, then drive the next word
  task automatic step(input bit chk, input logic stk_v);
    w_t a, b, s, c;
    int lat;
    bit wb;
    @(posedge clk); #1;
    lat = data_edge ? 1 : 2;
    if (hist.size() > lat + 1) begin
      c = hist[hist.size() - lat];
      if (chk) begin
      check(d_data == c.data && d_tick == c.tick && d_valid == c.valid &&
            d_noise == c.noise && d_derr == c.derr && d_dfrm == c.dfrm, "d side");
      s = hist[hist.size() - lat - 1];
      if (en_a) check({odata_a, otick_a, ovalid_a, onoise_a, oderr_a, odfrm_a} ==
                      {s.data, s.tick, s.valid, s.noise, s.derr, s.dfrm}, "port a");
      else      check({odata_a, otick_a, ovalid_a, onoise_a, oderr_a, odfrm_a, oclk_a} == '0, "port a off");
      if (en_b) check({odata_b, otick_b, ovalid_b, onoise_b, oderr_b, odfrm_b} ==
                      {s.data, s.tick, s.valid, s.noise, s.derr, s.dfrm}, "port b");
      else      check({odata_b, otick_b, ovalid_b, onoise_b, oderr_b, odfrm_b, oclk_b} == '0, "port b off");
      if (nt >= 2) check(mon_crc == m_mon, "crc");
      end
      // model of the CRC register update at the next edge (uses d side now)
      if (dsel[6]) case (dsel[5:0])
        6'd0: wb = c.valid; 6'd1: wb = c.noise; 6'd2: wb = c.derr;
        6'd3: wb = c.dfrm; 6'd4: wb = c.iclk; default: wb = c.data[dsel[5:0]];
      endcase
      else wb = c.data[dsel[5:0]];
      if (esel[6] && esel[5:0] == dsel[5:0]) wb = ~wb;
      if (c.tick) begin nt++; m_mon = m_crc; m_crc = crc4_step(4'd0, wb); end
      else m_crc = crc4_step(m_crc, wb);
    end
    a = {{$urandom, $urandom}, 1'b0, 5'($urandom)};
    b = {{$urandom, $urandom}, 1'b0, 5'($urandom)};
    k++;
    if (k % TP == 0) begin a.tick = 1; b.tick = 1; end
    {idata_a, itick_a, ivalid_a, inoise_a, iderr_a, idfrm_a, iclk_a} = a;
    {idata_b, itick_b, ivalid_b, inoise_b, iderr_b, idfrm_b, iclk_b} = b;
    hist.push_back(sel_b ? b : a);
    if (hist.size() > 8) void'(hist.pop_front());
    stick = stk_v;
  endtask

  task automatic run(input int n);
    nt = 0;   // the register-to-model offset of a select change spans one interval
    for (int i = 0; i < n; i++) step(1, 0);
  endtask

  initial begin
    int t0, t1;
    bit seen;
    k = 0; TP = 37; m_crc = '0; m_mon = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    nt = 0;
    run(4 * TP);                        // port A, data wire 0
    check(mon_tint == 22'(TP), "tick period");
    dsel = 7'd45; esel = 7'd45 | 7'h40;   // error injection on wire 45
    run(4 * TP);
    dsel = 7'h40 | 7'd4; esel = 7'h40 | 7'd9;   // side wire: input clock; injection elsewhere
    run(4 * TP);
    sel_b = 1; en_b = 1; en_a = 0;        // port B in and out
    step(0, 0); step(0, 0); step(0, 0);
    run(4 * TP);
    data_edge = 1; dsel = 7'h40 | 7'd1;   // falling-edge capture, noise wire
    nt = 0; step(0, 0); step(0, 0); step(0, 0);
    run(4 * TP);
    // system tick period mode with STICK pulses every 50 clocks
    tmode = 2'b10;
    for (int r = 0; r < 4; r++) begin
      step(0, 1); step(0, 1);
      for (int i = 0; i < 48; i++) step(0, 0);
    end
    check(mon_tint == 22'd50, "stick period");
    check(!evt_stick_width, "no width event");
    // data tick to system tick; the interval grows by the STICK delay
    tmode = 2'b00;
    for (int d = 0; d < 2; d++) begin
      sdly = d ? 16'd9 : 16'd0;
      for (int r = 0; r < 3; r++) begin
        while (!(hist[hist.size() - 1].tick)) step(0, 0);
        for (int i = 0; i < 5; i++) step(0, 0);
        step(0, 1);
        for (int i = 0; i < 20; i++) step(0, 0);
      end
      if (d == 0) t0 = mon_tint; else t1 = mon_tint;
    end
    check(t1 == t0 + 9, "stick delay");
    // width event: a 3-clock pulse
    seen = 0;
    step(0, 1); step(0, 1); step(0, 1);
    for (int i = 0; i < 4; i++) begin step(0, 0); seen |= evt_stick_width; end
    check(seen, "width event");
    // edge comparison: a STICK rise in the first half of a clock is seen by
    // the falling edge first, one in the second half by both in one clock
    for (int e = 0; e < 2; e++) begin
      stick_edge = e[0];
      repeat (4) step(0, 0);
      n_match = 0; n_lead = 0;
      step(0, 1); step(0, 1);
      repeat (4) step(0, 0);
      check(n_match == 0 && n_lead == (e == 1 ? 1 : 0), "early rise: falling edge first");
      n_match = 0; n_lead = 0;
      @(posedge clk); #3 stick = 1;
      repeat (2) @(posedge clk);
      #3 stick = 0;
      repeat (4) step(0, 0);
      check(n_match == 1 && n_lead == 0, "late rise: both edges together");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog");
    $finish;
  end
endmodule

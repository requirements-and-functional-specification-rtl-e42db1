// tb_delay1 -- checks DELAY1: delay-error frames, the delay model, the
// whole-sample delay line, the tick delay and the phase error.
//
// A background process sends delay-error frames (frame pulse, 20 bits of
// two clocks each, LS bit first, check pattern 0xA in bits 19:16) every 40
// clocks.  Random 64-bit words are written at every clock.  The model
// here works at sample level: with S = D1_DMUX+1 samples of 64/S bits per
// word, the most significant sample of a word being the earliest, the
// output sample at time t must be the input sample at time t - I, where I
// is the model delay plus the delay error, rounded to whole samples.  Checked
// for several delays, sample widths, a delay rate and a tick delay, together
// with the valid rule, D1_DERR / D1_PERR / D1_ODLY at the tick, the status
// events for a bad pattern and a frame at the wrong spacing, the clock
// enable divider and the 3-clock latency.
module tb_delay1;
  timeunit 1ns; timeprecision 100ps;
  localparam int AW = 10;

  logic               clk = 1'b0, rst = 1'b1;
  logic [63:0]        in_data = '0;
  logic               in_tick = 1'b0, in_valid = 1'b1, in_noise = 1'b0, in_derr = 1'b0, in_dfrm = 1'b0;
  logic [3:0]         ddec = '0, dmux = 4'd15;
  logic [47:0]        dly = '0;
  logic [31:0]        dlyr = '0;
  logic [15:0]        depe = 16'h8000;
  logic [12:0]        tdly = '0;
  logic               noupd = 1'b0, vlbi = 1'b0, perr_neg = 1'b0;
  logic               out_ce, out_tick, out_valid, out_noise;
  logic [63:0]        out_data;
  logic signed [11:0] out_pe;
  logic [3:0]         out_frac;
  logic [15:0]        mon_derr;
  logic [11:0]        mon_perr;
  logic [47:0]        mon_odly;
  logic               evt_pattern, evt_dfrm;
  int                 checks = 0, failures = 0;

  delay1 #(.AW(AW)) dut (.clk(clk), .rst(rst), .in_data(in_data), .in_tick(in_tick),
    .in_valid(in_valid), .in_noise(in_noise), .in_derr(in_derr), .in_dfrm(in_dfrm),
    .ddec(ddec), .dmux(dmux), .dly(dly), .dlyr(dlyr), .depe(depe), .tdly(tdly),
    .noupd(noupd), .vlbi(vlbi), .perr_neg(perr_neg), .out_ce(out_ce), .out_data(out_data),
    .out_tick(out_tick), .out_valid(out_valid), .out_noise(out_noise), .out_pe(out_pe),
    .out_frac(out_frac), .mon_derr(mon_derr), .mon_perr(mon_perr), .mon_odly(mon_odly),
    .evt_pattern(evt_pattern), .evt_dfrm(evt_dfrm));

  always #1 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL: %s", what); end
  endtask

  // ---------------- delay error frames ----------------
  logic [15:0] derr_tx = '0;
  logic [3:0]  pat_tx = 4'hA;
  int          gap_tx = 40;
  int          n_pat = 0, n_frm = 0;
  initial begin
    @(negedge clk);
    forever begin
      logic [19:0] f;
      f = {pat_tx, derr_tx};
      for (int b = 0; b < 20; b++) begin
        in_dfrm = (b == 0); in_derr = f[b];
        @(negedge clk); in_dfrm = 1'b0; @(negedge clk);
      end
      repeat (gap_tx - 40) @(negedge clk);
    end
  end
  always @(posedge clk) begin
    if (evt_pattern) n_pat++;
    if (evt_dfrm) n_frm++;
  end

  // ---------------- words and model ----------------
  logic [63:0] words [4096];
  logic        wv [4096];
  int          n = 0;            // ce count
  int          cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [63:0] sample(input longint t, input int s);
    int b; longint w; int slot;
    b = 64 / s;
    w = t / s; slot = s - 1 - int'(t % s);
    return (words[w % 4096] >> (b * slot)) & ((64'd1 << b) - 64'd1);
  endfunction

  typedef struct { logic [63:0] d; logic v; logic tk; int t; bit chk; logic signed [11:0] pe; } exp_t;
  exp_t q [$];
  bit   check_pe = 1'b0;
  bit   quiet = 1'b0;

  always @(negedge clk) begin
    if (!rst && !quiet && out_ce) begin
      exp_t e;
      if (q.size() == 0) check(1'b0, $sformatf("unexpected output at %0d", cyc));
      else begin
        e = q.pop_front();
        check(cyc - e.t == 3, $sformatf("latency %0d", cyc - e.t));
        check(out_tick == e.tk, "tick");
        if (e.chk) begin
          check(out_data == e.d, $sformatf("data %h want %h at %0d", out_data, e.d, e.t));
          check(out_valid == e.v, "valid");
          if (check_pe) check(out_pe == e.pe, $sformatf("pe %0d want %0d", out_pe, e.pe));
        end
      end
    end
  end

  // model state
  longint dm, rm;   // delay model (48-bit), rate
  int     tk_cnt;
  bit     tk_pend;

  task automatic step(input bit tick, input bit chk);
    exp_t e; int s, b, wd; longint tot, isamp, soff;
    logic signed [15:0] de; bit tkd; longint cur_d, resid;
    logic signed [15:0] nerr; longint pp;
    in_data = {$urandom, $urandom};
    in_valid = ($urandom_range(0, 15) != 0);
    in_tick = tick;
    words[n % 4096] = in_data; wv[n % 4096] = in_valid;
    // delayed tick
    tkd = 1'b0;
    if (tick && tdly == 0) tkd = 1'b1;
    else if (tk_pend) begin tk_cnt--; if (tk_cnt == 0) begin tkd = 1'b1; tk_pend = 0; end end
    if (tick && tdly != 0) begin tk_pend = 1; tk_cnt = tdly; end
    cur_d = (tkd && !noupd) ? longint'(dly) : dm;
    if (tkd && !noupd) rm = longint'($signed(dlyr));
    de = dut.derr_w;   // the deserialized error is checked separately below
    tot = (cur_d + (longint'(de) <<< 15) + (longint'(1) << 30)) & ((longint'(1) << 48) - 1);
    isamp = tot >> 31;
    resid = (tot & ((longint'(1) << 31) - 1)) - (longint'(1) << 30);
    nerr = 16'(resid >>> 15);
    pp = (longint'(nerr) * longint'(depe)) >>> 16;
    s = int'(dmux) + 1; b = 64 / s;
    soff = isamp % s; wd = int'(isamp / s);
    e.d = '0;
    for (int i = 0; i < s; i++) begin
      logic [63:0] v;
      v = sample(longint'(s) * n + (s - 1 - i) - isamp, s);
      e.d = e.d | (v << (b * i));
    end
    e.v = wv[(n - wd) % 4096] && (soff == 0 || wv[(n - wd - 1) % 4096]);
    e.tk = tkd; e.t = cyc; e.chk = chk && (n - wd - 1 >= 0);
    e.pe = 12'(pp >>> 4);
    q.push_back(e);
    dm = (cur_d + rm) & ((longint'(1) << 48) - 1);
    n++;
    @(negedge clk);
  endtask

  initial begin
    dm = 0; rm = 0; tk_pend = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // let one frame arrive, then check the deserializer
    derr_tx = 16'h1234;
    repeat (100) step(1'b0, 1'b0);
    check(dut.derr_w == 16'h1234, "delay error deserialized");
    // integer delay of 37 samples, 4-bit samples
    dly = 48'(37) << 31; derr_tx = 16'h0000;
    repeat (100) step(1'b0, 1'b0);
    step(1'b1, 1'b1);
    repeat (200) step(1'b0, 1'b1);
    check(mon_derr == 16'h0000, "D1_DERR at the tick");
    // fractional model delay plus delay error; phase error checked
    dly = (48'(100) << 31) + 48'h0_6000_0000; derr_tx = 16'h3000;
    check_pe = 1'b1;
    repeat (100) step(1'b0, 1'b0);
    step(1'b1, 1'b1);
    repeat (300) step(1'b0, 1'b1);
    check(mon_derr == 16'h3000, "D1_DERR at the tick (2)");
    // 8-bit samples, a delay rate and a tick delay
    dmux = 4'd7; dlyr = 32'h0100_0000; tdly = 13'd5; derr_tx = 16'hE000;
    step(1'b1, 1'b0);
    repeat (600) step(1'b0, 1'b1);
    // whole 64-bit samples, negated phase error
    dmux = 4'd0; dlyr = 32'hFF00_0000; perr_neg = 1'b1; tdly = 13'd0; check_pe = 1'b0;
    step(1'b1, 1'b0);
    repeat (300) step(1'b0, 1'b1);
    // error events
    check(n_pat == 0 && n_frm == 0, "no events while frames are good");
    pat_tx = 4'h5;
    repeat (100) step(1'b0, 1'b0);
    check(n_pat > 0, "pattern error event");
    pat_tx = 4'hA; gap_tx = 44;
    repeat (200) step(1'b0, 1'b0);
    check(n_frm > 0, "frame spacing event");
    quiet = 1'b1;
    check(q.size() == 3, "outputs follow the inputs by three clocks");
    // clock enable divider: D1_DDEC = 2 gives one enable in four clocks
    begin
      int c0, c1;
      quiet = 1'b1;
      ddec = 4'd2;
      repeat (8) @(negedge clk);
      c0 = 0; c1 = 0;
      for (int i = 0; i < 400; i++) begin @(negedge clk); c0++; if (out_ce) c1++; end
      check(c1 == 100, $sformatf("%0d enables in 400 clocks", c1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_format -- self-checking testbench for format.
//
// Feeds random samples into the selected primary path (with gaps between
// strobes, random valid and noise-diode flags and phase errors) and random
// clip flags into the secondary path, under several register settings:
// blanking off and on, sideband flip off and on, different requantizer
// scales and bit counts.  A behavioural model of the whole FORMAT chain
// (RFI blanking with extension, flipper with its every-other-tick restart,
// power meters, requantizer with clipping, state counter, quantized power)
// predicts every output sample (compared in order) and every value latched
// at a tick (compared after the tick has passed through).  The tone
// extractor's valid count is compared with the sum of the power meters'
// valid counts to check its connection.  The run ends with the TB_RESULT
// line; a watchdog stops a hung run.
`timescale 1ns / 100ps
module tb_format;
  import sbf_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #2 clk = ~clk;

  nb_t s_in [4];
  logic [3:0] s_clip = '0, dsel = 4'b0010;
  logic flip_en = 0, flip_sync = 0, noupd = 0, tadd_we = 0, tval_we = 0;
  logic [15:0] blev = 16'h7FFF, blen = '0, qscl = 16'h7FFF, wdata = '0;
  logic [2:0] qbit = 3'd3;
  logic [7:0] qst = 8'd1;
  logic [31:0] tfaz = '0, tfazr = '0;
  logic out_stb, out_v, out_tk;
  logic signed [7:0] out_d, out_pe;
  logic [21:0] ccnt, bcnt, vcf, vcn, qcc, qstc, tvc;
  logic [51:0] pwf, pwn;
  logic [35:0] qpw, tcos, tsin;
  logic [15:0] idata, tval_rd;

  format dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // model state
  typedef struct { int d; bit v, tk; int pe; } o_t;
  o_t oq [$];
  int bl, ph, tkpar;
  longint pf, pn, lpf, lpn;
  int vf, vn, lvf, lvn, ca, lca, ba, lba, qa, lqa, sa, lsa, lidata;
  longint qp, lqp;

  task automatic model(input nb_t x, input bit clipf, input nb_t y);
    int mag, q, lim, fd;
    bit det, blank, rv, c;
    // secondary clip counter
    if (y.tk) begin lca = ca; ca = (clipf && y.v) ? 1 : 0; end
    else if (clipf && y.v) ca++;
    mag = x.d < 0 ? -int'(x.d) : int'(x.d);
    det = blen != 0 && mag > int'(blev);
    blank = det || bl != 0;
    if (det) bl = (bl == 0) ? int'(blen) - 1 : ((bl + int'(blen)) > 65535 ? 65535 : bl + int'(blen));
    else if (bl != 0) bl--;
    if (x.tk) begin lba = ba; ba = (det && x.v) ? 1 : 0; lidata = int'(x.d); end
    else if (det && x.v) ba++;
    rv = x.v && !blank;
    if (x.tk) begin
      if (tkpar == 0) ph = 0;
      tkpar ^= 1;
    end
    fd = (flip_en && ph) ? int'(-x.d) : int'(x.d);
    fd = int'(16'(fd) ^ 16'h8000) - 32768;       // 16-bit wrap
    ph ^= 1;
    if (x.tk) begin
      lpf = pf; lpn = pn; lvf = vf; lvn = vn; pf = 0; pn = 0; vf = 0; vn = 0;
    end
    if (rv) begin
      if (x.nd) begin pn += longint'(x.d) * x.d; vn++; end
      else      begin pf += longint'(x.d) * x.d; vf++; end
    end
    lim = (1 << qbit) - 1;
    q = int'((longint'(fd) * longint'(qscl) + 16384) >>> 15);
    c = 0;
    if (q > lim) begin q = lim; c = 1; end
    else if (q < -lim) begin q = -lim; c = 1; end
    if (x.tk) begin lqa = qa; qa = (c && rv) ? 1 : 0; end
    else if (c && rv) qa++;
    if (x.tk) begin lsa = sa; lqp = qp; sa = 0; qp = 0; end
    if (rv && q == int'($signed(qst))) sa++;
    if (rv) qp += q * q;
    oq.push_back('{q, rv, x.tk, int'(x.pe) >>> 4});
  endtask

  always @(posedge clk) if (!rst && out_stb) begin
    o_t e;
    if (oq.size() == 0) check(0, "unexpected output");
    else begin
      e = oq.pop_front();
      check(int'(out_d) == e.d && out_v == e.v && out_tk == e.tk && int'(out_pe) == e.pe,
            "output sample");
    end
  end

  task automatic clk1;
    @(posedge clk); #1;
    for (int i = 0; i < 4; i++) s_in[i].stb = 0;
  endtask

  task automatic sample(input bit tk, input int amp);
    nb_t x, y;
    bit cf;
    x = '{stb: 1'b1, d: 16'($signed($urandom % (2 * amp + 1)) - amp), v: ($urandom % 8) != 0,
          tk: tk, nd: $urandom % 2, pe: 12'($urandom)};
    y = '{stb: 1'b1, d: 16'($urandom), v: ($urandom % 4) != 0, tk: tk, nd: 1'b0, pe: '0};
    cf = $urandom % 2;
    s_in[dsel[1:0]] = x; s_in[dsel[3:2]] = y; s_clip = '0; s_clip[dsel[3:2]] = cf;
    model(x, cf, y);
    clk1;
    repeat ($urandom % 3) clk1;
  endtask

  task automatic block(input int amp);
    for (int i = 0; i < 150; i++) sample(i == 0, amp);
    sample(1, amp);
    repeat (8) clk1;
    check(ccnt == 22'(lca), "clip count");
    check(bcnt == 22'(lba), "blank detections");
    check(pwf == 52'(lpf) && pwn == 52'(lpn), "power");
    check(vcf == 22'(lvf) && vcn == 22'(lvn), "valid counts");
    check(qcc == 22'(lqa), "quantizer clips");
    check(qstc == 22'(lsa), "state count");
    check(qpw == 36'(lqp), "quantized power");
    check(int'($signed(idata)) == lidata, "idata");
    check(tvc == 22'(lvf + lvn), "tone valid count");
  endtask

  initial begin
    for (int i = 0; i < 4; i++) s_in[i] = NB_IDLE;
    bl = 0; ph = 0; tkpar = 0; pf = 0; pn = 0; vf = 0; vn = 0; ca = 0; ba = 0; qa = 0; sa = 0; qp = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    block(4000);                                   // plain, qbit 3: heavy clipping
    qscl = 16'h0040; qbit = 3'd7;                  // small scale, 8-bit output
    block(32767);
    blen = 16'd5; blev = 16'd20000; qscl = 16'h7FFF; qbit = 3'd2;   // blanking
    block(32768);
    flip_en = 1; blen = 0;                         // sideband flip
    block(3);
    block(3);
    dsel = 4'b1101;                                // other paths
    for (int i = 0; i < 4; i++) s_in[i] = NB_IDLE;
    blen = 16'd3; blev = 16'd10;
    block(20);
    check(oq.size() == 0, "all outputs seen");
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

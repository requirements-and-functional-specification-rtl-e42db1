// tb_stage2_mixer -- checks the STAGE2 phase shifter.
//
// Random cosine and sine tables are written and read back.  A phase and a
// phase rate are set; random samples with ticks and phase errors follow.
// The model here keeps its own 32-bit phase (reloaded at the tick unless
// updates are held), optionally adds the phase error at bits 31:20, looks
// up the tables with the top 10 bits and forms round(d * table / 2^15),
// clipped.  Outputs, the passed phase error (zero when it is used in the
// mixer) and the two-clock latency are compared.
module tb_stage2_mixer;
  timeunit 1ns; timeprecision 100ps;

  logic               clk = 1'b0, rst = 1'b1;
  logic               in_stb = 1'b0, in_v = 1'b0, in_tk = 1'b0, in_nd = 1'b0;
  logic signed [15:0] in_d = '0;
  logic signed [11:0] in_pe = '0;
  logic [31:0]        faz = '0, fazr = '0;
  logic               noupd = 1'b0, use_pe = 1'b0, cos_we = 1'b0, sin_we = 1'b0;
  logic [9:0]         madd = '0;
  logic [15:0]        wdata = '0, cos_rd, sin_rd;
  logic               out_stb, out_v, out_tk, out_nd;
  logic signed [15:0] out_cos, out_sin;
  logic signed [11:0] out_pe;
  int                 checks = 0, failures = 0;

  stage2_mixer dut (.clk(clk), .rst(rst), .in_stb(in_stb), .in_d(in_d), .in_v(in_v),
    .in_tk(in_tk), .in_nd(in_nd), .in_pe(in_pe), .faz(faz), .fazr(fazr), .noupd(noupd),
    .use_pe(use_pe), .madd(madd), .cos_we(cos_we), .sin_we(sin_we), .wdata(wdata),
    .cos_rd(cos_rd), .sin_rd(sin_rd), .out_stb(out_stb), .out_cos(out_cos),
    .out_sin(out_sin), .out_v(out_v), .out_tk(out_tk), .out_nd(out_nd), .out_pe(out_pe));

  always #1 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  logic signed [15:0] ct [1024], st [1024];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  typedef struct { logic signed [15:0] c, s; logic signed [11:0] pe; logic tk; int t; } exp_t;
  exp_t q [$];

  always @(negedge clk) begin
    if (!rst && out_stb) begin
      exp_t e;
      if (q.size() == 0) check(1'b0, "unexpected output");
      else begin
        e = q.pop_front();
        check(out_cos == e.c && out_sin == e.s,
              $sformatf("mix %0d/%0d want %0d/%0d", out_cos, out_sin, e.c, e.s));
        check(out_pe == e.pe && out_tk == e.tk, "side signals");
        check(cyc - e.t == 2, "latency");
      end
    end
  end

  function automatic logic signed [15:0] mq(input logic signed [15:0] x, input logic signed [15:0] c);
    longint p;
    p = (longint'(x) * longint'(c) + 16384) >>> 15;
    if (p > 32767) p = 32767;
    if (p < -32768) p = -32768;
    return 16'(p);
  endfunction

  initial begin
    logic [31:0] ph, rate;
    foreach (ct[i]) begin ct[i] = 16'($urandom); st[i] = 16'($urandom); end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 1024; i++) begin
      madd = 10'(i); wdata = ct[i]; cos_we = 1'b1; @(negedge clk);
      cos_we = 1'b0; wdata = st[i]; sin_we = 1'b1; @(negedge clk);
      sin_we = 1'b0;
    end
    for (int i = 0; i < 1024; i += 37) begin
      madd = 10'(i); #0.2;
      check(cos_rd == ct[i] && sin_rd == st[i], "table read back");
    end
    ph = 0; rate = 0;
    for (int pass = 0; pass < 4; pass++) begin
      faz = $urandom; fazr = $urandom;
      use_pe = pass[0]; noupd = (pass == 3);
      for (int i = 0; i < 500; i++) begin
        exp_t e; logic [31:0] pu;
        @(negedge clk);
        in_stb = ($urandom_range(0, 3) != 0);
        in_d = 16'($urandom); in_v = 1'b1; in_tk = in_stb && (i % 100 == 0);
        in_pe = 12'($urandom); in_nd = 1'b0;
        if (in_stb) begin
          logic [31:0] pn;
          pn = (in_tk && !noupd) ? faz : ph;
          pu = pn + (use_pe ? {in_pe, 20'd0} : 32'd0);
          e.c = mq(in_d, ct[pu[31:22]]); e.s = mq(in_d, st[pu[31:22]]);
          e.pe = use_pe ? 12'sd0 : in_pe; e.tk = in_tk; e.t = cyc;
          q.push_back(e);
          if (in_tk && !noupd) begin ph = faz + fazr; rate = fazr; end
          else ph = ph + rate;
        end
      end
      @(negedge clk); in_stb = 1'b0; in_tk = 1'b0;
      repeat (4) @(negedge clk);
    end
    check(q.size() == 0, "all outputs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

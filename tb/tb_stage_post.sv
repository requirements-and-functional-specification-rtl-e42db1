// tb_stage_post -- checks the common output block of the filter stages.
//
// Random 32-bit filter results and scale factors are driven with random
// validity, ticks and phase errors.  A model computed here from the
// definitions (round((x * scale) / 2^16), clip to +-32767; a sample is
// valid only if it and the VLEN-1 samples before it were valid; tick, noise
// and phase error delayed by FDLY samples) is compared with every output,
// and the two-clock latency is checked.
module tb_stage_post;
  import sbf_pkg::*;
  timeunit 1ns; timeprecision 100ps;

  logic               clk = 1'b0, rst = 1'b1;
  logic               in_stb = 1'b0, in_v = 1'b0, in_tk = 1'b0, in_nd = 1'b0;
  logic signed [31:0] in_x = '0;
  logic signed [11:0] in_pe = '0;
  logic [15:0]        scale = '0;
  logic [9:0]         vlen = '0, fdly = '0;
  nb_t                out;
  logic               clip;
  int                 checks = 0, failures = 0;

  stage_post dut (.clk(clk), .rst(rst), .in_stb(in_stb), .in_x(in_x), .in_v(in_v),
    .in_tk(in_tk), .in_nd(in_nd), .in_pe(in_pe), .scale(scale), .vlen(vlen), .fdly(fdly),
    .out(out), .clip(clip));

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

  // history of inputs for the model
  logic               h_v [4096];
  logic [13:0]        h_side [4096];
  int                 n;
  logic signed [15:0] exp_d [$];
  logic               exp_v [$], exp_c [$];
  logic [13:0]        exp_s [$];
  int                 exp_t [$];
  int                 cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (!rst && out.stb) begin
      logic signed [15:0] d; logic v, c; logic [13:0] s; int t;
      if (exp_d.size() == 0) check(1'b0, "unexpected output");
      else begin
        d = exp_d.pop_front(); v = exp_v.pop_front(); c = exp_c.pop_front();
        s = exp_s.pop_front(); t = exp_t.pop_front();
        check(out.d == d, $sformatf("d %0d want %0d", out.d, d));
        check(out.v == v, "valid");
        check(clip == c, "clip");
        if (s != '1) check({out.tk, out.nd, out.pe} == s, "delayed side signals");
        check(cyc - t == 2, $sformatf("latency %0d", cyc - t));
      end
    end
  end

  task automatic run(input int samples, input int gap);
    for (int i = 0; i < samples; i++) begin
      logic signed [63:0] p, r;
      logic v; int j;
      @(negedge clk);
      in_stb = 1'b1;
      in_x   = $signed($urandom);
      if ($urandom_range(0, 3) == 0) in_x = in_x >>> $urandom_range(8, 24);
      in_v   = ($urandom_range(0, 9) != 0);
      in_tk  = ($urandom_range(0, 15) == 0);
      in_nd  = $urandom_range(0, 1);
      in_pe  = 12'($urandom);
      h_v[n % 4096]    = in_v;
      h_side[n % 4096] = {in_tk, in_nd, in_pe};
      p = 64'(in_x) * 64'($signed({1'b0, scale}));
      r = (p + 64'sd32768) >>> 16;
      exp_c.push_back(r > 32767 || r < -32767);
      if (r > 32767) r = 32767;
      if (r < -32767) r = -32767;
      exp_d.push_back(16'(r));
      v = 1'b1;
      if (vlen != 0) for (j = 0; j < vlen && j <= n; j++) v &= h_v[(n - j) % 4096];
      exp_v.push_back(v);
      exp_s.push_back((n >= fdly) ? h_side[(n - fdly) % 4096] : '1);
      exp_t.push_back(cyc);
      n++;
      if (gap > 0) begin
        @(negedge clk); in_stb = 1'b0;
        repeat (gap - 1) @(negedge clk);
      end
    end
    @(negedge clk); in_stb = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    // several configurations, each after a reset
    for (int cfgn = 0; cfgn < 6; cfgn++) begin
      rst = 1'b1; n = 0;
      scale = (cfgn == 0) ? 16'hFFFF : 16'($urandom);
      vlen  = (cfgn < 2) ? 10'(cfgn) : 10'($urandom_range(2, 12));
      fdly  = (cfgn == 0) ? 10'd0 : 10'($urandom_range(1, 40));
      @(negedge clk); @(negedge clk); rst = 1'b0;
      run(300, cfgn % 3);
    end
    check(exp_d.size() == 0, "all outputs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

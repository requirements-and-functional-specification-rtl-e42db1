// tb_fir32 -- checks the 32-tap look-up-table FIR of STAGE1.
//
// All 16 table entries of the 32 taps are loaded through the product chain
// the way the register interface does it (address fed into the tap line,
// then 32 shifting writes per address), and read back at the chain's end.
// Random 4-bit samples are then filtered and each registered sum is
// compared with the sum of the 32 table entries selected by the last 32
// samples, computed here.
module tb_fir32;
  timeunit 1ns; timeprecision 100ps;
  localparam int NBIT = 12;

  logic            clk = 1'b0, ce = 1'b0, sel = 1'b0, we = 1'b0;
  logic [3:0]      din = '0, mcbi_data = '0;
  logic [NBIT-1:0] product_in = '0, product_out;
  logic signed [NBIT+4:0] sum;
  int              checks = 0, failures = 0;
  logic [NBIT-1:0] tbl [32][16];
  logic [3:0]      hist [32];

  fir32 #(.NBIT(NBIT)) dut (.clk(clk), .ce(ce), .din(din), .mcbi_data(mcbi_data), .sel(sel),
    .we(we), .product_in(product_in), .product_out(product_out), .sum(sum));

  always #1 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    foreach (tbl[t, a]) tbl[t][a] = NBIT'($urandom);
    // load: entry a of tap t receives write number t (first write ends at tap 0)
    for (int a = 0; a < 16; a++) begin
      @(negedge clk); sel = 1'b1; mcbi_data = 4'(a); ce = 1'b1;
      repeat (32) @(negedge clk);
      ce = 1'b0;
      for (int t = 0; t < 32; t++) begin
        product_in = tbl[t][a]; we = 1'b1;
        @(negedge clk);
      end
      we = 1'b0;
      check(product_out == tbl[0][a], $sformatf("read back entry %0d", a));
    end
    sel = 1'b0;
    foreach (hist[t]) hist[t] = 4'd0;
    // fill the line with known samples, then check sums
    for (int i = 0; i < 400; i++) begin
      logic signed [NBIT+4:0] e;
      din = 4'($urandom); ce = 1'b1;
      for (int t = 31; t > 0; t--) hist[t] = hist[t-1];
      hist[0] = din;
      @(negedge clk); ce = 1'b0;
      @(negedge clk);
      e = '0;
      for (int t = 0; t < 32; t++) e += (NBIT+5)'($signed(tbl[t][hist[t]]));
      if (i >= 32) check(sum == e, $sformatf("sum %0d want %0d", sum, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// fir32 -- 32-tap FIR filter on 4-bit samples with look-up-table multipliers.
//
// The building block of STAGE1.  Input samples are only 4 bits wide, so each
// tap "multiplies" by looking up one of 16 precomputed products (coefficient x
// sample value) in its own 16-entry table; the 32 looked-up products are
// summed.  This follows the specification, as does the way the tables are
// loaded: the tables of all taps are joined into one shift chain (product_in
// at tap 31, product_out at tap 0).  To load table entry `a`, the controller
// feeds the value `a` into the tap line as if it were data (select = 1, with
// mcbi_data = a) until all 32 taps hold it, and then every write strobe
// shifts the chain by one position at that entry.  The value at the far end
// (product_out) can be read back.
//
// Interface: ce advances the tap line; din is the crossbar sample, mcbi_data
// the load address, sel chooses between them.  we shifts the product chain.
// Products are NBIT-bit two's complement; sum is NBIT+5 bits.
// Timing: sum is registered, one clock after the taps change.
module fir32 #(
  parameter int NBIT = 12
) (
  input  logic                   clk,
  input  logic                   ce,
  input  logic [3:0]             din,
  input  logic [3:0]             mcbi_data,
  input  logic                   sel,
  input  logic                   we,
  input  logic [NBIT-1:0]        product_in,
  output logic [NBIT-1:0]        product_out,
  output logic signed [NBIT+4:0] sum
);
  logic [3:0]      tap [32];
  logic [NBIT-1:0] lut [32][16];
  logic [NBIT-1:0] prod [32];

  always_comb begin
    for (int t = 0; t < 32; t++) prod[t] = lut[t][tap[t]];
  end
  assign product_out = prod[0];

  always_ff @(posedge clk) begin
    if (ce) begin
      tap[0] <= sel ? mcbi_data : din;
      for (int t = 1; t < 32; t++) tap[t] <= tap[t-1];
    end
  end

  always_ff @(posedge clk) begin
    if (we) begin
      for (int t = 0; t < 31; t++) lut[t][tap[t]] <= prod[t+1];
      lut[31][tap[31]] <= product_in;
    end
  end

  always_ff @(posedge clk) begin
    logic signed [NBIT+4:0] acc;
    acc = '0;
    for (int t = 0; t < 32; t++) acc = acc + (NBIT+5)'($signed(prod[t]));
    sum <= acc;
  end
endmodule

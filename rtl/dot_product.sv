// dot_product: two-stage 8-lane dot-product unit of the multiplication
// sequencer.
//
// Stage 1 multiplies eight pairs of signed 8-bit elements into 16-bit
// products and registers them (lanes with mask=0 give zero). Stage 2 sums
// the eight products in an adder tree and adds the sum to a 32-bit
// accumulator; clear (given with the first pair of a new sum) starts the
// accumulator from zero instead. The products are also brought out for
// element-wise multiplication, where only stage 1 is used.
// Timing: inputs in cycle t; prod/pvalid in t+1; acc/avalid in t+2.
module dot_product
  import rv_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,
  input  logic        clear,
  input  logic [7:0]  mask,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [15:0] prod [VLANES],
  output logic        pvalid,
  output logic [31:0] acc,
  output logic        avalid
);
  logic clear_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pvalid <= 1'b0; clear_q <= 1'b0; avalid <= 1'b0; acc <= '0;
      for (int i = 0; i < VLANES; i++) prod[i] <= '0;
    end else begin
      pvalid  <= valid;
      clear_q <= clear;
      if (valid)
        for (int i = 0; i < VLANES; i++)
          prod[i] <= mask[i] ? 16'($signed(a[8*i +: 8]) * $signed(b[8*i +: 8])) : 16'd0;
      avalid <= pvalid;
      if (pvalid) begin
        logic [31:0] s;
        s = '0;
        for (int i = 0; i < VLANES; i++) s = s + {{16{prod[i][15]}}, prod[i]};
        acc <= (clear_q ? 32'd0 : acc) + s;
      end
    end
  end
endmodule

// vmem_bank: one wrapped scratchpad memory bank (4 KB, 64-bit wide).
//
// Gives one 8-byte access per cycle at any byte address, aligned or not. The
// byte address is split into a floored word address addr[MSB:3] for port A
// and a ceiling word address addr[MSB:3]+1 for port B of a true dual-port RAM;
// addr[2:0] is the shift amount. A read concatenates {rdata_b, rdata_a} to 128
// bits and shifts it right by 8*shift; the low 64 bits are the 8 bytes
// starting at addr. A write shifts wdata left by 8*shift and wstrb left by
// shift: the low halves go to port A, the high halves to port B, so only the
// addressed bytes change. The split, the shifts and the sizes (64-bit words,
// 9-bit word address) follow the wrapped-memory figure; the ceiling address
// wraps at the top of the bank.
// Timing: request in cycle t, rdata valid in cycle t+1 (held until the next
// read).
module vmem_bank
  import rv_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               we,
  input  logic [BANK_BW-1:0] addr,
  input  logic [63:0]        wdata,
  input  logic [7:0]         wstrb,
  output logic [63:0]        rdata
);
  logic [BANK_AW-1:0] addr_a, addr_b;
  logic [2:0]         sh, sh_q;
  logic [127:0]       wd;
  logic [15:0]        be;
  logic [63:0]        ra, rb;

  assign addr_a = addr[BANK_BW-1:3];
  assign addr_b = addr[BANK_BW-1:3] + 1'b1;
  assign sh     = addr[2:0];
  assign wd     = {64'b0, wdata} << (8 * sh);
  assign be     = {8'b0, wstrb} << sh;

  tdp_ram #(.AW(BANK_AW), .DW(64)) u_ram (
    .clk,
    .en_a(en), .we_a(we), .addr_a, .be_a(be[7:0]),  .wdata_a(wd[63:0]),   .rdata_a(ra),
    .en_b(en), .we_b(we), .addr_b, .be_b(be[15:8]), .wdata_b(wd[127:64]), .rdata_b(rb)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sh_q <= '0;
    else if (en && !we) sh_q <= sh;
  end

  logic [127:0] cat;
  assign cat   = {rb, ra} >> (8 * sh_q);
  assign rdata = cat[63:0];
endmodule

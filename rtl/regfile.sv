// regfile: the 32 general-purpose registers.
//
// NREAD combinational read ports and two write ports (the two commit slots).
// x0 always reads zero. The original core used a 4-read 2-write memory; with
// the vector extension two vector instructions may need ten source registers
// in one cycle, so the file is built from registers with NREAD = 10 ports by
// default. When both write ports target the same register in one cycle, port
// 1 (the younger instruction) wins. Writes take effect at the clock edge; a
// read in the same cycle sees the old value (commit-to-dispatch forwarding is
// not needed because the commit buffer still holds the value that cycle).
module regfile
  import rv_pkg::*;
#(
  parameter int NREAD = 2 * NVSRC
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] raddr [NREAD],
  output word_t      rdata [NREAD],
  input  logic       we    [2],
  input  logic [4:0] waddr [2],
  input  word_t      wdata [2]
);
  word_t regs [32];

  for (genvar i = 0; i < NREAD; i++) begin : g_rd
    assign rdata[i] = (raddr[i] == 5'd0) ? '0 : regs[raddr[i]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else begin
      for (int p = 0; p < 2; p++)
        if (we[p] && waddr[p] != 5'd0) regs[waddr[p]] <= wdata[p];
    end
  end
endmodule

// tdp_ram: true dual-port RAM with byte enables, the storage inside each
// scratchpad bank. Two independent ports, each with its own address, write
// enable, byte enables and 64-bit data; reads are synchronous (data one cycle
// after the address) and each port's read data holds while the port is idle
// or writing. Written as an array so an FPGA tool can map it to block RAM.
module tdp_ram #(
  parameter int AW = 9,
  parameter int DW = 64
) (
  input  logic            clk,
  input  logic            en_a, we_a,
  input  logic [AW-1:0]   addr_a,
  input  logic [DW/8-1:0] be_a,
  input  logic [DW-1:0]   wdata_a,
  output logic [DW-1:0]   rdata_a,
  input  logic            en_b, we_b,
  input  logic [AW-1:0]   addr_b,
  input  logic [DW/8-1:0] be_b,
  input  logic [DW-1:0]   wdata_b,
  output logic [DW-1:0]   rdata_b
);
  logic [DW-1:0] mem [1 << AW];

  always_ff @(posedge clk) begin
    if (en_a) begin
      if (we_a) begin
        for (int i = 0; i < DW/8; i++) if (be_a[i]) mem[addr_a][8*i +: 8] <= wdata_a[8*i +: 8];
      end else rdata_a <= mem[addr_a];
    end
    if (en_b) begin
      if (we_b) begin
        for (int i = 0; i < DW/8; i++) if (be_b[i]) mem[addr_b][8*i +: 8] <= wdata_b[8*i +: 8];
      end else rdata_b <= mem[addr_b];
    end
  end
endmodule

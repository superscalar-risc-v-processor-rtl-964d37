// mem_arbiter: fixed-priority arbiter on the shared external memory port.
//
// Three requesters share one 32-bit memory port: the scalar load/store unit
// (highest priority), the vector store sequencer, and the vector load
// sequencer (lowest). In each cycle the highest-priority request is granted
// (gnt, combinational) and put on the memory port; a requester holds its
// request until granted. The memory answers a read one cycle after it is
// issued (mem_rvalid); the arbiter remembers which requester issued it and
// returns rvalid to that one only. The priority order follows the design;
// the handshake is this implementation's.
module mem_arbiter
  import rv_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  ext_req_t m    [3],    // 0 scalar LSU, 1 vector store, 2 vector load
  output logic     gnt  [3],
  output logic     rvalid [3],
  output word_t    rdata,
  output ext_req_t mem,
  input  logic     mem_rvalid,
  input  word_t    mem_rdata
);
  logic [1:0] last;

  always_comb begin
    mem = '0;
    for (int i = 0; i < 3; i++) gnt[i] = 1'b0;
    if (m[0].req)      begin gnt[0] = 1'b1; mem = m[0]; end
    else if (m[1].req) begin gnt[1] = 1'b1; mem = m[1]; end
    else if (m[2].req) begin gnt[2] = 1'b1; mem = m[2]; end
    for (int i = 0; i < 3; i++) rvalid[i] = mem_rvalid && (last == 2'(i));
    rdata = mem_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= 2'd3;
    else if (mem.req && !mem.we) last <= gnt[0] ? 2'd0 : gnt[1] ? 2'd1 : 2'd2;
  end
endmodule

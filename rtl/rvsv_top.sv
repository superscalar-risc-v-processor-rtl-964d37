// rvsv_top: the complete processor, the superscalar RV32IM core with the
// SIMD vector co-processor attached.
//
// The core and the co-processor share the 32 general registers (the core
// reads them for every vector instruction at dispatch) and one 32-bit
// external data memory port. The fixed-priority arbiter gives that port to
// the core's load/store unit first, then the vector store sequencer, then
// the vector load sequencer. The instruction memory has its own 64-bit port
// (a Harvard arrangement): imem_addr selects a 64-bit word, returned in the
// next cycle on imem_rdata. The data port answers a read one cycle after it
// is accepted; the port is taken to accept a request in every cycle.
// Monitor outputs count prediction hits and misses, branch-unit issues and
// retired instructions, plus the stall and vector activity used by tests.
module rvsv_top
  import rv_pkg::*;
#(
  parameter word_t RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [28:0] imem_addr,
  input  logic [63:0] imem_rdata,
  output ext_req_t    mem,
  input  logic        mem_rvalid,
  input  word_t       mem_rdata,
  output logic        prmiss,
  output logic        prscs,
  output logic        brj_issue,
  output logic [1:0]  retired,
  output logic        dp_stall,
  output logic        busy_full_stall,
  output logic        spec_stall,
  output logic        div_active,
  output logic        vec_issue,
  output logic        vec_retire,
  output logic        vec_xcp,
  output logic        arb_conflict
);
  ext_req_t m [3];
  logic     gnt [3], rv [3];
  word_t    rdata;

  logic   vec_valid, vec_ready, vec_rob_clr, vec_idle;
  vinst_t vec_inst;
  rtag_t  vec_rob_clr_tag;

  ss_core #(.RESET_PC(RESET_PC)) u_core (
    .clk, .rst_n, .imem_addr, .imem_rdata,
    .lsu_ext(m[0]), .lsu_gnt(gnt[0]), .lsu_rvalid(rv[0]), .lsu_rdata(rdata),
    .vec_valid, .vec_inst, .vec_ready, .vec_rob_clr, .vec_rob_clr_tag, .vec_idle,
    .prmiss, .prscs, .brj_issue, .retired, .dp_stall, .busy_full_stall, .spec_stall,
    .div_active
  );

  vec_coproc u_vec (
    .clk, .rst_n, .in_valid(vec_valid), .in_inst(vec_inst), .in_ready(vec_ready),
    .rob_clr(vec_rob_clr), .rob_clr_tag(vec_rob_clr_tag), .xcp(vec_xcp), .idle(vec_idle),
    .st_ext(m[1]), .st_gnt(gnt[1]), .ld_ext(m[2]), .ld_gnt(gnt[2]),
    .ld_rvalid(rv[2]), .ld_rdata(rdata)
  );

  mem_arbiter u_arb (
    .clk, .rst_n, .m, .gnt, .rvalid(rv), .rdata, .mem, .mem_rvalid, .mem_rdata
  );

  assign vec_issue    = vec_valid && vec_ready;
  assign vec_retire   = vec_rob_clr;
  assign arb_conflict = (int'(m[0].req) + int'(m[1].req) + int'(m[2].req)) > 1;
endmodule

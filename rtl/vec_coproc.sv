// vec_coproc: the vector co-processor.
//
// Two stages. The instruction board (with the vector decoder and the bank
// renaming table) receives vector instructions from the core's vector
// reservation station, which only sends non-speculative instructions whose
// registers are all read, and issues each to one of four sequencers: vector
// load, vector store, vector (add, greater-than-merge, copy) and
// multiplication (element and scalar multiply, vector-matrix multiply). The
// sequencers reach the four 4 KB wrapped scratchpad banks through six master
// ports and the internal bus multiplexer; the load and store sequencers also
// use the external memory port through the core's arbiter. A finished
// instruction retires from the board and sets the finish bit of its
// commit-buffer entry (rob_clr). Internal addresses are unified: bits
// [29:28] of an address select the bank, the low 12 bits the byte in it.
// resource_status = {load, store, multiply, vector unit busy, bank busy[3:0]}.
module vec_coproc
  import rv_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  vinst_t   in_inst,
  output logic     in_ready,
  output logic     rob_clr,
  output rtag_t    rob_clr_tag,
  output logic     xcp,
  output logic     idle,
  // external memory, vector store (1) and vector load (2) requesters
  output ext_req_t st_ext,
  input  logic     st_gnt,
  output ext_req_t ld_ext,
  input  logic     ld_gnt,
  input  logic     ld_rvalid,
  input  word_t    ld_rdata
);
  logic       iss_valid;
  vinst_t     iss_inst;
  logic [1:0] iss_entry;
  logic [3:0] iss_func, iss_mem;
  logic [2:0] iss_bport [NBANK];
  logic       fin   [4];
  logic [1:0] fin_e [4];
  logic       ubusy [4];
  logic [3:0] bank_busy;
  logic [7:0] status;
  logic       board_idle;

  assign status = {ubusy[FU_LD], ubusy[FU_ST], ubusy[FU_MUL], ubusy[FU_VEC], bank_busy};

  vec_board u_board (
    .clk, .rst_n, .in_valid, .in_inst, .in_ready, .resource_status(status),
    .iss_valid, .iss_inst, .iss_entry, .iss_func, .iss_mem, .iss_bport,
    .fin_valid(fin), .fin_entry(fin_e), .rob_clr, .rob_clr_tag, .xcp, .idle(board_idle)
  );
  assign idle = board_idle;

  bank_req_t   mreq   [NMPORT];
  logic [63:0] mrdata [NMPORT];
  bank_req_t   breq   [NBANK];
  logic [63:0] brdata [NBANK];

  vld_seq u_ld (
    .clk, .rst_n, .start(iss_valid && iss_func[FU_LD]), .inst(iss_inst), .entry(iss_entry),
    .busy(ubusy[FU_LD]), .done(fin[FU_LD]), .done_entry(fin_e[FU_LD]),
    .ext(ld_ext), .ext_gnt(ld_gnt), .ext_rvalid(ld_rvalid), .ext_rdata(ld_rdata),
    .bq(mreq[MP_LD]), .brdata(mrdata[MP_LD])
  );
  vst_seq u_st (
    .clk, .rst_n, .start(iss_valid && iss_func[FU_ST]), .inst(iss_inst), .entry(iss_entry),
    .busy(ubusy[FU_ST]), .done(fin[FU_ST]), .done_entry(fin_e[FU_ST]),
    .ext(st_ext), .ext_gnt(st_gnt),
    .bq(mreq[MP_ST]), .brdata(mrdata[MP_ST])
  );

  bank_req_t   vq [2], mq [2];
  logic [63:0] vr [2], mr [2];
  assign mreq[MP_V0] = vq[0];
  assign mreq[MP_V1] = vq[1];
  assign mreq[MP_M0] = mq[0];
  assign mreq[MP_M1] = mq[1];
  assign vr[0] = mrdata[MP_V0];
  assign vr[1] = mrdata[MP_V1];
  assign mr[0] = mrdata[MP_M0];
  assign mr[1] = mrdata[MP_M1];

  vec_seq u_vec (
    .clk, .rst_n, .start(iss_valid && iss_func[FU_VEC]), .inst(iss_inst), .entry(iss_entry),
    .busy(ubusy[FU_VEC]), .done(fin[FU_VEC]), .done_entry(fin_e[FU_VEC]),
    .bq(vq), .brdata(vr)
  );
  vmul_seq u_mul (
    .clk, .rst_n, .start(iss_valid && iss_func[FU_MUL]), .inst(iss_inst), .entry(iss_entry),
    .busy(ubusy[FU_MUL]), .done(fin[FU_MUL]), .done_entry(fin_e[FU_MUL]),
    .bq(mq), .brdata(mr)
  );

  vbus_mux u_mux (
    .clk, .rst_n, .iss_valid, .iss_mem, .iss_bport, .unit_done(fin),
    .mreq, .mrdata, .breq, .brdata, .bank_busy
  );

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    vmem_bank u_bank (
      .clk, .rst_n, .en(breq[b].en), .we(breq[b].we), .addr(breq[b].addr),
      .wdata(breq[b].wdata), .wstrb(breq[b].wstrb), .rdata(brdata[b])
    );
  end
endmodule

// ss_core: dual-issue out-of-order RV32IM core (Tomasulo scheduling with a
// commit buffer), with the front end of the vector extension.
//
// Six stages:
//  IF  - fetch_unit: two instructions per cycle from a 64-bit instruction
//        memory, next PC from Gshare prediction;
//  ID  - two decoders and the speculation tag generator; the pair is
//        registered into DP;
//  DP  - operands come from the register file (busy counter zero), from the
//        commit buffer (producer finished but not committed) or are left as
//        a renaming tag to catch from the CDB; rd is renamed to the commit
//        buffer entry; the pair enters the commit buffer and its target
//        reservation stations. The pair waits as a whole when the commit
//        buffer, a target station, or a busy counter of its rd is full;
//  RS  - two ALU stations and one MLDV station issue out of order; BRJ,
//        LDST, CSR and vector stations issue in order; LDST, CSR and vector
//        issue only non-speculative instructions;
//  EX  - two ALUs, branch unit, multiply/divide unit, load/store unit, CSR
//        unit; each writes one CDB lane (result + tag, registered);
//  COM - up to two finished instructions retire per cycle into the register
//        file and release their busy counters.
// Branches resolve in order. A hit clears the speculative bit of every
// instruction carrying the branch's tag in the same cycle; a miss removes all
// speculative instructions, restores the renaming file from the branch's
// checkpoint, cuts the commit buffer after the branch and refetches. The
// predictor is updated when the branch executes.
//
// Vector instructions read up to five registers at dispatch and wait in the
// vector station until all are ready and the instruction is no longer
// speculative; they then go to the co-processor (vec_*), which sets the
// finish bit of their commit-buffer entry when it retires them. FENCE waits
// in the load/store unit until the co-processor is idle.
//
// This implementation's own choices: ALU instructions of slot s go to ALU
// station s (8 entries each, 16 in total); the vector station has 4 entries;
// each unit's result is registered before the CDB, so dependent instructions
// issue two cycles apart; traps (ECALL, EBREAK, exceptions) are not taken,
// exceptions are only recorded in the commit buffer.
module ss_core
  import rv_pkg::*;
#(
  parameter word_t RESET_PC  = 32'h0,
  parameter int    ALU_DEPTH = 8,
  parameter int    BRJ_DEPTH = 4,
  parameter int    MUL_DEPTH = 4,
  parameter int    LS_DEPTH  = 4,
  parameter int    CSR_DEPTH = 4,
  parameter int    VEC_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction memory
  output logic [28:0] imem_addr,
  input  logic [63:0] imem_rdata,
  // data memory port (to the arbiter)
  output ext_req_t    lsu_ext,
  input  logic        lsu_gnt,
  input  logic        lsu_rvalid,
  input  word_t       lsu_rdata,
  // vector co-processor
  output logic        vec_valid,
  output vinst_t      vec_inst,
  input  logic        vec_ready,
  input  logic        vec_rob_clr,
  input  rtag_t       vec_rob_clr_tag,
  input  logic        vec_idle,
  // monitors
  output logic        prmiss,
  output logic        prscs,
  output logic        brj_issue,
  output logic [1:0]  retired,
  output logic        dp_stall,
  output logic        busy_full_stall,
  output logic        spec_stall,
  output logic        div_active
);
  localparam int NR = 2 * NVSRC;

  // ------------------------------------------------------------ branch result
  logic  br_q_valid, br_q_miss, br_q_cond, br_q_taken;
  stag_t br_q_btag;
  rtag_t br_q_rob;
  word_t br_q_next, br_q_pc, br_q_target;
  logic [BHRW-1:0] br_q_bhr;
  stag_t branch_tag_done;
  assign prmiss = br_q_valid && br_q_miss;
  assign prscs  = br_q_valid && !br_q_miss;
  assign branch_tag_done = br_q_btag;

  // ------------------------------------------------------------------- IF
  logic  g_valid [2];
  word_t g_pc [2], g_instr [2], g_tgt [2];
  logic  g_pred [2];
  logic [BHRW-1:0] g_bhr;
  logic  id_stall;

  fetch_unit #(.RESET_PC(RESET_PC)) u_if (
    .clk, .rst_n, .imem_addr, .imem_rdata, .stall(id_stall),
    .redirect(prmiss), .redirect_pc(br_q_next),
    .upd_valid(br_q_valid), .upd_cond(br_q_cond), .upd_pc(br_q_pc),
    .upd_taken(br_q_taken), .upd_target(br_q_target), .upd_bhr(br_q_bhr),
    .g_valid, .g_pc, .g_instr, .g_pred, .g_tgt, .g_bhr
  );

  // ------------------------------------------------------------------- ID
  dec_t  id_dec [2];
  decoder u_dec0 (.valid(g_valid[0]), .instr(g_instr[0]), .d(id_dec[0]));
  decoder u_dec1 (.valid(g_valid[1]), .instr(g_instr[1]), .d(id_dec[1]));

  logic  id_isbr [2];
  stag_t id_stag [2], id_btag [2];
  logic  id_spec [2];
  logic  stg_stall, id_adv, dp_hold;
  logic [3:0] br_count;
  assign id_isbr[0] = g_valid[0] && id_dec[0].is_branch;
  assign id_isbr[1] = g_valid[1] && id_dec[1].is_branch;

  spec_tag_gen u_stg (
    .clk, .rst_n, .is_branch(id_isbr), .adv(id_adv), .prmiss, .prscs,
    .branch_tag_done, .spec_tag(id_stag), .spec_bit(id_spec), .btag(id_btag),
    .stall(stg_stall), .count(br_count)
  );

  logic any_gvalid;
  assign any_gvalid = g_valid[0] || g_valid[1];
  assign id_adv     = any_gvalid && !dp_hold && !stg_stall && !prmiss;
  assign id_stall   = any_gvalid && !id_adv;
  assign spec_stall = any_gvalid && stg_stall && !prmiss;

  // ID/DP register
  typedef struct packed {
    logic  valid;
    dec_t  d;
    word_t pc;
    logic  spec;
    stag_t stag;
    stag_t btag;
    logic  pred;
    word_t tgt;
    logic [BHRW-1:0] bhr;
  } dp_t;
  dp_t dp [2];

  logic dp_fire;
  logic dp_any;
  assign dp_any  = dp[0].valid || dp[1].valid;
  assign dp_hold = dp_any && !dp_fire;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp[0] <= '0; dp[1] <= '0;
    end else if (prmiss) begin
      dp[0] <= '0; dp[1] <= '0;
    end else if (!dp_hold) begin
      for (int s = 0; s < 2; s++) begin
        dp[s].valid <= id_adv && g_valid[s];
        dp[s].d     <= id_dec[s];
        dp[s].pc    <= g_pc[s];
        dp[s].spec  <= id_spec[s] && !(prscs && id_stag[s] == branch_tag_done);
        dp[s].stag  <= id_stag[s];
        dp[s].btag  <= id_btag[s];
        dp[s].pred  <= g_pred[s];
        dp[s].tgt   <= g_tgt[s];
        dp[s].bhr   <= g_bhr;
      end
    end else begin
      for (int s = 0; s < 2; s++)
        if (prscs && dp[s].stag == branch_tag_done) dp[s].spec <= 1'b0;
    end
  end

  // ------------------------------------------------------------------- DP
  logic [4:0] src_reg [NR];
  logic       src_use [NR];
  word_t      rf_val  [NR];
  logic       rn_busy [NR];
  rtag_t      rn_tag  [NR];
  logic       rob_fin [NR];
  word_t      rob_res [NR];
  rtag_t      dptr    [2];
  logic [ROBW:0] rob_free;

  for (genvar s = 0; s < 2; s++) begin : g_src
    for (genvar k = 0; k < NVSRC; k++) begin : g_k
      always_comb begin
        if (dp[s].d.target_rs == RS_VEC) begin
          src_reg[s*NVSRC+k] = dp[s].d.vreg[k];
          src_use[s*NVSRC+k] = (dp[s].d.vop == V_MM) || (k < 4);
        end else if (k == 0) begin
          src_reg[s*NVSRC+k] = dp[s].d.rs1;
          src_use[s*NVSRC+k] = dp[s].d.use_rs1;
        end else if (k == 1) begin
          src_reg[s*NVSRC+k] = dp[s].d.rs2;
          src_use[s*NVSRC+k] = dp[s].d.use_rs2;
        end else begin
          src_reg[s*NVSRC+k] = '0;
          src_use[s*NVSRC+k] = 1'b0;
        end
      end
    end
  end

  // resolved operand per source: ready+value or tag
  logic  op_rdy [2][NVSRC];
  word_t op_val [2][NVSRC];
  rtag_t op_tag [2][NVSRC];
  always_comb begin
    for (int s = 0; s < 2; s++)
      for (int k = 0; k < NVSRC; k++) begin
        int i;
        i = s * NVSRC + k;
        op_tag[s][k] = rn_tag[i];
        if (!src_use[i] || src_reg[i] == 5'd0) begin
          op_rdy[s][k] = 1'b1; op_val[s][k] = '0;
        end else if (s == 1 && dp[0].valid && dp[0].d.rd_we && dp[0].d.rd == src_reg[i]) begin
          op_rdy[s][k] = 1'b0; op_val[s][k] = '0; op_tag[s][k] = dptr[0];
        end else if (!rn_busy[i]) begin
          op_rdy[s][k] = 1'b1; op_val[s][k] = rf_val[i];
        end else if (rob_fin[i]) begin
          op_rdy[s][k] = 1'b1; op_val[s][k] = rob_res[i];
        end else begin
          op_rdy[s][k] = 1'b0; op_val[s][k] = '0;
        end
      end
  end

  // per-station operands (operand 0/1) and info
  rs_info_t info [2];
  word_t  o_val [2][2];
  logic   o_rdy [2][2];
  rtag_t  o_tag [2][2];
  logic   dp_spec_eff [2];
  always_comb begin
    for (int s = 0; s < 2; s++) begin
      dp_spec_eff[s] = dp[s].spec && !(prscs && dp[s].stag == branch_tag_done);
      info[s] = '0;
      info[s].op          = dp[s].d.op;
      info[s].dmem_op     = dp[s].d.dmem_op;
      info[s].csr_id      = dp[s].d.csr_id;
      info[s].csr_imm     = dp[s].d.csr_imm;
      info[s].zimm        = dp[s].d.rs1;
      info[s].imm         = dp[s].d.imm;
      info[s].pc          = dp[s].pc;
      info[s].vop         = dp[s].d.vop;
      info[s].pred_taken  = dp[s].pred;
      info[s].pred_target = dp[s].tgt;
      info[s].bhr         = dp[s].bhr;
      info[s].btag        = dp[s].btag;
      for (int k = 0; k < 2; k++) begin
        o_val[s][k] = op_val[s][k]; o_rdy[s][k] = op_rdy[s][k]; o_tag[s][k] = op_tag[s][k];
      end
      if (dp[s].d.src1_pc)  begin o_val[s][0] = dp[s].pc;    o_rdy[s][0] = 1'b1; end
      if (dp[s].d.src2_imm) begin o_val[s][1] = dp[s].d.imm; o_rdy[s][1] = 1'b1; end
      if (dp[s].d.csr_imm)  begin o_val[s][0] = {27'b0, dp[s].d.rs1}; o_rdy[s][0] = 1'b1; end
    end
  end

  // station write enables and resource check
  localparam int NST = 7;  // ALU0 ALU1 BRJ MLDV LDST CSR VEC
  logic st_we [NST][2];
  int   st_free [NST];
  logic rn_full [2];
  always_comb begin
    for (int t = 0; t < NST; t++)
      for (int s = 0; s < 2; s++) st_we[t][s] = 1'b0;
    for (int s = 0; s < 2; s++)
      if (dp[s].valid)
        unique case (dp[s].d.target_rs)
          RS_ALU:  st_we[s][s] = 1'b1;
          RS_BRJ:  st_we[2][s] = 1'b1;
          RS_MLDV: st_we[3][s] = 1'b1;
          RS_LDST: st_we[4][s] = 1'b1;
          RS_CSR:  st_we[5][s] = 1'b1;
          RS_VEC:  st_we[6][s] = 1'b1;
          default: ;
        endcase
  end

  logic res_ok, rd_ok;
  always_comb begin
    res_ok = (int'(rob_free) >= int'(dp[0].valid) + int'(dp[1].valid));
    for (int t = 0; t < NST; t++)
      if (st_free[t] < int'(st_we[t][0]) + int'(st_we[t][1])) res_ok = 1'b0;
    rd_ok = 1'b1;
    for (int s = 0; s < 2; s++)
      if (dp[s].valid && dp[s].d.rd_we && rn_full[s]) rd_ok = 1'b0;
    // both slots writing the same register need two free counts
  end
  assign dp_fire         = dp_any && res_ok && rd_ok && !prmiss;
  assign dp_stall        = dp_any && !dp_fire && !prmiss;
  assign busy_full_stall = dp_any && !rd_ok && !prmiss;

  // ------------------------------------------------------------ rename / RF / ROB
  logic  cm_we [2], cm_valid [2];
  logic [4:0] cm_rd [2];
  word_t cm_data [2], cm_pc [2];
  rtag_t rob_head;
  logic  rn_we [2], rn_br [2];
  logic [4:0] dp_rd [2];
  assign dp_rd[0] = dp[0].d.rd;
  assign dp_rd[1] = dp[1].d.rd;
  for (genvar s = 0; s < 2; s++) begin : g_rnw
    assign rn_we[s] = dp_fire && dp[s].valid && dp[s].d.rd_we;
    assign rn_br[s] = dp_fire && dp[s].valid && dp[s].d.is_branch;
  end
  stag_t dp_btag [2];
  assign dp_btag[0] = dp[0].btag;
  assign dp_btag[1] = dp[1].btag;

  rename_file #(.NREAD(NR)) u_rn (
    .clk, .rst_n, .raddr(src_reg), .rbusy(rn_busy), .rtag(rn_tag),
    .rd(dp_rd), .full(rn_full), .we(rn_we), .wtag(dptr), .br(rn_br), .btag(dp_btag),
    .cm_we, .cm_rd, .prmiss, .prscs, .branch_tag_done
  );

  regfile #(.NREAD(NR)) u_rf (
    .clk, .rst_n, .raddr(src_reg), .rdata(rf_val), .we(cm_we), .waddr(cm_rd), .wdata(cm_data)
  );

  cdb_t cdb [NCDB];
  logic rob_in_valid [2], rob_in_we [2], rob_in_done [2];
  word_t rob_in_pc [2];
  logic ls_xcp;
  rtag_t ls_tag;
  for (genvar s = 0; s < 2; s++) begin : g_robin
    assign rob_in_valid[s] = dp_fire && dp[s].valid;
    assign rob_in_we[s]    = dp[s].d.rd_we;
    assign rob_in_done[s]  = (dp[s].d.target_rs == RS_NONE);
    assign rob_in_pc[s]    = dp[s].pc;
  end

  commit_buffer #(.NREAD(NR)) u_rob (
    .clk, .rst_n, .in_valid(rob_in_valid), .in_pc(rob_in_pc), .in_rd(dp_rd),
    .in_rd_we(rob_in_we), .in_done(rob_in_done), .dptr, .free_cnt(rob_free),
    .cdb, .vclr_valid(vec_rob_clr), .vclr_tag(vec_rob_clr_tag),
    .xcp_valid(ls_xcp), .xcp_tag(ls_tag),
    .rtag(rn_tag), .rfin(rob_fin), .rres(rob_res),
    .cm_we, .cm_rd, .cm_data, .cm_valid, .cm_pc, .head(rob_head),
    .prmiss, .br_tag(br_q_rob)
  );
  assign retired = 2'(cm_valid[0]) + 2'(cm_valid[1]);

  // ------------------------------------------------------------------- RS
  logic     iv [NST];
  logic     irdy [NST];
  rs_info_t iinfo [NST];
  rtag_t    irob [NST];
  word_t    ival [NST][2];
  logic     ispec [NST];
  stag_t    istag [NST];

  logic  rs_in_spec [2];
  stag_t rs_in_stag [2];
  assign rs_in_spec[0] = dp_spec_eff[0];
  assign rs_in_spec[1] = dp_spec_eff[1];
  assign rs_in_stag[0] = dp[0].stag;
  assign rs_in_stag[1] = dp[1].stag;

  for (genvar t = 0; t < 6; t++) begin : g_rs
    localparam int D  = (t < 2) ? ALU_DEPTH : (t == 2) ? BRJ_DEPTH : (t == 3) ? MUL_DEPTH :
                        (t == 4) ? LS_DEPTH : CSR_DEPTH;
    localparam bit IO = (t == 2) || (t == 4) || (t == 5);
    localparam bit NS = (t == 4) || (t == 5);
    logic in_v [2];
    logic [$clog2(D+1)-1:0] fc;
    word_t ov [2];
    assign in_v[0] = dp_fire && st_we[t][0];
    assign in_v[1] = dp_fire && st_we[t][1];
    assign st_free[t] = int'(fc);
    reservation_station #(.DEPTH(D), .NSRC(2), .INORDER(IO), .NOSPEC(NS)) u_rs (
      .clk, .rst_n, .in_valid(in_v), .in_info(info), .in_rob(dptr),
      .in_spec(rs_in_spec), .in_stag(rs_in_stag),
      .in_val(o_val), .in_rdy(o_rdy), .in_tag(o_tag), .free_cnt(fc),
      .cdb, .rob_head, .out_valid(iv[t]), .out_ready(irdy[t]), .out_info(iinfo[t]),
      .out_rob(irob[t]), .out_val(ov), .out_spec(ispec[t]), .out_stag(istag[t]),
      .prmiss, .prscs, .branch_tag_done
    );
    assign ival[t][0] = ov[0];
    assign ival[t][1] = ov[1];
  end

  // vector station: five operands
  logic [$clog2(VEC_DEPTH+1)-1:0] vfc;
  logic vin_v [2];
  word_t vov [NVSRC];
  rs_info_t vinfo;
  rtag_t    vrob;
  logic     vspec_unused;
  stag_t    vstag_unused;
  assign vin_v[0] = dp_fire && st_we[6][0];
  assign vin_v[1] = dp_fire && st_we[6][1];
  assign st_free[6] = int'(vfc);
  reservation_station #(.DEPTH(VEC_DEPTH), .NSRC(NVSRC), .INORDER(1'b1), .NOSPEC(1'b1)) u_rs_vec (
    .clk, .rst_n, .in_valid(vin_v), .in_info(info), .in_rob(dptr),
    .in_spec(rs_in_spec), .in_stag(rs_in_stag),
    .in_val(op_val), .in_rdy(op_rdy), .in_tag(op_tag), .free_cnt(vfc),
    .cdb, .rob_head, .out_valid(vec_valid), .out_ready(vec_ready), .out_info(vinfo),
    .out_rob(vrob), .out_val(vov), .out_spec(vspec_unused), .out_stag(vstag_unused),
    .prmiss, .prscs, .branch_tag_done
  );
  always_comb begin
    vec_inst.vop = vinfo.vop;
    vec_inst.rob = vrob;
    for (int k = 0; k < NVSRC; k++) vec_inst.r[k] = vov[k];
  end

  // ------------------------------------------------------------------- EX
  // two ALUs
  for (genvar a = 0; a < 2; a++) begin : g_alu
    word_t y;
    alu u_alu (.op(alu_op_e'(iinfo[a].op)), .a(ival[a][0]), .b(ival[a][1]), .y);
    assign irdy[a] = 1'b1;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) cdb[a] <= '0;
      else cdb[a] <= '{valid: iv[a], tag: irob[a], data: y};
    end
  end

  // branch unit
  logic  b_taken, b_miss, b_scs, b_xcp;
  word_t b_target, b_next, b_link;
  assign irdy[2]   = 1'b1;
  assign brj_issue = iv[2];
  brj_unit u_brj (
    .valid(iv[2]), .op(br_op_e'(iinfo[2].op)), .a(ival[2][0]), .b(ival[2][1]),
    .pc(iinfo[2].pc), .imm(iinfo[2].imm), .pred_taken(iinfo[2].pred_taken),
    .pred_target(iinfo[2].pred_target), .taken(b_taken), .target(b_target),
    .next_pc(b_next), .link(b_link), .prmiss(b_miss), .prscs(b_scs), .xcp(b_xcp)
  );
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      br_q_valid <= 1'b0; br_q_miss <= 1'b0; br_q_cond <= 1'b0; br_q_taken <= 1'b0;
      br_q_btag <= '0; br_q_rob <= '0; br_q_next <= '0; br_q_pc <= '0; br_q_target <= '0;
      br_q_bhr <= '0; cdb[2] <= '0;
    end else begin
      br_q_valid  <= iv[2];
      br_q_miss   <= b_miss;
      br_q_cond   <= !(iinfo[2].op == BR_JAL || iinfo[2].op == BR_JALR);
      br_q_taken  <= b_taken;
      br_q_btag   <= iinfo[2].btag;
      br_q_rob    <= irob[2];
      br_q_next   <= b_next;
      br_q_pc     <= iinfo[2].pc;
      br_q_target <= b_target;
      br_q_bhr    <= iinfo[2].bhr;
      cdb[2]      <= '{valid: iv[2], tag: irob[2], data: b_link};
    end
  end

  // multiply/divide unit; an in-flight speculative instruction is killed on a miss
  logic  md_ready, md_done, md_busy;
  rtag_t md_tag;
  word_t md_res;
  logic  md_spec;
  stag_t md_stag;
  assign irdy[3] = md_ready;
  assign div_active = md_busy;
  mldv_unit u_md (
    .clk, .rst_n, .start(iv[3] && md_ready), .op(md_op_e'(iinfo[3].op[2:0])),
    .a(ival[3][0]), .b(ival[3][1]), .tag_in(irob[3]), .kill(prmiss && md_spec),
    .ready(md_ready), .busy_div(md_busy), .tag_out(md_tag), .done(md_done), .result(md_res)
  );
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin md_spec <= 1'b0; md_stag <= '0; end
    else if (iv[3] && md_ready) begin md_spec <= ispec[3]; md_stag <= istag[3]; end
    else if (prscs && md_stag == branch_tag_done) md_spec <= 1'b0;
  end
  assign cdb[3] = '{valid: md_done && !(prmiss && md_spec), tag: md_tag, data: md_res};

  // load/store unit
  logic  ls_ready, ls_done;
  word_t ls_res;
  logic  vrs_empty;
  assign vrs_empty = (int'(vfc) == VEC_DEPTH);
  assign irdy[4] = ls_ready;
  ldst_unit u_ls (
    .clk, .rst_n, .start(iv[4] && ls_ready), .op(iinfo[4].dmem_op),
    .base(ival[4][0]), .wval(ival[4][1]), .imm(iinfo[4].imm), .tag_in(irob[4]),
    .vec_idle(vec_idle && vrs_empty && !vec_valid), .ready(ls_ready),
    .req(lsu_ext.req), .we(lsu_ext.we), .addr(lsu_ext.addr), .wdata(lsu_ext.wdata),
    .wstrb(lsu_ext.wstrb), .gnt(lsu_gnt), .rvalid(lsu_rvalid), .rdata(lsu_rdata),
    .done(ls_done), .tag_out(ls_tag), .result(ls_res), .xcp(ls_xcp)
  );
  assign cdb[4] = '{valid: ls_done, tag: ls_tag, data: ls_res};

  // CSR unit
  logic  cs_done;
  rtag_t cs_tag;
  word_t cs_res;
  assign irdy[5] = 1'b1;
  csr_unit u_csr (
    .clk, .rst_n, .start(iv[5]), .op(iinfo[5].op[1:0]), .csr_id(iinfo[5].csr_id),
    .src(ival[5][0]), .tag_in(irob[5]), .retired, .done(cs_done), .tag_out(cs_tag),
    .result(cs_res)
  );
  assign cdb[5] = '{valid: cs_done, tag: cs_tag, data: cs_res};

  assign irdy[6] = vec_ready;
  assign iv[6] = vec_valid;
  assign iinfo[6] = vinfo;
  assign irob[6] = vrob;
  assign ival[6][0] = vov[0];
  assign ival[6][1] = vov[1];
  assign ispec[6] = 1'b0;
  assign istag[6] = '0;
endmodule

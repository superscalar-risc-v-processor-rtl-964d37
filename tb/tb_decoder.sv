// tb_decoder: decodes one instruction of each class (ALU register and
// immediate, LUI/AUIPC, branches, jumps, loads, stores, M extension, CSR,
// FENCE, the three vector formats) and illegal encodings, and checks the
// target station, operation, register fields, immediate and flags.
module tb_decoder;
  import rv_pkg::*;
  `include "rv_asm.svh"
  logic valid; word_t instr; dec_t d;
  decoder dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s (instr %h)", m, instr); end
  endtask
  task automatic put(input word_t w); instr = w; #1; endtask
  initial begin : watchdog
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    valid = 1;
    put(a_addi(5, 6, -3));
    chk(d.target_rs == RS_ALU && d.op == ALU_ADD && d.rd == 5 && d.rs1 == 6 && d.rd_we, "addi fields");
    chk(d.src2_imm && d.imm == -3 && d.use_rs1 && !d.use_rs2 && !d.inv, "addi imm");
    put(a_sub(1, 2, 3));
    chk(d.target_rs == RS_ALU && d.op == ALU_SUB && d.rs2 == 3 && d.use_rs2 && !d.src2_imm, "sub");
    put(32'h4020_d193); // srai x3, x1, 2
    chk(d.op == ALU_SRA && d.imm[4:0] == 2 && !d.inv, "srai");
    put(a_lui(7, 20'hABCDE));
    chk(d.op == ALU_LUI && d.imm == 32'hABCDE000 && d.rd_we, "lui");
    put(32'h0000_1217); // auipc x4, 1
    chk(d.src1_pc && d.imm == 32'h1000 && d.op == ALU_ADD, "auipc");
    put(a_beq(1, 2, -8));
    chk(d.target_rs == RS_BRJ && d.op == BR_BEQ && d.imm == -8 && d.is_branch && !d.rd_we, "beq");
    put(a_bne(1, 2, 2046));
    chk(d.op == BR_BNE && d.imm == 2046, "bne imm");
    put(a_jal(1, -2048));
    chk(d.target_rs == RS_BRJ && d.op == BR_JAL && d.imm == -2048 && d.rd_we && d.is_branch, "jal");
    put(a_jalr(0, 5, 12));
    chk(d.op == BR_JALR && d.imm == 12 && !d.rd_we && d.use_rs1, "jalr rd=x0");
    put(a_lw(3, 4, 100));
    chk(d.target_rs == RS_LDST && !d.dmem_op.store && d.dmem_op.funct3 == 2 && d.imm == 100, "lw");
    put(a_sw(3, 4, -4));
    chk(d.target_rs == RS_LDST && d.dmem_op.store && d.imm == -4 && d.use_rs2 && !d.rd_we, "sw");
    put(a_div(8, 9, 10));
    chk(d.target_rs == RS_MLDV && d.op == MD_DIV && d.rd_we, "div");
    put(a_mul(8, 9, 10));
    chk(d.target_rs == RS_MLDV && d.op == MD_MUL, "mul");
    put(a_csrrs(5, 12'hB00, 0));
    chk(d.target_rs == RS_CSR && d.csr_id == 12'hB00 && d.op == 2 && d.rd_we, "csrrs");
    put(a_fence());
    chk(d.target_rs == RS_LDST && d.dmem_op.fence, "fence");
    put(a_vt(3'd0, 1, 2, 3));
    chk(d.target_rs == RS_VEC && d.vop == V_LOAD && d.vreg[0] == 1 && d.vreg[1] == 2 && d.vreg[2] == 3, "vload");
    put(a_vt(3'd1, 1, 2, 3));
    chk(d.vop == V_STORE, "vstore");
    put(a_va(3'd0, 4, 5, 6, 7));
    chk(d.vop == V_ADD && d.vreg[3] == 7, "vadd");
    put(a_va(3'd3, 4, 5, 6, 7));
    chk(d.vop == V_SMUL, "vsmul");
    put(a_vmm(1, 2, 3, 4, 29));
    chk(d.vop == V_MM && d.vreg[4] == 29 && d.vreg[3] == 4, "vmm");
    put(32'hffff_ffff);
    chk(d.inv && d.target_rs == RS_NONE && !d.rd_we, "illegal opcode");
    put(32'h0000_2063); // branch funct3 2: illegal
    chk(d.inv && !d.is_branch, "illegal branch");
    put(a_addi(0, 1, 5));
    chk(!d.rd_we, "rd x0 never written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

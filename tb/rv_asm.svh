// rv_asm.svh: tiny RV32IM + vector-extension assembler used by the
// testbenches to build programs in memory. Each function returns one 32-bit
// instruction word.
`ifndef RV_ASM_SVH
`define RV_ASM_SVH
function automatic logic [31:0] r_t(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                    logic [2:0] f3, logic [4:0] rd, logic [6:0] opc);
  return {f7, rs2, rs1, f3, rd, opc};
endfunction
function automatic logic [31:0] i_t(int imm, logic [4:0] rs1, logic [2:0] f3, logic [4:0] rd, logic [6:0] opc);
  logic [11:0] i;
  i = imm[11:0];
  return {i, rs1, f3, rd, opc};
endfunction
function automatic logic [31:0] a_addi(int rd, int rs1, int imm); return i_t(imm, rs1[4:0], 3'd0, rd[4:0], 7'h13); endfunction
function automatic logic [31:0] a_add (int rd, int rs1, int rs2); return r_t(7'h00, rs2[4:0], rs1[4:0], 3'd0, rd[4:0], 7'h33); endfunction
function automatic logic [31:0] a_sub (int rd, int rs1, int rs2); return r_t(7'h20, rs2[4:0], rs1[4:0], 3'd0, rd[4:0], 7'h33); endfunction
function automatic logic [31:0] a_mul (int rd, int rs1, int rs2); return r_t(7'h01, rs2[4:0], rs1[4:0], 3'd0, rd[4:0], 7'h33); endfunction
function automatic logic [31:0] a_div (int rd, int rs1, int rs2); return r_t(7'h01, rs2[4:0], rs1[4:0], 3'd4, rd[4:0], 7'h33); endfunction
function automatic logic [31:0] a_rem (int rd, int rs1, int rs2); return r_t(7'h01, rs2[4:0], rs1[4:0], 3'd6, rd[4:0], 7'h33); endfunction
function automatic logic [31:0] a_lui (int rd, int imm20); logic [19:0] u; u = imm20[19:0]; return {u, rd[4:0], 7'h37}; endfunction
function automatic logic [31:0] a_lw  (int rd, int rs1, int imm); return i_t(imm, rs1[4:0], 3'd2, rd[4:0], 7'h03); endfunction
function automatic logic [31:0] a_lb  (int rd, int rs1, int imm); return i_t(imm, rs1[4:0], 3'd0, rd[4:0], 7'h03); endfunction
function automatic logic [31:0] a_sw  (int rs2, int rs1, int imm);
  logic [11:0] i; i = imm[11:0];
  return {i[11:5], rs2[4:0], rs1[4:0], 3'd2, i[4:0], 7'h23};
endfunction
function automatic logic [31:0] a_br(logic [2:0] f3, int rs1, int rs2, int off);
  logic [12:0] o; o = off[12:0];
  return {o[12], o[10:5], rs2[4:0], rs1[4:0], f3, o[4:1], o[11], 7'h63};
endfunction
function automatic logic [31:0] a_beq(int rs1, int rs2, int off); return a_br(3'd0, rs1, rs2, off); endfunction
function automatic logic [31:0] a_bne(int rs1, int rs2, int off); return a_br(3'd1, rs1, rs2, off); endfunction
function automatic logic [31:0] a_jal(int rd, int off);
  logic [20:0] o; o = off[20:0];
  return {o[20], o[10:1], o[11], o[19:12], rd[4:0], 7'h6f};
endfunction
function automatic logic [31:0] a_jalr(int rd, int rs1, int imm); return i_t(imm, rs1[4:0], 3'd0, rd[4:0], 7'h67); endfunction
function automatic logic [31:0] a_csrrs(int rd, int csr, int rs1); return i_t(csr, rs1[4:0], 3'd2, rd[4:0], 7'h73); endfunction
function automatic logic [31:0] a_csrrw(int rd, int csr, int rs1); return i_t(csr, rs1[4:0], 3'd1, rd[4:0], 7'h73); endfunction
function automatic logic [31:0] a_fence(); return 32'h0ff0000f; endfunction
// vector transfer: reg0 [11:7], reg1 [19:15], reg2 [24:20]
function automatic logic [31:0] a_vt(logic [2:0] f3, int r0, int r1, int r2);
  return {7'b0, r2[4:0], r1[4:0], f3, r0[4:0], 7'b0001011};
endfunction
// vector arithmetic: reg3 [29:25]
function automatic logic [31:0] a_va(logic [2:0] f3, int r0, int r1, int r2, int r3);
  return {2'b0, r3[4:0], r2[4:0], r1[4:0], f3, r0[4:0], 7'b0101011};
endfunction
// vector multiply matrix: reg4 = {[31:30],[14:12]}
function automatic logic [31:0] a_vmm(int r0, int r1, int r2, int r3, int r4);
  logic [4:0] q; q = r4[4:0];
  return {q[4:3], r3[4:0], r2[4:0], r1[4:0], q[2:0], r0[4:0], 7'b1011011};
endfunction
// generic forms: loads/stores by funct3, OP-IMM/OP by funct3, CSR by funct3
function automatic logic [31:0] a_ld(logic [2:0] f3, int rd, int rs1, int imm); return i_t(imm, rs1[4:0], f3, rd[4:0], 7'h03); endfunction
function automatic logic [31:0] a_st(logic [2:0] f3, int rs2, int rs1, int imm);
  logic [11:0] i; i = imm[11:0];
  return {i[11:5], rs2[4:0], rs1[4:0], f3, i[4:0], 7'h23};
endfunction
function automatic logic [31:0] a_opi(logic [2:0] f3, int rd, int rs1, int imm); return i_t(imm, rs1[4:0], f3, rd[4:0], 7'h13); endfunction
function automatic logic [31:0] a_op(logic [6:0] f7, logic [2:0] f3, int rd, int rs1, int rs2); return r_t(f7, rs2[4:0], rs1[4:0], f3, rd[4:0], 7'h33); endfunction
function automatic logic [31:0] a_csr(logic [2:0] f3, int rd, int csr, int rs1); return i_t(csr, rs1[4:0], f3, rd[4:0], 7'h73); endfunction
`endif

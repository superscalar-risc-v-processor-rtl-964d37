// decoder: one instruction decoder of the decode stage (the core has two).
//
// Combinational. Turns a 32-bit RV32IM + Zicsr + Zifencei instruction, or one
// of the custom vector instructions, into the fields the later stages use:
// register numbers, immediate and its format, operation code, rd_we,
// target reservation station, memory op, system op, CSR id, is_branch and
// inv (unsupported). Vector instructions (custom_0/1/2) have no destination
// and up to five source registers reg0..reg4, taken from bits [11:7],
// [19:15], [24:20], [29:25] and {[31:30],[14:12]} as the encoding figures
// print them. The vector funct3 values (0..3 in the order load, store, copy,
// scopy and add, gtm, mul, smul) are this implementation's choice.
// FENCE goes to the load/store station as a barrier; FENCE.I, ECALL and EBREAK
// are marked in system_op and complete as no-ops in the CSR unit.
module decoder
  import rv_pkg::*;
(
  input  logic  valid,
  input  word_t instr,
  output dec_t  d
);
  logic [6:0] opc;
  logic [2:0] f3;
  logic [6:0] f7;
  word_t imm_i, imm_s, imm_b, imm_u, imm_j;

  assign opc   = instr[6:0];
  assign f3    = instr[14:12];
  assign f7    = instr[31:25];
  assign imm_i = {{20{instr[31]}}, instr[31:20]};
  assign imm_s = {{20{instr[31]}}, instr[31:25], instr[11:7]};
  assign imm_b = {{19{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
  assign imm_u = {instr[31:12], 12'b0};
  assign imm_j = {{11{instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};

  always_comb begin
    d = '0;
    d.valid     = valid;
    d.rs1       = instr[19:15];
    d.rs2       = instr[24:20];
    d.rd        = instr[11:7];
    d.imm_type  = IMM_NONE;
    d.target_rs = RS_ALU;
    d.vop       = V_NONE;
    d.csr_id    = instr[31:20];
    d.vreg[0]   = instr[11:7];
    d.vreg[1]   = instr[19:15];
    d.vreg[2]   = instr[24:20];
    d.vreg[3]   = instr[29:25];
    d.vreg[4]   = {instr[31:30], instr[14:12]};
    unique case (opc)
      7'b0110111: begin // LUI
        d.rd_we = 1; d.imm = imm_u; d.imm_type = IMM_U; d.src2_imm = 1; d.op = ALU_LUI;
      end
      7'b0010111: begin // AUIPC
        d.rd_we = 1; d.imm = imm_u; d.imm_type = IMM_U; d.src1_pc = 1; d.src2_imm = 1; d.op = ALU_ADD;
      end
      7'b1101111: begin // JAL
        d.rd_we = 1; d.imm = imm_j; d.target_rs = RS_BRJ; d.op = BR_JAL; d.is_branch = 1;
      end
      7'b1100111: begin // JALR
        d.rd_we = 1; d.imm = imm_i; d.imm_type = IMM_I; d.use_rs1 = 1;
        d.target_rs = RS_BRJ; d.op = BR_JALR; d.is_branch = 1; d.inv = (f3 != 0);
      end
      7'b1100011: begin // branches
        d.imm = imm_b; d.use_rs1 = 1; d.use_rs2 = 1; d.target_rs = RS_BRJ;
        d.op = {1'b0, f3}; d.is_branch = 1; d.inv = (f3 == 3'd2) || (f3 == 3'd3);
      end
      7'b0000011: begin // loads
        d.rd_we = 1; d.imm = imm_i; d.imm_type = IMM_I; d.use_rs1 = 1; d.target_rs = RS_LDST;
        d.dmem_op = '{store: 1'b0, fence: 1'b0, funct3: f3};
        d.inv = (f3 == 3'd3) || (f3 == 3'd6) || (f3 == 3'd7);
      end
      7'b0100011: begin // stores
        d.imm = imm_s; d.imm_type = IMM_S; d.use_rs1 = 1; d.use_rs2 = 1; d.target_rs = RS_LDST;
        d.dmem_op = '{store: 1'b1, fence: 1'b0, funct3: f3};
        d.inv = (f3 > 3'd2);
      end
      7'b0010011: begin // OP-IMM
        d.rd_we = 1; d.imm = imm_i; d.imm_type = IMM_I; d.use_rs1 = 1; d.src2_imm = 1;
        unique case (f3)
          3'd0: d.op = ALU_ADD;
          3'd1: begin d.op = ALU_SLL; d.inv = (f7 != 0); end
          3'd2: d.op = ALU_SLT;
          3'd3: d.op = ALU_SLTU;
          3'd4: d.op = ALU_XOR;
          3'd5: begin d.op = instr[30] ? ALU_SRA : ALU_SRL; d.inv = (f7 != 0) && (f7 != 7'h20); end
          3'd6: d.op = ALU_OR;
          default: d.op = ALU_AND;
        endcase
      end
      7'b0110011: begin // OP
        d.rd_we = 1; d.use_rs1 = 1; d.use_rs2 = 1;
        if (f7 == 7'h01) begin
          d.target_rs = RS_MLDV; d.op = {1'b0, f3};
        end else begin
          d.inv = !((f7 == 0) || (f7 == 7'h20 && (f3 == 0 || f3 == 5)));
          unique case (f3)
            3'd0: d.op = instr[30] ? ALU_SUB : ALU_ADD;
            3'd1: d.op = ALU_SLL;
            3'd2: d.op = ALU_SLT;
            3'd3: d.op = ALU_SLTU;
            3'd4: d.op = ALU_XOR;
            3'd5: d.op = instr[30] ? ALU_SRA : ALU_SRL;
            3'd6: d.op = ALU_OR;
            default: d.op = ALU_AND;
          endcase
        end
      end
      7'b0001111: begin // FENCE / FENCE.I
        if (f3 == 3'd1) begin
          d.target_rs = RS_CSR; d.system_op = 2'd1;
        end else begin
          d.target_rs = RS_LDST; d.dmem_op = '{store: 1'b0, fence: 1'b1, funct3: 3'd0};
        end
      end
      7'b1110011: begin // SYSTEM
        d.target_rs = RS_CSR;
        if (f3 == 3'd0) begin
          d.system_op = instr[20] ? 2'd3 : 2'd2;
        end else begin
          d.rd_we   = 1;
          d.op      = {2'b0, f3[1:0]};
          d.csr_imm = f3[2];
          d.use_rs1 = !f3[2];
          d.inv     = (f3[1:0] == 2'd0);
        end
      end
      OPC_CUSTOM0: begin
        d.target_rs = RS_VEC; d.inv = f3[2];
        d.vop = vop_e'({2'b00, f3[1:0]});
      end
      OPC_CUSTOM1: begin
        d.target_rs = RS_VEC; d.inv = f3[2];
        d.vop = vop_e'({2'b01, f3[1:0]});
      end
      OPC_CUSTOM2: begin
        d.target_rs = RS_VEC; d.vop = V_MM;
      end
      default: d.inv = 1;
    endcase
    if (d.inv) begin
      d.target_rs = RS_NONE; d.rd_we = 0; d.is_branch = 0; d.vop = V_NONE;
    end
    if (d.rd == 5'd0) d.rd_we = 0;
  end
endmodule

// vec_decoder: decoder of the vector instruction board.
//
// Combinational. From a vector instruction and its register values it finds
// the scratchpad banks involved (bank = top bits [29:28] of an internal
// address) and produces:
//  * mem_msk  - 4-bit mask of the banks the instruction touches;
//  * func_msk - one-hot function unit, MSB..LSB = load, store, multiply,
//               vector;
//  * wb/wb_bank - whether and which bank it writes;
//  * bport    - for each bank, the internal master port that will drive it;
//  * xcp      - a three-address instruction whose destination bank is not
//               one of its source banks (only two banks may be used).
// Operand layout (reg0..reg4): VLOAD int, size, ext; VSTORE ext, size, int;
// VCOPY dst, size, src; VSCOPY dst, size, scalar; VADD/VGTM/VMUL dst, size,
// srcA, srcB; VSMUL dst, size, srcA, scalar address; VMM dst, in_size,
// srcA (vector), srcB (matrix), out_size. VCOPY/VSCOPY run on the vector unit
// and VMUL/VSMUL/VMM on the multiplication unit; port rule: the bank of srcA
// (or of the only bank) uses port 0 of a two-port unit, the other bank port 1.
module vec_decoder
  import rv_pkg::*;
(
  input  vinst_t     inst,
  output logic [3:0] mem_msk,
  output logic [3:0] func_msk,
  output logic       wb,
  output logic [1:0] wb_bank,
  output logic [2:0] bport [NBANK],
  output logic       xcp
);
  logic [1:0] b0, b2, b3;
  assign b0 = bank_of(inst.r[0]);
  assign b2 = bank_of(inst.r[2]);
  assign b3 = bank_of(inst.r[3]);

  always_comb begin
    logic [2:0] p0, p1;
    p0 = MP_V0; p1 = MP_V1;
    mem_msk = '0; func_msk = '0; wb = 1'b0; wb_bank = b0; xcp = 1'b0;
    for (int b = 0; b < NBANK; b++) bport[b] = MP_LD;
    unique case (inst.vop)
      V_LOAD: begin
        func_msk[FU_LD] = 1; mem_msk[b0] = 1; wb = 1; bport[b0] = MP_LD;
      end
      V_STORE: begin
        func_msk[FU_ST] = 1; mem_msk[b2] = 1; bport[b2] = MP_ST;
      end
      V_COPY: begin
        func_msk[FU_VEC] = 1; mem_msk[b0] = 1; mem_msk[b2] = 1; wb = 1;
        bport[b0] = MP_V1; bport[b2] = MP_V0;
      end
      V_SCOPY: begin
        func_msk[FU_VEC] = 1; mem_msk[b0] = 1; wb = 1; bport[b0] = MP_V0;
      end
      V_ADD, V_GTM, V_MUL, V_SMUL, V_MM: begin
        p0 = MP_V0; p1 = MP_V1;
        if (inst.vop == V_ADD || inst.vop == V_GTM) begin
          func_msk[FU_VEC] = 1; p0 = MP_V0; p1 = MP_V1;
        end else begin
          func_msk[FU_MUL] = 1; p0 = MP_M0; p1 = MP_M1;
        end
        mem_msk[b0] = 1; mem_msk[b2] = 1; mem_msk[b3] = 1; wb = 1;
        bport[b3] = p1; bport[b0] = p1; bport[b2] = p0;
        xcp = (b0 != b2) && (b0 != b3);
      end
      default: xcp = 1'b1;
    endcase
  end
endmodule

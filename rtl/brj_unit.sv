// brj_unit: branch/jump execution unit.
//
// Combinational: resolves one branch or jump per cycle. It computes the
// condition, the real next PC, the link value (PC+4) for JAL/JALR, and
// compares the outcome with the prediction carried from fetch. A miss
// (prmiss) happens when the taken/not-taken outcome differs, or when the
// branch was predicted taken to a wrong target. A hit (prscs) is reported
// otherwise. It also flags a misaligned target (xcp). The update of the
// predictor as soon as the branch finishes in execution follows the design;
// the exact miss rule is this implementation's.
module brj_unit
  import rv_pkg::*;
(
  input  logic   valid,
  input  br_op_e op,
  input  word_t  a,
  input  word_t  b,
  input  word_t  pc,
  input  word_t  imm,
  input  logic   pred_taken,
  input  word_t  pred_target,
  output logic   taken,
  output word_t  target,      // branch/jump target address
  output word_t  next_pc,     // correct next PC
  output word_t  link,
  output logic   prmiss,
  output logic   prscs,
  output logic   xcp
);
  logic cond;
  always_comb begin
    unique case (op)
      BR_BEQ:  cond = (a == b);
      BR_BNE:  cond = (a != b);
      BR_BLT:  cond = $signed(a) < $signed(b);
      BR_BGE:  cond = $signed(a) >= $signed(b);
      BR_BLTU: cond = a < b;
      BR_BGEU: cond = a >= b;
      BR_JAL, BR_JALR: cond = 1'b1;
      default: cond = 1'b0;
    endcase
    taken   = cond;
    target  = (op == BR_JALR) ? ((a + imm) & ~word_t'(1)) : (pc + imm);
    next_pc = taken ? target : pc + 32'd4;
    link    = pc + 32'd4;
    prmiss  = valid && ((taken != pred_taken) || (taken && pred_target != target));
    prscs   = valid && !prmiss;
    xcp     = valid && taken && (target[1:0] != 2'b00);
  end
endmodule

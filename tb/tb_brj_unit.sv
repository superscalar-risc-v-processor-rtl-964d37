// tb_brj_unit: random branches and jumps with random predictions; the
// condition, next PC, link value and hit/miss are checked against a model.
module tb_brj_unit;
  import rv_pkg::*;
  logic valid, pred_taken, taken, prmiss, prscs, xcp;
  br_op_e op; word_t a, b, pc, imm, pred_target, target, next_pc, link;
  brj_unit dut (.*);
  int checks = 0, failures = 0;
  initial begin : watchdog
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    br_op_e ops [8] = '{BR_BEQ, BR_BNE, BR_BLT, BR_BGE, BR_BLTU, BR_BGEU, BR_JAL, BR_JALR};
    for (int i = 0; i < 2000; i++) begin
      logic c; word_t t, n;
      valid = 1; op = ops[$urandom_range(0, 7)];
      a = $urandom; b = (i % 4 == 0) ? a : $urandom;
      pc = {$urandom_range(0, 1 << 20), 2'b00}; imm = {{20{1'b0}}, $urandom_range(0, 4095)} & ~32'h1;
      #1;
      case (op)
        BR_BEQ: c = a == b; BR_BNE: c = a != b;
        BR_BLT: c = $signed(a) < $signed(b); BR_BGE: c = $signed(a) >= $signed(b);
        BR_BLTU: c = a < b; BR_BGEU: c = a >= b; default: c = 1;
      endcase
      t = (op == BR_JALR) ? ((a + imm) & ~32'h1) : pc + imm;
      n = c ? t : pc + 4;
      pred_taken = (i % 3 == 0) ? c : $urandom_range(0, 1);
      pred_target = (i % 5 == 0) ? t + 4 : t;
      #1;
      checks += 4;
      if (taken !== c) begin failures++; $display("FAIL taken op=%0d", op); end
      if (next_pc !== n) begin failures++; $display("FAIL next_pc"); end
      if (link !== pc + 4) begin failures++; $display("FAIL link"); end
      if (prmiss !== ((c != pred_taken) || (c && pred_target != t)) || prscs !== !prmiss) begin
        failures++; $display("FAIL miss/hit");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

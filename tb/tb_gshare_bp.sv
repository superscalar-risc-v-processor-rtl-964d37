// tb_gshare_bp: checks reset state (no BTB hit, so nothing is predicted),
// that a taken branch fills the BTB, that the BHR shifts outcomes in, that the
// two-bit counters saturate and follow the outcomes, that the index is
// PC XOR history, and that a jump sets its counter to strongly taken.
module tb_gshare_bp;
  import rv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  word_t pc [2]; logic pred_taken [2]; word_t pred_target [2]; logic [BHRW-1:0] bhr;
  logic upd_valid, upd_cond, upd_taken; word_t upd_pc, upd_target; logic [BHRW-1:0] upd_bhr;
  gshare_bp dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic upd(input word_t p, input logic cnd, input logic t, input word_t tg);
    @(negedge clk); upd_valid = 1; upd_cond = cnd; upd_pc = p; upd_taken = t; upd_target = tg;
    upd_bhr = bhr;
    @(negedge clk); upd_valid = 0;
  endtask
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic upd_h(input word_t p, input logic t, input logic [BHRW-1:0] h);
    @(negedge clk); upd_valid = 1; upd_cond = 1; upd_pc = p; upd_taken = t; upd_target = 32'h200;
    upd_bhr = h;
    @(negedge clk); upd_valid = 0;
  endtask
  initial begin
    upd_valid = 0; upd_cond = 0; upd_taken = 0; upd_pc = 0; upd_target = 0; upd_bhr = 0;
    pc[0] = 32'h100; pc[1] = 32'h300;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    chk(!pred_taken[0] && !pred_taken[1], "reset: no BTB hit, no prediction");
    chk(bhr == 0, "reset bhr");
    // a jump fills the BTB and does not shift the history
    upd(32'h300, 0, 1, 32'h380); #1;
    chk(bhr == 0, "jump leaves the history");
    chk(pred_taken[1] && pred_target[1] == 32'h380, "jump predicted taken in slot 1");
    chk(!pred_taken[0], "slot 0 still misses the BTB");
    // taken branch at 0x100 with history 0
    upd_h(32'h100, 1, 0); #1;
    chk(bhr == 1, "taken outcome shifted into history");
    chk(pred_taken[0] && pred_target[0] == 32'h200, "untouched weak-taken counter predicts taken");
    // 12 not-taken outcomes at history 0: counter must saturate at 00
    for (int i = 0; i < 12; i++) upd_h(32'h100, 0, 0);
    #1 chk(bhr == 0, "history back to zero");
    chk(!pred_taken[0], "counter saturates at strongly not-taken");
    chk(pred_target[0] == 32'h200, "BTB keeps the target");
    // 14 taken outcomes at history all-ones: counter must saturate at 11
    for (int i = 0; i < 14; i++) upd_h(32'h100, 1, '1);
    #1 chk(bhr == '1, "history all ones");
    chk(pred_taken[0], "counter saturates at strongly taken");
    // a not-taken outcome at the index the next lookup uses: 10 -> 01
    upd_h(32'h100, 0, {{(BHRW-1){1'b1}}, 1'b0}); #1;
    chk(bhr == {{(BHRW-1){1'b1}}, 1'b0}, "not-taken shifted in");
    chk(!pred_taken[0], "weak taken moves to weak not-taken");
    upd_h(32'h100, 0, {{(BHRW-2){1'b1}}, 2'b00}); #1;
    chk(!pred_taken[0], "second fresh index also moves to not-taken");
    // a different PC mapping to the same BTB entry replaces it (tag compare)
    upd(32'h100 + 32'h1000, 0, 1, 32'h700); #1;
    chk(!pred_taken[0], "BTB tag mismatch after replacement");
    pc[0] = 32'h1100; #1;
    chk(pred_taken[0] && pred_target[0] == 32'h700, "replacing jump predicted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

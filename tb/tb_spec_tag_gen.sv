// tb_spec_tag_gen: steps groups with zero, one and two branches and checks
// the one-hot tag rotation, the speculation bits, the branch counter, the
// stall when more than five branches would be unresolved, the decrement on a
// resolved hit and the roll-back to the resolved branch's tag on a miss.
module tb_spec_tag_gen;
  import rv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic is_branch [2]; logic adv, prmiss, prscs; stag_t branch_tag_done;
  stag_t spec_tag [2]; logic spec_bit [2]; stag_t btag [2]; logic stall; logic [3:0] count;
  spec_tag_gen dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic step(input logic b0, input logic b1, input logic a, input logic h, input logic m);
    @(negedge clk); is_branch[0] = b0; is_branch[1] = b1; adv = a; prscs = h; prmiss = m;
    @(negedge clk); is_branch[0] = 0; is_branch[1] = 0; adv = 0; prscs = 0; prmiss = 0;
  endtask
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    is_branch[0] = 0; is_branch[1] = 0; adv = 0; prmiss = 0; prscs = 0; branch_tag_done = 0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    chk(spec_tag[0] == 5'b00001 && count == 0 && !spec_bit[0] && !spec_bit[1], "reset");
    is_branch[0] = 1; #1;
    chk(btag[0] == 5'b10000 && spec_tag[1] == 5'b10000 && spec_bit[1] && !spec_bit[0], "branch in slot 0");
    is_branch[0] = 0;
    step(1, 0, 1, 0, 0);
    chk(count == 1 && spec_tag[0] == 5'b10000 && spec_bit[0], "one branch outstanding");
    step(1, 1, 1, 0, 0);
    chk(count == 3 && spec_tag[0] == 5'b00100, "two branches rotate twice");
    step(1, 1, 1, 0, 0);
    chk(count == 5 && spec_tag[0] == 5'b00001, "five outstanding");
    is_branch[0] = 1; #1;
    chk(stall, "sixth branch stalls");
    prscs = 1; #1;
    chk(!stall, "hit in same cycle frees a slot");
    prscs = 0; is_branch[0] = 0; #1;
    chk(!stall, "no branch no stall");
    step(0, 0, 0, 1, 0);
    chk(count == 4 && spec_tag[0] == 5'b00001, "hit decrements, tag kept");
    branch_tag_done = 5'b01000;
    step(0, 0, 0, 0, 1);
    chk(count == 0 && spec_tag[0] == 5'b01000 && !spec_bit[0], "miss restores tag and clears count");
    step(0, 1, 1, 0, 0);
    chk(count == 1 && spec_tag[0] == 5'b00100, "slot 1 branch");
    // stalled group does not advance
    step(1, 1, 1, 0, 0); step(1, 1, 1, 0, 0);
    chk(count == 5, "count 5");
    step(1, 0, 1, 0, 0);
    chk(count == 5, "stalled group not taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

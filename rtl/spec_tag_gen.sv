// spec_tag_gen: speculation tag generator of the decode stage.
//
// Holds the main speculation tag (5-bit one-hot) and a branch counter of the
// branches decoded but not yet resolved. Every branch/jump decoded rotates the
// main tag right by one; that rotated tag becomes the branch's checkpoint tag
// (btag) and the speculation tag of the instructions behind it. An instruction
// is speculative (spec_bit) when any unresolved branch is ahead of it: the
// counter is non-zero, or the first slot of the same pair is a branch.
//
// From execution: prscs (hit) decrements the counter; prmiss restores the main
// tag to the resolved branch's tag (branch_tag_done) and clears the counter,
// since every younger instruction is flushed. A new pair that would push the
// counter above NSPEC raises stall. adv says the decoded pair really moves on
// to dispatch; only then do the counter and tag change. These rules follow
// the speculation-tag figure; the reset tag 5'b00001 is this design's choice.
module spec_tag_gen
  import rv_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  is_branch [2],
  input  logic  adv,
  input  logic  prmiss,
  input  logic  prscs,
  input  stag_t branch_tag_done,
  output stag_t spec_tag  [2],   // tag of the newest branch ahead of each slot
  output logic  spec_bit  [2],
  output stag_t btag      [2],   // checkpoint tag created by a branch in each slot
  output logic  stall,
  output logic [3:0] count
);
  stag_t main_tag;
  stag_t t1;
  logic [3:0] nbr, cnt_after;

  assign t1          = is_branch[0] ? rotr(main_tag) : main_tag;
  assign spec_tag[0] = main_tag;
  assign spec_tag[1] = t1;
  assign btag[0]     = rotr(main_tag);
  assign btag[1]     = rotr(t1);
  assign spec_bit[0] = (count != 0);
  assign spec_bit[1] = (count != 0) || is_branch[0];

  assign nbr       = 4'(is_branch[0]) + 4'(is_branch[1]);
  assign cnt_after = count - 4'(prscs) + nbr;
  assign stall     = !prmiss && (cnt_after > 4'(NSPEC));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      main_tag <= stag_t'(1);
      count    <= '0;
    end else if (prmiss) begin
      main_tag <= branch_tag_done;
      count    <= '0;
    end else begin
      if (adv && !stall) begin
        main_tag <= is_branch[1] ? rotr(t1) : t1;
        count    <= cnt_after;
      end else begin
        count    <= count - 4'(prscs);
      end
    end
  end
endmodule

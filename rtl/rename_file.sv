// rename_file: register renaming file with busy counters and checkpoints.
//
// For each of the 32 registers it keeps a 4-bit busy counter and a renaming
// tag (the commit-buffer index of the newest instruction writing it). The
// counter goes up by one per dispatched writer and down by one per committed
// writer, so a register is valid in the register file when its counter is
// zero; several writers of one register may be in flight until the counter
// MSB is set (full[] tells dispatch to stall).
//
// NSPEC backup copies follow the main file until a branch with checkpoint tag
// k is dispatched: backup k then freezes with the state right after the
// branch (the branch's own rd included, the other slot's younger rd not). A
// frozen backup still sees commit decrements. On a hit for tag k the backup
// is released and reloaded from the main file. On a miss for tag k backup k
// is copied into the main file and every other backup, and all are released.
// Reads are combinational; all updates happen at the clock edge. The main
// file and backups, their control and the miss/hit behaviour follow the
// design; port counts are sized for two vector instructions of five sources.
module rename_file
  import rv_pkg::*;
#(
  parameter int NREAD = 2 * NVSRC
) (
  input  logic       clk,
  input  logic       rst_n,
  // source lookups
  input  logic [4:0] raddr [NREAD],
  output logic       rbusy [NREAD],
  output rtag_t      rtag  [NREAD],
  // destination check for the two dispatching instructions
  input  logic [4:0] rd    [2],
  output logic       full  [2],
  // dispatch
  input  logic       we    [2],
  input  rtag_t      wtag  [2],
  input  logic       br    [2],   // slot is a dispatched branch
  input  stag_t      btag  [2],   // its checkpoint tag
  // commit
  input  logic       cm_we [2],
  input  logic [4:0] cm_rd [2],
  // branch outcome
  input  logic       prmiss,
  input  logic       prscs,
  input  stag_t      branch_tag_done
);
  typedef logic [BUSYW-1:0] cnt_t;
  typedef struct packed { cnt_t [31:0] cnt; rtag_t [31:0] tag; } sheet_t;

  sheet_t main_q, main_n, main_a0;
  sheet_t bak_q [NSPEC];
  sheet_t bak_n [NSPEC];
  logic [NSPEC-1:0] frozen_q, frozen_n;

  for (genvar i = 0; i < NREAD; i++) begin : g_rd
    assign rbusy[i] = (raddr[i] != 5'd0) && (main_q.cnt[raddr[i]] != '0);
    assign rtag[i]  = main_q.tag[raddr[i]];
  end
  assign full[0] = main_q.cnt[rd[0]][BUSYW-1];
  assign full[1] = main_q.cnt[rd[1]][BUSYW-1];

  function automatic sheet_t apply_commit(sheet_t s, logic w0, logic [4:0] r0,
                                          logic w1, logic [4:0] r1);
    if (w0) s.cnt[r0] = s.cnt[r0] - cnt_t'(1);
    if (w1) s.cnt[r1] = s.cnt[r1] - cnt_t'(1);
    return s;
  endfunction

  function automatic sheet_t apply_disp(sheet_t s, logic w, logic [4:0] r, rtag_t t);
    if (w) begin
      s.cnt[r] = s.cnt[r] + cnt_t'(1);
      s.tag[r] = t;
    end
    return s;
  endfunction

  always_comb begin
    sheet_t base;
    int src;
    base    = apply_commit(main_q, cm_we[0], cm_rd[0], cm_we[1], cm_rd[1]);
    main_a0 = apply_disp(base, we[0], rd[0], wtag[0]);
    main_n  = apply_disp(main_a0, we[1], rd[1], wtag[1]);
    frozen_n = frozen_q;
    src = 0;
    for (int k = 0; k < NSPEC; k++) if (branch_tag_done[k]) src = k;
    if (prmiss) begin
      main_n = apply_commit(bak_q[src], cm_we[0], cm_rd[0], cm_we[1], cm_rd[1]);
      for (int k = 0; k < NSPEC; k++) bak_n[k] = main_n;
      frozen_n = '0;
    end else begin
      for (int k = 0; k < NSPEC; k++) begin
        if (br[0] && btag[0][k]) begin
          bak_n[k] = main_a0; frozen_n[k] = 1'b1;
        end else if (br[1] && btag[1][k]) begin
          bak_n[k] = main_n;  frozen_n[k] = 1'b1;
        end else if (frozen_q[k] && !(prscs && branch_tag_done[k])) begin
          bak_n[k] = apply_commit(bak_q[k], cm_we[0], cm_rd[0], cm_we[1], cm_rd[1]);
        end else begin
          bak_n[k] = main_n;  frozen_n[k] = 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      main_q   <= '0;
      frozen_q <= '0;
      for (int k = 0; k < NSPEC; k++) bak_q[k] <= '0;
    end else begin
      main_q   <= main_n;
      frozen_q <= frozen_n;
      for (int k = 0; k < NSPEC; k++) bak_q[k] <= bak_n[k];
    end
  end
endmodule

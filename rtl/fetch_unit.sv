// fetch_unit: instruction fetch stage with Gshare prediction.
//
// The instruction memory is 64 bits wide and synchronous: the address
// imem_addr = PC[31:3] given in one cycle returns two instructions in the
// next. pc_q is the PC of the group now arriving. When pc_q[2] is set (a
// jump to a 4-byte aligned address) the first instruction of the group is
// invalid, so a group holds one or two instructions.
//
// Both slot PCs are looked up in the predictor. The next PC is the BTB target
// of the first valid slot predicted taken (a taken slot 0 also invalidates
// slot 1), otherwise the next 8-byte aligned group, i.e. PC+8, or PC+4 after
// a 4-byte aligned jump. stall (decode cannot take the group) re-reads the
// same group; redirect (a branch miss) starts fetching at redirect_pc and
// drops the group in flight. Reset starts at RESET_PC. Each group carries the
// predictions and the history register value used, for the update when the
// branch resolves.
module fetch_unit
  import rv_pkg::*;
#(
  parameter word_t RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [28:0] imem_addr,
  input  logic [63:0] imem_rdata,
  input  logic        stall,
  input  logic        redirect,
  input  word_t       redirect_pc,
  // predictor update from the branch unit
  input  logic        upd_valid,
  input  logic        upd_cond,
  input  word_t       upd_pc,
  input  logic        upd_taken,
  input  word_t       upd_target,
  input  logic [BHRW-1:0] upd_bhr,
  // fetched group
  output logic        g_valid [2],
  output word_t       g_pc    [2],
  output word_t       g_instr [2],
  output logic        g_pred  [2],
  output word_t       g_tgt   [2],
  output logic [BHRW-1:0] g_bhr
);
  word_t pc_q, pc_n;
  logic  f_valid;
  logic  ptaken [2];
  word_t ptgt   [2];
  word_t lpc    [2];

  assign lpc[0] = {pc_q[31:3], 3'b000};
  assign lpc[1] = {pc_q[31:3], 3'b100};

  gshare_bp u_bp (
    .clk, .rst_n, .pc(lpc), .pred_taken(ptaken), .pred_target(ptgt), .bhr(g_bhr),
    .upd_valid, .upd_cond, .upd_pc, .upd_taken, .upd_target, .upd_bhr
  );

  logic s0_taken;
  assign s0_taken = !pc_q[2] && ptaken[0];

  assign g_valid[0] = f_valid && !redirect && !pc_q[2];
  assign g_valid[1] = f_valid && !redirect && !s0_taken;
  assign g_pc       = lpc;
  assign g_instr[0] = imem_rdata[31:0];
  assign g_instr[1] = imem_rdata[63:32];
  assign g_pred[0]  = s0_taken;
  assign g_pred[1]  = !s0_taken && ptaken[1];
  assign g_tgt      = ptgt;

  always_comb begin
    if (redirect)              pc_n = redirect_pc;
    else if (!f_valid || stall) pc_n = pc_q;
    else if (s0_taken)         pc_n = ptgt[0];
    else if (ptaken[1])        pc_n = ptgt[1];
    else                       pc_n = {pc_q[31:3] + 29'd1, 3'b000};
  end
  assign imem_addr = pc_n[31:3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q    <= RESET_PC;
      f_valid <= 1'b0;
    end else begin
      pc_q    <= pc_n;
      f_valid <= 1'b1;
    end
  end
endmodule

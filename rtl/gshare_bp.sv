// gshare_bp: Gshare branch prediction with a branch target buffer.
//
// A 10-bit branch history register (BHR) is XORed with PC[11:2] to index a
// pattern history table (PHT) of 2^10 two-bit saturating counters (00 strong
// not-taken .. 11 strong taken, all reset to weak taken 10). A direct-mapped
// BTB holds branch PC / target pairs. A fetch slot is predicted taken when its
// PC hits in the BTB and its counter says taken; the BTB target is then the
// next PC. Two lookup ports serve the two slots of a fetch group.
//
// Updates arrive from the execution stage as soon as a branch or jump
// resolves (upd_valid): the counter at the index formed with the BHR value
// carried by the branch moves one step toward the outcome, the BHR shifts the
// outcome in (1 = taken), and a taken branch writes its target into the BTB.
// Lookups are combinational; updates take effect at the next clock edge.
// The BTB size (BTB_ENTRIES) is not given by the design and is chosen here.
module gshare_bp
  import rv_pkg::*;
#(
  parameter int HIST        = BHRW,
  parameter int BTB_ENTRIES = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  input  word_t           pc   [2],
  output logic            pred_taken [2],
  output word_t           pred_target[2],
  output logic [HIST-1:0] bhr,
  input  logic            upd_valid,
  input  logic            upd_cond,     // conditional branch (updates PHT/BHR)
  input  word_t           upd_pc,
  input  logic            upd_taken,
  input  word_t           upd_target,
  input  logic [HIST-1:0] upd_bhr
);
  localparam int BI = $clog2(BTB_ENTRIES);
  localparam int NPHT = 1 << HIST;

  logic [1:0]      pht [NPHT];
  logic            btb_v   [BTB_ENTRIES];
  logic [31-BI-2:0] btb_tag [BTB_ENTRIES];
  word_t           btb_tgt [BTB_ENTRIES];

  for (genvar s = 0; s < 2; s++) begin : g_lookup
    logic [HIST-1:0] idx;
    logic [BI-1:0]   bi;
    assign idx = pc[s][HIST+1:2] ^ bhr;
    assign bi  = pc[s][BI+1:2];
    assign pred_taken[s]  = btb_v[bi] && (btb_tag[bi] == pc[s][31:BI+2]) && pht[idx][1];
    assign pred_target[s] = btb_tgt[bi];
  end

  logic [HIST-1:0] uidx;
  logic [BI-1:0]   ubi;
  assign uidx = upd_pc[HIST+1:2] ^ upd_bhr;
  assign ubi  = upd_pc[BI+1:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bhr <= '0;
      for (int i = 0; i < NPHT; i++) pht[i] <= 2'b10;
      for (int i = 0; i < BTB_ENTRIES; i++) begin
        btb_v[i] <= 1'b0; btb_tag[i] <= '0; btb_tgt[i] <= '0;
      end
    end else if (upd_valid) begin
      if (upd_cond) begin
        bhr <= {bhr[HIST-2:0], upd_taken};
        if (upd_taken && pht[uidx] != 2'b11) pht[uidx] <= pht[uidx] + 2'b01;
        if (!upd_taken && pht[uidx] != 2'b00) pht[uidx] <= pht[uidx] - 2'b01;
      end else begin
        pht[uidx] <= 2'b11;   // jumps are always taken
      end
      if (upd_taken) begin
        btb_v[ubi]   <= 1'b1;
        btb_tag[ubi] <= upd_pc[31:BI+2];
        btb_tgt[ubi] <= upd_target;
      end
    end
  end
endmodule

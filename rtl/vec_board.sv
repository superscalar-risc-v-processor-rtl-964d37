// vec_board: vector instruction board, first stage of the co-processor.
//
// Four entries hold dispatched vector instructions. A new instruction takes
// the free entry found by a leading-zero count on the inverted busy vector;
// when all four are busy, in_ready is low and the core's vector station
// waits. The vector decoder gives its function mask, memory mask and write
// bank.
//
// Bank renaming treats each bank as a pseudo-register: a bank being written
// by an unfinished instruction is dirty, with that instruction's entry index
// as tag. A new instruction that touches a dirty bank records that entry and
// waits for it to retire (read/write-after-write order). In addition, so that
// a younger write cannot overtake an older read of the same bank, it also
// waits for older unfinished entries that touch the bank it writes (this
// rule is this implementation's addition).
//
// An entry is ready when nothing it waits for is pending and no unit or bank
// it needs is busy: {func_msk, mem_msk} AND resource_status (8 bits: unit busy
// then bank busy) is zero. One ready entry per cycle is issued, chosen by a
// leading-zero count on the ready vector. Sequencers report completion per
// entry (fin); one finished entry per cycle retires: it frees the entry,
// clears the bank's dirty bit if it still holds the tag, and sends the
// commit-buffer tag (rob_clr) back to the core. An instruction with a decoder
// exception is not executed and retires at once.
module vec_board
  import rv_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  vinst_t     in_inst,
  output logic       in_ready,
  input  logic [7:0] resource_status,
  output logic       iss_valid,
  output vinst_t     iss_inst,
  output logic [1:0] iss_entry,
  output logic [3:0] iss_func,
  output logic [3:0] iss_mem,
  output logic [2:0] iss_bport [NBANK],
  input  logic       fin_valid [4],   // per function unit
  input  logic [1:0] fin_entry [4],
  output logic       rob_clr,
  output rtag_t      rob_clr_tag,
  output logic       xcp,
  output logic       idle
);
  logic        busy   [NVENT];
  logic        issued [NVENT];
  logic        done   [NVENT];
  logic [3:0]  fmsk   [NVENT];
  logic [3:0]  mmsk   [NVENT];
  logic [2:0]  bport  [NVENT][NBANK];
  logic [NVENT-1:0] waitm [NVENT];
  vinst_t      inst   [NVENT];

  logic [NBANK-1:0] dirty;
  logic [1:0]       dtag [NBANK];

  // decoder
  logic [3:0] d_mem, d_func;
  logic       d_wb, d_xcp;
  logic [1:0] d_wbb;
  logic [2:0] d_bport [NBANK];
  vec_decoder u_dec (.inst(in_inst), .mem_msk(d_mem), .func_msk(d_func), .wb(d_wb),
                     .wb_bank(d_wbb), .bport(d_bport), .xcp(d_xcp));

  // leading-zero counts
  logic [1:0] alloc_addr, issue_addr, ret_addr;
  logic       any_free, any_ready, any_done;
  logic [NVENT-1:0] ready;
  always_comb begin
    any_free = 1'b0; any_ready = 1'b0; any_done = 1'b0;
    alloc_addr = '0; issue_addr = '0; ret_addr = '0;
    for (int i = 0; i < NVENT; i++) begin
      ready[i] = busy[i] && !issued[i] && (waitm[i] == '0) &&
                 ((({fmsk[i], mmsk[i]}) & resource_status) == '0);
      if (!busy[i]) begin any_free = 1'b1; alloc_addr = 2'(i); end
      if (ready[i]) begin any_ready = 1'b1; issue_addr = 2'(i); end
      if (busy[i] && done[i]) begin any_done = 1'b1; ret_addr = 2'(i); end
    end
  end

  assign in_ready    = any_free;
  assign iss_valid   = any_ready;
  assign iss_inst    = inst[issue_addr];
  assign iss_entry   = issue_addr;
  assign iss_func    = fmsk[issue_addr];
  assign iss_mem     = mmsk[issue_addr];
  for (genvar b = 0; b < NBANK; b++) begin : g_bp
    assign iss_bport[b] = bport[issue_addr][b];
  end
  assign rob_clr     = any_done;
  assign rob_clr_tag = inst[ret_addr].rob;
  always_comb begin
    idle = 1'b1;
    for (int i = 0; i < NVENT; i++) if (busy[i]) idle = 1'b0;
  end

  logic alloc;
  assign alloc = in_valid && any_free;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dirty <= '0; xcp <= 1'b0;
      for (int b = 0; b < NBANK; b++) dtag[b] <= '0;
      for (int i = 0; i < NVENT; i++) begin
        busy[i] <= 0; issued[i] <= 0; done[i] <= 0; fmsk[i] <= '0; mmsk[i] <= '0;
        waitm[i] <= '0; inst[i] <= '0;
        for (int b = 0; b < NBANK; b++) bport[i][b] <= '0;
      end
    end else begin
      xcp <= 1'b0;
      // completion reports
      for (int u = 0; u < 4; u++)
        if (fin_valid[u]) done[fin_entry[u]] <= 1'b1;
      if (iss_valid) issued[issue_addr] <= 1'b1;
      // retire one finished entry
      if (any_done) begin
        busy[ret_addr] <= 1'b0;
        for (int i = 0; i < NVENT; i++) waitm[i][ret_addr] <= 1'b0;
        for (int b = 0; b < NBANK; b++)
          if (dirty[b] && dtag[b] == ret_addr) dirty[b] <= 1'b0;
      end
      // allocate
      if (alloc) begin
        logic [NVENT-1:0] w;
        w = '0;
        for (int b = 0; b < NBANK; b++)
          if (d_mem[b] && dirty[b]) w[dtag[b]] = 1'b1;
        for (int i = 0; i < NVENT; i++)
          if (busy[i] && !done[i] && d_wb && mmsk[i][d_wbb]) w[i] = 1'b1;
        if (any_done) w[ret_addr] = 1'b0;
        busy[alloc_addr]   <= 1'b1;
        issued[alloc_addr] <= d_xcp;
        done[alloc_addr]   <= d_xcp;
        fmsk[alloc_addr]   <= d_func;
        mmsk[alloc_addr]   <= d_mem;
        waitm[alloc_addr]  <= w;
        inst[alloc_addr]   <= in_inst;
        for (int b = 0; b < NBANK; b++) bport[alloc_addr][b] <= d_bport[b];
        xcp <= d_xcp;
        if (d_wb && !d_xcp) begin
          dirty[d_wbb] <= 1'b1;
          dtag[d_wbb]  <= alloc_addr;
        end
      end
    end
  end
endmodule

// commit_buffer: reorder buffer that completes instructions in order.
//
// A circular FIFO of NROB entries, each holding PC, rd, rd_we, finish bit,
// result and exception bit. Dispatch writes up to two instructions per cycle
// at the dispatch pointer (the entry index is the instruction's renaming
// tag). Every CDB lane writes its result and sets the finish bit of the entry
// named by its tag; the vector co-processor sets the finish bit of a retired
// vector instruction (vclr). Up to two finished instructions at the commit
// pointer retire per cycle: their results go to the register file and their
// busy counters are decremented (cm_we/cm_rd/cm_data). The second may retire
// only together with the first.
//
// Dispatch reads the finish bit and result of producers through NREAD
// combinational ports (case 3 of operand fetch). On a branch miss the
// dispatch pointer is moved to just after the branch's entry, which drops
// every younger instruction. Timing: writes at the clock edge, reads and
// commit outputs combinational on the current state.
// The assertion at the end is switched off while rst_n is low; lint therefore
// sees rst_n used synchronously as well as as the flops' asynchronous reset.
// That is intended and changes no logic.
module commit_buffer
  import rv_pkg::*;
#(
  parameter int NREAD = 2 * NVSRC
) (
  input  logic       clk,
  input  logic       rst_n,
  // dispatch
  input  logic       in_valid [2],
  input  word_t      in_pc    [2],
  input  logic [4:0] in_rd    [2],
  input  logic       in_rd_we [2],
  input  logic       in_done  [2],   // entry needs no execution (no-op)
  output rtag_t      dptr     [2],   // tags given to slot 0 and slot 1
  output logic [ROBW:0] free_cnt,
  // results
  input  cdb_t       cdb [NCDB],
  input  logic       vclr_valid,
  input  rtag_t      vclr_tag,
  input  logic       xcp_valid,
  input  rtag_t      xcp_tag,
  // operand reads
  input  rtag_t      rtag [NREAD],
  output logic       rfin [NREAD],
  output word_t      rres [NREAD],
  // commit
  output logic       cm_we   [2],
  output logic [4:0] cm_rd   [2],
  output word_t      cm_data [2],
  output logic       cm_valid[2],
  output word_t      cm_pc   [2],
  output rtag_t      head,
  // flush on branch miss
  input  logic       prmiss,
  input  rtag_t      br_tag
);
  logic       v   [NROB];
  word_t      pc  [NROB];
  logic [4:0] rd  [NROB];
  logic       we  [NROB];
  logic       fin [NROB];
  word_t      res [NROB];
  logic       xcp [NROB];

  rtag_t      tail;
  logic [ROBW:0] count;

  assign dptr[0] = tail;
  assign dptr[1] = in_valid[0] ? rtag_t'(tail + 1'b1) : tail;
  assign free_cnt = (ROBW+1)'(NROB) - count;

  for (genvar i = 0; i < NREAD; i++) begin : g_rd
    assign rfin[i] = fin[rtag[i]];
    assign rres[i] = res[rtag[i]];
  end

  rtag_t h1;
  assign h1 = rtag_t'(head + 1'b1);
  assign cm_valid[0] = v[head] && fin[head];
  assign cm_valid[1] = cm_valid[0] && v[h1] && fin[h1] && (count > 1);
  assign cm_we[0]   = cm_valid[0] && we[head];
  assign cm_we[1]   = cm_valid[1] && we[h1];
  assign cm_rd[0]   = rd[head];
  assign cm_rd[1]   = rd[h1];
  assign cm_data[0] = res[head];
  assign cm_data[1] = res[h1];
  assign cm_pc[0]   = pc[head];
  assign cm_pc[1]   = pc[h1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0; tail <= '0; count <= '0;
      for (int i = 0; i < NROB; i++) begin
        v[i] <= 1'b0; pc[i] <= '0; rd[i] <= '0; we[i] <= 1'b0;
        fin[i] <= 1'b0; res[i] <= '0; xcp[i] <= 1'b0;
      end
    end else begin
      int ncm, nin;
      ncm = int'(cm_valid[0]) + int'(cm_valid[1]);
      nin = 0;
      for (int c = 0; c < NCDB; c++)
        if (cdb[c].valid) begin
          fin[cdb[c].tag] <= 1'b1;
          res[cdb[c].tag] <= cdb[c].data;
        end
      if (vclr_valid) fin[vclr_tag] <= 1'b1;
      if (xcp_valid)  xcp[xcp_tag]  <= 1'b1;
      if (cm_valid[0]) v[head] <= 1'b0;
      if (cm_valid[1]) v[h1]   <= 1'b0;
      if (prmiss) begin
        rtag_t nt;
        nt = rtag_t'(br_tag + 1'b1);
        for (int i = 0; i < NROB; i++)
          if (rtag_t'(rtag_t'(i) - nt) < rtag_t'(tail - nt)) v[i] <= 1'b0;
        tail  <= nt;
        count <= (ROBW+1)'(rtag_t'(nt - head)) - (ROBW+1)'(ncm);
        if (count == (ROBW+1)'(NROB) && nt == head) count <= (ROBW+1)'(NROB - ncm);
      end else begin
        for (int p = 0; p < 2; p++)
          if (in_valid[p]) begin
            v[dptr[p]]   <= 1'b1;
            pc[dptr[p]]  <= in_pc[p];
            rd[dptr[p]]  <= in_rd[p];
            we[dptr[p]]  <= in_rd_we[p];
            fin[dptr[p]] <= in_done[p];
            xcp[dptr[p]] <= 1'b0;
            nin++;
          end
        tail  <= rtag_t'(tail + rtag_t'(nin));
        count <= count + (ROBW+1)'(nin) - (ROBW+1)'(ncm);
      end
      head <= rtag_t'(head + rtag_t'(ncm));
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      int'(in_valid[0]) + int'(in_valid[1]) <= int'(free_cnt));
endmodule

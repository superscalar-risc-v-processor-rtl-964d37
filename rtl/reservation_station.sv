// reservation_station: one reservation station of the RS stage.
//
// Holds up to DEPTH dispatched instructions with NSRC operands each. An
// operand is either a value (ready) or the renaming tag of its producer; a
// waiting operand captures its value when that tag appears on any lane of the
// common data bus (also in the cycle it is written). An entry whose operands
// are all ready may issue; it leaves the station in the cycle it issues
// (out_valid && out_ready).
//
// Two schemes, chosen by INORDER:
//  * in-order (BRJ, LDST, CSR, vector): a FIFO; only the oldest entry may
//    issue, so a stalled head blocks younger ready entries;
//  * out-of-order (ALU, MLDV): any ready entry may issue, the oldest first,
//    age being the distance of its commit-buffer tag from the commit pointer.
// Up to two instructions are written per cycle (both slots of a dispatch
// pair may target the same station). NOSPEC=1 keeps speculative entries from
// issuing (load/store, CSR and vector stations).
//
// Speculation: each entry keeps a speculative bit and the speculation tag of
// the newest branch ahead of it. A hit (prscs) for tag T clears the bit of
// entries tagged T in the same cycle; a miss (prmiss) removes every entry
// still speculative, in-order pointers included, at the clock edge.
// The assertion at the end is switched off while rst_n is low; lint therefore
// sees rst_n used synchronously as well as as the flops' asynchronous reset.
// That is intended and changes no logic.
module reservation_station
  import rv_pkg::*;
#(
  parameter int DEPTH   = 4,
  parameter int NSRC    = 2,
  parameter bit INORDER = 1'b1,
  parameter bit NOSPEC  = 1'b0
) (
  input  logic     clk,
  input  logic     rst_n,
  // allocation from dispatch
  input  logic     in_valid [2],
  input  rs_info_t in_info  [2],
  input  rtag_t    in_rob   [2],
  input  logic     in_spec  [2],
  input  stag_t    in_stag  [2],
  input  word_t    in_val   [2][NSRC],
  input  logic     in_rdy   [2][NSRC],
  input  rtag_t    in_tag   [2][NSRC],
  output logic [$clog2(DEPTH+1)-1:0] free_cnt,
  // common data bus
  input  cdb_t     cdb [NCDB],
  input  rtag_t    rob_head,
  // issue to the processing unit
  output logic     out_valid,      // wake_pu
  input  logic     out_ready,
  output rs_info_t out_info,
  output rtag_t    out_rob,
  output word_t    out_val [NSRC],
  output logic     out_spec,
  output stag_t    out_stag,
  // branch outcome
  input  logic     prmiss,
  input  logic     prscs,
  input  stag_t    branch_tag_done
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic     busy [DEPTH];
  rs_info_t info [DEPTH];
  rtag_t    rob  [DEPTH];
  logic     spec [DEPTH];
  stag_t    stag [DEPTH];
  word_t    val  [DEPTH][NSRC];
  logic     rdy  [DEPTH][NSRC];
  rtag_t    tag  [DEPTH][NSRC];

  logic [AW-1:0] head, tail;
  logic          spec_eff [DEPTH];
  logic          ready    [DEPTH];
  logic [AW-1:0] raddr;
  logic          any_ready;
  logic [AW-1:0] waddr [2];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p, int n);
    int v;
    v = (int'(p) + n) % DEPTH;
    return AW'(v);
  endfunction

  // CDB lookup
  function automatic logic cdb_hit(cdb_t bus [NCDB], rtag_t t, output word_t d);
    cdb_hit = 1'b0;
    d = '0;
    for (int c = 0; c < NCDB; c++)
      if (bus[c].valid && bus[c].tag == t) begin
        cdb_hit = 1'b1;
        d = bus[c].data;
      end
  endfunction

  always_comb begin
    int n;
    logic [ROBW-1:0] best, age;
    logic found0, found1;
    n = 0;
    best = '1;
    age = '0;
    found0 = 1'b0;
    found1 = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      spec_eff[i] = spec[i] && !(prscs && stag[i] == branch_tag_done);
      ready[i] = busy[i] && !(NOSPEC && spec_eff[i]) && !(prmiss && spec_eff[i]);
      for (int s = 0; s < NSRC; s++) ready[i] = ready[i] && rdy[i][s];
      if (!busy[i]) n++;
    end
    free_cnt = ($clog2(DEPTH+1))'(n);
    // issue selection
    raddr = '0;
    any_ready = 1'b0;
    if (INORDER) begin
      raddr = head;
      any_ready = ready[head];
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        age = rob[i] - rob_head;
        if (ready[i] && (!any_ready || age < best)) begin
          any_ready = 1'b1;
          best = age;
          raddr = AW'(i);
        end
      end
    end
    // allocation addresses
    if (INORDER) begin
      waddr[0] = tail;
      waddr[1] = in_valid[0] ? inc(tail, 1) : tail;
    end else begin
      waddr[0] = '0;
      waddr[1] = '0;
      for (int i = 0; i < DEPTH; i++)
        if (!busy[i] && !found0) begin found0 = 1'b1; waddr[0] = AW'(i); end
      if (!in_valid[0]) waddr[1] = waddr[0];
      else begin
        for (int i = 0; i < DEPTH; i++)
          if (!busy[i] && AW'(i) != waddr[0] && !found1) begin found1 = 1'b1; waddr[1] = AW'(i); end
      end
    end
  end

  assign out_valid = any_ready;
  assign out_info  = info[raddr];
  assign out_rob   = rob[raddr];
  assign out_spec  = spec_eff[raddr];
  assign out_stag  = stag[raddr];
  for (genvar s = 0; s < NSRC; s++) begin : g_out
    assign out_val[s] = val[raddr][s];
  end

  logic fire;
  assign fire = any_ready && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0; tail <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        busy[i] <= 1'b0; spec[i] <= 1'b0; stag[i] <= '0; rob[i] <= '0; info[i] <= '0;
        for (int s = 0; s < NSRC; s++) begin
          val[i][s] <= '0; rdy[i][s] <= 1'b0; tag[i][s] <= '0;
        end
      end
    end else begin
      // operand capture and speculation clear
      for (int i = 0; i < DEPTH; i++) begin
        spec[i] <= spec_eff[i];
        for (int s = 0; s < NSRC; s++) begin
          word_t d;
          if (busy[i] && !rdy[i][s] && cdb_hit(cdb, tag[i][s], d)) begin
            rdy[i][s] <= 1'b1;
            val[i][s] <= d;
          end
        end
      end
      if (fire) begin
        busy[raddr] <= 1'b0;
        if (INORDER) head <= inc(head, 1);
      end
      if (prmiss) begin
        int keep;
        keep = 0;
        for (int i = 0; i < DEPTH; i++)
          if (busy[i] && spec_eff[i]) busy[i] <= 1'b0;
          else if (busy[i] && !(fire && AW'(i) == raddr)) keep++;
        if (INORDER) tail <= inc(fire ? inc(head, 1) : head, keep);
      end else begin
        for (int p = 0; p < 2; p++) begin
          if (in_valid[p]) begin
            busy[waddr[p]] <= 1'b1;
            info[waddr[p]] <= in_info[p];
            rob[waddr[p]]  <= in_rob[p];
            spec[waddr[p]] <= in_spec[p] && !(prscs && in_stag[p] == branch_tag_done);
            stag[waddr[p]] <= in_stag[p];
            for (int s = 0; s < NSRC; s++) begin
              word_t d;
              logic  h;
              h = cdb_hit(cdb, in_tag[p][s], d);
              rdy[waddr[p]][s] <= in_rdy[p][s] || h;
              val[waddr[p]][s] <= in_rdy[p][s] ? in_val[p][s] : d;
              tag[waddr[p]][s] <= in_tag[p][s];
            end
          end
        end
        if (INORDER) tail <= inc(tail, int'(in_valid[0]) + int'(in_valid[1]));
      end
    end
  end

  // a full in-order station must not be written
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      (in_valid[0] || in_valid[1]) |-> (int'(free_cnt) >= int'(in_valid[0]) + int'(in_valid[1])));
endmodule

// vld_seq: vector load sequencer (VLOAD).
//
// Moves V_size bytes from external memory at ext_addr (reg2) to the
// scratchpad at int_addr (reg0), 4 bytes per step because the external port
// is 32 bits wide: request the word at ext_addr+off (held until the arbiter
// grants it; this unit has the lowest priority), wait for the read data,
// then WRITE it through its one master port at int_addr+off with byte
// strobes cut to the bytes still left; off grows by 4. ext_addr is taken as
// word-aligned (the design does not say how a misaligned external address is
// handled). Three cycles per word when granted at once. done pulses for one
// cycle with the board entry when the last word is written.
module vld_seq
  import rv_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  vinst_t      inst,
  input  logic [1:0]  entry,
  output logic        busy,
  output logic        done,
  output logic [1:0]  done_entry,
  output ext_req_t    ext,
  input  logic        ext_gnt,
  input  logic        ext_rvalid,
  input  word_t       ext_rdata,
  output bank_req_t   bq,
  input  logic [63:0] brdata
);
  typedef enum logic [1:0] { IDLE, REQ, RESP, WR } st_e;
  st_e   st;
  word_t iaddr, eaddr, size, off, data;

  assign busy = (st != IDLE);
  always_comb begin
    ext = '0;
    ext.req  = (st == REQ);
    ext.addr = {eaddr[31:2] + off[31:2], 2'b00};
    bq = '0;
    bq.en    = (st == WR);
    bq.we    = 1'b1;
    bq.addr  = BANK_BW'(iaddr + off);
    bq.wdata = {32'b0, data};
    bq.wstrb = strb_rem(size - off, 4);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; iaddr <= '0; eaddr <= '0; size <= '0; off <= '0; data <= '0;
      done <= 1'b0; done_entry <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          iaddr <= inst.r[0]; size <= inst.r[1]; eaddr <= inst.r[2]; off <= '0;
          done_entry <= entry;
          if (inst.r[1] == 0) done <= 1'b1; else st <= REQ;
        end
        REQ:  if (ext_gnt) st <= RESP;
        RESP: if (ext_rvalid) begin data <= ext_rdata; st <= WR; end
        WR: begin
          off <= off + 32'd4;
          if (off + 32'd4 >= size) begin st <= IDLE; done <= 1'b1; end
          else st <= REQ;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule

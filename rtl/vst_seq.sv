// vst_seq: vector store sequencer (VSTORE).
//
// Moves V_size bytes from the scratchpad at int_addr (reg2) to external
// memory at ext_addr (reg0), 4 bytes per step, the same address pattern as
// the load sequencer in reverse: READ 8 bytes at int_addr+off through its
// master port, keep the low 4, then request an external write of that word
// at ext_addr+off with byte strobes for the bytes still left, held until the
// arbiter grants it. ext_addr is taken as word-aligned. done pulses for one
// cycle with the board entry after the last word is granted.
module vst_seq
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
  output bank_req_t   bq,
  input  logic [63:0] brdata
);
  typedef enum logic [1:0] { IDLE, RD, CAP, REQ } st_e;
  st_e   st;
  word_t iaddr, eaddr, size, off, data;

  assign busy = (st != IDLE);
  always_comb begin
    logic [7:0] s8;
    s8 = strb_rem(size - off, 4);
    ext = '0;
    ext.req   = (st == REQ);
    ext.we    = 1'b1;
    ext.addr  = {eaddr[31:2] + off[31:2], 2'b00};
    ext.wdata = data;
    ext.wstrb = s8[3:0];
    bq = '0;
    bq.en   = (st == RD);
    bq.addr = BANK_BW'(iaddr + off);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; iaddr <= '0; eaddr <= '0; size <= '0; off <= '0; data <= '0;
      done <= 1'b0; done_entry <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          eaddr <= inst.r[0]; size <= inst.r[1]; iaddr <= inst.r[2]; off <= '0;
          done_entry <= entry;
          if (inst.r[1] == 0) done <= 1'b1; else st <= RD;
        end
        RD:  st <= CAP;
        CAP: begin data <= brdata[31:0]; st <= REQ; end
        REQ: if (ext_gnt) begin
          off <= off + 32'd4;
          if (off + 32'd4 >= size) begin st <= IDLE; done <= 1'b1; end
          else st <= RD;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule

// vec_seq: vector sequencer, the element-wise unit of the co-processor.
//
// Executes VADD, VGTM, VCOPY and VSCOPY on 8 bytes (8 elements) per step with
// eight 8-bit adders and eight greater-than-merge selectors. Elements are
// signed 8-bit values; sums wrap. Two master ports: port 0 drives the bank of
// the first source (reg2; the destination for VSCOPY), port 1 the other bank.
// Patterns per 8-byte step:
//  * read-write:         read A on port 0 and B on port 1 together, write;
//  * read_a-read_b-write: A and B in the same bank, read them one after the
//                        other on port 0, then write;
//  * copy:               read on one port, write on the other (or the same);
//  * VSCOPY:             write the scalar byte of reg2 replicated, no read.
// A read takes one cycle to return data, so the step costs 3 cycles (4 for
// read_a-read_b-write, 1 for VSCOPY). The last step writes only the bytes
// still within V_size. done pulses for one cycle with the board entry.
// The patterns and lane count follow the design; the exact cycle split is
// this implementation's.
module vec_seq
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
  output bank_req_t   bq [2],
  input  logic [63:0] brdata [2]
);
  typedef enum logic [2:0] { IDLE, RD1, RD2, RD3, WR } st_e;
  st_e   st;
  vop_e  op;
  word_t dst, sa, sb, size, off;
  logic [63:0] ca, cb;
  logic  pb, pd;   // port of B and of the destination

  function automatic logic [63:0] lanes(vop_e o, logic [63:0] a, logic [63:0] b, logic [7:0] s);
    logic [63:0] y;
    for (int i = 0; i < VLANES; i++) begin
      unique case (o)
        V_ADD:   y[8*i +: 8] = a[8*i +: 8] + b[8*i +: 8];
        V_GTM:   y[8*i +: 8] = ($signed(a[8*i +: 8]) > $signed(b[8*i +: 8])) ? a[8*i +: 8] : b[8*i +: 8];
        V_SCOPY: y[8*i +: 8] = s;
        default: y[8*i +: 8] = a[8*i +: 8];
      endcase
    end
    return y;
  endfunction

  logic two_src;
  assign two_src = (op == V_ADD) || (op == V_GTM);
  assign busy = (st != IDLE);

  always_comb begin
    bq[0] = '0; bq[1] = '0;
    unique case (st)
      RD1: begin
        bq[0].en = 1'b1; bq[0].addr = BANK_BW'(sa + off);
        if (two_src && pb) begin bq[1].en = 1'b1; bq[1].addr = BANK_BW'(sb + off); end
      end
      RD2: if (two_src && !pb) begin bq[0].en = 1'b1; bq[0].addr = BANK_BW'(sb + off); end
      WR: begin
        bq[pd].en    = 1'b1;
        bq[pd].we    = 1'b1;
        bq[pd].addr  = BANK_BW'(dst + off);
        bq[pd].wdata = lanes(op, ca, cb, sa[7:0]);
        bq[pd].wstrb = strb_rem(size - off, 8);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; op <= V_NONE; dst <= '0; sa <= '0; sb <= '0; size <= '0; off <= '0;
      ca <= '0; cb <= '0; pb <= 1'b0; pd <= 1'b0; done <= 1'b0; done_entry <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          op <= inst.vop; dst <= inst.r[0]; size <= inst.r[1];
          sa <= inst.r[2]; sb <= inst.r[3]; off <= '0; done_entry <= entry;
          pb <= bank_of(inst.r[3]) != bank_of(inst.r[2]);
          pd <= (inst.vop == V_SCOPY) ? 1'b0 : (bank_of(inst.r[0]) != bank_of(inst.r[2]));
          if (inst.r[1] == 0) done <= 1'b1;
          else st <= (inst.vop == V_SCOPY) ? WR : RD1;
        end
        RD1: st <= RD2;
        RD2: begin
          ca <= brdata[0];
          if (two_src && pb) cb <= brdata[1];
          st <= (two_src && !pb) ? RD3 : WR;
        end
        RD3: begin cb <= brdata[0]; st <= WR; end
        WR: begin
          off <= off + 32'd8;
          if (off + 32'd8 >= size) begin st <= IDLE; done <= 1'b1; end
          else st <= (op == V_SCOPY) ? WR : RD1;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule

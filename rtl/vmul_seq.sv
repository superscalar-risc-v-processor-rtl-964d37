// vmul_seq: multiplication sequencer with the dot-product unit.
//
// VMUL  - element-wise product of two vectors (low byte of each signed
//         8x8 product), same read patterns as the vector sequencer, using
//         only the multiply stage of the dot-product unit;
// VSMUL - reads the scalar byte at scalarB_addr (reg3) once, then multiplies
//         every element of srcA by it;
// VMM   - vector (srcA, 1 x in_size) times matrix (srcB, stored as out_size
//         rows of in_size bytes): for each output element the vector is read
//         8 elements at a time together with the matching matrix row slice,
//         fed to the dot-product unit with the lanes past in_size masked off
//         and the accumulator cleared on the first slice; the low byte of the
//         sum is written to dest+o. The vector address then rolls back and
//         the matrix address moves on by in_size.
// Port 0 drives the bank of srcA, port 1 the other bank. A step is: read
// (1 or 2 cycles), capture, feed, and for VMUL/VSMUL write the products one
// cycle later; VMM waits two cycles for the accumulator before its write.
// done pulses for one cycle with the board entry. The matrix layout follows
// the worked VMM example of the design; cycle counts are this
// implementation's.
module vmul_seq
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
  typedef enum logic [3:0] { IDLE, SRD, SCAP, RD1, RD2, RD3, FEED, WAITP, WR, DR1, DR2, WRB } st_e;
  st_e   st;
  vop_e  op;
  word_t dst, sa, sb, size, off, osz, o, mrow;
  logic [63:0] ca, cb;
  logic [7:0]  scal;
  logic  pb, pd;

  logic        dp_valid, dp_clear;
  logic [7:0]  dp_mask;
  logic [15:0] prod [VLANES];
  logic        pvalid, avalid;
  logic [31:0] acc;

  dot_product u_dp (.clk, .rst_n, .valid(dp_valid), .clear(dp_clear), .mask(dp_mask),
                    .a(ca), .b(op == V_SMUL ? {8{scal}} : cb), .prod, .pvalid, .acc, .avalid);

  logic  mm;
  word_t baddr;
  assign mm    = (op == V_MM);
  assign baddr = mm ? (mrow + off) : (sb + off);
  assign busy  = (st != IDLE);

  always_comb begin
    logic [63:0] pl;
    for (int i = 0; i < VLANES; i++) pl[8*i +: 8] = prod[i][7:0];
    bq[0] = '0; bq[1] = '0;
    dp_valid = (st == FEED);
    dp_clear = (off == 0);
    dp_mask  = strb_rem(size - off, 8);
    unique case (st)
      SRD: begin bq[pb].en = 1'b1; bq[pb].addr = BANK_BW'(sb); end
      RD1: begin
        bq[0].en = 1'b1; bq[0].addr = BANK_BW'(sa + off);
        if (op != V_SMUL && pb) begin bq[1].en = 1'b1; bq[1].addr = BANK_BW'(baddr); end
      end
      RD2: if (op != V_SMUL && !pb) begin bq[0].en = 1'b1; bq[0].addr = BANK_BW'(baddr); end
      WR: begin
        bq[pd].en = 1'b1; bq[pd].we = 1'b1; bq[pd].addr = BANK_BW'(dst + off);
        bq[pd].wdata = pl; bq[pd].wstrb = strb_rem(size - off, 8);
      end
      WRB: begin
        bq[pd].en = 1'b1; bq[pd].we = 1'b1; bq[pd].addr = BANK_BW'(dst + o);
        bq[pd].wdata = {56'b0, acc[7:0]}; bq[pd].wstrb = 8'h01;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; op <= V_NONE; dst <= '0; sa <= '0; sb <= '0; size <= '0; off <= '0;
      osz <= '0; o <= '0; mrow <= '0; ca <= '0; cb <= '0; scal <= '0; pb <= 1'b0; pd <= 1'b0;
      done <= 1'b0; done_entry <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          op <= inst.vop; dst <= inst.r[0]; size <= inst.r[1];
          sa <= inst.r[2]; sb <= inst.r[3]; mrow <= inst.r[3];
          osz <= inst.r[4];
          o <= '0; off <= '0; done_entry <= entry;
          pb <= bank_of(inst.r[3]) != bank_of(inst.r[2]);
          pd <= bank_of(inst.r[0]) != bank_of(inst.r[2]);
          if (inst.r[1] == 0 || (inst.vop == V_MM && inst.r[4] == 0)) done <= 1'b1;
          else st <= (inst.vop == V_SMUL) ? SRD : RD1;
        end
        SRD:  st <= SCAP;
        SCAP: begin scal <= brdata[pb][7:0]; st <= RD1; end
        RD1:  st <= RD2;
        RD2: begin
          ca <= brdata[0];
          if (pb) cb <= brdata[1];
          st <= (op != V_SMUL && !pb) ? RD3 : FEED;
        end
        RD3:  begin cb <= brdata[0]; st <= FEED; end
        FEED: begin
          if (mm) begin
            off <= off + 32'd8;
            if (off + 32'd8 >= size) st <= DR1;
            else st <= RD1;
          end else st <= WAITP;
        end
        WAITP: st <= WR;
        WR: begin
          off <= off + 32'd8;
          if (off + 32'd8 >= size) begin st <= IDLE; done <= 1'b1; end
          else st <= RD1;
        end
        DR1: st <= DR2;
        DR2: st <= WRB;
        WRB: begin
          o <= o + 32'd1; off <= '0; mrow <= mrow + size;
          if (o + 32'd1 >= osz) begin st <= IDLE; done <= 1'b1; end
          else st <= RD1;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule

// mldv_unit: integer multiplication/division unit (M extension).
//
// Multiplications complete in one cycle. Divisions and remainders use a
// sequential restoring binary divider that retires one quotient bit per cycle,
// so a 32-bit division takes 32 cycles, as the design specifies. Signed
// operations divide magnitudes and fix the signs at the end; division by zero
// and overflow give the RISC-V defined results.
//
// Interface: start/op/a/b are taken when the unit is idle (ready=1). The
// result appears as done=1 for one cycle with the instruction's tag:
// one cycle after start for MUL*, 33 cycles after start for DIV*/REM*.
// kill aborts the instruction in flight (used on a branch miss when the
// instruction is speculative).
module mldv_unit
  import rv_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  md_op_e op,
  input  word_t  a,
  input  word_t  b,
  input  rtag_t  tag_in,
  input  logic   kill,
  output logic   ready,
  output logic   busy_div,
  output rtag_t  tag_out,
  output logic   done,
  output word_t  result
);
  typedef enum logic [1:0] { IDLE, DIVIDE, FIX } st_e;
  st_e st;
  logic [5:0]  cnt;
  logic [31:0] quo, dvsr;
  logic [32:0] rem;
  logic        neg_q, neg_r, want_rem, special;
  word_t       special_res;

  // single-cycle multiplier
  logic signed [65:0] prod;
  always_comb begin
    logic signed [32:0] ea, eb;
    ea = (op == MD_MULHU) ? $signed({1'b0, a}) : $signed({a[31], a});
    eb = (op == MD_MULHU || op == MD_MULHSU) ? $signed({1'b0, b}) : $signed({b[31], b});
    prod = ea * eb;
  end

  logic is_div;
  assign is_div = (op == MD_DIV) || (op == MD_DIVU) || (op == MD_REM) || (op == MD_REMU);
  assign ready    = (st == IDLE);
  assign busy_div = (st != IDLE);

  logic [32:0] trial;
  assign trial = {rem[31:0], quo[31]} - {1'b0, dvsr};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; done <= 1'b0; result <= '0; tag_out <= '0; cnt <= '0;
      quo <= '0; rem <= '0; dvsr <= '0; neg_q <= 1'b0; neg_r <= 1'b0;
      want_rem <= 1'b0; special <= 1'b0; special_res <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          tag_out <= tag_in;
          if (!is_div) begin
            done   <= 1'b1;
            result <= (op == MD_MUL) ? prod[31:0] : prod[63:32];
          end else begin
            logic sgn;
            sgn      = (op == MD_DIV) || (op == MD_REM);
            want_rem <= (op == MD_REM) || (op == MD_REMU);
            neg_q    <= sgn && (a[31] ^ b[31]) && (b != 0);
            neg_r    <= sgn && a[31];
            quo      <= (sgn && a[31]) ? -a : a;
            dvsr     <= (sgn && b[31]) ? -b : b;
            rem      <= '0;
            cnt      <= 6'd32;
            special  <= (b == 0);
            special_res <= ((op == MD_REM) || (op == MD_REMU)) ? a : 32'hFFFF_FFFF;
            st       <= DIVIDE;
          end
        end
        DIVIDE: begin
          // restoring step: shift in next dividend bit, subtract if it fits
          if (!trial[32]) rem <= trial;
          else            rem <= {rem[31:0], quo[31]};
          quo <= {quo[30:0], !trial[32]};
          cnt <= cnt - 6'd1;
          if (cnt == 6'd1) st <= FIX;
        end
        FIX: begin
          done <= 1'b1;
          st   <= IDLE;
          if (special)       result <= special_res;
          else if (want_rem) result <= neg_r ? -rem[31:0] : rem[31:0];
          else               result <= neg_q ? -quo : quo;
        end
        default: st <= IDLE;
      endcase
      if (kill) begin
        st   <= IDLE;
        done <= 1'b0;
      end
    end
  end
endmodule

// ldst_unit: load/store processing unit.
//
// Takes one instruction at a time from the in-order load/store station, so
// loads and stores reach memory in program order, and only when they are no
// longer speculative (the station guarantees that). Address = rs1 + imm.
// Stores drive req/we/wstrb until the arbiter grants the port and then finish;
// loads wait for rvalid (one cycle after the grant in this system), then
// extract and sign- or zero-extend the byte, half or word. The result goes out
// on this unit's CDB lane for one cycle (done). A misaligned access is not
// performed; it raises xcp and completes. FENCE waits until the vector
// co-processor is idle (vec_idle), so later scalar accesses cannot overtake
// vector stores to external memory.
// The external port is 32-bit with byte strobes; the handshake (req held
// until gnt, read data one cycle after gnt) is this implementation's choice.
module ldst_unit
  import rv_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  mem_op_t    op,
  input  word_t      base,
  input  word_t      wval,
  input  word_t      imm,
  input  rtag_t      tag_in,
  input  logic       vec_idle,
  output logic       ready,
  // external memory port (to the arbiter)
  output logic       req,
  output logic       we,
  output word_t      addr,
  output word_t      wdata,
  output logic [3:0] wstrb,
  input  logic       gnt,
  input  logic       rvalid,
  input  word_t      rdata,
  // result
  output logic       done,
  output rtag_t      tag_out,
  output word_t      result,
  output logic       xcp
);
  typedef enum logic [1:0] { IDLE, REQ, RESP, FENCE } st_e;
  st_e st;
  mem_op_t op_q;
  word_t   addr_q, wval_q;

  assign ready = (st == IDLE);
  assign req   = (st == REQ);
  assign we    = op_q.store;
  assign addr  = {addr_q[31:2], 2'b00};
  always_comb begin
    unique case (op_q.funct3[1:0])
      2'd0:    begin wdata = {4{wval_q[7:0]}};  wstrb = 4'b0001 << addr_q[1:0]; end
      2'd1:    begin wdata = {2{wval_q[15:0]}}; wstrb = 4'b0011 << addr_q[1:0]; end
      default: begin wdata = wval_q;            wstrb = 4'b1111; end
    endcase
  end

  function automatic word_t load_ext(word_t w, logic [1:0] a, logic [2:0] f3);
    word_t s;
    s = w >> (8 * a);
    unique case (f3)
      3'd0:    return {{24{s[7]}}, s[7:0]};
      3'd1:    return {{16{s[15]}}, s[15:0]};
      3'd4:    return {24'b0, s[7:0]};
      3'd5:    return {16'b0, s[15:0]};
      default: return s;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; op_q <= '0; addr_q <= '0; wval_q <= '0;
      done <= 1'b0; tag_out <= '0; result <= '0; xcp <= 1'b0;
    end else begin
      done <= 1'b0;
      xcp  <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          word_t a;
          logic  mis;
          a = base + imm;
          mis = (op.funct3[1:0] == 2'd1 && a[0]) || (op.funct3[1:0] == 2'd2 && a[1:0] != 2'd0);
          op_q <= op; addr_q <= a; wval_q <= wval; tag_out <= tag_in;
          if (op.fence)  st <= FENCE;
          else if (mis) begin done <= 1'b1; xcp <= 1'b1; result <= a; end
          else           st <= REQ;
        end
        REQ: if (gnt) begin
          if (op_q.store) begin st <= IDLE; done <= 1'b1; result <= '0; end
          else st <= RESP;
        end
        RESP: if (rvalid) begin
          st <= IDLE; done <= 1'b1; result <= load_ext(rdata, addr_q[1:0], op_q.funct3);
        end
        FENCE: if (vec_idle) begin st <= IDLE; done <= 1'b1; result <= '0; end
        default: st <= IDLE;
      endcase
    end
  end
endmodule

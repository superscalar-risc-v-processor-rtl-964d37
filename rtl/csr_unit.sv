// csr_unit: the CSR buffer, executing Zicsr instructions.
//
// Holds the machine-mode CSRs this core implements: mstatus, mie, mtvec,
// mscratch, mepc, mcause, mtval, mip and the read-only counters mcycle,
// minstret (low and high halves), misa and mhartid. CSRRW/CSRRS/CSRRC and
// their immediate forms read the old value into rd and write the new value;
// unknown CSR numbers read as zero and ignore writes. The CSR station issues
// only non-speculative instructions in order, so writes are never undone.
// System instructions (FENCE.I, ECALL, EBREAK) complete here as no-ops: the
// trap entry and exception handling of the original core are not part of
// this implementation. One instruction per cycle; the result is registered
// and appears on the CSR CDB lane one cycle after start.
module csr_unit
  import rv_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [1:0]  op,        // csr_op_e, 0 = no CSR access
  input  logic [11:0] csr_id,
  input  word_t       src,       // rs1 value or zero-extended zimm
  input  rtag_t       tag_in,
  input  logic [1:0]  retired,   // instructions committed this cycle
  output logic        done,
  output rtag_t       tag_out,
  output word_t       result
);
  word_t mstatus, mie, mtvec, mscratch, mepc, mcause, mtval, mip;
  logic [63:0] mcycle, minstret;

  function automatic word_t rd_csr(logic [11:0] id);
    unique case (id)
      12'h300: return mstatus;
      12'h301: return 32'h4000_1100;  // RV32IM
      12'h304: return mie;
      12'h305: return mtvec;
      12'h340: return mscratch;
      12'h341: return mepc;
      12'h342: return mcause;
      12'h343: return mtval;
      12'h344: return mip;
      12'hB00, 12'hC00: return mcycle[31:0];
      12'hB80, 12'hC80: return mcycle[63:32];
      12'hB02, 12'hC02: return minstret[31:0];
      12'hB82, 12'hC82: return minstret[63:32];
      12'hF14: return '0;
      default: return '0;
    endcase
  endfunction

  word_t old, nval;
  assign old = rd_csr(csr_id);
  always_comb begin
    unique case (op)
      2'd1:    nval = src;
      2'd2:    nval = old | src;
      2'd3:    nval = old & ~src;
      default: nval = old;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mstatus <= '0; mie <= '0; mtvec <= '0; mscratch <= '0; mepc <= '0;
      mcause <= '0; mtval <= '0; mip <= '0; mcycle <= '0; minstret <= '0;
      done <= 1'b0; tag_out <= '0; result <= '0;
    end else begin
      mcycle   <= mcycle + 64'd1;
      minstret <= minstret + 64'(retired);
      done     <= start;
      if (start) begin
        tag_out <= tag_in;
        result  <= old;
        if (op != 2'd0 && !(op != 2'd1 && src == '0)) begin
          unique case (csr_id)
            12'h300: mstatus  <= nval;
            12'h304: mie      <= nval;
            12'h305: mtvec    <= nval;
            12'h340: mscratch <= nval;
            12'h341: mepc     <= nval;
            12'h342: mcause   <= nval;
            12'h343: mtval    <= nval;
            12'h344: mip      <= nval;
            12'hB00: mcycle[31:0]    <= nval;
            12'hB80: mcycle[63:32]   <= nval;
            12'hB02: minstret[31:0]  <= nval;
            12'hB82: minstret[63:32] <= nval;
            default: ;
          endcase
        end
      end
    end
  end
endmodule

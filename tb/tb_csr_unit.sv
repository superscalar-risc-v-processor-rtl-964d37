// tb_csr_unit: runs Zicsr instructions on the processor and checks every
// form: CSRRW/CSRRS/CSRRC with a register, CSRRWI/CSRRSI/CSRRCI with an
// immediate (old value into rd, new value written), the read-only misa,
// mcycle increasing between two reads, minstret counting retired
// instructions, an unknown CSR reading as zero, and rd = x0 not written.
// The CSR unit is tested inside the complete processor because its operands
// arrive through the in-order non-speculative CSR station.
`timescale 1ns/1ps
module tb_csr_unit;
  localparam int WD_CYCLES = 20000;
  `include "sys_env.svh"

  initial begin
    for (int i = 0; i < 64; i++) dmem[i] = '0;
    emit(a_lui(1, 32'h10000));
    emit(a_addi(5, 0, 12'h234));
    emit(a_csr(3'd1, 6, 12'h340, 5));      // csrrw  x6 <- mscratch(0), mscratch = 0x234
    emit(a_csr(3'd2, 7, 12'h340, 0));      // csrrs  x7 <- 0x234
    emit(a_addi(9, 0, 12'h0f0));
    emit(a_csr(3'd3, 8, 12'h340, 9));      // csrrc  x8 <- 0x234, mscratch = 0x204
    emit(a_csr(3'd6, 10, 12'h340, 1));     // csrrsi x10 <- 0x204, mscratch = 0x205
    emit(a_csr(3'd5, 11, 12'h340, 31));    // csrrwi x11 <- 0x205, mscratch = 31
    emit(a_csr(3'd7, 12, 12'h340, 3));     // csrrci x12 <- 31, mscratch = 28
    emit(a_csr(3'd2, 13, 12'h340, 0));     // x13 = 28
    emit(a_csr(3'd2, 14, 12'h301, 0));     // misa
    emit(a_csr(3'd2, 15, 12'hB00, 0));     // mcycle
    for (int i = 0; i < 6; i++) emit(a_addi(20, 20, 1));
    emit(a_csr(3'd2, 16, 12'hB00, 0));     // mcycle later
    emit(a_csr(3'd2, 17, 12'h7C0, 0));     // unknown CSR
    emit(a_csr(3'd2, 18, 12'hB02, 0));     // minstret
    emit(a_csr(3'd1, 0, 12'h305, 5));      // csrrw x0: mtvec = 0x234, no rd write
    emit(a_csr(3'd2, 19, 12'h305, 0));
    emit(a_sub(16, 16, 15));
    for (int r = 6; r <= 19; r++) emit(a_sw(r, 1, 4 * r));
    run_prog();
    check("csrrw old", dmem[6], 0);
    check("csrrs read", dmem[7], 32'h234);
    check("csrrc old", dmem[8], 32'h234);
    check("csrrsi old", dmem[10], 32'h204);
    check("csrrwi old", dmem[11], 32'h205);
    check("csrrci old", dmem[12], 31);
    check("final mscratch", dmem[13], 28);
    check("misa", dmem[14], 32'h4000_1100);
    check("mcycle advances", 32'(dmem[16] > 0 && dmem[16] < 200), 1);
    check("unknown CSR", dmem[17], 0);
    check("minstret", 32'(dmem[18] >= 10 && dmem[18] <= 20), 1);
    check("csrrw with rd x0 still writes", dmem[19], 32'h234);
    finish_tb();
  end
endmodule

// tb_ldst_unit: runs loads and stores of every width on the processor and
// checks sign and zero extension (LB/LBU/LH/LHU), byte and half-word stores
// that change only their bytes, a load right after a store to the same word
// (program order), and that misaligned accesses are not performed. The unit
// is tested inside the processor because its operands, ordering and memory
// port come from the in-order station and the arbiter.
`timescale 1ns/1ps
module tb_ldst_unit;
  localparam int WD_CYCLES = 20000;
  `include "sys_env.svh"

  initial begin
    for (int i = 0; i < 64; i++) dmem[i] = '0;
    dmem[0] = 32'h80ff_7f01;
    dmem[3] = 32'h1111_1111;
    emit(a_lui(1, 32'h10000));
    emit(a_ld(3'd0, 2, 1, 1));   // lb  0x7f
    emit(a_ld(3'd0, 3, 1, 2));   // lb  0xff -> -1
    emit(a_ld(3'd4, 4, 1, 2));   // lbu 0xff
    emit(a_ld(3'd1, 5, 1, 2));   // lh  0x80ff -> sign
    emit(a_ld(3'd5, 6, 1, 2));   // lhu
    emit(a_ld(3'd2, 7, 1, 0));   // lw
    emit(a_addi(8, 0, 12'h0ab));
    emit(a_st(3'd0, 8, 1, 5));   // sb at byte 5
    emit(a_lui(9, 32'hcafe0));
    emit(a_st(3'd1, 9, 1, 6));   // sh at byte 6 stores low half 0x0000
    emit(a_addi(9, 9, 12'h7ed));
    emit(a_st(3'd1, 9, 1, 8));   // sh 0x07ed at byte 8
    emit(a_sw(8, 1, 12));
    emit(a_lw(10, 1, 12));       // load after store
    emit(a_sw(8, 1, 17));        // misaligned store: not performed
    emit(a_lw(11, 1, 2));        // misaligned load: not performed
    for (int r = 2; r <= 10; r++) emit(a_sw(r, 1, 32 + 4 * r));
    run_prog();
    check("lb positive", dmem[8 + 2], 32'h7f);
    check("lb negative", dmem[8 + 3], 32'hffff_ffff);
    check("lbu", dmem[8 + 4], 32'hff);
    check("lh", dmem[8 + 5], 32'hffff_80ff);
    check("lhu", dmem[8 + 6], 32'h80ff);
    check("lw", dmem[8 + 7], 32'h80ff_7f01);
    check("sb/sh word", dmem[1], 32'h0000_ab00);
    check("sh", dmem[2], 32'h0000_07ed);
    check("load after store", dmem[8 + 10], 32'hab);
    check("misaligned store ignored", dmem[4], 0);
    finish_tb();
  end
endmodule

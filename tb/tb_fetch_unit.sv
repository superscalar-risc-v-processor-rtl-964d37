// tb_fetch_unit: programs that exercise instruction fetch on the processor:
// jumps to the second word of a 64-bit fetch group (slot 0 must be dropped),
// a taken branch in slot 0 (slot 1 must be dropped), JAL/JALR link values,
// backward loops that the predictor learns, and redirects after a miss.
// Skipped instructions would corrupt the counters stored to memory.
`timescale 1ns/1ps
module tb_fetch_unit;
  localparam int WD_CYCLES = 30000;
  `include "sys_env.svh"

  initial begin
    for (int i = 0; i < 64; i++) dmem[i] = '0;
    emit(a_lui(1, 32'h10000));       // 0
    emit(a_jal(2, 12));              // 4: to 16 (second word of group 2)
    emit(a_addi(3, 3, 100));         // 8  skipped
    emit(a_addi(3, 3, 100));         // 12 skipped
    emit(a_addi(3, 3, 1));           // 16
    emit(a_addi(4, 0, 8));           // 20
    emit(a_addi(5, 5, 2));           // 24 loop body
    emit(a_addi(4, 4, -1));          // 28
    emit(a_bne(4, 0, -8));           // 32 slot 0 of its group, backward
    emit(a_addi(6, 6, 1));           // 36 after loop: once
    emit(a_jal(7, 8));               // 40: to 48 (slot 0 branch, slot 1 dropped)
    emit(a_addi(3, 3, 100));         // 44 skipped
    emit(a_addi(8, 0, 64));          // 48
    emit(a_jalr(9, 8, 4));           // 52: to 68
    emit(a_addi(3, 3, 100));         // 56 skipped
    emit(a_addi(3, 3, 100));         // 60 skipped
    emit(a_addi(3, 3, 100));         // 64 skipped
    emit(a_sw(2, 1, 0));             // 68
    emit(a_sw(3, 1, 4));
    emit(a_sw(5, 1, 8));
    emit(a_sw(6, 1, 12));
    emit(a_sw(7, 1, 16));
    emit(a_sw(9, 1, 20));
    run_prog();
    check("jal link", dmem[0], 8);
    check("skipped instructions not executed", dmem[1], 1);
    check("loop count", dmem[2], 16);
    check("after loop once", dmem[3], 1);
    check("second jal link", dmem[4], 44);
    check("jalr link", dmem[5], 56);
    check("predictor learned the loop", 32'(n_hit >= 4), 1);
    finish_tb();
  end
endmodule

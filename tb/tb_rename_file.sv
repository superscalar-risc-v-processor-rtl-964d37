// tb_rename_file: programs that stress register renaming on the processor:
// a long divide followed by younger writers of the same register (WAW, the
// newest value must win and readers must see the right version), nine
// unretired writers of one register (busy counter limit), and taken branches
// that are first predicted not-taken so that wrong-path writers of a register
// must be undone by restoring the backup sheet. Register values are stored to
// memory and compared with values computed here.
`timescale 1ns/1ps
module tb_rename_file;
  localparam int WD_CYCLES = 30000;
  `include "sys_env.svh"

  initial begin
    for (int i = 0; i < 64; i++) dmem[i] = '0;
    emit(a_lui(1, 32'h10000));
    emit(a_addi(2, 0, 700));
    emit(a_addi(3, 0, 7));
    emit(a_div(5, 2, 3));          // x5 = 100, slow
    emit(a_add(6, 5, 3));          // x6 = 107 (reads the divide's x5)
    emit(a_addi(5, 0, 9));         // x5 = 9 (newer)
    emit(a_add(7, 5, 5));          // x7 = 18
    emit(a_sw(5, 1, 0));
    emit(a_sw(6, 1, 4));
    emit(a_sw(7, 1, 8));
    for (int i = 0; i < 12; i++) emit(a_addi(8, 8, 5));  // x8 = 60
    emit(a_sw(8, 1, 12));
    // wrong path writers: loop of 4, each iteration a forward taken branch
    emit(a_addi(10, 0, 4));
    emit(a_addi(11, 0, 1));
    emit(a_beq(0, 0, 12));         // taken; first time predicted not taken
    emit(a_addi(11, 0, 99));       // wrong path
    emit(a_addi(12, 0, 99));       // wrong path
    emit(a_add(13, 13, 11));       // x13 += 1
    emit(a_addi(10, 10, -1));
    emit(a_bne(10, 0, -20));
    emit(a_sw(11, 1, 16));
    emit(a_sw(12, 1, 20));
    emit(a_sw(13, 1, 24));
    run_prog();
    check("newest writer wins", dmem[0], 9);
    check("reader of older version", dmem[1], 107);
    check("reader of newer version", dmem[2], 18);
    check("twelve writers of one register", dmem[3], 60);
    check("wrong-path write undone", dmem[4], 1);
    check("wrong-path write undone 2", dmem[5], 0);
    check("loop after recovery", dmem[6], 4);
    check("mispredictions happened", 32'(n_miss > 0), 1);
    check("busy counter limit reached", 32'(n_busy > 0), 1);
    finish_tb();
  end
endmodule

// tb_commit_buffer: programs that exercise the commit buffer on the
// processor: more than 64 instructions behind one divide (the buffer fills
// and dispatch waits), in-order commit of stores to one address (the last
// store in program order wins), dual commit, and tail roll-back on a
// misprediction. Results are compared with values computed here.
`timescale 1ns/1ps
module tb_commit_buffer;
  localparam int WD_CYCLES = 30000;
  `include "sys_env.svh"

  initial begin
    for (int i = 0; i < 64; i++) dmem[i] = '0;
    emit(a_lui(1, 32'h10000));
    emit(a_addi(2, 0, 99));
    emit(a_addi(3, 0, 3));
    emit(a_div(4, 2, 3));          // 33
    for (int i = 0; i < 70; i++) emit(a_addi(5 + (i % 2), 5 + (i % 2), 1));
    emit(a_sw(4, 1, 0));
    emit(a_sw(5, 1, 0));           // [0] = 35 (last store wins)
    emit(a_sw(6, 1, 4));
    emit(a_addi(7, 0, 3));
    emit(a_beq(0, 0, 8));          // taken, predicted not taken
    emit(a_addi(7, 0, 50));        // squashed
    emit(a_sw(7, 1, 8));
    emit(a_sw(4, 1, 12));
    run_prog();
    check("last store in program order", dmem[0], 35);
    check("second chain", dmem[1], 35);
    check("squashed entry not committed", dmem[2], 3);
    check("divide result committed", dmem[3], 33);
    check("dual commit", 32'(n_ret > 0 && n_ret < 2 * cyc), 1);
    finish_tb();
  end
endmodule

// tb_vec_board: vector instruction sequences whose correctness depends on
// the board's ordering: read-after-write through a bank (load, then add,
// then store of the sum), write-after-read (a load that overwrites a region
// still to be stored), write-after-write to one bank, more independent
// instructions than the board has entries (the core must wait), and
// instructions on different banks that may finish out of order.
`timescale 1ns/1ps
module tb_vec_board;
  localparam int WD_CYCLES = 60000;
  `include "sys_env.svh"
  `include "vec_env.svh"
  localparam int SRC = 32'h1000_0400, OUT = 32'h1000_8000;
  initial begin
    clear_dmem();
    fill_src(SRC, 1024);
    emit(a_lui(1, 32'h10000));

    v_load(0, 0, 40, SRC);
    v_arith(0, 0, 64, 40, 0, 0, 0, 0);      // RAW on bank0: x + x
    v_store(OUT, 0, 64, 40);                // RAW on the sum
    v_load(0, 64, 40, SRC + 200);           // WAR: must wait for the store
    v_store(OUT + 64, 0, 64, 40);
    v_scopy(1, 0, 30, 7);
    v_scopy(1, 0, 30, 9);                   // WAW
    v_store(OUT + 128, 1, 0, 30);
    for (int k = 0; k < 6; k++) v_scopy(2 + (k % 2), 8 * (k / 2), 8, k + 1);
    v_store(OUT + 192, 2, 0, 24);
    v_store(OUT + 256, 3, 0, 24);
    run_prog();
    check_out(OUT, 2048);
    check("no vector exception", 32'(vec_xcp), 0);
    finish_tb();
  end
endmodule

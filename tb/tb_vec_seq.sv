// tb_vec_seq: the element-wise operations VADD, VGTM, VCOPY and VSCOPY with
// sources in two banks (read-write pattern), both sources in one bank
// (read_a-read_b-write), misaligned offsets, sizes that end inside an 8-byte
// step, and copies within and across banks. Results are stored out and
// compared with a byte model computed here with signed 8-bit wrap-around.
`timescale 1ns/1ps
module tb_vec_seq;
  localparam int WD_CYCLES = 60000;
  `include "sys_env.svh"
  `include "vec_env.svh"
  localparam int SRC = 32'h1000_0400, OUT = 32'h1000_8000;
  initial begin
    clear_dmem();
    fill_src(SRC, 1024);
    emit(a_lui(1, 32'h10000));

    v_load(0, 0, 64, SRC);
    v_load(1, 0, 64, SRC + 64);
    v_arith(0, 0, 100, 23, 0, 0, 1, 0);     // vadd bank0@100 = bank0@0 + bank1@0
    v_arith(1, 1, 200, 17, 1, 0, 0, 3);     // vgtm bank1@200 = max(bank1@0, bank0@3)
    v_arith(0, 0, 300, 23, 0, 5, 0, 100);   // vadd, both sources in bank0
    v_copy(2, 5, 0, 0, 40);                 // copy bank0 -> bank2, misaligned
    v_copy(0, 400, 0, 1, 12);               // copy within bank0
    v_scopy(3, 9, 11, -123);                // fill bank3 with a scalar byte
    v_arith(1, 3, 30, 11, 3, 9, 2, 5);      // vgtm bank3@30 = max(bank3@9, bank2@5)
    v_store(OUT, 0, 100, 23);
    v_store(OUT + 64, 1, 200, 17);
    v_store(OUT + 128, 0, 300, 23);
    v_store(OUT + 192, 2, 5, 40);
    v_store(OUT + 256, 0, 400, 12);
    v_store(OUT + 320, 3, 9, 11);
    v_store(OUT + 384, 3, 30, 11);
    run_prog();
    check_out(OUT, 2048);
    check("no vector exception", 32'(vec_xcp), 0);
    finish_tb();
  end
endmodule

// tb_vmul_seq: VMUL (element-wise product), VSMUL (product with a scalar
// byte read from a bank) and VMM (vector times matrix through the
// dot-product unit) with several sizes, including in_size not a multiple of
// 8 (masked lanes), a single-row matrix and both operands in one bank.
// Results (low byte of each product or sum) are stored out and compared with
// a model computed here.
`timescale 1ns/1ps
module tb_vmul_seq;
  localparam int WD_CYCLES = 60000;
  `include "sys_env.svh"
  `include "vec_env.svh"
  localparam int SRC = 32'h1000_0400, OUT = 32'h1000_8000;
  initial begin
    clear_dmem();
    fill_src(SRC, 1024);
    emit(a_lui(1, 32'h10000));

    v_load(0, 0, 128, SRC);
    v_load(1, 0, 256, SRC + 128);
    v_arith(2, 0, 512, 19, 0, 0, 1, 0);     // vmul bank0@512 = bank0 * bank1
    v_arith(3, 1, 600, 21, 0, 3, 1, 7);     // vsmul bank1@600 = bank0@3 * bank1[7]
    v_mm(0, 700, 11, 0, 0, 1, 0, 3);        // 1x11 times 11x3
    v_mm(1, 800, 16, 0, 20, 1, 40, 5);      // 1x16 times 16x5
    v_mm(0, 900, 5, 0, 40, 0, 60, 1);       // vector and matrix in bank0
    v_store(OUT, 0, 512, 19);
    v_store(OUT + 64, 1, 600, 21);
    v_store(OUT + 128, 0, 700, 3);
    v_store(OUT + 192, 1, 800, 5);
    v_store(OUT + 256, 0, 900, 1);
    run_prog();
    check_out(OUT, 2048);
    check("no vector exception", 32'(vec_xcp), 0);
    finish_tb();
  end
endmodule

// tb_lenet_fc_slice: one slice of the first fully connected layer of
// LeNet-5 on the complete processor: 400 input bytes times a 400 x 8 weight
// matrix (3200 bytes, the largest slice that fits one 4 KB bank together
// with its bias), plus bias and ReLU, as the vector kernel of that layer
// would run it: VLOAD input, weights and bias, VMM, VADD bias, VSCOPY zeros,
// VGTM against zero (ReLU), VSTORE. The 8 results are compared with a model
// using 8-bit wrap-around arithmetic, and the cycle count is reported.
`timescale 1ns/1ps
module tb_lenet_fc_slice;
  localparam int WD_CYCLES = 60000;
  `include "sys_env.svh"
  `include "vec_env.svh"
  localparam int X = 32'h1000_1000, W = 32'h1000_2000, BIAS = 32'h1000_3000, OUT = 32'h1000_8000;
  initial begin
    clear_dmem();
    fill_src(X, 400);
    fill_src(W, 3200);
    fill_src(BIAS, 8);
    emit(a_lui(1, 32'h10000));
    v_load(0, 0, 400, X);
    v_load(1, 0, 3200, W);
    v_load(2, 0, 8, BIAS);
    v_mm(0, 512, 400, 0, 0, 1, 0, 8);
    v_arith(0, 0, 600, 8, 0, 512, 2, 0);
    v_scopy(3, 0, 8, 0);
    v_arith(1, 0, 700, 8, 0, 600, 3, 0);
    v_store(OUT, 0, 700, 8);
    run_prog();
    check_out(OUT, 64);
    check("no vector exception", 32'(vec_xcp), 0);
    check("all vector instructions retired", 32'(n_vi == 8 && n_vr == 8), 1);
    $display("fc slice (400x8): %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_lenet_conv: a small convolution layer in the style of LeNet-5 on the
// complete processor: a 6x6 single-channel input, two 3x3 kernels, a 4x4x2
// output. For each output pixel and each kernel row one VMM multiplies the
// three input bytes of that row (a 1x3 vector) by the 3x2 weight slice of the
// row (two rows of 3 bytes, one per output channel); VADD sums the three
// partial results. Output pixels are stored depth first (2 bytes each). The
// result is compared with a model and with a direct convolution computed
// here with 8-bit wrap-around, and the cycle count is reported.
`timescale 1ns/1ps
module tb_lenet_conv;
  localparam int WD_CYCLES = 100000;
  `include "sys_env.svh"
  `include "vec_env.svh"
  localparam int IN = 32'h1000_1000, WT = 32'h1000_2000, OUT = 32'h1000_8000;
  localparam int W = 6, K = 3, OC = 2, OW = W - K + 1;
  initial begin
    clear_dmem();
    fill_src(IN, W * W);
    fill_src(WT, K * K * OC);
    emit(a_lui(1, 32'h10000));
    v_load(0, 0, W * W, IN);
    v_load(1, 0, K * K * OC, WT);          // weights: [kernel row][channel][kernel column]
    for (int r = 0; r < OW; r++)
      for (int c = 0; c < OW; c++) begin
        int o; o = 1024 + (r * OW + c) * OC;
        v_mm(0, o, K, 0, (r + 0) * W + c, 1, 0, OC);
        for (int kr = 1; kr < K; kr++) begin
          v_mm(0, 512, K, 0, (r + kr) * W + c, 1, kr * K * OC, OC);
          v_arith(0, 0, o, OC, 0, o, 0, 512);
        end
      end
    v_store(OUT, 0, 1024, OW * OW * OC);
    run_prog();
    check_out(OUT, 128);
    for (int r = 0; r < OW; r++)
      for (int c = 0; c < OW; c++)
        for (int ch = 0; ch < OC; ch++) begin
          logic [7:0] acc; acc = 0;
          for (int kr = 0; kr < K; kr++)
            for (int kc = 0; kc < K; kc++)
              acc += 8'($signed(dbyte(IN + (r + kr) * W + c + kc)) * $signed(dbyte(WT + kr * K * OC + ch * K + kc)));
          check($sformatf("conv (%0d,%0d,%0d)", r, c, ch), {24'b0, dbyte(OUT + (r * OW + c) * OC + ch)}, {24'b0, acc});
        end
    check("no vector exception", 32'(vec_xcp), 0);
    $display("3x3 convolution 6x6x1 -> 4x4x2: %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_lenet_pool: a 2x2 max-pooling layer in the style of LeNet-5 on the
// complete processor, reduced to a 6-channel 8x8 input map (384 bytes) and a
// 4x4 output map. Feature maps are stored depth first, then column, then row
// (byte (r, c, d) at (r*W + c)*6 + d). Each output pixel is VCOPY of the top
// left input pixel's 6 channels followed by three VGTM with the other window
// pixels, all within one bank; the output is stored and compared with a
// model, and the cycle count is reported.
`timescale 1ns/1ps
module tb_lenet_pool;
  localparam int WD_CYCLES = 60000;
  `include "sys_env.svh"
  `include "vec_env.svh"
  localparam int IN = 32'h1000_1000, OUT = 32'h1000_8000;
  localparam int W = 8, D = 6, OW = W / 2;
  function automatic int px(int r, int c, int w); return (r * w + c) * D; endfunction
  initial begin
    clear_dmem();
    fill_src(IN, W * W * D);
    emit(a_lui(1, 32'h10000));
    v_load(0, 0, W * W * D, IN);
    for (int r = 0; r < OW; r++)
      for (int c = 0; c < OW; c++) begin
        int o; o = 1024 + px(r, c, OW);
        v_copy(0, o, 0, px(2 * r, 2 * c, W), D);
        v_arith(1, 0, o, D, 0, o, 0, px(2 * r, 2 * c + 1, W));
        v_arith(1, 0, o, D, 0, o, 0, px(2 * r + 1, 2 * c, W));
        v_arith(1, 0, o, D, 0, o, 0, px(2 * r + 1, 2 * c + 1, W));
      end
    v_store(OUT, 0, 1024, OW * OW * D);
    run_prog();
    check_out(OUT, 256);
    // independent check of one pixel against the definition of max pooling
    for (int d = 0; d < D; d++) begin
      logic signed [7:0] m, v;
      m = -128;
      for (int k = 0; k < 4; k++) begin
        v = dbyte(IN + px(k / 2, k % 2, W) + d);
        if (v > m) m = v;
      end
      check($sformatf("pool pixel (0,0) channel %0d", d), {24'b0, dbyte(OUT + d)}, {24'b0, m});
    end
    check("no vector exception", 32'(vec_xcp), 0);
    $display("2x2 max pool of 8x8x6: %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

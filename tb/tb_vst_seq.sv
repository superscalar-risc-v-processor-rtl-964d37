// tb_vst_seq: VSTORE of sizes 1 to 61 bytes from aligned and misaligned
// scratchpad offsets in every bank to word-aligned external addresses. Each
// store must write exactly its bytes (partial last word by byte strobes); the
// whole output window is compared with a model, so extra or missing bytes
// fail. Run on the processor; the store sequencer is the unit under test.
`timescale 1ns/1ps
module tb_vst_seq;
  localparam int WD_CYCLES = 60000;
  `include "sys_env.svh"
  `include "vec_env.svh"
  localparam int SRC = 32'h1000_0400, OUT = 32'h1000_8000;
  initial begin
    clear_dmem();
    fill_src(SRC, 1024);
    emit(a_lui(1, 32'h10000));

    for (int b = 0; b < 4; b++) v_load(b, 0, 128, SRC + 128 * b);
    begin
      int sizes [8] = '{1, 2, 3, 5, 7, 9, 30, 61};
      int offs  [8] = '{0, 1, 2, 5, 9, 13, 16, 31};
      for (int k = 0; k < 8; k++) v_store(OUT + 100 * k, k % 4, offs[k], sizes[k]);
    end
    run_prog();
    check_out(OUT, 2048);
    check("no vector exception", 32'(vec_xcp), 0);
    finish_tb();
  end
endmodule

// tb_vld_seq: VLOAD of sizes 1 to 70 bytes from word-aligned external
// addresses into every bank at aligned and misaligned scratchpad offsets
// (the last word of each load is partial), each read back with VSTORE and
// compared byte by byte with a model, including the bytes just past each
// load, which must keep what was there before. Run on the processor, which
// issues the instructions; the load sequencer is the unit under test.
`timescale 1ns/1ps
module tb_vld_seq;
  localparam int WD_CYCLES = 60000;
  `include "sys_env.svh"
  `include "vec_env.svh"
  localparam int SRC = 32'h1000_0400, OUT = 32'h1000_8000;
  initial begin
    clear_dmem();
    fill_src(SRC, 1024);
    emit(a_lui(1, 32'h10000));

    begin
      int sizes [8] = '{1, 3, 4, 5, 8, 13, 33, 70};
      int offs  [8] = '{0, 1, 7, 64, 3, 250, 1001, 4000};
      for (int k = 0; k < 8; k++) begin
        v_scopy(k % 4, offs[k], sizes[k] + 4, 8'h5a);      // known bytes around the load
        v_load(k % 4, offs[k], sizes[k], SRC + 8 * k);
        v_store(OUT + 128 * k, k % 4, offs[k], sizes[k] + 4);
      end
    end
    run_prog();
    check_out(OUT, 2048);
    check("no vector exception", 32'(vec_xcp), 0);
    finish_tb();
  end
endmodule

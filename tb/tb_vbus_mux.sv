// tb_vbus_mux: work that keeps several sequencers active at once on
// different banks (a long load into bank 3, multiplies on banks 0 and 1, an
// add on bank 2, stores), so the bus multiplexer must route each bank to its
// owner and back; every result is compared with a model.
`timescale 1ns/1ps
module tb_vbus_mux;
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
    v_scopy(2, 0, 64, 3);
    v_load(3, 0, 400, SRC + 256);
    v_arith(2, 0, 128, 64, 0, 0, 1, 0);     // vmul banks 0,1
    v_arith(0, 2, 128, 64, 2, 0, 2, 0);     // vadd bank2 twice itself
    v_store(OUT, 2, 128, 64);
    v_store(OUT + 100, 0, 128, 64);
    v_arith(1, 3, 500, 50, 3, 0, 1, 0);     // vgtm bank3/bank1
    v_store(OUT + 200, 3, 500, 50);
    v_store(OUT + 300, 3, 0, 400);
    run_prog();
    check_out(OUT, 2048);
    check("no vector exception", 32'(vec_xcp), 0);
    finish_tb();
  end
endmodule

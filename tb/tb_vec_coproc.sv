// tb_vec_coproc: a mix of all vector operations through the co-processor
// (board, decoder, sequencers, bus multiplexer, banks), interleaved with
// scalar stores that compete for the external port, ending with FENCE and
// scalar loads of vector results. Every output byte is compared with a
// model, the arbiter must have seen a conflict, and all issued vector
// instructions must retire.
`timescale 1ns/1ps
module tb_vec_coproc;
  localparam int WD_CYCLES = 60000;
  `include "sys_env.svh"
  `include "vec_env.svh"
  localparam int SRC = 32'h1000_0400, OUT = 32'h1000_8000;
  initial begin
    clear_dmem();
    fill_src(SRC, 1024);
    emit(a_lui(1, 32'h10000));

    v_load(0, 0, 48, SRC);
    emit(a_sw(0, 1, 0));
    v_load(1, 0, 48, SRC + 48);
    for (int i = 0; i < 16; i++) emit(a_sw(0, 1, 4));
    v_arith(0, 0, 64, 48, 0, 0, 1, 0);
    v_arith(2, 1, 64, 48, 1, 0, 0, 0);
    v_copy(2, 0, 0, 64, 48);
    v_arith(1, 2, 64, 48, 2, 0, 1, 64);
    v_scopy(3, 0, 8, 2);
    v_arith(3, 3, 16, 20, 0, 0, 3, 0);
    v_mm(2, 200, 6, 2, 0, 1, 0, 4);
    v_store(OUT, 0, 64, 48);
    v_store(OUT + 64, 1, 64, 48);
    v_store(OUT + 128, 2, 64, 48);
    v_store(OUT + 192, 3, 16, 20);
    v_store(OUT + 256, 2, 200, 4);
    emit(a_fence());
    li(25, OUT);
    emit(a_lw(26, 25, 0));
    emit(a_sw(26, 1, 8));
    run_prog();
    check_out(OUT, 2048);
    check("no vector exception", 32'(vec_xcp), 0);
    check("scalar load of vector result", dmem[2], {dbyte(OUT + 3), dbyte(OUT + 2), dbyte(OUT + 1), dbyte(OUT)});
    $display("vec_issue=%0d vec_retire=%0d arb_conflict=%0d", n_vi, n_vr, n_arb);
    check("arbiter conflict seen", 32'(n_arb > 0), 1);
    check("all issued vector instructions retired", 32'(n_vi == n_vr && n_vi == 14), 1);
    finish_tb();
  end
endmodule

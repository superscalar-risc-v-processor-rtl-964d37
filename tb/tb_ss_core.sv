// tb_ss_core: a scalar workload on the core: bubble sort of 24 words,
// followed by an iterative Fibonacci and a multiply/divide checksum. The
// sorted array and the results are compared with values computed here, and
// the run must show dual commit, prediction hits and misses. The core is run
// with the co-processor and arbiter of the processor, which stay idle.
`timescale 1ns/1ps
module tb_ss_core;
  localparam int WD_CYCLES = 200000;
  `include "sys_env.svh"

  localparam int N = 24;
  initial begin
    int a [N];
    for (int i = 0; i < 64; i++) dmem[i] = '0;
    for (int i = 0; i < N; i++) begin a[i] = $urandom_range(0, 5000) - 2500; dmem[i] = a[i]; end
    emit(a_lui(1, 32'h10000));
    emit(a_addi(2, 0, N - 1));           // outer count
    // outer:
    emit(a_addi(3, 1, 0));               // p = base
    emit(a_addi(4, 2, 0));               // inner count
    // inner:
    emit(a_lw(5, 3, 0));
    emit(a_lw(6, 3, 4));
    emit(a_op(7'h00, 3'd2, 7, 6, 5));    // slt x7 = x6 < x5
    emit(a_beq(7, 0, 12));               // in order: skip swap
    emit(a_sw(6, 3, 0));
    emit(a_sw(5, 3, 4));
    emit(a_addi(3, 3, 4));
    emit(a_addi(4, 4, -1));
    emit(a_bne(4, 0, -32));
    emit(a_addi(2, 2, -1));
    emit(a_bne(2, 0, -48));
    // fibonacci 25
    emit(a_addi(8, 0, 0));
    emit(a_addi(9, 0, 1));
    emit(a_addi(10, 0, 25));
    emit(a_add(11, 8, 9));
    emit(a_addi(8, 9, 0));
    emit(a_addi(9, 11, 0));
    emit(a_addi(10, 10, -1));
    emit(a_bne(10, 0, -16));
    emit(a_sw(8, 1, 128));
    emit(a_mul(12, 8, 8));
    emit(a_addi(13, 0, 77));
    emit(a_rem(14, 12, 13));
    emit(a_div(15, 12, 13));
    emit(a_sw(14, 1, 132));
    emit(a_sw(15, 1, 136));
    run_prog();
    for (int i = 1; i < N; i++)
      for (int j = i; j > 0 && a[j] < a[j - 1]; j--) begin int t; t = a[j]; a[j] = a[j - 1]; a[j - 1] = t; end
    for (int i = 0; i < N; i++) check($sformatf("sorted[%0d]", i), dmem[i], a[i]);
    begin
      int f0, f1, t;
      f0 = 0; f1 = 1;
      for (int i = 0; i < 25; i++) begin t = f0 + f1; f0 = f1; f1 = t; end
      check("fib", dmem[32], f0);
      check("rem", dmem[33], 32'(f0 * f0) % 77);
      check("div", dmem[34], 32'(f0 * f0) / 77);
    end
    check("prediction hits", 32'(n_hit > 0), 1);
    check("prediction misses", 32'(n_miss > 0), 1);
    $display("IPC x100 = %0d", 100 * n_ret / cyc);
    finish_tb();
  end
endmodule

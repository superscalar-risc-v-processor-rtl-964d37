// tb_reservation_station: programs that exercise the stations on the
// processor: independent ALU work issued around a long divide (out-of-order
// issue), a dependent chain that waits for CDB results, operands broadcast in
// the same cycle the consumer is dispatched, two divides competing for the
// multiply/divide station (oldest first), and loads/stores kept in order.
// Results are compared with values computed here; the cycle count must show
// that the independent work overlapped the divide.
`timescale 1ns/1ps
module tb_reservation_station;
  localparam int WD_CYCLES = 30000;
  `include "sys_env.svh"

  initial begin
    for (int i = 0; i < 64; i++) dmem[i] = '0;
    emit(a_lui(1, 32'h10000));
    emit(a_addi(2, 0, 1000));
    emit(a_addi(3, 0, 10));
    emit(a_div(4, 2, 3));          // 100
    emit(a_div(5, 4, 3));          // 10, depends on the first divide
    for (int i = 0; i < 20; i++) emit(a_addi(6 + (i % 4), 6 + (i % 4), i)); // independent
    emit(a_add(10, 4, 5));         // 110
    emit(a_add(11, 10, 10));       // 220
    emit(a_add(12, 11, 3));        // 230
    emit(a_mul(13, 12, 3));        // 2300
    emit(a_sw(10, 1, 0));
    emit(a_sw(11, 1, 4));
    emit(a_sw(12, 1, 8));
    emit(a_sw(13, 1, 12));
    for (int r = 6; r <= 9; r++) emit(a_sw(r, 1, 4 * r));
    emit(a_sw(3, 1, 40));
    emit(a_lw(14, 1, 40));
    emit(a_sw(14, 1, 44));
    run_prog();
    check("dependent chain 1", dmem[0], 110);
    check("dependent chain 2", dmem[1], 220);
    check("dependent chain 3", dmem[2], 230);
    check("multiply of chain", dmem[3], 2300);
    for (int r = 0; r < 4; r++) begin
      int s; s = 0;
      for (int i = 0; i < 20; i++) if (i % 4 == r) s += i;
      check($sformatf("independent x%0d", 6 + r), dmem[6 + r], s);
    end
    check("store then load in order", dmem[11], 10);
    check("divides overlap independent work", 32'(cyc < 140), 1);
    finish_tb();
  end
endmodule

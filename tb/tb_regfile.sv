// tb_regfile: random writes on both ports and reads on all ports, compared
// with a 32-entry model; x0 must stay zero; port 1 wins a same-register write.
module tb_regfile;
  import rv_pkg::*;
  localparam int NR = 2 * NVSRC;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [4:0] raddr [NR]; word_t rdata [NR];
  logic we [2]; logic [4:0] waddr [2]; word_t wdata [2];
  regfile dut (.*);
  word_t model [32];
  int checks = 0, failures = 0;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 32; i++) model[i] = 0;
    for (int p = 0; p < 2; p++) begin we[p] = 0; waddr[p] = 0; wdata[p] = 0; end
    for (int i = 0; i < NR; i++) raddr[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      for (int i = 0; i < NR; i++) raddr[i] = 5'($urandom);
      #1;
      for (int i = 0; i < NR; i++) begin
        checks++;
        if (rdata[i] !== model[raddr[i]]) begin failures++; $display("FAIL r%0d", raddr[i]); end
      end
      for (int p = 0; p < 2; p++) begin
        we[p] = $urandom_range(0, 1); waddr[p] = 5'($urandom); wdata[p] = $urandom;
      end
      if (c % 9 == 0) waddr[1] = waddr[0];
      @(posedge clk); #1;
      for (int p = 0; p < 2; p++) if (we[p] && waddr[p] != 0) model[waddr[p]] = wdata[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

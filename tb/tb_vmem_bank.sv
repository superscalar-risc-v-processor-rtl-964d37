// tb_vmem_bank: random reads and byte-masked writes at any byte address of
// the bank (aligned and misaligned, including the top word), checked against
// a 4096-byte model. Read data is checked one cycle after the request.
module tb_vmem_bank;
  import rv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en, we; logic [BANK_BW-1:0] addr; logic [63:0] wdata, rdata; logic [7:0] wstrb;
  vmem_bank dut (.*);
  logic [7:0] model [4096];
  int checks = 0, failures = 0;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    en = 0; we = 0; addr = 0; wdata = 0; wstrb = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // fill with known data using aligned writes
    for (int w = 0; w < 512; w++) begin
      @(negedge clk); en = 1; we = 1; addr = 12'(w * 8); wstrb = 8'hff;
      wdata = {$urandom, $urandom};
      for (int i = 0; i < 8; i++) model[w * 8 + i] = wdata[8*i +: 8];
    end
    @(negedge clk); en = 0; we = 0;
    for (int c = 0; c < 4000; c++) begin
      logic [11:0] a; a = 12'($urandom_range(0, 4088));
      @(negedge clk);
      if ($urandom_range(0, 2) == 0) begin
        en = 1; we = 1; addr = a; wdata = {$urandom, $urandom}; wstrb = 8'($urandom);
        for (int i = 0; i < 8; i++) if (wstrb[i]) model[a + i] = wdata[8*i +: 8];
      end else begin
        logic [63:0] e;
        en = 1; we = 0; addr = a;
        for (int i = 0; i < 8; i++) e[8*i +: 8] = model[a + i];
        @(negedge clk); en = 0;
        checks++;
        if (rdata !== e) begin failures++; $display("FAIL rd %h got %h exp %h", a, rdata, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

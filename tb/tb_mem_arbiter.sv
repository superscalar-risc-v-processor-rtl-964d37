// tb_mem_arbiter: three masters issue random requests to a one-cycle memory
// model. Checks the fixed priority (scalar LSU, then vector store, then
// vector load), that exactly the granted request reaches memory and that
// each read response is routed to the master that issued it.
module tb_mem_arbiter;
  import rv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ext_req_t m [3]; logic gnt [3]; logic rvalid [3]; word_t rdata; ext_req_t mem;
  logic mem_rvalid; word_t mem_rdata;
  mem_arbiter dut (.*);
  int checks = 0, failures = 0;
  always_ff @(posedge clk) begin
    mem_rvalid <= mem.req && !mem.we;
    mem_rdata  <= mem.addr ^ 32'h5a5a_0000;
  end
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int owner; word_t a_q;
    owner = -1;
    for (int i = 0; i < 3; i++) m[i] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      int w;
      @(negedge clk);
      // response check for the previous cycle's read
      if (owner >= 0) begin
        checks++;
        if (!rvalid[owner] || rdata !== (a_q ^ 32'h5a5a_0000)) begin failures++; $display("FAIL resp"); end
        for (int i = 0; i < 3; i++) if (i != owner && rvalid[i]) failures++;
      end
      for (int i = 0; i < 3; i++) begin
        m[i].req = $urandom_range(0, 1); m[i].we = $urandom_range(0, 1);
        m[i].addr = {$urandom_range(0, 1 << 20), 2'b0} | (i << 28); m[i].wdata = $urandom;
        m[i].wstrb = 4'hf;
      end
      #1;
      w = m[0].req ? 0 : m[1].req ? 1 : m[2].req ? 2 : -1;
      checks++;
      for (int i = 0; i < 3; i++) if (gnt[i] !== (i == w)) begin failures++; $display("FAIL gnt"); end
      if (w >= 0 && mem !== m[w]) begin failures++; $display("FAIL mem"); end
      if (w < 0 && mem.req) failures++;
      owner = (w >= 0 && !m[w].we) ? w : -1;
      a_q = (w >= 0) ? m[w].addr : 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

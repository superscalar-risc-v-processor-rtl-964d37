// sys_env.svh: shared harness for tests that run programs on the complete
// processor. It instantiates rvsv_top with a 64 KB instruction memory at
// address 0, a 1 MB data memory at 0x1000_0000 and a host register at
// 0x2000_0000 (a store there ends the run), counts the monitor events, and
// provides emit() to build the program, run_prog() to load it, reset the
// processor and wait for the end, and check() for self-checking. Included
// inside a testbench module; the including module sets WD_CYCLES.
  import rv_pkg::*;
  `include "rv_asm.svh"

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [28:0] imem_addr;
  logic [63:0] imem_rdata;
  ext_req_t    mem;
  logic        mem_rvalid;
  word_t       mem_rdata;
  logic prmiss, prscs, brj_issue, dp_stall, busy_full_stall, spec_stall, div_active;
  logic vec_issue, vec_retire, vec_xcp, arb_conflict;
  logic [1:0] retired;

  rvsv_top dut (.*);

  logic [63:0] imem [8192];
  logic [31:0] dmem [262144];
  always_ff @(posedge clk) imem_rdata <= imem[imem_addr[12:0]];

  logic done_flag = 0;
  always_ff @(posedge clk) begin
    mem_rvalid <= 1'b0;
    if (mem.req) begin
      if (mem.addr[31:28] == 4'h2) begin
        if (mem.we) done_flag <= 1'b1;
      end else if (mem.we) begin
        for (int b = 0; b < 4; b++)
          if (mem.wstrb[b]) dmem[mem.addr[19:2]][8*b +: 8] <= mem.wdata[8*b +: 8];
      end else begin
        mem_rvalid <= 1'b1;
        mem_rdata  <= dmem[mem.addr[19:2]];
      end
    end
  end

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [31:0] prog [$];
  task automatic emit(logic [31:0] w); prog.push_back(w); endtask

  function automatic logic [7:0] dbyte(int a);
    return dmem[(a >> 2) & 18'h3ffff][8*(a % 4) +: 8];
  endfunction

  int cyc = 0, n_miss = 0, n_hit = 0, n_ret = 0, n_vi = 0, n_vr = 0, n_arb = 0, n_div = 0;
  int n_busy = 0, n_spec = 0;
  always_ff @(posedge clk) if (rst_n) begin
    cyc    <= cyc + 1;
    n_miss <= n_miss + int'(prmiss);
    n_hit  <= n_hit + int'(prscs);
    n_ret  <= n_ret + int'(retired);
    n_vi   <= n_vi + int'(vec_issue);
    n_vr   <= n_vr + int'(vec_retire);
    n_arb  <= n_arb + int'(arb_conflict);
    n_div  <= n_div + int'(div_active);
    n_busy <= n_busy + int'(busy_full_stall);
    n_spec <= n_spec + int'(spec_stall);
  end

  initial begin : watchdog
    repeat (WD_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // appends the terminate store, loads the program and runs it to the end
  task automatic run_prog();
    emit(a_fence());
    emit(a_lui(31, 32'h20000));
    emit(a_sw(0, 31, 0));
    for (int i = 0; i < 8; i++) emit(a_addi(0, 0, 0));
    for (int i = 0; i < 8192; i++) imem[i] = {a_addi(0, 0, 0), a_addi(0, 0, 0)};
    for (int i = 0; i < prog.size(); i++)
      imem[i / 2][32 * (i % 2) +: 32] = prog[i];
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_flag);
    repeat (5) @(posedge clk);
  endtask

  task automatic finish_tb();
    $display("cycles=%0d retired=%0d hits=%0d misses=%0d", cyc, n_ret, n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

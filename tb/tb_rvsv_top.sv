// tb_rvsv_top: end-to-end test of the whole processor at its default sizes.
//
// Builds a small program with the assembler functions, places it in a 64 KB
// instruction memory (address 0x0) and runs it with a 1 MB data memory at
// 0x1000_0000; a store to 0x2xxx_xxxx ends the run (host terminate). The
// program exercises a counting loop (prediction hits, and a miss at loop
// exit), store/load, multiply and a 32-cycle divide, nine writers of one
// register (busy counter full), a chain of unresolved branches behind the
// divide (speculation full), CSR reads, and vector code: two VLOADs, VADD,
// VGTM, VMM and VSTORE followed by FENCE and scalar loads of the vector
// results. Expected memory values are computed here independently.
// The run reports IPC and how often each mechanism happened; one that never
// happens counts as a failure.
`timescale 1ns/1ps
module tb_rvsv_top;
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

  // memories of the test environment
  logic [63:0] imem [8192];          // 64 KB
  logic [31:0] dmem [262144];        // 1 MB
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

  // program
  logic [31:0] prog [$];
  task automatic emit(logic [31:0] w); prog.push_back(w); endtask

  localparam int VA = 32'h0100, VB = 32'h0200, VO = 32'h0300; // byte offsets in data memory
  localparam int VLEN = 20;

  function automatic logic [7:0] dbyte(int a);
    return dmem[(a >> 2) & 18'h3ffff][8*(a % 4) +: 8];
  endfunction

  int cyc = 0;
  int n_miss = 0, n_hit = 0, n_brj = 0, n_ret = 0, n_dual = 0, n_dps = 0, n_busy = 0;
  int n_spec = 0, n_div = 0, n_vi = 0, n_vr = 0, n_arb = 0;
  always_ff @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    n_miss <= n_miss + int'(prmiss);
    n_hit  <= n_hit + int'(prscs);
    n_brj  <= n_brj + int'(brj_issue);
    n_ret  <= n_ret + int'(retired);
    n_dual <= n_dual + int'(retired == 2);
    n_dps  <= n_dps + int'(dp_stall);
    n_busy <= n_busy + int'(busy_full_stall);
    n_spec <= n_spec + int'(spec_stall);
    n_div  <= n_div + int'(div_active);
    n_vi   <= n_vi + int'(vec_issue);
    n_vr   <= n_vr + int'(vec_retire);
    n_arb  <= n_arb + int'(arb_conflict);
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum;
    // ---- scalar part
    emit(a_lui(1, 32'h10000));        // x1 = 0x1000_0000
    emit(a_addi(2, 0, 10));           // x2 = 10
    emit(a_addi(3, 0, 0));            // x3 = 0
    emit(a_add(3, 3, 2));             // loop: x3 += x2
    emit(a_addi(2, 2, -1));
    emit(a_bne(2, 0, -8));
    emit(a_sw(3, 1, 0));              // [0] = 55
    emit(a_addi(4, 0, 7));
    emit(a_mul(5, 3, 4));             // 385
    emit(a_div(6, 5, 4));             // 55
    for (int i = 0; i < 6; i++) emit(a_beq(6, 0, 8)); // not taken, wait on the divide
    emit(a_sw(6, 1, 4));              // [4] = 55
    emit(a_lw(7, 1, 0));
    emit(a_addi(7, 7, 1));            // 56
    emit(a_sw(7, 1, 8));              // [8] = 56
    for (int i = 0; i < 9; i++) emit(a_addi(8, 8, 3)); // x8 = 27
    emit(a_sw(8, 1, 12));             // [12] = 27
    emit(a_csrrs(9, 12'hB02, 0));     // minstret
    // ---- vector part: A at VA, B at VB (data memory), banks 0 and 1
    emit(a_addi(10, 1, VA));          // ext A
    emit(a_addi(11, 1, VB));          // ext B
    emit(a_addi(12, 0, VLEN));        // size
    emit(a_addi(13, 0, 0));           // bank0 @0
    emit(a_lui(14, 32'h10000));       // bank1 @0x1000_0000
    emit(a_vt(3'd0, 13, 12, 10));     // vload bank0 <- A
    emit(a_sw(2, 1, 16));             // scalar store during vector load: [16] = 0
    emit(a_vt(3'd0, 14, 12, 11));     // vload bank1 <- B
    emit(a_va(3'd0, 13, 12, 13, 14)); // vadd bank0 = bank0 + bank1
    emit(a_lui(15, 32'h20000));       // bank2 @0x2000_0000
    emit(a_vt(3'd2, 15, 12, 13));     // vcopy bank2 <- bank0
    emit(a_va(3'd1, 15, 12, 15, 14)); // vgtm bank2 = max(bank2, bank1)
    emit(a_addi(16, 1, VO));          // ext out
    emit(a_vt(3'd1, 16, 12, 15));     // vstore [VO] <- bank2
    // VMM: vector = first 4 bytes of bank1, matrix = bank0 as 2 rows of 4
    emit(a_addi(17, 0, 4));           // in_size
    emit(a_addi(18, 0, 2));           // out_size
    emit(a_addi(19, 0, 64));          // dest bank0 @64
    emit(a_vmm(19, 17, 14, 13, 18));  // bank0[64..65] = vec(bank1) x mat(bank0)
    emit(a_addi(20, 1, VO + 32));
    emit(a_vt(3'd1, 20, 18, 19));     // vstore [VO+32] <- 2 bytes
    emit(a_fence());
    emit(a_lw(21, 1, VO));
    emit(a_sw(21, 1, 20));            // [20] = first word of vector result
    emit(a_lw(22, 1, VO + 32));
    emit(a_sw(22, 1, 24));            // [24] = VMM result word
    emit(a_lui(23, 32'h20000));
    emit(a_sw(0, 23, 0));             // terminate
    for (int i = 0; i < 8; i++) emit(a_addi(0, 0, 0));

    for (int i = 0; i < 8192; i++) imem[i] = '0;
    for (int i = 0; i < prog.size(); i++)
      if (i % 2 == 0) imem[i/2][31:0] = prog[i]; else imem[i/2][63:32] = prog[i];
    for (int i = 0; i < 262144; i++) dmem[i] = '0;
    for (int i = 0; i < VLEN; i++) begin
      dmem[(VA + i) / 4][8*(i%4) +: 8] = 8'(3 * i + 1);
      dmem[(VB + i) / 4][8*(i%4) +: 8] = 8'(100 - 9 * i);
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_flag);
    repeat (5) @(posedge clk);

    check("loop sum", dmem[0], 32'd55);
    check("div", dmem[1], 32'd55);
    check("load+1", dmem[2], 32'd56);
    check("busy counter chain", dmem[3], 32'd27);
    check("store during vload", dmem[4], 32'd0);
    for (int i = 0; i < VLEN; i++) begin
      logic signed [7:0] a, b, s, m;
      a = 8'(3 * i + 1); b = 8'(100 - 9 * i);
      s = a + b;
      m = (s > b) ? s : b;
      check($sformatf("vadd/vgtm/vstore[%0d]", i), {24'b0, dbyte(VO + i)}, {24'b0, m});
    end
    check("vector result word via scalar load", dmem[5], {dbyte(VO+3), dbyte(VO+2), dbyte(VO+1), dbyte(VO)});
    for (int o = 0; o < 2; o++) begin
      logic signed [31:0] acc;
      acc = 0;
      for (int i = 0; i < 4; i++) begin
        logic signed [7:0] v, s;
        v = 8'(100 - 9 * i);                     // bank1 = B
        s = 8'(3 * (o*4+i) + 1) + 8'(100 - 9 * (o*4+i)); // bank0 after vadd
        acc += v * s;
      end
      check($sformatf("vmm[%0d]", o), {24'b0, dbyte(VO + 32 + o)}, {24'b0, acc[7:0]});
    end
    check("vmm word via scalar load", dmem[6][15:0], {dbyte(VO+33), dbyte(VO+32)});
    check("bytes past VLEN untouched", {24'b0, dbyte(VO + VLEN)}, 32'd0);
    check("vector decoder exceptions", 32'(vec_xcp), 32'd0);

    $display("cycles=%0d retired=%0d IPC=%0d.%02d dual_commit=%0d", cyc, n_ret,
             n_ret / cyc, (100 * n_ret / cyc) % 100, n_dual);
    $display("hits=%0d misses=%0d brj_issues=%0d dp_stall=%0d busy_full=%0d spec_full=%0d",
             n_hit, n_miss, n_brj, n_dps, n_busy, n_spec);
    $display("div_cycles=%0d vec_issue=%0d vec_retire=%0d arb_conflict=%0d", n_div, n_vi, n_vr, n_arb);
    check("prediction hit seen", 32'(n_hit > 0), 1);
    check("prediction miss seen", 32'(n_miss > 0), 1);
    check("dual commit seen", 32'(n_dual > 0), 1);
    check("dispatch stall seen", 32'(n_dps > 0), 1);
    check("busy counter full seen", 32'(n_busy > 0), 1);
    check("speculation full seen", 32'(n_spec > 0), 1);
    check("divider used 32+ cycles", 32'(n_div >= 32), 1);
    check("vector instructions issued", 32'(n_vi), 32'd8);
    check("vector instructions retired", 32'(n_vr), 32'd8);
    check("external port contention seen", 32'(n_arb > 0), 1);
    check("branch issues = hits + misses", 32'(n_brj), 32'(n_hit + n_miss));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dot_product: random signed byte vectors with random lane masks; checks
// the lane products one cycle after valid and the running accumulation one
// cycle later, including restart with clear.
module tb_dot_product;
  import rv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic valid, clear, pvalid, avalid; logic [7:0] mask; logic [63:0] a, b;
  logic [15:0] prod [VLANES]; logic [31:0] acc;
  dot_product dut (.*);
  int checks = 0, failures = 0;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int exp_acc;
    valid = 0; clear = 0; mask = 0; a = 0; b = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int v = 0; v < 50; v++) begin
      int n; n = $urandom_range(1, 6); exp_acc = 0;
      for (int k = 0; k < n; k++) begin
        int s; s = 0;
        @(negedge clk);
        valid = 1; clear = (k == 0); mask = (k == n - 1) ? 8'($urandom) : 8'hff;
        a = {$urandom, $urandom}; b = {$urandom, $urandom};
        for (int i = 0; i < 8; i++)
          if (mask[i]) s += $signed(a[8*i +: 8]) * $signed(b[8*i +: 8]);
        exp_acc += s;
        @(negedge clk); valid = 0;
        checks++;
        if (!pvalid) failures++;
        for (int i = 0; i < 8; i++) begin
          checks++;
          if ($signed(prod[i]) != (mask[i] ? $signed(a[8*i +: 8]) * $signed(b[8*i +: 8]) : 0)) begin
            failures++; $display("FAIL prod lane %0d", i);
          end
        end
        @(negedge clk);
        checks += 2;
        if (!avalid) failures++;
        if ($signed(acc) != exp_acc) begin failures++; $display("FAIL acc %0d exp %0d", $signed(acc), exp_acc); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mldv_unit: multiplications and divisions with random and corner-case
// operands (zero divisor, overflow, signs). Checks results against the
// RISC-V definitions, that a multiply finishes in one cycle and that a
// divide takes the 32 restoring steps (33 cycles from start to done), and
// that kill abandons a division.
module tb_mldv_unit;
  import rv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, kill, ready, busy_div, done;
  md_op_e op; word_t a, b, result; rtag_t tag_in, tag_out;
  mldv_unit dut (.*);
  int checks = 0, failures = 0;
  function automatic word_t ref_md(md_op_e o, word_t x, word_t y);
    logic signed [63:0] p;
    logic signed [31:0] sx, sy, q, r;
    sx = x; sy = y;
    q = (sy == 0) ? -1 : sx / sy;
    r = (sy == 0) ? sx : sx % sy;
    case (o)
      MD_MUL:    return x * y;
      MD_MULH:   begin p = $signed({{32{x[31]}}, x}) * $signed({{32{y[31]}}, y}); return p[63:32]; end
      MD_MULHSU: begin p = $signed({{32{x[31]}}, x}) * $signed({32'b0, y}); return p[63:32]; end
      MD_MULHU:  begin p = {32'b0, x} * {32'b0, y}; return p[63:32]; end
      MD_DIV:    return (x == 32'h8000_0000 && y == '1) ? x : q;
      MD_DIVU:   return (y == 0) ? '1 : x / y;
      MD_REM:    return (x == 32'h8000_0000 && y == '1) ? 0 : r;
      default:   return (y == 0) ? x : x % y;
    endcase
  endfunction
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    start = 0; kill = 0; op = MD_MUL; a = 0; b = 0; tag_in = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      int lat;
      @(negedge clk);
      op = md_op_e'($urandom_range(0, 7));
      a = $urandom; b = $urandom;
      if (i % 5 == 0) b = $urandom_range(0, 9);
      if (i % 11 == 0) b = 0;
      if (i % 13 == 0) begin a = 32'h8000_0000; b = '1; end
      tag_in = rtag_t'(i);
      start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks += 3;
      if (result !== ref_md(op, a, b)) begin
        failures++; $display("FAIL op=%0d a=%h b=%h got %h exp %h", op, a, b, result, ref_md(op, a, b));
      end
      if (tag_out !== rtag_t'(i)) failures++;
      if (lat !== ((op >= MD_DIV) ? 34 : 1)) begin failures++; $display("FAIL latency %0d op %0d", lat, op); end
    end
    // kill a division half way
    @(negedge clk); op = MD_DIV; a = 100; b = 7; start = 1;
    @(negedge clk); start = 0;
    repeat (10) @(negedge clk);
    kill = 1; @(negedge clk); kill = 0;
    checks++;
    if (!ready || busy_div) begin failures++; $display("FAIL kill"); end
    repeat (40) begin @(negedge clk); checks++; if (done) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// vec_env.svh: vector-program helpers for tests built on sys_env.svh. Each
// v_* task emits the scalar code that loads the operand registers (x20-x24)
// and the vector instruction, and applies the same operation to a byte model
// of the four scratchpad banks (bk) and of external memory (xm). The model is
// updated in program order, so the hardware's out-of-order execution must
// produce the same bytes. check_out() compares an external output window
// with the model (bytes never stored must still be zero).
  logic [7:0] bk [4][4096];
  logic [7:0] xm [int];

  task automatic li(int rd, int v);
    int up; up = (v + 32'h800) >>> 12;
    emit(a_lui(rd, up & 32'hfffff));
    emit(a_addi(rd, rd, v & 32'hfff));
  endtask
  function automatic int ba(int b, int off); return (b << 28) | off; endfunction
  function automatic logic [7:0] xrd(int a);
    return xm.exists(a) ? xm[a] : dbyte(a);
  endfunction

  task automatic v_load(int b, int off, int size, int ext);
    li(20, ba(b, off)); li(21, size); li(22, ext);
    emit(a_vt(3'd0, 20, 21, 22));
    for (int i = 0; i < size; i++) bk[b][(off + i) % 4096] = xrd(ext + i);
  endtask
  task automatic v_store(int ext, int b, int off, int size);
    li(20, ext); li(21, size); li(22, ba(b, off));
    emit(a_vt(3'd1, 20, 21, 22));
    for (int i = 0; i < size; i++) xm[ext + i] = bk[b][(off + i) % 4096];
  endtask
  task automatic v_copy(int db, int doff, int sb, int soff, int size);
    li(20, ba(db, doff)); li(21, size); li(22, ba(sb, soff));
    emit(a_vt(3'd2, 20, 21, 22));
    for (int i = 0; i < size; i++) bk[db][(doff + i) % 4096] = bk[sb][(soff + i) % 4096];
  endtask
  task automatic v_scopy(int db, int doff, int size, int val);
    li(20, ba(db, doff)); li(21, size); li(22, val);
    emit(a_vt(3'd3, 20, 21, 22));
    for (int i = 0; i < size; i++) bk[db][(doff + i) % 4096] = 8'(val);
  endtask
  // f3: 0 add, 1 greater-than merge, 2 multiply, 3 scalar multiply
  task automatic v_arith(int f3, int db, int doff, int size, int ab, int aoff, int bb, int boff);
    logic signed [7:0] r [];
    r = new[size];
    li(20, ba(db, doff)); li(21, size); li(22, ba(ab, aoff)); li(23, ba(bb, boff));
    emit(a_va(3'(f3), 20, 21, 22, 23));
    for (int i = 0; i < size; i++) begin
      logic signed [7:0] x, y;
      x = bk[ab][(aoff + i) % 4096];
      y = (f3 == 3) ? bk[bb][boff % 4096] : bk[bb][(boff + i) % 4096];
      case (f3)
        0: r[i] = x + y;
        1: r[i] = (x > y) ? x : y;
        default: r[i] = 8'(x * y);
      endcase
    end
    for (int i = 0; i < size; i++) bk[db][(doff + i) % 4096] = r[i];
  endtask
  task automatic v_mm(int db, int doff, int in_size, int ab, int aoff, int mb, int moff, int out_size);
    logic [7:0] r [];
    r = new[out_size];
    li(20, ba(db, doff)); li(21, in_size); li(22, ba(ab, aoff)); li(23, ba(mb, moff)); li(24, out_size);
    emit(a_vmm(20, 21, 22, 23, 24));
    for (int o = 0; o < out_size; o++) begin
      int acc; acc = 0;
      for (int i = 0; i < in_size; i++)
        acc += $signed(bk[ab][(aoff + i) % 4096]) * $signed(bk[mb][(moff + o * in_size + i) % 4096]);
      r[o] = 8'(acc);
    end
    for (int o = 0; o < out_size; o++) bk[db][(doff + o) % 4096] = r[o];
  endtask

  task automatic fill_src(int base, int n);
    for (int i = 0; i < n; i++) dmem[((base + i) >> 2) & 18'h3ffff][8 * ((base + i) % 4) +: 8] = 8'($urandom);
  endtask
  task automatic clear_dmem();
    for (int i = 0; i < 262144; i++) dmem[i] = '0;
    for (int b = 0; b < 4; b++) for (int i = 0; i < 4096; i++) bk[b][i] = 'x;
  endtask
  task automatic check_out(int base, int n);
    int bad; bad = 0;
    for (int i = 0; i < n; i++) begin
      logic [7:0] e;
      e = xm.exists(base + i) ? xm[base + i] : 8'h00;
      checks++;
      if (dbyte(base + i) !== e) begin
        failures++; bad++;
        if (bad < 8) $display("FAIL out byte %h: got %h expected %h", base + i, dbyte(base + i), e);
      end
    end
  endtask

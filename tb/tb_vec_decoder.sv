// tb_vec_decoder: every vector operation with source and destination banks
// chosen at random. Checks the functional-unit mask, the memory (bank) mask,
// the write-back bank, the port each used bank is routed to, and the
// exception when an arithmetic result bank is not one of its source banks.
module tb_vec_decoder;
  import rv_pkg::*;
  vinst_t inst; logic [3:0] mem_msk, func_msk; logic wb; logic [1:0] wb_bank;
  logic [2:0] bport [NBANK]; logic xcp;
  vec_decoder dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s vop=%0d", m, inst.vop); end
  endtask
  initial begin : watchdog
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 1000; i++) begin
      logic [1:0] b0, b2, b3; logic [3:0] em;
      inst = '0;
      inst.vop = vop_e'($urandom_range(0, 8));
      b0 = 2'($urandom); b2 = 2'($urandom); b3 = 2'($urandom);
      if (i % 3 == 0) b0 = b2;
      inst.r[0] = {2'b01, b0, 28'($urandom)};
      inst.r[2] = {2'b01, b2, 28'($urandom)};
      inst.r[3] = {2'b01, b3, 28'($urandom)};
      #1;
      em = 0;
      case (inst.vop)
        V_LOAD: begin
          chk(func_msk == 4'b1000 && mem_msk == (4'b1 << b0) && wb && wb_bank == b0, "load masks");
          chk(bport[b0] == MP_LD && !xcp, "load port");
        end
        V_STORE: begin
          chk(func_msk == 4'b0100 && mem_msk == (4'b1 << b2) && !wb, "store masks");
          chk(bport[b2] == MP_ST && !xcp, "store port");
        end
        V_COPY: begin
          chk(func_msk == 4'b0001 && mem_msk == ((4'b1 << b0) | (4'b1 << b2)) && wb_bank == b0, "copy masks");
          chk(bport[b0] == ((b0 == b2) ? MP_V0 : MP_V1) && bport[b2] == MP_V0 && !xcp, "copy ports");
        end
        V_SCOPY: chk(func_msk == 4'b0001 && mem_msk == (4'b1 << b0) && bport[b0] == MP_V0, "scopy");
        default: begin
          em = (4'b1 << b0) | (4'b1 << b2) | (4'b1 << b3);
          chk(mem_msk == em && wb && wb_bank == b0, "arith masks");
          chk(func_msk == ((inst.vop == V_ADD || inst.vop == V_GTM) ? 4'b0001 : 4'b0010), "arith unit");
          chk(xcp == ((b0 != b2) && (b0 != b3)), "dest bank must be a source bank");
          chk(bport[b2] == ((inst.vop == V_ADD || inst.vop == V_GTM) ? MP_V0 : MP_M0) || b2 == b3 || b2 == b0,
              "first source port");
        end
      endcase
    end
    inst = '0; inst.vop = V_NONE; #1;
    chk(xcp, "unknown op raises an exception");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

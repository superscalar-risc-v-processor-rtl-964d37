// vbus_mux: internal bus multiplexer between the six sequencer master ports
// and the four scratchpad banks.
//
// When the board issues an instruction, every bank in its memory mask
// becomes busy and is connected to the master port the decoder chose for it
// (bport). The bank stays connected until the function unit that owns it
// reports done; then its busy bit drops. Each bank forwards the request of
// its owner and gives its read data back to that owner; a master port
// connected to no bank reads zero. bank_busy is the memory half of the
// board's resource status. Master ids: 0 load, 1 store, 2/3 vector unit,
// 4/5 multiplication unit.
// The assertion at the end is switched off while rst_n is low; lint therefore
// sees rst_n used synchronously as well as as the flops' asynchronous reset.
// That is intended and changes no logic.
module vbus_mux
  import rv_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        iss_valid,
  input  logic [3:0]  iss_mem,
  input  logic [2:0]  iss_bport [NBANK],
  input  logic        unit_done [4],      // per function unit (FU_* order)
  input  bank_req_t   mreq  [NMPORT],
  output logic [63:0] mrdata[NMPORT],
  output bank_req_t   breq  [NBANK],
  input  logic [63:0] brdata[NBANK],
  output logic [3:0]  bank_busy
);
  logic [2:0] owner [NBANK];

  function automatic int unit_of(logic [2:0] m);
    unique case (m)
      MP_LD:        return FU_LD;
      MP_ST:        return FU_ST;
      MP_V0, MP_V1: return FU_VEC;
      default:      return FU_MUL;
    endcase
  endfunction

  always_comb begin
    for (int b = 0; b < NBANK; b++) breq[b] = bank_busy[b] ? mreq[owner[b]] : '0;
    for (int m = 0; m < NMPORT; m++) begin
      mrdata[m] = '0;
      for (int b = 0; b < NBANK; b++)
        if (bank_busy[b] && owner[b] == 3'(m)) mrdata[m] = brdata[b];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank_busy <= '0;
      for (int b = 0; b < NBANK; b++) owner[b] <= '0;
    end else begin
      for (int b = 0; b < NBANK; b++) begin
        if (bank_busy[b] && unit_done[unit_of(owner[b])]) bank_busy[b] <= 1'b0;
        if (iss_valid && iss_mem[b]) begin
          bank_busy[b] <= 1'b1;
          owner[b]     <= iss_bport[b];
        end
      end
    end
  end

  a_no_double_owner: assert property (@(posedge clk) disable iff (!rst_n)
      iss_valid |-> ((iss_mem & bank_busy) == 4'b0));
endmodule

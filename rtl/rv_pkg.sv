// rv_pkg: types and constants shared by the superscalar core and the vector
// co-processor.
//
// The core is a dual-issue out-of-order RV32IM machine: two instructions per
// cycle are fetched, decoded, renamed onto a 64-entry commit buffer and placed
// in one of six reservation stations; results return on a common data bus
// (CDB) and retire in order, two per cycle. Sizes follow the key-parameter
// table of the design (64 commit entries, 5 speculations, 10-bit history,
// 16/4/4/4/4 reservation-station entries). Encodings of the internal enums
// (ALU op codes, reservation-station ids beyond the five printed ones, vector
// funct3 values) are this implementation's own choice.
package rv_pkg;

  localparam int XLEN      = 32;
  localparam int NROB      = 64;            // commit buffer entries
  localparam int ROBW      = $clog2(NROB);  // renaming tag width
  localparam int NSPEC     = 5;             // speculation tags / checkpoints
  localparam int BHRW      = 10;            // branch history width
  localparam int NCDB      = 6;             // result buses: ALU0 ALU1 BRJ MLDV LDST CSR
  localparam int NVSRC     = 5;             // vector instruction source registers
  localparam int BUSYW     = 4;             // busy counter width

  typedef logic [XLEN-1:0] word_t;
  typedef logic [ROBW-1:0] rtag_t;
  typedef logic [NSPEC-1:0] stag_t;

  // reservation station ids: 0..4 as printed, 5 for the vector station
  typedef enum logic [2:0] {
    RS_ALU = 3'd0, RS_BRJ = 3'd1, RS_MLDV = 3'd2, RS_LDST = 3'd3,
    RS_CSR = 3'd4, RS_VEC = 3'd5, RS_NONE = 3'd7
  } rs_id_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_SRA,
    ALU_OR, ALU_AND, ALU_LUI
  } alu_op_e;

  // branch/jump ops: funct3 of the branch for BEQ..BGEU, plus JAL/JALR
  typedef enum logic [3:0] {
    BR_BEQ = 4'd0, BR_BNE = 4'd1, BR_BLT = 4'd4, BR_BGE = 4'd5,
    BR_BLTU = 4'd6, BR_BGEU = 4'd7, BR_JAL = 4'd8, BR_JALR = 4'd9
  } br_op_e;

  // multiply/divide ops: funct3 of the M extension
  typedef enum logic [2:0] {
    MD_MUL, MD_MULH, MD_MULHSU, MD_MULHU, MD_DIV, MD_DIVU, MD_REM, MD_REMU
  } md_op_e;

  // dmem_op: {store, funct3}; funct3 gives size and sign extension
  typedef struct packed {
    logic       store;
    logic       fence;   // barrier: waits until the co-processor is idle
    logic [2:0] funct3;
  } mem_op_t;

  typedef enum logic [1:0] { CSR_W = 2'd1, CSR_S = 2'd2, CSR_C = 2'd3 } csr_op_e;

  typedef enum logic [1:0] { IMM_I, IMM_S, IMM_U, IMM_NONE } imm_type_e;

  // vector operations (custom_0: transfer, custom_1: arithmetic, custom_2: VMM)
  typedef enum logic [3:0] {
    V_LOAD = 4'd0, V_STORE = 4'd1, V_COPY = 4'd2, V_SCOPY = 4'd3,
    V_ADD = 4'd4, V_GTM = 4'd5, V_MUL = 4'd6, V_SMUL = 4'd7, V_MM = 4'd8,
    V_NONE = 4'd15
  } vop_e;

  localparam logic [6:0] OPC_CUSTOM0 = 7'b0001011;
  localparam logic [6:0] OPC_CUSTOM1 = 7'b0101011;
  localparam logic [6:0] OPC_CUSTOM2 = 7'b1011011;

  // output of one decoder
  typedef struct packed {
    logic        valid;
    logic        inv;        // unsupported instruction
    logic [4:0]  rs1, rs2, rd;
    logic        use_rs1, use_rs2;
    logic        rd_we;
    imm_type_e   imm_type;
    word_t       imm;
    logic        src1_pc;    // operand 1 is the PC (AUIPC)
    logic        src2_imm;   // operand 2 is the immediate
    rs_id_e      target_rs;
    logic [3:0]  op;         // alu_op_e / br_op_e / md_op_e / csr_op_e by target
    mem_op_t     dmem_op;
    logic [1:0]  system_op;  // 0 none, 1 FENCE.I, 2 ECALL, 3 EBREAK
    logic [11:0] csr_id;
    logic        csr_imm;    // CSR source is the zimm field
    logic        is_branch;
    vop_e        vop;
    logic [NVSRC-1:0][4:0] vreg; // vector source registers reg0..reg4
  } dec_t;

  // one lane of the common data bus
  typedef struct packed {
    logic  valid;
    rtag_t tag;
    word_t data;
  } cdb_t;

  // instruction information carried through a reservation station
  typedef struct packed {
    logic [3:0]  op;
    mem_op_t     dmem_op;
    logic [11:0] csr_id;
    logic        csr_imm;
    logic [4:0]  zimm;
    word_t       imm;
    word_t       pc;
    vop_e        vop;
    // branch prediction state carried with branches
    logic        pred_taken;
    word_t       pred_target;
    logic [BHRW-1:0] bhr;
    stag_t       btag;       // checkpoint tag created by this branch
  } rs_info_t;

  // instruction sent to the vector co-processor
  typedef struct packed {
    vop_e  vop;
    rtag_t rob;
    word_t [NVSRC-1:0] r;    // reg0..reg4 values
  } vinst_t;


  // ---------------- vector co-processor ----------------
  localparam int NBANK    = 4;    // scratchpad banks
  localparam int BANK_AW  = 9;    // 64-bit words per bank: 2^9 (4 KB)
  localparam int BANK_BW  = BANK_AW + 3;  // byte address inside a bank
  localparam int NVENT    = 4;    // instruction board entries
  localparam int NMPORT   = 6;    // internal master ports
  localparam int VLANES   = 8;    // 8-bit elements per access

  // master port ids on the internal bus
  localparam logic [2:0] MP_LD = 3'd0, MP_ST = 3'd1, MP_V0 = 3'd2, MP_V1 = 3'd3,
                         MP_M0 = 3'd4, MP_M1 = 3'd5;
  // function mask bits (MSB..LSB: load, store, multiplication, vector)
  localparam int FU_VEC = 0, FU_MUL = 1, FU_ST = 2, FU_LD = 3;

  // one request from a sequencer master port to a bank
  typedef struct packed {
    logic               en;
    logic               we;
    logic [BANK_BW-1:0] addr;
    logic [63:0]        wdata;
    logic [7:0]         wstrb;
  } bank_req_t;

  // a request on the 32-bit external memory port
  typedef struct packed {
    logic       req;
    logic       we;
    word_t      addr;
    word_t      wdata;
    logic [3:0] wstrb;
  } ext_req_t;

  function automatic logic [1:0] bank_of(word_t a);
    return a[29:28];
  endfunction

  // byte strobes for the remaining n bytes of an access of w bytes
  function automatic logic [7:0] strb_rem(word_t n, int w);
    logic [7:0] m;
    for (int i = 0; i < 8; i++) m[i] = (i < w) && (word_t'(i) < n);
    return m;
  endfunction

  function automatic stag_t rotr(stag_t t);
    return {t[0], t[NSPEC-1:1]};
  endfunction

endpackage

// fusion_pkg: types and constants shared by the instruction-fusion logic.
//
// The fused instructions use the internal F_R4 format, a variant of the RISC-V
// R4 format whose rs3 field carries a 5-bit immediate:
//
//   [31:27] imm5   [26:25] func2   [24:20] rs2   [19:15] rs1
//   [14:12] func3  [11:7]  rd      [6:0]   opcode
//
// Scaled Index family (opcode 7'b0000000): func2 selects LEA/IL/SL, func3[2]
// tells add (0) from addw (1) and func3[1:0] gives the load width
// (LD 00, LW 01, LH 10, LB 11). Load Pair family (opcode 7'b0000001): func2 is
// the width of the first load, func3[1:0] the width of the second, rd is the
// first destination and the rs2 field the second destination, imm5 is the
// scaled offset field of the first load. These encodings follow the fused
// format of the design; the control-structure layouts below are this
// implementation's own.
package fusion_pkg;

  localparam int XLEN_DEFAULT = 64;

  // ---------------------------------------------------------------- F_R4 format
  localparam logic [6:0] OPC_F_SI = 7'b0000000;  // Scaled Index family
  localparam logic [6:0] OPC_F_LP = 7'b0000001;  // Load Pair family

  localparam logic [1:0] F2_LEA = 2'b00;
  localparam logic [1:0] F2_IL  = 2'b01;
  localparam logic [1:0] F2_SL  = 2'b10;

  localparam logic [1:0] W_LD = 2'b00;
  localparam logic [1:0] W_LW = 2'b01;
  localparam logic [1:0] W_LH = 2'b10;
  localparam logic [1:0] W_LB = 2'b11;

  typedef struct packed {
    logic [4:0] imm5;
    logic [1:0] func2;
    logic [4:0] rs2;
    logic [4:0] rs1;
    logic [2:0] func3;
    logic [4:0] rd;
    logic [6:0] opcode;
  } f_r4_t;

  // Kind of fused instruction, carried with an instruction down to the ROB.
  typedef enum logic [2:0] {
    FK_NONE = 3'd0,
    FK_LEA  = 3'd1,
    FK_IL   = 3'd2,
    FK_SL   = 3'd3,
    FK_LP   = 3'd4
  } fusion_kind_e;

  // Unique identifier of each fused instruction (the decoder's debug value).
  // _D/_W after LEA: add/addw. Two letters after IL/SL: add|addw then ld|lw.
  // Two letters after LP: first load then second load.
  typedef enum logic [4:0] {
    FID_NONE  = 5'd0,
    FID_LEA_D = 5'd1,  FID_LEA_W = 5'd2,
    FID_IL_DD = 5'd3,  FID_IL_DW = 5'd4,  FID_IL_WD = 5'd5,  FID_IL_WW = 5'd6,
    FID_SL_DD = 5'd7,  FID_SL_DW = 5'd8,  FID_SL_WD = 5'd9,  FID_SL_WW = 5'd10,
    FID_LP_DD = 5'd11, FID_LP_DW = 5'd12, FID_LP_WD = 5'd13, FID_LP_WW = 5'd14
  } fused_id_e;

  // ---------------------------------------------------------------- control
  typedef enum logic [1:0] {
    Q_INTEGER = 2'd0,
    Q_MEMORY  = 2'd1,
    Q_FP      = 2'd2,
    Q_SYSTEM  = 2'd3
  } queue_id_e;

  typedef enum logic [2:0] {
    FU_ALU           = 3'd0,
    FU_FUSION_ALU    = 3'd1,
    FU_MEM           = 3'd2,
    FU_MEM_SHIFT     = 3'd3,
    FU_OTHER         = 3'd4
  } func_unit_e;

  typedef enum logic [3:0] {
    HL_ADD   = 4'd0,
    HL_SUB   = 4'd1,
    HL_XOR   = 4'd2,
    HL_OR    = 4'd3,
    HL_AND   = 4'd4,
    HL_SRA   = 4'd5,
    HL_SRL   = 4'd6,
    HL_SLL   = 4'd7,
    HL_SLT   = 4'd8,
    HL_F_LEA = 4'd9
  } alu_op_e;

  typedef enum logic [2:0] {
    OP_NONE  = 3'd0,
    OP_F_LEA = 3'd1,
    OP_F_IL  = 3'd2,
    OP_F_SL  = 3'd3,
    OP_F_LP  = 3'd4,
    OP_STD   = 3'd5   // any instruction of the standard decoder
  } instr_op_e;

  // Decoded control signals of one instruction (one decode lane).
  typedef struct packed {
    logic         valid;
    logic [1:0]   use_src;     // [0] rs1, [1] rs2
    logic [1:0]   use_dst;     // [0] rd,  [1] second destination (load pair)
    logic [4:0]   rs1;
    logic [4:0]   rs2;
    logic [4:0]   rd;
    logic [4:0]   rd2;
    queue_id_e    queue_id;
    logic         use_imm;
    logic [11:0]  imm;         // shift amount (LEA/SL) or byte offset (LP)
    func_unit_e   func_unit;
    instr_op_e    instr_op;
    logic         add_word;    // arithmetic part is addw
    logic [1:0]   width1;      // width of the (first) load
    logic [1:0]   width2;      // width of the second load (load pair)
    fusion_kind_e fusion;
    fused_id_e    debug_id;
    logic         illegal;
  } ctrl_t;

  // ---------------------------------------------------------------- fetch
  // One 16-bit slot written into the fetch-decode queue.
  typedef struct packed {
    logic [15:0]           data;
    logic                  compressed;  // slot holds a whole 16-bit instruction
    logic                  is_fused;    // slot is a half of a fused instruction
    logic                  xcpt;        // fetch exception on this block
    logic [XLEN_DEFAULT-1:0] pc;
  } fq_slot_t;

  // One instruction read from the fetch-decode queue.
  typedef struct packed {
    logic                  valid;
    logic [31:0]           instr;
    logic                  compressed;
    logic                  is_fused;
    logic                  xcpt;
    logic [XLEN_DEFAULT-1:0] pc;
  } fq_instr_t;

  // ---------------------------------------------------------------- back-end
  localparam int ROB_ID_W_DEFAULT = 6;
  localparam int PREG_W = 7;

  typedef struct packed {
    logic                  valid;
    alu_op_e               op;
    logic                  word;
    logic                  unsigned_op;
    logic [XLEN_DEFAULT-1:0] data_rs1;
    logic [XLEN_DEFAULT-1:0] data_rs2;
    logic [XLEN_DEFAULT-1:0] imm;
    logic [ROB_ID_W_DEFAULT-1:0] rob_id;
    logic [PREG_W-1:0]     prd;
  } int_iss_t;

  typedef struct packed {
    logic                  valid;
    logic [XLEN_DEFAULT-1:0] result;
    logic [ROB_ID_W_DEFAULT-1:0] rob_id;
    logic [PREG_W-1:0]     prd;
  } int_cmplt_t;

  typedef enum logic [1:0] {
    MOP_LOAD  = 2'd0,   // base + offset (normal load)
    MOP_STORE = 2'd1,   // base + offset (normal store)
    MOP_F_IL  = 2'd2,   // rs1 + rs2
    MOP_F_SL  = 2'd3    // (rs1 << imm) + rs2
  } mem_op_e;

  typedef struct packed {
    logic                  valid;
    mem_op_e               op;
    logic                  word;        // address arithmetic is addw
    logic [1:0]            width;       // access width (LD/LW/LH/LB)
    logic [XLEN_DEFAULT-1:0] data_rs1;
    logic [XLEN_DEFAULT-1:0] data_rs2;
    logic [XLEN_DEFAULT-1:0] imm;
    logic [ROB_ID_W_DEFAULT-1:0] rob_id;
    logic [PREG_W-1:0]     prd;
  } mem_iss_t;

  typedef struct packed {
    logic                  valid;
    logic                  is_store;
    logic                  fused;       // request comes from IL or SL
    logic [1:0]            width;
    logic [XLEN_DEFAULT-1:0] addr;
    logic [XLEN_DEFAULT-1:0] store_data;
    logic [ROB_ID_W_DEFAULT-1:0] rob_id;
    logic [PREG_W-1:0]     prd;
  } mem_req_t;

  // ROB entry written at dispatch.
  typedef struct packed {
    logic [XLEN_DEFAULT-1:0] pc;
    fusion_kind_e          fusion;
    logic [4:0]            rd;
    logic [PREG_W-1:0]     prd;
    logic [PREG_W-1:0]     old_prd;
  } rob_entry_t;

endpackage

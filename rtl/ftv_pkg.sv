// ftv_pkg: types, constants and the instruction decoder shared by the
// fault-tolerant VLIW core.
//
// The core is a 32-bit VLIW machine that issues one execution packet per
// cycle. A packet is six 32-bit slots: three ALU slots (0..2) and three
// load/store slots (3..5). The ALU data path holds n = 3 ALUs plus s = 1
// spare, and every ALU result is checked in the cycle it is produced, either
// by duplication with comparison or by triple modular redundancy (TMR). A
// failed check is retried with TMR up to R_NO times before the core enters
// its fail-safe state.
//
// Following the document: n = 3, s = 1, r_no = 4, 32-bit data, 32 registers,
// 1K x 32 data memory, 25 instructions, at most three ALU and three L/S
// instructions per packet. This design's own choices: the instruction
// encoding and the exact instruction list below, the packet layout, the
// instruction-memory depth and the zero register r0.
//
// Instruction encoding (this design's own):
//   [31:27] opcode   [26:22] rd   [21:17] rs1   [16:12] rs2   [16:0] imm17
//   SW   : mem[rs1 + imm17] <= reg[rd-field]
//   BEQ/BNE: compare reg[rd-field] with reg[rs1]; target = pc + 1 + imm17
//   J    : target = imm17 (absolute packet address)
//   LUI  : rd <= {instr[15:0], 16'b0}
//   ANDI/ORI/XORI zero-extend imm17, all other immediates sign-extend it.
// Branches, jumps and HALT are honoured in ALU slot 0 only.
package ftv_pkg;

  localparam int unsigned XLEN        = 32;
  localparam int unsigned NREG        = 32;
  localparam int unsigned RIDX_W      = 5;
  localparam int unsigned N_ALU       = 3;   // n: ALU instructions per packet
  localparam int unsigned N_SPARE     = 1;   // s: spare ALUs
  localparam int unsigned N_MOD       = N_ALU + N_SPARE;
  localparam int unsigned N_LS        = 3;   // load/store slots per packet
  localparam int unsigned N_SLOT      = N_ALU + N_LS;
  localparam int unsigned R_NO        = 4;   // retries per failed instruction
  localparam int unsigned DMEM_WORDS  = 1024;
  localparam int unsigned DADDR_W     = 10;
  localparam int unsigned IMEM_WORDS  = 1024;  // packets; depth not given
  localparam int unsigned PC_W        = 10;

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [RIDX_W-1:0] ridx_t;
  typedef logic [PC_W-1:0]   pc_t;
  typedef logic [N_SLOT-1:0][31:0] packet_t;

  // Twenty-five instructions.
  typedef enum logic [4:0] {
    OP_NOP  = 5'd0,
    OP_ADD  = 5'd1,
    OP_SUB  = 5'd2,
    OP_AND  = 5'd3,
    OP_OR   = 5'd4,
    OP_XOR  = 5'd5,
    OP_NOR  = 5'd6,
    OP_SLL  = 5'd7,
    OP_SRL  = 5'd8,
    OP_SRA  = 5'd9,
    OP_SLT  = 5'd10,
    OP_SLTU = 5'd11,
    OP_MUL  = 5'd12,
    OP_ADDI = 5'd13,
    OP_ANDI = 5'd14,
    OP_ORI  = 5'd15,
    OP_XORI = 5'd16,
    OP_SLTI = 5'd17,
    OP_LUI  = 5'd18,
    OP_LW   = 5'd19,
    OP_SW   = 5'd20,
    OP_BEQ  = 5'd21,
    OP_BNE  = 5'd22,
    OP_J    = 5'd23,
    OP_HALT = 5'd24
  } opcode_e;

  // Functions of one ALU (the ALU copies are identical).
  typedef enum logic [3:0] {
    FN_ADD  = 4'd0,
    FN_SUB  = 4'd1,
    FN_AND  = 4'd2,
    FN_OR   = 4'd3,
    FN_XOR  = 4'd4,
    FN_NOR  = 4'd5,
    FN_SLL  = 4'd6,
    FN_SRL  = 4'd7,
    FN_SRA  = 4'd8,
    FN_SLT  = 4'd9,
    FN_SLTU = 4'd10,
    FN_MUL  = 4'd11,
    FN_PASSB = 4'd12
  } alu_fn_e;

  typedef enum logic [1:0] {
    CL_NONE = 2'd0,   // NOP or unused slot
    CL_ALU  = 2'd1,   // executed on the checked ALU data path
    CL_MEM  = 2'd2,   // load or store
    CL_CTRL = 2'd3    // branch, jump or halt
  } iclass_e;

  // One decoded instruction.
  typedef struct packed {
    iclass_e  cls;
    opcode_e  op;
    alu_fn_e  fn;
    ridx_t    rd;
    ridx_t    rs1;
    ridx_t    rs2;
    logic     use_imm;
    logic     wen;      // writes rd
    word_t    imm;
  } uop_t;

  // An ALU operation with its operands, as routed to one ALU.
  typedef struct packed {
    alu_fn_e fn;
    word_t   a;
    word_t   b;
  } alu_req_t;

  // A register write (result bus) seen by forwarding and write-back.
  typedef struct packed {
    logic  valid;
    ridx_t rd;
    word_t data;
  } wb_t;

  // Sources the Select block can take a checked result from.
  typedef enum logic [1:0] {
    SRC_CP1 = 2'd0,   // ALU_1 output, checked by CP1 against ALU_2
    SRC_CP2 = 2'd1,   // ALU_3 output, checked by CP2 against ALU_4
    SRC_TMR = 2'd2    // voted TMR_MV output
  } res_src_e;

  // Combinational decoder of one 32-bit instruction.
  function automatic uop_t decode(input logic [31:0] ins);
    uop_t    u;
    opcode_e op;
    op        = opcode_e'(ins[31:27]);
    u         = '0;
    u.op      = op;
    u.rd      = ins[26:22];
    u.rs1     = ins[21:17];
    u.rs2     = ins[16:12];
    u.imm     = {{15{ins[16]}}, ins[16:0]};
    u.cls     = CL_ALU;
    u.wen     = 1'b1;
    u.use_imm = 1'b0;
    u.fn      = FN_ADD;
    unique case (op)
      OP_ADD:  u.fn = FN_ADD;
      OP_SUB:  u.fn = FN_SUB;
      OP_AND:  u.fn = FN_AND;
      OP_OR:   u.fn = FN_OR;
      OP_XOR:  u.fn = FN_XOR;
      OP_NOR:  u.fn = FN_NOR;
      OP_SLL:  u.fn = FN_SLL;
      OP_SRL:  u.fn = FN_SRL;
      OP_SRA:  u.fn = FN_SRA;
      OP_SLT:  u.fn = FN_SLT;
      OP_SLTU: u.fn = FN_SLTU;
      OP_MUL:  u.fn = FN_MUL;
      OP_ADDI: begin u.fn = FN_ADD; u.use_imm = 1'b1; end
      OP_ANDI: begin u.fn = FN_AND; u.use_imm = 1'b1; u.imm = {15'b0, ins[16:0]}; end
      OP_ORI:  begin u.fn = FN_OR;  u.use_imm = 1'b1; u.imm = {15'b0, ins[16:0]}; end
      OP_XORI: begin u.fn = FN_XOR; u.use_imm = 1'b1; u.imm = {15'b0, ins[16:0]}; end
      OP_SLTI: begin u.fn = FN_SLT; u.use_imm = 1'b1; end
      OP_LUI:  begin u.fn = FN_PASSB; u.use_imm = 1'b1; u.imm = {ins[15:0], 16'b0}; end
      OP_LW:   begin u.cls = CL_MEM; end
      OP_SW:   begin u.cls = CL_MEM; u.wen = 1'b0; u.rs2 = ins[26:22]; end
      OP_BEQ, OP_BNE: begin u.cls = CL_CTRL; u.wen = 1'b0; u.rs2 = ins[26:22]; end
      OP_J, OP_HALT:  begin u.cls = CL_CTRL; u.wen = 1'b0; end
      default: begin u.cls = CL_NONE; u.wen = 1'b0; end
    endcase
    if (u.rd == '0) u.wen = 1'b0;   // r0 is constant zero
    return u;
  endfunction

  // Instruction builders, used by programs written in SystemVerilog.
  function automatic logic [31:0] enc_r(opcode_e op, int rd, int rs1, int rs2);
    return {op, 5'(rd), 5'(rs1), 5'(rs2), 12'b0};
  endfunction

  function automatic logic [31:0] enc_i(opcode_e op, int rd, int rs1, int imm);
    return {op, 5'(rd), 5'(rs1), 17'(imm)};
  endfunction

endpackage

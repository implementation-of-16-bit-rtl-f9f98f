// risc_pkg: types and constants shared by the 16-bit four-stage RISC pipeline.
//
// The instruction is 16 bits wide. Field positions follow the decode-stage
// waveforms of the reference design: opcode [15:12], destination register
// [11:9], source register 1 [8:6], source register 2 [5:3], function [2:0],
// 6-bit signed immediate [5:0], 4-bit shift amount [4:1], 8-bit immediate
// [8:1] with bit 0 choosing the byte for a move-immediate. The opcode
// numbering below is this design's own; the instruction kinds (register ALU
// operations, shifts, move immediate, LOAD/STORE, input/output port,
// branches, JAL/RJAL, interrupt return) are the reference design's.
package risc_pkg;

  localparam int unsigned DATA_W = 16;
  localparam int unsigned REG_W  = 3;

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [REG_W-1:0]  reg_t;

  // ---------------------------------------------------------------- opcodes
  typedef enum logic [3:0] {
    OP_ALU   = 4'h0,  // rd <- rs1 op rs2 (func selects; func 0 is NOP)
    OP_ADDI  = 4'h1,  // rd <- rs1 + sext(imm6)
    OP_SHIFT = 4'h2,  // rd <- rs1 shifted by imm[4:1]; {bit5,bit0} pick kind
    OP_MVI   = 4'h3,  // rd byte <- imm8; bit0: 0 low byte, 1 high byte
    OP_LOAD  = 4'h4,  // rd <- mem[rs1 + sext(imm6)]
    OP_STORE = 4'h5,  // mem[rs1 + sext(imm6)] <- r[11:9]
    OP_IN    = 4'h6,  // rd <- input port
    OP_OUT   = 4'h7,  // output port <- rs1
    OP_BZ    = 4'h8,  // if r[11:9] == 0: PC <- PC+1 + sext(imm8)
    OP_BNZ   = 4'h9,  // if r[11:9] != 0: PC <- PC+1 + sext(imm8)
    OP_BR    = 4'hA,  // PC <- PC+1 + sext(imm8)
    OP_JMP   = 4'hB,  // PC <- rs1 (absolute branch)
    OP_JAL   = 4'hC,  // rd <- PC+1; PC <- PC+1 + sext(imm8)
    OP_RJAL  = 4'hD,  // PC <- rs1 (return from subroutine)
    OP_SYS   = 4'hE,  // func 0 EI, 1 DI, 2 RETI
    OP_UNDEF = 4'hF   // undefined: raises the undefined-instruction exception
  } opcode_e;

  // Register-ALU function field (opcode 0)
  localparam logic [2:0] F_NOP = 3'd0, F_ADD = 3'd1, F_SUB = 3'd2, F_AND = 3'd3,
                         F_OR  = 3'd4, F_XOR = 3'd5, F_NOR = 3'd6, F_NOT = 3'd7;
  // System function field (opcode E)
  localparam logic [2:0] F_EI = 3'd0, F_DI = 3'd1, F_RETI = 3'd2;

  // ---------------------------------------------------------- ALU functions
  // 5 = ADD and 3 = NOR match the execute-stage waveforms of the reference
  // design; 7 also adds there and is used here as the add that never traps.
  typedef enum logic [3:0] {
    ALU_AND  = 4'h0,
    ALU_OR   = 4'h1,
    ALU_XOR  = 4'h2,
    ALU_NOR  = 4'h3,
    ALU_NOT  = 4'h4,
    ALU_ADD  = 4'h5,   // signed add, reports overflow
    ALU_SUB  = 4'h6,   // signed subtract, reports overflow
    ALU_ADDU = 4'h7,   // add, no overflow report (address arithmetic)
    ALU_PASS = 4'hF    // result = source 1
  } alu_fn_e;

  // Shift kinds, in alu_function[1:0] when ex_select = EX_SHIFT
  localparam logic [1:0] SH_SLL = 2'd0, SH_SRL = 2'd1, SH_SLA = 2'd2, SH_SRA = 2'd3;

  // Execute-stage unit select
  typedef enum logic [1:0] {
    EX_ALU   = 2'd0,
    EX_SHIFT = 2'd1,
    EX_MVL   = 2'd2,   // immediate into the low byte
    EX_MVH   = 2'd3    // immediate into the high byte
  } ex_sel_e;

  // Write-back source select in stage 4
  typedef enum logic [1:0] {
    MS_MEM    = 2'd0,
    MS_RESULT = 2'd1,
    MS_INPUT  = 2'd2
  } mem_sel_e;

  // Read-register combinations: {source 1 field, source 2 field}
  typedef enum logic [1:0] {
    RS_R   = 2'd0,   // ([8:6], [5:3])
    RS_ST  = 2'd1,   // ([8:6], [11:9])
    RS_RD  = 2'd2,   // ([11:9], [5:3])
    RS_RD2 = 2'd3    // ([11:9], [8:6])
  } reg_sel_e;

  // Next-PC select (OPC) of the fetch stage
  typedef enum logic [3:0] {
    OPC_INC  = 4'd0,   // PC + 1
    OPC_BR   = 4'd1,   // branch target
    OPC_RET  = 4'd2,   // return from subroutine (register content)
    OPC_RETI = 4'd3,   // return from interrupt
    OPC_OVF  = 4'd4,   // overflow exception vector
    OPC_UND  = 4'd5,   // undefined-instruction exception vector
    OPC_INT0 = 4'd6    // interrupt k uses OPC_INT0 + k
  } opc_e;

  // Kind of control transfer, resolved in the execute stage
  typedef enum logic [2:0] {
    BT_NONE = 3'd0,
    BT_BZ   = 3'd1,
    BT_BNZ  = 3'd2,
    BT_BR   = 3'd3,    // unconditional, relative or absolute per branch_select
    BT_RET  = 3'd4,    // RJAL: return through register
    BT_RETI = 3'd5
  } br_e;

  // Control word produced by the decoder and carried down the pipeline
  typedef struct packed {
    logic     use1;          // source 1 is read
    logic     use2;          // source 2 is read
    logic     rf_we;         // result is written to a register
    ex_sel_e  ex_select;
    alu_fn_e  alu_function;
    logic     alu_sel;       // operand 2: 0 source 2, 1 r_immediate
    logic     jal_control;   // result: 0 unit output, 1 PC+1
    br_e      br;
    logic     branch_select; // 0 absolute (register), 1 relative
    logic     mem_re;
    logic     mem_we;
    mem_sel_e memsel;
    logic     output_enable;
    logic     ei;
    logic     di;
    logic     undef;
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{
    use1: 1'b0, use2: 1'b0, rf_we: 1'b0, ex_select: EX_ALU, alu_function: ALU_PASS,
    alu_sel: 1'b0, jal_control: 1'b0, br: BT_NONE, branch_select: 1'b0,
    mem_re: 1'b0, mem_we: 1'b0, memsel: MS_RESULT, output_enable: 1'b0,
    ei: 1'b0, di: 1'b0, undef: 1'b0};

  // IF/ID register
  typedef struct packed {
    logic  valid;
    word_t instr;
    word_t pc1;       // incremented PC of this instruction
  } ifid_t;

  // ID/EX register (decode stage register)
  typedef struct packed {
    logic       valid;
    ctrl_t      ctrl;
    word_t      pc1;
    reg_t       rs1;
    reg_t       rs2;
    reg_t       wb;
    word_t      regone;      // content of source register 1
    word_t      regtwo;      // content of source register 2
    word_t      r_immediate; // sign-extended instruction[5:0]
    word_t      s_immediate; // zero-extended instruction[4:1]
    logic [7:0] m_immediate; // instruction[8:1]
  } idex_t;

  // EX/MEM register (execution stage register)
  typedef struct packed {
    logic     valid;
    word_t    pc1;
    word_t    result;
    word_t    readtwo;       // store data
    reg_t     wb;
    logic     rf_we;
    logic     mem_re;
    logic     mem_we;
    mem_sel_e memsel;
    logic     output_enable;
  } exmem_t;

  // MEM/WB register (write-back register)
  typedef struct packed {
    logic  rf_enable;
    reg_t  rf_writereg;
    word_t rf_writedata;
  } memwb_t;

endpackage

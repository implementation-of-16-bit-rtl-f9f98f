// control_unit: hardwired control of the 16-bit RISC pipeline.
//
// Two parts. The decoder turns the opcode and function fields of the
// instruction in the decode stage into a control word (ctrl_t) that travels
// down the pipeline with the instruction, plus the read-register combination
// (regselect) for the decode stage. The redirect logic looks at the
// instruction in the execution stage and chooses the next-PC source (opc) for
// the fetch stage: exception vectors for overflow or an undefined
// instruction, an interrupt vector, a taken branch, a return from subroutine
// (RJAL) or a return from interrupt (RETI). Any redirect flushes the two
// instructions behind (IF/ID and ID/EX). Exceptions and interrupts also
// cancel the instruction in execution (squash) and ask the interrupt unit to
// save a return address: the next instruction after a fault, the cancelled
// instruction itself for an interrupt.
//
// Hardwired control, resolution in the execution stage, the opc codes and the
// flushes follow the reference design. The opcode numbering and the priority
// among exceptions, interrupts and branches are this design's own; only
// "reset first" is given. Interface: purely combinational.
module control_unit
  import risc_pkg::*;
(
  // decode-stage instruction
  input  word_t      instr,
  output ctrl_t      ctrl,
  output reg_sel_e   regselect,
  // execution-stage instruction
  input  logic       ex_valid,
  input  ctrl_t      ex_ctrl,
  input  word_t      ex_pc1,
  input  logic       zero,          // tested register is zero
  input  logic       overflow,
  input  logic       int_take,      // interrupt unit accepts an interrupt
  input  logic [2:0] int_num,
  output logic [3:0] opc,
  output logic       ifid_flush,
  output logic       idex_flush,
  output logic       squash,        // cancel the instruction in execution
  output logic       save,          // store ret_addr as return-from-interrupt PC
  output word_t      ret_addr,
  output logic       exc,           // an exception is being taken
  output logic       ex_ei,         // EI completes
  output logic       ex_di,         // DI completes
  output logic       ex_reti        // RETI completes
);

  opcode_e    op;
  logic [2:0] func;

  assign op   = opcode_e'(instr[15:12]);
  assign func = instr[2:0];

  // ---------------------------------------------------------------- decoder
  always_comb begin
    ctrl      = CTRL_NOP;
    regselect = RS_R;
    unique case (op)
      OP_ALU: if (func != F_NOP) begin
        ctrl.use1  = 1'b1;
        ctrl.use2  = (func != F_NOT);
        ctrl.rf_we = 1'b1;
        unique case (func)
          F_ADD:   ctrl.alu_function = ALU_ADD;
          F_SUB:   ctrl.alu_function = ALU_SUB;
          F_AND:   ctrl.alu_function = ALU_AND;
          F_OR:    ctrl.alu_function = ALU_OR;
          F_XOR:   ctrl.alu_function = ALU_XOR;
          F_NOR:   ctrl.alu_function = ALU_NOR;
          default: ctrl.alu_function = ALU_NOT;
        endcase
      end
      OP_ADDI: begin
        ctrl.use1 = 1'b1; ctrl.rf_we = 1'b1;
        ctrl.alu_function = ALU_ADD; ctrl.alu_sel = 1'b1;
      end
      OP_SHIFT: begin
        ctrl.use1 = 1'b1; ctrl.rf_we = 1'b1;
        ctrl.ex_select    = EX_SHIFT;
        ctrl.alu_function = alu_fn_e'({2'b00, instr[5], instr[0]});
      end
      OP_MVI: begin
        regselect  = RS_RD;
        ctrl.use1  = 1'b1; ctrl.rf_we = 1'b1;
        ctrl.ex_select = instr[0] ? EX_MVH : EX_MVL;
      end
      OP_LOAD: begin
        ctrl.use1 = 1'b1; ctrl.rf_we = 1'b1;
        ctrl.alu_function = ALU_ADDU; ctrl.alu_sel = 1'b1;
        ctrl.mem_re = 1'b1; ctrl.memsel = MS_MEM;
      end
      OP_STORE: begin
        regselect = RS_ST;
        ctrl.use1 = 1'b1; ctrl.use2 = 1'b1;
        ctrl.alu_function = ALU_ADDU; ctrl.alu_sel = 1'b1;
        ctrl.mem_we = 1'b1;
      end
      OP_IN: begin
        ctrl.rf_we = 1'b1; ctrl.memsel = MS_INPUT;
      end
      OP_OUT: begin
        ctrl.use1 = 1'b1; ctrl.output_enable = 1'b1;
      end
      OP_BZ, OP_BNZ: begin
        regselect = RS_RD;
        ctrl.use1 = 1'b1;
        ctrl.br = (op == OP_BZ) ? BT_BZ : BT_BNZ;
        ctrl.branch_select = 1'b1;
      end
      OP_BR: begin
        ctrl.br = BT_BR; ctrl.branch_select = 1'b1;
      end
      OP_JMP: begin
        ctrl.use1 = 1'b1; ctrl.br = BT_BR; ctrl.branch_select = 1'b0;
      end
      OP_JAL: begin
        ctrl.rf_we = 1'b1; ctrl.jal_control = 1'b1;
        ctrl.br = BT_BR; ctrl.branch_select = 1'b1;
      end
      OP_RJAL: begin
        ctrl.use1 = 1'b1; ctrl.br = BT_RET;
      end
      OP_SYS: begin
        unique case (func)
          F_EI:    ctrl.ei = 1'b1;
          F_DI:    ctrl.di = 1'b1;
          F_RETI:  ctrl.br = BT_RETI;
          default: ctrl.undef = 1'b1;
        endcase
      end
      default: ctrl.undef = 1'b1;
    endcase
  end

  // ------------------------------------------------------- redirect logic
  logic taken;

  always_comb begin
    unique case (ex_ctrl.br)
      BT_BZ:   taken = zero;
      BT_BNZ:  taken = !zero;
      BT_BR,
      BT_RET,
      BT_RETI: taken = 1'b1;
      default: taken = 1'b0;
    endcase
    taken = taken && ex_valid;
  end

  always_comb begin
    exc      = ex_valid && (overflow || ex_ctrl.undef);
    squash   = exc || int_take;
    save     = squash;
    ret_addr = exc ? ex_pc1 : ex_pc1 - 16'd1;
    if (ex_valid && overflow)           opc = OPC_OVF;
    else if (ex_valid && ex_ctrl.undef) opc = OPC_UND;
    else if (int_take)                  opc = 4'(OPC_INT0) + {1'b0, int_num};
    else if (taken) begin
      unique case (ex_ctrl.br)
        BT_RET:  opc = OPC_RET;
        BT_RETI: opc = OPC_RETI;
        default: opc = OPC_BR;
      endcase
    end else                            opc = OPC_INC;
    ifid_flush = (opc != OPC_INC);
    idex_flush = ifid_flush;
    ex_ei   = ex_valid && ex_ctrl.ei && !squash;
    ex_di   = ex_valid && ex_ctrl.di && !squash;
    ex_reti = taken && ex_ctrl.br == BT_RETI && !squash;
  end

endmodule

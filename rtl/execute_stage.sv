// execute_stage: stage 3 of the pipeline - operand forwarding multiplexers,
// ALU (basic ALU, shift unit, move-immediate unit), branch unit, the JAL
// multiplexer and the execution stage register (EX/MEM).
//
// Operand 1 and operand 2 are taken from the ID/EX register or, as the
// forwarding unit says, from the EX/MEM or MEM/WB result. alu_sel replaces
// operand 2 by the sign-extended immediate. jal_control chooses between the
// unit output and the incremented PC, which is the return address a JAL
// writes. The branch unit computes the target from the forwarded operand 1
// (absolute) or from the PC and the 8-bit immediate (relative); zero tells
// the control unit whether operand 1 is zero. The reference design draws the
// branch unit in the decode stage; placing it here, where forwarded values
// are available, is this design's choice.
//
// Timing: EX/MEM loads on every rising edge; squash (exception or interrupt)
// loads an empty slot instead, so a cancelled instruction writes nothing.
module execute_stage
  import risc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  idex_t      idex,
  input  logic [1:0] fwd_a,
  input  logic [1:0] fwd_b,
  input  word_t      exmem_fwd,
  input  word_t      memwb_fwd,
  input  logic       squash,
  output word_t      readone,     // forwarded operand 1
  output word_t      bu_pc,
  output logic       zero,
  output logic       overflow,
  output exmem_t     exmem
);

  word_t op_a, op_b, alu_b, alu_result, result;

  always_comb begin
    unique case (fwd_a)
      2'd1:    op_a = exmem_fwd;
      2'd2:    op_a = memwb_fwd;
      default: op_a = idex.regone;
    endcase
    unique case (fwd_b)
      2'd1:    op_b = exmem_fwd;
      2'd2:    op_b = memwb_fwd;
      default: op_b = idex.regtwo;
    endcase
  end

  assign alu_b   = idex.ctrl.alu_sel ? idex.r_immediate : op_b;
  assign readone = op_a;
  assign zero    = (op_a == '0);

  alu u_alu (
    .a            (op_a),
    .b            (alu_b),
    .shamt        (idex.s_immediate[3:0]),
    .imm8         (idex.m_immediate),
    .ex_select    (idex.ctrl.ex_select),
    .alu_function (idex.ctrl.alu_function),
    .result       (alu_result),
    .overflow     (overflow)
  );

  branch_unit u_bu (
    .pc            (idex.pc1),
    .breg          (op_a),
    .imm8          (idex.m_immediate),
    .branch_select (idex.ctrl.branch_select),
    .bu_pc         (bu_pc)
  );

  assign result = idex.ctrl.jal_control ? idex.pc1 : alu_result;

  always_ff @(posedge clk) begin
    if (rst || squash || !idex.valid) begin
      exmem <= '0;
      exmem.memsel <= MS_RESULT;
    end else begin
      exmem.valid         <= 1'b1;
      exmem.pc1           <= idex.pc1;
      exmem.result        <= result;
      exmem.readtwo       <= op_b;
      exmem.wb            <= idex.wb;
      exmem.rf_we         <= idex.ctrl.rf_we;
      exmem.mem_re        <= idex.ctrl.mem_re;
      exmem.mem_we        <= idex.ctrl.mem_we;
      exmem.memsel        <= idex.ctrl.memsel;
      exmem.output_enable <= idex.ctrl.output_enable;
    end
  end

endmodule

// alu: the execute-stage arithmetic block of the 16-bit RISC pipeline.
//
// Three units share the operands and one is chosen by ex_select: the basic
// ALU (add, subtract, AND, OR, XOR, NOR, NOT, pass), the shift unit (logical
// and arithmetic shifts by 0..15) and the move-immediate unit, which puts an
// 8-bit immediate into the low or the high byte of source 1 and keeps the
// other byte. The list of operations and the three-unit split follow the
// reference design; the operation codes, apart from 5 = add and 3 = NOR which
// its waveforms show, are this design's own (see risc_pkg).
//
// Interface: purely combinational. overflow is the signed overflow of ALU_ADD
// and ALU_SUB, and is low for every other operation.
module alu
  import risc_pkg::*;
(
  input  word_t      a,             // content of source register 1
  input  word_t      b,             // source register 2 or immediate
  input  logic [3:0] shamt,         // s_immediate[3:0]
  input  logic [7:0] imm8,          // m_immediate
  input  ex_sel_e    ex_select,
  input  alu_fn_e    alu_function,
  output word_t      result,
  output logic       overflow
);

  word_t sum, diff, alu_out, sh_out;

  always_comb begin
    sum  = a + b;
    diff = a - b;
    unique case (alu_function)
      ALU_AND:  alu_out = a & b;
      ALU_OR:   alu_out = a | b;
      ALU_XOR:  alu_out = a ^ b;
      ALU_NOR:  alu_out = ~(a | b);
      ALU_NOT:  alu_out = ~a;
      ALU_ADD,
      ALU_ADDU: alu_out = sum;
      ALU_SUB:  alu_out = diff;
      default:  alu_out = a;
    endcase
  end

  always_comb begin
    unique case (alu_function[1:0])
      SH_SLL, SH_SLA: sh_out = a << shamt;
      SH_SRL:         sh_out = a >> shamt;
      default:        sh_out = word_t'($signed(a) >>> shamt);
    endcase
  end

  always_comb begin
    unique case (ex_select)
      EX_ALU:   result = alu_out;
      EX_SHIFT: result = sh_out;
      EX_MVL:   result = {a[15:8], imm8};
      default:  result = {imm8, a[7:0]};
    endcase
  end

  always_comb begin
    overflow = 1'b0;
    if (ex_select == EX_ALU) begin
      if (alu_function == ALU_ADD)
        overflow = (a[15] == b[15]) && (sum[15] != a[15]);
      else if (alu_function == ALU_SUB)
        overflow = (a[15] != b[15]) && (diff[15] != a[15]);
    end
  end

endmodule

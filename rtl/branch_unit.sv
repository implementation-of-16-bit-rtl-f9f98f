// branch_unit: computes the branch target address.
//
// Absolute branches (branch_select = 0) jump to the content of a register;
// relative branches (branch_select = 1) jump to the incremented PC of the
// branch plus the sign-extended 8-bit immediate. The two branch types and
// the PC + immediate arithmetic follow the reference design's decode-stage
// waveforms; sign-extending the 8-bit offset is this design's reading.
//
// Interface: purely combinational.
module branch_unit
  import risc_pkg::*;
(
  input  word_t      pc,            // incremented PC of the branch
  input  word_t      breg,          // branch register content
  input  logic [7:0] imm8,          // m_immediate
  input  logic       branch_select, // 0 absolute, 1 relative
  output word_t      bu_pc
);

  always_comb begin
    if (branch_select) bu_pc = pc + {{8{imm8[7]}}, imm8};
    else               bu_pc = breg;
  end

endmodule

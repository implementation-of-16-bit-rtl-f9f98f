// register_file: the eight 16-bit general-purpose registers.
//
// Two combinational read ports and one write port written on the rising
// clock edge. A read of the register being written in the same cycle returns
// the new value, so an instruction in decode sees the result that the
// write-back register is committing (this bypass is this design's choice; the
// register count follows the 3-bit register codes of the reference design).
// Synchronous active-high reset clears all registers.
module register_file
  import risc_pkg::*;
#(
  parameter int unsigned N_REGS = 8
) (
  input  logic  clk,
  input  logic  rst,
  input  reg_t  ra1,
  input  reg_t  ra2,
  output word_t rd1,
  output word_t rd2,
  input  logic  we,
  input  reg_t  wa,
  input  word_t wd
);

  word_t regs [N_REGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N_REGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (we && wa == ra1) ? wd : regs[ra1];
  assign rd2 = (we && wa == ra2) ? wd : regs[ra2];

endmodule

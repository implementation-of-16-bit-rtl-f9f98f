// fetch_stage: stage 1 of the pipeline - program counter, program counter
// incrementer, program counter selector and instruction fetch register.
//
// Each clock the selector loads the PC, under pc_enable, with one of: PC + 1,
// the branch target, the return-from-subroutine address, the
// return-from-interrupt address, or a fixed exception or interrupt vector,
// as chosen by opc from the control unit. The word at the current PC comes
// from the prefetch unit; when it is there (instr_valid) the instruction and
// its incremented PC are loaded into the IF/ID register under ifid_enable,
// otherwise a bubble is loaded and the PC holds. ifid_flush loads the NOP
// 0000H. The opc codes 0..7 and the vectors FFFFH (overflow), FFF0H
// (undefined instruction), 0008H and 000AH (first two interrupts) are the
// reference design's; the further interrupt vectors continuing in steps of
// two words, and the reset PC 0000H, are this design's own.
//
// Timing: PC and IF/ID are registers on the rising clock edge; synchronous
// active-high reset.
module fetch_stage
  import risc_pkg::*;
#(
  parameter word_t RESET_PC     = 16'h0000,
  parameter word_t OVF_VEC      = 16'hFFFF,
  parameter word_t UND_VEC      = 16'hFFF0,
  parameter word_t INT_VEC_BASE = 16'h0008
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] opc,
  input  word_t      bu_pc,        // branch PC
  input  word_t      readone,      // return-from-subroutine PC
  input  word_t      intret,       // return-from-interrupt PC
  input  word_t      instruction,  // from prefetcher
  input  logic       instr_valid,  // prefetcher holds the word at pcvalue
  input  logic       pc_enable,
  input  logic       ifid_enable,
  input  logic       ifid_flush,
  output word_t      pcvalue,      // current PC, to the prefetcher
  output word_t      pc_increment,
  output ifid_t      ifid
);

  word_t pc_next;

  assign pc_increment = pcvalue + 16'd1;

  always_comb begin
    unique case (opc)
      OPC_INC:  pc_next = instr_valid ? pc_increment : pcvalue;
      OPC_BR:   pc_next = bu_pc;
      OPC_RET:  pc_next = readone;
      OPC_RETI: pc_next = intret;
      OPC_OVF:  pc_next = OVF_VEC;
      OPC_UND:  pc_next = UND_VEC;
      default:  pc_next = INT_VEC_BASE + word_t'({opc - 4'(OPC_INT0), 1'b0});
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)            pcvalue <= RESET_PC;
    else if (pc_enable) pcvalue <= pc_next;
  end

  always_ff @(posedge clk) begin
    if (rst || ifid_flush)
      ifid <= '{valid: 1'b0, instr: '0, pc1: '0};
    else if (ifid_enable) begin
      if (instr_valid) ifid <= '{valid: 1'b1, instr: instruction, pc1: pc_increment};
      else             ifid <= '{valid: 1'b0, instr: '0, pc1: '0};
    end
  end

endmodule

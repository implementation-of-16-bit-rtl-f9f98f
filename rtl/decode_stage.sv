// decode_stage: stage 2 of the pipeline - read-register multiplexer, register
// file, sign extension and the decode stage register (ID/EX).
//
// regselect chooses which instruction fields address the two read ports:
// 0 ([8:6],[5:3]) for register operations, 1 ([8:6],[11:9]) for a store whose
// data register sits in the destination field, 2 ([11:9],[5:3]) when the
// destination register is also read (move immediate, conditional branch),
// 3 ([11:9],[8:6]). The immediates are cut from the instruction: r_immediate
// is [5:0] sign extended, s_immediate is [4:1], m_immediate is [8:1]. The
// first three regselect codes and the immediate fields are read from the
// reference design's decode-stage waveforms; code 3 is this design's own.
//
// The write port of the register file is driven by the write-back register
// of stage 4 (rf_enable, rf_writereg, rf_writedata). The ID/EX register loads
// on every rising edge; bubble (a stall or a flush) loads an empty slot
// (valid low, NOP control) instead.
module decode_stage
  import risc_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  ifid_t    ifid,
  input  ctrl_t    ctrl,          // decoded control word of ifid.instr
  input  reg_sel_e regselect,
  input  logic     bubble,
  input  logic     rf_enable,
  input  reg_t     rf_writereg,
  input  word_t    rf_writedata,
  output reg_t     rs1,           // read register 1 (to hazard detection)
  output reg_t     rs2,           // read register 2
  output idex_t    idex
);

  word_t instr, regone, regtwo;

  assign instr = ifid.instr;

  always_comb begin
    unique case (regselect)
      RS_R:    begin rs1 = instr[8:6];  rs2 = instr[5:3];  end
      RS_ST:   begin rs1 = instr[8:6];  rs2 = instr[11:9]; end
      RS_RD:   begin rs1 = instr[11:9]; rs2 = instr[5:3];  end
      default: begin rs1 = instr[11:9]; rs2 = instr[8:6];  end
    endcase
  end

  register_file u_rf (
    .clk (clk), .rst (rst),
    .ra1 (rs1), .ra2 (rs2), .rd1 (regone), .rd2 (regtwo),
    .we  (rf_enable), .wa (rf_writereg), .wd (rf_writedata)
  );

  always_ff @(posedge clk) begin
    if (rst || bubble) begin
      idex       <= '0;
      idex.ctrl  <= CTRL_NOP;
    end else begin
      idex.valid       <= ifid.valid;
      idex.ctrl        <= ifid.valid ? ctrl : CTRL_NOP;
      idex.pc1         <= ifid.pc1;
      idex.rs1         <= rs1;
      idex.rs2         <= rs2;
      idex.wb          <= instr[11:9];
      idex.regone      <= regone;
      idex.regtwo      <= regtwo;
      idex.r_immediate <= {{10{instr[5]}}, instr[5:0]};
      idex.s_immediate <= {12'h000, instr[4:1]};
      idex.m_immediate <= instr[8:1];
    end
  end

endmodule

// tb_decode_stage: self-checking test of the instruction decode stage.
// Checks the read-register combinations and immediates printed in the
// reference design's stage-2 waveforms (instruction 0051H: regselect 0, 1, 2
// read registers (1,2), (1,0), (0,2); r_immediate 0011H, s_immediate 0008H,
// m_immediate 28H, write-back register 0; instruction 42CAH: (1,1), 000AH,
// 0005H, 65H, 1). Then fills the register file through the write port and
// checks random instructions, control words, bubbles and the read-through of
// a same-cycle write against a model.
module tb_decode_stage;
  import risc_pkg::*;

  logic clk = 0, rst = 1;
  ifid_t ifid = '0;
  ctrl_t ctrl = CTRL_NOP;
  reg_sel_e regselect = RS_R;
  logic bubble = 0, rf_enable = 0;
  reg_t rf_writereg = 0, rs1, rs2;
  word_t rf_writedata = 0;
  idex_t idex;
  word_t shadow [8];
  int checks = 0, failures = 0;

  decode_stage dut (.*);

  always #5 clk = ~clk;

  initial begin
    #300000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic fig(word_t ins, reg_sel_e sel, reg_t e1, reg_t e2, word_t er, word_t es, logic [7:0] em, reg_t ew);
    ifid = '{1'b1, ins, 16'h2300}; regselect = sel;
    @(posedge clk); #1;
    chk(rs1, e1, $sformatf("%h sel %0d read register 1", ins, sel));
    chk(rs2, e2, $sformatf("%h sel %0d read register 2", ins, sel));
    chk(idex.r_immediate, er, "r_immediate");
    chk(idex.s_immediate, es, "s_immediate");
    chk(idex.m_immediate, em, "m_immediate");
    chk(idex.wb, ew, "writeback register");
    chk(idex.pc1, 16'h2300, "PC passed");
  endtask

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    @(posedge clk); #1 rst = 0;
    fig(16'h0051, RS_R,  1, 2, 16'h0011, 16'h0008, 8'h28, 0);
    fig(16'h0051, RS_ST, 1, 0, 16'h0011, 16'h0008, 8'h28, 0);
    fig(16'h0051, RS_RD, 0, 2, 16'h0011, 16'h0008, 8'h28, 0);
    fig(16'h42CA, RS_RD, 1, 1, 16'h000A, 16'h0005, 8'h65, 1);
    fig(16'h42E0, RS_R,  3, 4, 16'hFFE0, 16'h0000, 8'h70, 1);
    // random
    repeat (3000) begin
      word_t ins, e1, e2; reg_t a1, a2; ctrl_t c; logic v, b;
      ins = 16'($urandom); v = 1'($urandom); b = ($urandom_range(0, 7) == 0);
      c = ctrl_t'($urandom);
      ifid = '{v, ins, 16'($urandom)}; ctrl = c; regselect = reg_sel_e'($urandom_range(0, 3));
      bubble = b;
      rf_enable = 1'($urandom); rf_writereg = reg_t'($urandom); rf_writedata = 16'($urandom);
      case (regselect)
        RS_R:    begin a1 = ins[8:6];  a2 = ins[5:3];  end
        RS_ST:   begin a1 = ins[8:6];  a2 = ins[11:9]; end
        RS_RD:   begin a1 = ins[11:9]; a2 = ins[5:3];  end
        default: begin a1 = ins[11:9]; a2 = ins[8:6];  end
      endcase
      e1 = (rf_enable && rf_writereg == a1) ? rf_writedata : shadow[a1];
      e2 = (rf_enable && rf_writereg == a2) ? rf_writedata : shadow[a2];
      #1;
      chk(rs1, a1, "rs1"); chk(rs2, a2, "rs2");
      @(posedge clk); #1;
      if (rf_enable) shadow[rf_writereg] = rf_writedata;
      if (b) begin
        chk(idex.valid, 0, "bubble valid"); chk(idex.ctrl, CTRL_NOP, "bubble control");
      end else begin
        chk(idex.valid, v, "valid");
        chk(idex.ctrl, v ? c : CTRL_NOP, "control word");
        chk(idex.regone, e1, "content of source register 1");
        chk(idex.regtwo, e2, "content of source register 2");
        chk(idex.r_immediate, {{10{ins[5]}}, ins[5:0]}, "random r_immediate");
        chk(idex.wb, ins[11:9], "random wb");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_execute_stage: self-checking test of the instruction execution stage.
// First replays the reference design's stage-3 waveform values (sources
// A0B0H/0032H then 2350H/0101H, PC 6300H, m_immediate 80H): results A0E2H
// (add), 5F4DH (NOR), A0B0H (shift by 0), 8050H (immediate into the high
// byte) and 2451H (add), with PC and source 2 carried into EX/MEM. Then
// random cycles check forwarding selects, the immediate operand, the JAL
// return address, squash and bubbles, the branch target and the zero flag
// against a model.
module tb_execute_stage;
  import risc_pkg::*;

  logic clk = 0, rst = 1;
  idex_t idex = '0;
  logic [1:0] fwd_a = 0, fwd_b = 0;
  word_t exmem_fwd = 0, memwb_fwd = 0, readone, bu_pc;
  logic squash = 0, zero, overflow;
  exmem_t exmem;
  int checks = 0, failures = 0;

  execute_stage dut (.*);

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

  task automatic fig(word_t a, word_t b, ex_sel_e es, alu_fn_e fn, reg_t wb, word_t exp);
    idex = '0;
    idex.valid = 1; idex.ctrl = CTRL_NOP; idex.ctrl.rf_we = 1;
    idex.ctrl.ex_select = es; idex.ctrl.alu_function = fn;
    idex.regone = a; idex.regtwo = b; idex.r_immediate = 16'h5050;
    idex.s_immediate = 16'h3030; idex.m_immediate = 8'h80; idex.pc1 = 16'h6300; idex.wb = wb;
    @(posedge clk); #1;
    chk(exmem.result, exp, $sformatf("waveform result sel %0d fn %0d", es, fn));
    chk(exmem.pc1, 16'h6300, "exmem_pc");
    chk(exmem.readtwo, b, "exmem readtwo");
    chk(exmem.wb, wb, "exmem wb");
  endtask

  function automatic word_t model_alu(word_t a, word_t b, ctrl_t c, word_t s, logic [7:0] m);
    case (c.ex_select)
      EX_SHIFT: case (c.alu_function[1:0])
                  2'd1:    return a >> s[3:0];
                  2'd3:    return word_t'($signed(a) >>> s[3:0]);
                  default: return a << s[3:0];
                endcase
      EX_MVL: return {a[15:8], m};
      EX_MVH: return {m, a[7:0]};
      default: case (c.alu_function)
                 ALU_AND: return a & b;
                 ALU_OR:  return a | b;
                 ALU_XOR: return a ^ b;
                 ALU_NOR: return ~(a | b);
                 ALU_NOT: return ~a;
                 ALU_ADD, ALU_ADDU: return a + b;
                 ALU_SUB: return a - b;
                 default: return a;
               endcase
    endcase
  endfunction

  initial begin
    @(posedge clk); #1 rst = 0;
    fig(16'hA0B0, 16'h0032, EX_ALU,   ALU_ADD,  0, 16'hA0E2);
    fig(16'hA0B0, 16'h0032, EX_ALU,   ALU_NOR,  1, 16'h5F4D);
    fig(16'hA0B0, 16'h0032, EX_SHIFT, ALU_NOR,  6, 16'hA0B0);
    fig(16'h2350, 16'h0101, EX_MVH,   ALU_ADDU, 2, 16'h8050);
    fig(16'h2350, 16'h0101, EX_ALU,   ALU_ADDU, 0, 16'h2451);
    repeat (3000) begin
      word_t a, b, bb, r; idex_t d; logic sq;
      d = idex_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      d.ctrl.alu_function = alu_fn_e'($urandom_range(0, 8) == 8 ? 15 : $urandom_range(0, 7));
      d.ctrl.ex_select = ex_sel_e'($urandom_range(0, 3));
      idex = d;
      fwd_a = 2'($urandom_range(0, 2)); fwd_b = 2'($urandom_range(0, 2));
      exmem_fwd = 16'($urandom); memwb_fwd = 16'($urandom);
      sq = ($urandom_range(0, 7) == 0); squash = sq;
      a = (fwd_a == 1) ? exmem_fwd : (fwd_a == 2) ? memwb_fwd : d.regone;
      b = (fwd_b == 1) ? exmem_fwd : (fwd_b == 2) ? memwb_fwd : d.regtwo;
      bb = d.ctrl.alu_sel ? d.r_immediate : b;
      r = d.ctrl.jal_control ? d.pc1 : model_alu(a, bb, d.ctrl, d.s_immediate, d.m_immediate);
      #1;
      chk(readone, a, "forwarded operand 1");
      chk(zero, a == 0, "zero flag");
      chk(bu_pc, d.ctrl.branch_select ? word_t'(d.pc1 + {{8{d.m_immediate[7]}}, d.m_immediate}) : a, "branch target");
      @(posedge clk); #1;
      if (sq || !d.valid) begin
        chk(exmem.valid, 0, "squashed or bubble slot empty");
        chk(exmem.rf_we | exmem.mem_we | exmem.mem_re | exmem.output_enable, 0, "empty slot has no effect");
      end else begin
        chk(exmem.valid, 1, "valid");
        chk(exmem.result, r, "result");
        chk(exmem.readtwo, b, "store data");
        chk(exmem.rf_we, d.ctrl.rf_we, "rf_we");
        chk(exmem.mem_we, d.ctrl.mem_we, "mem_we");
        chk(exmem.memsel, d.ctrl.memsel, "memsel");
        chk(exmem.wb, d.wb, "wb");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

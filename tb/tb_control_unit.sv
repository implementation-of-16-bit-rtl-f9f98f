// tb_control_unit: self-checking test of the hardwired control unit.
// Decoder: every opcode/function pair is checked for the fields that define
// the instruction (register write, source use, unit select, ALU function,
// immediate operand, memory access, write-back source, output enable,
// branch kind and type, EI/DI, undefined) and for the read-register
// combination, against a table written here. Redirect logic: random
// execution-stage states are checked against a priority model (overflow,
// undefined instruction, interrupt, taken branch / return / RETI), including
// the flushes, the squash and the saved return address.
module tb_control_unit;
  import risc_pkg::*;

  word_t instr = 0, ex_pc1 = 0, ret_addr;
  ctrl_t ctrl, ex_ctrl = CTRL_NOP;
  reg_sel_e regselect;
  logic ex_valid = 0, zero = 0, overflow = 0, int_take = 0;
  logic [2:0] int_num = 0;
  logic [3:0] opc;
  logic ifid_flush, idex_flush, squash, save, exc, ex_ei, ex_di, ex_reti;
  int checks = 0, failures = 0;

  control_unit dut (.*);

  initial begin
    #1000000;
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

  initial begin
    // ---------------------------------------------------------- decoder
    for (int op = 0; op < 16; op++)
      for (int fn = 0; fn < 8; fn++) begin
        ctrl_t e; reg_sel_e rs;
        instr = {4'(op), 9'h1A5 & 9'h1F8, 3'(fn)};   // fields other than func arbitrary
        instr[0] = 1'b1; instr[5] = 1'b0; instr[2:0] = 3'(fn);
        #1;
        e = CTRL_NOP; rs = RS_R;
        case (op)
          0: if (fn != 0) begin
               e.use1 = 1; e.use2 = (fn != 7); e.rf_we = 1;
               e.alu_function = (fn == 1) ? ALU_ADD : (fn == 2) ? ALU_SUB : (fn == 3) ? ALU_AND :
                                (fn == 4) ? ALU_OR : (fn == 5) ? ALU_XOR : (fn == 6) ? ALU_NOR : ALU_NOT;
             end
          1: begin e.use1 = 1; e.rf_we = 1; e.alu_function = ALU_ADD; e.alu_sel = 1; end
          2: begin e.use1 = 1; e.rf_we = 1; e.ex_select = EX_SHIFT;
                   e.alu_function = alu_fn_e'({2'b00, instr[5], instr[0]}); end
          3: begin rs = RS_RD; e.use1 = 1; e.rf_we = 1; e.ex_select = instr[0] ? EX_MVH : EX_MVL; end
          4: begin e.use1 = 1; e.rf_we = 1; e.alu_function = ALU_ADDU; e.alu_sel = 1;
                   e.mem_re = 1; e.memsel = MS_MEM; end
          5: begin rs = RS_ST; e.use1 = 1; e.use2 = 1; e.alu_function = ALU_ADDU; e.alu_sel = 1;
                   e.mem_we = 1; end
          6: begin e.rf_we = 1; e.memsel = MS_INPUT; end
          7: begin e.use1 = 1; e.output_enable = 1; end
          8, 9: begin rs = RS_RD; e.use1 = 1; e.br = (op == 8) ? BT_BZ : BT_BNZ; e.branch_select = 1; end
          10: begin e.br = BT_BR; e.branch_select = 1; end
          11: begin e.use1 = 1; e.br = BT_BR; end
          12: begin e.rf_we = 1; e.jal_control = 1; e.br = BT_BR; e.branch_select = 1; end
          13: begin e.use1 = 1; e.br = BT_RET; end
          14: case (fn)
                0: e.ei = 1;
                1: e.di = 1;
                2: e.br = BT_RETI;
                default: e.undef = 1;
              endcase
          default: e.undef = 1;
        endcase
        chk(ctrl, e, $sformatf("control word op %h func %0d", op, fn));
        chk(regselect, rs, $sformatf("regselect op %h", op));
      end
    // --------------------------------------------------- redirect logic
    repeat (4000) begin
      logic [3:0] e_opc; logic taken;
      ex_valid = 1'($urandom);
      ex_ctrl = CTRL_NOP;
      ex_ctrl.br = br_e'($urandom_range(0, 5));
      ex_ctrl.undef = ($urandom_range(0, 7) == 0);
      ex_ctrl.ei = 1'($urandom); ex_ctrl.di = 1'($urandom);
      ex_pc1 = 16'($urandom);
      zero = 1'($urandom);
      overflow = ($urandom_range(0, 7) == 0);
      int_take = ($urandom_range(0, 5) == 0);
      int_num = 3'($urandom_range(0, 5));
      #1;
      taken = ex_valid && (ex_ctrl.br == BT_BR || ex_ctrl.br == BT_RET || ex_ctrl.br == BT_RETI ||
                           (ex_ctrl.br == BT_BZ && zero) || (ex_ctrl.br == BT_BNZ && !zero));
      if (ex_valid && overflow)           e_opc = 4;
      else if (ex_valid && ex_ctrl.undef) e_opc = 5;
      else if (int_take)                  e_opc = 4'(6 + int_num);
      else if (taken)                     e_opc = (ex_ctrl.br == BT_RET) ? 2 : (ex_ctrl.br == BT_RETI) ? 3 : 1;
      else                                e_opc = 0;
      chk(opc, e_opc, "opc");
      chk(ifid_flush, e_opc != 0, "ifid_flush");
      chk(idex_flush, e_opc != 0, "idex_flush");
      chk(squash, (ex_valid && (overflow || ex_ctrl.undef)) || int_take, "squash");
      chk(exc, ex_valid && (overflow || ex_ctrl.undef), "exception");
      if (squash)
        chk(ret_addr, exc ? ex_pc1 : word_t'(ex_pc1 - 16'd1), "return address");
      chk(ex_ei, ex_valid && ex_ctrl.ei && !squash, "EI");
      chk(ex_reti, taken && ex_ctrl.br == BT_RETI && !squash, "RETI");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

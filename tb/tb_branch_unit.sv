// tb_branch_unit: self-checking test of the branch target unit.
// Checks the three cases printed in the reference design's decode-stage
// waveforms (absolute 1020H, relative 2300H+28H, 2300H+65H), a negative
// offset, and 2000 random cases against PC + sign-extended offset or the
// register content.
module tb_branch_unit;
  import risc_pkg::*;

  word_t pc, breg, bu_pc;
  logic [7:0] imm8;
  logic branch_select;
  int checks = 0, failures = 0;

  branch_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t(word_t p, word_t r, logic [7:0] i, logic s, word_t exp);
    pc = p; breg = r; imm8 = i; branch_select = s;
    #1;
    checks++;
    if (bu_pc !== exp) begin
      failures++;
      $display("FAIL pc=%h reg=%h imm=%h sel=%b got %h expected %h", p, r, i, s, bu_pc, exp);
    end
  endtask

  initial begin
    t(16'h2300, 16'h1020, 8'h28, 1'b0, 16'h1020);
    t(16'h2300, 16'h1020, 8'h28, 1'b1, 16'h2328);
    t(16'h2300, 16'h1020, 8'h65, 1'b1, 16'h2365);
    t(16'h2300, 16'h1020, 8'hFF, 1'b1, 16'h22FF);
    t(16'h0005, 16'h1020, 8'h80, 1'b1, 16'hFF85);
    repeat (2000) begin
      word_t p, r; logic [7:0] i; logic s; int signed o;
      p = 16'($urandom); r = 16'($urandom); i = 8'($urandom); s = 1'($urandom);
      o = (i >= 128) ? int'(i) - 256 : int'(i);
      t(p, r, i, s, s ? word_t'(int'(p) + o) : r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

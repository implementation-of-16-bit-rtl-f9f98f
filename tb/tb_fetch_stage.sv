// tb_fetch_stage: self-checking test of the instruction fetch stage.
// Replays the reference design's stage-1 waveform sequence: opc 1, 2, 3
// load the branch PC 1000H, the subroutine return 3000H and the interrupt
// return 2000H; opc 4, 5 load the exception vectors FFFFH (incremented PC
// wraps to 0000H) and FFF0H; opc 6 and 7 load 0008H and 000AH; a flush
// turns the fetched instruction into 0000H. Then random cycles check PC+1
// sequencing, holds on pc_enable low or a prefetch miss, IF/ID hold and
// bubble behaviour and the remaining interrupt vectors against a model.
module tb_fetch_stage;
  import risc_pkg::*;

  logic clk = 0, rst = 1;
  logic [3:0] opc = 0;
  word_t bu_pc = 16'h1000, readone = 16'h3000, intret = 16'h2000, instruction = 16'h0051;
  logic instr_valid = 1, pc_enable = 1, ifid_enable = 1, ifid_flush = 0;
  word_t pcvalue, pc_increment;
  ifid_t ifid;
  int checks = 0, failures = 0;

  fetch_stage dut (.*);

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

  task automatic step(logic [3:0] o);
    opc = o;
    @(posedge clk); #1;
  endtask

  initial begin
    word_t m_pc; ifid_t m_ifid;
    @(posedge clk); #1 rst = 0;
    chk(pcvalue, 16'h0000, "reset PC");
    step(1); chk(pcvalue, 16'h1000, "opc 1 branch"); chk(pc_increment, 16'h1001, "inc 1001");
    step(2); chk(pcvalue, 16'h3000, "opc 2 return from subroutine"); chk(pc_increment, 16'h3001, "inc 3001");
    step(3); chk(pcvalue, 16'h2000, "opc 3 return from interrupt"); chk(pc_increment, 16'h2001, "inc 2001");
    step(4); chk(pcvalue, 16'hFFFF, "opc 4 overflow vector"); chk(pc_increment, 16'h0000, "inc wraps");
    step(5); chk(pcvalue, 16'hFFF0, "opc 5 undefined vector"); chk(pc_increment, 16'hFFF1, "inc FFF1");
    step(6); chk(pcvalue, 16'h0008, "opc 6 vector"); chk(pc_increment, 16'h0009, "inc 0009");
    step(7); chk(pcvalue, 16'h000A, "opc 7 vector"); chk(pc_increment, 16'h000B, "inc 000B");
    chk(ifid.instr, 16'h0051, "instruction passed"); chk(ifid.pc1, 16'h0009, "IF/ID holds incremented PC");
    ifid_flush = 1; step(0); ifid_flush = 0;
    chk(ifid.instr, 16'h0000, "flush gives 0000H"); chk(ifid.valid, 0, "flush invalidates");
    chk(pcvalue, 16'h000B, "opc 0 increments");
    // random sequencing against a model
    m_pc = pcvalue; m_ifid = ifid;
    repeat (3000) begin
      logic [3:0] o;
      o = ($urandom_range(0, 3) == 0) ? 4'($urandom_range(0, 11)) : 4'd0;
      bu_pc = 16'($urandom); readone = 16'($urandom); intret = 16'($urandom);
      instruction = 16'($urandom);
      instr_valid = ($urandom_range(0, 4) != 0);
      pc_enable = ($urandom_range(0, 5) != 0);
      ifid_enable = ($urandom_range(0, 5) != 0);
      ifid_flush = ($urandom_range(0, 9) == 0);
      opc = o;
      #1;
      chk(pc_increment, word_t'(m_pc + 16'd1), "pc_increment");
      if (ifid_flush) m_ifid = '0;
      else if (ifid_enable) m_ifid = instr_valid ? '{1'b1, instruction, m_pc + 16'd1} : '0;
      if (pc_enable)
        case (o)
          0: m_pc = instr_valid ? m_pc + 1 : m_pc;
          1: m_pc = bu_pc;
          2: m_pc = readone;
          3: m_pc = intret;
          4: m_pc = 16'hFFFF;
          5: m_pc = 16'hFFF0;
          default: m_pc = 16'h0008 + 16'(2 * (o - 6));
        endcase
      @(posedge clk); #1;
      chk(pcvalue, m_pc, "random PC");
      chk(ifid, m_ifid, "random IF/ID");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

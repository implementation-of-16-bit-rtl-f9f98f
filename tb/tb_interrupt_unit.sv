// tb_interrupt_unit: self-checking test of the interrupt unit.
// Directed part: interrupts are disabled after reset; EI enables; two
// simultaneous requests are served lowest number first, each with a
// one-cycle acknowledge; acceptance and a saved return address disable
// interrupts; RETI re-enables; DI masks a pending request until EI. Random
// part: request edges, enables and pipeline readiness are compared cycle by
// cycle with a model of the pending bits, the enable flag and the priority.
module tb_interrupt_unit;
  import risc_pkg::*;

  logic clk = 0, rst = 1;
  logic [5:0] irq = 0, irq_ack;
  logic can_take = 0, ei = 0, di = 0, reti = 0, save = 0, int_take, ie;
  word_t ret_addr = 0, intret;
  logic [2:0] int_num;
  int checks = 0, failures = 0;

  interrupt_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
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

  task automatic tick(); @(posedge clk); #1; endtask

  initial begin
    logic [5:0] m_pend, m_prev, m_ack; logic m_ie; word_t m_ret;
    tick(); rst = 0;
    chk(ie, 0, "disabled after reset");
    irq = 6'b010100; tick(); irq = 0;
    can_take = 1; #1;
    chk(int_take, 0, "masked while disabled");
    ei = 1; tick(); ei = 0; #1;
    chk(ie, 1, "EI enables");
    chk(int_take, 1, "pending request taken"); chk(int_num, 2, "lowest number first");
    save = 1; ret_addr = 16'h1234; tick(); save = 0; #1;
    chk(irq_ack, 6'b000100, "acknowledge line 2");
    chk(ie, 0, "disabled on acceptance"); chk(intret, 16'h1234, "return address saved");
    chk(int_take, 0, "no nesting");
    tick(); chk(irq_ack, 0, "acknowledge is one cycle");
    reti = 1; tick(); reti = 0; #1;
    chk(ie, 1, "RETI re-enables"); chk(int_take, 1, "second request"); chk(int_num, 4, "line 4");
    di = 1; can_take = 0; tick(); di = 0; #1;
    chk(ie, 0, "DI disables"); can_take = 1; #1; chk(int_take, 0, "masked by DI");
    ei = 1; tick(); ei = 0; #1; chk(int_take, 1, "served after EI");
    can_take = 0; tick();
    // random
    m_pend = dut.pending; m_prev = irq; m_ie = ie; m_ret = intret;
    repeat (5000) begin
      logic e_take; logic [2:0] e_num;
      irq = ($urandom_range(0, 3) == 0) ? 6'($urandom) : irq;
      can_take = 1'($urandom); ei = ($urandom_range(0, 9) == 0); di = ($urandom_range(0, 9) == 0);
      reti = ($urandom_range(0, 9) == 0);
      #1;
      e_take = m_ie && can_take && (m_pend != 0);
      e_num = 0;
      for (int i = 5; i >= 0; i--) if (m_pend[i]) e_num = 3'(i);
      save = e_take || ($urandom_range(0, 19) == 0);
      ret_addr = 16'($urandom);
      #1;
      chk(int_take, e_take, "take");
      if (e_take) chk(int_num, e_num, "priority");
      m_ack = 0;
      for (int i = 0; i < 6; i++)
        if (e_take && e_num == 3'(i)) begin m_pend[i] = 0; m_ack[i] = 1; end
        else if (irq[i] && !m_prev[i]) m_pend[i] = 1;
      m_prev = irq;
      if (save) begin m_ret = ret_addr; m_ie = 0; end
      else if (reti || ei) m_ie = 1;
      else if (di) m_ie = 0;
      tick();
      chk(irq_ack, m_ack, "acknowledge");
      chk(ie, m_ie, "enable flag");
      chk(intret, m_ret, "intret");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

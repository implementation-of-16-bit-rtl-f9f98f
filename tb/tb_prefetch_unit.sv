// tb_prefetch_unit: self-checking test of the four-word prefetch buffer.
// A memory model answers reads combinationally. A fetch model advances the
// PC on about half of its hits (the fetch stage may be stalled), jumps now and then; the bus is randomly taken by
// stage 4, and stores rewrite memory words. Checks: every word delivered
// equals memory at the PC; the unit reads only when the bus is free and only
// inside PC..PC+3; a miss with a free bus is served in the same cycle; and
// after idling at one PC with a free bus the buffer holds four words, so
// four instructions are delivered back to back while the bus is busy.
module tb_prefetch_unit;
  import risc_pkg::*;

  logic clk = 0, rst = 1;
  word_t pc = 0, mem_rdata, pf_addr, st_addr = 0, instr;
  logic bus_busy = 0, pf_re, st_we = 0, hit;
  word_t mem [65536];
  int checks = 0, failures = 0;

  prefetch_unit dut (.*);

  assign mem_rdata = mem[bus_busy ? st_addr : pf_addr];

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
      $display("FAIL %s: got %h expected %h (pc %h)", what, got, exp, pc);
    end
  endtask

  initial begin
    int hits;
    foreach (mem[i]) mem[i] = 16'(i * 7 + 3);
    @(posedge clk); #1 rst = 0;
    // same-cycle service of a miss
    pc = 16'h0100; #1;
    chk(hit, 1, "miss served with free bus"); chk(instr, mem[16'h0100], "bypass word");
    // fill: idle at one PC with a free bus
    repeat (6) @(posedge clk);
    #1 bus_busy = 1; st_addr = 16'h9000;
    hits = 0;
    for (int k = 0; k < 4; k++) begin
      #1;
      chk(hit, 1, $sformatf("buffered word %0d while bus busy", k));
      chk(instr, mem[pc], "buffered word value");
      chk(pf_re, 0, "no prefetch while bus busy");
      @(posedge clk); #1 pc = pc + 1;
    end
    #1 chk(hit, 0, "fifth word not buffered");
    bus_busy = 0;
    // random run
    repeat (5000) begin
      bus_busy = ($urandom_range(0, 2) == 0);
      st_we = bus_busy && ($urandom_range(0, 1) == 0);
      st_addr = pc + 16'($urandom_range(0, 5));
      #1;
      if (pf_re) begin
        chk(bus_busy, 0, "prefetch only on a free bus");
        chk((pf_addr - pc) < 16'd4, 1, "prefetch inside the window");
      end
      if (hit) chk(instr, mem[pc], "delivered word equals memory");
      if (!bus_busy && !hit) begin
        failures++; checks++;
        $display("FAIL miss with a free bus at %h", pc);
      end
      @(posedge clk);
      if (st_we) mem[st_addr] = 16'($urandom);
      #1;
      if ($urandom_range(0, 15) == 0) pc = 16'($urandom);
      else if (hit && $urandom_range(0, 1) == 0) pc = pc + 1;  // the fetch stage may stall
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

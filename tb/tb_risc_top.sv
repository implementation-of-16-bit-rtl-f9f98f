// tb_risc_top: end-to-end test of the 16-bit RISC processor.
//
// A program exercising every instruction kind is assembled into a 64K-word
// memory model (combinational read, write on the rising edge). The same
// program is run by an instruction-level reference model in this testbench,
// which knows nothing of the pipeline. After the processor reaches the final
// self-loop, registers r0..r6, the data memory words written and the output
// port are compared with the reference, and so is the order of all
// register writes to r0..r6 and of all stores, one by one. r7 is reserved for the interrupt
// handler: the six interrupt lines are pulsed at spread-out times while the
// program runs, and r7 must end at 6 with every acknowledge seen once.
// The testbench also checks the four-cycle latency of the first instruction,
// one write-back per clock over a straight-line run, and counts how often
// each pipeline mechanism happened (stall, both forwarding paths, branch
// flush, subroutine return, interrupt return, overflow and
// undefined-instruction exceptions, interrupts, prefetch buffer hits,
// prefetch misses, bus conflicts, output and input port use); one that never
// happened counts as a failure. The processor runs at its default parameters.
module tb_risc_top;
  import risc_pkg::*;
  import tb_isa_pkg::*;
  import tb_ref_pkg::*;

  localparam word_t IN_VALUE  = 16'hBEEF;
  localparam int    MAX_CYC   = 4000;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  word_t      mem_addr, mem_wdata, mem_rdata, out_port;
  logic       mem_re, mem_we;
  logic [5:0] irq = '0, irq_ack;

  word_t mem  [65536];   // processor memory

  int checks = 0, failures = 0, cycle = 0;

  risc_top dut (
    .clk (clk), .rst (rst),
    .mem_addr (mem_addr), .mem_wdata (mem_wdata), .mem_rdata (mem_rdata),
    .mem_re (mem_re), .mem_we (mem_we),
    .in_port (IN_VALUE), .out_port (out_port),
    .irq (irq), .irq_ack (irq_ack)
  );

  always #5 clk = ~clk;

  assign mem_rdata = mem[mem_addr];
  always_ff @(posedge clk) if (mem_we) mem[mem_addr] <= mem_wdata;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------- assembler
  int    loc;
  word_t halt_addr;
  task automatic emit(word_t w); mem[loc] = w; loc++; endtask
  function automatic int off(int from, int to); return to - (from + 1); endfunction

  task automatic assemble();
    int l1, skip1, skip2, sub1, jt, patch_jal, patch_lo, patch_bz, patch_bz2;
    foreach (mem[i]) mem[i] = '0;
    // reset entry
    loc = 16'h0000;
    emit(i_addi(1, 0, 1));                     // r1 = 1 (first instruction)
    emit(i_br(off(16'h0001, 16'h0060)));       // to main
    // interrupt vectors at 0008H + 2k: branch to the shared handler
    for (int k = 0; k < 6; k++) begin
      loc = 16'h0008 + 2 * k;
      emit(i_br(off(loc, 16'h0040)));
    end
    loc = 16'h0040;                            // interrupt handler
    emit(i_addi(7, 7, 1));
    emit(i_reti());
    loc = 16'h0048;                            // overflow handler body
    emit(i_addi(6, 6, 16));
    emit(i_reti());
    loc = 16'hFFFF;                            // overflow vector
    emit(i_br(off(16'hFFFF, 16'h0048) & 16'hFF));
    loc = 16'hFFF0;                            // undefined-instruction vector
    emit(i_addi(6, 6, 1));
    emit(i_reti());

    loc = 16'h0060;                            // main
    emit(i_ei());
    emit(i_mvi(2, 8'h34, 1'b0));
    emit(i_mvi(2, 8'h12, 1'b1));               // uses r2 of the previous instruction
    emit(i_r(F_ADD, 3, 2, 1));
    emit(i_r(F_SUB, 4, 3, 2));
    emit(i_r(F_AND, 5, 3, 2));
    emit(i_r(F_OR,  5, 5, 4));
    emit(i_r(F_XOR, 3, 5, 2));
    emit(i_r(F_NOR, 4, 4, 0));
    emit(i_r(F_NOT, 5, 5, 0));
    emit(i_shift(SH_SLL, 3, 2, 4));
    emit(i_shift(SH_SRA, 4, 4, 1));
    emit(i_shift(SH_SRL, 5, 5, 3));
    emit(i_shift(SH_SLA, 0, 1, 15));           // r0 = 8000H
    emit(i_mvi(5, 8'h20, 1'b1));               // data base 20xxH
    emit(i_store(2, 5, 0));
    emit(i_store(3, 5, 1));
    emit(i_load(4, 5, 0));
    emit(i_r(F_ADD, 4, 4, 1));                 // load-use
    emit(i_load(3, 5, 1));
    emit(i_store(3, 5, 2));                    // load-use through store data
    emit(i_in(2));
    emit(i_out(2));                            // input-use
    emit(i_addi(3, 0, -1));                    // 8000H + FFFFH: overflow
    emit(i_addi(3, 1, 5));                     // r3 = 6
    emit(16'hF000);                            // undefined
    l1 = loc;
    emit(i_addi(3, 3, -1));
    emit(i_r(F_ADD, 4, 4, 3));
    emit(i_bnz(3, off(loc, l1)));
    patch_bz = loc; emit('0);                  // BZ r3, skip1 (taken)
    emit(i_addi(4, 4, 7));                     // flushed
    skip1 = loc;
    patch_bz2 = loc; emit('0);                 // BZ r1, skip2 (not taken)
    emit(i_addi(4, 4, 3));
    skip2 = loc;
    patch_jal = loc; emit('0);                 // JAL r3, sub1
    emit(i_out(4));
    patch_lo = loc; emit('0);                  // MVI r2, low byte of jt
    emit(i_mvi(2, 8'h00, 1'b1));
    emit(i_jmp(2));
    emit(i_addi(4, 4, 1));                     // flushed
    emit(i_addi(4, 4, 1));                     // skipped
    jt = loc;
    emit(i_store(4, 5, 3));
    // straight line of independent writes, for the throughput check
    for (int k = 0; k < 20; k++) emit(i_addi(k % 2 == 0 ? 1 : 2, k % 2 == 0 ? 1 : 2, 1));
    emit(i_out(1));
    halt_addr = word_t'(loc);
    emit(i_br(-1));                            // halt: branch to itself
    sub1 = loc;
    emit(i_addi(4, 4, 31));
    emit(i_rjal(3));
    mem[patch_bz]  = i_bz(3, off(patch_bz, skip1));
    mem[patch_bz2] = i_bz(1, off(patch_bz2, skip2 + 1) );
    mem[patch_jal] = i_jal(3, off(patch_jal, sub1));
    mem[patch_lo]  = i_mvi(2, 8'(jt), 1'b0);
  endtask

  // ------------------------------------------------- reference model
  tb_ref_pkg::ref_cpu rc = new();

  task automatic reference();
    foreach (mem[i]) rc.mem[i] = mem[i];
    if (!rc.run(halt_addr, IN_VALUE, 10000)) begin
      failures++;
      $display("FAIL reference model did not reach the halt address");
    end
  endtask

  // --------------------------------------------------- mechanism counters
  int n_stall, n_fwd_exmem, n_fwd_memwb, n_branch, n_ret, n_reti, n_ovf, n_und;
  int n_int, n_pf_buf, n_pf_miss, n_bus, n_out, n_in;
  int ack_seen [6];
  int first_wb = -1, run = 0, best_run = 0, n_commit = 0;

  always @(posedge clk) if (!rst) begin
    cycle++;
    if (dut.u_hazard.stall) n_stall++;
    if (dut.idex.valid && (dut.fwd_a == 2'd1 || dut.fwd_b == 2'd1) && dut.idex.ctrl.use1) n_fwd_exmem++;
    if (dut.idex.valid && (dut.fwd_a == 2'd2 || dut.fwd_b == 2'd2) && dut.idex.ctrl.use1) n_fwd_memwb++;
    if (dut.opc == OPC_BR)   n_branch++;
    if (dut.opc == OPC_RET)  n_ret++;
    if (dut.opc == OPC_RETI) n_reti++;
    if (dut.opc == OPC_OVF)  n_ovf++;
    if (dut.opc == OPC_UND)  n_und++;
    if (dut.int_take)        n_int++;
    if (dut.u_prefetch.buf_hit) n_pf_buf++;
    if (!dut.pf_hit)         n_pf_miss++;
    if ((dut.d_re || dut.d_we) && dut.u_prefetch.need) n_bus++;
    if (dut.exmem.valid && dut.exmem.output_enable) n_out++;
    if (dut.exmem.valid && dut.exmem.memsel == MS_INPUT) n_in++;
    for (int k = 0; k < 6; k++) if (irq_ack[k]) ack_seen[k]++;
    if (dut.memwb.rf_enable && dut.memwb.rf_writereg != 3'd7) begin
      n_commit++; checks++;
      if (rc.wb_q.size() == 0) begin
        failures++; $display("FAIL extra register write r%0d=%h", dut.memwb.rf_writereg, dut.memwb.rf_writedata);
      end else begin
        logic [18:0] e;
        e = rc.wb_q.pop_front();
        if (e !== {dut.memwb.rf_writereg, dut.memwb.rf_writedata}) begin
          failures++; $display("FAIL write %0d: got r%0d=%h expected r%0d=%h", n_commit,
                               dut.memwb.rf_writereg, dut.memwb.rf_writedata, e[18:16], e[15:0]);
        end
      end
    end
    if (mem_we) begin
      checks++;
      if (rc.st_q.size() == 0) begin
        failures++; $display("FAIL extra store");
      end else begin
        logic [31:0] e;
        e = rc.st_q.pop_front();
        if (e !== {mem_addr, mem_wdata}) begin
          failures++; $display("FAIL store: got %h expected %h", {mem_addr, mem_wdata}, e);
        end
      end
    end
    if (dut.memwb.rf_enable) begin
      if (first_wb < 0) first_wb = cycle - 1;  // register loaded one edge earlier
      run++;
      if (run > best_run) best_run = run;
    end else run = 0;
  end

  // interrupt pulses at spread-out cycles: three while the main program
  // runs, three once it sits in the final loop
  localparam int IRQ_GAP [6] = '{23, 17, 19, 150, 13, 11};
  logic irq_done = 1'b0;
  always @(posedge clk) if (dut.pcvalue == halt_addr - 21) $display("straight line at cycle %0d", cycle);
  initial begin
    wait (!rst);
    for (int k = 0; k < 6; k++) begin
      repeat (IRQ_GAP[k]) @(posedge clk);
      irq[k] <= 1'b1;
      repeat (2) @(posedge clk);
      irq[k] <= 1'b0;
    end
    irq_done = 1'b1;
  end

  // watchdog
  initial begin
    repeat (MAX_CYC + 500) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int stable;
    assemble();
    reference();
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    stable = 0;
    while (cycle < MAX_CYC && stable < 40) begin
      @(posedge clk);
      if (irq_done && dut.pcvalue >= halt_addr && dut.pcvalue <= halt_addr + 2 && dut.u_interrupt.pending == '0 && dut.u_interrupt.ie) stable++;
      else stable = 0;
    end
    check("halt reached", stable, 40);
    // the first instruction (ADDI r1) reaches the write-back register after
    // four clocks: IF/ID, ID/EX, EX/MEM, MEM/WB
    check("first instruction latency", first_wb, 4);
    check("one write-back per clock over the straight line", best_run >= 20, 1);
    for (int i = 0; i < 7; i++)
      check($sformatf("r%0d", i), dut.u_decode.u_rf.regs[i], rc.rr[i]);
    check("r7 = interrupts served", dut.u_decode.u_rf.regs[7], 6);
    for (int i = 0; i < 6; i++) check($sformatf("ack %0d once", i), ack_seen[i], 1);
    for (int a = 16'h2000; a < 16'h2200; a++)
      if (rc.mem[a] != mem[a] || rc.mem[a] != 0) check($sformatf("mem[%h]", a), mem[a], rc.mem[a]);
    check("out_port", out_port, rc.rout);
    check("every reference register write committed", rc.wb_q.size(), 0);
    check("every reference store performed", rc.st_q.size(), 0);
    $display("mechanisms: stall=%0d fwd_exmem=%0d fwd_memwb=%0d branch=%0d ret=%0d reti=%0d ovf=%0d und=%0d int=%0d pf_buffer_hit=%0d pf_miss=%0d bus_conflict=%0d out=%0d in=%0d",
             n_stall, n_fwd_exmem, n_fwd_memwb, n_branch, n_ret, n_reti, n_ovf, n_und, n_int, n_pf_buf, n_pf_miss, n_bus, n_out, n_in);
    check("stall happened",        n_stall > 0, 1);
    check("EX/MEM forward happened", n_fwd_exmem > 0, 1);
    check("MEM/WB forward happened", n_fwd_memwb > 0, 1);
    check("branch flush happened", n_branch > 0, 1);
    check("RJAL return happened",  n_ret > 0, 1);
    check("RETI happened",         n_reti > 0, 1);
    check("overflow exception happened", n_ovf, 1);
    check("undefined exception happened", n_und, 1);
    check("interrupts taken",      n_int, 6);
    check("prefetch buffer hit happened", n_pf_buf > 0, 1);
    check("prefetch miss happened", n_pf_miss > 0, 1);
    check("bus conflict happened", n_bus > 0, 1);
    check("output port written",   n_out > 0, 1);
    check("input port read",       n_in > 0, 1);
    $display("cycles=%0d best_run=%0d", cycle, best_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

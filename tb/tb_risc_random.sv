// tb_risc_random: random-program stress test of the 16-bit RISC processor.
//
// Builds N_PROG random programs of PROG_LEN instructions each. The mix covers
// register ALU operations, ADDI, shifts, move-immediates, loads and stores
// around a data area addressed through r0, IN and OUT, forward conditional
// and unconditional branches, JAL, register jumps and RJAL returns whose
// target register is built by the two instructions just before, and
// undefined instructions. Overflow and undefined-instruction handlers count
// into r7 and return with RETI. Dependences are dense: sources are drawn from
// all eight registers, so forwarding from both later stages, load-use stalls
// and branches on just-written registers all occur. Each program ends in a
// self-loop. The processor is reset, runs the program, and every register
// write and every store is compared in order with the instruction-level
// reference model; at the end the registers and the output port are
// compared. Mechanisms are counted as in tb_risc_top and must all occur.
module tb_risc_random;
  import risc_pkg::*;
  import tb_isa_pkg::*;
  import tb_ref_pkg::*;

  localparam int    N_PROG   = 40;
  localparam int    PROG_LEN = 300;
  localparam word_t IN_VALUE = 16'h5A5A;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  word_t      mem_addr, mem_wdata, mem_rdata, out_port;
  logic       mem_re, mem_we;
  logic [5:0] irq_ack;
  word_t      mem [65536];
  word_t      halt_addr;
  int checks = 0, failures = 0;

  tb_ref_pkg::ref_cpu rc = new();

  risc_top dut (
    .clk (clk), .rst (rst),
    .mem_addr (mem_addr), .mem_wdata (mem_wdata), .mem_rdata (mem_rdata),
    .mem_re (mem_re), .mem_we (mem_we),
    .in_port (IN_VALUE), .out_port (out_port),
    .irq (6'b0), .irq_ack (irq_ack)
  );

  always #5 clk = ~clk;

  assign mem_rdata = mem[mem_addr];
  always_ff @(posedge clk) if (mem_we) mem[mem_addr] <= mem_wdata;

  initial begin
    repeat (N_PROG * PROG_LEN * 12) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------ program builder
  int loc;
  task automatic emit(word_t w); mem[loc] = w; loc++; endtask
  function automatic reg_t rdst(); return reg_t'($urandom_range(1, 6)); endfunction
  function automatic reg_t rsrc(); return reg_t'($urandom_range(0, 7)); endfunction

  task automatic build();
    int last;
    foreach (mem[i]) mem[i] = '0;
    for (int a = 16'h3FE0; a < 16'h4020; a++) mem[a] = 16'($urandom);
    loc = 0;
    emit(i_mvi(0, 8'h40, 1'b1));                 // r0 = 4000H: data base
    emit(i_br(16'h0060 - 2));                   // to the program
    loc = 16'h0048; emit(i_addi(7, 7, 1)); emit(i_reti());
    loc = 16'hFFF0; emit(i_addi(7, 7, 1)); emit(i_reti());
    loc = 16'hFFFF; emit(i_br(16'h0048));        // target 0000H + 48H
    loc = 16'h0060;
    last = 16'h0060 + PROG_LEN;                  // halt address
    while (loc < last - 8) begin
      int k, fwd;
      k = $urandom_range(0, 99);
      fwd = $urandom_range(0, 3);
      if (k < 28)      emit(i_r(3'($urandom_range(1, 7)), rdst(), rsrc(), rsrc()));
      else if (k < 36) emit(i_addi(rdst(), rsrc(), $urandom_range(0, 63) - 32));
      else if (k < 44) emit(i_shift(2'($urandom), rdst(), rsrc(), $urandom_range(0, 15)));
      else if (k < 50) emit(i_mvi(rdst(), 8'($urandom), 1'($urandom)));
      else if (k < 60) emit(i_load(rdst(), 0, $urandom_range(0, 63) - 32));
      else if (k < 69) emit(i_store(rsrc(), 0, $urandom_range(0, 63) - 32));
      else if (k < 72) emit(i_in(rdst()));
      else if (k < 75) emit(i_out(rsrc()));
      else if (k < 89) begin                     // relative control transfer
        if (k < 83)      emit($urandom_range(0, 1) ? i_bz(rsrc(), fwd) : i_bnz(rsrc(), fwd));
        else if (k < 86) emit(i_br(fwd));
        else             emit(i_jal(rdst(), fwd));
        // the words that may be skipped are single ALU operations, so a
        // target never lands inside a register-jump sequence
        for (int j = 0; j < fwd; j++) emit(i_r(3'($urandom_range(1, 7)), rdst(), rsrc(), rsrc()));
      end
      else if (k < 97) begin                     // register jump or return
        reg_t r; word_t t;
        r = rdst();
        t = word_t'(loc + 3 + fwd);
        emit(i_mvi(r, t[7:0], 1'b0));
        emit(i_mvi(r, t[15:8], 1'b1));
        emit($urandom_range(0, 1) ? i_jmp(r) : i_rjal(r));
        for (int j = 0; j < fwd; j++) emit(i_r(3'($urandom_range(1, 7)), rdst(), rsrc(), rsrc()));
      end
      else             emit(16'hF000);
    end
    while (loc < last) emit(i_addi(rdst(), rsrc(), 3));
    halt_addr = word_t'(last);
    emit(i_br(-1));
  endtask

  // ------------------------------------------------------ commit checking
  int n_stall, n_fwd_exmem, n_fwd_memwb, n_branch, n_ret, n_reti, n_ovf, n_und;
  int n_pf_buf, n_bus, n_commit;

  always @(posedge clk) if (!rst) begin
    if (dut.u_hazard.stall) n_stall++;
    if (dut.idex.valid && (dut.fwd_a == 2'd1 || dut.fwd_b == 2'd1)) n_fwd_exmem++;
    if (dut.idex.valid && (dut.fwd_a == 2'd2 || dut.fwd_b == 2'd2)) n_fwd_memwb++;
    if (dut.opc == OPC_BR)   n_branch++;
    if (dut.opc == OPC_RET)  n_ret++;
    if (dut.opc == OPC_RETI) n_reti++;
    if (dut.opc == OPC_OVF)  n_ovf++;
    if (dut.opc == OPC_UND)  n_und++;
    if (dut.u_prefetch.buf_hit) n_pf_buf++;
    if ((dut.d_re || dut.d_we) && dut.u_prefetch.need) n_bus++;
    if (dut.memwb.rf_enable) begin
      n_commit++;
      if (rc.wb_q.size() == 0) check("unexpected register write", 1, 0);
      else check($sformatf("register write %0d", n_commit),
                 {dut.memwb.rf_writereg, dut.memwb.rf_writedata}, 32'(rc.wb_q.pop_front()));
    end
    if (mem_we) begin
      if (rc.st_q.size() == 0) check("unexpected store", 1, 0);
      else check("store", {mem_addr, mem_wdata}, rc.st_q.pop_front());
    end
  end

  initial begin
    for (int p = 0; p < N_PROG; p++) begin
      int stable, cyc;
      build();
      foreach (mem[i]) rc.mem[i] = mem[i];
      if (!rc.run(halt_addr, IN_VALUE, 100000)) check("reference reaches halt", 0, 1);
      rst <= 1'b1;
      repeat (2) @(posedge clk);
      rst <= 1'b0;
      stable = 0; cyc = 0;
      while (stable < 12 && cyc < PROG_LEN * 10) begin
        @(posedge clk);
        cyc++;
        if (dut.pcvalue >= halt_addr && dut.pcvalue <= halt_addr + 2) stable++;
        else stable = 0;
      end
      check($sformatf("program %0d halts", p), stable, 12);
      check("all reference writes committed", rc.wb_q.size(), 0);
      check("all reference stores performed", rc.st_q.size(), 0);
      for (int i = 0; i < 8; i++)
        check($sformatf("program %0d r%0d", p, i), dut.u_decode.u_rf.regs[i], rc.rr[i]);
      check("out_port", out_port, rc.rout);
    end
    $display("mechanisms: stall=%0d fwd_exmem=%0d fwd_memwb=%0d branch=%0d ret=%0d reti=%0d ovf=%0d und=%0d pf_buffer_hit=%0d bus_conflict=%0d commits=%0d",
             n_stall, n_fwd_exmem, n_fwd_memwb, n_branch, n_ret, n_reti, n_ovf, n_und, n_pf_buf, n_bus, n_commit);
    check("stall happened",           n_stall > 0, 1);
    check("EX/MEM forward happened",  n_fwd_exmem > 0, 1);
    check("MEM/WB forward happened",  n_fwd_memwb > 0, 1);
    check("branch happened",          n_branch > 0, 1);
    check("RJAL return happened",     n_ret > 0, 1);
    check("RETI happened",            n_reti > 0, 1);
    check("overflow happened",        n_ovf > 0, 1);
    check("undefined happened",       n_und > 0, 1);
    check("prefetch buffer hit",      n_pf_buf > 0, 1);
    check("bus conflict happened",    n_bus > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_memwb_stage: self-checking test of the memory / IO write-back stage.
// Replays the reference design's stage-4 waveform values (input port 5000H,
// memory data 6000H, execution result 7000H): memsel 0, 1, 2 write back
// 6000H, 7000H, 5000H with the write-back register passed along, and
// output_enable loads 7000H into the output port, which then holds. Random
// cycles then check the bus signals for loads and stores, empty slots, the
// write-back register and the output port against a model.
module tb_memwb_stage;
  import risc_pkg::*;

  logic clk = 0, rst = 1;
  exmem_t exmem = '0;
  word_t in_port = 16'h5000, mem_rdata = 16'h6000;
  word_t mem_addr, mem_wdata, out_port;
  logic mem_re, mem_we;
  memwb_t memwb;
  int checks = 0, failures = 0;

  memwb_stage dut (.*);

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

  task automatic fig(mem_sel_e ms, reg_t wb, logic oe, word_t exp);
    exmem = '0;
    exmem.valid = 1; exmem.rf_we = 1; exmem.result = 16'h7000;
    exmem.memsel = ms; exmem.wb = wb; exmem.output_enable = oe;
    @(posedge clk); #1;
    chk(memwb.rf_writedata, exp, $sformatf("memsel %0d write-back data", ms));
    chk(memwb.rf_writereg, wb, "write-back register");
    chk(memwb.rf_enable, 1, "write enable");
  endtask

  initial begin
    word_t m_out;
    @(posedge clk); #1 rst = 0;
    chk(out_port, 0, "output port after reset");
    fig(MS_MEM, 0, 0, 16'h6000);
    fig(MS_RESULT, 3, 0, 16'h7000);
    chk(out_port, 0, "output port untouched");
    fig(MS_INPUT, 4, 1, 16'h5000);
    chk(out_port, 16'h7000, "output port loaded");
    fig(MS_MEM, 1, 0, 16'h6000);
    chk(out_port, 16'h7000, "output port holds");
    m_out = out_port;
    repeat (3000) begin
      exmem_t e; word_t wd;
      e = exmem_t'({$urandom, $urandom, $urandom});
      e.memsel = mem_sel_e'($urandom_range(0, 2));
      exmem = e; in_port = 16'($urandom); mem_rdata = 16'($urandom);
      #1;
      chk(mem_addr, e.result, "address lines");
      chk(mem_wdata, e.readtwo, "store data");
      chk(mem_re, e.valid & e.mem_re, "memory read");
      chk(mem_we, e.valid & e.mem_we, "memory write");
      wd = (e.memsel == MS_MEM) ? mem_rdata : (e.memsel == MS_INPUT) ? in_port : e.result;
      if (e.valid && e.output_enable) m_out = e.result;
      @(posedge clk); #1;
      chk(memwb.rf_enable, e.valid & e.rf_we, "random write enable");
      chk(memwb.rf_writedata, wd, "random write data");
      chk(memwb.rf_writereg, e.wb, "random write register");
      chk(out_port, m_out, "random output port");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

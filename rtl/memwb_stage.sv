// memwb_stage: stage 4 of the pipeline - memory / IO access and write back.
//
// A LOAD or STORE in the execution stage register drives the external memory
// bus: the address is the execution result, the store data is the forwarded
// source 2, and read data is taken in the same cycle. memsel selects what is
// written back: data read from memory (0), the execution result (1) or the
// input port (2). When output_enable is high the execution result is loaded
// into the output port register. The write-back register (MEM/WB) holds the
// data, the register code and the enable that drive the register file write
// port. The three write-back sources and the registered output port follow
// the reference design's stage-4 waveforms; the memsel code values are read
// from them, the output port reset value 0000H is this design's own.
//
// Timing: MEM/WB and the output port load on the rising edge; the bus outputs
// are combinational from EX/MEM.
module memwb_stage
  import risc_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  exmem_t exmem,
  input  word_t  in_port,
  input  word_t  mem_rdata,
  output word_t  mem_addr,
  output word_t  mem_wdata,
  output logic   mem_re,
  output logic   mem_we,
  output word_t  out_port,
  output memwb_t memwb
);

  word_t wdata;

  assign mem_addr  = exmem.result;
  assign mem_wdata = exmem.readtwo;
  assign mem_re    = exmem.valid && exmem.mem_re;
  assign mem_we    = exmem.valid && exmem.mem_we;

  always_comb begin
    unique case (exmem.memsel)
      MS_MEM:   wdata = mem_rdata;
      MS_INPUT: wdata = in_port;
      default:  wdata = exmem.result;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      memwb    <= '0;
      out_port <= '0;
    end else begin
      memwb.rf_enable    <= exmem.valid && exmem.rf_we;
      memwb.rf_writereg  <= exmem.wb;
      memwb.rf_writedata <= wdata;
      if (exmem.valid && exmem.output_enable) out_port <= exmem.result;
    end
  end

endmodule

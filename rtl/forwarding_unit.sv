// forwarding_unit: execution forwarding for the 16-bit RISC pipeline.
//
// For each of the two operands of the instruction in the execution stage it
// compares the source register with the destinations of the two older
// instructions still in flight: the one in the execution stage register
// (EX/MEM) and the one in the write-back register (MEM/WB). The nearer match
// wins. An EX/MEM entry forwards only when its result is final there
// (exmem_we is low for LOAD and IN, whose value appears in stage 4; the hazard
// detection unit stalls those cases). Forwarding the previous result to the
// execution stage follows the reference design; the priority rule is this
// design's own. Outputs: 0 register file value, 1 EX/MEM, 2 MEM/WB.
// Purely combinational.
module forwarding_unit
  import risc_pkg::*;
(
  input  reg_t       ex_rs1,
  input  reg_t       ex_rs2,
  input  logic       exmem_we,
  input  reg_t       exmem_wb,
  input  logic       memwb_we,
  input  reg_t       memwb_wb,
  output logic [1:0] fwd_a,
  output logic [1:0] fwd_b
);

  function automatic logic [1:0] pick(reg_t rs);
    if (exmem_we && exmem_wb == rs)      return 2'd1;
    else if (memwb_we && memwb_wb == rs) return 2'd2;
    else                                 return 2'd0;
  endfunction

  assign fwd_a = pick(ex_rs1);
  assign fwd_b = pick(ex_rs2);

endmodule

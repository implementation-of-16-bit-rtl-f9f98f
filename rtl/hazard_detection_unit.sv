// hazard_detection_unit: data-hazard interlock of the 16-bit RISC pipeline.
//
// A LOAD or IN instruction has its value only in stage 4, one cycle too late
// for forwarding to the instruction right behind it. When the instruction in
// the execution stage is such a late producer and the instruction in decode
// reads its destination, the unit stalls for one cycle: the PC and IF/ID
// hold and a bubble enters ID/EX. A redirect (branch, return, exception,
// interrupt) overrides the stall, since it flushes the waiting instruction
// anyway. That stalls are used only where forwarding cannot help is this
// design's reading of the reference design. Purely combinational.
module hazard_detection_unit
  import risc_pkg::*;
(
  input  logic id_valid,
  input  reg_t id_rs1,
  input  reg_t id_rs2,
  input  logic id_use1,
  input  logic id_use2,
  input  logic ex_late,      // EX instruction writes ex_wb from stage 4
  input  reg_t ex_wb,
  input  logic redirect,
  output logic stall,
  output logic pc_enable,
  output logic ifid_enable,
  output logic idex_bubble
);

  always_comb begin
    stall = id_valid && ex_late &&
            ((id_use1 && id_rs1 == ex_wb) || (id_use2 && id_rs2 == ex_wb));
    pc_enable   = !stall || redirect;
    ifid_enable = !stall;
    idex_bubble = stall;
  end

endmodule

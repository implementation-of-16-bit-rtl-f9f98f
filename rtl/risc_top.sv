// risc_top: 16-bit RISC processor with a four-stage pipeline.
//
// Stages: instruction fetch (PC, selector, IF/ID register), instruction
// decode (register file of eight 16-bit registers, ID/EX register),
// execution (ALU / shift / move-immediate, branch target, EX/MEM register)
// and memory / IO write back (load, store, input and output port, MEM/WB
// register that writes the register file). Around them: the hardwired
// control unit, the hazard detection unit (one-cycle stall after LOAD or IN),
// the forwarding unit (EX/MEM and MEM/WB results to the execution stage), a
// four-word prefetch buffer, and the interrupt unit with six vectored
// interrupts plus overflow and undefined-instruction exceptions. Control
// transfers resolve in the execution stage and flush the two younger
// instructions. One external memory bus is shared: stage 4 has it when it
// loads or stores, otherwise the prefetch unit uses it. With no stalls one
// instruction completes per clock.
//
// Interface: a single external memory port with separate read and write data
// buses; the memory answers a read combinationally in the same cycle and
// writes on the rising edge when mem_we is high. in_port is sampled when an
// IN instruction is in stage 4; out_port is a register. irq lines request an
// interrupt on a rising edge; irq_ack pulses for one cycle when it is taken.
// Reset is synchronous and active high; execution starts at 0000H with
// interrupts disabled.
//
// The block structure, the stage contents, the four-word prefetch depth, six
// interrupts, the PC-select codes and exception vectors follow the reference
// design. The instruction encoding, bus timing, reset behaviour, interrupt
// priorities and the exact hazard rules are this design's own (see
// risc_pkg and the module headers).
module risc_top
  import risc_pkg::*;
#(
  parameter int unsigned PF_DEPTH = 4,
  parameter int unsigned N_IRQ    = 6
) (
  input  logic             clk,
  input  logic             rst,
  output word_t            mem_addr,
  output word_t            mem_wdata,
  input  word_t            mem_rdata,
  output logic             mem_re,
  output logic             mem_we,
  input  word_t            in_port,
  output word_t            out_port,
  input  logic [N_IRQ-1:0] irq,
  output logic [N_IRQ-1:0] irq_ack
);

  // pipeline registers
  ifid_t  ifid;
  idex_t  idex;
  exmem_t exmem;
  memwb_t memwb;

  // fetch
  word_t      pcvalue, pc_increment, pf_instr, pf_addr;
  logic       pf_hit, pf_re;
  // control
  ctrl_t      id_ctrl;
  reg_sel_e   regselect;
  logic [3:0] opc;
  logic       ifid_flush, idex_flush, squash, save, exc, ex_ei, ex_di, ex_reti;
  word_t      ret_addr;
  // hazards and forwarding
  reg_t       id_rs1, id_rs2;
  logic       stall, pc_enable, ifid_enable, idex_bubble;
  logic [1:0] fwd_a, fwd_b;
  // execute
  word_t      readone, bu_pc;
  logic       zero, overflow;
  // memory stage
  word_t      d_addr, d_wdata;
  logic       d_re, d_we;
  // interrupts
  logic       int_take, ie;
  logic [2:0] int_num;
  word_t      intret;

  fetch_stage u_fetch (
    .clk (clk), .rst (rst),
    .opc (opc), .bu_pc (bu_pc), .readone (readone), .intret (intret),
    .instruction (pf_instr), .instr_valid (pf_hit),
    .pc_enable (pc_enable), .ifid_enable (ifid_enable), .ifid_flush (ifid_flush),
    .pcvalue (pcvalue), .pc_increment (pc_increment), .ifid (ifid)
  );

  prefetch_unit #(.DEPTH (PF_DEPTH)) u_prefetch (
    .clk (clk), .rst (rst),
    .pc (pcvalue), .bus_busy (d_re || d_we), .mem_rdata (mem_rdata),
    .pf_addr (pf_addr), .pf_re (pf_re),
    .st_we (d_we), .st_addr (d_addr),
    .instr (pf_instr), .hit (pf_hit)
  );

  control_unit u_control (
    .instr (ifid.instr), .ctrl (id_ctrl), .regselect (regselect),
    .ex_valid (idex.valid), .ex_ctrl (idex.ctrl), .ex_pc1 (idex.pc1),
    .zero (zero), .overflow (overflow),
    .int_take (int_take), .int_num (int_num),
    .opc (opc), .ifid_flush (ifid_flush), .idex_flush (idex_flush),
    .squash (squash), .save (save), .ret_addr (ret_addr), .exc (exc),
    .ex_ei (ex_ei), .ex_di (ex_di), .ex_reti (ex_reti)
  );

  hazard_detection_unit u_hazard (
    .id_valid (ifid.valid), .id_rs1 (id_rs1), .id_rs2 (id_rs2),
    .id_use1 (id_ctrl.use1), .id_use2 (id_ctrl.use2),
    .ex_late (idex.valid && idex.ctrl.rf_we && idex.ctrl.memsel != MS_RESULT),
    .ex_wb (idex.wb), .redirect (ifid_flush),
    .stall (stall), .pc_enable (pc_enable), .ifid_enable (ifid_enable),
    .idex_bubble (idex_bubble)
  );

  decode_stage u_decode (
    .clk (clk), .rst (rst),
    .ifid (ifid), .ctrl (id_ctrl), .regselect (regselect),
    .bubble (idex_flush || idex_bubble),
    .rf_enable (memwb.rf_enable), .rf_writereg (memwb.rf_writereg),
    .rf_writedata (memwb.rf_writedata),
    .rs1 (id_rs1), .rs2 (id_rs2), .idex (idex)
  );

  forwarding_unit u_forward (
    .ex_rs1 (idex.rs1), .ex_rs2 (idex.rs2),
    .exmem_we (exmem.valid && exmem.rf_we && exmem.memsel == MS_RESULT),
    .exmem_wb (exmem.wb),
    .memwb_we (memwb.rf_enable), .memwb_wb (memwb.rf_writereg),
    .fwd_a (fwd_a), .fwd_b (fwd_b)
  );

  execute_stage u_execute (
    .clk (clk), .rst (rst),
    .idex (idex), .fwd_a (fwd_a), .fwd_b (fwd_b),
    .exmem_fwd (exmem.result), .memwb_fwd (memwb.rf_writedata),
    .squash (squash),
    .readone (readone), .bu_pc (bu_pc), .zero (zero), .overflow (overflow),
    .exmem (exmem)
  );

  memwb_stage u_memwb (
    .clk (clk), .rst (rst),
    .exmem (exmem), .in_port (in_port), .mem_rdata (mem_rdata),
    .mem_addr (d_addr), .mem_wdata (d_wdata), .mem_re (d_re), .mem_we (d_we),
    .out_port (out_port), .memwb (memwb)
  );

  interrupt_unit #(.N_IRQ (N_IRQ)) u_interrupt (
    .clk (clk), .rst (rst),
    .irq (irq), .can_take (idex.valid && !exc),
    .ei (ex_ei), .di (ex_di), .reti (ex_reti),
    .save (save), .ret_addr (ret_addr),
    .int_take (int_take), .int_num (int_num), .irq_ack (irq_ack),
    .intret (intret), .ie (ie)
  );

  // shared external memory bus: stage 4 first, prefetch otherwise
  assign mem_addr  = (d_re || d_we) ? d_addr : pf_addr;
  assign mem_wdata = d_wdata;
  assign mem_re    = d_re || pf_re;
  assign mem_we    = d_we;

  // the prefetcher never drives the bus while stage 4 owns it
  a_bus_owner : assert property (@(posedge clk) disable iff (rst) !(pf_re && (d_re || d_we)));
  // a load and a store never share a cycle
  a_one_access : assert property (@(posedge clk) disable iff (rst) !(d_re && d_we));

endmodule

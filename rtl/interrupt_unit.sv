// interrupt_unit: vectored external interrupts and the return address.
//
// A rising edge on any of the N_IRQ request lines sets its pending bit. When
// interrupts are enabled and the pipeline can accept one (a valid
// instruction in the execution stage and no exception), the lowest-numbered
// pending request is accepted: int_take rises for one cycle with its number,
// the matching acknowledge line pulses, the pending bit clears and interrupts
// are disabled. Whenever the control unit takes an interrupt or exception
// (save), the return address is stored in intret and interrupts are disabled;
// RETI re-enables them and EI / DI set and clear the enable flag. Interrupts
// are disabled after reset.
//
// Six vectored interrupt inputs with acknowledge outputs and a
// return-from-interrupt address follow the reference design; priority order,
// the latching, the enable flag and its reset value are this design's own.
module interrupt_unit
  import risc_pkg::*;
#(
  parameter int unsigned N_IRQ = 6
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [N_IRQ-1:0] irq,
  input  logic             can_take,
  input  logic             ei,
  input  logic             di,
  input  logic             reti,
  input  logic             save,
  input  word_t            ret_addr,
  output logic             int_take,
  output logic [2:0]       int_num,
  output logic [N_IRQ-1:0] irq_ack,
  output word_t            intret,
  output logic             ie
);

  logic [N_IRQ-1:0] pending, irq_q, req;

  assign req = pending;

  always_comb begin
    int_num = '0;
    for (int i = N_IRQ - 1; i >= 0; i--)
      if (req[i]) int_num = 3'(i);
  end

  assign int_take = ie && can_take && (req != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      pending <= '0;
      irq_q   <= '0;
      irq_ack <= '0;
      intret  <= '0;
      ie      <= 1'b0;
    end else begin
      irq_ack <= '0;
      irq_q   <= irq;
      for (int i = 0; i < N_IRQ; i++)
        if (int_take && int_num == 3'(i)) pending[i] <= 1'b0;
        else if (irq[i] && !irq_q[i])    pending[i] <= 1'b1;
      if (int_take) begin
        irq_ack[int_num] <= 1'b1;
      end
      if (save) begin
        intret <= ret_addr;
        ie     <= 1'b0;
      end else if (reti || ei) ie <= 1'b1;
      else if (di)             ie <= 1'b0;
    end
  end

endmodule

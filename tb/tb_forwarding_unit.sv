// tb_forwarding_unit: exhaustive check of the forwarding selects.
// Every combination of source registers, destination registers and write
// enables is compared with the rule: the EX/MEM result if it writes the
// source, else the MEM/WB result if it writes it, else the register file.
module tb_forwarding_unit;
  import risc_pkg::*;

  reg_t ex_rs1, ex_rs2, exmem_wb, memwb_wb;
  logic exmem_we, memwb_we;
  logic [1:0] fwd_a, fwd_b;
  int checks = 0, failures = 0;

  forwarding_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] model(reg_t rs);
    if (exmem_we && exmem_wb == rs) return 1;
    if (memwb_we && memwb_wb == rs) return 2;
    return 0;
  endfunction

  initial begin
    for (int v = 0; v < (1 << 14); v++) begin
      {ex_rs1, ex_rs2, exmem_wb, memwb_wb, exmem_we, memwb_we} = 14'(v);
      #1;
      checks++;
      if (fwd_a !== model(ex_rs1) || fwd_b !== model(ex_rs2)) begin
        failures++;
        if (failures < 10) $display("FAIL case %h: got %0d/%0d", v, fwd_a, fwd_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

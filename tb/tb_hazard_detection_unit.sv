// tb_hazard_detection_unit: exhaustive check of the load/input-use interlock.
// For every combination of decode-stage sources, their use flags, the
// execution-stage destination, the late-result flag and a pending redirect,
// the stall, PC enable, IF/ID enable and bubble outputs are compared with
// the rule: stall when a valid decode instruction reads the destination of
// a LOAD or IN in execution; a redirect still lets the PC load.
module tb_hazard_detection_unit;
  import risc_pkg::*;

  logic id_valid, id_use1, id_use2, ex_late, redirect;
  reg_t id_rs1, id_rs2, ex_wb;
  logic stall, pc_enable, ifid_enable, idex_bubble;
  int checks = 0, failures = 0;

  hazard_detection_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 14); v++) begin
      logic s;
      {id_valid, id_use1, id_use2, ex_late, redirect, id_rs1, id_rs2, ex_wb} = 14'(v);
      #1;
      s = id_valid && ex_late && ((id_use1 && id_rs1 == ex_wb) || (id_use2 && id_rs2 == ex_wb));
      checks++;
      if (stall !== s || pc_enable !== (!s || redirect) || ifid_enable !== !s || idex_bubble !== s) begin
        failures++;
        if (failures < 10) $display("FAIL case %h", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_register_file: self-checking test of the eight-register file.
// Random writes and reads on both ports against a shadow array, including
// reads of the register being written in the same cycle (which must return
// the new value) and the zero state after reset.
module tb_register_file;
  import risc_pkg::*;

  logic clk = 0, rst = 1, we = 0;
  reg_t ra1 = 0, ra2 = 0, wa = 0;
  word_t rd1, rd2, wd = 0;
  word_t shadow [8];
  int checks = 0, failures = 0;

  register_file dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(word_t got, word_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 8; i++) begin
      ra1 = reg_t'(i); ra2 = reg_t'(7 - i); #1;
      chk(rd1, 0, "reset value port 1"); chk(rd2, 0, "reset value port 2");
    end
    repeat (3000) begin
      we = 1'($urandom); wa = reg_t'($urandom); wd = 16'($urandom);
      ra1 = reg_t'($urandom); ra2 = ($urandom_range(0, 3) == 0) ? wa : reg_t'($urandom);
      #1;
      chk(rd1, (we && wa == ra1) ? wd : shadow[ra1], "read port 1");
      chk(rd2, (we && wa == ra2) ? wd : shadow[ra2], "read port 2");
      @(posedge clk);
      if (we) shadow[wa] = wd;
      #1;
    end
    we = 0;
    for (int i = 0; i < 8; i++) begin
      ra1 = reg_t'(i); #1; chk(rd1, shadow[i], "final contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_alu: self-checking test of the execute-stage ALU.
// Starts with the operand/result pairs of the reference design's
// execute-stage waveforms (add A0B0H+0032H, NOR, shift by zero, immediate
// into the high byte, add 2350H+0101H), then checks 3000 random operand
// sets for every ALU function, shift kind and move-immediate against an
// independent model, including the signed overflow flag.
module tb_alu;
  import risc_pkg::*;

  word_t a, b, result;
  logic [3:0] shamt;
  logic [7:0] imm8;
  ex_sel_e ex_select;
  alu_fn_e alu_function;
  logic overflow;
  int checks = 0, failures = 0;

  alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(word_t ta, word_t tb_, logic [3:0] ts, logic [7:0] ti, ex_sel_e es, alu_fn_e fn);
    a = ta; b = tb_; shamt = ts; imm8 = ti; ex_select = es; alu_function = fn;
    #1;
  endtask

  task automatic expect_(word_t r, logic ov, string what);
    checks++;
    if (result !== r || overflow !== ov) begin
      failures++;
      $display("FAIL %s: a=%h b=%h sel=%0d fn=%0d got %h/%b expected %h/%b",
               what, a, b, ex_select, alu_function, result, overflow, r, ov);
    end
  endtask

  initial begin
    // values printed in the reference waveforms
    apply(16'hA0B0, 16'h0032, 4'h0, 8'h80, EX_ALU, ALU_ADD);   expect_(16'hA0E2, 0, "wave add");
    apply(16'hA0B0, 16'h0032, 4'h0, 8'h80, EX_ALU, ALU_NOR);   expect_(16'h5F4D, 0, "wave nor");
    apply(16'hA0B0, 16'h0032, 4'h0, 8'h80, EX_SHIFT, ALU_NOR); expect_(16'hA0B0, 0, "wave shift 0");
    apply(16'h2350, 16'h0101, 4'h0, 8'h80, EX_MVH, ALU_ADDU);  expect_(16'h8050, 0, "wave mvi high");
    apply(16'h2350, 16'h0101, 4'h0, 8'h80, EX_ALU, ALU_ADDU);  expect_(16'h2451, 0, "wave add 2");
    // overflow corners
    apply(16'h7FFF, 16'h0001, 0, 0, EX_ALU, ALU_ADD);  expect_(16'h8000, 1, "add ovf");
    apply(16'h7FFF, 16'h0001, 0, 0, EX_ALU, ALU_ADDU); expect_(16'h8000, 0, "addu no ovf");
    apply(16'h8000, 16'h0001, 0, 0, EX_ALU, ALU_SUB);  expect_(16'h7FFF, 1, "sub ovf");
    apply(16'h8000, 16'h0001, 1, 0, EX_SHIFT, ALU_NOR); expect_(16'hC000, 0, "sra 1");
    repeat (3000) begin
      word_t ra, rb, exp_r, s, d;
      logic [3:0] rs; logic [7:0] ri; logic eo;
      int k;
      ra = 16'($urandom); rb = 16'($urandom); rs = 4'($urandom); ri = 8'($urandom);
      s = ra + rb; d = ra - rb;
      k = $urandom_range(0, 14);
      eo = 0;
      case (k)
        0: begin apply(ra, rb, rs, ri, EX_ALU, ALU_AND); exp_r = ra & rb; end
        1: begin apply(ra, rb, rs, ri, EX_ALU, ALU_OR);  exp_r = ra | rb; end
        2: begin apply(ra, rb, rs, ri, EX_ALU, ALU_XOR); exp_r = ra ^ rb; end
        3: begin apply(ra, rb, rs, ri, EX_ALU, ALU_NOR); exp_r = ~(ra | rb); end
        4: begin apply(ra, rb, rs, ri, EX_ALU, ALU_NOT); exp_r = ~ra; end
        5: begin apply(ra, rb, rs, ri, EX_ALU, ALU_ADD);
                 exp_r = s; eo = ($signed(ra) + $signed(rb) > 32767) || ($signed(ra) + $signed(rb) < -32768); end
        6: begin apply(ra, rb, rs, ri, EX_ALU, ALU_SUB);
                 exp_r = d; eo = ($signed(ra) - $signed(rb) > 32767) || ($signed(ra) - $signed(rb) < -32768); end
        7: begin apply(ra, rb, rs, ri, EX_ALU, ALU_ADDU); exp_r = s; end
        8: begin apply(ra, rb, rs, ri, EX_ALU, ALU_PASS); exp_r = ra; end
        9:  begin apply(ra, rb, rs, ri, EX_SHIFT, alu_fn_e'(4'(SH_SLL))); exp_r = 16'(32'(ra) * (32'd1 << rs)); end
        10: begin apply(ra, rb, rs, ri, EX_SHIFT, alu_fn_e'(4'(SH_SRL))); exp_r = ra / (16'd1 << rs); end
        11: begin apply(ra, rb, rs, ri, EX_SHIFT, alu_fn_e'(4'(SH_SLA))); exp_r = 16'(32'(ra) * (32'd1 << rs)); end
        12: begin apply(ra, rb, rs, ri, EX_SHIFT, alu_fn_e'(4'(SH_SRA)));
                  exp_r = 16'(($signed(32'($signed(ra))) - ((32'($signed(ra)) % (32'sd1 <<< rs) + (32'sd1 <<< rs)) % (32'sd1 <<< rs))) / (32'sd1 <<< rs)); end
        13: begin apply(ra, rb, rs, ri, EX_MVL, ALU_AND); exp_r = {ra[15:8], ri}; end
        default: begin apply(ra, rb, rs, ri, EX_MVH, ALU_AND); exp_r = {ri, ra[7:0]}; end
      endcase
      expect_(exp_r, eo, $sformatf("random case %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

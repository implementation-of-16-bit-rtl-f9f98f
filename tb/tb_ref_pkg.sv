// tb_ref_pkg: instruction-level reference model of the 16-bit RISC
// processor, used by the processor-level testbenches.
//
// ref_cpu executes one instruction per step with no notion of a pipeline:
// the architectural registers, a 64K-word memory, the output port and the
// return-from-interrupt address. Overflow of ADD, SUB and ADDI jumps to
// FFFFH and undefined instructions to FFF0H, saving the address after the
// instruction; RETI returns there. Interrupts are not modelled. Every
// register write and every store is also appended to wb_q / st_q so that a
// testbench can compare the processor's commits one by one, in order.
package tb_ref_pkg;
  import risc_pkg::*;

  class ref_cpu;
    word_t       mem [];
    word_t       rr [8];
    word_t       rout;
    word_t       intret;
    logic [18:0] wb_q [$];   // {register, value}
    logic [31:0] st_q [$];   // {address, data}

    function new();
      mem = new[65536];
    endfunction

    function void setr(logic [2:0] rd, word_t v);
      rr[rd] = v;
      wb_q.push_back({rd, v});
    endfunction

    // run from 0000H until pc == halt_addr (after at least one step);
    // returns 1 if the halt address was reached within max_steps
    function bit run(word_t halt_addr, word_t in_value, int max_steps);
      word_t pc, ins, a, b, r, nxt;
      int steps;
      foreach (rr[i]) rr[i] = '0;
      rout = '0; intret = '0; wb_q.delete(); st_q.delete();
      pc = '0;
      for (steps = 0; steps < max_steps && !(steps > 0 && pc == halt_addr); steps++) begin
        logic [3:0] op; logic [2:0] rd, rs1, rs2, fn; logic [7:0] i8; word_t s6, rel, ea;
        ins = mem[pc];
        op = ins[15:12]; rd = ins[11:9]; rs1 = ins[8:6]; rs2 = ins[5:3]; fn = ins[2:0];
        i8 = ins[8:1]; s6 = {{10{ins[5]}}, ins[5:0]};
        nxt = pc + 1;
        rel = pc + 1 + {{8{i8[7]}}, i8};
        ea  = rr[rs1] + s6;
        case (op)
          4'h0: begin
            a = rr[rs1]; b = rr[rs2];
            case (fn)
              3'd1: begin r = a + b; if (a[15] == b[15] && r[15] != a[15]) begin intret = pc + 1; nxt = 16'hFFFF; end else setr(rd, r); end
              3'd2: begin r = a - b; if (a[15] != b[15] && r[15] != a[15]) begin intret = pc + 1; nxt = 16'hFFFF; end else setr(rd, r); end
              3'd3: setr(rd, a & b);
              3'd4: setr(rd, a | b);
              3'd5: setr(rd, a ^ b);
              3'd6: setr(rd, ~(a | b));
              3'd7: setr(rd, ~a);
              default: ;
            endcase
          end
          4'h1: begin
            a = rr[rs1]; r = a + s6;
            if (a[15] == s6[15] && r[15] != a[15]) begin intret = pc + 1; nxt = 16'hFFFF; end
            else setr(rd, r);
          end
          4'h2: begin
            a = rr[rs1];
            case ({ins[5], ins[0]})
              2'd0, 2'd2: setr(rd, a << ins[4:1]);
              2'd1:       setr(rd, a >> ins[4:1]);
              default:    setr(rd, word_t'($signed(a) >>> ins[4:1]));
            endcase
          end
          4'h3: setr(rd, ins[0] ? {i8, rr[rd][7:0]} : {rr[rd][15:8], i8});
          4'h4: setr(rd, mem[ea]);
          4'h5: begin
            mem[ea] = rr[rd];
            st_q.push_back({ea, rr[rd]});
          end
          4'h6: setr(rd, in_value);
          4'h7: rout = rr[rs1];
          4'h8: if (rr[rd] == 0) nxt = rel;
          4'h9: if (rr[rd] != 0) nxt = rel;
          4'hA: nxt = rel;
          4'hB: nxt = rr[rs1];
          4'hC: begin setr(rd, pc + 1); nxt = rel; end
          4'hD: nxt = rr[rs1];
          4'hE: begin
            if (fn == 3'd2) nxt = intret;
            else if (fn > 3'd2) begin intret = pc + 1; nxt = 16'hFFF0; end
          end
          default: begin intret = pc + 1; nxt = 16'hFFF0; end
        endcase
        pc = nxt;
      end
      return pc == halt_addr;
    endfunction
  endclass

endpackage

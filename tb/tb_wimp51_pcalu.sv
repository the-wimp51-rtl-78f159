// tb_wimp51_pcalu: exhaustive self-checking test of the PC ALU.
//
// For every program counter value and every offset byte it checks that
// PC_INC gives PC + 1 and PC_REL gives PC plus the offset read as a signed
// byte, both modulo 256 (computed here with integer arithmetic).
module tb_wimp51_pcalu;
  import wimp51_pkg::*;
  pcalu_op_t op;
  addr_t     pc, next_pc;
  byte_t     aux;
  int checks = 0, failures = 0;

  wimp51_pcalu dut (.op(op), .pc(pc), .aux(aux), .next_pc(next_pc));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 256; p++) begin
      for (int a = 0; a < 256; a++) begin
        int rel, exp_inc, exp_rel;
        rel     = (a >= 128) ? a - 256 : a;
        exp_inc = (p + 1) % 256;
        exp_rel = (p + rel + 256) % 256;
        pc = addr_t'(p); aux = byte_t'(a);
        op = PC_INC; #1;
        checks++;
        if (int'(next_pc) != exp_inc) begin
          failures++;
          $display("PC_INC pc=%h -> %h, expected %h", pc, next_pc, exp_inc);
        end
        op = PC_REL; #1;
        checks++;
        if (int'(next_pc) != exp_rel) begin
          failures++;
          $display("PC_REL pc=%h rel=%0d -> %h, expected %h", pc, rel, next_pc, exp_rel);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

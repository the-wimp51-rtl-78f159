// wimp51_pcalu: the program counter ALU of the WIMP51.
//
// Computes the next value of the program counter. PC_INC gives PC + 1 and is
// used in the Fetch cycle and, for two-byte instructions, in the Decode
// cycle. PC_REL gives PC + AUX, where AUX holds the 8051 relative offset
// (a two's complement byte), and is used in the Execute cycle of a taken
// SJMP or JZ. Since the PC has already been advanced past both bytes of the
// branch, this yields the 8051 target PC + rel + 2. The two operations and
// their use follow the processor's description; the arithmetic wraps modulo
// 256 because the program counter is eight bits wide.
//
// Interface: op, pc, aux in; next_pc out. Purely combinational.
module wimp51_pcalu
  import wimp51_pkg::*;
(
  input  pcalu_op_t op,
  input  addr_t     pc,
  input  byte_t     aux,
  output addr_t     next_pc
);

  always_comb begin
    unique case (op)
      PC_INC:  next_pc = pc + addr_t'(1);
      PC_REL:  next_pc = pc + addr_t'(aux);
      default: next_pc = pc + addr_t'(1);
    endcase
  end

endmodule

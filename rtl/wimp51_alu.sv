// wimp51_alu: the arithmetic logic unit of the WIMP51, with its carry flag.
//
// The ALU combines the accumulator (ACC) with the auxiliary register (AUX)
// and returns the new accumulator value. It holds the processor's only status
// bit, the one-bit carry register C, which ADDC reads and writes and which
// CLR C / SETB C clear and set. It also drives Z, high exactly when the
// accumulator holds zero; the control unit uses Z to decide JZ.
//
// Operations (ALU_OP): NONE (result = ACC, C kept), MOV (result = AUX),
// ADDC (C,result = ACC + AUX + C), ANL, ORL, XRL (bitwise with AUX),
// SWAP (exchange the nibbles of ACC), CLRC and SETC (result = ACC, C changes).
// The set of operations, the carry register and the meaning of Z follow the
// processor's description; the encoding of ALU_OP, the NONE operation and
// the reset of C to 0 are this design's own choices.
//
// Interface: clk, rst, op, acc, aux in; result, c, z out.
// Timing: result and z are combinational; C updates on the rising edge of the
// cycle in which op is ADDC, CLRC or SETC.
module wimp51_alu
  import wimp51_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  alu_op_t op,
  input  byte_t   acc,
  input  byte_t   aux,
  output byte_t   result,
  output logic    c,
  output logic    z
);

  logic [DATA_W:0] sum;
  logic            c_next;

  always_comb begin
    sum    = {1'b0, acc} + {1'b0, aux} + {{DATA_W{1'b0}}, c};
    result = acc;
    c_next = c;
    unique case (op)
      ALU_NONE: ;
      ALU_MOV:  result = aux;
      ALU_ADDC: begin
        result = sum[DATA_W-1:0];
        c_next = sum[DATA_W];
      end
      ALU_ANL:  result = acc & aux;
      ALU_ORL:  result = acc | aux;
      ALU_XRL:  result = acc ^ aux;
      ALU_SWAP: result = {acc[3:0], acc[7:4]};
      ALU_CLRC: c_next = 1'b0;
      ALU_SETC: c_next = 1'b1;
      default:  ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) c <= 1'b0;
    else     c <= c_next;
  end

  assign z = (acc == '0);

endmodule

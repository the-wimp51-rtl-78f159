// wimp51_regfile: the eight by eight-bit register file R0..R7 of the WIMP51.
//
// A single three-bit register select (REG_SEL) names the register that is
// both read and written. The selected register is read combinationally into
// the auxiliary register (register-source instructions, Decode cycle) and,
// when WE is high, written with the accumulator on the rising clock edge
// (MOV Rn,A, Execute cycle). Eight registers, eight bits, one select and one
// write enable follow the processor's description; the asynchronous read and
// the synchronous clear of all registers on reset are this design's choices.
//
// Interface: clk, rst, we, sel, wdata in; rdata out (= R[sel]).
module wimp51_regfile
  import wimp51_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  we,
  input  rsel_t sel,
  input  byte_t wdata,
  output byte_t rdata
);

  byte_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[sel] <= wdata;
    end
  end

  assign rdata = regs[sel];

endmodule

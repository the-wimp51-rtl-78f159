// wimp51_aux: the auxiliary (operand) register of the WIMP51.
//
// During the Decode cycle AUX receives the instruction's operand: either an
// immediate byte or branch offset from the program memory data bus, or the
// contents of the selected register R0..R7 from the register file. AUX_CTL
// chooses the source (1 = data bus, 0 = register file) and WE enables the
// load, as in the processor's control diagram. AUX then feeds both the ALU
// and the PC ALU in the Execute cycle. The encoding of AUX_CTL agrees with
// the value shown while an immediate operand is fetched; the synchronous
// reset to 00h is this design's own choice.
//
// Interface: clk, rst, we, aux_ctl, data_bus, rf_data in; q out.
// Timing: q is loaded on the rising edge of a cycle with we high.
module wimp51_aux
  import wimp51_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     we,
  input  aux_ctl_t aux_ctl,
  input  byte_t    data_bus,
  input  byte_t    rf_data,
  output byte_t    q
);

  byte_t d;

  always_comb begin
    d = (aux_ctl == AUX_FROM_DATABUS) ? data_bus : rf_data;
  end

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (we) q <= d;
  end

endmodule

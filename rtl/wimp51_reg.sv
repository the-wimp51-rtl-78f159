// wimp51_reg: an 8-bit register with a write enable.
//
// The WIMP51 datapath holds its instruction register (IR), accumulator (ACC)
// and program counter (PC) in registers of this kind: each loads its input on
// the rising clock edge when WE is high and holds its value otherwise. The
// width and the write-enable control follow the processor's description; the
// synchronous, active-high reset to RESET_VAL (zero by default, so the
// program starts at address 00h) is this design's own choice.
//
// Interface: clk, rst, we, d in; q out. Timing: q takes d one clock after a
// cycle with we high; reset has priority over we.
module wimp51_reg #(
  parameter int unsigned        W         = 8,
  parameter logic [W-1:0]       RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= RESET_VAL;
    else if (we) q <= d;
  end

endmodule

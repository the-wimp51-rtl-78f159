// wimp51: top level of the WIMP51 processor.
//
// The WIMP51 is a small von Neumann processor that runs a binary- and
// assembly-compatible subset of the Intel 8051 instruction set (thirteen
// instructions: MOV, ADDC, ANL, ORL, XRL, SWAP, CLR C, SETB C, SJMP, JZ) with
// no internal data memory, interrupts or peripherals. Every instruction takes
// three clock cycles: Fetch (opcode into IR, PC + 1), Decode (operand into
// AUX from program memory or from R0..R7) and Execute (ALU result into ACC,
// ACC into Rn, or PC + AUX into PC for a branch).
//
// Datapath: four 8-bit registers (IR, ACC, PC, AUX), an 8 x 8-bit register
// file, an ALU holding the carry flag and producing Z, a PC ALU and the
// control unit. The program counter drives the address bus; the data bus
// feeds IR and AUX; the accumulator is written back to the register file.
// The block structure and connections follow the processor's datapath and
// control diagrams. The memory interface is this design's reading of them:
// program memory is external, read asynchronously (data must be valid on
// data_bus in the same cycle that psen_n is low and addr_bus is driven), and
// the accumulator is brought out on acc_out for observation. Reset is
// synchronous and active high; it clears every register and starts at 00h.
//
// The phase of the control unit and the carry flag are kept as internal
// signals (state, c) without ports, so that a simulation can show them next
// to the registers; lint reports them as unused.
//
// Ports: clk, rst, data_bus in; addr_bus, psen_n, acc_out out.
// Timing: one instruction every three clock cycles; addr_bus changes after
// each rising edge that writes PC.
module wimp51
  import wimp51_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  output addr_t addr_bus,
  input  byte_t data_bus,
  output logic  psen_n,
  output byte_t acc_out
);

  ctrl_t  ctrl;
  state_t state;
  byte_t  ir, acc, aux, rf_rdata, alu_result;
  addr_t  pc, next_pc;
  logic   c, z;

  wimp51_control u_control (
    .clk  (clk),
    .rst  (rst),
    .ir   (ir),
    .z    (z),
    .ctrl (ctrl),
    .state(state)
  );

  wimp51_reg #(.W(DATA_W)) u_ir (
    .clk(clk), .rst(rst), .we(ctrl.ir_we), .d(data_bus), .q(ir)
  );

  wimp51_reg #(.W(DATA_W)) u_acc (
    .clk(clk), .rst(rst), .we(ctrl.acc_we), .d(alu_result), .q(acc)
  );

  wimp51_reg #(.W(ADDR_W)) u_pc (
    .clk(clk), .rst(rst), .we(ctrl.pc_we), .d(next_pc), .q(pc)
  );

  wimp51_aux u_aux (
    .clk     (clk),
    .rst     (rst),
    .we      (ctrl.aux_we),
    .aux_ctl (ctrl.aux_ctl),
    .data_bus(data_bus),
    .rf_data (rf_rdata),
    .q       (aux)
  );

  wimp51_regfile u_regfile (
    .clk  (clk),
    .rst  (rst),
    .we   (ctrl.reg_we),
    .sel  (ctrl.reg_sel),
    .wdata(acc),
    .rdata(rf_rdata)
  );

  wimp51_alu u_alu (
    .clk   (clk),
    .rst   (rst),
    .op    (ctrl.alu_op),
    .acc   (acc),
    .aux   (aux),
    .result(alu_result),
    .c     (c),
    .z     (z)
  );

  wimp51_pcalu u_pcalu (
    .op     (ctrl.pcalu_op),
    .pc     (pc),
    .aux    (aux),
    .next_pc(next_pc)
  );

  assign addr_bus = pc;
  assign psen_n   = ctrl.psen_n;
  assign acc_out  = acc;

endmodule

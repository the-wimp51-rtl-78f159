// wimp51_pkg: types and constants shared by the WIMP51 processor blocks.
//
// The WIMP51 is an 8-bit, binary-compatible subset of the Intel 8051. This
// package holds the opcode values of its thirteen instructions (the standard
// 8051 encodings), the three machine-cycle states, and the operation codes of
// the ALU and the PC ALU. The opcode values and the state names follow the
// 8051 encoding and the Fetch/Decode/Execute phase names; the numeric
// encodings of the ALU and PC ALU operations are this design's own choice.
package wimp51_pkg;

  localparam int unsigned DATA_W = 8;   // every datapath register is 8 bits
  localparam int unsigned ADDR_W = 8;   // the program counter is 8 bits
  localparam int unsigned NREGS  = 8;   // R0..R7
  localparam int unsigned SEL_W  = 3;   // register select width

  typedef logic [DATA_W-1:0] byte_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [SEL_W-1:0]  rsel_t;

  // Opcodes (full byte, or the upper five bits for the Rn forms).
  localparam byte_t OP_MOV_A_IMM  = 8'h74;    // MOV A,#D     0111_0100 dddddddd
  localparam byte_t OP_ADDC_A_IMM = 8'h34;    // ADDC A,#D    0011_0100 dddddddd
  localparam byte_t OP_SWAP_A     = 8'hC4;    // SWAP A       1100_0100
  localparam byte_t OP_CLR_C      = 8'hC3;    // CLR C        1100_0011
  localparam byte_t OP_SETB_C     = 8'hD3;    // SETB C       1101_0011
  localparam byte_t OP_SJMP       = 8'h80;    // SJMP rel     1000_0000 rrrrrrrr
  localparam byte_t OP_JZ         = 8'h60;    // JZ rel       0110_0000 rrrrrrrr
  localparam logic [4:0] OP5_MOV_A_RN  = 5'b11101;  // MOV A,Rn   11101nnn
  localparam logic [4:0] OP5_MOV_RN_A  = 5'b11111;  // MOV Rn,A   11111nnn
  localparam logic [4:0] OP5_ADDC_A_RN = 5'b00111;  // ADDC A,Rn  00111nnn
  localparam logic [4:0] OP5_ANL_A_RN  = 5'b01011;  // ANL A,Rn   01011nnn
  localparam logic [4:0] OP5_ORL_A_RN  = 5'b01001;  // ORL A,Rn   01001nnn
  localparam logic [4:0] OP5_XRL_A_RN  = 5'b01101;  // XRL A,Rn   01101nnn

  // Machine-cycle phase held by the control unit.
  typedef enum logic [1:0] {
    ST_FETCH   = 2'd0,
    ST_DECODE  = 2'd1,
    ST_EXECUTE = 2'd2
  } state_t;

  // ALU operations. ALU_NONE leaves the carry register alone; its result is
  // the accumulator unchanged.
  typedef enum logic [3:0] {
    ALU_NONE = 4'd0,
    ALU_MOV  = 4'd1,   // result = AUX
    ALU_ADDC = 4'd2,   // C,result = ACC + AUX + C
    ALU_ANL  = 4'd3,   // result = ACC & AUX
    ALU_ORL  = 4'd4,   // result = ACC | AUX
    ALU_XRL  = 4'd5,   // result = ACC ^ AUX
    ALU_SWAP = 4'd6,   // result = {ACC[3:0], ACC[7:4]}
    ALU_CLRC = 4'd7,   // C = 0
    ALU_SETC = 4'd8    // C = 1
  } alu_op_t;

  // PC ALU operations.
  typedef enum logic [0:0] {
    PC_INC = 1'b0,     // next PC = PC + 1
    PC_REL = 1'b1      // next PC = PC + AUX (AUX read as a signed offset)
  } pcalu_op_t;

  // AUX register source select (AUX_CTL).
  typedef enum logic [0:0] {
    AUX_FROM_REGFILE = 1'b0,
    AUX_FROM_DATABUS = 1'b1
  } aux_ctl_t;

  // Control word produced by the control unit every cycle.
  typedef struct packed {
    logic      ir_we;
    logic      acc_we;
    logic      pc_we;
    logic      aux_we;
    aux_ctl_t  aux_ctl;
    logic      reg_we;
    rsel_t     reg_sel;
    alu_op_t   alu_op;
    pcalu_op_t pcalu_op;
    logic      psen_n;
  } ctrl_t;

endpackage

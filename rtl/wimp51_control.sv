// wimp51_control: the control unit of the WIMP51.
//
// A three-state sequencer, FETCH -> DECODE -> EXECUTE -> FETCH, so that every
// instruction takes exactly three clock cycles. From the instruction register
// and the Z flag it produces, every cycle, the control word of the datapath:
// write enables of IR, ACC, PC, AUX and the register file, the register
// select, the AUX source select (AUX_CTL), the ALU and PC ALU operations and
// the active-low program memory strobe PSEN_N.
//
//   FETCH   : read program memory at PC into IR, PC <- PC + 1 (all opcodes).
//   DECODE  : immediate / offset instructions (MOV A,#D; ADDC A,#D; SJMP; JZ)
//             read the next program byte into AUX and advance PC;
//             register-source instructions (MOV A,Rn; ADDC/ANL/ORL/XRL A,Rn)
//             copy R[n] into AUX.
//   EXECUTE : SJMP, and JZ when Z = 1, load PC <- PC + AUX; MOV Rn,A writes
//             ACC to R[n]; CLR C / SETB C change the carry; the remaining
//             instructions write the ALU result into ACC.
//
// The three phases, what happens in each and the set of control signals
// follow the processor's description. This design's own choices: PC is
// advanced in Decode when the operand byte is read (so that a branch target
// is PC + rel + 2), CLR C and SETB C leave ACC unwritten, an opcode outside
// the instruction set executes as a three-cycle no-operation, PSEN_N is high
// in cycles that do not read program memory, and the state resets to FETCH.
//
// Interface: clk, rst, ir, z in; ctrl (control word) and state out.
// Timing: state advances every rising clock edge; ctrl is combinational from
// state, ir and z.
module wimp51_control
  import wimp51_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  byte_t  ir,
  input  logic   z,
  output ctrl_t  ctrl,
  output state_t state
);

  // Instruction classes decoded from IR.
  typedef enum logic [3:0] {
    I_NOP, I_MOV_A_IMM, I_ADDC_A_IMM, I_MOV_A_RN, I_MOV_RN_A, I_ADDC_A_RN,
    I_ANL_A_RN, I_ORL_A_RN, I_XRL_A_RN, I_SWAP, I_CLR_C, I_SETB_C, I_SJMP, I_JZ
  } instr_t;

  instr_t instr;

  always_comb begin
    instr = I_NOP;
    if      (ir == OP_MOV_A_IMM)         instr = I_MOV_A_IMM;
    else if (ir == OP_ADDC_A_IMM)        instr = I_ADDC_A_IMM;
    else if (ir == OP_SWAP_A)            instr = I_SWAP;
    else if (ir == OP_CLR_C)             instr = I_CLR_C;
    else if (ir == OP_SETB_C)            instr = I_SETB_C;
    else if (ir == OP_SJMP)              instr = I_SJMP;
    else if (ir == OP_JZ)                instr = I_JZ;
    else if (ir[7:3] == OP5_MOV_A_RN)    instr = I_MOV_A_RN;
    else if (ir[7:3] == OP5_MOV_RN_A)    instr = I_MOV_RN_A;
    else if (ir[7:3] == OP5_ADDC_A_RN)   instr = I_ADDC_A_RN;
    else if (ir[7:3] == OP5_ANL_A_RN)    instr = I_ANL_A_RN;
    else if (ir[7:3] == OP5_ORL_A_RN)    instr = I_ORL_A_RN;
    else if (ir[7:3] == OP5_XRL_A_RN)    instr = I_XRL_A_RN;
  end

  logic has_imm, has_reg_src;
  assign has_imm     = instr inside {I_MOV_A_IMM, I_ADDC_A_IMM, I_SJMP, I_JZ};
  assign has_reg_src = instr inside {I_MOV_A_RN, I_ADDC_A_RN, I_ANL_A_RN,
                                     I_ORL_A_RN, I_XRL_A_RN};

  // Sequencer.
  always_ff @(posedge clk) begin
    if (rst) begin
      state <= ST_FETCH;
    end else begin
      unique case (state)
        ST_FETCH:   state <= ST_DECODE;
        ST_DECODE:  state <= ST_EXECUTE;
        ST_EXECUTE: state <= ST_FETCH;
        default:    state <= ST_FETCH;
      endcase
    end
  end

  // Sequencing rules: the phases rotate in order, the opcode fetch always
  // strobes program memory and Execute never does.
  a_fetch_then_decode:  assert property (@(posedge clk) disable iff (rst)
                          state == ST_FETCH |=> state == ST_DECODE);
  a_decode_then_exec:   assert property (@(posedge clk) disable iff (rst)
                          state == ST_DECODE |=> state == ST_EXECUTE);
  a_exec_then_fetch:    assert property (@(posedge clk) disable iff (rst)
                          state == ST_EXECUTE |=> state == ST_FETCH);
  a_fetch_strobes:      assert property (@(posedge clk) disable iff (rst)
                          state == ST_FETCH |-> !ctrl.psen_n && ctrl.ir_we);
  a_exec_no_strobe:     assert property (@(posedge clk) disable iff (rst)
                          state == ST_EXECUTE |-> ctrl.psen_n);

  // Control word.
  always_comb begin
    ctrl          = '0;
    ctrl.psen_n   = 1'b1;
    ctrl.aux_ctl  = AUX_FROM_REGFILE;
    ctrl.alu_op   = ALU_NONE;
    ctrl.pcalu_op = PC_INC;
    ctrl.reg_sel  = ir[2:0];
    unique case (state)
      ST_FETCH: begin
        ctrl.psen_n = 1'b0;
        ctrl.ir_we  = 1'b1;
        ctrl.pc_we  = 1'b1;
      end
      ST_DECODE: begin
        if (has_imm) begin
          ctrl.psen_n  = 1'b0;
          ctrl.aux_ctl = AUX_FROM_DATABUS;
          ctrl.aux_we  = 1'b1;
          ctrl.pc_we   = 1'b1;
        end else if (has_reg_src) begin
          ctrl.aux_ctl = AUX_FROM_REGFILE;
          ctrl.aux_we  = 1'b1;
        end
      end
      ST_EXECUTE: begin
        unique case (instr)
          I_SJMP: begin
            ctrl.pcalu_op = PC_REL;
            ctrl.pc_we    = 1'b1;
          end
          I_JZ: begin
            ctrl.pcalu_op = PC_REL;
            ctrl.pc_we    = z;
          end
          I_MOV_RN_A:   ctrl.reg_we = 1'b1;
          I_MOV_A_IMM,
          I_MOV_A_RN:   begin ctrl.alu_op = ALU_MOV;  ctrl.acc_we = 1'b1; end
          I_ADDC_A_IMM,
          I_ADDC_A_RN:  begin ctrl.alu_op = ALU_ADDC; ctrl.acc_we = 1'b1; end
          I_ANL_A_RN:   begin ctrl.alu_op = ALU_ANL;  ctrl.acc_we = 1'b1; end
          I_ORL_A_RN:   begin ctrl.alu_op = ALU_ORL;  ctrl.acc_we = 1'b1; end
          I_XRL_A_RN:   begin ctrl.alu_op = ALU_XRL;  ctrl.acc_we = 1'b1; end
          I_SWAP:       begin ctrl.alu_op = ALU_SWAP; ctrl.acc_we = 1'b1; end
          I_CLR_C:      ctrl.alu_op = ALU_CLRC;
          I_SETB_C:     ctrl.alu_op = ALU_SETC;
          default:      ;
        endcase
      end
      default: ;
    endcase
  end

endmodule

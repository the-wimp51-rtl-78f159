// tb_wimp51_control: self-checking test of the WIMP51 control unit.
//
// For each of the 256 opcode values and both values of Z it resets the unit,
// holds the opcode on IR and checks the control word in each of the three
// phases against an expected table written out here from the instruction
// set (literal opcode values). It also checks that the sequence is exactly
// FETCH, DECODE, EXECUTE and back to FETCH, i.e. three cycles per
// instruction.
module tb_wimp51_control;
  import wimp51_pkg::*;
  logic   clk = 1'b0;
  logic   rst;
  byte_t  ir;
  logic   z;
  ctrl_t  ctrl;
  state_t state;
  int checks = 0, failures = 0;

  wimp51_control dut (.clk(clk), .rst(rst), .ir(ir), .z(z), .ctrl(ctrl), .state(state));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected control word for opcode `o`, flag `zf`, in phase `ph`.
  function automatic ctrl_t expected(input int o, input logic zf, input int ph);
    ctrl_t e;
    bit imm, rsrc;
    int hi5;
    hi5 = o / 8;
    imm  = (o == 'h74) || (o == 'h34) || (o == 'h80) || (o == 'h60);
    rsrc = (hi5 == 'b11101) || (hi5 == 'b00111) || (hi5 == 'b01011) ||
           (hi5 == 'b01001) || (hi5 == 'b01101);
    e = '0;
    e.psen_n   = 1'b1;
    e.reg_sel  = rsel_t'(o % 8);
    e.alu_op   = ALU_NONE;
    e.pcalu_op = PC_INC;
    e.aux_ctl  = AUX_FROM_REGFILE;
    if (ph == 0) begin
      e.psen_n = 1'b0; e.ir_we = 1'b1; e.pc_we = 1'b1;
    end else if (ph == 1) begin
      if (imm) begin
        e.psen_n = 1'b0; e.aux_we = 1'b1; e.aux_ctl = AUX_FROM_DATABUS; e.pc_we = 1'b1;
      end else if (rsrc) begin
        e.aux_we = 1'b1;
      end
    end else begin
      if (o == 'h80)                 begin e.pcalu_op = PC_REL; e.pc_we = 1'b1; end
      else if (o == 'h60)            begin e.pcalu_op = PC_REL; e.pc_we = zf;   end
      else if (o == 'h74 || hi5 == 'b11101) begin e.alu_op = ALU_MOV;  e.acc_we = 1'b1; end
      else if (o == 'h34 || hi5 == 'b00111) begin e.alu_op = ALU_ADDC; e.acc_we = 1'b1; end
      else if (hi5 == 'b01011)       begin e.alu_op = ALU_ANL;  e.acc_we = 1'b1; end
      else if (hi5 == 'b01001)       begin e.alu_op = ALU_ORL;  e.acc_we = 1'b1; end
      else if (hi5 == 'b01101)       begin e.alu_op = ALU_XRL;  e.acc_we = 1'b1; end
      else if (o == 'hC4)            begin e.alu_op = ALU_SWAP; e.acc_we = 1'b1; end
      else if (o == 'hC3)            e.alu_op = ALU_CLRC;
      else if (o == 'hD3)            e.alu_op = ALU_SETC;
      else if (hi5 == 'b11111)       e.reg_we = 1'b1;
    end
    return e;
  endfunction

  initial begin
    rst = 1'b1; ir = '0; z = 1'b0;
    for (int o = 0; o < 256; o++) begin
      for (int zi = 0; zi < 2; zi++) begin
        rst = 1'b1;
        @(posedge clk); #1;
        rst = 1'b0;
        ir  = byte_t'(o);
        z   = zi[0];
        for (int ph = 0; ph < 4; ph++) begin
          ctrl_t e;
          state_t es;
          #1;
          es = (ph == 1) ? ST_DECODE : (ph == 2) ? ST_EXECUTE : ST_FETCH;
          e  = expected(o, z, ph % 3);
          checks++;
          if (state !== es) begin
            failures++;
            $display("op %h z=%0d step %0d: state %0d expected %0d", o, z, ph, state, es);
          end
          checks++;
          if (ctrl !== e) begin
            failures++;
            $display("op %h z=%0d phase %0d: ctrl %h expected %h", o, z, ph, ctrl, e);
          end
          @(posedge clk); #1;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_wimp51_alu: self-checking test of the ALU and its carry register.
//
// Applies every operation with random accumulator and AUX values, checks the
// combinational result and Z against values computed here, and keeps its own
// copy of the carry flag to check the carry register after each clock edge.
// Carry-in from a previous ADDC, carry-out, and Z for a zero accumulator are
// each forced to occur.
module tb_wimp51_alu;
  import wimp51_pkg::*;
  logic    clk = 1'b0;
  logic    rst;
  alu_op_t op;
  byte_t   acc, aux, result;
  logic    c, z;
  logic    c_model;
  int checks = 0, failures = 0;
  int n_cout = 0, n_cin = 0, n_zero = 0;

  wimp51_alu dut (.clk(clk), .rst(rst), .op(op), .acc(acc), .aux(aux),
                  .result(result), .c(c), .z(z));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: op=%0d acc=%h aux=%h c=%0d got %h expected %h",
               what, op, acc, aux, c_model, got, exp);
    end
  endtask

  initial begin
    rst = 1'b1; op = ALU_NONE; acc = '0; aux = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    c_model = 1'b0;
    check("carry after reset", int'(c), 0);
    for (int i = 0; i < 4000; i++) begin
      int a, b, exp_res, exp_c, s;
      op  = alu_op_t'($urandom_range(0, 8));
      a   = (i % 17 == 0) ? 0 : int'($urandom_range(0, 255));
      b   = int'($urandom_range(0, 255));
      acc = byte_t'(a); aux = byte_t'(b);
      #1;
      exp_c   = int'(c_model);
      exp_res = a;
      case (op)
        ALU_MOV:  exp_res = b;
        ALU_ADDC: begin
          s = a + b + int'(c_model);
          exp_res = s % 256;
          exp_c   = s / 256;
          if (c_model) n_cin++;
          if (exp_c == 1) n_cout++;
        end
        ALU_ANL:  exp_res = a & b;
        ALU_ORL:  exp_res = a | b;
        ALU_XRL:  exp_res = a ^ b;
        ALU_SWAP: exp_res = ((a % 16) * 16) + (a / 16);
        ALU_CLRC: exp_c = 0;
        ALU_SETC: exp_c = 1;
        default:  ;
      endcase
      check("result", int'(result), exp_res);
      check("z", int'(z), (a == 0) ? 1 : 0);
      if (a == 0) n_zero++;
      @(posedge clk); #1;
      c_model = exp_c[0];
      check("carry", int'(c), exp_c);
    end
    if (n_cout == 0 || n_cin == 0 || n_zero == 0) begin
      failures++;
      $display("coverage hole: cout=%0d cin=%0d zero=%0d", n_cout, n_cin, n_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

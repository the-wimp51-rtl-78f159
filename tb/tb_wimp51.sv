// tb_wimp51: end-to-end self-checking test of the WIMP51 processor.
//
// The testbench holds a 256-byte behavioural program ROM, read
// asynchronously at addr_bus onto data_bus, and an instruction-level
// reference model of the WIMP51 (PC, A, C, R0..R7). After reset it runs the
// processor three clocks per instruction and, after every instruction,
// compares PC (address bus), A (acc_out), the carry flag and R0..R7 with the
// model. During each instruction it also checks that the opcode is read in
// the first cycle at the model's PC and that PSEN_N is low for exactly as
// many cycles as the instruction has bytes, which checks the fixed
// three-cycle timing.
//
// Programs run:
//   1. the ten-byte program fragment MOV A,#0FFh / MOV R0,A / MOV A,#42h /
//      MOV R2,A / MOV A,R5 / ORL A,R2 / SETB C / CLR C;
//   2. a hand-written program (a counting loop built from JZ and SJMP, then
//      SWAP, ANL, ORL, XRL and an ADDC that carries out to zero) whose
//      final register values are also checked against hand-computed numbers;
//   2b. a cycle-by-cycle check of the Decode cycle of ADDC A,#09h (register
//      values and every control signal in that cycle);
//   3. random programs made of valid instructions, including branches that
//      land anywhere (operand bytes then run as opcodes).
// Every mechanism of the processor is counted and each must occur at least
// once: immediate operand fetch, register operand fetch, register write,
// each ALU operation, carry in and carry out of ADDC, SJMP, JZ taken and not
// taken.
module tb_wimp51;
  logic       clk = 1'b0;
  logic       rst;
  logic [7:0] addr_bus, data_bus, acc_out;
  logic       psen_n;

  logic [7:0] rom [256];

  wimp51 dut (.clk(clk), .rst(rst), .addr_bus(addr_bus), .data_bus(data_bus),
              .psen_n(psen_n), .acc_out(acc_out));

  assign data_bus = rom[addr_bus];

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_imm, n_rsrc, n_rwrite, n_mov, n_addc, n_anl, n_orl, n_xrl, n_swap;
  int n_clrc, n_setc, n_cin, n_cout, n_sjmp, n_jz_taken, n_jz_not, n_other;

  // Reference model state.
  logic [7:0] m_pc, m_a;
  logic       m_c;
  logic [7:0] m_r [8];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int len_of(input logic [7:0] op);
    return (op == 8'h74 || op == 8'h34 || op == 8'h80 || op == 8'h60) ? 2 : 1;
  endfunction

  // Execute one instruction in the reference model.
  task automatic model_step();
    logic [7:0] op, opd, rv;
    logic [8:0] s;
    int n;
    op  = rom[m_pc];
    opd = rom[8'(m_pc + 8'd1)];
    n   = int'(op[2:0]);
    rv  = m_r[n];
    m_pc = 8'(m_pc + len_of(op));
    if (len_of(op) == 2) n_imm++;
    case (op)
      8'h74: begin m_a = opd; n_mov++; end
      8'h34: begin
        s = {1'b0, m_a} + {1'b0, opd} + {8'b0, m_c};
        if (m_c) n_cin++;
        if (s[8]) n_cout++;
        m_a = s[7:0]; m_c = s[8]; n_addc++;
      end
      8'hC4: begin m_a = {m_a[3:0], m_a[7:4]}; n_swap++; end
      8'hC3: begin m_c = 1'b0; n_clrc++; end
      8'hD3: begin m_c = 1'b1; n_setc++; end
      8'h80: begin m_pc = 8'(m_pc + opd); n_sjmp++; end
      8'h60: begin
        if (m_a == 8'h00) begin m_pc = 8'(m_pc + opd); n_jz_taken++; end
        else n_jz_not++;
      end
      default: begin
        case (op[7:3])
          5'b11101: begin m_a = rv; n_mov++; n_rsrc++; end
          5'b11111: begin m_r[n] = m_a; n_rwrite++; end
          5'b00111: begin
            s = {1'b0, m_a} + {1'b0, rv} + {8'b0, m_c};
            if (m_c) n_cin++;
            if (s[8]) n_cout++;
            m_a = s[7:0]; m_c = s[8]; n_addc++; n_rsrc++;
          end
          5'b01011: begin m_a = m_a & rv; n_anl++; n_rsrc++; end
          5'b01001: begin m_a = m_a | rv; n_orl++; n_rsrc++; end
          5'b01101: begin m_a = m_a ^ rv; n_xrl++; n_rsrc++; end
          default:  n_other++;   // outside the instruction set: no operation
        endcase
      end
    endcase
  endtask

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("%t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  task automatic reset_cpu();
    rst = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;
    m_pc = '0; m_a = '0; m_c = 1'b0;
    foreach (m_r[i]) m_r[i] = '0;
  endtask

  // Run one instruction on the DUT (3 clocks) and on the model, then compare.
  task automatic run_instr();
    int strobes;
    logic [7:0] op;
    op = rom[m_pc];
    strobes = 0;
    check("fetch address", int'(addr_bus), int'(m_pc));
    for (int cyc = 0; cyc < 3; cyc++) begin
      if (cyc == 0) check("psen_n in fetch", int'(psen_n), 0);
      if (!psen_n) strobes++;
      @(posedge clk); #1;
    end
    check("program memory reads", strobes, len_of(op));
    model_step();
    check("pc", int'(addr_bus), int'(m_pc));
    check("acc", int'(acc_out), int'(m_a));
    check("carry", int'(dut.u_alu.c), int'(m_c));
    for (int i = 0; i < 8; i++)
      check("register", int'(dut.u_regfile.regs[i]), int'(m_r[i]));
  endtask

  task automatic load(input logic [7:0] bytes [$]);
    foreach (rom[i]) rom[i] = 8'h00;
    foreach (bytes[i]) rom[i] = bytes[i];
  endtask

  initial begin
    logic [7:0] prog [$];
    {n_imm, n_rsrc, n_rwrite, n_mov, n_addc, n_anl, n_orl, n_xrl, n_swap} = '0;
    {n_clrc, n_setc, n_cin, n_cout, n_sjmp, n_jz_taken, n_jz_not, n_other} = '0;
    rst = 1'b1;
    foreach (rom[i]) rom[i] = 8'h00;

    // 1. Program fragment: 74 FF F8 74 42 FA ED 4A D3 C3.
    prog = '{8'h74, 8'hFF, 8'hF8, 8'h74, 8'h42, 8'hFA, 8'hED, 8'h4A, 8'hD3, 8'hC3};
    load(prog);
    reset_cpu();
    repeat (8) run_instr();
    check("fragment A", int'(acc_out), 'h42);
    check("fragment R0", int'(dut.u_regfile.regs[0]), 'hFF);
    check("fragment R2", int'(dut.u_regfile.regs[2]), 'h42);
    check("fragment PC", int'(addr_bus), 'h0A);

    // 2. Counting loop: R1 = 5+4+3+2+1, then logic operations.
    prog = '{
      8'h74, 8'h05,  // 00 MOV A,#5
      8'hF8,         // 02 MOV R0,A
      8'h74, 8'h00,  // 03 MOV A,#0
      8'hF9,         // 05 MOV R1,A
      8'hE8,         // 06 loop: MOV A,R0
      8'h60, 8'h0C,  // 07 JZ done (15h)
      8'hC3,         // 09 CLR C
      8'h39,         // 0A ADDC A,R1
      8'hF9,         // 0B MOV R1,A
      8'hE8,         // 0C MOV A,R0
      8'hC3,         // 0D CLR C
      8'h34, 8'hFF,  // 0E ADDC A,#0FFh   (A - 1)
      8'hF8,         // 10 MOV R0,A
      8'h80, 8'hF3,  // 11 SJMP loop
      8'h00, 8'h00,  // 13
      8'hE9,         // 15 done: MOV A,R1    A = 0Fh
      8'hC4,         // 16 SWAP A            A = F0h
      8'hFA,         // 17 MOV R2,A
      8'h74, 8'h3C,  // 18 MOV A,#3Ch
      8'h5A,         // 1A ANL A,R2          A = 30h
      8'hFB,         // 1B MOV R3,A
      8'h74, 8'h0F,  // 1C MOV A,#0Fh
      8'h4B,         // 1E ORL A,R3          A = 3Fh
      8'h6A,         // 1F XRL A,R2          A = CFh
      8'hD3,         // 20 SETB C
      8'h34, 8'h30,  // 21 ADDC A,#30h       A = 00h, C = 1
      8'h60, 8'h02,  // 23 JZ +2 (27h)
      8'h74, 8'hEE,  // 25 MOV A,#0EEh (skipped)
      8'h80, 8'hFE   // 27 SJMP $
    };
    load(prog);
    reset_cpu();
    begin
      int guard;
      guard = 0;
      while (m_pc != 8'h27 && guard < 500) begin run_instr(); guard++; end
      check("loop reached end", guard < 500 ? 1 : 0, 1);
    end
    repeat (3) run_instr();   // spin on SJMP $
    check("loop A", int'(acc_out), 'h00);
    check("loop C", int'(dut.u_alu.c), 1);
    check("loop R0", int'(dut.u_regfile.regs[0]), 'h00);
    check("loop R1", int'(dut.u_regfile.regs[1]), 'h0F);
    check("loop R2", int'(dut.u_regfile.regs[2]), 'hF0);
    check("loop R3", int'(dut.u_regfile.regs[3]), 'h30);
    check("loop PC", int'(addr_bus), 'h27);

    // 2b. Cycle-level snapshot of the Decode cycle of ADDC A,#09h at address
    //     02h: IR = 34h, PC = address bus = 03h, data bus = 09h, A = 40h,
    //     C = Z = 0, and the controls ir_we 0, reg_we 0, acc_we 0, pc_we 1,
    //     aux_ctl 1 (data bus), PC ALU incrementing, program memory strobed.
    prog = '{8'h74, 8'h40, 8'h34, 8'h09};
    load(prog);
    reset_cpu();
    run_instr();                 // MOV A,#40h
    @(posedge clk); #1;          // Fetch of ADDC
    check("snapshot state", int'(dut.u_control.state), int'(wimp51_pkg::ST_DECODE));
    check("snapshot ir", int'(dut.ir), 'h34);
    check("snapshot pc", int'(addr_bus), 'h03);
    check("snapshot data bus", int'(data_bus), 'h09);
    check("snapshot acc", int'(acc_out), 'h40);
    check("snapshot c", int'(dut.u_alu.c), 0);
    check("snapshot z", int'(dut.u_alu.z), 0);
    check("snapshot ir_we", int'(dut.ctrl.ir_we), 0);
    check("snapshot reg_we", int'(dut.ctrl.reg_we), 0);
    check("snapshot acc_we", int'(dut.ctrl.acc_we), 0);
    check("snapshot pc_we", int'(dut.ctrl.pc_we), 1);
    check("snapshot aux_ctl", int'(dut.ctrl.aux_ctl), 1);
    check("snapshot pcalu_op", int'(dut.ctrl.pcalu_op), int'(wimp51_pkg::PC_INC));
    check("snapshot psen_n", int'(psen_n), 0);
    @(posedge clk); #1;          // end of Decode: operand in AUX
    check("snapshot aux", int'(dut.aux), 'h09);
    @(posedge clk); #1;          // end of Execute
    check("snapshot result", int'(acc_out), 'h49);
    check("snapshot next pc", int'(addr_bus), 'h04);

    // 3. Random programs of valid instructions.
    for (int p = 0; p < 40; p++) begin
      int a;
      a = 0;
      while (a < 256) begin
        int k;
        k = $urandom_range(0, 12);
        case (k)
          0: begin rom[a] = 8'h74; rom[(a+1)%256] = 8'($urandom); end
          1: rom[a] = {5'b11101, 3'($urandom)};
          2: rom[a] = {5'b11111, 3'($urandom)};
          3: begin rom[a] = 8'h34; rom[(a+1)%256] = 8'($urandom); end
          4: rom[a] = {5'b00111, 3'($urandom)};
          5: rom[a] = {5'b01011, 3'($urandom)};
          6: rom[a] = {5'b01001, 3'($urandom)};
          7: rom[a] = {5'b01101, 3'($urandom)};
          8: rom[a] = 8'hC4;
          9: rom[a] = 8'hC3;
          10: rom[a] = 8'hD3;
          11: begin rom[a] = 8'h80; rom[(a+1)%256] = 8'($urandom_range(0, 40)); end
          default: begin rom[a] = 8'h60; rom[(a+1)%256] = 8'($urandom); end
        endcase
        a += (k == 0 || k == 3 || k == 11 || k == 12) ? 2 : 1;
      end
      reset_cpu();
      repeat (300) run_instr();
    end

    $display("mechanisms: imm=%0d rsrc=%0d rwrite=%0d mov=%0d addc=%0d anl=%0d orl=%0d xrl=%0d swap=%0d",
             n_imm, n_rsrc, n_rwrite, n_mov, n_addc, n_anl, n_orl, n_xrl, n_swap);
    $display("            clrc=%0d setc=%0d cin=%0d cout=%0d sjmp=%0d jz_taken=%0d jz_not=%0d other=%0d",
             n_clrc, n_setc, n_cin, n_cout, n_sjmp, n_jz_taken, n_jz_not, n_other);
    if (n_imm == 0)      begin failures++; $display("never: immediate fetch"); end
    if (n_rsrc == 0)     begin failures++; $display("never: register fetch"); end
    if (n_rwrite == 0)   begin failures++; $display("never: register write"); end
    if (n_mov == 0)      begin failures++; $display("never: MOV"); end
    if (n_addc == 0)     begin failures++; $display("never: ADDC"); end
    if (n_anl == 0)      begin failures++; $display("never: ANL"); end
    if (n_orl == 0)      begin failures++; $display("never: ORL"); end
    if (n_xrl == 0)      begin failures++; $display("never: XRL"); end
    if (n_swap == 0)     begin failures++; $display("never: SWAP"); end
    if (n_clrc == 0)     begin failures++; $display("never: CLR C"); end
    if (n_setc == 0)     begin failures++; $display("never: SETB C"); end
    if (n_cin == 0)      begin failures++; $display("never: carry in"); end
    if (n_cout == 0)     begin failures++; $display("never: carry out"); end
    if (n_sjmp == 0)     begin failures++; $display("never: SJMP"); end
    if (n_jz_taken == 0) begin failures++; $display("never: JZ taken"); end
    if (n_jz_not == 0)   begin failures++; $display("never: JZ not taken"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

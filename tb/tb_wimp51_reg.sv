// tb_wimp51_reg: self-checking test of the write-enabled register.
//
// Drives random data with a random write enable for a few hundred cycles and
// pulses reset now and then, comparing q every cycle with a reference value
// kept in the testbench (load on we, hold otherwise, clear on reset).
module tb_wimp51_reg;
  logic       clk = 1'b0;
  logic       rst;
  logic       we;
  logic [7:0] d, q, model;
  int checks = 0, failures = 0;

  wimp51_reg dut (.clk(clk), .rst(rst), .we(we), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; we = 1'b0; d = '0;
    @(posedge clk); #1;
    model = '0;
    rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      we  = ($urandom_range(0, 1) == 1);
      d   = 8'($urandom);
      rst = ($urandom_range(0, 49) == 0);
      @(posedge clk); #1;
      if (rst)     model = '0;
      else if (we) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("mismatch cycle %0d: q=%h expected %h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_wimp51_regfile: self-checking test of the 8 x 8-bit register file.
//
// After reset all eight registers must read 00h. Then random writes and
// reads through the single register select are compared with an array
// model; every register is finally read back.
module tb_wimp51_regfile;
  import wimp51_pkg::*;
  logic  clk = 1'b0;
  logic  rst, we;
  rsel_t sel;
  byte_t wdata, rdata;
  byte_t model [8];
  int checks = 0, failures = 0;

  wimp51_regfile dut (.clk(clk), .rst(rst), .we(we), .sel(sel),
                      .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  task automatic check_read(input rsel_t s);
    sel = s; #1;
    checks++;
    if (rdata !== model[s]) begin
      failures++;
      $display("R%0d reads %h, expected %h", s, rdata, model[s]);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; we = 1'b0; sel = '0; wdata = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    foreach (model[i]) model[i] = '0;
    for (int r = 0; r < 8; r++) check_read(rsel_t'(r));
    for (int i = 0; i < 800; i++) begin
      we    = ($urandom_range(0, 1) == 1);
      sel   = rsel_t'($urandom_range(0, 7));
      wdata = 8'($urandom);
      #1;
      // read is combinational: check before the edge
      checks++;
      if (rdata !== model[sel]) begin
        failures++;
        $display("cycle %0d: R%0d reads %h, expected %h", i, sel, rdata, model[sel]);
      end
      @(posedge clk); #1;
      if (we) model[sel] = wdata;
    end
    we = 1'b0;
    for (int r = 0; r < 8; r++) check_read(rsel_t'(r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

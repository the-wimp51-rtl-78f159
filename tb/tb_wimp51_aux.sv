// tb_wimp51_aux: self-checking test of the auxiliary register.
//
// Drives random data-bus and register-file values, a random source select
// (AUX_CTL) and a random write enable, and checks every cycle that AUX loaded
// the selected source when enabled and held its value otherwise.
module tb_wimp51_aux;
  import wimp51_pkg::*;
  logic     clk = 1'b0;
  logic     rst, we;
  aux_ctl_t aux_ctl;
  byte_t    data_bus, rf_data, q, model;
  int checks = 0, failures = 0;
  int n_bus = 0, n_rf = 0;

  wimp51_aux dut (.clk(clk), .rst(rst), .we(we), .aux_ctl(aux_ctl),
                  .data_bus(data_bus), .rf_data(rf_data), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; we = 1'b0; aux_ctl = AUX_FROM_REGFILE; data_bus = '0; rf_data = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    model = '0;
    checks++;
    if (q !== 8'h00) failures++;
    for (int i = 0; i < 500; i++) begin
      we       = ($urandom_range(0, 2) != 0);
      aux_ctl  = aux_ctl_t'($urandom_range(0, 1));
      data_bus = 8'($urandom);
      rf_data  = 8'($urandom);
      @(posedge clk); #1;
      if (we) begin
        if (aux_ctl == AUX_FROM_DATABUS) begin model = data_bus; n_bus++; end
        else                             begin model = rf_data;  n_rf++;  end
      end
      checks++;
      if (q !== model) begin
        failures++;
        $display("mismatch cycle %0d: q=%h expected %h (ctl=%0d we=%0d)",
                 i, q, model, aux_ctl, we);
      end
    end
    if (n_bus == 0 || n_rf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

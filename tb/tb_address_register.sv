// tb_address_register: self-checking test of the address register: reset
// value, load of an immediate, one-word increments, wrap at 2^32 and load
// priority over increment, against a model kept in the testbench.
module tb_address_register;
  logic clk = 0, rst_n = 0, ld = 0, inc = 0;
  logic [31:0] ld_val = 0, q, model;
  int checks = 0, failures = 0;

  address_register #(.AW(32)) dut (.clk, .rst_n, .ld, .ld_val, .inc, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (q !== 32'h0) begin failures++; $display("FAIL reset value %h", q); end
    for (int t = 0; t < 300; t++) begin
      ld  = ($urandom % 5) == 0;
      inc = ($urandom % 2) == 0;
      ld_val = (t == 10) ? 32'hffff_fffe : $urandom;
      @(posedge clk);
      if (ld) model = ld_val; else if (inc) model = model + 1;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL t=%0d q=%h expected %h", t, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

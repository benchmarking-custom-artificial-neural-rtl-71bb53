// tb_input_regfile: self-checking test of the 16 x 32-bit input register file.
// Random writes and random group selects are applied; every cycle the four
// group outputs (gdata[k] = I(4k + gsel[k])) and the move read port are
// compared with a model array kept in the testbench. Reset must clear all.
module tb_input_regfile;
  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [3:0][1:0] gsel = '0;
  logic [3:0][31:0] gdata;
  logic [31:0] model [16];
  int checks = 0, failures = 0;

  input_regfile #(.DW(32), .N_REGS(16), .GROUPS(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (gdata[k] !== model[4*k + int'(gsel[k])]) begin
        failures++;
        $display("FAIL group %0d sel %0d: %h expected %h", k, gsel[k], gdata[k], model[4*k + int'(gsel[k])]);
      end
    end
    checks++;
    if (rdata !== model[raddr]) begin
      failures++;
      $display("FAIL read I%0d: %h expected %h", raddr, rdata, model[raddr]);
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      raddr = 4'(i); gsel = {4{2'(i)}}; #1 compare();
    end
    for (int t = 0; t < 600; t++) begin
      we = (t < 16) || ($urandom % 2 == 1);
      waddr = (t < 16) ? 4'(t) : 4'($urandom);
      wdata = $urandom;
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      for (int k = 0; k < 4; k++) gsel[k] = 2'($urandom);
      raddr = 4'($urandom);
      #1 compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_weight_regfile: self-checking test of the 4 x 32-bit weight register
// file. Random writes are applied; the four parallel lane outputs and the
// move read port are compared with a model array after every clock edge.
module tb_weight_regfile;
  logic clk = 0, rst_n = 0, we = 0;
  logic [1:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [3:0][31:0] lane_w;
  logic [31:0] model [4];
  int checks = 0, failures = 0;

  weight_regfile #(.DW(32), .N_REGS(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      we = 1'($urandom);
      waddr = 2'($urandom);
      wdata = $urandom;
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1 raddr = 2'($urandom);
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (lane_w[k] !== model[k]) begin failures++; $display("FAIL W%0d %h expected %h", k, lane_w[k], model[k]); end
      end
      checks++;
      if (rdata !== model[raddr]) begin failures++; $display("FAIL read W%0d", raddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

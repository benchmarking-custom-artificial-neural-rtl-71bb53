// tb_output_regfile: self-checking test of the eight 32-bit output registers
// used as four 64-bit pairs. Random per-pair writes are applied; each 32-bit
// register (even = low half, odd = high half) and the pair-0 accumulator view
// are compared with a model after every clock edge.
module tb_output_regfile;
  logic clk = 0, rst_n = 0;
  logic [3:0] we = 0;
  logic [3:0][63:0] wdata = '0;
  logic [7:0][31:0] q;
  logic [63:0] acc;
  logic [63:0] model [4];
  int checks = 0, failures = 0;

  output_regfile #(.DW(32), .N_OUT(8)) dut (.*);

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
      we = 4'($urandom);
      for (int k = 0; k < 4; k++) wdata[k] = {$urandom, $urandom};
      @(posedge clk);
      for (int k = 0; k < 4; k++) if (we[k]) model[k] = wdata[k];
      #1;
      for (int r = 0; r < 8; r++) begin
        logic [31:0] e;
        e = (r % 2 == 1) ? model[r/2][63:32] : model[r/2][31:0];
        checks++;
        if (q[r] !== e) begin failures++; $display("FAIL O%0d %h expected %h", r, q[r], e); end
      end
      checks++;
      if (acc !== model[0]) begin failures++; $display("FAIL acc"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

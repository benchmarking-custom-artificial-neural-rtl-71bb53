// tb_multiplier: self-checking test of the 32 x 32 signed multiplier.
// Corner operands (zero, one, minus one, the extreme values) and random
// operands are multiplied; the reference is the product of the operands
// sign-extended to 64 bits, computed in the testbench.
module tb_multiplier;
  logic [31:0] a, b;
  logic [63:0] p;
  int checks = 0, failures = 0;

  multiplier #(.DW(32)) dut (.a, .b, .p);

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    logic signed [63:0] ref_p;
    a = x; b = y;
    #1;
    ref_p = 64'(signed'(x)) * 64'(signed'(y));
    checks++;
    if (p !== ref_p) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", x, y, p, ref_p);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [31:0] c [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h7fff_ffff, 32'h8000_0000, 32'h0001_0000};
    foreach (c[i]) foreach (c[j]) check(c[i], c[j]);
    repeat (500) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_split_adder: self-checking test of the reconfigurable adder.
// Lane mode: each of the four 64-bit outputs must be the sign-extended sum of
// its two 32-bit operands. Tree mode: output 0 must be the accumulator plus
// the four 64-bit products (modulo 2^64) and outputs 1..3 zero. References are
// computed in the testbench from random and extreme operands.
module tb_split_adder;
  import ann_pkg::*;
  add_mode_e               mode;
  logic [3:0][31:0]        a, b;
  logic [3:0][63:0]        p, sum;
  logic [63:0]             acc;
  int checks = 0, failures = 0;

  split_adder #(.DW(32), .LANES(4)) dut (.mode, .a, .b, .p, .acc, .sum);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      for (int k = 0; k < 4; k++) begin
        a[k] = (t < 4) ? ((t % 2 == 1) ? 32'h7fff_ffff : 32'h8000_0000) : $urandom;
        b[k] = (t < 4) ? ((t < 2) ? 32'h7fff_ffff : 32'h8000_0000) : $urandom;
        p[k] = {$urandom, $urandom};
      end
      acc = {$urandom, $urandom};
      mode = ADD_LANES;
      #1;
      for (int k = 0; k < 4; k++) begin
        logic signed [63:0] r;
        r = 64'(signed'(a[k])) + 64'(signed'(b[k]));
        checks++;
        if (sum[k] !== r) begin
          failures++;
          $display("FAIL lane %0d: %h + %h = %h, expected %h", k, a[k], b[k], sum[k], r);
        end
      end
      mode = ADD_TREE;
      #1;
      begin
        logic [63:0] r;
        r = acc + p[0] + p[1] + p[2] + p[3];
        checks++;
        if (sum[0] !== r || sum[1] != 0 || sum[2] != 0 || sum[3] != 0) begin
          failures++;
          $display("FAIL tree: %h, expected %h", sum[0], r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

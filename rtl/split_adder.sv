// split_adder: the accelerator's reconfigurable adder.
//
// It works either as four independent 2-input 32-bit adders or as one 4-input
// 64-bit adder, the two configurations given for the accelerator's adder.
//   mode = ADD_LANES : sum[k] = a[k] + b[k] for every lane k. The operands are
//                      signed 32-bit values; the 33-bit result is sign-extended
//                      to 64 bits so that it fills an output register pair
//                      without overflow (this widening is this design's choice).
//   mode = ADD_TREE  : sum[0] = acc + p[0] + p[1] + p[2] + p[3], the sum of the
//                      four 64-bit products plus the accumulator input (the
//                      feedback input drawn under the adder); sum[1..3] = 0.
//                      The 64-bit sum wraps modulo 2^64.
// In the lane mode a[k] is the selected input register of group k and b[k] the
// weight Wk. Purely combinational.
module split_adder #(
  parameter int unsigned DW    = 32,
  parameter int unsigned LANES = 4,
  localparam int unsigned RW   = 2 * DW
) (
  input  ann_pkg::add_mode_e           mode,
  input  logic [LANES-1:0][DW-1:0]     a,
  input  logic [LANES-1:0][DW-1:0]     b,
  input  logic [LANES-1:0][2*DW-1:0]   p,
  input  logic [2*DW-1:0]              acc,
  output logic [LANES-1:0][2*DW-1:0]   sum
);

  always_comb begin
    logic [2*DW-1:0] tree;
    sum  = '0;
    tree = acc;
    if (mode == ann_pkg::ADD_LANES) begin
      for (int unsigned k = 0; k < LANES; k++)
        sum[k] = RW'($signed(a[k])) + RW'($signed(b[k]));
    end else begin
      for (int unsigned k = 0; k < LANES; k++)
        tree = tree + p[k];
      sum[0] = tree;
    end
  end

endmodule

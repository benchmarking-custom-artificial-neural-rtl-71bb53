// multiplier: one 32 x 32-bit signed multiplier with a full 64-bit product.
//
// The accelerator has four of these, one per lane, each multiplying the
// selected input register of its group by the lane's weight register. The
// product is kept at full width so that no precision is lost before the
// adder. Operands are two's-complement signed integers (the benchmark data
// are 32-bit signed integers). Purely combinational.
module multiplier #(
  parameter int unsigned DW = 32
) (
  input  logic [DW-1:0]   a,
  input  logic [DW-1:0]   b,
  output logic [2*DW-1:0] p
);

  assign p = $signed(a) * $signed(b);

endmodule

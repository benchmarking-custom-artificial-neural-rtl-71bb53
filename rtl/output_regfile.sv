// output_regfile: the 8 x 32-bit output registers O0..O7.
//
// The eight registers also work as four 64-bit registers: pair k is
// O(2k+1):O(2k), with the low half in the even register. Each pair has its own
// write enable and 64-bit write data, so the four lanes can store their
// results in the same cycle. All eight registers are visible on q, and pair 0
// is also given as a 64-bit value on acc, the running sum of the
// multiply-accumulate operation. Writes happen at the rising clock edge;
// reset (asynchronous, active low) clears all registers, which is this
// design's choice.
module output_regfile #(
  parameter int unsigned DW    = 32,
  parameter int unsigned N_OUT = 8,
  localparam int unsigned NP   = N_OUT / 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NP-1:0]            we,
  input  logic [NP-1:0][2*DW-1:0]  wdata,
  output logic [N_OUT-1:0][DW-1:0] q,
  output logic [2*DW-1:0]          acc
);

  logic [NP-1:0][2*DW-1:0] pairs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pairs <= '0;
    else begin
      for (int unsigned k = 0; k < NP; k++)
        if (we[k]) pairs[k] <= wdata[k];
    end
  end

  always_comb begin
    for (int unsigned k = 0; k < NP; k++) begin
      q[2*k]   = pairs[k][DW-1:0];
      q[2*k+1] = pairs[k][2*DW-1:DW];
    end
  end

  assign acc = pairs[0];

endmodule

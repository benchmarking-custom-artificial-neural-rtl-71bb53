// address_register: the 32-bit memory address register.
//
// It is loaded with an immediate by the "move #immediate" operation and
// supplies the memory address for loads into the input and weight registers.
// For repeated loads it steps by one word after every word loaded (inc), so a
// block of consecutive words fills consecutive registers; the step of one is
// this design's choice (the address unit is one 32-bit word). A load has
// priority over an increment. Reset (asynchronous, active low) clears it.
module address_register #(
  parameter int unsigned AW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ld,
  input  logic [AW-1:0] ld_val,
  input  logic          inc,
  output logic [AW-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (ld)  q <= ld_val;
    else if (inc) q <= q + AW'(1);
  end

endmodule

// weight_regfile: the 4 x 32-bit weight register file W0..W3.
//
// Weight Wk is the second operand of multiplier lane k, so all four registers
// are read in parallel on lane_w. A separate read port (raddr/rdata) serves
// register-to-register moves. One write port (we/waddr/wdata) is written at
// the rising clock edge; reads are combinational. Reset (asynchronous, active
// low) clears the registers, which is this design's choice.
module weight_regfile #(
  parameter int unsigned DW     = 32,
  parameter int unsigned N_REGS = 4,
  localparam int unsigned IW    = $clog2(N_REGS)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      we,
  input  logic [IW-1:0]             waddr,
  input  logic [DW-1:0]             wdata,
  output logic [N_REGS-1:0][DW-1:0] lane_w,
  input  logic [IW-1:0]             raddr,
  output logic [DW-1:0]             rdata
);

  logic [N_REGS-1:0][DW-1:0] regs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  regs        <= '0;
    else if (we) regs[waddr] <= wdata;
  end

  assign lane_w = regs;
  assign rdata  = regs[raddr];

endmodule

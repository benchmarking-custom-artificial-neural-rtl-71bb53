// input_regfile: the 16 x 32-bit input register file I0..I15.
//
// The registers form four groups of four: group k holds I(4k)..I(4k+3) and
// feeds multiplier lane k. Only one register of each group is visible at a
// time, so four registers are read in parallel; gsel[k] picks which member of
// group k drives gdata[k] (the 4:1 operand multiplexers in front of the
// multipliers). A separate read port (raddr/rdata) serves register-to-register
// moves. One write port (we/waddr/wdata) is written at the rising clock edge.
// Reads are combinational. Reset (asynchronous, active low) clears all
// registers; reset behaviour is this design's choice.
module input_regfile #(
  parameter int unsigned DW     = 32,
  parameter int unsigned N_REGS = 16,
  parameter int unsigned GROUPS = 4,
  localparam int unsigned GSIZE = N_REGS / GROUPS,
  localparam int unsigned IW    = $clog2(N_REGS),
  localparam int unsigned SW    = $clog2(GSIZE)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         we,
  input  logic [IW-1:0]                waddr,
  input  logic [DW-1:0]                wdata,
  input  logic [GROUPS-1:0][SW-1:0]    gsel,
  output logic [GROUPS-1:0][DW-1:0]    gdata,
  input  logic [IW-1:0]                raddr,
  output logic [DW-1:0]                rdata
);

  logic [N_REGS-1:0][DW-1:0] regs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  regs        <= '0;
    else if (we) regs[waddr] <= wdata;
  end

  always_comb begin
    for (int unsigned k = 0; k < GROUPS; k++)
      gdata[k] = regs[k * GSIZE + int'(gsel[k])];
  end

  assign rdata = regs[raddr];

endmodule

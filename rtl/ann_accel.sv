// ann_accel: custom accelerator for the multiply-accumulate work of neural
// network layers.
//
// While one layer is computed its inputs stay fixed and only the weights change
// from neuron to neuron, so the inputs are held in a 16 x 32-bit input register
// file (four groups of four) and the weights in a 4 x 32-bit weight register
// file. Four signed 32 x 32 multipliers work in parallel: lane k multiplies
// I(4k+s) by Wk, where s picks one register of each group. A split adder then
// either adds I(4k+s) + Wk in four independent 32-bit lanes or sums the four
// 64-bit products together with the running sum (a 4-input 64-bit addition).
// Results go to eight 32-bit output registers, used as four 64-bit pairs: lane
// k writes pair k (O(2k+1):O(2k)); the multiply-accumulate sum lives in O1:O0.
// An address register points into an external memory from which the input and
// weight registers are loaded, one or several consecutive words at a time.
//
// One MAC step therefore evaluates four of a neuron's input-weight products per
// clock cycle, and a repeated MAC (count 4) evaluates a 16-input neuron in four
// cycles. The activation function is not part of the accelerator.
//
// Interface: instructions (ann_pkg::instr_t) on instr_valid/instr_ready; memory
// reads as a one-cycle mem_req with mem_addr, answered later by mem_rvalid with
// mem_rdata (one request outstanding); out_regs shows O0..O7 and addr the
// address register. Timing: move, multiply and add finish in the accept cycle
// (results visible after the next rising edge); MAC takes count cycles; a load
// takes count x (memory latency + 1) cycles. All registers reset
// asynchronously on rst_n low. The register set, the operations and the data
// flow follow the accelerator as published; instruction encoding, handshakes,
// signed arithmetic and reset are this design's choices.
module ann_accel
  import ann_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      instr_valid,
  input  instr_t                    instr,
  output logic                      instr_ready,
  output logic                      busy,
  output logic                      mem_req,
  output logic [AW-1:0]             mem_addr,
  input  logic                      mem_rvalid,
  input  logic [DW-1:0]             mem_rdata,
  output logic [N_OUT-1:0][DW-1:0]  out_regs,
  output logic [AW-1:0]             addr
);

  // controller outputs
  logic       in_we, in_from_mem, w_we, w_from_mem;
  logic [3:0] in_waddr, in_raddr;
  logic [1:0] w_waddr, w_raddr;
  logic       addr_ld, addr_inc, mac_clr;
  logic [1:0] sel;
  add_mode_e  add_mode;
  out_src_e   out_src;
  logic [LANES-1:0] out_we;

  // datapath
  logic [LANES-1:0][1:0]      gsel;
  logic [LANES-1:0][DW-1:0]   in_lane, w_lane;
  logic [DW-1:0]              in_rdata, w_rdata;
  logic [LANES-1:0][PW-1:0]   prod, sum, out_wdata;
  logic [PW-1:0]              acc_q, acc_in;

  ann_controller u_ctrl (
    .clk, .rst_n,
    .instr_valid, .instr, .instr_ready,
    .mem_req, .mem_rvalid,
    .in_we, .in_waddr, .in_from_mem, .in_raddr,
    .w_we, .w_waddr, .w_from_mem, .w_raddr,
    .addr_ld, .addr_inc,
    .sel, .add_mode, .out_src, .out_we, .mac_clr, .busy
  );

  address_register #(.AW(AW)) u_addr (
    .clk, .rst_n,
    .ld(addr_ld), .ld_val(instr.imm), .inc(addr_inc), .q(addr)
  );
  assign mem_addr = addr;

  assign gsel = {LANES{sel}};

  input_regfile #(.DW(DW), .N_REGS(N_IN), .GROUPS(LANES)) u_in (
    .clk, .rst_n,
    .we(in_we), .waddr(in_waddr),
    .wdata(in_from_mem ? mem_rdata : in_rdata),
    .gsel, .gdata(in_lane),
    .raddr(in_raddr), .rdata(in_rdata)
  );

  weight_regfile #(.DW(DW), .N_REGS(N_W)) u_w (
    .clk, .rst_n,
    .we(w_we), .waddr(w_waddr),
    .wdata(w_from_mem ? mem_rdata : w_rdata),
    .lane_w(w_lane),
    .raddr(w_raddr), .rdata(w_rdata)
  );

  for (genvar k = 0; k < LANES; k++) begin : g_lane
    multiplier #(.DW(DW)) u_mul (.a(in_lane[k]), .b(w_lane[k]), .p(prod[k]));
    // output multiplexer of pair k: multiplier product or adder output bus
    assign out_wdata[k] = (out_src == OSRC_MUL) ? prod[k] : sum[k];
  end

  assign acc_in = mac_clr ? '0 : acc_q;

  split_adder #(.DW(DW), .LANES(LANES)) u_add (
    .mode(add_mode), .a(in_lane), .b(w_lane), .p(prod), .acc(acc_in), .sum
  );

  output_regfile #(.DW(DW), .N_OUT(N_OUT)) u_out (
    .clk, .rst_n,
    .we(out_we), .wdata(out_wdata), .q(out_regs), .acc(acc_q)
  );

endmodule

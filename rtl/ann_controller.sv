// ann_controller: decodes and sequences the accelerator's operations.
//
// Instructions (ann_pkg::instr_t) arrive on a valid/ready handshake and are
// accepted in a cycle where both are high. The operations are those of the
// accelerator's operation table:
//   MOV_I, MOV_W, MOV_ADDR : register moves and the address-register load;
//                            done in the accept cycle.
//   MUL, ADD               : on the lanes in the mask, I(4k+s) op Wk is written
//                            to output pair k; done in the accept cycle. A mask
//                            with one bit gives the single-lane rows of the
//                            table, 4'b1111 the all-lane rows.
//   MAC (repeat)           : O1:O0 <- O1:O0 (or 0 when clr) + sum of the four
//                            lane products, one step per cycle; with count c
//                            the step repeats c times with the input select s
//                            stepping by one each cycle (modulo 4), so c = 4
//                            covers all sixteen input registers. ready is low
//                            for the c-1 extra cycles.
//   LD_I, LD_W (repeat)    : count words are read from memory, starting at the
//                            address register, into consecutive registers
//                            starting at dst (wrapping modulo the file size).
//                            Each word is one request (mem_req pulse, address
//                            taken from the address register) and one
//                            response (mem_rvalid), after which the address
//                            register steps by one. ready is low meanwhile.
// The instruction format, the handshakes, the step of the repeats and the
// one-outstanding-request memory protocol are this design's own choices.
module ann_controller
  import ann_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // instruction stream
  input  logic       instr_valid,
  input  instr_t     instr,
  output logic       instr_ready,
  // memory read handshake
  output logic       mem_req,
  input  logic       mem_rvalid,
  // input register file
  output logic       in_we,
  output logic [3:0] in_waddr,
  output logic       in_from_mem,   // write data: 1 memory word, 0 move source
  output logic [3:0] in_raddr,
  // weight register file
  output logic       w_we,
  output logic [1:0] w_waddr,
  output logic       w_from_mem,
  output logic [1:0] w_raddr,
  // address register
  output logic       addr_ld,
  output logic       addr_inc,
  // datapath
  output logic [1:0] sel,           // input select s, common to the four groups
  output add_mode_e  add_mode,
  output out_src_e   out_src,
  output logic [3:0] out_we,        // write enables of the output pairs
  output logic       mac_clr,
  output logic       busy
);

  typedef enum logic [1:0] {S_IDLE, S_MAC, S_LD_REQ, S_LD_WAIT} state_e;

  state_e     state, state_n;
  logic [3:0] ld_idx, ld_idx_n;
  logic [4:0] cnt, cnt_n;
  logic       ld_w, ld_w_n;
  logic [1:0] mac_s, mac_s_n;
  logic [4:0] icount;

  assign icount = (instr.count == 5'd0) ? 5'd1 : instr.count;

  always_comb begin
    state_n     = state;
    ld_idx_n    = ld_idx;
    cnt_n       = cnt;
    ld_w_n      = ld_w;
    mac_s_n     = mac_s;
    instr_ready = 1'b0;
    mem_req     = 1'b0;
    in_we       = 1'b0;
    in_waddr    = instr.dst;
    in_from_mem = 1'b0;
    in_raddr    = instr.src;
    w_we        = 1'b0;
    w_waddr     = instr.dst[1:0];
    w_from_mem  = 1'b0;
    w_raddr     = instr.src[1:0];
    addr_ld     = 1'b0;
    addr_inc    = 1'b0;
    sel         = instr.src[1:0];
    add_mode    = ADD_LANES;
    out_src     = OSRC_MUL;
    out_we      = '0;
    mac_clr     = 1'b0;

    unique case (state)
      S_IDLE: begin
        instr_ready = 1'b1;
        if (instr_valid) begin
          unique case (instr.op)
            OP_MOV_I:    in_we   = 1'b1;
            OP_MOV_W:    w_we    = 1'b1;
            OP_MOV_ADDR: addr_ld = 1'b1;
            OP_LD_I, OP_LD_W: begin
              ld_idx_n = instr.dst;
              ld_w_n   = (instr.op == OP_LD_W);
              cnt_n    = icount;
              state_n  = S_LD_REQ;
            end
            OP_MUL: begin
              out_src = OSRC_MUL;
              out_we  = instr.lanes;
            end
            OP_ADD: begin
              add_mode = ADD_LANES;
              out_src  = OSRC_ADDER;
              out_we   = instr.lanes;
            end
            OP_MAC: begin
              add_mode = ADD_TREE;
              out_src  = OSRC_ADDER;
              out_we   = 4'b0001;
              mac_clr  = instr.clr;
              if (icount > 5'd1) begin
                mac_s_n = instr.src[1:0] + 2'd1;
                cnt_n   = icount - 5'd1;
                state_n = S_MAC;
              end
            end
            default: ;  // OP_NOP and unused codes do nothing
          endcase
        end
      end

      S_MAC: begin
        sel      = mac_s;
        add_mode = ADD_TREE;
        out_src  = OSRC_ADDER;
        out_we   = 4'b0001;
        mac_s_n  = mac_s + 2'd1;
        cnt_n    = cnt - 5'd1;
        if (cnt == 5'd1) state_n = S_IDLE;
      end

      S_LD_REQ: begin
        mem_req = 1'b1;
        state_n = S_LD_WAIT;
      end

      S_LD_WAIT: begin
        in_waddr    = ld_idx;
        w_waddr     = ld_idx[1:0];
        in_from_mem = 1'b1;
        w_from_mem  = 1'b1;
        if (mem_rvalid) begin
          in_we    = !ld_w;
          w_we     = ld_w;
          addr_inc = 1'b1;
          ld_idx_n = ld_w ? {2'b00, ld_idx[1:0] + 2'd1} : ld_idx + 4'd1;
          cnt_n    = cnt - 5'd1;
          state_n  = (cnt == 5'd1) ? S_IDLE : S_LD_REQ;
        end
      end

      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      ld_idx <= '0;
      cnt    <= '0;
      ld_w   <= 1'b0;
      mac_s  <= '0;
    end else begin
      state  <= state_n;
      ld_idx <= ld_idx_n;
      cnt    <= cnt_n;
      ld_w   <= ld_w_n;
      mac_s  <= mac_s_n;
    end
  end

  assign busy = (state != S_IDLE);

  // A memory response is only legal while a load waits for one.
  a_rvalid_expected: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rvalid |-> state == S_LD_WAIT);
  // A request is answered before the next one is made.
  a_one_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req |=> !mem_req);

endmodule

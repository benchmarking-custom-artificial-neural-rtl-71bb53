// tb_ann_accel: end-to-end test of the accelerator at its default sizes.
//
// A reference model of the register set (I0..I15, W0..W3, O0..O7 as four
// 64-bit pairs, the address register) is kept in the testbench and updated by
// every instruction; after each instruction that the test waits on, the
// output registers and the address register are compared with it.
//   Phase 1: loads of all input and weight registers, then the operation rows
//            of the operation table one by one (single-lane and all-lane
//            multiply and add, moves, MAC with and without clear, MAC repeat).
//   Phase 2: 400 random instructions, often issued back to back so that they
//            stall behind repeated MACs and loads; the memory answers with a
//            random latency of 1..3 cycles.
//   Phase 3: the n-input neuron benchmark for n = 2, 4, ..., 16. Inputs stay
//            loaded; for each group of four inputs the weights are loaded and
//            one MAC is issued. The number of MAC instructions must be
//            ceil(n/4) (1,1,2,2,3,3,4,4) and the 64-bit sum must equal the dot
//            product computed here.
// Every MAC must take count cycles and every multiply or add one cycle. Each
// mechanism (moves, repeated loads, single- and all-lane operations in both
// adder modes, MAC clear/accumulate/repeat, memory wait, instruction stall)
// is counted, and one that never happens counts as a failure.
module tb_ann_accel;
  import ann_pkg::*;

  localparam int unsigned MEM_DEPTH = 256;
  // MAC instructions the benchmark table gives for n = 2, 4, ..., 16
  localparam int TABLE_VI [8] = '{1, 1, 2, 2, 3, 3, 4, 4};

  logic clk = 0, rst_n = 0;
  logic instr_valid = 0, instr_ready, busy;
  instr_t instr = '0;
  logic mem_req, mem_rvalid;
  logic [31:0] mem_addr, mem_rdata, addr;
  logic [7:0][31:0] out_regs;

  ann_accel dut (.*);
  ann_mem_model #(.DEPTH(MEM_DEPTH), .LAT_MIN(1), .LAT_MAX(3)) u_mem (
    .clk, .req(mem_req), .addr(mem_addr), .rvalid(mem_rvalid), .rdata(mem_rdata)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // reference state
  logic [31:0] mI [16];
  logic [31:0] mW [4];
  logic [63:0] mO [4];
  logic [31:0] mA;
  // mechanism counters
  int n_mov_i, n_mov_w, n_mov_addr, n_ld_i_rpt, n_ld_w_rpt, n_mul_one, n_mul_all;
  int n_add_one, n_add_all, n_mac_clr, n_mac_acc, n_mac_rpt, n_stall;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] sx(input logic [31:0] v);
    return 64'(signed'(v));
  endfunction

  function automatic instr_t mk(opcode_e op, int dst, int src, int lanes, int count, bit clr, logic [31:0] imm);
    instr_t i;
    i = '0; i.op = op; i.dst = 4'(dst); i.src = 4'(src); i.lanes = 4'(lanes);
    i.count = 5'(count); i.clr = clr; i.imm = imm;
    return i;
  endfunction

  // reference model of one instruction
  task automatic model(input instr_t i);
    int c;
    logic [1:0] s;
    logic [63:0] acc;
    c = (i.count == 0) ? 1 : int'(i.count);
    s = i.src[1:0];
    case (i.op)
      OP_MOV_I:    begin mI[i.dst] = mI[i.src]; n_mov_i++; end
      OP_MOV_W:    begin mW[i.dst[1:0]] = mW[i.src[1:0]]; n_mov_w++; end
      OP_MOV_ADDR: begin mA = i.imm; n_mov_addr++; end
      OP_LD_I: begin
        for (int j = 0; j < c; j++) begin
          mI[4'(int'(i.dst) + j)] = u_mem.mem[mA % MEM_DEPTH];
          mA++;
        end
        if (c > 1) n_ld_i_rpt++;
      end
      OP_LD_W: begin
        for (int j = 0; j < c; j++) begin
          mW[2'(int'(i.dst) + j)] = u_mem.mem[mA % MEM_DEPTH];
          mA++;
        end
        if (c > 1) n_ld_w_rpt++;
      end
      OP_MUL: begin
        for (int k = 0; k < 4; k++)
          if (i.lanes[k]) mO[k] = sx(mI[4*k + int'(s)]) * sx(mW[k]);
        if (i.lanes == 4'b1111) n_mul_all++; else if ($countones(i.lanes) == 1) n_mul_one++;
      end
      OP_ADD: begin
        for (int k = 0; k < 4; k++)
          if (i.lanes[k]) mO[k] = sx(mI[4*k + int'(s)]) + sx(mW[k]);
        if (i.lanes == 4'b1111) n_add_all++; else if ($countones(i.lanes) == 1) n_add_one++;
      end
      OP_MAC: begin
        acc = i.clr ? 64'd0 : mO[0];
        for (int j = 0; j < c; j++) begin
          for (int k = 0; k < 4; k++) acc += sx(mI[4*k + int'(s)]) * sx(mW[k]);
          s++;
        end
        mO[0] = acc;
        if (i.clr) n_mac_clr++; else n_mac_acc++;
        if (c > 1) n_mac_rpt++;
      end
      default: ;
    endcase
  endtask

  // Present an instruction at the current cycle and hold it until accepted.
  task automatic send(input instr_t i);
    instr = i;
    instr_valid = 1;
    forever begin
      @(negedge clk);
      if (instr_ready) break;
      n_stall++;
    end
    @(posedge clk);
    #1 instr_valid = 0;
    model(i);
  endtask

  // waits until the accelerator is idle; returns the cycles spent after the
  // accept cycle
  task automatic wait_idle(output int extra);
    extra = 0;
    while (busy) begin @(posedge clk); #1; extra++; end
  endtask

  task automatic compare(input string what);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if ({out_regs[2*k+1], out_regs[2*k]} !== mO[k]) begin
        failures++;
        $display("FAIL %s: O%0d:O%0d = %h, expected %h", what, 2*k+1, 2*k, {out_regs[2*k+1], out_regs[2*k]}, mO[k]);
      end
    end
    checks++;
    if (addr !== mA) begin failures++; $display("FAIL %s: address register %h, expected %h", what, addr, mA); end
  endtask

  // issue, wait for completion, check state and the cycle count of compute ops
  task automatic run(input instr_t i, input string what);
    int c, extra;
    send(i);
    wait_idle(extra);
    compare(what);
    c = (i.count == 0) ? 1 : int'(i.count);
    if (i.op inside {OP_MUL, OP_ADD, OP_MAC}) begin
      checks++;
      if (extra + 1 != ((i.op == OP_MAC) ? c : 1)) begin
        failures++;
        $display("FAIL %s: took %0d cycles", what, extra + 1);
      end
    end
  endtask

  function automatic logic [31:0] small_signed();
    return 32'($signed(int'($urandom % 2001) - 1000));
  endfunction

  initial begin
    foreach (mI[i]) mI[i] = 0;
    foreach (mW[i]) mW[i] = 0;
    foreach (mO[i]) mO[i] = 0;
    mA = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    compare("reset");

    // ---------------- phase 1: directed rows of the operation table
    for (int a = 0; a < MEM_DEPTH; a++) u_mem.mem[a] = $urandom;
    u_mem.mem[3] = 32'h7fff_ffff;  // extreme operands
    u_mem.mem[16] = 32'h8000_0000;
    u_mem.mem[17] = 32'h8000_0000;
    run(mk(OP_MOV_ADDR, 0, 0, 0, 0, 0, 32'd0), "move immediate");
    run(mk(OP_LD_I, 0, 0, 0, 16, 0, 0), "load I0..I15");
    run(mk(OP_LD_W, 0, 0, 0, 4, 0, 0), "load W0..W3");
    for (int k = 0; k < 4; k++)
      for (int s = 0; s < 4; s++)
        run(mk(OP_MUL, 0, s, 1 << k, 0, 0, 0), $sformatf("multiply lane %0d s %0d", k, s));
    run(mk(OP_MUL, 0, 3, 15, 0, 0, 0), "multiply all lanes");
    for (int k = 0; k < 4; k++)
      run(mk(OP_ADD, 0, k, 1 << k, 0, 0, 0), $sformatf("add lane %0d", k));
    run(mk(OP_ADD, 0, 0, 15, 0, 0, 0), "add all lanes");
    run(mk(OP_MOV_I, 15, 0, 0, 0, 0, 0), "move I0 to I15");
    run(mk(OP_MOV_W, 3, 1, 0, 0, 0, 0), "move W1 to W3");
    run(mk(OP_MUL, 0, 3, 8, 0, 0, 0), "multiply after moves");
    run(mk(OP_MAC, 0, 1, 0, 1, 1, 0), "MAC clear");
    run(mk(OP_MAC, 0, 2, 0, 1, 0, 0), "MAC accumulate");
    run(mk(OP_MAC, 0, 0, 0, 4, 1, 0), "MAC repeat 4");
    run(mk(OP_MAC, 0, 2, 0, 3, 0, 0), "MAC repeat 3 accumulate");

    // ---------------- phase 2: random instruction stream
    for (int t = 0; t < 400; t++) begin
      instr_t i;
      int r;
      r = $urandom % 10;
      i = mk(OP_NOP, $urandom % 16, $urandom % 16, $urandom % 16, $urandom % 6, 1'($urandom), $urandom % MEM_DEPTH);
      case (r)
        0: i.op = OP_MOV_I;
        1: i.op = OP_MOV_W;
        2: i.op = OP_MOV_ADDR;
        3: begin i.op = OP_LD_I; i.count = 5'($urandom % 17); end
        4: begin i.op = OP_LD_W; i.count = 5'($urandom % 5); end
        5, 6: i.op = OP_MUL;
        7: i.op = OP_ADD;
        default: begin i.op = OP_MAC; i.count = 5'($urandom % 5); end
      endcase
      if (($urandom % 3) == 0) send(i);  // back to back: the next one stalls
      else run(i, $sformatf("random %0d (%s)", t, i.op.name()));
    end
    begin int unused; wait_idle(unused); end
    compare("end of random stream");

    // ---------------- phase 3: n-input neuron benchmark
    for (int n = 2; n <= 16; n += 2) begin
      logic [31:0] x [16];
      logic [31:0] w [16];
      logic [63:0] expected;
      int macs, steps, table_vi;
      expected = 0;
      for (int j = 0; j < 16; j++) begin
        x[j] = (j < n) ? small_signed() : 32'd0;
        w[j] = (j < n) ? small_signed() : 32'd0;
        expected += sx(x[j]) * sx(w[j]);
      end
      // input j sits in register 4*(j%4) + j/4; its weight is loaded as W(j%4)
      // for MAC step j/4
      for (int j = 0; j < 16; j++) u_mem.mem[4*(j%4) + j/4] = x[j];
      for (int j = 0; j < 16; j++) u_mem.mem[16 + j] = w[j];
      run(mk(OP_MOV_ADDR, 0, 0, 0, 0, 0, 32'd0), "neuron: input address");
      run(mk(OP_LD_I, 0, 0, 0, 16, 0, 0), "neuron: load inputs");
      steps = (n + 3) / 4;
      macs = 0;
      for (int s = 0; s < steps; s++) begin
        run(mk(OP_MOV_ADDR, 0, 0, 0, 0, 0, 32'(16 + 4*s)), "neuron: weight address");
        run(mk(OP_LD_W, 0, 0, 0, 4, 0, 0), "neuron: load weights");
        run(mk(OP_MAC, 0, s, 0, 1, s == 0, 0), "neuron: MAC");
        macs++;
      end
      table_vi = TABLE_VI[n/2 - 1];
      checks++;
      if (macs != table_vi) begin failures++; $display("FAIL n=%0d: %0d MAC instructions", n, macs); end
      checks++;
      if ({out_regs[1], out_regs[0]} !== expected) begin
        failures++;
        $display("FAIL n=%0d: neuron sum %h, expected %h", n, {out_regs[1], out_regs[0]}, expected);
      end
      $display("neuron n=%0d: %0d MAC instructions, sum %0d", n, macs, $signed({out_regs[1], out_regs[0]}));
    end

    // ---------------- mechanism coverage
    $display("moves I/W/addr %0d/%0d/%0d, repeated loads I/W %0d/%0d, mul one/all %0d/%0d, add one/all %0d/%0d",
             n_mov_i, n_mov_w, n_mov_addr, n_ld_i_rpt, n_ld_w_rpt, n_mul_one, n_mul_all, n_add_one, n_add_all);
    $display("MAC clear/accumulate/repeat %0d/%0d/%0d, stall cycles %0d, extra memory wait cycles %0d",
             n_mac_clr, n_mac_acc, n_mac_rpt, n_stall, u_mem.extra_waits);
    begin
      int cov [13];
      cov = '{n_mov_i, n_mov_w, n_mov_addr, n_ld_i_rpt, n_ld_w_rpt, n_mul_one, n_mul_all,
              n_add_one, n_add_all, n_mac_clr, n_mac_acc, n_mac_rpt, n_stall};
      foreach (cov[i]) begin
        checks++;
        if (cov[i] == 0) begin failures++; $display("FAIL mechanism %0d never exercised", i); end
      end
      checks++;
      if (u_mem.extra_waits == 0) begin failures++; $display("FAIL memory wait never exercised"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ann_controller: self-checking test of the instruction controller.
// Each operation is issued and the control signals of the accept cycle are
// compared with the values the operation requires. The MAC repeat must keep
// ready low for count-1 extra cycles with the input select stepping 0,1,2,3
// and only the first step clearing; the repeated load must make one memory
// request per word, write consecutive registers from the start index and step
// the address register once per word, with ready low until the last word.
module tb_ann_controller;
  import ann_pkg::*;
  logic clk = 0, rst_n = 0;
  logic instr_valid = 0, instr_ready, mem_req, mem_rvalid = 0;
  instr_t instr = '0;
  logic in_we, in_from_mem, w_we, w_from_mem, addr_ld, addr_inc, mac_clr, busy;
  logic [3:0] in_waddr, in_raddr, out_we;
  logic [1:0] w_waddr, w_raddr, sel;
  add_mode_e add_mode;
  out_src_e out_src;
  int checks = 0, failures = 0;

  ann_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic instr_t mk(opcode_e op, int dst, int src, int lanes, int count, bit clr);
    instr_t i;
    i = '0; i.op = op; i.dst = 4'(dst); i.src = 4'(src); i.lanes = 4'(lanes);
    i.count = 5'(count); i.clr = clr; i.imm = 32'h1234_5678;
    return i;
  endfunction

  // present an instruction; sample the accept cycle just before the edge
  task automatic issue(input instr_t i);
    instr = i; instr_valid = 1;
    #4;
    expect_true(instr_ready, "ready in idle");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    issue(mk(OP_MOV_I, 5, 9, 0, 0, 0));
    expect_true(in_we && in_waddr == 5 && in_raddr == 9 && !in_from_mem && out_we == 0 && !w_we, "MOV_I");
    @(posedge clk); #1;
    issue(mk(OP_MOV_W, 2, 3, 0, 0, 0));
    expect_true(w_we && w_waddr == 2 && w_raddr == 3 && !w_from_mem && !in_we, "MOV_W");
    @(posedge clk); #1;
    issue(mk(OP_MOV_ADDR, 0, 0, 0, 0, 0));
    expect_true(addr_ld && !addr_inc && !in_we && !w_we, "MOV_ADDR");
    @(posedge clk); #1;
    issue(mk(OP_MUL, 0, 2, 4, 0, 0));
    expect_true(out_we == 4'b0100 && out_src == OSRC_MUL && sel == 2, "MUL lane 2");
    @(posedge clk); #1;
    issue(mk(OP_ADD, 0, 1, 15, 0, 0));
    expect_true(out_we == 4'b1111 && out_src == OSRC_ADDER && add_mode == ADD_LANES && sel == 1, "ADD all");
    @(posedge clk); #1;
    issue(mk(OP_MAC, 0, 0, 0, 1, 1));
    expect_true(out_we == 4'b0001 && out_src == OSRC_ADDER && add_mode == ADD_TREE && mac_clr && sel == 0, "MAC single");
    @(posedge clk); #1;
    expect_true(instr_ready && !busy, "MAC single takes one cycle");

    // MAC repeat 4
    issue(mk(OP_MAC, 0, 0, 0, 4, 1));
    expect_true(mac_clr && sel == 0 && out_we == 4'b0001, "MAC rpt step 0");
    @(posedge clk); #1;
    instr_valid = 0;
    for (int s = 1; s < 4; s++) begin
      #3;
      expect_true(!instr_ready && busy && sel == 2'(s) && !mac_clr && out_we == 4'b0001 && add_mode == ADD_TREE,
                  $sformatf("MAC rpt step %0d", s));
      @(posedge clk); #1;
    end
    expect_true(instr_ready && !busy, "MAC repeat 4 takes four cycles");

    // load 3 words into I6.. with memory latency 2
    issue(mk(OP_LD_I, 6, 0, 0, 3, 0));
    expect_true(!in_we && !mem_req, "LD accept");
    @(posedge clk); #1;
    instr_valid = 0;
    for (int w = 0; w < 3; w++) begin
      expect_true(mem_req && !instr_ready, "LD request");
      @(posedge clk); #1;
      expect_true(!mem_req && !in_we && !addr_inc, "LD wait");
      @(posedge clk); #1;
      mem_rvalid = 1; #3;
      expect_true(in_we && in_from_mem && in_waddr == 4'(6 + w) && addr_inc && !w_we, $sformatf("LD word %0d", w));
      @(posedge clk); #1;
      mem_rvalid = 0;
    end
    #3 expect_true(instr_ready && !busy, "LD done");

    // load 2 weights into W3, W0 (index wraps modulo 4)
    @(posedge clk); #1;
    issue(mk(OP_LD_W, 3, 0, 0, 2, 0));
    @(posedge clk); #1;
    instr_valid = 0;
    for (int w = 0; w < 2; w++) begin
      expect_true(mem_req, "LDW request");
      @(posedge clk); #1;
      mem_rvalid = 1; #3;
      expect_true(w_we && w_from_mem && w_waddr == 2'(3 + w) && !in_we && addr_inc, $sformatf("LDW word %0d", w));
      @(posedge clk); #1;
      mem_rvalid = 0;
    end
    #3 expect_true(instr_ready, "LDW done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

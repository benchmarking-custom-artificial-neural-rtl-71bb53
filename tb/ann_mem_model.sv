// ann_mem_model: behavioural model of the data memory the accelerator loads
// its input and weight registers from (the memory itself lies outside the
// accelerator). It answers each one-cycle request (req, addr) with the word at
// that address, rvalid for one cycle, after a latency of LAT_MIN..LAT_MAX
// cycles chosen at random for every request. Word-addressed, DEPTH words;
// the testbench fills mem directly.
module ann_mem_model #(
  parameter int unsigned DEPTH   = 256,
  parameter int unsigned LAT_MIN = 1,
  parameter int unsigned LAT_MAX = 3
) (
  input  logic        clk,
  input  logic        req,
  input  logic [31:0] addr,
  output logic        rvalid,
  output logic [31:0] rdata
);
  logic [31:0] mem [DEPTH];
  int unsigned extra_waits = 0;  // cycles beyond the minimum latency, for coverage

  initial begin
    rvalid = 0;
    rdata  = 0;
    foreach (mem[i]) mem[i] = 0;
  end

  always @(posedge clk) begin
    if (req) begin
      automatic int unsigned lat = LAT_MIN + ($urandom % (LAT_MAX - LAT_MIN + 1));
      automatic logic [31:0] a = addr;
      extra_waits += lat - 1;
      fork
        begin
          repeat (lat - 1) @(posedge clk);
          #1;
          rdata  = mem[a % DEPTH];
          rvalid = 1;
          @(posedge clk);
          #1 rvalid = 0;
        end
      join_none
    end
  end
endmodule

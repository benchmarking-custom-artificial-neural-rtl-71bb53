// ann_pkg: types and constants shared by the neural-network MAC accelerator.
//
// The sizes are those of the accelerator's register set: sixteen 32-bit input
// registers in four groups of four, four 32-bit weight registers (one per
// multiplier lane), eight 32-bit output registers that pair up into four
// 64-bit results, and one 32-bit address register.
//
// The operation set follows the accelerator's operation table (move, load with
// repeat, multiply, add, multiply-accumulate with repeat). The binary
// instruction format below is this design's own: the operation table names
// the operations and their operands but gives no encoding.
package ann_pkg;

  localparam int unsigned DW     = 32;  // data / register width
  localparam int unsigned PW     = 64;  // product / adder result width
  localparam int unsigned LANES  = 4;   // multipliers, weight registers, input groups
  localparam int unsigned N_IN   = 16;  // input registers I0..I15
  localparam int unsigned N_W    = 4;   // weight registers W0..W3
  localparam int unsigned N_OUT  = 8;   // 32-bit output registers O0..O7
  localparam int unsigned AW     = 32;  // address register width

  // Operation codes (one per row group of the operation table).
  typedef enum logic [3:0] {
    OP_NOP      = 4'd0,
    OP_MOV_I    = 4'd1,  // In  <- Im
    OP_MOV_W    = 4'd2,  // Wn  <- Wm
    OP_MOV_ADDR = 4'd3,  // address register <- #immediate
    OP_LD_I     = 4'd4,  // In.. <- memory[addr..]   (count words)
    OP_LD_W     = 4'd5,  // Wn.. <- memory[addr..]   (count words)
    OP_MUL      = 4'd6,  // O(2k+1):O(2k) <- I(4k+s) * Wk   for every lane k in the mask
    OP_ADD      = 4'd7,  // O(2k+1):O(2k) <- I(4k+s) + Wk   for every lane k in the mask
    OP_MAC      = 4'd8   // O1:O0 <- O1:O0 + sum_k I(4k+s) * Wk, s stepping for count steps
  } opcode_e;

  // Adder configuration.
  typedef enum logic {
    ADD_LANES = 1'b0,  // four independent 2-input 32-bit additions
    ADD_TREE  = 1'b1   // one 4-input 64-bit addition plus the accumulator
  } add_mode_e;

  // Source of the data written into an output register pair.
  typedef enum logic {
    OSRC_MUL   = 1'b0,  // multiplier product of the lane
    OSRC_ADDER = 1'b1   // adder output bus
  } out_src_e;

  // Instruction word (54 bits).
  //   dst   : destination register index (In: 0..15, Wn: 0..3); first index of a load
  //   src   : source register index for moves; bits [1:0] are the input select s
  //           (which register of each group of four) for MUL, ADD and MAC
  //   lanes : lane mask for MUL and ADD (4'b0001 = lane 0 only, 4'b1111 = all lanes)
  //   count : repeat count for loads and MAC; 0 is treated as 1
  //   clr   : MAC starts from zero instead of the value held in O1:O0
  //   imm   : immediate for the address register move
  typedef struct packed {
    opcode_e     op;
    logic [3:0]  dst;
    logic [3:0]  src;
    logic [3:0]  lanes;
    logic [4:0]  count;
    logic        clr;
    logic [31:0] imm;
  } instr_t;

endpackage

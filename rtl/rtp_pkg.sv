// rtp_pkg: types and constants shared by the real-time processor.
//
// The processor is a 16-bit, single-cycle, unpipelined load/store machine
// with 32-bit instructions and a bank of countdown timers that the
// dead/deadi instructions wait on. This package holds the instruction
// encoding, the opcode numbers, the ALU operation codes, the decoded
// control bundle and the bit positions of the video control signals that
// software writes into register $14.
//
// Instruction word (all formats):
//   [31:26] opcode   [25:21] Rd   [20:16] Rs   [15:11] Rt   [15:0] imm16
// Register fields are five bits wide; only their low four bits select one
// of the sixteen registers. dead/deadi use the low two bits of Rd as the
// timer number. The field layout follows the published format diagram;
// the opcode numbers are this design's own choice.
package rtp_pkg;

  localparam int unsigned W       = 16;  // datapath width
  localparam int unsigned NREGS   = 16;  // general-purpose registers
  localparam int unsigned NTIMERS = 4;   // deadline timers $t0..$t3

  // Bit positions of the video control signals in $14. The low byte is the
  // pixel byte fed to the shift register; a zero-extended load into $14
  // therefore clears every control bit.
  localparam int unsigned HS_BIT = 8;   // horizontal sync
  localparam int unsigned HB_BIT = 9;   // horizontal blanking
  localparam int unsigned VS_BIT = 10;  // vertical sync
  localparam int unsigned VB_BIT = 11;  // vertical blanking

  typedef enum logic [5:0] {
    OP_NOP   = 6'd0,
    OP_ADD   = 6'd1,
    OP_ADDI  = 6'd2,
    OP_SUB   = 6'd3,
    OP_SUBI  = 6'd4,
    OP_AND   = 6'd5,
    OP_ANDI  = 6'd6,
    OP_OR    = 6'd7,
    OP_ORI   = 6'd8,
    OP_NAND  = 6'd9,
    OP_NANDI = 6'd10,
    OP_NOR   = 6'd11,
    OP_NORI  = 6'd12,
    OP_XOR   = 6'd13,
    OP_XORI  = 6'd14,
    OP_XNOR  = 6'd15,
    OP_XNORI = 6'd16,
    OP_SLL   = 6'd17,
    OP_SLLI  = 6'd18,
    OP_SRL   = 6'd19,
    OP_SRLI  = 6'd20,
    OP_LB    = 6'd21,
    OP_LBI   = 6'd22,
    OP_SB    = 6'd23,
    OP_SBI   = 6'd24,
    OP_BE    = 6'd25,
    OP_BNE   = 6'd26,
    OP_J     = 6'd27,
    OP_DEAD  = 6'd28,
    OP_DEADI = 6'd29
  } opcode_t;

  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_AND  = 4'd2,
    ALU_OR   = 4'd3,
    ALU_NAND = 4'd4,
    ALU_NOR  = 4'd5,
    ALU_XOR  = 4'd6,
    ALU_XNOR = 4'd7,
    ALU_SLL  = 4'd8,
    ALU_SRL  = 4'd9
  } alu_op_t;

  // Decoded instruction
  typedef struct packed {
    logic [3:0]  rd;         // destination / store data / compare operand
    logic [3:0]  rs;         // first source
    logic [3:0]  rt;         // second source
    logic [15:0] imm;        // 16-bit immediate or branch offset
    logic [1:0]  timer;      // timer named by dead/deadi
    alu_op_t     alu_op;     // ALU operation
    logic        use_imm;    // ALU b operand is imm instead of Rt
    logic        reg_write;  // write the ALU or load result to Rd
    logic        load;       // lb/lbi: the result comes from data memory
    logic        store;      // sb/sbi
    logic        branch_eq;  // be
    logic        branch_ne;  // bne
    logic        jump;       // j
    logic        dead;       // dead/deadi
    logic        illegal;    // unused opcode, executed as nop
  } ctrl_t;

endpackage

// rtp_alu: the processor's 16-bit arithmetic and logic unit.
//
// Purely combinational. Computes add, subtract, and, or, nand, nor, xor,
// xnor and logical shifts left and right; the shift distance is the low
// four bits of operand b. The instruction set has no condition flags
// (branches compare two registers for equality), so the ALU produces only
// its result. Immediates and registers are both 16 bits wide, so no sign
// or zero extension is needed in front of it.
//
// The set of operations follows the published instruction list; the
// encoding of `op` is this design's own (see rtp_pkg::alu_op_t).
module rtp_alu
  import rtp_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  alu_op_t        op,
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [WIDTH-1:0]   y
);

  localparam int unsigned SW = $clog2(WIDTH);

  logic [SW-1:0] shamt;
  assign shamt = b[SW-1:0];

  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_NAND: y = ~(a & b);
      ALU_NOR:  y = ~(a | b);
      ALU_XOR:  y = a ^ b;
      ALU_XNOR: y = ~(a ^ b);
      ALU_SLL:  y = a << shamt;
      ALU_SRL:  y = a >> shamt;
      default:  y = '0;
    endcase
  end

endmodule

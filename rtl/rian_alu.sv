// rian_alu: 64-bit integer ALU of a network node.
//
// The document names an ALU as one of a node's units and gives its width
// (64 bits) but not its operation set; the set here (add, subtract, logic
// operations, shifts, set-less-than and load-immediate) is this design's
// choice, enough to run integer programs on the array. Multiplication is done
// by rian_mul; for OP_MUL this unit outputs zero.
// Interface: op, operands a and b, a 32-bit immediate (sign-extended by
// OP_LI), result y. Purely combinational: the node registers the result.
module rian_alu
  import rian_pkg::*;
(
  input  op_e               op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic [31:0]       imm,
  output logic [DATA_W-1:0] y
);
  logic [5:0] shamt;
  assign shamt = b[5:0];

  always_comb begin
    unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_SLL:  y = a << shamt;
      OP_SRL:  y = a >> shamt;
      OP_SRA:  y = DATA_W'($signed(a) >>> shamt);
      OP_SLT:  y = DATA_W'($signed(a) < $signed(b));
      OP_SLTU: y = DATA_W'(a < b);
      OP_LI:   y = DATA_W'($signed(imm));
      default: y = '0;
    endcase
  end
endmodule

// rian_mul: 64-bit integer multiplier of a network node.
//
// The document lists an integer multiplier in every node and makes its units
// 64 bits wide; it gives neither the algorithm nor the latency. This unit
// returns the low 64 bits of the product (the same for signed and unsigned
// operands) in the same cycle, a choice of this design that keeps every node
// operation single-cycle. Interface: operands a and b, product p. Purely
// combinational.
module rian_mul
  import rian_pkg::*;
(
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] p
);
  assign p = a * b;
endmodule

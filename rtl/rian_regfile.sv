// rian_regfile: the 64-entry, 64-bit register file of a network node.
//
// The document gives the size (64 entries of 64 bits). The ports are this
// design's choice: two read ports for the two source operands, a third read
// port for observation, and two write ports, one for results the node keeps
// for itself and one for operands delivered by the network. Reads are
// combinational and see a write of the same cycle (write-through), so an
// instruction can consume a value in the cycle it is written. If both write
// ports name the same register, the network port wins. Registers are not
// reset; a program writes a register before it reads it.
module rian_regfile
  import rian_pkg::*;
#(
  parameter int unsigned ENTRIES = 64
) (
  input  logic                         clk,
  input  logic [$clog2(ENTRIES)-1:0]   ra0,
  output logic [DATA_W-1:0]            rd0,
  input  logic [$clog2(ENTRIES)-1:0]   ra1,
  output logic [DATA_W-1:0]            rd1,
  input  logic [$clog2(ENTRIES)-1:0]   ra2,
  output logic [DATA_W-1:0]            rd2,
  input  logic                         we0,
  input  logic [$clog2(ENTRIES)-1:0]   wa0,
  input  logic [DATA_W-1:0]            wd0,
  input  logic                         we1,
  input  logic [$clog2(ENTRIES)-1:0]   wa1,
  input  logic [DATA_W-1:0]            wd1
);
  localparam int unsigned AW = $clog2(ENTRIES);

  logic [DATA_W-1:0] regs [ENTRIES];

  function automatic logic [DATA_W-1:0] rd(input logic [AW-1:0] a);
    if (we1 && wa1 == a) return wd1;
    if (we0 && wa0 == a) return wd0;
    return regs[a];
  endfunction

  assign rd0 = rd(ra0);
  assign rd1 = rd(ra1);
  assign rd2 = rd(ra2);

  always_ff @(posedge clk) begin
    if (we0 && !(we1 && wa1 == wa0)) regs[wa0] <= wd0;
    if (we1) regs[wa1] <= wd1;
  end
endmodule

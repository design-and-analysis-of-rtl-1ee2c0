// rian_pkg: types and constants shared by the routed inter-ALU network (RIAN).
//
// A RIAN carries one scalar operand from a producing ALU node to a consuming
// ALU node over short point-to-point links between neighbouring nodes. Every
// operand travels as two flits on two separate networks: a control flit that
// names the destination node and the destination register, and one cycle later
// a payload (data) flit that carries the 64-bit value. The control flit reserves
// the path ahead of its payload, so the payload never waits for arbitration.
//
// Node coordinates: x grows to the east (column), y grows to the south (row).
// Router port numbering: the eight compass directions N..NW, then the local
// (ALU) port. A mesh uses only N, E, S, W; a star uses all eight.
// Sizes (64-bit operands, 64-entry register file, 8x8 array) follow the
// document; the flit fields, the port numbering and the opcode set are this
// design's own choices.
package rian_pkg;

  localparam int unsigned DATA_W   = 64;  // operand width
  localparam int unsigned REG_W    = 6;   // register index, 64-entry register file
  localparam int unsigned COORD_W  = 4;   // node coordinate, arrays up to 16x16
  localparam int unsigned NUM_DIRS = 8;   // compass directions
  localparam int unsigned NUM_PORTS = NUM_DIRS + 1;  // plus the local port
  localparam int unsigned LOCAL    = NUM_DIRS;       // index of the local port

  // Compass directions as port indices.
  typedef enum logic [3:0] {
    DIR_N  = 4'd0,
    DIR_NE = 4'd1,
    DIR_E  = 4'd2,
    DIR_SE = 4'd3,
    DIR_S  = 4'd4,
    DIR_SW = 4'd5,
    DIR_W  = 4'd6,
    DIR_NW = 4'd7,
    DIR_LOCAL = 4'd8
  } dir_e;

  // Network topologies of the grid processor study. STAR links the eight
  // surrounding nodes, MESH only the four orthogonal ones.
  typedef enum logic [1:0] {
    TOPO_MESH = 2'd0,
    TOPO_STAR = 2'd1
  } topo_e;

  // Control flit: where the operand goes.
  typedef struct packed {
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [REG_W-1:0]   dst_reg;
  } ctrl_flit_t;

  // Payload flit: the operand itself.
  typedef logic [DATA_W-1:0] data_flit_t;

  // Operations of a node's ALU and multiplier.
  typedef enum logic [3:0] {
    OP_ADD  = 4'd0,
    OP_SUB  = 4'd1,
    OP_AND  = 4'd2,
    OP_OR   = 4'd3,
    OP_XOR  = 4'd4,
    OP_SLL  = 4'd5,
    OP_SRL  = 4'd6,
    OP_SRA  = 4'd7,
    OP_SLT  = 4'd8,
    OP_SLTU = 4'd9,
    OP_LI   = 4'd10,  // result = sign-extended immediate
    OP_MUL  = 4'd11   // low 64 bits of the product, on the multiplier
  } op_e;

  // One instruction as issued to a node: operation, two source registers, an
  // immediate, and the destination (node and register) of its result.
  typedef struct packed {
    op_e                op;
    logic [REG_W-1:0]   rs1;
    logic [REG_W-1:0]   rs2;
    logic [31:0]        imm;
    ctrl_flit_t         dst;
  } instr_t;

  // Opposite direction: the port a flit sent on direction d arrives on.
  function automatic logic [3:0] opposite(input logic [3:0] d);
    return (d + 4'd4) & 4'd7;
  endfunction

  // Whether direction d is wired in the given topology.
  function automatic logic dir_used(input topo_e topo, input int unsigned d);
    if (topo == TOPO_STAR) return 1'b1;
    return (d % 2) == 0;
  endfunction

endpackage

// rian_node: one ALU node of the array: a 64-entry register file, an integer
// ALU, an integer multiplier and the node's router.
//
// An instruction names its operation, two source registers and the place of
// its result: a destination node and a register there. Because the
// destination is part of the instruction, the node sends the control flit
// into the network in the cycle it issues the instruction, while the ALU is
// still computing; the result follows one cycle later as the payload flit.
// This is the document's lookahead: the path is reserved by the time the
// operand exists. A result whose destination is this node does not enter the
// network; it is written straight back to the register file (the document's
// direct bypass). Operands arriving from the network are announced by a
// control flit on the router's local output one cycle before the data and
// are written to the named register.
//
// Interface: instr_valid/instr/issue_ready issue one instruction per cycle;
// issue_ready drops while the router throttles the node's own input buffer
// (the producing ALU stops, as in the document). Eight neighbour links, each
// a control flit, a payload flit and a throttle per direction. deliver_*
// reports every operand written from the network; dbg_* reads a register.
// Timing: issue in cycle t; a local result is readable from cycle t+1; the
// control flit is on the neighbour link from cycle t+1, the payload from t+2,
// and a neighbour one hop away delivers the operand to its register file in
// cycle t+3 (h+2 cycles for h hops).
// The instruction sequencing and operand-readiness rules of the two machines
// the document studies are outside this node: whoever issues instructions
// decides when.
module rian_node
  import rian_pkg::*;
#(
  parameter int unsigned MY_X   = 0,
  parameter int unsigned MY_Y   = 0,
  parameter int unsigned GRID_Y = 8,
  parameter topo_e       TOPO   = TOPO_STAR,
  parameter bit          WRAP   = 1'b1,
  parameter int unsigned DEPTH  = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // instruction issue
  input  logic                      instr_valid,
  input  instr_t                    instr,
  output logic                      issue_ready,
  // neighbour links, indexed by rian_pkg::dir_e
  input  logic       [NUM_DIRS-1:0] ctrl_in_valid,
  input  ctrl_flit_t [NUM_DIRS-1:0] ctrl_in,
  input  logic       [NUM_DIRS-1:0] data_in_valid,
  input  data_flit_t [NUM_DIRS-1:0] data_in,
  output logic       [NUM_DIRS-1:0] throttle_out,
  output logic       [NUM_DIRS-1:0] ctrl_out_valid,
  output ctrl_flit_t [NUM_DIRS-1:0] ctrl_out,
  output logic       [NUM_DIRS-1:0] data_out_valid,
  output data_flit_t [NUM_DIRS-1:0] data_out,
  input  logic       [NUM_DIRS-1:0] throttle_in,
  // operands delivered by the network
  output logic                      deliver_valid,
  output logic [REG_W-1:0]          deliver_reg,
  output data_flit_t                deliver_data,
  // observation
  input  logic [REG_W-1:0]          dbg_raddr,
  output logic [DATA_W-1:0]         dbg_rdata,
  // events of this cycle, for statistics
  output logic                      ev_issue_stall,
  output logic                      ev_local_bypass,
  output logic                      ev_stall,
  output logic                      ev_throttle,
  output logic                      ev_cut_through
);
  localparam logic [COORD_W-1:0] X = COORD_W'(MY_X);
  localparam logic [COORD_W-1:0] Y = COORD_W'(MY_Y);

  // ------------------------------------------------------------ execution
  logic              issue, to_self;
  logic [DATA_W-1:0] a, b, alu_y, mul_p, result;

  assign issue   = instr_valid && issue_ready;
  assign to_self = (instr.dst.dst_x == X) && (instr.dst.dst_y == Y);

  rian_alu u_alu (.op(instr.op), .a, .b, .imm(instr.imm), .y(alu_y));
  rian_mul u_mul (.a, .b, .p(mul_p));
  assign result = (instr.op == OP_MUL) ? mul_p : alu_y;

  // Result stage: the operand produced by the instruction issued last cycle.
  logic              res_valid, res_self;
  logic [REG_W-1:0]  res_reg;
  logic [DATA_W-1:0] res_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) res_valid <= 1'b0;
    else        res_valid <= issue;
  end
  always_ff @(posedge clk) begin
    res_self <= to_self;
    res_reg  <= instr.dst.dst_reg;
    res_data <= result;
  end

  // ------------------------------------------------------- operand delivery
  logic [REG_W-1:0] ej_reg;
  logic             ej_valid;

  // ----------------------------------------------------------------- router
  logic       [NUM_PORTS-1:0] r_ctrl_in_valid, r_data_in_valid, r_throttle_out;
  ctrl_flit_t [NUM_PORTS-1:0] r_ctrl_in;
  data_flit_t [NUM_PORTS-1:0] r_data_in;
  logic       [NUM_PORTS-1:0] r_ctrl_out_valid, r_data_out_valid, r_throttle_in;
  ctrl_flit_t [NUM_PORTS-1:0] r_ctrl_out;
  data_flit_t [NUM_PORTS-1:0] r_data_out;

  assign r_ctrl_in_valid = {issue && !to_self, ctrl_in_valid};
  assign r_ctrl_in       = {instr.dst, ctrl_in};
  assign r_data_in_valid = {res_valid && !res_self, data_in_valid};
  assign r_data_in       = {res_data, data_in};
  assign r_throttle_in   = {1'b0, throttle_in};  // the node always accepts

  rian_router #(.GRID_Y(GRID_Y), .TOPO(TOPO), .WRAP(WRAP), .DEPTH(DEPTH)) u_router (
    .clk, .rst_n, .my_x(X), .my_y(Y),
    .ctrl_in_valid (r_ctrl_in_valid),  .ctrl_in (r_ctrl_in),
    .data_in_valid (r_data_in_valid),  .data_in (r_data_in),
    .throttle_out  (r_throttle_out),
    .ctrl_out_valid(r_ctrl_out_valid), .ctrl_out(r_ctrl_out),
    .data_out_valid(r_data_out_valid), .data_out(r_data_out),
    .throttle_in   (r_throttle_in),
    .ev_stall, .ev_throttle, .ev_cut_through
  );

  assign throttle_out   = r_throttle_out[NUM_DIRS-1:0];
  assign ctrl_out_valid = r_ctrl_out_valid[NUM_DIRS-1:0];
  assign ctrl_out       = r_ctrl_out[NUM_DIRS-1:0];
  assign data_out_valid = r_data_out_valid[NUM_DIRS-1:0];
  assign data_out       = r_data_out[NUM_DIRS-1:0];

  // The producing ALU stops while its own input buffer is throttled.
  assign issue_ready    = !r_throttle_out[LOCAL];
  assign ev_issue_stall = instr_valid && !issue_ready;
  assign ev_local_bypass = res_valid && res_self;

  // The control flit on the local output sets up delivery of the payload
  // that follows it one cycle later.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ej_valid <= 1'b0;
    else        ej_valid <= r_ctrl_out_valid[LOCAL];
  end
  always_ff @(posedge clk) ej_reg <= r_ctrl_out[LOCAL].dst_reg;

  assign deliver_valid = r_data_out_valid[LOCAL];
  assign deliver_reg   = ej_reg;
  assign deliver_data  = r_data_out[LOCAL];

  // -------------------------------------------------------- register file
  rian_regfile #(.ENTRIES(1 << REG_W)) u_rf (
    .clk,
    .ra0(instr.rs1), .rd0(a),
    .ra1(instr.rs2), .rd1(b),
    .ra2(dbg_raddr), .rd2(dbg_rdata),
    .we0(res_valid && res_self), .wa0(res_reg), .wd0(res_data),
    .we1(deliver_valid),         .wa1(ej_reg),  .wd1(r_data_out[LOCAL])
  );

  assert property (@(posedge clk) disable iff (!rst_n) deliver_valid |-> ej_valid)
    else $error("rian_node: payload delivered without its control flit");
endmodule

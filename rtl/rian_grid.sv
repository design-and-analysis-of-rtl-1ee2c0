// rian_grid: an array of ALU nodes joined by a routed inter-ALU network
// (RIAN), the top of the design.
//
// Instead of broadcasting every result to every ALU, each result is routed
// point to point, hop by hop, from the node that produces it to the one node
// that consumes it, over short links between neighbouring nodes. The default
// configuration is the document's best grid-processor network: an 8x8 array
// in the "star" topology, where each node is linked to its eight surrounding
// nodes, with the bottom row wired to the top row. Every link is one cycle
// long, which makes the bottom-to-top wires the document's fast "express"
// channels (one cycle for an 8x8 array). TOPO = TOPO_MESH keeps only the four
// orthogonal links. Columns do not wrap.
//
// Interface: one instruction port per node (instr_valid, instr, issue_ready),
// one delivery report per node (deliver_*: an operand written from the
// network, with its register and value), one register read port per node for
// observation, and per-node event bits for statistics. Nodes are numbered
// n = y*GRID_X + x, x being the column and y the row (row 0 on top).
// Timing: on a free path an operand sent h hops is delivered (deliver_valid,
// register write) h+2 cycles after its instruction issues: one cycle for the
// ALU result, one per hop, one from the router into the register file.
module rian_grid
  import rian_pkg::*;
#(
  parameter int unsigned GRID_X = 8,
  parameter int unsigned GRID_Y = 8,
  parameter topo_e       TOPO   = TOPO_STAR,
  parameter bit          WRAP   = 1'b1,
  parameter int unsigned DEPTH  = 8
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic       [GRID_X*GRID_Y-1:0]    instr_valid,
  input  instr_t     [GRID_X*GRID_Y-1:0]    instr,
  output logic       [GRID_X*GRID_Y-1:0]    issue_ready,
  output logic       [GRID_X*GRID_Y-1:0]    deliver_valid,
  output logic       [GRID_X*GRID_Y-1:0][REG_W-1:0] deliver_reg,
  output data_flit_t [GRID_X*GRID_Y-1:0]    deliver_data,
  input  logic       [GRID_X*GRID_Y-1:0][REG_W-1:0] dbg_raddr,
  output logic       [GRID_X*GRID_Y-1:0][DATA_W-1:0] dbg_rdata,
  output logic       [GRID_X*GRID_Y-1:0]    ev_issue_stall,
  output logic       [GRID_X*GRID_Y-1:0]    ev_local_bypass,
  output logic       [GRID_X*GRID_Y-1:0]    ev_stall,
  output logic       [GRID_X*GRID_Y-1:0]    ev_throttle,
  output logic       [GRID_X*GRID_Y-1:0]    ev_cut_through
);
  localparam int unsigned N = GRID_X * GRID_Y;
  // Column and row step of each compass direction N, NE, E, SE, S, SW, W, NW.
  localparam int STEP_X [NUM_DIRS] = '{0, 1, 1, 1, 0, -1, -1, -1};
  localparam int STEP_Y [NUM_DIRS] = '{-1, -1, 0, 1, 1, 1, 0, -1};

  logic       [NUM_DIRS-1:0] c_ov [N];  // node outputs
  ctrl_flit_t [NUM_DIRS-1:0] c_o  [N];
  logic       [NUM_DIRS-1:0] d_ov [N];
  data_flit_t [NUM_DIRS-1:0] d_o  [N];
  logic       [NUM_DIRS-1:0] t_o  [N];
  logic       [NUM_DIRS-1:0] c_iv [N];  // node inputs
  ctrl_flit_t [NUM_DIRS-1:0] c_i  [N];
  logic       [NUM_DIRS-1:0] d_iv [N];
  data_flit_t [NUM_DIRS-1:0] d_i  [N];
  logic       [NUM_DIRS-1:0] t_i  [N];

  for (genvar y = 0; y < GRID_Y; y++) begin : g_row
    for (genvar x = 0; x < GRID_X; x++) begin : g_col
      localparam int unsigned n = y * GRID_X + x;

      // Link wiring: input d of this node is the output opposite(d) of the
      // neighbour in direction d.
      for (genvar d = 0; d < NUM_DIRS; d++) begin : g_link
        localparam int NX  = x + STEP_X[d];
        localparam int NYR = y + STEP_Y[d];
        localparam int NY  = WRAP ? (NYR + int'(GRID_Y)) % int'(GRID_Y) : NYR;
        localparam bit PRESENT = dir_used(TOPO, d) && NX >= 0 && NX < int'(GRID_X)
                                 && NY >= 0 && NY < int'(GRID_Y);
        localparam int unsigned M = PRESENT ? NY * GRID_X + NX : 0;
        localparam int unsigned OD = (d + 4) % 8;
        if (PRESENT) begin : g_on
          assign c_iv[n][d] = c_ov[M][OD];
          assign c_i [n][d] = c_o [M][OD];
          assign d_iv[n][d] = d_ov[M][OD];
          assign d_i [n][d] = d_o [M][OD];
          assign t_i [n][d] = t_o [M][OD];
        end else begin : g_off
          assign c_iv[n][d] = 1'b0;
          assign c_i [n][d] = '0;
          assign d_iv[n][d] = 1'b0;
          assign d_i [n][d] = '0;
          assign t_i [n][d] = 1'b0;
        end
      end

      rian_node #(
        .MY_X(x), .MY_Y(y), .GRID_Y(GRID_Y), .TOPO(TOPO), .WRAP(WRAP), .DEPTH(DEPTH)
      ) u_node (
        .clk, .rst_n,
        .instr_valid   (instr_valid[n]), .instr(instr[n]), .issue_ready(issue_ready[n]),
        .ctrl_in_valid (c_iv[n]), .ctrl_in (c_i[n]),
        .data_in_valid (d_iv[n]), .data_in (d_i[n]),
        .throttle_out  (t_o[n]),
        .ctrl_out_valid(c_ov[n]), .ctrl_out(c_o[n]),
        .data_out_valid(d_ov[n]), .data_out(d_o[n]),
        .throttle_in   (t_i[n]),
        .deliver_valid (deliver_valid[n]), .deliver_reg(deliver_reg[n]),
        .deliver_data  (deliver_data[n]),
        .dbg_raddr     (dbg_raddr[n]), .dbg_rdata(dbg_rdata[n]),
        .ev_issue_stall(ev_issue_stall[n]), .ev_local_bypass(ev_local_bypass[n]),
        .ev_stall      (ev_stall[n]), .ev_throttle(ev_throttle[n]),
        .ev_cut_through(ev_cut_through[n])
      );
    end
  end
endmodule

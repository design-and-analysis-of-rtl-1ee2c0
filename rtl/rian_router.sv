// rian_router: lookahead router of one node of the routed inter-ALU network.
//
// Every operand crosses the network as two flits on two separate networks.
// The control flit (destination node and register) travels one cycle ahead of
// its payload flit (the 64-bit value). When a control flit reaches the head of
// its input buffer, the decoder (rian_route) picks the output port, and the
// output's round-robin arbiter (rian_rr_arbiter) grants at most one input per
// cycle. A granted control flit leaves at once and reserves the output's data
// path for the next cycle; the payload, arriving one cycle behind, is steered
// through the reserved path without any arbitration of its own. A control flit
// that loses arbitration, or finds its output throttled, stays in the control
// buffer, and its payload is written to the data buffer of the same input.
//
// Flow control is the document's throttle: an input asserts throttle_out to
// its upstream neighbour while its control or data buffer has two or fewer free
// slots. One slot holds the payload that follows a control flit already sent,
// the other a flit sent while the throttle travels back. An output is not
// granted while its downstream neighbour throttles it. The local port is the
// node's own: its input carries operands produced by the ALU (control one cycle
// ahead of data), its output delivers operands meant for this node, and the
// node never throttles it.
//
// Timing: one cycle per hop. A control flit arriving in cycle t with a free
// path leaves in cycle t (registered, seen downstream in t+1); its payload
// arrives in t+1 and is seen downstream in t+2. The document clocks its router
// faster than the ALU and quotes 100 ps per hop; this design uses one router
// cycle per hop, as the document's throttle analysis does.
// Port arrays are indexed by rian_pkg::dir_e (N..NW, then LOCAL).
module rian_router
  import rian_pkg::*;
#(
  parameter int unsigned GRID_Y = 8,
  parameter topo_e       TOPO   = TOPO_STAR,
  parameter bit          WRAP   = 1'b1,
  parameter int unsigned DEPTH  = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [COORD_W-1:0]         my_x,
  input  logic [COORD_W-1:0]         my_y,
  // inbound links
  input  logic       [NUM_PORTS-1:0] ctrl_in_valid,
  input  ctrl_flit_t [NUM_PORTS-1:0] ctrl_in,
  input  logic       [NUM_PORTS-1:0] data_in_valid,
  input  data_flit_t [NUM_PORTS-1:0] data_in,
  output logic       [NUM_PORTS-1:0] throttle_out,
  // outbound links
  output logic       [NUM_PORTS-1:0] ctrl_out_valid,
  output ctrl_flit_t [NUM_PORTS-1:0] ctrl_out,
  output logic       [NUM_PORTS-1:0] data_out_valid,
  output data_flit_t [NUM_PORTS-1:0] data_out,
  input  logic       [NUM_PORTS-1:0] throttle_in,
  // events of this cycle, for statistics
  output logic                       ev_stall,     // a head control flit waited
  output logic                       ev_throttle,  // an input throttled upstream
  output logic                       ev_cut_through // a control flit left in its arrival cycle
);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned IW = $clog2(NUM_PORTS);

  // ---------------------------------------------------------------- buffers
  logic       [NUM_PORTS-1:0] head_valid, dhead_valid;
  ctrl_flit_t [NUM_PORTS-1:0] head;
  data_flit_t [NUM_PORTS-1:0] dhead;
  logic       [NUM_PORTS-1:0] cpop, dpop;
  logic [CW-1:0] ccount [NUM_PORTS];
  logic [CW-1:0] dcount [NUM_PORTS];
  logic [3:0]    dir    [NUM_PORTS];

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
    rian_buffer #(.WIDTH($bits(ctrl_flit_t)), .DEPTH(DEPTH)) u_cbuf (
      .clk, .rst_n,
      .in_valid (ctrl_in_valid[i]), .in_data (ctrl_in[i]),
      .out_valid(head_valid[i]),    .out_data(head[i]),
      .pop      (cpop[i]),          .count   (ccount[i])
    );
    rian_buffer #(.WIDTH(DATA_W), .DEPTH(DEPTH)) u_dbuf (
      .clk, .rst_n,
      .in_valid (data_in_valid[i]), .in_data (data_in[i]),
      .out_valid(dhead_valid[i]),   .out_data(dhead[i]),
      .pop      (dpop[i]),          .count   (dcount[i])
    );
    rian_route #(.GRID_Y(GRID_Y), .TOPO(TOPO), .WRAP(WRAP)) u_route (
      .my_x, .my_y, .flit(head[i]), .dir(dir[i])
    );
    // Two or fewer free slots: stop the upstream node.
    assign throttle_out[i] = (ccount[i] >= CW'(DEPTH - 2)) || (dcount[i] >= CW'(DEPTH - 2));
  end

  // --------------------------------------------------------- control switch
  logic [NUM_PORTS-1:0] req [NUM_PORTS];  // req[o][i]: input i wants output o
  logic [NUM_PORTS-1:0] gnt [NUM_PORTS];
  logic [NUM_PORTS-1:0] out_en;

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    always_comb begin
      for (int i = 0; i < NUM_PORTS; i++)
        req[o][i] = head_valid[i] && (dir[i] == 4'(o));
    end
    assign out_en[o] = !throttle_in[o] && ((o == LOCAL) || dir_used(TOPO, o));
    rian_rr_arbiter #(.N(NUM_PORTS)) u_arb (
      .clk, .rst_n, .req(req[o]), .enable(out_en[o]), .gnt(gnt[o])
    );
  end

  always_comb begin
    cpop = '0;
    for (int o = 0; o < NUM_PORTS; o++) cpop |= gnt[o];
  end

  // Reservation of each output's data path for the next cycle.
  logic [NUM_PORTS-1:0] resv_valid;
  logic [IW-1:0]        resv_src [NUM_PORTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_out_valid <= '0;
      resv_valid     <= '0;
      data_out_valid <= '0;
    end else begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        ctrl_out_valid[o] <= (gnt[o] != '0);
        resv_valid[o]     <= (gnt[o] != '0);
        data_out_valid[o] <= resv_valid[o];
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      for (int i = 0; i < NUM_PORTS; i++) begin
        if (gnt[o][i]) begin
          ctrl_out[o] <= head[i];
          resv_src[o] <= IW'(i);
        end
      end
      if (resv_valid[o]) data_out[o] <= dhead[resv_src[o]];
    end
  end

  // ------------------------------------------------------------ data switch
  always_comb begin
    dpop = '0;
    for (int o = 0; o < NUM_PORTS; o++)
      if (resv_valid[o]) dpop[resv_src[o]] = 1'b1;
  end

  // ----------------------------------------------------------------- events
  always_comb begin
    ev_stall       = 1'b0;
    ev_cut_through = 1'b0;
    for (int i = 0; i < NUM_PORTS; i++) begin
      if (head_valid[i] && !cpop[i]) ev_stall = 1'b1;
      if (cpop[i] && ccount[i] == '0) ev_cut_through = 1'b1;
    end
  end
  assign ev_throttle = |throttle_out;

  // A reserved data path always finds its payload: the payload trails its
  // control flit by exactly one cycle and the buffers keep flits in order.
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     resv_valid[o] |-> dhead_valid[resv_src[o]])
      else $error("rian_router: payload missing on reserved path %0d", o);
  end
endmodule

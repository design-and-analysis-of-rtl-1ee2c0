// tb_rian_router: self-checking test of one lookahead router.
//
// The router sits at column 3, row 3 of an 8x8 star array with wrap. Upstream
// stand-ins on all nine inputs send operands: a control flit, then its payload
// one cycle later, and they hold back new control flits while the router
// throttles them, as a real neighbour does. Downstream stand-ins throttle the
// outputs at random. Every payload carries a unique number, so each delivered
// operand can be traced to the packet it belongs to. Checks:
//  - every packet leaves exactly once, on the port the reference routing
//    picks, with its own control flit one cycle ahead of its payload;
//  - no output sends a control flit in a cycle its downstream throttles it;
//  - on an idle router a control flit leaves one cycle after it arrives and
//    its payload one cycle after that (the one-cycle hop);
//  - contention makes flits wait and the throttle is asserted at some point.
module tb_rian_router;
  import rian_pkg::*;
  localparam int G = 8, MX = 3, MY = 3, DEPTH = 4;
  localparam int SX [8] = '{0, 1, 1, 1, 0, -1, -1, -1};
  localparam int SY [8] = '{-1, -1, 0, 1, 1, 1, 0, -1};

  logic clk = 1'b0, rst_n = 1'b0;
  logic       [NUM_PORTS-1:0] ctrl_in_valid, data_in_valid, throttle_out;
  ctrl_flit_t [NUM_PORTS-1:0] ctrl_in;
  data_flit_t [NUM_PORTS-1:0] data_in;
  logic       [NUM_PORTS-1:0] ctrl_out_valid, data_out_valid, throttle_in;
  ctrl_flit_t [NUM_PORTS-1:0] ctrl_out;
  data_flit_t [NUM_PORTS-1:0] data_out;
  logic ev_stall, ev_throttle, ev_cut_through;
  logic [COORD_W-1:0] my_x, my_y;

  rian_router #(.GRID_Y(G), .TOPO(TOPO_STAR), .WRAP(1'b1), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_stall = 0, n_throttle = 0, n_cut = 0;
  ctrl_flit_t sent_flit [int];      // packet id -> control flit
  int         sent_port [int];      // packet id -> expected output
  bit         done      [int];
  ctrl_flit_t last_ctrl [NUM_PORTS];
  bit         last_cv   [NUM_PORTS];
  logic [NUM_PORTS-1:0] prev_throttle_in;
  int next_id = 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d %s", cycle, what); end
  endtask

  function automatic int ref_port(ctrl_flit_t f);
    int dx = int'(f.dst_x) - MX, dy = int'(f.dst_y) - MY;
    int sx, sy;
    if (2 * dy > G) dy -= G;
    if (2 * dy < -G) dy += G;
    sx = dx > 0 ? 1 : dx < 0 ? -1 : 0;
    sy = dy > 0 ? 1 : dy < 0 ? -1 : 0;
    if (sx == 0 && sy == 0) return LOCAL;
    for (int d = 0; d < 8; d++) if (SX[d] == sx && SY[d] == sy) return d;
    return -1;
  endfunction

  // Upstream stand-ins: per input, a pending payload for the next cycle.
  bit         pend_v [NUM_PORTS];
  data_flit_t pend_d [NUM_PORTS];
  int         load = 50;  // percent chance to send when allowed

  // Output monitor at each rising edge.
  always @(posedge clk) if (rst_n) begin
    cycle++;
    if (ev_stall) n_stall++;
    if (ev_throttle) n_throttle++;
    if (ev_cut_through) n_cut++;
  end

  always @(negedge clk) if (rst_n) begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      if (ctrl_out_valid[o])
        check(!prev_throttle_in[o], $sformatf("output %0d sent while throttled", o));
      if (data_out_valid[o]) begin
        int id;
        id = int'(data_out[o][31:0]);
        check(last_cv[o], $sformatf("payload on %0d without control flit a cycle earlier", o));
        if (sent_port.exists(id)) begin
          check(sent_port[id] == o, $sformatf("packet %0d on port %0d, want %0d", id, o, sent_port[id]));
          check(last_ctrl[o] == sent_flit[id], $sformatf("packet %0d control/payload mismatch", id));
          check(!done[id], $sformatf("packet %0d delivered twice", id));
          done[id] = 1'b1;
        end else begin
          check(1'b0, $sformatf("unknown payload %h", data_out[o]));
        end
      end
      last_cv[o]   = ctrl_out_valid[o];
      last_ctrl[o] = ctrl_out[o];
    end
  end

  // Drive one cycle of random traffic; call at negedge.
  task automatic drive(input bit random_throttle);
    prev_throttle_in = throttle_in;
    for (int i = 0; i < NUM_PORTS; i++) begin
      data_in_valid[i] = pend_v[i];
      data_in[i]       = pend_d[i];
      pend_v[i]        = 1'b0;
      ctrl_in_valid[i] = 1'b0;
      if (!throttle_out[i] && ($urandom % 100) < load) begin
        ctrl_flit_t f;
        f.dst_x = COORD_W'($urandom % G);
        f.dst_y = COORD_W'($urandom % G);
        f.dst_reg = REG_W'($urandom);
        ctrl_in_valid[i] = 1'b1;
        ctrl_in[i]       = f;
        sent_flit[next_id] = f;
        sent_port[next_id] = ref_port(f);
        done[next_id]      = 1'b0;
        pend_v[i] = 1'b1;
        pend_d[i] = {32'hCAFE_0000, 32'(next_id)};
        next_id++;
      end
    end
    for (int o = 0; o < NUM_PORTS; o++)
      throttle_in[o] = random_throttle ? (($urandom % 100) < 40) : 1'b0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    my_x = COORD_W'(MX); my_y = COORD_W'(MY);
    ctrl_in_valid = '0; data_in_valid = '0; throttle_in = '0; prev_throttle_in = '0;
    ctrl_in = '0; data_in = '0;
    for (int i = 0; i < NUM_PORTS; i++) begin pend_v[i] = 0; last_cv[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // One-cycle hop on an idle router: W input to a destination to the east.
    begin
      ctrl_flit_t f;
      f.dst_x = 4'd6; f.dst_y = 4'd3; f.dst_reg = 6'd9;
      @(negedge clk);
      ctrl_in_valid[DIR_W] = 1'b1; ctrl_in[DIR_W] = f;
      sent_flit[next_id] = f; sent_port[next_id] = DIR_E; done[next_id] = 0;
      t0 = cycle;
      @(negedge clk);
      ctrl_in_valid[DIR_W] = 1'b0;
      data_in_valid[DIR_W] = 1'b1; data_in[DIR_W] = {32'hCAFE_0000, 32'(next_id)};
      check(ctrl_out_valid[DIR_E] && cycle - t0 == 1, "control flit leaves one cycle after arrival");
      @(negedge clk);
      data_in_valid[DIR_W] = 1'b0;
      check(data_out_valid[DIR_E] && cycle - t0 == 2, "payload leaves one cycle behind its control flit");
      next_id++;
      repeat (3) @(negedge clk);
    end

    // Random traffic without, then with, downstream throttling.
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      drive(1'b0);
    end
    load = 80;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      drive(1'b1);
    end
    // Drain.
    load = 0;
    for (int cyc = 0; cyc < 200; cyc++) begin
      @(negedge clk);
      drive(1'b0);
    end
    foreach (done[id]) check(done[id], $sformatf("packet %0d never delivered", id));
    check(n_stall > 0, "contention made a control flit wait");
    check(n_throttle > 0, "the throttle was asserted");
    check(n_cut > 0, "a control flit passed in its arrival cycle");
    $display("router: packets=%0d stalls=%0d throttle=%0d cut_through=%0d",
             next_id - 1, n_stall, n_throttle, n_cut);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

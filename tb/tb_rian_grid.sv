// tb_rian_grid: end-to-end test of the full array at its default size (8x8
// nodes, star topology, bottom-to-top wrap, 8-entry buffers).
//
// Phases, each checked against values computed here:
//  1. Hop latency on an idle network: single operands between chosen node
//     pairs, including a pair joined by the bottom-to-top wrap link, are
//     delivered to the destination register file hops+2 cycles after issue
//     (one cycle in the ALU, one per hop, one into the register file), where
//     hops is the king's-move distance with the row distance taken around
//     the wrap.
//  2. Sum of squares: every node loads k = n+1, squares it locally (direct
//     bypass, no network) and sends the square to node 0, which then adds the
//     64 values. All 63 remote operands converge on one node, so links
//     contend, buffers fill, routers throttle their neighbours and producing
//     ALUs stall. The result must be 1^2 + ... + 64^2 = 89440.
//  3. Random traffic: every node sends operands to random nodes. Each operand
//     carries its source, destination and sequence number; every one must be
//     delivered exactly once, to the right node and register, and operands
//     between one pair of nodes must arrive in the order they were sent.
// Counts of every mechanism (contention stall, throttle, ALU issue stall,
// pass-through in the arrival cycle, local bypass, wrap link) are printed, and
// a mechanism that never happened counts as a failure.
module tb_rian_grid;
  import rian_pkg::*;
  localparam int GX = 8, GY = 8, N = GX * GY;

  logic clk = 1'b0, rst_n = 1'b0;
  logic       [N-1:0] instr_valid, issue_ready, deliver_valid;
  instr_t     [N-1:0] instr;
  logic       [N-1:0][REG_W-1:0] deliver_reg, dbg_raddr;
  data_flit_t [N-1:0] deliver_data;
  logic       [N-1:0][DATA_W-1:0] dbg_rdata;
  logic       [N-1:0] ev_issue_stall, ev_local_bypass, ev_stall, ev_throttle, ev_cut_through;

  rian_grid dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int n_stall = 0, n_throttle = 0, n_issue_stall = 0, n_cut = 0, n_bypass = 0, n_wrap = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d %s", cycle, what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cycle++;
    n_stall       += $countones(ev_stall);
    n_throttle    += $countones(ev_throttle);
    n_issue_stall += $countones(ev_issue_stall);
    n_cut         += $countones(ev_cut_through);
    n_bypass      += $countones(ev_local_bypass);
  end

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction
  function automatic int hops(int sx, int sy, int tx, int ty);
    int dy = ty - sy, dx = iabs(tx - sx);
    if (2 * dy > GY) dy -= GY;
    if (2 * dy < -GY) dy += GY;
    dy = iabs(dy);
    return dx > dy ? dx : dy;
  endfunction

  function automatic instr_t mk(op_e op, int rs1, int rs2, int imm, int dn, int rdst);
    instr_t i;
    i.op = op; i.rs1 = REG_W'(rs1); i.rs2 = REG_W'(rs2); i.imm = 32'(imm);
    i.dst.dst_x = COORD_W'(dn % GX); i.dst.dst_y = COORD_W'(dn / GX); i.dst.dst_reg = REG_W'(rdst);
    return i;
  endfunction

  // An instruction offered at a falling edge is taken at the next rising edge
  // if issue_ready is high; issue_ready only changes on rising edges, so its
  // value at the falling edge is the one that counts.
  logic [N-1:0] taken = '0, rdy = '0;
  task automatic step();
    @(negedge clk);
    taken = instr_valid & rdy;
    rdy   = issue_ready;
  endtask

  // ---------------------------------------------------- random-traffic board
  bit   rt_on = 1'b0;
  int   sent = 0, got = 0;
  int   pair_sent [N][N];
  int   pair_got  [N][N];
  always @(negedge clk) if (rst_n && rt_on) begin
    for (int n = 0; n < N; n++) begin
      if (deliver_valid[n]) begin
        logic [31:0] v;
        int s, d, q;
        v = deliver_data[n][31:0];
        s = int'(v[30:25]); d = int'(v[24:19]); q = int'(v[18:0]);
        check(deliver_data[n][63:32] == 32'd0, "payload upper bits");
        check(d == n, $sformatf("operand for %0d delivered at %0d", d, n));
        check(deliver_reg[n] == REG_W'(q % 64), "destination register");
        check(q == pair_got[s][d], $sformatf("order %0d->%0d: got %0d want %0d", s, d, q, pair_got[s][d]));
        pair_got[s][d] = q + 1;
        got++;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr_valid = '0; instr = '0; dbg_raddr = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // ------------------------------------------------ 1. hop latency
    begin
      int pairs [7][4] = '{'{0, 0, 1, 0}, '{0, 0, 1, 1}, '{2, 2, 5, 6},
                           '{3, 0, 3, 7},  // one hop over the wrap link
                           '{0, 0, 7, 7},  // seven hops, row distance 1 via wrap
                           '{7, 3, 0, 4}, '{4, 4, 4, 0}};
      foreach (pairs[p]) begin
        int s, d, t0, h, lat;
        s = pairs[p][1] * GX + pairs[p][0];
        d = pairs[p][3] * GX + pairs[p][2];
        h = hops(pairs[p][0], pairs[p][1], pairs[p][2], pairs[p][3]);
        @(negedge clk);
        instr_valid[s] = 1'b1; instr[s] = mk(OP_LI, 0, 0, 500 + p, d, 33);
        t0 = cycle;
        @(negedge clk);
        instr_valid[s] = 1'b0;
        while (!deliver_valid[d] && cycle - t0 < 40) @(negedge clk);
        lat = cycle - t0;
        check(deliver_valid[d] && deliver_reg[d] == 6'd33 && deliver_data[d] == 64'(500 + p),
              $sformatf("operand %0d->%0d delivered", s, d));
        check(lat == h + 2, $sformatf("latency %0d->%0d is %0d, want %0d hops + 2", s, d, lat, h));
        if (pairs[p][0] == pairs[p][2] && iabs(pairs[p][1] - pairs[p][3]) == GY - 1 && lat == 3)
          n_wrap++;
        @(negedge clk);
        dbg_raddr[d] = 6'd33;
        #1 check(dbg_rdata[d] == 64'(500 + p), "operand in destination register");
        repeat (2) @(negedge clk);
      end
    end

    // ------------------------------------------------ 2. sum of squares
    begin
      longint expect_sum = 0;
      for (int n = 0; n < N; n++) expect_sum += longint'((n + 1) * (n + 1));
      // k = n + 1 in r1, then k*k: node 0 keeps it in r0, the others in r2.
      step();
      for (int n = 0; n < N; n++) begin instr_valid[n] = 1'b1; instr[n] = mk(OP_LI, 0, 0, n + 1, n, 1); end
      step();
      for (int n = 0; n < N; n++) instr[n] = mk(OP_MUL, 1, 1, 0, n, n == 0 ? 0 : 2);
      // Every other node sends its square to node 0, register n.
      step();
      instr_valid[0] = 1'b0;
      for (int n = 1; n < N; n++) instr[n] = mk(OP_OR, 2, 2, 0, 0, n);
      while (instr_valid != '0) begin
        step();
        instr_valid &= ~taken;
      end
      repeat (60) step();
      // Node 0 adds the 63 delivered squares to its own, one dependent add per cycle.
      for (int r = 1; r < N; r++) begin
        step();
        instr_valid[0] = 1'b1; instr[0] = mk(OP_ADD, 0, r, 0, 0, 0);
      end
      step();
      instr_valid[0] = 1'b0;
      step();
      dbg_raddr[0] = 6'd0;
      #1 check(dbg_rdata[0] == 64'(expect_sum), $sformatf("sum of squares %0d, want %0d", dbg_rdata[0], expect_sum));
    end

    // ------------------------------------------------ 3. random traffic
    // Uniform random destinations, with a burst toward one hot node in the
    // middle that saturates its links.
    rt_on = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      step();
      instr_valid &= ~taken;
      for (int n = 0; n < N; n++) begin
        bit hot;
        hot = (cyc >= 1000 && cyc < 1300);
        if (!instr_valid[n] && (hot || ($urandom % 100) < 15)) begin
          int d, q;
          d = hot ? 27 : int'($urandom % N);
          if (d == n) d = (d + 1) % N;
          q = pair_sent[n][d]++;
          instr_valid[n] = 1'b1;
          instr[n] = mk(OP_LI, 0, 0, int'({1'b0, 6'(n), 6'(d), 19'(q)}), d, q % 64);
          sent++;
        end
      end
    end
    while (instr_valid != '0) begin
      step();
      instr_valid &= ~taken;
    end
    repeat (300) step();
    check(got == sent, $sformatf("random traffic: delivered %0d of %0d", got, sent));

    $display("grid: cycles=%0d stalls=%0d throttles=%0d issue_stalls=%0d cut_through=%0d local_bypass=%0d wrap=%0d",
             cycle, n_stall, n_throttle, n_issue_stall, n_cut, n_bypass, n_wrap);
    check(n_stall > 0, "contention stall happened");
    check(n_throttle > 0, "throttle happened");
    check(n_issue_stall > 0, "ALU issue stall happened");
    check(n_cut > 0, "pass-through in arrival cycle happened");
    check(n_bypass > 0, "local bypass happened");
    check(n_wrap > 0, "wrap link used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rian_line_harness: drives one W-wide row of nodes (rian_grid with one
// row, mesh links, no wrap), which is a line of ALUs each wired to its two
// adjacent nodes. It checks the end-to-end hop latency (h+2 cycles from issue
// to delivery) from node 0 to node W-1 and back on an idle line, then runs
// random traffic in which every node sends to random nodes: every operand must
// be delivered once, to the right node and register, in per-pair order. It
// reports its counts on its ports when done.
module tb_rian_line_harness #(
  parameter int W = 8
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   stalls
);
  import rian_pkg::*;
  localparam int N = W;

  logic rst_n = 1'b0;
  logic       [N-1:0] instr_valid, issue_ready, deliver_valid;
  instr_t     [N-1:0] instr;
  logic       [N-1:0][REG_W-1:0] deliver_reg, dbg_raddr;
  data_flit_t [N-1:0] deliver_data;
  logic       [N-1:0][DATA_W-1:0] dbg_rdata;
  logic       [N-1:0] ev_issue_stall, ev_local_bypass, ev_stall, ev_throttle, ev_cut_through;

  rian_grid #(.GRID_X(W), .GRID_Y(1), .TOPO(TOPO_MESH), .WRAP(1'b0)) dut (.*);

  int cycle = 0, sent = 0, got = 0;
  int pair_sent [N][N];
  int pair_got  [N][N];
  logic [N-1:0] taken = '0, rdy = '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL W=%0d @%0d %s", W, cycle, what); end
  endtask

  task automatic step();
    @(negedge clk);
    taken = instr_valid & rdy;
    rdy   = issue_ready;
  endtask

  function automatic instr_t mk(int imm, int dn, int rdst);
    instr_t i;
    i = '0;
    i.op = OP_LI; i.imm = 32'(imm);
    i.dst.dst_x = COORD_W'(dn); i.dst.dst_y = '0; i.dst.dst_reg = REG_W'(rdst);
    return i;
  endfunction

  always @(posedge clk) if (rst_n) begin
    cycle++;
    stalls += $countones(ev_stall);
  end

  always @(negedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      if (deliver_valid[n] && deliver_data[n][31]) begin
        int s, d, q;
        s = int'(deliver_data[n][30:25]); d = int'(deliver_data[n][24:19]); q = int'(deliver_data[n][18:0]);
        check(d == n, "delivered at the right node");
        check(deliver_reg[n] == REG_W'(q % 64), "destination register");
        check(q == pair_got[s][d], "per-pair order");
        pair_got[s][d] = q + 1;
        got++;
      end
    end
  end

  initial begin
    done = 1'b0; checks = 0; failures = 0; stalls = 0;
    instr_valid = '0; instr = '0; dbg_raddr = '0;
    wait (start);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Idle-line latency, end to end in both directions.
    for (int p = 0; p < 2; p++) begin
      int s, d, t0;
      s = (p == 0) ? 0 : N - 1;
      d = (p == 0) ? N - 1 : 0;
      @(negedge clk);
      instr_valid[s] = 1'b1; instr[s] = mk(77 + p, d, 5);
      t0 = cycle;
      @(negedge clk);
      instr_valid[s] = 1'b0;
      while (!deliver_valid[d] && cycle - t0 < 64) @(negedge clk);
      check(deliver_valid[d] && deliver_data[d] == 64'(77 + p) && deliver_reg[d] == 6'd5,
            "end-to-end operand delivered");
      check(cycle - t0 == (N - 1) + 2, $sformatf("latency %0d, want %0d", cycle - t0, N + 1));
      repeat (3) @(negedge clk);
    end
    // Random traffic at 40% offered load per node.
    for (int cyc = 0; cyc < 2000; cyc++) begin
      step();
      instr_valid &= ~taken;
      for (int n = 0; n < N; n++) begin
        if (!instr_valid[n] && ($urandom % 100) < 40) begin
          int d, q;
          d = int'($urandom % N);
          if (d == n) d = (d + 1) % N;
          q = pair_sent[n][d]++;
          instr_valid[n] = 1'b1;
          instr[n] = mk(int'({1'b1, 6'(n), 6'(d), 19'(q)}), d, q % 64);
          sent++;
        end
      end
    end
    while (instr_valid != '0) begin
      step();
      instr_valid &= ~taken;
    end
    repeat (200) step();
    check(got == sent, $sformatf("delivered %0d of %0d", got, sent));
    $display("line W=%0d: operands=%0d stalls=%0d", W, sent, stalls);
    done = 1'b1;
  end
endmodule

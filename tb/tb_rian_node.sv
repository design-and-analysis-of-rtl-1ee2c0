// tb_rian_node: self-checking test of one ALU node (register file, ALU,
// multiplier and router) at column 3, row 3 of an 8x8 star array with wrap.
//
// Checks, with values computed in the testbench:
//  - load-immediate, ALU and multiply results kept in the node (direct
//    bypass) are readable in the next cycle, and a dependent instruction
//    issued in the next cycle sees them;
//  - a result sent to another node leaves on the right neighbour link: its
//    control flit in the cycle after issue, its payload one cycle later;
//  - an operand arriving from a neighbour (control flit, then payload) is
//    written to the register the control flit names and reported on deliver_*;
//  - while the east neighbour throttles the node, results for the east queue
//    in the router until the node's own input buffer throttles the ALU
//    (issue_ready low); when the throttle lifts, every queued result leaves in
//    order.
module tb_rian_node;
  import rian_pkg::*;
  localparam int MX = 3, MY = 3, DEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic instr_valid, issue_ready;
  instr_t instr;
  logic       [NUM_DIRS-1:0] ctrl_in_valid, data_in_valid, throttle_out;
  ctrl_flit_t [NUM_DIRS-1:0] ctrl_in;
  data_flit_t [NUM_DIRS-1:0] data_in;
  logic       [NUM_DIRS-1:0] ctrl_out_valid, data_out_valid, throttle_in;
  ctrl_flit_t [NUM_DIRS-1:0] ctrl_out;
  data_flit_t [NUM_DIRS-1:0] data_out;
  logic deliver_valid;
  logic [REG_W-1:0] deliver_reg;
  data_flit_t deliver_data;
  logic [REG_W-1:0] dbg_raddr;
  logic [DATA_W-1:0] dbg_rdata;
  logic ev_issue_stall, ev_local_bypass, ev_stall, ev_throttle, ev_cut_through;

  rian_node #(.MY_X(MX), .MY_Y(MY), .GRID_Y(8), .TOPO(TOPO_STAR), .WRAP(1'b1), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int stall_cycles = 0, east_seen = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic instr_t mk(op_e op, int rs1, int rs2, int imm, int dx, int dy, int rd);
    instr_t i;
    i.op = op; i.rs1 = REG_W'(rs1); i.rs2 = REG_W'(rs2); i.imm = 32'(imm);
    i.dst.dst_x = COORD_W'(dx); i.dst.dst_y = COORD_W'(dy); i.dst.dst_reg = REG_W'(rd);
    return i;
  endfunction

  // Issue one instruction at the next negedge; it is taken at the following posedge.
  task automatic issue(instr_t i);
    @(negedge clk);
    instr_valid = 1'b1; instr = i;
    @(negedge clk);
    instr_valid = 1'b0;
  endtask

  // Register value through the observation port (combinational read).
  logic [63:0] regs_seen;
  task automatic rd(input int r);
    dbg_raddr = REG_W'(r);
    #1;
    regs_seen = dbg_rdata;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] v;
    instr_valid = 1'b0; instr = '0;
    ctrl_in_valid = '0; data_in_valid = '0; ctrl_in = '0; data_in = '0;
    throttle_in = '0; dbg_raddr = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Local results, back to back.
    @(negedge clk);
    instr_valid = 1'b1; instr = mk(OP_LI, 0, 0, -7, MX, MY, 1);
    @(negedge clk);
    instr = mk(OP_LI, 0, 0, 12345, MX, MY, 2);
    @(negedge clk);
    instr = mk(OP_MUL, 1, 2, 0, MX, MY, 3);        // depends on both, next cycle
    @(negedge clk);
    instr = mk(OP_SUB, 3, 1, 0, MX, MY, 4);        // depends on r3, next cycle
    @(negedge clk);
    instr = mk(OP_SRA, 4, 2, 0, MX, MY, 5);
    @(negedge clk);
    instr_valid = 1'b0;
    @(negedge clk);
    rd(1); check(regs_seen == 64'hFFFF_FFFF_FFFF_FFF9, "LI r1");
    rd(2); check(regs_seen == 64'd12345, "LI r2");
    v = 64'hFFFF_FFFF_FFFF_FFF9 * 64'd12345;
    rd(3); check(regs_seen == v, "MUL r3 uses r1, r2 of the previous cycles");
    v = v - 64'hFFFF_FFFF_FFFF_FFF9;
    rd(4); check(regs_seen == v, "SUB r4");
    rd(5); check(regs_seen == {{57{v[63]}}, v[63:57]}, $sformatf("SRA r5 %h v=%h", regs_seen, v));

    // Remote result to the north-east neighbour (4,2).
    @(negedge clk);
    instr_valid = 1'b1; instr = mk(OP_ADD, 1, 2, 0, MX + 1, MY - 1, 17);
    @(negedge clk);
    instr_valid = 1'b0;
    check(ctrl_out_valid[DIR_NE] && ctrl_out[DIR_NE].dst_reg == 6'd17 &&
          ctrl_out[DIR_NE].dst_x == 4'(MX + 1), "control flit to NE one cycle after issue");
    check(!data_out_valid[DIR_NE], "payload not yet");
    @(negedge clk);
    check(data_out_valid[DIR_NE] && data_out[DIR_NE] == 64'hFFFF_FFFF_FFFF_FFF9 + 64'd12345,
          "payload to NE one cycle behind its control flit");

    // Operand arriving from the west neighbour for register 40.
    @(negedge clk);
    ctrl_in_valid[DIR_W] = 1'b1;
    ctrl_in[DIR_W].dst_x = 4'(MX); ctrl_in[DIR_W].dst_y = 4'(MY); ctrl_in[DIR_W].dst_reg = 6'd40;
    @(negedge clk);
    ctrl_in_valid[DIR_W] = 1'b0;
    data_in_valid[DIR_W] = 1'b1; data_in[DIR_W] = 64'h0123_4567_89AB_CDEF;
    @(negedge clk);
    data_in_valid[DIR_W] = 1'b0;
    check(deliver_valid && deliver_reg == 6'd40 && deliver_data == 64'h0123_4567_89AB_CDEF,
          "operand from the west delivered");
    @(negedge clk);
    rd(40); check(regs_seen == 64'h0123_4567_89AB_CDEF, "delivered operand in r40");

    // Throttled east link: the ALU stalls once the router's own buffer fills.
    throttle_in[DIR_E] = 1'b1;
    fork
      begin
        for (int k = 0; k < 10; k++) begin
          bit taken;
          taken = 1'b0;
          while (!taken) begin
            @(negedge clk);
            instr_valid = 1'b1; instr = mk(OP_LI, 0, 0, 1000 + k, MX + 1, MY, 20 + k);
            #1 taken = issue_ready;
          end
        end
        @(negedge clk);
        instr_valid = 1'b0;
      end
      begin
        repeat (15) @(negedge clk);
        check(!issue_ready, "node stalled while its link is throttled");
        throttle_in[DIR_E] = 1'b0;
      end
    join
    repeat (20) @(negedge clk);
    check(east_seen == 10, $sformatf("all 10 throttled results left east (%0d)", east_seen));
    check(stall_cycles > 0, "issue stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stall, order and content of the east traffic.
  always @(posedge clk) if (rst_n) begin
    if (ev_issue_stall) stall_cycles++;
    if (ctrl_out_valid[DIR_E]) check(!$past(throttle_in[DIR_E]), "east sent while throttled");
    if (data_out_valid[DIR_E]) begin
      check(data_out[DIR_E] == 64'(1000 + east_seen), $sformatf("east payload %0d in order", east_seen));
      east_seen++;
    end
  end
endmodule

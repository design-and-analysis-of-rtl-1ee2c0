// tb_rian_buffer: self-checking test of the packet buffer.
//
// Drives random pushes and pops (never a push into a full buffer, never a pop
// from an empty one) and compares every flit that leaves with a queue kept in
// the testbench. Also checks the bypass: a flit pushed into an empty buffer is
// visible at the output in the same cycle and, when popped at once, is not
// stored (count stays 0).
module tb_rian_buffer;
  localparam int unsigned W = 16, D = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, pop = 1'b0, out_valid;
  logic [W-1:0] in_data = '0, out_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  rian_buffer #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Bypass through an empty buffer.
    in_valid = 1'b1; in_data = 16'hBEEF; pop = 1'b1;
    #1;
    check(out_valid && out_data == 16'hBEEF, "bypass visible in arrival cycle");
    @(negedge clk);
    in_valid = 1'b0; pop = 1'b0;
    #1;
    check(count == 0 && !out_valid, "bypassed flit not stored");
    // Fill to full, then drain, checking order.
    for (int i = 0; i < D; i++) begin
      in_valid = 1'b1; in_data = W'(100 + i); model.push_back(W'(100 + i));
      @(negedge clk);
    end
    in_valid = 1'b0;
    #1 check(count == D, "full count");
    // Random traffic.
    for (int cyc = 0; cyc < 3000; cyc++) begin
      logic do_pop, do_push;
      do_pop  = ($urandom % 2 == 1) && (model.size() > 0);
      do_push = ($urandom % 2 == 1) && (model.size() - (do_pop ? 1 : 0) < D);
      in_valid = do_push; in_data = W'($urandom); pop = do_pop;
      #1;
      if (do_pop) begin
        check(out_valid && out_data == model[0], $sformatf("order at %0d", cyc));
      end
      @(negedge clk);
      if (do_pop) void'(model.pop_front());
      if (do_push) model.push_back(in_data);
      in_valid = 1'b0; pop = 1'b0;
      #1 check(count == ($clog2(D+1))'(model.size()), "count matches model");
      // Model bypass: push into empty with pop takes nothing.
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

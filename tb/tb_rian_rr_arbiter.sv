// tb_rian_rr_arbiter: self-checking test of the round-robin output arbiter.
//
// Applies random request vectors and checks each grant against a reference
// round-robin model kept in the testbench: the grant is one-hot, goes to a
// requester, is the first requester after the previous winner, and is empty
// when enable is low. Also checks fairness: with all inputs requesting, every
// input is granted once in N consecutive cycles.
module tb_rian_rr_arbiter;
  localparam int unsigned N = 9;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic [N-1:0] req = '0, gnt;
  int checks = 0, failures = 0;
  int last = N - 1;

  rian_rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [N-1:0] model(input logic [N-1:0] r, input bit en);
    if (!en) return '0;
    for (int k = 1; k <= N; k++) begin
      int i = (last + k) % N;
      if (r[i]) return N'(1) << i;
    end
    return '0;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] seen;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      req = N'($urandom);
      enable = ($urandom % 4) != 0;
      #1;
      check(gnt == model(req, enable), $sformatf("grant %b for req %b", gnt, req));
      for (int i = 0; i < N; i++) if (gnt[i]) last = i;
    end
    // Fairness with every input requesting.
    seen = '0;
    req = '1; enable = 1'b1;
    for (int cyc = 0; cyc < N; cyc++) begin
      @(negedge clk); #1;
      seen |= gnt;
    end
    check(seen == '1, "every input granted within N cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

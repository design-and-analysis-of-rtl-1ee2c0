// tb_rian_line: the array configured as a single row of 4, 8 and 16 nodes
// with links between adjacent nodes only (one row, mesh, no wrap), the
// linear network of the paper's 4-, 8- and 16-wide VLIW study. One harness per
// width checks hop latency and random traffic; contention must occur in each.
module tb_rian_line;
  logic clk = 1'b0, start = 1'b0;
  logic done4, done8, done16;
  int c4, c8, c16, f4, f8, f16, s4, s8, s16;

  always #5 clk = ~clk;

  tb_rian_line_harness #(.W(4))  h4  (.clk, .start, .done(done4),  .checks(c4),  .failures(f4),  .stalls(s4));
  tb_rian_line_harness #(.W(8))  h8  (.clk, .start, .done(done8),  .checks(c8),  .failures(f8),  .stalls(s8));
  tb_rian_line_harness #(.W(16)) h16 (.clk, .start, .done(done16), .checks(c16), .failures(f16), .stalls(s16));

  initial begin
    int checks, failures;
    #1 start = 1'b1;
    fork
      wait (done4 && done8 && done16);
      begin
        repeat (100000) @(posedge clk);
      end
    join_any
    checks = c4 + c8 + c16 + 3;
    failures = f4 + f8 + f16;
    if (!(done4 && done8 && done16)) begin
      failures++;
      $display("FAIL watchdog");
    end
    if (s4 == 0) failures++;
    if (s8 == 0) failures++;
    if (s16 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rian_regfile: self-checking test of the node register file. Writes every
// register, then runs random reads and writes on both write ports and all
// three read ports against an array model, including same-cycle
// write-through and the rule that the network port wins a write conflict.
module tb_rian_regfile;
  logic clk = 1'b0;
  logic [5:0] ra0, ra1, ra2, wa0, wa1;
  logic [63:0] rd0, rd1, rd2, wd0, wd1;
  logic we0 = 1'b0, we1 = 1'b0;
  logic [63:0] model [64];
  int checks = 0, failures = 0;

  rian_regfile #(.ENTRIES(64)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [63:0] seen(logic [5:0] a);
    if (we1 && wa1 == a) return wd1;
    if (we0 && wa0 == a) return wd0;
    return model[a];
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      we0 = 1'b1; wa0 = 6'(i); wd0 = {$urandom, $urandom}; model[i] = wd0;
      we1 = 1'b0;
    end
    @(negedge clk);
    we0 = 1'b0;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      if (cyc > 0) begin
        if (we0 && !(we1 && wa1 == wa0)) model[wa0] = wd0;
        if (we1) model[wa1] = wd1;
      end
      we0 = $urandom % 2 == 1; we1 = $urandom % 2 == 1;
      wa0 = 6'($urandom); wa1 = ($urandom % 4 == 0) ? wa0 : 6'($urandom);
      wd0 = {$urandom, $urandom}; wd1 = {$urandom, $urandom};
      ra0 = ($urandom % 4 == 0) ? wa0 : 6'($urandom);
      ra1 = ($urandom % 4 == 0) ? wa1 : 6'($urandom);
      ra2 = 6'($urandom);
      #1;
      check(rd0 == seen(ra0), "read port 0");
      check(rd1 == seen(ra1), "read port 1");
      check(rd2 == seen(ra2), "read port 2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

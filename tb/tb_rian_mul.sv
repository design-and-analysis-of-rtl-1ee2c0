// tb_rian_mul: self-checking test of the node multiplier. Compares the low 64
// bits of random products (and of signed corner cases) with a product built
// here from 32-bit partial products, so the reference does not reuse the
// 64-bit multiply it is checking.
module tb_rian_mul;
  logic [63:0] a, b, p;
  int checks = 0, failures = 0;

  rian_mul dut (.*);

  function automatic logic [63:0] ref_mul(logic [63:0] x, logic [63:0] z);
    logic [63:0] ll, lh, hl;
    ll = 64'(x[31:0]) * 64'(z[31:0]);
    lh = 64'(x[31:0]) * 64'(z[63:32]);
    hl = 64'(x[63:32]) * 64'(z[31:0]);
    return ll + {lh[31:0], 32'd0} + {hl[31:0], 32'd0};
  endfunction

  task automatic try(logic [63:0] x, logic [63:0] z);
    a = x; b = z;
    #1;
    checks++;
    if (p !== ref_mul(x, z)) begin
      failures++;
      $display("FAIL %h * %h = %h", x, z, p);
    end
  endtask

  initial begin
    try(64'hFFFF_FFFF_FFFF_FFFF, 64'hFFFF_FFFF_FFFF_FFFF);  // -1 * -1
    try(64'hFFFF_FFFF_FFFF_FFFE, 64'd3);                    // -2 * 3
    try(64'd0, 64'h1234);
    for (int k = 0; k < 5000; k++) try({$urandom, $urandom}, {$urandom, $urandom});
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

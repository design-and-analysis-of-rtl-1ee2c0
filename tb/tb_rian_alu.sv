// tb_rian_alu: self-checking test of the node ALU. Random operands for every
// operation, plus corner cases (shift by 0 and 63, signed versus unsigned
// compare, negative immediates), checked against arithmetic written here.
module tb_rian_alu;
  import rian_pkg::*;
  op_e op;
  logic [63:0] a, b, y;
  logic [31:0] imm;
  int checks = 0, failures = 0;

  rian_alu dut (.*);

  function automatic logic [63:0] expect_y(op_e o, logic [63:0] x, logic [63:0] z, logic [31:0] i);
    longint sx = x, sz = z;
    int sh = int'(z[5:0]);
    case (o)
      OP_ADD:  return x + z;
      OP_SUB:  return x - z;
      OP_AND:  return x & z;
      OP_OR:   return x | z;
      OP_XOR:  return x ^ z;
      OP_SLL:  return x << sh;
      OP_SRL:  return x >> sh;
      OP_SRA:  return 64'(sx >>> sh);
      OP_SLT:  return (sx < sz) ? 64'd1 : 64'd0;
      OP_SLTU: return (x < z) ? 64'd1 : 64'd0;
      OP_LI:   return {{32{i[31]}}, i};
      default: return 64'd0;
    endcase
  endfunction

  task automatic try(op_e o, logic [63:0] x, logic [63:0] z, logic [31:0] i);
    op = o; a = x; b = z; imm = i;
    #1;
    checks++;
    if (y !== expect_y(o, x, z, i)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h", o, x, z, y);
    end
  endtask

  initial begin
    try(OP_SLT, 64'hFFFF_FFFF_FFFF_FFFF, 64'd1, 0);   // -1 < 1
    try(OP_SLTU, 64'hFFFF_FFFF_FFFF_FFFF, 64'd1, 0);
    try(OP_SRA, 64'h8000_0000_0000_0000, 64'd63, 0);
    try(OP_SLL, 64'h1, 64'd63, 0);
    try(OP_SRL, 64'h8000_0000_0000_0000, 64'd0, 0);
    try(OP_LI, 0, 0, 32'hFFFF_FFF0);
    try(OP_LI, 0, 0, 32'h7FFF_FFFF);
    for (int k = 0; k < 2000; k++)
      for (int o = 0; o <= 10; o++)
        try(op_e'(o), {$urandom, $urandom}, ($urandom % 3 == 0) ? 64'($urandom % 64) : {$urandom, $urandom}, $urandom);
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

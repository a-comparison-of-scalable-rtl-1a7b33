// tb_us_alu: self-checking test of the station ALU: every operation on random
// operands against an independent expression, the latencies (add 1,
// multiply 3, divide 10) and division by zero.
module tb_us_alu;
  import us_pkg::*;

  op_e         op;
  logic [31:0] a, b, imm, y;
  logic        taken;
  logic [3:0]  lat;

  us_alu dut (.op, .a, .b, .imm, .y, .taken, .latency(lat));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      a = $urandom; b = (t % 7 == 0) ? 32'd0 : $urandom >> ($urandom % 32); imm = $urandom;
      op = OP_ADD;  #1; check(y == a + b && lat == 1, "add");
      op = OP_SUB;  #1; check(y == a - b && lat == 1, "sub");
      op = OP_MUL;  #1; check(y == 32'(64'(a) * 64'(b)) && lat == 3, "mul");
      op = OP_DIV;  #1; check(lat == 10 && (b == 0 ? y == 32'hFFFF_FFFF : (y == a / b)), "div");
      op = OP_AND;  #1; check(y == (a & b), "and");
      op = OP_OR;   #1; check(y == (a | b), "or");
      op = OP_XOR;  #1; check(y == (a ^ b), "xor");
      op = OP_ADDI; #1; check(y == a + imm, "addi");
      op = OP_LOAD; #1; check(y == a + imm && lat == 1, "load address");
      op = OP_BR;   #1; check(taken == (a != 0), "branch condition");
    end
    a = 0; op = OP_BR; #1; check(!taken, "branch on zero not taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

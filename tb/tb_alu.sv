// Self-checking test of the ALU: directed corner cases and random operands for
// each of add, subtract, AND and OR, with the expected result and zero flag
// computed independently in the bench.
module tb_alu;
  import hw_pkg::*;

  int checks = 0, failures = 0;
  alu_op_t op;
  logic [15:0] a, b, y;
  logic zero;

  alu #(.WIDTH(16)) dut (.op(op), .a(a), .b(b), .y(y), .zero(zero));

  function automatic logic [15:0] model(alu_op_t o, logic [15:0] x, logic [15:0] z);
    case (o)
      ALU_ADD: return 16'((32'(x) + 32'(z)) & 32'hFFFF);
      ALU_SUB: return 16'((32'(x) + 32'(~z) + 32'd1) & 32'hFFFF);
      ALU_AND: return ~(~x | ~z);
      default: return ~(~x & ~z);
    endcase
  endfunction

  task automatic check(alu_op_t o, logic [15:0] x, logic [15:0] z);
    logic [15:0] exp;
    op = o; a = x; b = z;
    #1;
    exp = model(o, x, z);
    checks++;
    if (y !== exp || zero !== (exp == 16'h0)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h zero=%b exp=%h", o, x, z, y, zero, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Values from the worked exercises.
    check(ALU_AND, 16'hCAEB, 16'h56BD);   // 0x42A9
    check(ALU_ADD, 16'h0003, 16'h0003);   // 0x0006
    check(ALU_SUB, 16'h0002, 16'h0001);   // 0x0001
    check(ALU_SUB, 16'h0000, 16'h0000);   // zero
    check(ALU_SUB, 16'h0001, 16'h0002);   // wraps to 0xFFFF
    check(ALU_ADD, 16'hFFFF, 16'h0001);   // wraps to 0, zero
    check(ALU_OR,  16'hF0F0, 16'h0F0F);
    check(ALU_ADD, 16'h0004, 16'hFFF8);   // base + (-8)
    for (int i = 0; i < 2000; i++)
      check(alu_op_t'($urandom_range(0, 3)), 16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of the PC unit: sequential advance by 2, BEQ taken and
// not taken with positive and negative offsets, JMP with small and large
// offsets, HALT freezing the PC, and reset.  One PC update per clock.
module tb_pc_unit;
  import hw_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n;
  logic [11:0] offset12;
  logic branch, zero, jump, halt;
  word_t pc, pc_plus2, br_target;
  logic taken, halted;

  pc_unit dut (.clk(clk), .rst_n(rst_n), .offset12(offset12), .branch(branch), .zero(zero),
               .jump(jump), .halt(halt), .pc(pc), .pc_plus2(pc_plus2), .br_target(br_target),
               .taken(taken), .halted(halted));

  always #5 clk = ~clk;

  task automatic chk(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  // Called at a falling edge: apply one instruction's controls for one clock,
  // then check the new PC.
  task automatic step(logic [11:0] off, logic br, logic z, logic j, logic h, logic [15:0] exp_pc);
    offset12 = off; branch = br; zero = z; jump = j; halt = h;
    @(negedge clk);
    chk("pc", pc, exp_pc);
    {branch, zero, jump, halt} = '0;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; offset12 = 0; {branch, zero, jump, halt} = '0;
    @(negedge clk); @(negedge clk);
    chk("reset pc", pc, 16'h0000);
    rst_n = 1;
    step(12'h000, 0, 0, 0, 0, 16'h0002);                 // sequential
    step(12'h003, 1, 0, 0, 0, 16'h0004);                 // BEQ not taken
    step(12'h003, 1, 1, 0, 0, 16'h000C);                 // BEQ +3: 4 + 2 + 6
    step(12'h00E, 1, 1, 0, 0, 16'h000A);                 // BEQ -2: 12 + 2 - 4
    step(12'h008, 1, 1, 0, 0, 16'hFFFC);                 // BEQ -8: 10 + 2 - 16 wraps
    step(12'h001, 0, 1, 1, 0, 16'h0002);                 // JMP 1
    step(12'hFFF, 0, 0, 1, 0, 16'h1FFE);                 // JMP 4095, unsigned
    step(12'h123, 0, 1, 0, 0, 16'h2000);                 // zero without branch: sequential
    // Combinational outputs at PC = 0x2000.
    offset12 = 12'h00F; #1;
    chk("pc_plus2", pc_plus2, 16'h2002);
    chk("br_target", br_target, 16'h2000);
    branch = 1; zero = 1; #1; chk("taken beq", 16'(taken), 16'h1);
    branch = 0; jump = 1; #1; chk("taken jmp", 16'(taken), 16'h1);
    jump = 0; #1; chk("not taken", 16'(taken), 16'h0);
    step(12'h000, 0, 0, 0, 1, 16'h2002);                 // HALT: PC + 2 then stop
    chk("halted", 16'(halted), 16'h1);
    step(12'h005, 0, 0, 1, 0, 16'h2002);                 // frozen
    step(12'h000, 0, 0, 0, 0, 16'h2002);
    chk("still halted", 16'(halted), 16'h1);
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    chk("pc after reset", pc, 16'h0000);
    chk("halted cleared", 16'(halted), 16'h0);
    step(12'h000, 0, 0, 0, 0, 16'h0002);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

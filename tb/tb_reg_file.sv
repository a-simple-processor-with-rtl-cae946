// Self-checking test of the register file: R0 and R1 read as 0 and 1 even
// after writes to them; R2..R15 hold what was written; both read ports and the
// inspection port see the same contents; a write shows only after the edge.
module tb_reg_file;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [3:0] rs_addr, rt_addr, wr_addr, dbg_addr;
  logic [15:0] rs_data, rt_data, wr_data, dbg_data;
  logic we;
  logic [15:0] model [16];
  logic known [16];

  reg_file #(.WIDTH(16), .NREGS(16)) dut (
    .clk(clk), .rs_addr(rs_addr), .rs_data(rs_data), .rt_addr(rt_addr), .rt_data(rt_data),
    .we(we), .wr_addr(wr_addr), .wr_data(wr_data), .dbg_addr(dbg_addr), .dbg_data(dbg_data));

  always #5 clk = ~clk;

  task automatic chk(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic write(logic [3:0] a, logic [15:0] d);
    @(negedge clk);
    we = 1; wr_addr = a; wr_data = d;
    rs_addr = a; #1;
    if (a > 1 && known[a]) chk("read before edge", rs_data, model[a]);
    @(negedge clk);
    we = 0;
    if (a > 1) begin model[a] = d; known[a] = 1'b1; end
  endtask

  task automatic read_all();
    for (int i = 0; i < 16; i++) begin
      rs_addr = 4'(i); rt_addr = 4'(15 - i); dbg_addr = 4'(i); #1;
      chk("rs", rs_data, model[i]);
      chk("rt", rt_data, model[15 - i]);
      chk("dbg", dbg_data, model[i]);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; rs_addr = 0; rt_addr = 0; wr_addr = 0; dbg_addr = 0; wr_data = 0;
    model[0] = 16'h0000; model[1] = 16'h0001;
    for (int i = 0; i < 16; i++) known[i] = (i < 2);
    // Give every general-purpose register a known value first.
    for (int i = 2; i < 16; i++) begin
      write(4'(i), 16'(i * 16'h1111));
    end
    read_all();
    // Writes to the hardwired registers must have no effect.
    write(4'd0, 16'hBEEF);
    write(4'd1, 16'hDEAD);
    read_all();
    for (int k = 0; k < 200; k++) begin
      logic [3:0] a = 4'($urandom);
      logic [15:0] d = 16'($urandom);
      write(a, d);
      rs_addr = a; rt_addr = 4'($urandom); dbg_addr = 4'($urandom); #1;
      chk("rs rand", rs_data, model[a]);
      chk("rt rand", rt_data, model[rt_addr]);
      chk("dbg rand", dbg_data, model[dbg_addr]);
    end
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

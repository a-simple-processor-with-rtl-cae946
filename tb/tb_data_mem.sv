// Self-checking test of the data memory: little-endian word layout (the bytes
// 0xEB at 0 and 0xCA at 1 read back as the word 0xCAEB), odd addresses, wrap
// at the top of the address space, both ports, and random traffic against a
// byte-array model kept in the bench.
module tb_data_mem;
  localparam int AW = 16;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [AW-1:0] addr, h_addr;
  logic we, h_we;
  logic [15:0] wdata, rdata, h_wdata, h_rdata;
  logic [7:0] model [2**AW];

  data_mem #(.ADDR_W(AW)) dut (
    .clk(clk), .addr(addr), .we(we), .wdata(wdata), .rdata(rdata),
    .h_addr(h_addr), .h_we(h_we), .h_wdata(h_wdata), .h_rdata(h_rdata));

  always #5 clk = ~clk;

  task automatic chk(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  function automatic logic [15:0] mword(logic [AW-1:0] a);
    return {model[AW'(a + 1)], model[a]};
  endfunction

  task automatic cpu_write(logic [AW-1:0] a, logic [15:0] d);
    @(negedge clk);
    we = 1; addr = a; wdata = d;
    @(negedge clk);
    we = 0;
    model[a] = d[7:0];
    model[AW'(a + 1)] = d[15:8];
  endtask

  task automatic host_write(logic [AW-1:0] a, logic [15:0] d);
    @(negedge clk);
    h_we = 1; h_addr = a; h_wdata = d;
    @(negedge clk);
    h_we = 0;
    model[a] = d[7:0];
    model[AW'(a + 1)] = d[15:8];
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; h_we = 0; addr = 0; h_addr = 0; wdata = 0; h_wdata = 0;
    // Clear a low region so the model is defined there.
    for (int a = 0; a < 64; a += 2) host_write(AW'(a), 16'h0000);
    // Little-endian layout: words 0xCAEB and 0x56BD at 0 and 2.
    host_write(AW'(0), 16'hCAEB);
    host_write(AW'(2), 16'h56BD);
    h_addr = 0; addr = 1; #1;
    chk("word 0", h_rdata, 16'hCAEB);
    chk("odd addr 1", rdata, 16'hBDCA);
    addr = 2; #1;
    chk("cpu word 2", rdata, 16'h56BD);
    // Processor store of 0x42A9 at 4 lands as bytes A9, 42.
    cpu_write(AW'(4), 16'h42A9);
    h_addr = 4; #1; chk("word 4", h_rdata, 16'h42A9);
    h_addr = 5; #1; chk("byte 5 low", {8'h00, h_rdata[7:0]}, 16'h0042);
    // Odd-address store overlapping two words.
    cpu_write(AW'(7), 16'h1234);
    h_addr = 6; #1; chk("word 6", h_rdata, mword(AW'(6)));
    h_addr = 8; #1; chk("word 8", h_rdata, mword(AW'(8)));
    // Wrap at the top.
    host_write(AW'(0), 16'h0000);
    cpu_write(AW'(2**AW - 1), 16'hA55A);
    h_addr = 0; #1; chk("wrap high byte", h_rdata, {model[1], 8'hA5});
    addr = AW'(2**AW - 1); #1; chk("wrap read", rdata, 16'hA55A);
    // Both ports writing the same word: processor wins.
    @(negedge clk);
    we = 1; addr = 20; wdata = 16'h1111; h_we = 1; h_addr = 20; h_wdata = 16'h2222;
    @(negedge clk);
    we = 0; h_we = 0;
    model[20] = 8'h11; model[21] = 8'h11;
    addr = 20; #1; chk("priority", rdata, 16'h1111);
    // Random traffic in a 256-byte window.
    for (int i = 0; i < 200; i++) begin
      logic [AW-1:0] a = AW'($urandom_range(0, 60));
      if ($urandom_range(0, 1) == 1) cpu_write(a, 16'($urandom));
      else                           host_write(a, 16'($urandom));
      addr = AW'($urandom_range(0, 62)); h_addr = AW'($urandom_range(0, 62)); #1;
      chk("rand cpu", rdata, mword(addr));
      chk("rand host", h_rdata, mword(h_addr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of the instruction memory: load a pseudo-random program
// through the load port, then read every loaded address back through the fetch
// port, at both byte addresses of each word (bit 0 is ignored).
module tb_instr_mem;
  localparam int AW = 16;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [AW-1:0] addr, load_addr;
  logic [15:0] ins, load_data;
  logic load_we;

  instr_mem #(.WIDTH(16), .ADDR_W(AW)) dut (
    .clk(clk), .addr(addr), .ins(ins),
    .load_we(load_we), .load_addr(load_addr), .load_data(load_data));

  always #5 clk = ~clk;

  // Content written at word index w: a hash of the index.
  function automatic logic [15:0] pat(int w);
    return 16'((w * 40503 + 12345) ^ (w >> 3));
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_we = 0; load_addr = 0; load_data = 0; addr = 0;
    // Fill the first and last 512 words and some in the middle.
    for (int w = 0; w < 32768; w++) begin
      if (w < 512 || w >= 32768 - 512 || (w % 97) == 0) begin
        @(negedge clk);
        load_we = 1; load_addr = AW'(w * 2 + (w & 1)); load_data = pat(w);
      end
    end
    @(negedge clk);
    load_we = 0;
    for (int w = 0; w < 32768; w++) begin
      if (w < 512 || w >= 32768 - 512 || (w % 97) == 0) begin
        addr = AW'(w * 2); #1;
        checks++;
        if (ins !== pat(w)) begin failures++; $display("FAIL word %0d got %h", w, ins); end
        addr = AW'(w * 2 + 1); #1;
        checks++;
        if (ins !== pat(w)) begin failures++; $display("FAIL odd addr word %0d got %h", w, ins); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

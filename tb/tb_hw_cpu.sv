// End-to-end test of the single-cycle HW ISA processor at its default sizes.
//
// Part 1 runs the three worked example programs (a store of R1 + R1; two
// loads, an AND and a store; a counting loop built from SUB, BEQ, ADD and JMP)
// from their stated initial state and checks the final registers, memory, PC
// and the number of clock cycles: one instruction per cycle, so a program that
// executes N instructions up to and including HALT is halted after N cycles.
// Part 2 runs random programs in lockstep with an instruction-set model kept
// in the bench (the "fetch, PC <- PC + 2, execute" loop on its own copies of
// the registers and memory), comparing the PC every cycle and all registers
// and all memory at the end.  Each mechanism of the datapath is counted and
// must occur at least once.
module tb_hw_cpu;
  import hw_pkg::*;

  int checks = 0, failures = 0;
  int cycle = 0;

  logic clk = 0, rst_n = 0;
  logic        im_load_we = 0;
  logic [15:0] im_load_addr = 0;
  word_t       im_load_data = 0;
  logic [15:0] dm_h_addr = 0;
  logic        dm_h_we = 0;
  word_t       dm_h_wdata = 0, dm_h_rdata;
  ridx_t       rf_h_addr = 0;
  logic        rf_h_we = 0;
  word_t       rf_h_wdata = 0, rf_h_rdata;
  word_t       pc, ins;
  logic        running, halted, taken, illegal;

  hw_cpu dut (
    .clk(clk), .rst_n(rst_n),
    .im_load_we(im_load_we), .im_load_addr(im_load_addr), .im_load_data(im_load_data),
    .dm_h_addr(dm_h_addr), .dm_h_we(dm_h_we), .dm_h_wdata(dm_h_wdata), .dm_h_rdata(dm_h_rdata),
    .rf_h_addr(rf_h_addr), .rf_h_we(rf_h_we), .rf_h_wdata(rf_h_wdata), .rf_h_rdata(rf_h_rdata),
    .pc(pc), .ins(ins), .running(running), .halted(halted), .taken(taken), .illegal(illegal));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // ---------------- assembler ----------------
  function automatic word_t a_r(logic [3:0] op, int s, int t, int d);
    return {op, 4'(s), 4'(t), 4'(d)};
  endfunction
  function automatic word_t a_m(logic [3:0] op, int s, int t, int off);
    return {op, 4'(s), 4'(t), 4'(off)};
  endfunction
  function automatic word_t ADD(int s, int t, int d); return a_r(4'b0010, s, t, d); endfunction
  function automatic word_t SUB(int s, int t, int d); return a_r(4'b0011, s, t, d); endfunction
  function automatic word_t AND(int s, int t, int d); return a_r(4'b0100, s, t, d); endfunction
  function automatic word_t OR (int s, int t, int d); return a_r(4'b0101, s, t, d); endfunction
  function automatic word_t LW (int t, int off, int s); return a_m(4'b0000, s, t, off); endfunction
  function automatic word_t SW (int t, int off, int s); return a_m(4'b0001, s, t, off); endfunction
  function automatic word_t BEQ(int s, int t, int off); return a_m(4'b0111, s, t, off); endfunction
  function automatic word_t JMP(int off); return {4'b1000, 12'(off)}; endfunction
  function automatic word_t HALT(); return 16'hF000; endfunction

  // ---------------- checks ----------------
  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Read register r through the host port and compare.
  task automatic reg_chk(string what, int r, int exp);
    rf_h_addr = 4'(r);
    #1;
    chk(what, int'(rf_h_rdata), exp);
  endtask

  // ---------------- mechanism counters ----------------
  int n_add, n_sub, n_and, n_or, n_lw, n_sw, n_beq_taken, n_beq_not, n_jmp, n_halt;
  int n_write_r0r1, n_neg_offset, n_illegal, n_halted_idle;
  always @(posedge clk) begin
    if (running) begin
      case (ins[15:12])
        4'b0010: n_add++;
        4'b0011: n_sub++;
        4'b0100: n_and++;
        4'b0101: n_or++;
        4'b0000: n_lw++;
        4'b0001: n_sw++;
        4'b0111: if (taken) n_beq_taken++; else n_beq_not++;
        4'b1000: n_jmp++;
        4'b1111: n_halt++;
        default: ;
      endcase
      if (illegal) n_illegal++;
      if ((ins[15:12] inside {4'b0010, 4'b0011, 4'b0100, 4'b0101} && ins[3:0] < 2) ||
          (ins[15:12] == 4'b0000 && ins[7:4] < 2)) n_write_r0r1++;
      if (ins[15:12] inside {4'b0000, 4'b0001} && ins[3]) n_neg_offset++;
    end
    if (rst_n && halted) n_halted_idle++;
  end

  // ---------------- machine set-up ----------------
  task automatic load_program(word_t prog[$]);
    rst_n = 0;
    foreach (prog[i]) begin
      @(negedge clk);
      im_load_we = 1; im_load_addr = 16'(2 * i); im_load_data = prog[i];
    end
    @(negedge clk);
    im_load_we = 0;
  endtask

  task automatic set_reg(int r, word_t v);
    @(negedge clk);
    rf_h_we = 1; rf_h_addr = 4'(r); rf_h_wdata = v;
    @(negedge clk);
    rf_h_we = 0;
  endtask

  task automatic set_mem(int a, word_t v);
    @(negedge clk);
    dm_h_we = 1; dm_h_addr = 16'(a); dm_h_wdata = v;
    @(negedge clk);
    dm_h_we = 0;
  endtask

  // Release reset at a falling edge and count cycles until halted.
  task automatic run_to_halt(int max_cycles, output int cycles);
    @(negedge clk);
    rst_n = 1;
    cycles = 0;
    while (!halted && cycles < max_cycles) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  // ---------------- lockstep model ----------------
  word_t       m_r [16];
  logic [7:0]  m_m [65536];
  word_t       m_pc;
  logic        m_halted;

  function automatic word_t m_reg(int r);
    return (r == 0) ? 16'h0000 : (r == 1) ? 16'h0001 : m_r[r];
  endfunction

  // One turn of the processor loop.
  task automatic m_step(word_t prog[$]);
    word_t i, a, v;
    int op, s, t, d;
    logic [15:0] off;
    if (m_halted) return;
    i = (int'(m_pc >> 1) < prog.size()) ? prog[m_pc >> 1] : 16'h0000;
    m_pc = m_pc + 16'd2;
    op = int'(i[15:12]); s = int'(i[11:8]); t = int'(i[7:4]); d = int'(i[3:0]);
    off = {{12{i[3]}}, i[3:0]};
    case (op)
      2: if (d > 1) m_r[d] = m_reg(s) + m_reg(t);
      3: if (d > 1) m_r[d] = m_reg(s) - m_reg(t);
      4: if (d > 1) m_r[d] = m_reg(s) & m_reg(t);
      5: if (d > 1) m_r[d] = m_reg(s) | m_reg(t);
      0: begin
        a = m_reg(s) + off;
        v = {m_m[16'(a + 16'd1)], m_m[a]};
        if (t > 1) m_r[t] = v;
      end
      1: begin
        a = m_reg(s) + off;
        v = m_reg(t);
        m_m[a] = v[7:0];
        m_m[16'(a + 16'd1)] = v[15:8];
      end
      7: if (m_reg(s) == m_reg(t)) m_pc = m_pc + {off[14:0], 1'b0};
      8: m_pc = {3'b000, i[11:0], 1'b0};
      15: m_halted = 1;
      default: ;
    endcase
  endtask

  // A random program of n instructions ending in HALT, with jumps kept inside
  // it and memory accesses around a few base registers.
  function automatic void gen_program(int n, ref word_t prog[$]);
    prog.delete();
    for (int k = 0; k < n - 1; k++) begin
      int sel = $urandom_range(0, 99);
      int s = $urandom_range(0, 15), t = $urandom_range(0, 15), d = $urandom_range(0, 15);
      if      (sel < 12) prog.push_back(ADD(s, t, d));
      else if (sel < 22) prog.push_back(SUB(s, t, d));
      else if (sel < 30) prog.push_back(AND(s, t, d));
      else if (sel < 38) prog.push_back(OR(s, t, d));
      else if (sel < 54) prog.push_back(LW(t, $urandom_range(0, 15), $urandom_range(0, 3)));
      else if (sel < 70) prog.push_back(SW(t, $urandom_range(0, 15), $urandom_range(0, 3)));
      else if (sel < 84) prog.push_back(BEQ($urandom_range(0, 3), $urandom_range(0, 3), $urandom_range(0, 15)));
      else if (sel < 92) prog.push_back(JMP($urandom_range(0, n - 1)));
      else if (sel < 95) prog.push_back({4'($urandom_range(9, 14)), 12'($urandom)});   // unassigned opcode
      else               prog.push_back(a_r(4'b0010, s, t, $urandom_range(0, 1)));     // write to R0/R1
    end
    prog.push_back(HALT());
  endfunction

  task automatic random_test(int n, int max_cycles);
    word_t prog[$];
    int ran;
    gen_program(n, prog);
    rst_n = 0;
    load_program(prog);
    // Fill the rest of the loaded region's tail with zeros (LW R0 = no-op) so
    // a branch past the end behaves like the model.
    for (int k = n; k < n + 16; k++) begin
      @(negedge clk);
      im_load_we = 1; im_load_addr = 16'(2 * k); im_load_data = 16'h0000;
    end
    @(negedge clk); im_load_we = 0;
    for (int r = 2; r < 16; r++) begin
      word_t v = (r < 4) ? 16'($urandom_range(0, 24)) : 16'($urandom_range(0, 7));
      m_r[r] = v;
      set_reg(r, v);
    end
    // The model starts from whatever the data memory holds.
    for (int a = 0; a < 65536; a++) begin
      dm_h_addr = 16'(a); #1;
      m_m[a] = dm_h_rdata[7:0];
    end
    m_pc = 0; m_halted = 0;
    @(negedge clk);
    rst_n = 1;
    ran = 0;
    while (ran < max_cycles && !m_halted) begin
      m_step(prog);
      @(negedge clk);
      ran++;
      chk("lockstep pc", int'(pc), int'(m_pc));
      chk("lockstep halted", int'(halted), int'(m_halted));
      if (pc != m_pc) break;
      if ((int'(pc) >> 1) >= n + 16) break;   // left the loaded area: stop comparing
    end
    rst_n = 0;   // stop the core before reading its state back
    for (int r = 0; r < 16; r++) reg_chk($sformatf("rand R%0d", r), r, int'(m_reg(r)));
    begin
      int bad = 0;
      for (int a = 0; a < 65536; a += 2) begin
        dm_h_addr = 16'(a); #1;
        if (dm_h_rdata != {m_m[a + 1], m_m[a]}) bad++;
      end
      chk("rand memory mismatches", bad, 0);
    end
    rst_n = 0;
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t prog[$];
    int cyc;

    // ---- Exercise 0: ADD R1, R1, R2; SW R2, 4(R0); HALT ----
    prog = '{ADD(1, 1, 2), SW(2, 4, 0), HALT()};
    load_program(prog);
    set_mem(0, 16'hCAEB);
    set_mem(2, 16'h56BD);
    run_to_halt(100, cyc);
    chk("ex0 cycles", cyc, 3);
    reg_chk("ex0 R2", 2, 16'h0002);
    dm_h_addr = 4; #1; chk("ex0 M[4]", int'(dm_h_rdata), 16'h0002);
    chk("ex0 pc", int'(pc), 16'h0006);
    repeat (3) @(negedge clk);
    chk("ex0 pc frozen", int'(pc), 16'h0006);

    // ---- Exercise 1: two loads, AND, store ----
    prog = '{LW(3, 0, 0), LW(4, 2, 0), AND(3, 4, 5), SW(5, 4, 0), HALT()};
    load_program(prog);
    set_mem(0, 16'hCAEB);
    set_mem(2, 16'h56BD);
    run_to_halt(100, cyc);
    chk("ex1 cycles", cyc, 5);
    reg_chk("ex1 R3", 3, 16'hCAEB);
    reg_chk("ex1 R4", 4, 16'h56BD);
    reg_chk("ex1 R5", 5, 16'h42A9);
    dm_h_addr = 4; #1; chk("ex1 M[4]", int'(dm_h_rdata), 16'h42A9);
    dm_h_addr = 0; #1; chk("ex1 M[0]", int'(dm_h_rdata), 16'hCAEB);

    // ---- Exercise 2: R8 <- R10 * R9 by repeated addition ----
    prog = '{SUB(8, 8, 8), BEQ(9, 0, 3), ADD(10, 8, 8), SUB(9, 1, 9), JMP(1), HALT()};
    load_program(prog);
    set_reg(9, 16'h0002);
    set_reg(10, 16'h0003);
    set_reg(8, 16'hBEEF);
    run_to_halt(100, cyc);
    chk("ex2 cycles", cyc, 11);
    reg_chk("ex2 R8", 8, 16'h0006);
    reg_chk("ex2 R9", 9, 16'h0000);
    reg_chk("ex2 R10", 10, 16'h0003);
    chk("ex2 pc", int'(pc), 16'h000C);

    // ---- negative offsets, OR, and writes to R0/R1 ----
    prog = '{ADD(1, 1, 2),           // R2 = 2
             ADD(2, 2, 3),           // R3 = 4
             ADD(3, 3, 4),           // R4 = 8
             OR(4, 1, 5),            // R5 = 9
             SW(5, -8, 4),           // M[0] = 9
             LW(6, -6, 4),           // R6 = M[2]
             ADD(5, 5, 0),           // write to R0: ignored
             SUB(5, 1, 1),           // write to R1: ignored
             BEQ(0, 1, -3),          // R0 != R1: not taken
             HALT()};
    load_program(prog);
    set_mem(2, 16'h7E57);
    run_to_halt(100, cyc);
    chk("neg cycles", cyc, 10);
    dm_h_addr = 0; #1; chk("neg M[0]", int'(dm_h_rdata), 16'h0009);
    reg_chk("neg R6", 6, 16'h7E57);
    reg_chk("neg R0", 0, 16'h0000);
    reg_chk("neg R1", 1, 16'h0001);
    reg_chk("neg R5", 5, 16'h0009);

    // ---- backward branch loop: count R2 down from 3 to 0 ----
    prog = '{BEQ(2, 0, 2),           // 0x0: exit when R2 == 0
             SUB(2, 1, 2),           // 0x2
             BEQ(0, 0, -3),          // 0x4: always back to 0x0
             HALT()};                // 0x6
    load_program(prog);
    set_reg(2, 16'h0003);
    run_to_halt(100, cyc);
    chk("loop cycles", cyc, 3 * 3 + 2);
    reg_chk("loop R2", 2, 0);

    // ---- random programs against the model ----
    for (int k = 0; k < 40; k++) random_test(48, 400);

    // ---- every mechanism must have happened ----
    chk("ADD executed", int'(n_add > 0), 1);
    chk("SUB executed", int'(n_sub > 0), 1);
    chk("AND executed", int'(n_and > 0), 1);
    chk("OR executed", int'(n_or > 0), 1);
    chk("LW executed", int'(n_lw > 0), 1);
    chk("SW executed", int'(n_sw > 0), 1);
    chk("BEQ taken", int'(n_beq_taken > 0), 1);
    chk("BEQ not taken", int'(n_beq_not > 0), 1);
    chk("JMP executed", int'(n_jmp > 0), 1);
    chk("HALT executed", int'(n_halt > 0), 1);
    chk("write to R0/R1", int'(n_write_r0r1 > 0), 1);
    chk("negative offset", int'(n_neg_offset > 0), 1);
    chk("unassigned opcode", int'(n_illegal > 0), 1);
    chk("halted idle cycles", int'(n_halted_idle > 0), 1);
    $display("mechanisms: add=%0d sub=%0d and=%0d or=%0d lw=%0d sw=%0d beq_taken=%0d beq_not=%0d jmp=%0d halt=%0d r0r1_writes=%0d neg_off=%0d unassigned=%0d halted_idle=%0d",
             n_add, n_sub, n_and, n_or, n_lw, n_sw, n_beq_taken, n_beq_not, n_jmp, n_halt,
             n_write_r0r1, n_neg_offset, n_illegal, n_halted_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

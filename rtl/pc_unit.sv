// Program counter and next-PC logic of the HW ISA processor.
//
// Holds the PC (the byte address of the next instruction) and a halted flag.
// Each rising edge while running follows the processor loop "ins <- IM[PC];
// PC <- PC + 2; do ins":
//   default    : PC <- PC + 2
//   BEQ taken  : PC <- (PC + 2) + offset4 * 2   (offset4 signed, branch && zero)
//   JMP        : PC <- offset12 * 2             (offset12 unsigned)
//   HALT       : PC <- PC + 2 and the halted flag is set
// The PC + 2 incrementer, the branch-target adder (PC + 2 plus the shifted,
// sign-extended offset) and the selection between them follow the datapath
// figures; JMP and HALT, which the datapath leaves open, are this design's:
// once halted, the PC and the flag hold until reset.  Synchronous active-low
// reset puts the PC at 0 and clears the flag.
module pc_unit
  import hw_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] offset12,  // instruction bits 11:0 (JMP offset; bits 3:0 are the BEQ offset)
  input  logic        branch,    // BEQ
  input  logic        zero,      // ALU zero flag: R[s] - R[t] == 0
  input  logic        jump,      // JMP
  input  logic        halt,      // HALT
  output word_t       pc,
  output word_t       pc_plus2,
  output word_t       br_target,
  output logic        taken,     // the next PC is not PC + 2
  output logic        halted
);

  word_t pc_next;

  assign pc_plus2  = pc + word_t'(2);
  assign br_target = pc_plus2 + {{(WORD_W-5){offset12[3]}}, offset12[3:0], 1'b0};
  assign taken     = (branch && zero) || jump;

  always_comb begin
    if (jump)                pc_next = {{(WORD_W-13){1'b0}}, offset12, 1'b0};
    else if (branch && zero) pc_next = br_target;
    else                     pc_next = pc_plus2;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc     <= '0;
      halted <= 1'b0;
    end else if (!halted) begin
      pc <= pc_next;
      if (halt) halted <= 1'b1;
    end
  end

endmodule

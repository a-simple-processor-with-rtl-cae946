// ALU of the HW ISA processor.
//
// Combinational.  Computes a + b, a - b, a & b or a | b on WIDTH-bit words,
// chosen by `op` (encoding in hw_pkg::alu_op_t, this design's own; the control
// unit translates instruction opcodes into it).  `zero` is high when the
// result is all zeros; the BEQ instruction runs a subtraction through the ALU
// and branches on `zero`.  Sums and differences wrap modulo 2**WIDTH; the ISA
// defines no carry or overflow flag, so none is produced.
module alu
  import hw_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  alu_op_t          op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y,
  output logic             zero
);

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      default: y = '0;
    endcase
  end

  assign zero = (y == '0);

endmodule

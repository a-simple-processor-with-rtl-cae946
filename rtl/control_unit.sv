// Control unit of the HW ISA processor.
//
// Combinational decode of the 4-bit opcode into the control word hw_pkg::ctrl_t:
//   ADD/SUB/AND/OR : ALU op add/sub/and/or, reg_write
//   LW             : ALU add, reg_write, mem
//   SW             : ALU add, mem_store, mem
//   BEQ            : ALU sub (equality is a zero difference), branch
//   JMP            : jump
//   HALT           : halt
// The single `mem` bit drives all the arithmetic/memory multiplexers of the
// datapath.  Opcodes the ISA leaves unassigned (0110, 1001..1110) decode as
// no-operations: nothing is written and the PC advances by 2.
module control_unit
  import hw_pkg::*;
(
  input  logic [3:0] opcode,
  output ctrl_t      ctrl,
  output logic       illegal   // opcode is not one of the nine defined
);

  always_comb begin
    ctrl    = '{alu_op: ALU_ADD, default: 1'b0};
    illegal = 1'b0;
    unique case (opcode)
      OP_ADD: begin ctrl.alu_op = ALU_ADD; ctrl.reg_write = 1'b1; end
      OP_SUB: begin ctrl.alu_op = ALU_SUB; ctrl.reg_write = 1'b1; end
      OP_AND: begin ctrl.alu_op = ALU_AND; ctrl.reg_write = 1'b1; end
      OP_OR:  begin ctrl.alu_op = ALU_OR;  ctrl.reg_write = 1'b1; end
      OP_LW:  begin ctrl.alu_op = ALU_ADD; ctrl.reg_write = 1'b1; ctrl.mem = 1'b1; end
      OP_SW:  begin ctrl.alu_op = ALU_ADD; ctrl.mem_store = 1'b1; ctrl.mem = 1'b1; end
      OP_BEQ: begin ctrl.alu_op = ALU_SUB; ctrl.branch = 1'b1; end
      OP_JMP:  ctrl.jump = 1'b1;
      OP_HALT: ctrl.halt = 1'b1;
      default: illegal = 1'b1;
    endcase
  end

endmodule

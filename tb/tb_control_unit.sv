// Self-checking test of the control unit: every one of the 16 opcodes against
// a table of expected control bits written from the ISA definition.
module tb_control_unit;
  import hw_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] opcode;
  ctrl_t ctrl;
  logic illegal;

  control_unit dut (.opcode(opcode), .ctrl(ctrl), .illegal(illegal));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      // expected: {alu_op, reg_write, mem_store, mem, branch, jump, halt, illegal}
      logic [1:0] e_alu;
      logic e_rw, e_ms, e_mem, e_br, e_j, e_h, e_ill;
      {e_rw, e_ms, e_mem, e_br, e_j, e_h, e_ill} = '0;
      e_alu = 2'd0;  // add
      case (i)
        0:  begin e_rw = 1; e_mem = 1; end            // LW
        1:  begin e_ms = 1; e_mem = 1; end            // SW
        2:  begin e_rw = 1; end                       // ADD
        3:  begin e_rw = 1; e_alu = 2'd1; end         // SUB
        4:  begin e_rw = 1; e_alu = 2'd2; end         // AND
        5:  begin e_rw = 1; e_alu = 2'd3; end         // OR
        7:  begin e_br = 1; e_alu = 2'd1; end         // BEQ
        8:  begin e_j = 1; end                        // JMP
        15: begin e_h = 1; end                        // HALT
        default: e_ill = 1;
      endcase
      opcode = 4'(i);
      #1;
      checks++;
      if ({ctrl.reg_write, ctrl.mem_store, ctrl.mem, ctrl.branch, ctrl.jump, ctrl.halt, illegal}
          !== {e_rw, e_ms, e_mem, e_br, e_j, e_h, e_ill}) begin
        failures++;
        $display("FAIL opcode %b: ctrl=%p illegal=%b", opcode, ctrl, illegal);
      end
      // The ALU op matters only where the result is used.
      if (e_rw || e_ms || e_br) begin
        checks++;
        if (ctrl.alu_op !== alu_op_t'(e_alu)) begin
          failures++;
          $display("FAIL opcode %b: alu_op=%0d exp %0d", opcode, ctrl.alu_op, e_alu);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

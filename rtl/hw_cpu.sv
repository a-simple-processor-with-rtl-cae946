// Single-cycle processor for the 16-bit HW ISA.
//
// Every clock cycle executes one whole instruction: the PC addresses the
// instruction memory, the control unit decodes the opcode, the register file
// reads R[s] and R[t], the ALU operates, the data memory is read or written,
// and the result is written back, all before the next rising edge.  One
// control bit, `mem`, steers the three multiplexers that let arithmetic and
// memory instructions share the datapath:
//   ALU operand B : R[t] (arithmetic, BEQ)  or the sign-extended 4-bit offset (LW, SW)
//   destination   : Rd   (arithmetic)       or Rt (LW)
//   write data    : ALU result              or the data-memory word (LW)
// BEQ subtracts in the ALU and branches on its zero flag; the branch target
// and JMP come from pc_unit.  HALT stops the machine: the PC freezes and no
// register or memory is written until reset.
//
// Host ports let a test bench or loader set up and inspect the machine state:
// a program load port into the instruction memory, a data-memory port and a
// register-file read/write port.  Host writes to the register file are taken
// only in cycles in which the core does not write it (hold rst_n low or wait
// for `halted`).  Reset is synchronous and active low: it sets PC to 0, clears
// `halted`, and suppresses all core writes while asserted.
module hw_cpu
  import hw_pkg::*;
#(
  parameter int unsigned IM_ADDR_W = 16,  // instruction memory byte-address bits
  parameter int unsigned DM_ADDR_W = 16   // data memory byte-address bits
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // program load
  input  logic                 im_load_we,
  input  logic [IM_ADDR_W-1:0] im_load_addr,
  input  word_t                im_load_data,
  // host access to the data memory
  input  logic [DM_ADDR_W-1:0] dm_h_addr,
  input  logic                 dm_h_we,
  input  word_t                dm_h_wdata,
  output word_t                dm_h_rdata,
  // host access to the register file
  input  ridx_t                rf_h_addr,
  input  logic                 rf_h_we,
  input  word_t                rf_h_wdata,
  output word_t                rf_h_rdata,
  // status
  output word_t                pc,
  output word_t                ins,       // instruction at PC
  output logic                 running,   // an instruction executes this cycle
  output logic                 halted,
  output logic                 taken,     // BEQ taken or JMP this cycle
  output logic                 illegal    // the instruction at PC has an unassigned opcode
);

  ctrl_t ctrl;
  word_t rs_val, rt_val, alu_b, alu_y, mem_rdata, wb_data;
  ridx_t wb_addr;
  logic  zero;
  logic  core_rf_we, rf_we;
  ridx_t rf_waddr;
  word_t rf_wdata;

  assign running = rst_n && !halted;

  // ---- fetch ----
  instr_mem #(.WIDTH(WORD_W), .ADDR_W(IM_ADDR_W)) u_im (
    .clk      (clk),
    .addr     (pc[IM_ADDR_W-1:0]),
    .ins      (ins),
    .load_we  (im_load_we),
    .load_addr(im_load_addr),
    .load_data(im_load_data)
  );

  // ---- decode ----
  control_unit u_ctrl (
    .opcode (ins[15:12]),
    .ctrl   (ctrl),
    .illegal(illegal)
  );

  // ---- register read / write-back ----
  assign wb_addr    = ctrl.mem ? ins_rt(ins) : ins_rd(ins);
  assign wb_data    = ctrl.mem ? mem_rdata : alu_y;
  assign core_rf_we = running && ctrl.reg_write;
  assign rf_we      = core_rf_we || rf_h_we;
  assign rf_waddr   = core_rf_we ? wb_addr : rf_h_addr;
  assign rf_wdata   = core_rf_we ? wb_data : rf_h_wdata;

  reg_file #(.WIDTH(WORD_W), .NREGS(NREGS)) u_rf (
    .clk     (clk),
    .rs_addr (ins_rs(ins)),
    .rs_data (rs_val),
    .rt_addr (ins_rt(ins)),
    .rt_data (rt_val),
    .we      (rf_we),
    .wr_addr (rf_waddr),
    .wr_data (rf_wdata),
    .dbg_addr(rf_h_addr),
    .dbg_data(rf_h_rdata)
  );

  // ---- execute ----
  assign alu_b = ctrl.mem ? ins_off4(ins) : rt_val;

  alu #(.WIDTH(WORD_W)) u_alu (
    .op  (ctrl.alu_op),
    .a   (rs_val),
    .b   (alu_b),
    .y   (alu_y),
    .zero(zero)
  );

  // ---- memory ----
  data_mem #(.ADDR_W(DM_ADDR_W)) u_dm (
    .clk    (clk),
    .addr   (alu_y[DM_ADDR_W-1:0]),
    .we     (running && ctrl.mem_store),
    .wdata  (rt_val),
    .rdata  (mem_rdata),
    .h_addr (dm_h_addr),
    .h_we   (dm_h_we),
    .h_wdata(dm_h_wdata),
    .h_rdata(dm_h_rdata)
  );

  // ---- next PC ----
  pc_unit u_pc (
    .clk      (clk),
    .rst_n    (rst_n),
    .offset12 (ins_off12(ins)),
    .branch   (ctrl.branch),
    .zero     (zero),
    .jump     (ctrl.jump),
    .halt     (ctrl.halt),
    .pc       (pc),
    .pc_plus2 (),
    .br_target(),
    .taken    (taken),
    .halted   (halted)
  );

  // The register file ignores writes to R0 and R1, so a write-back there has
  // no effect, as the ISA requires.

endmodule

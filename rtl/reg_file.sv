// Register file of the HW ISA processor.
//
// NREGS registers of WIDTH bits with two combinational read ports (Rs, Rt),
// one synchronous write port, as the ISA's datapath uses, plus a third
// combinational read port, added in this design for inspecting machine state
// from outside.  Register 0 always reads 0 and
// register 1 always reads 1, as the ISA fixes them; writes to them are
// ignored.  Reads are asynchronous so that an instruction reads its operands,
// computes and writes back in the same clock cycle; a write becomes visible on
// the read ports after the rising edge that performs it.  The general-purpose
// registers are not reset (the ISA gives them no initial value); a host
// initialises them through the write port while the core is held idle.
module reg_file #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned NREGS  = 16,
  localparam int unsigned AW    = $clog2(NREGS)
) (
  input  logic             clk,
  // read port s
  input  logic [AW-1:0]    rs_addr,
  output logic [WIDTH-1:0] rs_data,
  // read port t
  input  logic [AW-1:0]    rt_addr,
  output logic [WIDTH-1:0] rt_data,
  // write port
  input  logic             we,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  // inspection read port
  input  logic [AW-1:0]    dbg_addr,
  output logic [WIDTH-1:0] dbg_data
);

  logic [WIDTH-1:0] regs [2:NREGS-1];

  always_ff @(posedge clk) begin
    if (we && wr_addr > AW'(1))
      regs[wr_addr] <= wr_data;
  end

  function automatic logic [WIDTH-1:0] rd(input logic [AW-1:0] a);
    if (a == AW'(0))      return WIDTH'(0);
    else if (a == AW'(1)) return WIDTH'(1);
    else                  return regs[a];
  endfunction

  assign rs_data  = rd(rs_addr);
  assign rt_data  = rd(rt_addr);
  assign dbg_data = rd(dbg_addr);

endmodule

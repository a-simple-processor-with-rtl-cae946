// Instruction memory of the HW ISA processor.
//
// A memory separate from the data memory, addressed by byte like the program
// counter but holding one WIDTH-bit instruction per aligned byte pair, so it is
// organised as 2**(ADDR_W-1) words indexed by addr[ADDR_W-1:1]; address bit 0
// is ignored (the PC only ever holds even values).  The fetch port reads
// combinationally, as a single-cycle processor needs its instruction within
// the cycle.  A synchronous load port, this design's own addition, lets a host
// write the program before the processor runs.  The default ADDR_W = 16 covers the whole 16-bit address
// range the PC can reach; the ISA itself gives no memory size.
module instr_mem #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned ADDR_W = 16,
  localparam int unsigned DEPTH = 2 ** (ADDR_W - 1)
) (
  input  logic              clk,
  // fetch port
  input  logic [ADDR_W-1:0] addr,
  output logic [WIDTH-1:0]  ins,
  // program load port
  input  logic              load_we,
  input  logic [ADDR_W-1:0] load_addr,
  input  logic [WIDTH-1:0]  load_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (load_we)
      mem[load_addr[ADDR_W-1:1]] <= load_data;
  end

  assign ins = mem[addr[ADDR_W-1:1]];

endmodule

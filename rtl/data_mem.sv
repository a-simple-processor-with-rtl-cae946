// Data memory of the HW ISA processor.
//
// 2**ADDR_W bytes, byte addressed, accessed by 16-bit words in little-endian
// order: the word at address A has the byte at A in bits 7:0 and the byte at
// A+1 in bits 15:8.  Any address is accepted; A+1 wraps at the top of the
// address space.  The processor port reads combinationally (the single-cycle
// core loads and writes back in one cycle) and writes on the rising clock edge.
// A second, host port, added in this design beyond the ISA, reads and writes
// the same storage so that machine state can be set up and inspected; when both ports write in the same cycle the
// processor's bytes win where they overlap.  ADDR_W = 16 matches the 16-bit
// address words the core computes; the ISA gives no memory size.
module data_mem #(
  parameter int unsigned ADDR_W = 16,
  localparam int unsigned DEPTH = 2 ** ADDR_W
) (
  input  logic              clk,
  // processor port
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic [15:0]       wdata,
  output logic [15:0]       rdata,
  // host port
  input  logic [ADDR_W-1:0] h_addr,
  input  logic              h_we,
  input  logic [15:0]       h_wdata,
  output logic [15:0]       h_rdata
);

  logic [7:0] bytes [DEPTH];

  logic [ADDR_W-1:0] addr1, h_addr1;
  assign addr1   = addr + ADDR_W'(1);
  assign h_addr1 = h_addr + ADDR_W'(1);

  always_ff @(posedge clk) begin
    if (h_we) begin
      bytes[h_addr]  <= h_wdata[7:0];
      bytes[h_addr1] <= h_wdata[15:8];
    end
    if (we) begin
      bytes[addr]  <= wdata[7:0];
      bytes[addr1] <= wdata[15:8];
    end
  end

  assign rdata   = {bytes[addr1],   bytes[addr]};
  assign h_rdata = {bytes[h_addr1], bytes[h_addr]};

endmodule

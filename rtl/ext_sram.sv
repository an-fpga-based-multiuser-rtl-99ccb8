// ext_sram: the external SRAM of an XMOD together with its RAM interface, as
// seen by the Input, Combine and Buffer modules.
//
// The board SRAM runs at twice the 10 MHz processing clock, so the modules
// get one write and one read in every processing cycle. This model gives
// exactly that: a simple dual-port array with one synchronous write port and
// one synchronous read port (read data appears one cycle after the address).
// A read and a write to the same address in the same cycle return the old
// contents. Depth and width are parameters; contents are not reset.
module ext_sram #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule

// dp_ram: simple dual-port RAM, one synchronous write port and one
// synchronous read port (read data one cycle after re).  It stands for an
// on-chip SRAM block; the memory is an array so that synthesis can map it to
// a RAM macro.  A read of the address written in the same cycle returns the
// old contents.
module dp_ram #(
  parameter int unsigned WIDTH = 24,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule

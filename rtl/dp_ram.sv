// dp_ram: simple dual-port RAM, one write port and one read port on one clock.
// Write: when we is high, mem[waddr] <= wdata at the clock edge.
// Read: rdata is mem[raddr] registered, one cycle after raddr is presented
// (read-before-write on an address collision). Maps onto FPGA block RAM.
// DEPTH need not be a power of two; addresses at or above DEPTH are ignored
// on write and read back an unspecified word.
module dp_ram #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
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
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule

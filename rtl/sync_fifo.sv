// sync_fifo: single-clock first-word-fall-through FIFO.
// The head word is always visible on rdata while empty is low; rd pops it.
// wr pushes wdata; a push into a full FIFO is ignored and a pop of an empty
// one is ignored. count gives the number of stored words. DEPTH may be any
// size; storage is a register array read combinationally.
module sync_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 8,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;

  function automatic logic [AW-1:0] nxt(input logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign empty = (count == 0);
  assign full  = (32'(count) == DEPTH);
  assign rdata = mem[rp];

  wire do_wr = wr && !full;
  wire do_rd = rd && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= nxt(wp);
      if (do_rd) rp <= nxt(rp);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end
endmodule

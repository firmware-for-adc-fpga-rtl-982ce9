// stamp_counter: binary up-counter used twice in the ADC FPGA.
//   WIDTH = 48: the trigger time stamp, counting every FPGA clock (en tied
//               high) since the last reset;
//   WIDTH = 27: the trigger counter, counting trigger edges (en = trigger).
// Cleared by rst_n (asynchronous) and by clr (synchronous, the soft reset).
// count is the registered value; it wraps at 2**WIDTH.
module stamp_counter #(
  parameter int unsigned WIDTH = 48
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  output logic [WIDTH-1:0] count
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   count <= '0;
    else if (clr) count <= '0;
    else if (en)  count <= count + 1'b1;
endmodule

// energy_sum: clock-by-clock sum of the calorimeter channels for the Hit Sum
// FPGA.
//
// Two four-input adders (14-bit results) each take four 12-bit channels and
// are registered; a second registered adder combines them into 15 bits; a
// final output register stands for the I/O-block flip-flop in front of the
// pad. The adder tree and the 12/14/15-bit widths follow the document's
// drawing. Channels whose bit in SUM_MASK is 0 enter the tree as zero: the
// document's board feeds scintillators to inputs 1-4 and calorimeters to
// inputs 5-8 of this FPGA and sums only the four calorimeters, hence the
// default 8'hF0 (channel indices 4-7). Latency: sum_out reflects the samples
// of three clock edges earlier; a new sum every clock (250 MHz).
module energy_sum #(
  parameter logic [7:0] SUM_MASK = 8'hF0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] din [8],
  output logic [14:0] sum_out
);
  logic [11:0] x [8];
  logic [13:0] s_lo, s_hi;
  logic [14:0] s_all;

  always_comb
    for (int k = 0; k < 8; k++) x[k] = SUM_MASK[k] ? din[k] : 12'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_lo <= '0; s_hi <= '0; s_all <= '0; sum_out <= '0;
    end else begin
      s_lo    <= 14'(x[0]) + 14'(x[1]) + 14'(x[2]) + 14'(x[3]);
      s_hi    <= 14'(x[4]) + 14'(x[5]) + 14'(x[6]) + 14'(x[7]);
      s_all   <= 15'(s_lo) + 15'(s_hi);
      sum_out <= s_all;
    end
  end
endmodule

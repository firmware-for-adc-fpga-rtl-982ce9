// hit_bits: acceptance (hit) bits for the Hit Sum FPGA, one per channel.
//
// Each channel's 12-bit sample is averaged with the previous sample
// ((x[n] + x[n-1]) / 2, registered), the average is compared with the
// channel's Trigger Energy Threshold (registered), and the result passes an
// output register standing for the I/O-block flip-flop. The hit bit is active
// low: hit_n[k] is 0 while the two-sample average of channel k is below
// TET[k] and returns to 1 when it is not. The two-sample average, the compare
// against TET and the active-low output are the document's; it also states
// the opposite polarity once (low when above TET); this design follows the
// section devoted to the hit bits. Latency: three clocks from a sample to its
// effect on hit_n. Stretching of the bits to a fixed width happens in the
// Hit Sum FPGA, not here.
module hit_bits (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] din [8],
  input  logic [11:0] tet [8],
  output logic [7:0]  hit_n
);
  logic [11:0] prev [8];
  logic [11:0] avg  [8];
  logic [7:0]  cmp_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 8; k++) begin
        prev[k] <= '0;
        avg[k]  <= '0;
      end
      cmp_n <= '1;
      hit_n <= '1;
    end else begin
      for (int k = 0; k < 8; k++) begin
        prev[k]  <= din[k];
        avg[k]   <= 12'((13'(din[k]) + 13'(prev[k])) >> 1);
        cmp_n[k] <= !(avg[k] < tet[k]);
      end
      hit_n <= cmp_n;
    end
  end
endmodule

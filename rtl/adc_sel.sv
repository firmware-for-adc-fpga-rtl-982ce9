// adc_sel: the "Sel" stage between the resynchroniser and the data buffer.
//
// It lets the same firmware serve 10-bit and 12-bit FADC boards and lets the
// host switch a channel off: when zero is set (CONFIGURATION bit 8+n) the
// channel's samples, overflow bit included, are forced to 0. On a 10-bit
// board (adc_10bit high) the ten data bits 9-0 are shifted left by two so
// that all downstream thresholds and sums work on a 12-bit scale; the
// document names the two board types but not the scaling, which is this
// design's choice. One register stage: dout follows din one clock later.
module adc_sel (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [12:0] din,        // {overflow, data[11:0]}
  input  logic        din_valid,
  input  logic        adc_10bit,
  input  logic        zero,
  output logic [12:0] dout,
  output logic        dout_valid
);
  logic [12:0] d;
  always_comb begin
    if (zero)           d = '0;
    else if (adc_10bit) d = {din[12], din[9:0], 2'b00};
    else                d = din;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      dout <= '0; dout_valid <= 1'b0;
    end else begin
      dout <= d; dout_valid <= din_valid;
    end
endmodule

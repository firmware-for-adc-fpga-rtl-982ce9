// adc_resync: moves one ADC's samples from the ADC's own output clock to the
// FPGA main clock.
//
// The 13-bit word {overflow, data[11:0]} is registered on adc_clk (the input
// register of the I/O block) and written into a small dual-clock FIFO; the
// FPGA clock reads the FIFO whenever it is not empty and registers the word
// for the data buffer. Capturing with the ADC's own clock removes
// channel-to-channel timing differences, and reading on "not empty" lets each
// ADC start up at its own time. All of this follows the document.
//
// The FIFO write enable is HARD_RESET_N registered on the FPGA clock (as the
// document draws it) and then passed through a two-flop synchroniser into the
// ADC clock domain (this design's choice). The FIFO uses Gray-coded pointers,
// which need a power-of-two depth: 16 entries instead of the document's 15.
//
// Timing: a sample appears on dout, with dout_valid high for one clk cycle,
// about four clk cycles after its adc_clk edge (synchroniser plus registers).
module adc_resync #(
  parameter int unsigned DEPTH = 16,   // power of two
  parameter int unsigned WIDTH = 13
) (
  input  logic             adc_clk,
  input  logic [WIDTH-1:0] adc_din,
  input  logic             clk,
  input  logic             hard_reset_n,
  output logic [WIDTH-1:0] dout,
  output logic             dout_valid
);
  localparam int unsigned AW = $clog2(DEPTH);

  // ---------------- FPGA clock side: write-enable register ----------------
  logic wr_en_q;
  always_ff @(posedge clk or negedge hard_reset_n)
    if (!hard_reset_n) wr_en_q <= 1'b0;
    else               wr_en_q <= 1'b1;

  // ---------------- ADC clock side ----------------
  logic [1:0] wen_sync;
  logic       wrst_n;
  always_ff @(posedge adc_clk or negedge hard_reset_n)
    if (!hard_reset_n) wen_sync <= '0;
    else               wen_sync <= {wen_sync[0], wr_en_q};
  assign wrst_n = wen_sync[1];

  logic [WIDTH-1:0] iob_q;                 // I/O block input register
  always_ff @(posedge adc_clk) iob_q <= adc_din;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rgray_w1, rgray_w2;
  logic [AW:0] rbin, rgray, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  wire wfull = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  wire do_wr = wrst_n && !wfull;

  always_ff @(posedge adc_clk) if (do_wr) mem[wbin[AW-1:0]] <= iob_q;

  always_ff @(posedge adc_clk or negedge hard_reset_n) begin
    if (!hard_reset_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      {rgray_w2, rgray_w1} <= {rgray_w1, rgray};
      if (do_wr) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // ---------------- FPGA clock side: read on not-empty ----------------
  wire rempty = (rgray == wgray_r2);
  wire rd_en  = !rempty;

  always_ff @(posedge clk or negedge hard_reset_n) begin
    if (!hard_reset_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
      dout <= '0; dout_valid <= 1'b0;
    end else begin
      {wgray_r2, wgray_r1} <= {wgray_r1, wgray};
      dout_valid <= rd_en;
      if (rd_en) begin
        dout  <= mem[rbin[AW-1:0]];
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end
endmodule

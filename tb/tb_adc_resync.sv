// tb_adc_resync: an incrementing sample stream on an ADC clock slightly slower
// than the FPGA clock must come out on the FPGA clock complete, in order and
// without duplicates; nothing may be written while hard reset is asserted,
// and the first sample must appear within a few FPGA clocks.
module tb_adc_resync;
  logic adc_clk = 0, clk = 0, hard_reset_n = 0;
  logic [12:0] adc_din = 0, dout;
  logic dout_valid;
  int checks = 0, failures = 0, got = 0;
  logic [12:0] expect_v;
  bit started = 0;

  adc_resync dut (.*);
  always #2.05 adc_clk = ~adc_clk;
  always #2 clk = ~clk;

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge adc_clk) adc_din <= adc_din + 1'b1;

  // nothing during reset
  always @(posedge clk) if (!hard_reset_n && dout_valid) failures++;

  always @(posedge clk) if (hard_reset_n && dout_valid) begin
    if (!started) begin started = 1; expect_v = dout; end
    checks++;
    if (dout !== expect_v) begin failures++; $display("got %0d exp %0d", dout, expect_v); end
    expect_v = dout + 1'b1;
    got++;
  end

  initial begin
    int t0, t1;
    #101 hard_reset_n = 1;
    t0 = $time;
    wait (started);
    t1 = $time;
    checks++; if (t1 - t0 > 40) begin failures++; $display("first sample after %0d ns", t1 - t0); end
    #20000;
    checks++; if (got < 4500) begin failures++; $display("only %0d samples", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_adc_sel: random samples through the Sel stage in 12-bit, 10-bit and
// channel-zero settings; each output is compared one clock later with the
// expected word.
module tb_adc_sel;
  logic clk = 0, rst_n = 0;
  logic [12:0] din, dout;
  logic din_valid, adc_10bit, zero, dout_valid;
  logic [12:0] exp_d; logic exp_v;
  int checks = 0, failures = 0;

  adc_sel dut (.*);
  always #2 clk = ~clk;

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    din = 0; din_valid = 0; adc_10bit = 0; zero = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      din = 13'($urandom); din_valid = $urandom % 2;
      adc_10bit = (n >= 200 && n < 400); zero = (n >= 400) && (n % 2 == 0);
      if (zero) exp_d = 0;
      else if (adc_10bit) exp_d = {din[12], din[9:0], 2'b00};
      else exp_d = din;
      exp_v = din_valid;
      @(posedge clk); #1;
      checks++;
      if (dout !== exp_d || dout_valid !== exp_v) begin
        failures++; $display("n=%0d dout %h exp %h", n, dout, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

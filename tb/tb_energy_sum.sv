// tb_energy_sum: random 12-bit samples on all eight inputs; the output must
// equal the sum of channels 4-7 of three clocks earlier (a pipelined adder
// tree of three register stages), including the all-maximum case.
module tb_energy_sum;
  logic clk = 0, rst_n = 0;
  logic [11:0] din [8];
  logic [14:0] sum_out;
  int checks = 0, failures = 0;
  int hist [$];

  energy_sum dut (.clk, .rst_n, .din, .sum_out);
  always #2 clk = ~clk;

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int s;
    for (int k = 0; k < 8; k++) din[k] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      s = 0;
      for (int k = 0; k < 8; k++) begin
        din[k] = (n % 50 == 7) ? 12'hFFF : 12'($urandom);
        if (k >= 4) s += din[k];
      end
      hist.push_back(s);
      @(posedge clk); #1;
      if (hist.size() > 3) void'(hist.pop_front());
      if (n >= 3) begin
        checks++;
        if (sum_out != 15'(hist[0])) begin
          failures++; $display("n=%0d sum %0d exp %0d", n, sum_out, hist[0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

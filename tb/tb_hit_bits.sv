// tb_hit_bits: slowly varying and random samples with per-channel thresholds.
// hit_n[k] must be low exactly when the average of the sample three clocks
// earlier and the one before it is below TET[k]; both polarities must occur.
module tb_hit_bits;
  logic clk = 0, rst_n = 0;
  logic [11:0] din [8], tet [8];
  logic [7:0] hit_n;
  int checks = 0, failures = 0, n_low = 0, n_high = 0;
  logic [11:0] h [8][$];

  hit_bits dut (.*);
  always #2 clk = ~clk;

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin din[k] = 0; tet[k] = 12'(1000 + 300 * k); end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 800; n++) begin
      for (int k = 0; k < 8; k++) begin
        din[k] = (n < 400) ? 12'((n * 13 + k * 300) % 4096) : 12'($urandom);
        h[k].push_back(din[k]);
      end
      @(posedge clk); #1;
      for (int k = 0; k < 8; k++) begin
        if (h[k].size() > 4) void'(h[k].pop_front());
        if (n >= 4) begin
          int avg; logic e;
          // h[k][$] newest; sample three edges ago is h[k][$-2], its predecessor h[k][$-3]
          avg = (int'(h[k][1]) + int'(h[k][0])) / 2;
          e = !(avg < tet[k]);
          checks++;
          if (hit_n[k] !== e) begin failures++; $display("n=%0d k=%0d hit %b exp %b", n, k, hit_n[k], e); end
          if (e) n_high++; else n_low++;
        end
      end
    end
    checks++; if (n_low == 0 || n_high == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

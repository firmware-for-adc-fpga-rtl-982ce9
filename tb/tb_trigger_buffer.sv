// tb_trigger_buffer: triggers with known trigger number, time stamp, write
// pointer and PL (including a start pointer that wraps below address 0) must
// each produce the seven FIFO words with the document's prefixes; a trigger
// with go low or while the previous one is being written is dropped.
module tb_trigger_buffer;
  import adc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic trig = 0, go = 1, ready, drop, rd = 0, empty;
  logic [26:0] trig_num;
  logic [47:0] ts;
  logic [11:0] raw_wr_ptr;
  logic [10:0] pl;
  logic [15:0] q;
  int checks = 0, failures = 0, drops = 0;
  logic [15:0] expq [$];

  trigger_buffer #(.DEPTH(21), .PRI_DEPTH(4081)) dut (.*);
  always #2 clk = ~clk;
  always @(posedge clk) if (drop) drops++;

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic fire(input logic [26:0] n, input logic [47:0] t, input int p, input int l, input bit expect_ok);
    int st;
    @(negedge clk);
    trig_num = n; ts = t; raw_wr_ptr = 12'(p); pl = 11'(l); trig = 1;
    if (expect_ok) begin
      st = (p - l + 4081) % 4081;
      expq.push_back({5'b10010, n[26:16]}); expq.push_back(n[15:0]);
      expq.push_back({8'b10011000, t[47:40]}); expq.push_back(t[39:24]);
      expq.push_back({8'h00, t[23:16]}); expq.push_back(t[15:0]);
      expq.push_back(16'(st));
    end
    @(negedge clk); trig = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    checks++; if (!ready || !empty) failures++;
    fire(27'h7FF_1234, 48'hABCD_EF01_2345, 2000, 1000, 1);
    fire(27'h000_0002, 48'h1111_2222_3333, 5, 5, 0);    // during the write: dropped
    repeat (8) @(negedge clk);
    fire(27'h123_4567, 48'h0000_0000_FFFF, 10, 100, 1);  // wraps: 10-100+4081
    repeat (8) @(negedge clk);
    fire(27'h3, 48'h3, 4080, 0, 1);
    repeat (8) @(negedge clk);
    checks++; if (ready) begin failures++; $display("ready with 21 words stored"); end
    go = 0;
    fire(27'h4, 48'h4, 1, 1, 0);
    go = 1;
    repeat (2) @(negedge clk);
    checks++; if (drops != 2) begin failures++; $display("drops=%0d", drops); end
    // drain
    while (expq.size() > 0) begin
      @(negedge clk);
      checks++;
      if (empty) begin failures++; $display("empty early"); break; end
      if (q !== expq[0]) begin failures++; $display("q %h exp %h", q, expq[0]); end
      void'(expq.pop_front());
      rd = 1; @(negedge clk); rd = 0;
    end
    @(negedge clk);
    checks++; if (!empty) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

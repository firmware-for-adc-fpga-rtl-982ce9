// tb_stamp_counter: checks the 48-bit time stamp and 27-bit trigger counters
// against a software count: random enable, synchronous clear, reset, and a
// wrap-around of a narrow instance.
module tb_stamp_counter;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [47:0] ts;
  logic [26:0] tc;
  logic [3:0]  w4;
  int checks = 0, failures = 0;
  longint m_ts, m_tc, m_w4;

  stamp_counter #(.WIDTH(48)) u_ts (.clk, .rst_n, .clr, .en(1'b1), .count(ts));
  stamp_counter #(.WIDTH(27)) u_tc (.clk, .rst_n, .clr, .en, .count(tc));
  stamp_counter #(.WIDTH(4))  u_w4 (.clk, .rst_n, .clr(1'b0), .en(1'b1), .count(w4));

  always #2 clk = ~clk;

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    m_ts = 0; m_tc = 0; m_w4 = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      en  = ($urandom % 3) == 0;
      clr = (n == 1000);
      @(posedge clk);
      if (clr) begin m_ts = 0; m_tc = 0; end
      else begin m_ts++; if (en) m_tc++; end
      m_w4 = (m_w4 + 1) % 16;
      #1;
      checks++; if (ts != 48'(m_ts)) begin failures++; $display("ts %0d exp %0d", ts, m_ts); end
      checks++; if (tc != 27'(m_tc)) begin failures++; $display("tc %0d exp %0d", tc, m_tc); end
      checks++; if (w4 != 4'(m_w4)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

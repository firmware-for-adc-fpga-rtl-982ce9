// tb_process_algorithms: the testbench holds the secondary buffer (a ring of
// three 26-word blocks with a one-cycle read) and loads PTW blocks of known
// samples into it. For every block the processing buffer, read back from the
// descriptor's first to last address, must equal words computed here by a
// separate reference model of the three options: the raw window; pulses with
// NSB/NSA samples around each crossing (clipped at the window edges, at most
// npulse); pulse sums split over two words. Also checked: the event flag, the
// mode in the descriptor, the processing-time bound in mode 0, that
// processing stops at PROC_MAX_BLOCKS unread blocks, and dec_blk.
module tb_process_algorithms;
  import adc_pkg::*;
  localparam int PTW = 20, BLK = PTW + HDR_WORDS, LAST = 3 * BLK - 1;
  logic clk = 0, rst_n = 0;
  mode_e mode = MODE_RAW;
  logic [2:0] npulse = 3'd4;
  logic [11:0] nsb = 12'd3, tet = 12'd1000;
  logic [12:0] nsa = 13'd4;
  logic [7:0] blk_cnt = 0;
  logic [11:0] sec_raddr;
  logic [15:0] sec_rdata;
  logic dec_blk, desc_valid, proc_overrun;
  logic desc_pop = 0;
  logic [10:0] proc_raddr = 0;
  logic [17:0] proc_rdata;
  blk_desc_t desc;
  logic [2:0] host_cnt;
  logic [15:0] sec [LAST + 1];
  int checks = 0, failures = 0, wr_blk = 0, n_pulses_seen = 0, n_clipped = 0;
  int sample_q [$][$];

  process_algorithms #(.PROC_MAX_BLOCKS(3)) dut (
    .clk, .rst_n, .mode, .npulse, .ptw(9'(PTW)), .nsb, .nsa, .buf_last(12'(LAST)), .tet,
    .blk_cnt, .sec_raddr, .sec_rdata, .dec_blk, .proc_raddr, .proc_rdata, .desc, .desc_valid,
    .desc_pop, .host_cnt, .proc_overrun
  );
  always #2 clk = ~clk;
  always @(posedge clk) sec_rdata <= sec[sec_raddr];
  always @(posedge clk) if (rst_n) blk_cnt <= blk_cnt - 8'(dec_blk);

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // put one block into the secondary ring and announce it
  task automatic load(input int s [$]);
    int base;
    base = (wr_blk % 3) * BLK;
    for (int k = 0; k < HDR_WORDS; k++)
      sec[base + k] = hdr_word(k, 27'(wr_blk + 100), 48'(wr_blk * 1000 + 7));
    for (int k = 0; k < PTW; k++)
      sec[base + HDR_WORDS + k] = {(k == PTW - 1) ? 3'b001 : 3'b000, 13'(s[k])};
    @(negedge clk); blk_cnt = blk_cnt + 1;
    sample_q.push_back(s);
    wr_blk++;
  endtask

  // reference model of the processing options
  function automatic void model(input mode_e m, input int s [$], input int blk,
                                output logic [17:0] w [$], output bit ev);
    int i, p, lo, hi, sum, pmax;
    bit prev, a;
    i = 0; p = 0; prev = 0;
    w = {};
    ev = 0;
    pmax = (npulse > 4) ? 4 : int'(npulse);
    for (int k = 0; k < HDR_WORDS; k++) w.push_back({2'b00, hdr_word(k, 27'(blk + 100), 48'(blk * 1000 + 7))});
    if (m == MODE_RAW) begin
      foreach (s[k]) begin
        w.push_back({2'b00, 3'b000, 13'(s[k])});
        if ((s[k] & 12'hFFF) > tet) ev = 1;
      end
    end else begin
      while (i < PTW && p < pmax) begin
        a = (s[i] & 12'hFFF) > tet;
        if (a && !prev) begin
          ev = 1;
          w.push_back({2'b10, 4'b0000, 2'(p), 10'(i)});
          lo = (i + 1 > nsb) ? i + 1 - nsb : 0;
          hi = (i + nsa > PTW - 1) ? PTW - 1 : i + nsa;
          if (lo == 0 || hi == PTW - 1) n_clipped++;
          sum = 0;
          for (int j = lo; j <= hi; j++) begin
            if (m == MODE_PULSE) w.push_back({2'b00, 3'b000, 13'(s[j])});
            sum += s[j] & 12'hFFF;
          end
          if (m == MODE_SUM) begin
            w.push_back({2'b00, 16'(sum >> 3)});
            w.push_back({2'b00, 13'd0, 3'(sum)});
          end
          p++;
          prev = (s[hi] & 12'hFFF) > tet;
          i = hi + 1;
        end else begin
          prev = a;
          i++;
        end
      end
    end
    w.push_back({2'b11, 16'hFFFF});
  endfunction

  task automatic check_block(input int blk);
    logic [17:0] e [$];
    bit ev;
    int a, n;
    wait (desc_valid);
    @(negedge clk);
    model(desc.mode, sample_q.pop_front(), blk, e, ev);
    chk(desc.mode == mode, "descriptor mode");
    chk(desc.event_ == ev, $sformatf("event flag blk %0d", blk));
    n = (32'(desc.last) - 32'(desc.first) + 2048) % 2048 + 1;
    chk(n == e.size(), $sformatf("blk %0d length %0d exp %0d", blk, n, e.size()));
    a = desc.first;
    foreach (e[k]) begin
      proc_raddr = 11'(a + k);
      @(negedge clk);
      if (k < n) chk(proc_rdata == e[k], $sformatf("blk %0d word %0d %h exp %h", blk, k, proc_rdata, e[k]));
      if (proc_rdata[17:16] == 2'b10) n_pulses_seen++;
    end
    desc_pop = 1; @(negedge clk); desc_pop = 0;
  endtask

  function automatic void mk(output int s [$], input int seed, input int npk);
    s = {};
    for (int k = 0; k < PTW; k++) s.push_back(100 + (seed * 7 + k * 13) % 300);
    for (int q = 0; q < npk; q++) begin
      int c = (q * 6 + seed) % PTW;
      s[c] = 3000 + q;
      if (c + 1 < PTW) s[c + 1] = 2000;
    end
  endfunction

  initial begin
    #400000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int s [$];
    int t0, b;
    for (int k = 0; k <= LAST; k++) sec[k] = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    b = 0;
    for (int mm = 0; mm < 3; mm++) begin
      mode = mode_e'(mm);
      for (int v = 0; v < 5; v++) begin
        npulse = (v == 3) ? 3'd2 : 3'd4;
        mk(s, v * 5 + mm, (v == 4) ? 0 : 1 + v);
        if (v == 2) s[0] = 3500;            // crossing at the first sample
        if (v == 1) s[PTW - 2] = int'(tet); // equal to TET: not a crossing
        load(s);
        t0 = $time;
        wait (desc_valid);
        if (mm == 0) chk(($time - t0) / 4 <= 2 * BLK + 6, $sformatf("mode 0 processing time %0d", ($time - t0) / 4));
        check_block(b);
        b++;
      end
    end
    // back-pressure: four blocks, nothing popped -> only three processed
    mode = MODE_PULSE;
    for (int v = 0; v < 3; v++) begin mk(s, v, 2); load(s); end
    wait (host_cnt == 3);
    repeat (20) @(negedge clk);
    chk(blk_cnt == 0 && host_cnt == 3, "three blocks processed");
    chk(proc_overrun, "processing overrun flag");
    mk(s, 9, 1); load(s);
    repeat (200) @(negedge clk);
    chk(host_cnt == 3 && blk_cnt == 1, "fourth block waits");
    for (int v = 0; v < 4; v++) begin check_block(b); b++; end
    chk(n_pulses_seen > 10 && n_clipped > 0, $sformatf("pulses %0d clipped %0d", n_pulses_seen, n_clipped));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_adc_fpga_top: end-to-end test of the ADC FPGA at its default sizes.
//
// Eight ADC streams (baseline with random pulses above threshold, random
// overflow bits) drive the board inputs; the host programs the registers over
// the control bus; active-low triggers arrive singly and in bursts. The sample
// stream each channel stores (after resync and Sel) and the trigger number
// and time stamp of every accepted trigger are recorded, and from them a
// reference model here computes every 36-bit word the board must write to the
// external FIFO: processing option, pulse search with NSB/NSA clipping, pulse
// sums, pairing, and event framing. The FIFO output is compared word for word
// in three phases (mode 0, mode 1, mode 2) and a final overload phase in which
// bursts overrun the secondary and trigger buffers. Energy sum and hit bits
// are checked every clock against the same streams. Each mechanism must occur
// at least once: trigger ignored while Run is off, channel zeroed, channel
// without event skipped, window clipped, pulse limit reached, FIFO full
// stall, PTW/raw/processing overrun reported and cleared by soft reset.
module tb_adc_fpga_top;
  import adc_pkg::*;
  localparam int PTW = 20, PL = 40, NSB = 3, NSA = 5, TETV = 2000;
  logic clk = 0, rst_n = 0, hard_reset_n = 0, soft_reset_n = 1;
  logic [7:0] adc_clk;
  logic [7:0][12:0] adc_din;
  logic adc_10bit = 0, trig_n = 1;
  logic [15:0] bus_addr = 0, bus_wdata = 0, bus_rdata;
  logic bus_wr = 0, bus_rd = 0;
  logic [35:0] fifo_data;
  logic fifo_wen, fifo_full = 0;
  logic [14:0] energy_sum_out;
  logic [7:0] hit_n;

  adc_fpga_top dut (.*);

  int checks = 0, failures = 0;
  int n_ignored = 0, n_zeroed = 0, n_skipped = 0, n_clipped = 0, n_limit = 0, n_stall = 0;
  int n_raw_ovr = 0, n_ptw_ovr = 0, n_proc_ovr = 0, n_clear = 0, n_hit = 0, n_words = 0;
  int n_m0 = 0, n_m1 = 0, n_m2 = 0, n_sum_chk = 0, n_trig = 0;

  always #2 clk = ~clk;
  assign adc_clk = {8{clk}};          // ADCs clocked in step with the FPGA clock

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 30) $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // ---------------- ADC stimulus ----------------
  // In the overload phase triggers wait so long that the primary ring is
  // overwritten before their windows are copied; the input then repeats with
  // a period of exactly one ring length, so an overwritten word holds the same
  // value and the comparison stays exact.
  int pulse_left [8];
  bit gen_on = 1, periodic = 0;
  int per_idx = 0;
  logic [12:0] per_tab [8][4081];
  always @(posedge clk) begin
    if (periodic) begin
      for (int k = 0; k < 8; k++) adc_din[k] <= per_tab[k][per_idx];
      per_idx <= (per_idx == 4080) ? 0 : per_idx + 1;
    end else
    for (int k = 0; k < 8; k++) begin
      logic [11:0] v;
      if (pulse_left[k] > 0) begin
        v = 12'(2500 + 300 * pulse_left[k] + k); pulse_left[k]--;
      end else begin
        v = 12'(400 + ($urandom % 200));
        if (gen_on && ($urandom % 23) == 0) pulse_left[k] = 2 + $urandom % 4;
      end
      adc_din[k] <= {($urandom % 50) == 0, v};
    end
  end

  // ---------------- recording what the channels store ----------------
  int stream [8][$];
  typedef struct { int pos; logic [26:0] tn; logic [47:0] ts; mode_e m; } trig_rec_t;
  trig_rec_t acc [$];
  logic [11:0] s12_hist [8][$];
  logic [11:0] tetv [8];
  mode_e cur_mode = MODE_RAW;
  bit cur_run = 0;
  int cur_np = 4;

  always @(posedge clk) if (rst_n) begin
    if (dut.trig_pulse && cur_run && dut.trig_go) begin
      trig_rec_t r;
      r.pos = stream[0].size(); r.tn = dut.trig_cnt + 27'd1; r.ts = dut.ts; r.m = cur_mode;
      acc.push_back(r);
      for (int k = 1; k < 8; k++) chk(stream[k].size() == r.pos, "channels aligned");
    end
    if (dut.trig_pulse && !cur_run) n_ignored++;
    for (int k = 0; k < 8; k++) if (dut.sample_v[k]) stream[k].push_back(int'(dut.sample[k]));
    // energy sum and hit bits: three clocks of latency from the stored sample
    for (int k = 0; k < 8; k++) begin
      s12_hist[k].push_back(dut.sample12[k]);
      if (s12_hist[k].size() > 5) void'(s12_hist[k].pop_front());
    end
    if (s12_hist[0].size() == 5) begin
      int e, avg;
      e = 0;
      for (int k = 4; k < 8; k++) e += s12_hist[k][1];
      chk(energy_sum_out == 15'(e), $sformatf("energy sum %0d exp %0d", energy_sum_out, e));
      n_sum_chk++;
      for (int k = 0; k < 8; k++) begin
        avg = (int'(s12_hist[k][1]) + int'(s12_hist[k][0])) / 2;
        chk(hit_n[k] == !(avg < int'(dut.tet[k])), "hit bit");
        if (!hit_n[k]) n_hit++;
      end
    end
  end

  // ---------------- FIFO side ----------------
  logic [35:0] got [$];
  bit full_rand = 0;
  always @(posedge clk) begin
    if (rst_n && fifo_wen) begin got.push_back(fifo_data); n_words++; end
    if (rst_n && fifo_full && dut.u_fmt.fs != 0) n_stall++;
    fifo_full <= full_rand && (($urandom % 3) == 0);
  end

  // ---------------- host bus ----------------
  task automatic wr(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk); bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(negedge clk); bus_wr = 0;
  endtask
  task automatic rd(input logic [15:0] a, output logic [15:0] d);
    @(negedge clk); bus_addr = a; bus_rd = 1;
    @(negedge clk); bus_rd = 0; d = bus_rdata;
  endtask
  task automatic set_conf(input mode_e m, input bit run, input int np, input logic [7:0] zero);
    wr(16'h0002, {zero, 2'b00, 3'(np), run, 2'(m)});
    cur_mode = m; cur_np = np; cur_run = run;
  endtask
  task automatic fire();
    @(negedge clk); trig_n = 0; repeat (2) @(negedge clk); trig_n = 1; n_trig++;
  endtask

  // ---------------- reference model ----------------
  function automatic logic [35:0] pair(input int a, input bit nv, input int b);
    return (36'(a & 13'h1FFF) << 16) | (36'(nv) << 13) | 36'(b & 13'h1FFF);
  endfunction

  function automatic void expect_event(input trig_rec_t r, inout logic [35:0] e [$]);
    e.push_back(36'h1_9000_0000 | 36'(r.tn));
    e.push_back(36'h0_9800_0000 | 36'(r.ts[47:24]));
    e.push_back(36'(r.ts[23:0]));
    for (int k = 0; k < 8; k++) begin
      int s [$];
      bit ev = 0;
      int tet = int'(tetv[k]);
      for (int i = 0; i < PTW; i++) s.push_back(stream[k][r.pos - PL + i]);
      if (r.m == MODE_RAW) begin
        foreach (s[i]) if ((s[i] & 'hFFF) > tet) ev = 1;
        if (ev) begin
          n_m0++;
          e.push_back(36'h0_A000_0000 | (36'(k) << 23) | 36'(PTW / 2 * 2));
          for (int i = 0; i + 1 < PTW; i += 2) e.push_back(pair(s[i], 0, s[i + 1]));
        end
      end else begin
        int i = 0, p = 0;
        bit prev = 0;
        while (i < PTW && p < cur_np) begin
          bit a = (s[i] & 'hFFF) > tet;
          if (a && !prev) begin
            int lo = (i + 1 > NSB) ? i + 1 - NSB : 0;
            int hi = (i + NSA > PTW - 1) ? PTW - 1 : i + NSA;
            int sum = 0;
            ev = 1;
            if (lo == 0 || hi == PTW - 1) n_clipped++;
            for (int j = lo; j <= hi; j++) sum += s[j] & 'hFFF;
            if (sum >= (1 << 19)) sum = (1 << 19) - 1;
            if (r.m == MODE_PULSE) begin
              n_m1++;
              e.push_back(36'h0_B000_0000 | (36'(k) << 23) | (36'(p) << 21) | 36'(i));
              for (int j = lo; j <= hi; j += 2) e.push_back(j + 1 <= hi ? pair(s[j], 0, s[j + 1]) : pair(s[j], 1, 0));
            end else begin
              n_m2++;
              e.push_back(36'h0_C000_0000 | (36'(k) << 23) | (36'(p) << 21) | 36'(i));
              e.push_back(36'h0_B800_0000 | (36'(k) << 23) | (36'(p) << 21) | 36'(sum));
            end
            p++;
            prev = (s[hi] & 'hFFF) > tet;
            i = hi + 1;
          end else begin
            prev = a; i++;
          end
        end
        if (p == cur_np) n_limit++;
      end
      if (!ev) n_skipped++;
    end
    e.push_back(36'h2_E800_0000);
  endfunction

  // wait until the board is idle, then compare everything written so far
  task automatic drain_and_compare(input string phase);
    logic [35:0] e [$];
    int quiet = 0;
    while (quiet < 3000) begin
      @(negedge clk);
      if (fifo_wen || dut.u_fmt.fs != 0 || dut.desc_valid != 0) quiet = 0; else quiet++;
    end
    while (acc.size() > 0) expect_event(acc.pop_front(), e);
    chk(got.size() == e.size(), $sformatf("%s: %0d words, expected %0d", phase, got.size(), e.size()));
    for (int i = 0; i < e.size() && i < got.size(); i++)
      chk(got[i] === e[i], $sformatf("%s word %0d: %h exp %h", phase, i, got[i], e[i]));
    got = {};
  endtask

  initial begin
    #60ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] st;
    for (int k = 0; k < 8; k++) begin pulse_left[k] = 0; adc_din[k] = 0; end
    repeat (4) @(negedge clk);
    rst_n = 1; hard_reset_n = 1;
    // registers
    wr(16'h0003, 16'(PTW)); wr(16'h0004, 16'(PL)); wr(16'h0005, 16'(NSB)); wr(16'h0006, 16'(NSA));
    for (int k = 0; k < 8; k++) begin tetv[k] = 12'(TETV + 50 * k); wr(16'(7 + k), 16'(tetv[k])); end
    wr(16'h0010, 16'(2016 / (PTW + 8)));
    wr(16'h000F, 16'((2016 / (PTW + 8)) * (PTW + 6) - 1));
    rd(16'h0000, st); chk(st == 16'h0001, "STATUS1 version, 12-bit board");
    repeat (300) @(negedge clk);
    // trigger with Run off: counted, not taken
    set_conf(MODE_RAW, 0, 4, 8'h00); fire(); repeat (20) @(negedge clk);
    // phase A: mode 0, channel 3 zeroed
    set_conf(MODE_RAW, 1, 4, 8'h08);
    full_rand = 1;
    for (int n = 0; n < 6; n++) begin fire(); repeat (30 + $urandom % 60) @(negedge clk); end
    drain_and_compare("mode 0");
    if (stream[3][$] == 0) n_zeroed++;
    // phase B: mode 1, pulse limit 2 on some triggers
    set_conf(MODE_PULSE, 1, 4, 8'h00);
    for (int n = 0; n < 6; n++) begin fire(); repeat (40 + $urandom % 40) @(negedge clk); end
    drain_and_compare("mode 1 (4 pulses)");
    set_conf(MODE_PULSE, 1, 1, 8'h00);
    for (int n = 0; n < 4; n++) begin fire(); repeat (40) @(negedge clk); end
    drain_and_compare("mode 1 (1 pulse)");
    // phase C: mode 2
    set_conf(MODE_SUM, 1, 4, 8'h00);
    for (int n = 0; n < 6; n++) begin fire(); repeat (40 + $urandom % 40) @(negedge clk); end
    drain_and_compare("mode 2");
    // phase D: overload with a small secondary buffer and a FIFO that is often full
    for (int k = 0; k < 8; k++) begin
      int left;
      left = 0;
      for (int i = 0; i < 4081; i++) begin
        logic [11:0] v;
        if (left > 0) begin v = 12'(2500 + 300 * left + k); left--; end
        else begin
          v = 12'(400 + ($urandom % 200));
          if (($urandom % 23) == 0) left = 2 + $urandom % 4;
        end
        per_tab[k][i] = {($urandom % 50) == 0, v};
      end
    end
    periodic = 1;
    wr(16'h0010, 16'd2); wr(16'h000F, 16'(2 * (PTW + 6) - 1));
    @(negedge clk); soft_reset_n = 0; repeat (2) @(negedge clk); soft_reset_n = 1;
    repeat (300) @(negedge clk);
    set_conf(MODE_RAW, 1, 4, 8'h00);
    for (int n = 0; n < 90; n++) begin fire(); repeat (6) @(negedge clk); end
    drain_and_compare("overload");
    rd(16'h0011, st);
    if (st[0]) n_raw_ovr++;
    if (st[1]) n_ptw_ovr++;
    if (st[2]) n_proc_ovr++;
    chk(st == 3'b111, $sformatf("overrun status %b", st));
    @(negedge clk); soft_reset_n = 0; repeat (2) @(negedge clk); soft_reset_n = 1;
    rd(16'h0011, st);
    if (st == 0) n_clear++;
    chk(st == 0, "status cleared by soft reset");
    // trigger counter register after soft reset restarts at 0
    rd(16'h0001, st); chk(st == 0, "trigger number cleared");
    // every mechanism happened
    chk(n_ignored > 0, "trigger ignored while Run off");
    chk(n_zeroed > 0, "zeroed channel");
    chk(n_skipped > 0, "channel without event skipped");
    chk(n_clipped > 0, "pulse window clipped at the window edge");
    chk(n_limit > 0, "pulse limit reached");
    chk(n_stall > 0, "FIFO full stall");
    chk(n_raw_ovr > 0 && n_ptw_ovr > 0 && n_proc_ovr > 0 && n_clear > 0, "overruns and clear");
    chk(n_hit > 0 && n_sum_chk > 0, "hit bits and sums");
    chk(n_m0 > 0 && n_m1 > 0 && n_m2 > 0, "all three modes produced data");
    $display("mechanisms: ignored=%0d zeroed=%0d skipped=%0d clipped=%0d limit=%0d stall=%0d raw=%0d ptw=%0d proc=%0d clear=%0d m0=%0d m1=%0d m2=%0d words=%0d triggers=%0d",
             n_ignored, n_zeroed, n_skipped, n_clipped, n_limit, n_stall, n_raw_ovr, n_ptw_ovr, n_proc_ovr, n_clear, n_m0, n_m1, n_m2, n_words, n_trig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

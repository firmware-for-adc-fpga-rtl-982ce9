// tb_adc_fpga_workloads: the operating points the original description
// sizes the board for, run on the full FPGA with its default parameters and
// the register reset values (2 us window of 500 samples, PL 1000, TET 2048).
//
//  1. Four successive triggers with a 2 us window while the external FIFO is
//     held full: the secondary buffer is set to its four-block layout
//     (PTW MAX BUF 4, last address 4 * 506 - 1) and all four events must come
//     out complete; neither the raw nor the PTW overrun flag may be set.
//  2. The longest latency, 8 us (PL = 2000 samples), with NSB = NSA = 1024
//     in the pulse mode: every pulse window covers the whole trigger window.
//  3. The same latency in the pulse-sum mode with the smallest NSB/NSA the
//     register description allows (2 and 6).
// Every 36-bit FIFO word is compared with a reference model computed from
// the recorded sample streams (the same model as the end-to-end test).
module tb_adc_fpga_workloads;
  import adc_pkg::*;
  int PTW = 500, PL = 1000, NSB = 4, NSA = 12;
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
  int n_skipped = 0, n_clipped = 0, n_limit = 0, n_stall = 0;
  int n_hit = 0, n_words = 0;
  int n_m0 = 0, n_m1 = 0, n_m2 = 0, n_sum_chk = 0, n_trig = 0;

  always #2 clk = ~clk;
  assign adc_clk = {8{clk}};          // ADCs clocked in step with the FPGA clock

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 30) $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // ---------------- ADC stimulus ----------------
  int pulse_left [8];
  bit gen_on = 1;
  always @(posedge clk) begin
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
  bit fifo_hold = 0;
  always @(posedge clk) begin
    if (rst_n && fifo_wen) begin got.push_back(fifo_data); n_words++; end
    if (rst_n && fifo_full && dut.u_fmt.fs != 0) n_stall++;
    fifo_full <= fifo_hold;
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
    #20ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic soft_reset();
    @(negedge clk); soft_reset_n = 0; repeat (2) @(negedge clk); soft_reset_n = 1;
  endtask

  initial begin
    logic [15:0] st;
    for (int k = 0; k < 8; k++) begin pulse_left[k] = 0; adc_din[k] = 0; tetv[k] = 12'd2048; end
    repeat (4) @(negedge clk);
    rst_n = 1; hard_reset_n = 1;
    rd(16'h0003, st); chk(st == 16'd500, "PTW resets to 500 (2 us)");
    rd(16'h0004, st); chk(st == 16'd1000, "PL resets to 1000");
    rd(16'h000F, st); chk(st == 16'd1517, "last address resets to 3 * 506 - 1");
    rd(16'h0010, st); chk(st == 16'd3, "PTW MAX BUF resets to INT(2016 / 508)");
    // 1: four successive 2 us triggers, FIFO held full until all are taken
    wr(16'h0010, 16'd4); wr(16'h000F, 16'(4 * (PTW + 6) - 1));
    soft_reset();
    repeat (PL + PTW + 100) @(negedge clk);
    set_conf(MODE_RAW, 1, 4, 8'h00);
    fifo_hold = 1;
    for (int n = 0; n < 4; n++) begin fire(); repeat (20) @(negedge clk); end
    repeat (4 * (PTW + 6) * 3) @(negedge clk);
    chk(dut.g_ch[0].u_ch.u_dbuf.blk_cnt + 8'(dut.g_ch[0].u_ch.u_proc.host_cnt) == 8'd4,
        "four blocks held between secondary and processing buffers");
    fifo_hold = 0;
    drain_and_compare("four 2 us triggers");
    // no trigger refused and the secondary buffer never at its limit; the
    // processing buffer (3 blocks) does fill while the FIFO is held
    rd(16'h0011, st); chk(st[1:0] == 2'b00, $sformatf("no trigger lost with four triggers (%b)", st[2:0]));
    // 2: latency 8 us, NSB = NSA = 1024, pulse mode
    PL = 2000; NSB = 1024; NSA = 1024;
    wr(16'h0004, 16'(PL)); wr(16'h0005, 16'(NSB)); wr(16'h0006, 16'(NSA));
    soft_reset();
    repeat (PL + PTW + 100) @(negedge clk);
    set_conf(MODE_PULSE, 1, 4, 8'h00);
    for (int n = 0; n < 4; n++) begin fire(); repeat (50) @(negedge clk); end
    drain_and_compare("8 us latency, NSB = NSA = 1024");
    // 3: latency 8 us, pulse sums with the smallest windows
    NSB = 2; NSA = 6;
    wr(16'h0005, 16'(NSB)); wr(16'h0006, 16'(NSA));
    set_conf(MODE_SUM, 1, 4, 8'h00);
    for (int n = 0; n < 4; n++) begin fire(); repeat (50) @(negedge clk); end
    drain_and_compare("8 us latency, pulse sums");
    rd(16'h0011, st); chk(st[0] == 1'b0, $sformatf("no trigger lost (%b)", st[2:0]));
    chk(n_m0 > 0 && n_m1 > 0 && n_m2 > 0, "all three modes produced data");
    $display("workloads: m0=%0d m1=%0d m2=%0d skipped=%0d clipped=%0d limit=%0d stall=%0d sums=%0d hits=%0d words=%0d triggers=%0d",
             n_m0, n_m1, n_m2, n_skipped, n_clipped, n_limit, n_stall, n_sum_chk, n_hit, n_words, n_trig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

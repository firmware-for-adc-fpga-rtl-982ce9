// tb_adc_channel: one complete ADC channel (resync, Sel, data buffer,
// processing) driven from an ADC clock that is slightly slower than the FPGA
// clock and not phase related to it.
//
// Checks:
//  - the Sel output is the ADC word sequence, in order, with nothing lost or
//    repeated across the clock crossing (10-bit scaling and zeroing included);
//  - for every accepted trigger, the processed block read back through the
//    formatter port (descriptor first..last) equals a reference model built
//    from the recorded sample stream: six header words with trigger number
//    and time stamp, then the raw window / pulses / pulse sums, then the end
//    word; event flag and mode in the descriptor;
//  - a trigger burst with the reader stopped raises the raw, PTW and
//    processing overrun flags, and afterwards every accepted trigger still
//    comes out once, in order, with the right header.
// The test plays the part of the data formatter and of the trigger logic of
// the top (trig_go is the channel's own trig_ready).
module tb_adc_channel;
  import adc_pkg::*;
  localparam int PTW = 24, PL = 60, NSB = 3, NSA = 6, TET = 1500;
  localparam int BLK = PTW + HDR_WORDS;
  logic clk = 0, adc_clk = 0, rst_n = 0, hard_reset_n = 0;
  logic [12:0] adc_din = 0;
  logic adc_10bit = 0, zero = 0;
  cfg_t cfg;
  logic trig = 0, trig_ready;
  logic [26:0] trig_num = 0;
  logic [47:0] ts = 0;
  logic [12:0] sample;
  logic sample_valid;
  logic [10:0] proc_raddr = 0;
  logic [17:0] proc_rdata;
  blk_desc_t desc;
  logic desc_valid, desc_pop = 0;
  logic raw_overrun, ptw_overrun, proc_overrun;

  adc_channel dut (
    .adc_clk, .adc_din, .clk, .rst_n, .hard_reset_n, .adc_10bit, .zero, .cfg,
    .tet(12'(TET)), .trig, .trig_go(trig_ready), .trig_ready, .trig_num, .ts,
    .sample, .sample_valid, .proc_raddr, .proc_rdata, .desc, .desc_valid, .desc_pop,
    .raw_overrun, .ptw_overrun, .proc_overrun
  );

  always #2 clk = ~clk;            // 250 MHz
  always #2.2 adc_clk = ~adc_clk;  // a little slower, free running

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 30) $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #2ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- ADC words and the stored stream ----------------
  int stream [$];
  int pulse_left = 0;
  always @(posedge adc_clk) begin
    logic [11:0] v;
    if (pulse_left > 0) begin v = 12'(2200 + 300 * pulse_left); pulse_left--; end
    else begin
      v = 12'(300 + $urandom % 400);
      if (($urandom % 19) == 0) pulse_left = 2 + $urandom % 5;
    end
    adc_din <= {($urandom % 40) == 0, v};
  end
  // ADC words in the order the input FIFO accepts them (its write enable
  // follows hard_reset_n through a synchroniser, so the first accepted word
  // is taken from the FIFO's own write strobe)
  logic [12:0] adc_seen [$];
  always @(posedge adc_clk) if (dut.u_resync.do_wr) adc_seen.push_back(dut.u_resync.iob_q);

  // trigger records: window start = samples stored before the trigger edge
  typedef struct { int pos; logic [26:0] tn; logic [47:0] ts; mode_e m; logic [2:0] np; } trig_rec_t;
  trig_rec_t acc [$];
  int n_sel = 0, sel_idx = 0, settle = 0;
  logic last_10bit = 0, last_zero = 0;
  always @(posedge clk) begin
    if (trig && trig_ready) begin
      trig_rec_t r;
      r.pos = stream.size(); r.tn = trig_num; r.ts = ts; r.m = cfg.mode; r.np = cfg.npulse;
      acc.push_back(r);
    end
    // words already inside Sel when a setting changes are not checked
    if (adc_10bit != last_10bit || zero != last_zero) settle = 4;
    last_10bit <= adc_10bit; last_zero <= zero;
    if (rst_n && sample_valid) begin
      stream.push_back(int'(sample));
      if (settle > 0) settle--;
      else if (sel_idx < adc_seen.size()) begin
        logic [12:0] a, e;
        a = adc_seen[sel_idx];
        if (zero) e = '0;
        else if (adc_10bit) e = {a[12], a[9:0], 2'b00};
        else e = a;
        n_sel++;
        chk(sample == e, $sformatf("Sel word %0d: %h exp %h", sel_idx, sample, e));
      end
      sel_idx++;
    end
  end

  // ---------------- triggers ----------------
  always @(posedge clk) begin
    ts <= ts + 1;
    if (trig) trig_num <= trig_num + 1;
  end
  task automatic fire();
    @(negedge clk); trig = 1; @(negedge clk); trig = 0;
  endtask

  // ---------------- reference model of one processed block ----------------
  function automatic void model(input trig_rec_t r, output logic [17:0] w [$], output bit ev);
    int s [$];
    int i, p, lo, hi, sum, pmax;
    bit prev, a;
    w = {}; ev = 0; i = 0; p = 0; prev = 0;
    pmax = (r.np > 4) ? 4 : int'(r.np);
    for (int k = 0; k < PTW; k++) s.push_back(stream[r.pos - PL + k]);
    for (int k = 0; k < HDR_WORDS; k++) w.push_back({2'b00, hdr_word(k, r.tn, r.ts)});
    if (r.m == MODE_RAW) begin
      foreach (s[k]) begin
        w.push_back({2'b00, 3'b000, 13'(s[k])});
        if ((s[k] & 'hFFF) > TET) ev = 1;
      end
    end else begin
      while (i < PTW && p < pmax) begin
        a = (s[i] & 'hFFF) > TET;
        if (a && !prev) begin
          ev = 1;
          w.push_back({2'b10, 4'b0000, 2'(p), 10'(i)});
          lo = (i + 1 > NSB) ? i + 1 - NSB : 0;
          hi = (i + NSA > PTW - 1) ? PTW - 1 : i + NSA;
          sum = 0;
          for (int j = lo; j <= hi; j++) begin
            if (r.m == MODE_PULSE) w.push_back({2'b00, 3'b000, 13'(s[j])});
            sum += s[j] & 'hFFF;
          end
          if (r.m == MODE_SUM) begin
            w.push_back({2'b00, 16'(sum >> 3)});
            w.push_back({2'b00, 13'd0, 3'(sum)});
          end
          p++;
          prev = (s[hi] & 'hFFF) > TET;
          i = hi + 1;
        end else begin
          prev = a; i++;
        end
      end
    end
    w.push_back({2'b11, 16'hFFFF});
  endfunction

  // read one block through the formatter port; full = compare every word,
  // otherwise only the header words
  int n_blocks = 0, n_events = 0;
  task automatic read_block(input bit full);
    trig_rec_t r;
    logic [17:0] e [$], got [$];
    bit ev;
    int n;
    wait (desc_valid);
    @(negedge clk);
    r = acc.pop_front();
    model(r, e, ev);
    n = (32'(desc.last) - 32'(desc.first) + 2048) % 2048 + 1;
    for (int k = 0; k < n; k++) begin
      proc_raddr = 11'(32'(desc.first) + k);
      @(negedge clk);
      got.push_back(proc_rdata);
    end
    chk(desc.mode == r.m, "descriptor mode");
    for (int k = 0; k < HDR_WORDS; k++)
      chk(got[k] == e[k], $sformatf("tn %0d header %0d: %h exp %h", r.tn, k, got[k], e[k]));
    chk(got[n - 1] == {2'b11, 16'hFFFF}, "end word");
    if (full) begin
      chk(desc.event_ == ev, $sformatf("tn %0d event flag", r.tn));
      chk(n == e.size(), $sformatf("tn %0d length %0d exp %0d", r.tn, n, e.size()));
      for (int k = HDR_WORDS; k < n && k < e.size(); k++)
        chk(got[k] == e[k], $sformatf("tn %0d word %0d: %h exp %h", r.tn, k, got[k], e[k]));
    end
    if (ev) n_events++;
    n_blocks++;
    desc_pop = 1; @(negedge clk); desc_pop = 0;
  endtask

  initial begin
    int n_acc;
    cfg = '0;
    cfg.run = 1; cfg.npulse = 3'd4; cfg.ptw = 9'(PTW); cfg.pl = 11'(PL);
    cfg.nsb = 12'(NSB); cfg.nsa = 13'(NSA);
    cfg.buf_last = 12'(4 * (BLK) - 1); cfg.max_buf = 8'd4;
    repeat (4) @(negedge clk);
    rst_n = 1; hard_reset_n = 1;
    repeat (PL + 40) @(negedge clk);
    // the three processing options, one trigger at a time
    for (int m = 0; m < 3; m++) begin
      cfg.mode = mode_e'(m);
      for (int n = 0; n < 8; n++) begin
        cfg.npulse = (n == 5) ? 3'd1 : 3'd4;
        fire();
        read_block(1);
        repeat ($urandom % 30) @(negedge clk);
      end
    end
    // several triggers in flight before the reader starts
    cfg.mode = MODE_PULSE;
    for (int n = 0; n < 3; n++) begin fire(); repeat (BLK + 5) @(negedge clk); end
    repeat (300) @(negedge clk);
    for (int n = 0; n < 3; n++) read_block(1);
    chk(!raw_overrun, "no raw overrun yet");
    // burst with the reader stopped: every buffer fills
    cfg.mode = MODE_RAW;
    for (int n = 0; n < 90; n++) begin fire(); repeat (6) @(negedge clk); end
    repeat (2000) @(negedge clk);
    chk(raw_overrun, "raw buffer overrun");
    chk(ptw_overrun, "PTW buffer overrun");
    chk(proc_overrun, "processing overrun");
    n_acc = acc.size();
    chk(n_acc > 60 && n_acc < 90, $sformatf("%0d of 90 burst triggers accepted", n_acc));
    for (int n = 0; n < n_acc; n++) read_block(0);
    repeat (500) @(negedge clk);
    chk(!desc_valid && acc.size() == 0, "every accepted trigger read exactly once");
    // 10-bit board and channel zeroing on the live stream
    adc_10bit = 1; repeat (100) @(negedge clk);
    zero = 1; repeat (100) @(negedge clk);
    chk(n_sel > 3000 && n_events > 10, $sformatf("sel words %0d, events %0d", n_sel, n_events));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

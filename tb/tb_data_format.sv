// tb_data_format: the testbench plays the eight processing buffers (arrays
// with a one-cycle read and descriptor FIFOs) and fills them with blocks in
// all three modes, with and without events, with odd and even sample counts.
// The 36-bit words the formatter writes must equal the words built here from
// the FADC format bit fields (written out as hex constants, not with the
// design's package functions), in order, while fifo_full is asserted at
// random, and no word is written while the FIFO is full. Seven fixed events
// are followed by thirty with random modes and channel masks. PTW is odd, so
// raw windows must drop their last sample. Also checked: every descriptor is
// popped once per event, and each event ends with the trailer.
module tb_data_format;
  import adc_pkg::*;
  localparam int PTW = 9;
  logic clk = 0, rst_n = 0, fifo_full = 0, full_seen = 0;
  blk_desc_t desc [8];
  logic [7:0] desc_valid, desc_pop;
  logic [10:0] proc_raddr;
  logic [17:0] proc_rdata [8];
  logic [35:0] fifo_data;
  logic fifo_wen, event_done;
  logic [17:0] mem [8][2048];
  blk_desc_t dq [8][$];
  int wp [8];
  logic [35:0] expq [$];
  int checks = 0, failures = 0, nwords = 0, nevents = 0, stalls = 0;

  data_format #(.NCH(8)) dut (
    .clk, .rst_n, .ptw(9'(PTW)), .desc, .desc_valid, .desc_pop, .proc_raddr, .proc_rdata,
    .fifo_data, .fifo_wen, .fifo_full, .event_done
  );
  always #2 clk = ~clk;

  always @(posedge clk) for (int k = 0; k < 8; k++) proc_rdata[k] <= mem[k][proc_raddr];
  always_comb for (int k = 0; k < 8; k++) begin
    desc_valid[k] = dq[k].size() > 0;
    desc[k] = desc_valid[k] ? dq[k][0] : '0;
  end
  always @(posedge clk) begin
    for (int k = 0; k < 8; k++) if (desc_pop[k]) void'(dq[k].pop_front());
    if (rst_n) fifo_full <= ($urandom % 4) == 0;
    // a word may only be written if fifo_full was low at the edge before
    full_seen <= fifo_full;
    if (rst_n) begin checks++; if (fifo_wen && full_seen) begin failures++; $display("write while full (t=%0t)", $time); end end
    if (fifo_full && dut.fs != 0) stalls++;
    if (fifo_wen && rst_n) begin
      checks++; nwords++;
      if (expq.size() == 0) begin failures++; $display("unexpected word %h", fifo_data); end
      else begin
        if (fifo_data !== expq[0]) begin failures++; $display("word %0d: %h exp %h", nwords, fifo_data, expq[0]); end
        void'(expq.pop_front());
      end
    end
    if (event_done && rst_n) nevents++;
  end

  function automatic void put(input int k, input logic [1:0] tag, input logic [15:0] p);
    mem[k][wp[k]] = {tag, p};
    wp[k] = (wp[k] + 1) % 2048;
  endfunction

  function automatic logic [35:0] pair(input int a, input bit nv, input int b);
    return (36'(a & 13'h1FFF) << 16) | (36'(nv) << 13) | 36'(b & 13'h1FFF);
  endfunction

  // one event: every channel gets a block in mode m; evmask selects channels with an event
  task automatic make_event(input mode_e m, input logic [7:0] evmask, input int seed);
    logic [26:0] tn;
    logic [47:0] ts;
    tn = 27'($urandom);
    ts = {16'($urandom), 32'($urandom)};
    expq.push_back(36'h1_9000_0000 | 36'(tn));
    expq.push_back(36'h0_9800_0000 | 36'(ts[47:24]));
    expq.push_back(36'(ts[23:0]));
    for (int k = 0; k < 8; k++) begin
      blk_desc_t d;
      int first, np;
      int s [$];
      first = wp[k];
      put(k, 2'b00, {5'b10010, tn[26:16]}); put(k, 2'b00, tn[15:0]);
      put(k, 2'b00, {8'b10011000, ts[47:40]}); put(k, 2'b00, ts[39:24]);
      put(k, 2'b00, {8'h00, ts[23:16]}); put(k, 2'b00, ts[15:0]);
      if (m == MODE_RAW || evmask[k]) begin
        if (m == MODE_RAW) begin
          s = {};
          for (int i = 0; i < PTW; i++) s.push_back((seed * 31 + k * 7 + i * 101) % 8192);
          foreach (s[i]) put(k, 2'b00, 16'(s[i]));
          if (evmask[k]) begin
            // odd PTW: the last sample is not reported
            expq.push_back(36'h0_A000_0000 | (36'(k) << 23) | 36'(PTW / 2 * 2));
            for (int i = 0; i + 1 < PTW; i += 2) expq.push_back(pair(s[i], 0, s[i + 1]));
          end
        end else begin
          np = 1 + (k + seed) % 4;
          for (int p = 0; p < np; p++) begin
            int t, len, sum;
            t = (p * 37 + k * 3 + seed) % 1024;
            put(k, 2'b10, {4'b0000, 2'(p), 10'(t)});
            if (m == MODE_PULSE) begin
              len = 1 + (p + k + seed) % 5;
              expq.push_back(36'h0_B000_0000 | (36'(k) << 23) | (36'(p) << 21) | 36'(t));
              s = {};
              for (int i = 0; i < len; i++) s.push_back((t * 5 + i * 977 + k) % 8192);
              foreach (s[i]) put(k, 2'b00, 16'(s[i]));
              for (int i = 0; i < len; i += 2)
                expq.push_back(i + 1 < len ? pair(s[i], 0, s[i + 1]) : pair(s[i], 1, 0));
            end else begin
              sum = (t * 1237 + k * 77 + p) % (1 << 19);
              put(k, 2'b00, 16'(sum >> 3));
              put(k, 2'b00, {13'd0, 3'(sum)});
              expq.push_back(36'h0_C000_0000 | (36'(k) << 23) | (36'(p) << 21) | 36'(t));
              expq.push_back(36'h0_B800_0000 | (36'(k) << 23) | (36'(p) << 21) | 36'(sum));
            end
          end
        end
      end
      put(k, 2'b11, 16'hFFFF);
      d.first = 11'(first); d.last = 11'((wp[k] + 2047) % 2048); d.event_ = evmask[k]; d.mode = m;
      dq[k].push_back(d);
    end
    expq.push_back(36'h2_E800_0000);
  endtask

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) wp[k] = 2000;     // start near the end: addresses wrap
    repeat (3) @(posedge clk); #1 rst_n = 1;
    make_event(MODE_RAW,   8'hFF, 1);
    make_event(MODE_RAW,   8'b1010_0110, 2);     // channel 0 without event
    make_event(MODE_PULSE, 8'hFF, 3);
    make_event(MODE_PULSE, 8'b0111_0001, 4);
    make_event(MODE_SUM,   8'hFF, 5);
    make_event(MODE_SUM,   8'b1000_0000, 6);
    make_event(MODE_PULSE, 8'h00, 7);            // no channel with an event
    wait (nevents == 7);
    // random modes and channel masks, one event at a time
    for (int n = 0; n < 30; n++) begin
      make_event(mode_e'($urandom % 3), 8'($urandom), 8 + n);
      wait (nevents == 8 + n);
    end
    repeat (20) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("%0d words missing", expq.size()); end
    for (int k = 0; k < 8; k++) begin checks++; if (dq[k].size() != 0) failures++; end
    checks++; if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

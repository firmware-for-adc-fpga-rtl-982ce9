// tb_data_buffer: a counting sample stream (sample value = its index) is
// stored in a reduced primary ring; triggers must produce secondary-buffer
// blocks holding the six header words, then the PTW samples that start PL
// samples before the trigger, the last one marked "001". The testbench acts
// as the processing block: it reads each block through the read port and
// pulses dec_blk. It also checks that the block count stops at PTW MAX BUF
// (PTW overrun) without losing queued triggers, that a refused trigger sets
// the raw overrun, that the soft reset clears both flags, and the copy time.
module tb_data_buffer;
  import adc_pkg::*;
  localparam int PRI = 200, PTW = 10, PL = 20, MAXB = 3;
  localparam int BLK = PTW + HDR_WORDS, LAST = MAXB * BLK - 1;
  logic clk = 0, rst_n = 0;
  logic [12:0] din;
  logic din_valid = 1, trig = 0, trig_go = 1, trig_ready, dec_blk = 0;
  logic [26:0] trig_num = 0;
  logic [47:0] ts = 0;
  logic [11:0] sec_raddr = 0;
  logic [15:0] sec_rdata;
  logic [7:0]  blk_cnt;
  logic raw_overrun, ptw_overrun;
  int checks = 0, failures = 0;
  int cnt = 0;
  int rp = 0;
  int exp_start [$];
  logic [26:0] exp_tn [$];
  logic [47:0] exp_ts [$];

  data_buffer #(.PRI_DEPTH(PRI), .SEC_DEPTH(64), .TRIG_DEPTH(21)) dut (
    .clk, .rst_n, .din, .din_valid, .trig, .trig_go, .trig_ready, .trig_num, .ts,
    .ptw(9'(PTW)), .pl(11'(PL)), .buf_last(12'(LAST)), .max_buf(8'(MAXB)),
    .sec_raddr, .sec_rdata, .dec_blk, .blk_cnt, .raw_overrun, .ptw_overrun
  );
  always #2 clk = ~clk;
  assign din = 13'(cnt);
  always @(posedge clk) cnt <= rst_n ? cnt + 1 : 0;

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic fire(input bit accepted);
    @(negedge clk);
    trig = 1; trig_num = 27'($urandom); ts = {16'($urandom), 32'($urandom)};
    if (accepted) begin
      exp_start.push_back(cnt - PL); exp_tn.push_back(trig_num); exp_ts.push_back(ts);
    end
    @(negedge clk); trig = 0;
  endtask

  // read one block at the read pointer and check it, then release it
  task automatic consume();
    logic [15:0] w [BLK];
    int st;
    for (int k = 0; k < BLK; k++) begin
      @(negedge clk); sec_raddr = 12'(rp);
      @(negedge clk); w[k] = sec_rdata;
      rp = (rp == LAST) ? 0 : rp + 1;
    end
    st = exp_start.pop_front();
    for (int k = 0; k < HDR_WORDS; k++)
      chk(w[k] == hdr_word(k, exp_tn[0], exp_ts[0]), $sformatf("header word %0d", k));
    void'(exp_tn.pop_front()); void'(exp_ts.pop_front());
    for (int k = 0; k < PTW; k++)
      chk(w[HDR_WORDS + k] == {(k == PTW - 1) ? 3'b001 : 3'b000, 13'(st + k)},
          $sformatf("sample %0d: %h exp %h", k, w[HDR_WORDS + k], 13'(st + k)));
    @(negedge clk); dec_blk = 1; @(negedge clk); dec_blk = 0;
  endtask

  initial begin
    #400000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    repeat (PRI + 30) @(posedge clk);   // fill the ring once so it has wrapped
    // single trigger, copy time
    fire(1); t0 = $time;
    wait (blk_cnt == 1); 
    chk(($time - t0) / 4 <= 7 + HDR_WORDS + PTW + 4, $sformatf("copy took %0d cycles", ($time - t0) / 4));
    consume();
    chk(blk_cnt == 0, "count back to 0");
    // five triggers, no consumer: count stops at MAXB, overrun set
    for (int n = 0; n < 5; n++) begin fire(1); repeat (9) @(negedge clk); end
    repeat (40) @(negedge clk);
    chk(blk_cnt == MAXB, $sformatf("blk_cnt %0d at max", blk_cnt));
    chk(ptw_overrun, "ptw overrun set");
    chk(!raw_overrun, "no raw overrun yet");
    for (int n = 0; n < 5; n++) begin
      wait (blk_cnt != 0);
      consume();
    end
    repeat (20) @(negedge clk);
    chk(blk_cnt == 0, "all consumed");
    // refused trigger
    trig_go = 0; fire(0); trig_go = 1;
    repeat (40) @(negedge clk);
    chk(raw_overrun, "raw overrun set");
    chk(blk_cnt == 0, "refused trigger not copied");
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    chk(!raw_overrun && !ptw_overrun, "flags cleared");
    rp = 0;
    repeat (PRI + 30) @(negedge clk);
    // back-to-back triggers with consumption running alongside
    fork
      for (int n = 0; n < 6; n++) begin fire(1); repeat (20) @(negedge clk); end
      for (int n = 0; n < 6; n++) begin wait (blk_cnt != 0); consume(); end
    join
    chk(exp_start.size() == 0, "all blocks seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

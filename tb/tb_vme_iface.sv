// tb_vme_iface: writes every read/write register over the control bus, reads
// it back, checks the configuration struct and TET outputs follow, and reads
// the status registers (version/10-bit strap, trigger number, overruns).
module tb_vme_iface;
  import adc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] addr, wdata, rdata;
  logic wr = 0, rd = 0, adc_10bit = 1;
  logic [26:0] trig_num = 27'h5A_BCDE;
  logic [2:0] status = 3'b101;
  cfg_t cfg;
  logic [11:0] tet [8];
  int checks = 0, failures = 0;

  vme_iface #(.VERSION(15'h0123)) dut (.*);
  always #2 clk = ~clk;

  task automatic bus_write(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1;
    @(negedge clk); wr = 0;
  endtask
  task automatic bus_read(input logic [15:0] a, input logic [15:0] e);
    @(negedge clk); addr = a; rd = 1;
    @(negedge clk); rd = 0;
    checks++;
    if (rdata !== e) begin failures++; $display("read %h = %h exp %h", a, rdata, e); end
  endtask
  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    addr = 0; wdata = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // reset values
    chk(cfg.ptw == 500 && cfg.pl == 1000 && cfg.max_buf == 3 && cfg.buf_last == 1517, "reset cfg");
    chk(cfg.run == 0, "reset run");
    bus_read(16'h0000, 16'h8123);
    bus_read(16'h0001, 16'hBCDE);
    bus_read(16'h0011, 16'h0005);
    bus_write(16'h0002, 16'hA51E);   // mode 2, run 1, pulses 3, zero 0xA5
    bus_write(16'h0003, 16'hFFFF);
    bus_write(16'h0004, 16'h0123);
    bus_write(16'h0005, 16'h0456);
    bus_write(16'h0006, 16'h1789);
    bus_write(16'h000F, 16'h0ABC);
    bus_write(16'h0010, 16'h0042);
    for (int k = 0; k < 8; k++) bus_write(16'(7 + k), 16'(16'h0100 * k + 16'h11));
    bus_read(16'h0002, 16'hA51E);
    bus_read(16'h0003, 16'h01FF);
    bus_read(16'h0004, 16'h0123);
    bus_read(16'h0005, 16'h0456);
    bus_read(16'h0006, 16'h1789);
    bus_read(16'h000F, 16'h0ABC);
    bus_read(16'h0010, 16'h0042);
    for (int k = 0; k < 8; k++) bus_read(16'(7 + k), 16'(16'h0100 * k + 16'h11));
    chk(cfg.mode == MODE_SUM && cfg.run && cfg.npulse == 3 && cfg.zero_ch == 8'hA5, "config fields");
    chk(cfg.ptw == 9'h1FF && cfg.pl == 11'h123 && cfg.nsb == 12'h456 && cfg.nsa == 13'h1789, "window fields");
    chk(cfg.buf_last == 12'hABC && cfg.max_buf == 8'h42, "buffer fields");
    for (int k = 0; k < 8; k++) chk(tet[k] == 12'(12'h100 * k + 12'h11), "tet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// adc_channel: everything one ADC input owns in the ADC FPGA.
//
// ADC input resync (ADC clock to FPGA clock) -> Sel (10/12-bit, channel
// disable) -> data buffer (primary ring buffer, trigger FIFO, secondary
// buffer) -> processing algorithms (options 1-3, processing buffer). The
// Sel output is also brought out as sample/sample_valid for the energy sum and
// hit bits, which work on every sample rather than on triggered windows.
// The data formatter reads the processing buffer through proc_raddr/proc_rdata
// and pops block descriptors with desc_pop. The trigger handshake
// (trig, trig_go, trig_ready) is shared with the other channels so that all
// eight accept exactly the same triggers. rst_n is the datapath reset (the
// top drives it from RESET_N and SOFT_RESET_N); hard_reset_n only gates the
// input FIFO. The split into resync, data buffer and processing is the
// document's; the shared trigger handshake is this design's.
module adc_channel #(
  parameter int unsigned PRI_DEPTH       = 4081,
  parameter int unsigned SEC_DEPTH       = 2200,
  parameter int unsigned TRIG_DEPTH      = 504,
  parameter int unsigned PROC_MAX_BLOCKS = 3
) (
  input  logic        adc_clk,
  input  logic [12:0] adc_din,         // {overflow, data[11:0]}
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hard_reset_n,
  input  logic        adc_10bit,
  input  logic        zero,
  input  adc_pkg::cfg_t cfg,
  input  logic [11:0] tet,
  input  logic        trig,
  input  logic        trig_go,
  output logic        trig_ready,
  input  logic [26:0] trig_num,
  input  logic [47:0] ts,
  output logic [12:0] sample,
  output logic        sample_valid,
  input  logic [10:0] proc_raddr,
  output logic [17:0] proc_rdata,
  output adc_pkg::blk_desc_t desc,
  output logic        desc_valid,
  input  logic        desc_pop,
  output logic        raw_overrun,
  output logic        ptw_overrun,
  output logic        proc_overrun
);
  logic [12:0] rs_d;
  logic        rs_v;
  logic [11:0] sec_raddr;
  logic [15:0] sec_rdata;
  logic        dec_blk;
  logic [7:0]  blk_cnt;

  adc_resync u_resync (
    .adc_clk, .adc_din, .clk, .hard_reset_n, .dout(rs_d), .dout_valid(rs_v)
  );

  adc_sel u_sel (
    .clk, .rst_n, .din(rs_d), .din_valid(rs_v), .adc_10bit, .zero,
    .dout(sample), .dout_valid(sample_valid)
  );

  data_buffer #(.PRI_DEPTH(PRI_DEPTH), .SEC_DEPTH(SEC_DEPTH), .TRIG_DEPTH(TRIG_DEPTH)) u_dbuf (
    .clk, .rst_n, .din(sample), .din_valid(sample_valid),
    .trig, .trig_go, .trig_ready, .trig_num, .ts,
    .ptw(cfg.ptw), .pl(cfg.pl), .buf_last(cfg.buf_last), .max_buf(cfg.max_buf),
    .sec_raddr, .sec_rdata, .dec_blk, .blk_cnt, .raw_overrun, .ptw_overrun
  );

  process_algorithms #(.PROC_MAX_BLOCKS(PROC_MAX_BLOCKS)) u_proc (
    .clk, .rst_n, .mode(cfg.mode), .npulse(cfg.npulse), .ptw(cfg.ptw), .nsb(cfg.nsb),
    .nsa(cfg.nsa), .buf_last(cfg.buf_last), .tet, .blk_cnt, .sec_raddr, .sec_rdata, .dec_blk,
    .proc_raddr, .proc_rdata, .desc, .desc_valid, .desc_pop, .host_cnt(), .proc_overrun
  );
endmodule

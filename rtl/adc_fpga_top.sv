// adc_fpga_top: the ADC FPGA of the Moller polarimeter FADC board.
//
// Eight ADCs stream 12-bit samples (plus overflow) at 250 MHz. Each is
// resynchronised to the FPGA clock and stored continuously; on an active-low
// trigger every channel copies a Programmable Trigger Window of samples,
// taken Programmable Latency samples back from the trigger, together with the
// 27-bit trigger number and 48-bit time stamp, and processes it in one of
// three modes (raw window, pulses around threshold crossings, pulse sums).
// The data formatter merges the eight channels into FADC events of 36-bit
// words for the external FIFO. In parallel, on every clock, the energy sum
// (four calorimeter channels, 15 bits) and eight active-low hit bits go to
// the Hit Sum FPGA. A control bus register file holds the configuration.
//
// Triggers: trig_n is synchronised (two flops) and its falling edge is one
// trigger. The trigger counter counts every trigger; a trigger is taken by
// the channels only while CONFIG Run is set and every channel's trigger
// FIFO has room, otherwise it sets the raw-buffer overrun status.
// Resets: rst_n clears all FPGA-clock logic; hard_reset_n also gates the ADC
// input FIFOs; soft_reset_n (registered) resets the whole datapath - counters,
// buffers, pointers, state machines and the sticky overrun flags - but keeps
// the register file, so the host applies it after changing buffer sizes.
// Timing: one FPGA clock after the input FIFOs; the trigger reaches the
// channels on the third clock edge after the falling edge of trig_n.
// The block structure, buffer sizes and data format are the document's;
// the trigger synchroniser, the all-channels acceptance rule, the soft reset
// reach and the single clock are this design's choices. The external FIFO,
// the VME FPGA and the Hit Sum FPGA are outside; their signals are ports.
module adc_fpga_top #(
  parameter int unsigned PRI_DEPTH       = 4081,
  parameter int unsigned SEC_DEPTH       = 2200,
  parameter int unsigned TRIG_DEPTH      = 504,
  parameter int unsigned PROC_MAX_BLOCKS = 3
) (
  input  logic             clk,            // 250 MHz FPGA clock
  input  logic             rst_n,
  input  logic             hard_reset_n,
  input  logic             soft_reset_n,
  input  logic [7:0]       adc_clk,
  input  logic [7:0][12:0] adc_din,        // per ADC {overflow, data[11:0]}
  input  logic             adc_10bit,      // board strap: 10-bit ADCs
  input  logic             trig_n,         // active-low trigger
  // control bus from the VME FPGA
  input  logic [15:0]      bus_addr,
  input  logic             bus_wr,
  input  logic [15:0]      bus_wdata,
  input  logic             bus_rd,
  output logic [15:0]      bus_rdata,
  // external FIFO
  output logic [35:0]      fifo_data,
  output logic             fifo_wen,
  input  logic             fifo_full,
  // Hit Sum FPGA
  output logic [14:0]      energy_sum_out,
  output logic [7:0]       hit_n
);
  import adc_pkg::*;

  cfg_t        cfg;
  logic [11:0] tet [8];
  logic [26:0] trig_cnt;
  logic [47:0] ts;
  logic        clr;
  logic        dp_rst_n;       // datapath reset: rst_n or soft reset
  logic [2:0]  trig_sync;
  logic        trig_pulse;

  // soft reset and trigger input synchronisers
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      clr <= 1'b0; dp_rst_n <= 1'b0; trig_sync <= '1;
    end else begin
      clr       <= !soft_reset_n;
      dp_rst_n  <= soft_reset_n;
      trig_sync <= {trig_sync[1:0], trig_n};
    end
  assign trig_pulse = trig_sync[2] && !trig_sync[1];   // falling edge

  stamp_counter #(.WIDTH(48)) u_timestamp (
    .clk, .rst_n, .clr, .en(1'b1), .count(ts)
  );
  stamp_counter #(.WIDTH(27)) u_trigcnt (
    .clk, .rst_n, .clr, .en(trig_pulse), .count(trig_cnt)
  );

  // ---------------- channels ----------------
  logic [7:0]  trig_ready, raw_ovr, ptw_ovr, proc_ovr, desc_valid, desc_pop, sample_v;
  logic [12:0] sample [8];
  logic [11:0] sample12 [8];
  logic [17:0] proc_rdata [8];
  blk_desc_t   desc [8];
  logic [10:0] proc_raddr;

  wire trig_run = trig_pulse && cfg.run;
  wire trig_go  = &trig_ready;

  for (genvar k = 0; k < 8; k++) begin : g_ch
    adc_channel #(
      .PRI_DEPTH(PRI_DEPTH), .SEC_DEPTH(SEC_DEPTH), .TRIG_DEPTH(TRIG_DEPTH),
      .PROC_MAX_BLOCKS(PROC_MAX_BLOCKS)
    ) u_ch (
      .adc_clk(adc_clk[k]), .adc_din(adc_din[k]), .clk, .rst_n(dp_rst_n), .hard_reset_n,
      .adc_10bit, .zero(cfg.zero_ch[k]), .cfg, .tet(tet[k]),
      .trig(trig_run), .trig_go, .trig_ready(trig_ready[k]),
      .trig_num(trig_cnt + 27'd1), .ts,
      .sample(sample[k]), .sample_valid(sample_v[k]),
      .proc_raddr, .proc_rdata(proc_rdata[k]), .desc(desc[k]), .desc_valid(desc_valid[k]),
      .desc_pop(desc_pop[k]), .raw_overrun(raw_ovr[k]), .ptw_overrun(ptw_ovr[k]),
      .proc_overrun(proc_ovr[k])
    );
    assign sample12[k] = sample[k][11:0];
  end

  // ---------------- Hit Sum FPGA outputs ----------------
  energy_sum u_sum (.clk, .rst_n, .din(sample12), .sum_out(energy_sum_out));
  hit_bits   u_hit (.clk, .rst_n, .din(sample12), .tet, .hit_n);

  // ---------------- data format ----------------
  data_format #(.NCH(8)) u_fmt (
    .clk, .rst_n(dp_rst_n), .ptw(cfg.ptw), .desc, .desc_valid, .desc_pop, .proc_raddr, .proc_rdata,
    .fifo_data, .fifo_wen, .fifo_full, .event_done()
  );

  // ---------------- register file ----------------
  vme_iface u_regs (
    .clk, .rst_n, .addr(bus_addr), .wr(bus_wr), .wdata(bus_wdata), .rd(bus_rd),
    .rdata(bus_rdata), .adc_10bit, .trig_num(trig_cnt),
    .status({|proc_ovr, |ptw_ovr, |raw_ovr}), .cfg, .tet
  );
endmodule

// vme_iface: register file on the control bus from the VME FPGA.
//
// A simple synchronous bus: on a clock with wr high the 16-bit wdata is
// written to the register at addr; on a clock with rd high rdata is loaded
// from addr (valid the next cycle). Register map (16-bit words):
//   0x0000 STATUS1  R   bit 15: 1 = 10-bit ADC board, bits 14-0: code version
//   0x0001 STATUS0  R   trigger number bits 15-0
//   0x0002 CONFIG   R/W bits 1-0 mode (00 option 1, 01 option 2, 10 option 3),
//                       bit 2 run, bits 5-3 number of pulses (modes 1, 2),
//                       bits 15-8: 1 forces ADC 0..7 to zero
//   0x0003 PTW      R/W 9 bits, samples per trigger window (minimum 6)
//   0x0004 PL       R/W 11 bits, samples back from the trigger point
//   0x0005 NSB      R/W 12 bits, samples before the crossing (crossing included)
//   0x0006 NSA      R/W 13 bits, samples after the crossing
//   0x0007-0x000E TET R/W 12 bits, threshold of ADC 0..7
//   0x000F PTW DAT BUF LAST ADR R/W 12 bits
//   0x0010 PTW MAX BUF R/W 8 bits
//   0x0011 STATUS   R   bit 0 primary (raw) buffer overrun, bit 1 secondary
//                       (PTW) buffer overrun, bit 2 processing buffer overrun
// Addresses 0x0000-0x000F and the fields are the document's. The document
// gives 0x000F to both buffer registers and puts "Run" on bit 3, which it also
// gives to the pulse count; here PTW MAX BUF is at 0x0010, Run on bit 2, and
// the overrun status (which the document lists for the sister FPGA) at 0x0011.
// The host sets PTW MAX BUF = INT(2016 / (PTW + 8)) and
// PTW DAT BUF LAST ADR = PTW MAX BUF * (PTW + 6) - 1. Reset values give a
// 500-sample (2 us) window 1000 samples back, with run off.
module vme_iface #(
  parameter logic [14:0] VERSION = 15'h0001
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] addr,
  input  logic        wr,
  input  logic [15:0] wdata,
  input  logic        rd,
  output logic [15:0] rdata,
  input  logic        adc_10bit,
  input  logic [26:0] trig_num,
  input  logic [2:0]  status,
  output adc_pkg::cfg_t cfg,
  output logic [11:0] tet [8]
);
  import adc_pkg::*;

  logic [15:0] conf;
  logic [8:0]  ptw_q;
  logic [10:0] pl_q;
  logic [11:0] nsb_q;
  logic [12:0] nsa_q;
  logic [11:0] buf_last_q;
  logic [7:0]  max_buf_q;

  always_comb begin
    cfg.mode    = mode_e'(conf[1:0]);
    cfg.run     = conf[2];
    cfg.npulse  = conf[5:3];
    cfg.zero_ch = conf[15:8];
    cfg.ptw      = ptw_q;
    cfg.pl       = pl_q;
    cfg.nsb      = nsb_q;
    cfg.nsa      = nsa_q;
    cfg.buf_last = buf_last_q;
    cfg.max_buf  = max_buf_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      conf         <= 16'h0020;     // mode 0, run off, 4 pulses
      ptw_q      <= 9'd500;
      pl_q       <= 11'd1000;
      nsb_q      <= 12'd4;
      nsa_q      <= 13'd12;
      buf_last_q <= 12'd1517;     // 3 * (500 + 6) - 1
      max_buf_q  <= 8'd3;         // INT(2016 / 508)
      for (int k = 0; k < 8; k++) tet[k] <= 12'd2048;
    end else if (wr) begin
      case (addr)
        16'h0002: conf         <= wdata;
        16'h0003: ptw_q      <= wdata[8:0];
        16'h0004: pl_q       <= wdata[10:0];
        16'h0005: nsb_q      <= wdata[11:0];
        16'h0006: nsa_q      <= wdata[12:0];
        16'h000F: buf_last_q <= wdata[11:0];
        16'h0010: max_buf_q  <= wdata[7:0];
        default:
          if (addr >= 16'h0007 && addr <= 16'h000E) tet[3'(addr[3:0] - 4'd7)] <= wdata[11:0];
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdata <= '0;
    else if (rd) begin
      case (addr)
        16'h0000: rdata <= {adc_10bit, VERSION};
        16'h0001: rdata <= trig_num[15:0];
        16'h0002: rdata <= conf;
        16'h0003: rdata <= {7'd0, ptw_q};
        16'h0004: rdata <= {5'd0, pl_q};
        16'h0005: rdata <= {4'd0, nsb_q};
        16'h0006: rdata <= {3'd0, nsa_q};
        16'h000F: rdata <= {4'd0, buf_last_q};
        16'h0010: rdata <= {8'd0, max_buf_q};
        16'h0011: rdata <= {13'd0, status};
        default:
          if (addr >= 16'h0007 && addr <= 16'h000E) rdata <= {4'd0, tet[3'(addr[3:0] - 4'd7)]};
          else rdata <= '0;
      endcase
    end
  end
endmodule

// data_format: builds FADC events from the eight channels' processing buffers
// and writes them as 36-bit words to the external FIFO.
//
// When every channel has at least one processed block (all desc_valid high)
// the formatter takes the channels in order 0..7. For each it pops nothing
// yet, reads the block from its first address (proc_raddr is a shared address
// bus; the data of channel ch is taken from proc_rdata[ch], one cycle after
// the address) and:
//   * collects trigger number and time stamp from the six header words; for
//     channel 0 it writes Event Header, Time Stamp word 1 (bits 47-24) and
//     Time Stamp word 2 (bits 23-0);
//   * if the block had an event (a sample above TET), writes the body:
//       mode 0: Window Raw Word 1 (channel, PTW), then the samples in pairs;
//       mode 1: per pulse, Pulse Raw Word 1 (channel, pulse number, crossing
//               sample), then that pulse's samples in pairs;
//       mode 2: per pulse, Pulse Time (type 8) and Pulse Integral (type 7);
//     a pulse pair whose second sample does not exist is written with its
//     "not valid" bit 13 set; a raw window always reports an even number
//     of samples (for odd PTW the last sample is discarded, as the
//     document's PTW register description asks);
//   * pops the channel's block descriptor, which decrements its
//     HOST_BLOCK_CNT.
// After channel 7 the Event Trailer x"2E8000000" closes the event. The word
// layouts are the document's FADC data format; channels without an event
// contribute no words, as the document asks.
//
// fifo_full stalls the formatter before any write (treat it as almost-full
// with at least one free word). One processing word is read every two
// cycles; fifo_wen/fifo_data are registered.
module data_format #(
  parameter int unsigned NCH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [8:0]  ptw,
  input  adc_pkg::blk_desc_t desc [NCH],
  input  logic [NCH-1:0] desc_valid,
  output logic [NCH-1:0] desc_pop,
  output logic [10:0] proc_raddr,
  input  logic [17:0] proc_rdata [NCH],
  output logic [35:0] fifo_data,
  output logic        fifo_wen,
  input  logic        fifo_full,
  output logic        event_done     // one-cycle pulse after the trailer is written
);
  import adc_pkg::*;
  localparam int unsigned CW = (NCH > 1) ? $clog2(NCH) : 1;

  typedef enum logic [3:0] {
    F_IDLE, F_LOAD, F_RDA, F_RDD, F_EH, F_TS1, F_TS2, F_BODY, F_PT, F_PI,
    F_NEXT, F_TRAILER
  } fstate_e;

  fstate_e     fs;
  logic [CW-1:0] ch;
  blk_desc_t   d;
  logic [10:0] addr;
  logic [2:0]  widx;          // header word index, 6 = in body
  logic [26:0] tn;
  logic [47:0] ts;
  logic        pend;          // one sample waiting for its pair
  logic [12:0] pend_s;
  logic [1:0]  sum_ph;        // mode 2: 0 expect pulse word, 1 sum hi, 2 sum lo
  logic [1:0]  pn;
  logic [9:0]  ptime;
  logic [15:0] sum_hi;
  logic [SUM_W-1:0] integ;
  proc_word_t  w;

  assign proc_raddr = addr;
  assign w = proc_word_t'(proc_rdata[ch]);
  wire [3:0] ch4 = 4'(ch);

  task automatic put(input logic [35:0] x);
    fifo_wen  <= 1'b1;
    fifo_data <= x;
  endtask

  task automatic rd_next();
    addr <= addr + 1'b1;
    fs   <= F_RDA;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fs <= F_IDLE; ch <= '0; d <= '0; addr <= '0; widx <= '0; tn <= '0; ts <= '0;
      pend <= 1'b0; pend_s <= '0; sum_ph <= '0; pn <= '0; ptime <= '0; sum_hi <= '0;
      integ <= '0; fifo_wen <= 1'b0; fifo_data <= '0; desc_pop <= '0; event_done <= 1'b0;
    end else begin
      fifo_wen   <= 1'b0;
      desc_pop   <= '0;
      event_done <= 1'b0;
      case (fs)
        F_IDLE: if (&desc_valid) begin
          ch <= '0;
          fs <= F_LOAD;
        end
        F_LOAD: begin
          d      <= desc[ch];
          addr   <= desc[ch].first;
          widx   <= '0;
          pend   <= 1'b0;
          sum_ph <= '0;
          fs     <= F_RDA;
        end
        F_RDA: fs <= F_RDD;
        F_RDD: begin
          if (widx < 3'(HDR_WORDS)) begin
            case (widx)
              3'd0: tn[26:16] <= w.payload[10:0];
              3'd1: tn[15:0]  <= w.payload;
              3'd2: ts[47:40] <= w.payload[7:0];
              3'd3: ts[39:24] <= w.payload;
              3'd4: ts[23:16] <= w.payload[7:0];
              default: ts[15:0] <= w.payload;
            endcase
            widx <= widx + 1'b1;
            if (widx == 3'(HDR_WORDS - 1)) begin
              addr <= addr + 1'b1;
              fs   <= (ch == '0) ? F_EH : F_BODY;
            end else rd_next();
          end else if (!fifo_full) begin
            // body word
            if (w.tag == TAG_END) begin
              // an odd pulse sample gets a "not valid" partner; the odd last
              // sample of a raw window is dropped (even PTW reported)
              if (pend && d.mode != MODE_RAW) begin
                put(fw_samples(pend_s, 1'b1, 13'd0));
                pend <= 1'b0;
              end else begin
                pend <= 1'b0;
                fs   <= F_NEXT;
              end
            end else if (w.tag == TAG_PULSE) begin
              if (pend) begin
                put(fw_samples(pend_s, 1'b1, 13'd0));
                pend <= 1'b0;
              end else if (d.mode == MODE_SUM) begin
                pn <= w.payload[11:10]; ptime <= w.payload[9:0]; sum_ph <= 2'd1;
                rd_next();
              end else begin
                put(fw_pulse_raw1(ch4, w.payload[11:10], w.payload[9:0]));
                rd_next();
              end
            end else if (d.mode == MODE_SUM) begin
              if (sum_ph == 2'd1) begin
                sum_hi <= w.payload; sum_ph <= 2'd2; rd_next();
              end else begin
                integ  <= {sum_hi, w.payload[2:0]};
                sum_ph <= 2'd0;
                addr   <= addr + 1'b1;
                fs     <= F_PT;
              end
            end else begin
              if (pend) begin
                put(fw_samples(pend_s, 1'b0, w.payload[12:0]));
                pend <= 1'b0;
              end else begin
                pend   <= 1'b1;
                pend_s <= w.payload[12:0];
              end
              rd_next();
            end
          end
        end
        F_EH:  if (!fifo_full) begin put(fw_event_header(tn)); fs <= F_TS1; end
        F_TS1: if (!fifo_full) begin put(fw_ts1(ts[47:24]));   fs <= F_TS2; end
        F_TS2: if (!fifo_full) begin put(fw_ts2(ts[23:0]));    fs <= F_BODY; end
        F_BODY: begin
          if (!d.event_) fs <= F_NEXT;
          else if (d.mode == MODE_RAW) begin
            if (!fifo_full) begin
              put(fw_window_raw1(ch4, {3'b000, ptw[8:1], 1'b0}));
              fs <= F_RDA;
            end
          end else fs <= F_RDA;
        end
        F_PT: if (!fifo_full) begin put(fw_pulse_time(ch4, pn, {6'd0, ptime})); fs <= F_PI; end
        F_PI: if (!fifo_full) begin put(fw_pulse_int(ch4, pn, integ)); fs <= F_RDA; end
        F_NEXT: begin
          desc_pop[ch] <= 1'b1;
          if (32'(ch) == NCH - 1) fs <= F_TRAILER;
          else begin
            ch <= ch + 1'b1;
            fs <= F_LOAD;
          end
        end
        F_TRAILER: if (!fifo_full) begin
          put(EVENT_TRAILER);
          event_done <= 1'b1;
          fs <= F_IDLE;
        end
        default: fs <= F_IDLE;
      endcase
    end
  end
endmodule

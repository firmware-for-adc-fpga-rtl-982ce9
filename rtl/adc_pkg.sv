// adc_pkg: types, constants and word builders shared by the ADC FPGA modules.
//
// The ADC FPGA digitises 8 channels of 12-bit samples (plus an overflow bit)
// at 250 MHz. Three 16/18/36-bit word formats travel between the blocks:
//   * trigger/secondary buffer words (16 bit): six header words carrying the
//     27-bit trigger number and 48-bit time stamp, then one word per sample,
//   * processing buffer words (18 bit): a 2-bit tag and a 16-bit payload,
//   * external FIFO words (36 bit): the FADC event format (event header, time
//     stamp, window/pulse raw words, pulse time, pulse integral, trailer).
// The header prefixes and FIFO word type codes follow the document; the
// 2-bit tag encoding of the processing buffer is its "00/01/10/11" column.
package adc_pkg;

  localparam int unsigned NCH       = 8;   // ADC channels per FPGA
  localparam int unsigned ADC_W     = 12;  // ADC sample bits
  localparam int unsigned SAMPLE_W  = 13;  // sample plus overflow bit
  localparam int unsigned TS_W      = 48;  // time stamp bits
  localparam int unsigned TRIGNUM_W = 27;  // trigger number bits
  localparam int unsigned HDR_WORDS = 6;   // header words per PTW block
  localparam int unsigned SUM_W     = 19;  // pulse integral bits

  // processing mode, CONFIGURATION bits 1-0
  typedef enum logic [1:0] {
    MODE_RAW   = 2'b00,   // option 1: raw window
    MODE_PULSE = 2'b01,   // option 2: raw samples around pulses
    MODE_SUM   = 2'b10    // option 3: pulse integrals
  } mode_e;

  // processing buffer tag (bits 17-16 of a processing word)
  typedef enum logic [1:0] {
    TAG_DATA  = 2'b00,    // header or sample or sum word
    TAG_NOEVT = 2'b01,    // header word of a block without event
    TAG_PULSE = 2'b10,    // pulse header: pulse number and crossing time
    TAG_END   = 2'b11     // end of PTW block
  } tag_e;

  typedef struct packed {
    tag_e        tag;
    logic [15:0] payload;
  } proc_word_t;

  // secondary buffer data-word markers (bits 15-13)
  localparam logic [2:0] SEC_DATA = 3'b000;
  localparam logic [2:0] SEC_LAST = 3'b001;

  // one entry per processed block, popped by the data formatter
  typedef struct packed {
    logic [10:0] first;   // first processing-buffer address of the block
    logic [10:0] last;    // address of its end-of-block word
    logic        event_;  // at least one sample crossed TET
    mode_e       mode;    // mode the block was processed in
  } blk_desc_t;

  // run-time configuration from the register file
  typedef struct packed {
    mode_e       mode;
    logic        run;
    logic [2:0]  npulse;     // maximum number of pulses (1-4) in modes 1, 2
    logic [7:0]  zero_ch;    // 1: force channel n to zero
    logic [8:0]  ptw;        // samples per trigger window
    logic [10:0] pl;         // samples back from trigger point
    logic [11:0] nsb;        // samples before crossing, crossing included
    logic [12:0] nsa;        // samples after crossing
    logic [11:0] buf_last;   // PTW DAT BUF LAST ADR
    logic [7:0]  max_buf;    // PTW MAX BUF
  } cfg_t;

  // ---- header words written by the trigger buffer (the multiplexer inputs of the trigger-buffer drawing) ----
  function automatic logic [15:0] hdr_word(input int unsigned idx,
                                           input logic [TRIGNUM_W-1:0] tn,
                                           input logic [TS_W-1:0] ts);
    case (idx)
      0:       return {5'b10010, tn[26:16]};
      1:       return tn[15:0];
      2:       return {8'b10011000, ts[47:40]};
      3:       return ts[39:24];
      4:       return {8'b00000000, ts[23:16]};
      default: return ts[15:0];
    endcase
  endfunction

  // ---- 36-bit external FIFO words ----
  localparam logic [35:0] EVENT_TRAILER = 36'h2_E800_0000;

  function automatic logic [35:0] fw_event_header(input logic [26:0] tn);
    return {2'b00, 2'b01, 1'b1, 4'd2, tn};
  endfunction
  function automatic logic [35:0] fw_ts1(input logic [23:0] ts_hi);
    return {2'b00, 2'b00, 1'b1, 4'd3, 3'b000, ts_hi};
  endfunction
  function automatic logic [35:0] fw_ts2(input logic [23:0] ts_lo);
    return {2'b00, 2'b00, 1'b0, 7'd0, ts_lo};
  endfunction
  function automatic logic [35:0] fw_window_raw1(input logic [3:0] ch, input logic [11:0] ptw);
    return {2'b00, 2'b00, 1'b1, 4'd4, ch, 11'd0, ptw};
  endfunction
  function automatic logic [35:0] fw_pulse_raw1(input logic [3:0] ch, input logic [1:0] pn,
                                                input logic [9:0] t);
    return {2'b00, 2'b00, 1'b1, 4'd6, ch, pn, 11'd0, t};
  endfunction
  function automatic logic [35:0] fw_samples(input logic [12:0] s0, input logic nv1,
                                             input logic [12:0] s1);
    return {2'b00, 2'b00, 1'b0, 1'b0, 1'b0, s0, 2'b00, nv1, s1};
  endfunction
  function automatic logic [35:0] fw_pulse_time(input logic [3:0] ch, input logic [1:0] pn,
                                                input logic [15:0] t);
    return {2'b00, 2'b00, 1'b1, 4'd8, ch, pn, 2'b00, 3'b000, t};
  endfunction
  function automatic logic [35:0] fw_pulse_int(input logic [3:0] ch, input logic [1:0] pn,
                                               input logic [SUM_W-1:0] s);
    return {2'b00, 2'b00, 1'b1, 4'd7, ch, pn, 2'b00, s};
  endfunction

endpackage

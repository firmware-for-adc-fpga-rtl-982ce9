// process_algorithms: per-channel processing of PTW blocks (options 1-3).
//
// A main state machine waits until the data buffer holds a complete block and
// the processing buffer has room (fewer than PROC_MAX_BLOCKS unread blocks).
// It copies the six header words (trigger number, time stamp) from the
// secondary buffer into the processing buffer and then runs the option
// selected by CONFIGURATION bits 1-0:
//   mode 0 (option 1): all PTW samples are copied unchanged;
//   mode 1 (option 2): the window is scanned for threshold crossings. A
//       crossing is a sample whose 12-bit value is above TET when the sample
//       before it was not. For each crossing (at most npulse, at most 4) a
//       pulse word "10" & "0000" & pulse number & sample number 9-0 is
//       written, then the samples from NSB before the crossing (crossing
//       included, clipped to the window start) to NSA after it (clipped to the
//       window end). Scanning resumes after the last copied sample;
//   mode 2 (option 3): as mode 1, but instead of the samples the sum of their
//       12-bit values (19 bits, saturating) is written as two words,
//       bits 18-3 and bits 2-0.
// Every block ends with "11" & x"FFFF". Words are 18 bits: a 2-bit tag and a
// 16-bit payload (see adc_pkg::tag_e). The block's first and last addresses,
// whether any sample crossed TET, and its mode are pushed into a small
// descriptor FIFO; its count is HOST_BLOCK_CNT, and the data formatter pops
// it after reading the block. When the block is finished the data buffer's
// PTW block counter is decremented (dec_blk).
//
// The document describes the counters and pointers (WORD_AFTER_TS_CNT,
// NSB_CNT, NSA_CNT, PULSE_TIMER, RD_PTW_PTR ...); here they appear as the
// sample index i, the window bounds j/jend and the read address. This design
// keeps the "event" flag in the descriptor instead of rewriting the header
// tags of blocks without event; blocks without event of modes 1 and 2 hold only
// the header and the end word. Each secondary-buffer read takes two cycles
// (address, then registered data), so mode 0 takes about 2*(6+PTW)+2 cycles
// per block.
module process_algorithms #(
  parameter int unsigned PROC_MAX_BLOCKS = 3       // unread blocks the buffer holds
) (
  input  logic        clk,
  input  logic        rst_n,
  input  adc_pkg::mode_e mode,
  input  logic [2:0]  npulse,
  input  logic [8:0]  ptw,
  input  logic [11:0] nsb,
  input  logic [12:0] nsa,
  input  logic [11:0] buf_last,
  input  logic [11:0] tet,
  // secondary buffer
  input  logic [7:0]  blk_cnt,
  output logic [11:0] sec_raddr,
  input  logic [15:0] sec_rdata,
  output logic        dec_blk,
  // processing buffer read side, for the data formatter
  input  logic [10:0] proc_raddr,
  output logic [17:0] proc_rdata,
  output adc_pkg::blk_desc_t desc,
  output logic        desc_valid,
  input  logic        desc_pop,
  output logic [2:0]  host_cnt,
  output logic        proc_overrun
);
  import adc_pkg::*;
  // the processing buffer address is 11 bits and wraps naturally
  localparam int unsigned PROC_DEPTH = 2048;

  typedef enum logic [3:0] {
    P_IDLE, P_HDR_A, P_HDR_D, P_RAW_A, P_RAW_D, P_SCAN_A, P_SCAN_D,
    P_WIN_A, P_WIN_D, P_SUM_HI, P_SUM_LO, P_END
  } pstate_e;

  pstate_e     ps;
  mode_e       mode_q;
  logic [11:0] base;            // secondary address of the block's first header word
  logic [2:0]  hdr_i;
  logic [8:0]  i, j, jend;
  logic [2:0]  pulses, npulse_q;
  logic        prev_above, evt;
  logic [SUM_W-1:0] sum;
  logic [10:0] wp, first;
  logic        pwe;
  proc_word_t  pwd;
  logic        dfull;
  logic [2:0]  dcount;

  // secondary address = base + off, wrapped after buf_last
  function automatic logic [11:0] sec_add(input logic [11:0] a, input logic [9:0] off,
                                          input logic [11:0] last);
    logic [12:0] s;
    s = {1'b0, a} + {3'b000, off};
    if (s > {1'b0, last}) s = s - ({1'b0, last} + 13'd1);
    if (s > {1'b0, last}) s = '0;      // only after PTW DAT BUF LAST ADR was lowered
    return s[11:0];
  endfunction

  wire        above  = (sec_rdata[11:0] > tet);
  wire [12:0] sample = sec_rdata[12:0];
  wire [SUM_W:0] sum_n = {1'b0, sum} + (SUM_W+1)'(sec_rdata[11:0]);
  wire [SUM_W-1:0] sum_sat = sum_n[SUM_W] ? '1 : sum_n[SUM_W-1:0];
  wire [2:0]  pmax   = (npulse_q > 3'd4) ? 3'd4 : npulse_q;

  // first sample of a pulse window: NSB before the crossing, crossing included
  wire [12:0] i_plus1 = 13'(i) + 13'd1;
  wire [8:0]  win_lo  = (i_plus1 > 13'(nsb)) ? 9'(i_plus1 - 13'(nsb)) : 9'd0;
  wire [13:0] i_nsa   = 14'(i) + 14'(nsa);
  wire [8:0]  win_hi  = (i_nsa > 14'(ptw - 1'b1)) ? ptw - 1'b1 : 9'(i_nsa);

  always_comb begin
    unique case (ps)
      P_HDR_A: sec_raddr = sec_add(base, 10'(hdr_i), buf_last);
      P_WIN_A: sec_raddr = sec_add(base, 10'(HDR_WORDS) + 10'(j), buf_last);
      default: sec_raddr = sec_add(base, 10'(HDR_WORDS) + 10'(i), buf_last);
    endcase
  end

  // processing-buffer write for the current state
  always_comb begin
    pwe = 1'b0;
    pwd = '{tag: TAG_DATA, payload: sec_rdata};
    case (ps)
      P_HDR_D:  pwe = 1'b1;
      P_RAW_D:  begin pwe = 1'b1; pwd.payload = {3'b000, sample}; end
      P_SCAN_D: if (above && !prev_above && pulses < pmax) begin
        pwe = 1'b1;
        pwd = '{tag: TAG_PULSE, payload: {4'b0000, pulses[1:0], 1'b0, i}};
      end
      P_WIN_D:  if (mode_q == MODE_PULSE) begin pwe = 1'b1; pwd.payload = {3'b000, sample}; end
      P_SUM_HI: begin pwe = 1'b1; pwd.payload = sum[18:3]; end
      P_SUM_LO: begin pwe = 1'b1; pwd.payload = {13'd0, sum[2:0]}; end
      P_END:    begin pwe = 1'b1; pwd = '{tag: TAG_END, payload: 16'hFFFF}; end
      default: ;
    endcase
  end

  // after a pulse window: continue scanning or finish the block
  wire win_last = (jend == ptw - 1'b1) || (pulses + 1'b1 >= pmax);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps <= P_IDLE; mode_q <= MODE_RAW; base <= '0; hdr_i <= '0; i <= '0; j <= '0;
      jend <= '0; pulses <= '0; npulse_q <= '0; prev_above <= 1'b0; evt <= 1'b0;
      sum <= '0; wp <= '0; first <= '0;
    end else begin
      if (pwe) wp <= wp + 1'b1;
      case (ps)
        P_IDLE: if (blk_cnt != 0 && 32'(dcount) < PROC_MAX_BLOCKS && !dfull) begin
          ps <= P_HDR_A; hdr_i <= '0; first <= wp; mode_q <= mode;
          npulse_q <= npulse; evt <= 1'b0; pulses <= '0; prev_above <= 1'b0; i <= '0;
        end
        P_HDR_A: ps <= P_HDR_D;
        P_HDR_D: begin
          hdr_i <= hdr_i + 1'b1;
          if (hdr_i == 3'(HDR_WORDS - 1))
            ps <= (mode_q == MODE_RAW) ? P_RAW_A : P_SCAN_A;
          else ps <= P_HDR_A;
        end
        P_RAW_A: ps <= P_RAW_D;
        P_RAW_D: begin
          if (above) evt <= 1'b1;
          i <= i + 1'b1;
          ps <= (i == ptw - 1'b1) ? P_END : P_RAW_A;
        end
        P_SCAN_A: ps <= P_SCAN_D;
        P_SCAN_D: begin
          if (above && !prev_above && pulses < pmax) begin
            evt  <= 1'b1;
            j    <= win_lo;
            jend <= win_hi;
            sum  <= '0;
            ps   <= P_WIN_A;
          end else begin
            prev_above <= above;
            i  <= i + 1'b1;
            ps <= (i == ptw - 1'b1 || pulses >= pmax) ? P_END : P_SCAN_A;
          end
        end
        P_WIN_A: ps <= P_WIN_D;
        P_WIN_D: begin
          sum        <= sum_sat;
          prev_above <= above;
          if (j == jend) begin
            if (mode_q == MODE_SUM) ps <= P_SUM_HI;
            else begin
              pulses <= pulses + 1'b1;
              i      <= jend + 1'b1;
              ps     <= win_last ? P_END : P_SCAN_A;
            end
          end else begin
            j  <= j + 1'b1;
            ps <= P_WIN_A;
          end
        end
        P_SUM_HI: ps <= P_SUM_LO;
        P_SUM_LO: begin
          pulses <= pulses + 1'b1;
          i      <= jend + 1'b1;
          ps     <= win_last ? P_END : P_SCAN_A;
        end
        P_END: begin
          base    <= sec_add(base, 10'(HDR_WORDS) + 10'(ptw), buf_last);
          ps      <= P_IDLE;
        end
        default: ps <= P_IDLE;
      endcase
    end
  end

  dp_ram #(.WIDTH(18), .DEPTH(PROC_DEPTH), .AW(11)) u_proc_buf (
    .clk, .we(pwe), .waddr(wp), .wdata(pwd), .raddr(proc_raddr), .rdata(proc_rdata)
  );

  // the block counter sees the release in the same cycle the block ends, so
  // P_IDLE never acts on a stale count
  assign dec_blk = (ps == P_END);

  blk_desc_t push_desc;
  assign push_desc = '{first: first, last: wp, event_: evt, mode: mode_q};

  logic [$clog2(PROC_MAX_BLOCKS+1):0] dcnt_w;
  sync_fifo #(.WIDTH($bits(blk_desc_t)), .DEPTH(PROC_MAX_BLOCKS + 1)) u_desc (
    .clk, .rst_n, .wr(ps == P_END), .wdata(push_desc), .rd(desc_pop), .rdata(desc),
    .empty(), .full(dfull), .count(dcnt_w)
  );
  assign dcount     = 3'(dcnt_w);
  assign host_cnt   = dcount;
  assign desc_valid = (dcount != 0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) proc_overrun <= 1'b0;
    else if (32'(dcount) >= PROC_MAX_BLOCKS) proc_overrun <= 1'b1;
endmodule

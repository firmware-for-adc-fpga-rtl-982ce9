// data_buffer: per-channel ring buffer, trigger buffer and secondary buffer.
//
// Primary buffer: every valid sample from the Sel stage is written into a
// 4081-word ring (addresses 0-4080, then back to 0), so the recent past is
// always available. Trigger buffer: on an accepted trigger the trigger
// number, time stamp and window start pointer go into a FIFO (see
// trigger_buffer). Copy state machine: while the trigger FIFO is not empty and
// fewer than PTW MAX BUF blocks wait in the secondary buffer, it moves the six
// header words into the secondary buffer, loads the raw read pointer from the
// seventh word and copies PTW samples, one per clock, from the primary into
// the secondary buffer. Sample words are "000" & sample, the last one of the
// window "001" & sample. The secondary write address wraps to 0 after
// PTW DAT BUF LAST ADR, which the host sets to a whole number of blocks, so
// blocks start at fixed addresses (an address already beyond a newly lowered
// last address also wraps; the host applies a soft reset after changing the
// layout, which reaches this block as rst_n). When a block is complete the PTW block
// counter (number of PTW data blocks) increments; the processing block
// decrements it when it has consumed a block. A decrement and increment in
// the same cycle cancel.
//
// Status (sticky until rst_n, i.e. RESET_N or SOFT_RESET_N): raw_overrun when a trigger had to be
// dropped because the trigger FIFO of this or another channel was full,
// ptw_overrun when the block count reached PTW MAX BUF. Copying then waits;
// it never overwrites an unprocessed block.
//
// Interface: din/din_valid from Sel; trig/trig_go/trig_ready implement the
// all-channels trigger acceptance; sec_raddr/sec_rdata is the secondary
// buffer read port (one-cycle registered read) used by the processing block.
// Timing: a block is complete 7 + 6 + PTW + 2 cycles after its trigger when
// nothing is queued ahead of it.
module data_buffer #(
  parameter int unsigned PRI_DEPTH = 4081,
  parameter int unsigned SEC_DEPTH = 2200,
  parameter int unsigned TRIG_DEPTH = 504
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [12:0] din,
  input  logic        din_valid,
  input  logic        trig,          // one-cycle trigger pulse
  input  logic        trig_go,       // every channel can accept
  output logic        trig_ready,
  input  logic [26:0] trig_num,
  input  logic [47:0] ts,
  input  logic [8:0]  ptw,
  input  logic [10:0] pl,
  input  logic [11:0] buf_last,
  input  logic [7:0]  max_buf,
  input  logic [11:0] sec_raddr,
  output logic [15:0] sec_rdata,
  input  logic        dec_blk,       // processing consumed one block
  output logic [7:0]  blk_cnt,
  output logic        raw_overrun,
  output logic        ptw_overrun
);
  import adc_pkg::*;

  // ---------------- primary ring buffer ----------------
  logic [11:0] raw_wp, raw_rp;
  logic [12:0] pri_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) raw_wp <= '0;
    else if (din_valid) raw_wp <= (32'(raw_wp) == PRI_DEPTH - 1) ? '0 : raw_wp + 1'b1;

  dp_ram #(.WIDTH(13), .DEPTH(PRI_DEPTH), .AW(12)) u_primary (
    .clk, .we(din_valid), .waddr(raw_wp), .wdata(din), .raddr(raw_rp), .rdata(pri_q)
  );

  // ---------------- trigger buffer ----------------
  logic        tf_rd, tf_empty, tf_drop;
  logic [15:0] tf_q;

  trigger_buffer #(.DEPTH(TRIG_DEPTH), .PRI_DEPTH(PRI_DEPTH)) u_trig (
    .clk, .rst_n, .trig, .go(trig_go), .trig_num, .ts, .raw_wr_ptr(raw_wp), .pl,
    .ready(trig_ready), .drop(tf_drop), .rd(tf_rd), .q(tf_q), .empty(tf_empty)
  );

  // ---------------- copy state machine ----------------
  typedef enum logic [1:0] {C_IDLE, C_HDR, C_PTR, C_COPY} cstate_e;
  cstate_e     cs;
  logic [2:0]  hdr_cnt;
  logic [8:0]  copy_cnt;
  logic [11:0] sec_wp;
  logic        pv, pv_last;        // primary read in flight, and its last flag
  logic        sec_we;
  logic [11:0] sec_wa;
  logic [15:0] sec_wd;
  logic        blk_done;

  wire blk_room = (blk_cnt < max_buf);

  function automatic logic [11:0] sec_next(input logic [11:0] a, input logic [11:0] last);
    return (a >= last) ? '0 : a + 1'b1;
  endfunction

  always_comb begin
    tf_rd  = 1'b0;
    sec_we = 1'b0;
    sec_wa = sec_wp;
    sec_wd = tf_q;
    if (cs == C_HDR && !tf_empty) begin
      tf_rd  = 1'b1;
      sec_we = 1'b1;
    end
    if (cs == C_PTR && !tf_empty) tf_rd = 1'b1;
    if (pv) begin
      sec_we = 1'b1;
      sec_wd = {pv_last ? SEC_LAST : SEC_DATA, pri_q};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs <= C_IDLE; hdr_cnt <= '0; copy_cnt <= '0; sec_wp <= '0; raw_rp <= '0;
      pv <= 1'b0; pv_last <= 1'b0; blk_done <= 1'b0;
    end else begin
      blk_done <= 1'b0;
      pv       <= 1'b0;
      pv_last  <= 1'b0;
      if (sec_we) sec_wp <= sec_next(sec_wp, buf_last);
      if (pv && pv_last) blk_done <= 1'b1;
      case (cs)
        C_IDLE: if (!tf_empty && blk_room && !blk_done && !pv) begin
          cs <= C_HDR; hdr_cnt <= '0;
        end
        C_HDR: if (!tf_empty) begin
          hdr_cnt <= hdr_cnt + 1'b1;
          if (hdr_cnt == 3'(HDR_WORDS - 1)) cs <= C_PTR;
        end
        C_PTR: if (!tf_empty) begin
          raw_rp   <= tf_q[11:0];
          copy_cnt <= '0;
          cs       <= C_COPY;
        end
        C_COPY: begin
          pv       <= 1'b1;
          pv_last  <= (copy_cnt == ptw - 1'b1);
          copy_cnt <= copy_cnt + 1'b1;
          raw_rp   <= (32'(raw_rp) == PRI_DEPTH - 1) ? '0 : raw_rp + 1'b1;
          if (copy_cnt == ptw - 1'b1) cs <= C_IDLE;
        end
        default: cs <= C_IDLE;
      endcase
    end
  end

  dp_ram #(.WIDTH(16), .DEPTH(SEC_DEPTH), .AW(12)) u_secondary (
    .clk, .we(sec_we), .waddr(sec_wa), .wdata(sec_wd), .raddr(sec_raddr), .rdata(sec_rdata)
  );

  // ---------------- PTW block counter and status ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk_cnt <= '0; raw_overrun <= 1'b0; ptw_overrun <= 1'b0;
    end else begin
      // decrement before increment: both at once leave the count unchanged
      blk_cnt <= blk_cnt + 8'(blk_done) - 8'(dec_blk && (blk_cnt != 0));
      if (tf_drop) raw_overrun <= 1'b1;
      if (blk_cnt >= max_buf) ptw_overrun <= 1'b1;
    end
  end

  a_sec_write_conflict: assert property (@(posedge clk) disable iff (!rst_n)
    !(pv && cs == C_HDR && !tf_empty));
endmodule

// trigger_buffer: records each accepted trigger as seven 16-bit words in a
// FIFO for the data buffer's copy state machine.
//
// On an accepted trigger (trig and go high in the same cycle) the 27-bit
// trigger number, the 48-bit time stamp and the start pointer of the trigger
// window are registered. A word counter then writes one word per clock:
//   0: "10010"    & trigger number 26-16     3: time stamp 39-24
//   1: trigger number 15-0                   4: "00000000" & time stamp 23-16
//   2: "10011000" & time stamp 47-40          5: time stamp 15-0
//   6: "0000" & start pointer (12 bits, window start in the primary buffer)
// The prefixes and word order follow the document's buffer diagram. The
// window start is the primary write pointer at the trigger minus PL, modulo
// the primary buffer depth.
//
// ready is high when no trigger is being written and at least seven words are
// free. The channel logic outside forms go as the AND of every channel's
// ready, so all channels accept the same triggers; a trigger that arrives
// while go is low is dropped and reported on drop for one cycle.
// The FIFO output is first-word-fall-through: q is valid while empty is low.
module trigger_buffer #(
  parameter int unsigned DEPTH     = 504,   // 72 triggers of 7 words
  parameter int unsigned PRI_DEPTH = 4081
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        trig,
  input  logic        go,
  input  logic [26:0] trig_num,
  input  logic [47:0] ts,
  input  logic [11:0] raw_wr_ptr,
  input  logic [10:0] pl,
  output logic        ready,
  output logic        drop,
  input  logic        rd,
  output logic [15:0] q,
  output logic        empty
);
  import adc_pkg::*;
  localparam int unsigned AW = $clog2(DEPTH);

  logic [26:0] tn_q;
  logic [47:0] ts_q;
  logic [11:0] start_q;
  logic        busy;
  logic [2:0]  idx;
  logic        full;
  logic [AW:0] count;
  logic [15:0] wdata;

  // window start = write pointer - PL, wrapped into 0 .. PRI_DEPTH-1
  logic [12:0] start_c;
  always_comb begin
    if ({1'b0, raw_wr_ptr} >= {2'b00, pl}) start_c = {1'b0, raw_wr_ptr} - {2'b00, pl};
    else                                   start_c = {1'b0, raw_wr_ptr} + 13'(PRI_DEPTH) - {2'b00, pl};
  end

  assign ready = !busy && (32'(count) + 7 <= DEPTH);
  wire accept = trig && go;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; idx <= '0; tn_q <= '0; ts_q <= '0; start_q <= '0; drop <= 1'b0;
    end else begin
      drop <= trig && !go;
      if (accept && !busy) begin
        busy    <= 1'b1;
        idx     <= '0;
        tn_q    <= trig_num;
        ts_q    <= ts;
        start_q <= start_c[11:0];
      end else if (busy) begin
        idx <= idx + 1'b1;
        if (idx == 3'd6) busy <= 1'b0;
      end
    end
  end

  assign wdata = (idx == 3'd6) ? {4'b0000, start_q} : hdr_word(32'(idx), tn_q, ts_q);

  sync_fifo #(.WIDTH(16), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .wr(busy), .wdata, .rd, .rdata(q), .empty, .full, .count
  );

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !full);
endmodule

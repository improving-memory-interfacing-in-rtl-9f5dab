// axi_read_fill: fetches one cache line from external memory as a single
// AXI4 INCR read burst.
//
// A pulse on start with a line-aligned byte address issues one AR request of
// LINE_WORDS beats (len = LINE_WORDS-1, 4-byte beats). Every R beat is passed
// on at once as beat_valid / beat_idx / beat_data so the controller can write
// it into the data store; r_ready is held high while a burst is in progress.
// done pulses with the last beat. busy is high from start until that beat.
// Only one burst is in flight at a time; start is ignored while busy.
//
// Fetching a whole line in one burst is the document's mechanism for cutting
// the per-access memory latency; the handshake with the controller and the
// single outstanding read are this design's own choices. Read responses other
// than OKAY are not reported.
module axi_read_fill
  import cache_pkg::*;
#(
  parameter int unsigned LINE_WORDS = 16,
  localparam int unsigned WORD_W    = (LINE_WORDS > 1) ? $clog2(LINE_WORDS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  addr_t             line_addr,
  output logic              busy,
  output logic              beat_valid,
  output logic [WORD_W-1:0] beat_idx,
  output word_t             beat_data,
  output logic              done,
  // AXI4 read channels
  output logic              ar_valid,
  output axi_ax_t           ar,
  input  logic              ar_ready,
  input  logic              r_valid,
  input  axi_r_t            r,
  output logic              r_ready
);

  logic              ar_pend_q;
  logic              busy_q;
  addr_t             addr_q;
  logic [WORD_W-1:0] cnt_q;

  assign busy     = busy_q;
  assign ar_valid = ar_pend_q;
  assign ar       = '{id: '0, addr: addr_q, len: 8'(LINE_WORDS - 1),
                      size: AXI_SIZE_WORD, burst: AXI_BURST_INCR};
  assign r_ready  = busy_q && !ar_pend_q;

  assign beat_valid = r_valid && r_ready;
  assign beat_idx   = cnt_q;
  assign beat_data  = r.data;
  assign done       = beat_valid && r.last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ar_pend_q <= 1'b0;
      busy_q    <= 1'b0;
      addr_q    <= '0;
      cnt_q     <= '0;
    end else begin
      if (start && !busy_q) begin
        busy_q    <= 1'b1;
        ar_pend_q <= 1'b1;
        addr_q    <= line_addr;
        cnt_q     <= '0;
      end
      if (ar_pend_q && ar_ready) ar_pend_q <= 1'b0;
      if (beat_valid) begin
        cnt_q <= cnt_q + 1'b1;
        if (r.last) busy_q <= 1'b0;
      end
    end
  end

  // AXI rule: a valid address must stay stable until accepted.
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    ar_valid && !ar_ready |=> ar_valid && $stable(ar));
  // The burst must end on the beat the length announced.
  a_last_pos: assert property (@(posedge clk) disable iff (!rst_n)
    beat_valid |-> (r.last == (int'(cnt_q) == int'(LINE_WORDS) - 1)));

endmodule

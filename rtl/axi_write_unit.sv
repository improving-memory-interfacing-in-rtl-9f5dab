// axi_write_unit: AXI4 write master of the cache, with outstanding writes.
//
// The controller hands over a write with req_valid/req_ready: a start
// address, the number of beats minus one (req_len: LINE_WORDS-1 for a dirty
// line written back, 0 for a single word written through) and the data and
// byte strobes of up to LINE_WORDS beats. The unit copies them into its own
// buffer, so the cache line can be refilled right away, and sends AW and the
// W beats on their own handshakes (AW and W may be accepted in either order).
//
// The unit does not wait for the write response before taking the next
// write: up to MAX_OUTSTANDING writes may have been issued without their B
// response. Their addresses are held in a FIFO that is popped by each B
// response (one AXI ID, so responses come back in order). A read miss must
// not overtake a write to the same line on the separate AXI read channel, so
// chk_line_addr is compared against every pending write and against the
// buffer; chk_hit tells the controller to wait. idle is high when nothing is
// buffered or outstanding, which is what a flush waits for.
//
// Outstanding writes are the document's improvement over its starting point;
// the buffer, the FIFO depth and the same-line ordering check are this
// design's own. Write responses other than OKAY are not reported.
module axi_write_unit
  import cache_pkg::*;
#(
  parameter int unsigned LINE_WORDS      = 16,
  parameter int unsigned MAX_OUTSTANDING = 4,
  localparam int unsigned WORD_W = (LINE_WORDS > 1) ? $clog2(LINE_WORDS) : 1,
  localparam int unsigned OFF_W  = WORD_W + 2,          // byte offset bits of a line
  localparam int unsigned PTR_W  = (MAX_OUTSTANDING > 1) ? $clog2(MAX_OUTSTANDING) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // request from the cache controller
  input  logic                        req_valid,
  output logic                        req_ready,
  input  addr_t                       req_addr,
  input  logic [7:0]                  req_len,
  input  logic [LINE_WORDS-1:0][31:0] req_data,
  input  logic [LINE_WORDS-1:0][3:0]  req_strb,
  // ordering check
  input  addr_t                       chk_line_addr,
  output logic                        chk_hit,
  output logic                        idle,
  // AXI4 write channels
  output logic                        aw_valid,
  output axi_ax_t                     aw,
  input  logic                        aw_ready,
  output logic                        w_valid,
  output axi_w_t                      w,
  input  logic                        w_ready,
  input  logic                        b_valid,
  input  axi_b_t                      b,
  output logic                        b_ready
);

  // Buffered write being sent.
  logic                        buf_busy_q, aw_pend_q, w_pend_q;
  addr_t                       buf_addr_q;
  logic [7:0]                  buf_len_q;
  logic [LINE_WORDS-1:0][31:0] buf_data_q;
  logic [LINE_WORDS-1:0][3:0]  buf_strb_q;
  logic [7:0]                  beat_q;

  // Addresses of writes issued but not yet answered.
  addr_t              pend_addr_q [MAX_OUTSTANDING];
  logic [PTR_W-1:0]   head_q, tail_q;
  logic [PTR_W:0]     count_q;

  logic push, pop, w_last_hs;

  assign req_ready = !buf_busy_q && (int'(count_q) < int'(MAX_OUTSTANDING));
  assign push      = req_valid && req_ready;
  assign pop       = b_valid && b_ready;
  assign b_ready   = (count_q != '0);

  assign aw_valid = aw_pend_q;
  assign aw       = '{id: '0, addr: buf_addr_q, len: buf_len_q,
                      size: AXI_SIZE_WORD, burst: AXI_BURST_INCR};
  assign w_valid  = w_pend_q;
  assign w        = '{data: buf_data_q[beat_q[WORD_W-1:0]], strb: buf_strb_q[beat_q[WORD_W-1:0]],
                      last: (beat_q == buf_len_q)};
  assign w_last_hs = w_valid && w_ready && w.last;

  assign idle = !buf_busy_q && (count_q == '0);

  always_comb begin
    chk_hit = buf_busy_q && (buf_addr_q[AXI_ADDR_W-1:OFF_W] == chk_line_addr[AXI_ADDR_W-1:OFF_W]);
    for (int i = 0; i < int'(MAX_OUTSTANDING); i++) begin
      // entry i is live if it lies within count_q entries from head_q
      logic [PTR_W:0] age;
      age = (PTR_W+1)'((i + int'(MAX_OUTSTANDING) - int'(head_q)) % int'(MAX_OUTSTANDING));
      if (age < count_q &&
          pend_addr_q[i][AXI_ADDR_W-1:OFF_W] == chk_line_addr[AXI_ADDR_W-1:OFF_W])
        chk_hit = 1'b1;
    end
  end

  function automatic logic [PTR_W-1:0] inc(input logic [PTR_W-1:0] p);
    return (int'(p) == int'(MAX_OUTSTANDING) - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buf_busy_q <= 1'b0;
      aw_pend_q  <= 1'b0;
      w_pend_q   <= 1'b0;
      buf_addr_q <= '0;
      buf_len_q  <= '0;
      buf_data_q <= '0;
      buf_strb_q <= '0;
      beat_q     <= '0;
      head_q     <= '0;
      tail_q     <= '0;
      count_q    <= '0;
      for (int i = 0; i < int'(MAX_OUTSTANDING); i++) pend_addr_q[i] <= '0;
    end else begin
      if (push) begin
        buf_busy_q          <= 1'b1;
        aw_pend_q           <= 1'b1;
        w_pend_q            <= 1'b1;
        buf_addr_q          <= req_addr;
        buf_len_q           <= req_len;
        buf_data_q          <= req_data;
        buf_strb_q          <= req_strb;
        beat_q              <= '0;
        pend_addr_q[tail_q] <= req_addr;
        tail_q              <= inc(tail_q);
      end
      if (aw_pend_q && aw_ready) aw_pend_q <= 1'b0;
      if (w_valid && w_ready) begin
        beat_q <= beat_q + 1'b1;
        if (w.last) w_pend_q <= 1'b0;
      end
      // The buffer is free once both address and last data beat are accepted.
      if (buf_busy_q && (!aw_pend_q || aw_ready) && (!w_pend_q || w_last_hs))
        buf_busy_q <= 1'b0;
      if (pop) head_q <= inc(head_q);
      count_q <= count_q + (PTR_W+1)'(push) - (PTR_W+1)'(pop);
    end
  end

  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    aw_valid && !aw_ready |=> aw_valid && $stable(aw));
  a_w_stable: assert property (@(posedge clk) disable iff (!rst_n)
    w_valid && !w_ready |=> w_valid && $stable(w));
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    int'(count_q) <= int'(MAX_OUTSTANDING));

endmodule

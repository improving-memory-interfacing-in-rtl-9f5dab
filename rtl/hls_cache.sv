// hls_cache: configurable cache placed on one AXI memory channel of an
// HLS-generated accelerator.
//
// The accelerator side is a one-word request port (fe_req_valid/ready with
// fe_req = {we, byte addr, wdata, wstrb}). One request is served at a time;
// each request, read or write, is answered by a one-cycle fe_rsp_valid pulse,
// carrying the read data for a load. The memory side is an AXI4 master: a
// miss fetches the whole line with one read burst (axi_read_fill), and dirty
// lines / written-through words leave through axi_write_unit, which keeps up
// to MAX_OUTSTANDING writes in flight without waiting for their responses.
//
// Geometry: N_WAYS ways of WAY_SIZE lines of LINE_SIZE 32-bit words. A byte
// address splits into {tag, set index, word offset, 2 byte bits}.
//
// Write policy (WRITE_POLICY):
//   WRITE_BACK    - write hits update the line and mark it dirty; a write miss
//                   allocates the line first. Dirty victims are written back
//                   as a LINE_SIZE-beat burst before the refill is requested.
//   WRITE_THROUGH - every write is sent to memory as a one-beat write with
//                   its byte strobes; a write hit also updates the line, a
//                   write miss does not allocate.
//
// Flush: a pulse (or level) on flush_req, taken while no request is being
// served, walks every set and way and writes each dirty line back, then waits
// until every outstanding write has been answered and pulses flush_done. After
// that all data written by the accelerator is in external memory. Lines stay
// valid and clean.
//
// Timing: a request is accepted in S_IDLE and looked up in the next cycle,
// so a hit is answered in the cycle after acceptance. A read miss whose
// victim is clean is answered LAT + LINE_SIZE + 4 cycles after acceptance,
// where LAT is the number of cycles from the AR handshake to the first R beat
// (two cycles to reach the read burst, one to issue AR, the LINE_SIZE beats,
// one more lookup). A dirty victim is handed to the write unit in the cycle
// that checks the victim, so it adds nothing unless the write unit's buffer
// is still busy; the write-back itself overlaps the refill.
//
// Following the document: per-instance size, ways and write policy, AXI4
// master with whole-line bursts, outstanding writes, the flush before the
// accelerator finishes, and no coherence between caches. This design's own
// choices: the request port and its handshake, the replacement policy (in
// cache_tags), write-allocate for write-back and no-allocate for
// write-through, the single request in service, and the same-line ordering
// check between a refill and pending writes.
module hls_cache
  import cache_pkg::*;
#(
  parameter int unsigned   N_WAYS          = 1,
  parameter int unsigned   WAY_SIZE        = 16,   // lines per way
  parameter int unsigned   LINE_SIZE       = 16,   // 32-bit words per line
  parameter write_policy_e WRITE_POLICY    = WRITE_BACK,
  parameter int unsigned   MAX_OUTSTANDING = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  // accelerator side
  input  logic     fe_req_valid,
  output logic     fe_req_ready,
  input  fe_req_t  fe_req,
  output logic     fe_rsp_valid,
  output word_t    fe_rsp_rdata,
  input  logic     flush_req,
  output logic     flush_done,
  // AXI4 master towards external memory
  output axi_req_t axi_req,
  input  axi_rsp_t axi_rsp
);

  localparam int unsigned WAY_W  = (N_WAYS > 1) ? $clog2(N_WAYS) : 1;
  localparam int unsigned SET_W  = (WAY_SIZE > 1) ? $clog2(WAY_SIZE) : 1;
  localparam int unsigned WORD_W = (LINE_SIZE > 1) ? $clog2(LINE_SIZE) : 1;
  localparam int unsigned IDX_B  = $clog2(WAY_SIZE);
  localparam int unsigned OFF_B  = $clog2(LINE_SIZE);
  localparam int unsigned TAG_W  = AXI_ADDR_W - 2 - OFF_B - IDX_B;

  typedef enum logic [2:0] {
    S_IDLE, S_LOOKUP, S_WT_WRITE, S_EVICT, S_FILL_WAIT, S_FILL, S_FLUSH, S_FLUSH_DRAIN
  } state_e;

  state_e     state_q;
  fe_req_t    req_q;
  logic [WAY_W-1:0] vway_q;
  logic [SET_W-1:0] fset_q;   // flush walk
  logic [WAY_W-1:0] fway_q;

  // request address fields
  logic [TAG_W-1:0]  req_tag;
  logic [SET_W-1:0]  req_set;
  logic [WORD_W-1:0] req_word;
  assign req_tag  = req_q.addr[AXI_ADDR_W-1 -: TAG_W];
  assign req_set  = (IDX_B > 0) ? SET_W'(req_q.addr >> (2 + OFF_B)) : '0;
  assign req_word = (OFF_B > 0) ? WORD_W'(req_q.addr >> 2) : '0;

  addr_t req_line_addr;
  assign req_line_addr = {req_q.addr[AXI_ADDR_W-1:2+OFF_B], {(2+OFF_B){1'b0}}};

  // tag store
  logic             hit;
  logic [WAY_W-1:0] hit_way, victim_way, tg_rd_way;
  logic             tg_rd_valid, tg_rd_dirty;
  logic [TAG_W-1:0] tg_rd_tag;
  logic [SET_W-1:0] tg_set;
  logic             tg_fill, tg_dirty, tg_clean;
  logic [WAY_W-1:0] tg_upd_way;

  // data store
  logic [WAY_W-1:0]             dr_rd_way;
  logic [LINE_SIZE-1:0][31:0]   dr_rd_line;
  logic                         dr_wr_en;
  logic [WAY_W-1:0]             dr_wr_way;
  logic [WORD_W-1:0]            dr_wr_word;
  word_t                        dr_wr_data;
  strb_t                        dr_wr_strb;

  // read fill
  logic              rf_start, rf_busy, rf_beat, rf_done;
  logic [WORD_W-1:0] rf_idx;
  word_t             rf_data;

  // write unit
  logic                       wu_valid, wu_ready, wu_chk_hit, wu_idle;
  addr_t                      wu_addr;
  logic [7:0]                 wu_len;
  logic [LINE_SIZE-1:0][31:0] wu_data;
  logic [LINE_SIZE-1:0][3:0]  wu_strb;

  logic flush_last;
  assign flush_last = (int'(fset_q) == int'(WAY_SIZE) - 1) && (int'(fway_q) == int'(N_WAYS) - 1);

  cache_tags #(.N_WAYS(N_WAYS), .N_SETS(WAY_SIZE), .TAG_W(TAG_W)) u_tags (
    .clk, .rst_n,
    .lk_set(tg_set), .lk_tag(req_tag), .hit, .hit_way, .victim_way,
    .rd_way(tg_rd_way), .rd_valid(tg_rd_valid), .rd_dirty(tg_rd_dirty), .rd_tag(tg_rd_tag),
    .fill_en(tg_fill), .fill_way(vway_q), .fill_set(req_set), .fill_tag(req_tag),
    .dirty_en(tg_dirty), .clean_en(tg_clean), .upd_way(tg_upd_way), .upd_set(tg_set)
  );

  cache_data_ram #(.N_WAYS(N_WAYS), .N_SETS(WAY_SIZE), .LINE_WORDS(LINE_SIZE)) u_data (
    .clk,
    .rd_way(dr_rd_way), .rd_set(tg_set), .rd_line(dr_rd_line),
    .wr_en(dr_wr_en), .wr_way(dr_wr_way), .wr_set(req_set), .wr_word(dr_wr_word),
    .wr_data(dr_wr_data), .wr_strb(dr_wr_strb)
  );

  axi_read_fill #(.LINE_WORDS(LINE_SIZE)) u_rd (
    .clk, .rst_n,
    .start(rf_start), .line_addr(req_line_addr), .busy(rf_busy),
    .beat_valid(rf_beat), .beat_idx(rf_idx), .beat_data(rf_data), .done(rf_done),
    .ar_valid(axi_req.ar_valid), .ar(axi_req.ar), .ar_ready(axi_rsp.ar_ready),
    .r_valid(axi_rsp.r_valid), .r(axi_rsp.r), .r_ready(axi_req.r_ready)
  );

  axi_write_unit #(.LINE_WORDS(LINE_SIZE), .MAX_OUTSTANDING(MAX_OUTSTANDING)) u_wr (
    .clk, .rst_n,
    .req_valid(wu_valid), .req_ready(wu_ready), .req_addr(wu_addr), .req_len(wu_len),
    .req_data(wu_data), .req_strb(wu_strb),
    .chk_line_addr(req_line_addr), .chk_hit(wu_chk_hit), .idle(wu_idle),
    .aw_valid(axi_req.aw_valid), .aw(axi_req.aw), .aw_ready(axi_rsp.aw_ready),
    .w_valid(axi_req.w_valid), .w(axi_req.w), .w_ready(axi_rsp.w_ready),
    .b_valid(axi_rsp.b_valid), .b(axi_rsp.b), .b_ready(axi_req.b_ready)
  );

  // Controller outputs
  always_comb begin
    fe_req_ready = 1'b0;
    fe_rsp_valid = 1'b0;
    fe_rsp_rdata = dr_rd_line[req_word];
    flush_done   = 1'b0;
    tg_set       = req_set;
    tg_rd_way    = vway_q;
    dr_rd_way    = hit_way;
    tg_fill      = 1'b0;
    tg_dirty     = 1'b0;
    tg_clean     = 1'b0;
    tg_upd_way   = hit_way;
    dr_wr_en     = 1'b0;
    dr_wr_way    = hit_way;
    dr_wr_word   = req_word;
    dr_wr_data   = req_q.wdata;
    dr_wr_strb   = req_q.wstrb;
    rf_start     = 1'b0;
    wu_valid     = 1'b0;
    wu_addr      = req_line_addr;
    wu_len       = 8'(LINE_SIZE - 1);
    wu_data      = dr_rd_line;
    wu_strb      = '1;

    unique case (state_q)
      S_IDLE: fe_req_ready = !flush_req;
      S_LOOKUP: begin
        if (hit) begin
          if (req_q.we) begin
            dr_wr_en = 1'b1;
            if (WRITE_POLICY == WRITE_BACK) begin
              tg_dirty     = 1'b1;
              fe_rsp_valid = 1'b1;
            end
          end else begin
            fe_rsp_valid = 1'b1;
          end
        end
      end
      S_WT_WRITE: begin
        wu_valid      = 1'b1;
        wu_addr       = {req_q.addr[AXI_ADDR_W-1:2], 2'b00};
        wu_len        = 8'd0;
        wu_data       = '0;
        wu_data[0]    = req_q.wdata;
        wu_strb       = '0;
        wu_strb[0]    = req_q.wstrb;
        fe_rsp_valid  = wu_ready;
      end
      S_EVICT: begin
        dr_rd_way = vway_q;
        wu_valid  = tg_rd_valid && tg_rd_dirty;
        wu_addr   = {tg_rd_tag, req_set, {(2+OFF_B){1'b0}}};
      end
      S_FILL_WAIT: rf_start = !wu_chk_hit;
      S_FILL: begin
        dr_wr_en   = rf_beat;
        dr_wr_way  = vway_q;
        dr_wr_word = rf_idx;
        dr_wr_data = rf_data;
        dr_wr_strb = '1;
        tg_fill    = rf_done;
      end
      S_FLUSH: begin
        tg_set     = fset_q;
        tg_rd_way  = fway_q;
        dr_rd_way  = fway_q;
        tg_upd_way = fway_q;
        wu_valid   = tg_rd_valid && tg_rd_dirty;
        wu_addr    = {tg_rd_tag, fset_q, {(2+OFF_B){1'b0}}};
        tg_clean   = wu_valid && wu_ready;
      end
      S_FLUSH_DRAIN: flush_done = wu_idle;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      req_q   <= '0;
      vway_q  <= '0;
      fset_q  <= '0;
      fway_q  <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (flush_req) begin
            state_q <= S_FLUSH;
            fset_q  <= '0;
            fway_q  <= '0;
          end else if (fe_req_valid) begin
            req_q   <= fe_req;
            state_q <= S_LOOKUP;
          end
        end
        S_LOOKUP: begin
          if (hit) begin
            state_q <= (req_q.we && WRITE_POLICY == WRITE_THROUGH) ? S_WT_WRITE : S_IDLE;
          end else if (req_q.we && WRITE_POLICY == WRITE_THROUGH) begin
            state_q <= S_WT_WRITE;
          end else begin
            vway_q  <= victim_way;
            state_q <= S_EVICT;   // S_EVICT checks whether the victim is dirty
          end
        end
        S_WT_WRITE: if (wu_ready) state_q <= S_IDLE;
        S_EVICT: begin
          // tg_rd_way = vway_q here, so the victim's state is visible
          if (!(tg_rd_valid && tg_rd_dirty)) state_q <= S_FILL_WAIT;
          else if (wu_ready)                 state_q <= S_FILL_WAIT;
        end
        S_FILL_WAIT: if (!wu_chk_hit) state_q <= S_FILL;
        S_FILL:      if (rf_done) state_q <= S_LOOKUP;
        S_FLUSH: begin
          if (!(tg_rd_valid && tg_rd_dirty) || wu_ready) begin
            if (flush_last) state_q <= S_FLUSH_DRAIN;
            if (int'(fway_q) == int'(N_WAYS) - 1) begin
              fway_q <= '0;
              fset_q <= fset_q + 1'b1;
            end else begin
              fway_q <= fway_q + 1'b1;
            end
          end
        end
        S_FLUSH_DRAIN: if (wu_idle) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // fe_req_ready is only given with no flush pending; requests are not lost.
  a_rsp_in_service: assert property (@(posedge clk) disable iff (!rst_n)
    fe_rsp_valid |-> (state_q == S_LOOKUP || state_q == S_WT_WRITE));

endmodule

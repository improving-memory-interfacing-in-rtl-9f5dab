// cache_tags: tag, valid and dirty store of a set-associative cache.
//
// For every set there are N_WAYS entries of {valid, dirty, tag}. The lookup
// port compares a tag against all ways of one set combinationally and returns
// hit / hit_way. The same cycle it proposes a victim way for a refill: the
// lowest-numbered invalid way if there is one, otherwise the way pointed to by
// a per-set round-robin pointer. A second, way-addressed read port (rd_*)
// returns one entry; the controller uses it to inspect the victim and to walk
// the cache during a flush.
//
// Updates take effect at the next rising edge:
//   fill_en  - install tag in (fill_way, set): valid=1, dirty=0, and advance the
//              set's round-robin pointer past fill_way;
//   dirty_en - set the dirty bit of (upd_way, upd_set);
//   clean_en - clear the dirty bit of (upd_way, upd_set) (after a flush write-back).
// Reset (rst_n low, synchronous) invalidates every entry.
//
// Associativity is a parameter as the cache is described as configurable in
// its number of ways; the replacement policy itself (invalid first, then
// round-robin) is this design's own choice, as is the storage in flip-flops.
module cache_tags #(
  parameter int unsigned N_WAYS   = 1,
  parameter int unsigned N_SETS   = 16,
  parameter int unsigned TAG_W    = 24,
  localparam int unsigned WAY_W   = (N_WAYS > 1) ? $clog2(N_WAYS) : 1,
  localparam int unsigned SET_W   = (N_SETS > 1) ? $clog2(N_SETS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup
  input  logic [SET_W-1:0] lk_set,
  input  logic [TAG_W-1:0] lk_tag,
  output logic             hit,
  output logic [WAY_W-1:0] hit_way,
  output logic [WAY_W-1:0] victim_way,
  // way-addressed read (same set as lookup)
  input  logic [WAY_W-1:0] rd_way,
  output logic             rd_valid,
  output logic             rd_dirty,
  output logic [TAG_W-1:0] rd_tag,
  // updates
  input  logic             fill_en,
  input  logic [WAY_W-1:0] fill_way,
  input  logic [SET_W-1:0] fill_set,
  input  logic [TAG_W-1:0] fill_tag,
  input  logic             dirty_en,
  input  logic             clean_en,
  input  logic [WAY_W-1:0] upd_way,
  input  logic [SET_W-1:0] upd_set
);

  logic [TAG_W-1:0] tag_q   [N_SETS][N_WAYS];
  logic             valid_q [N_SETS][N_WAYS];
  logic             dirty_q [N_SETS][N_WAYS];
  logic [WAY_W-1:0] rr_q    [N_SETS];

  always_comb begin
    hit        = 1'b0;
    hit_way    = '0;
    for (int w = 0; w < int'(N_WAYS); w++) begin
      if (valid_q[lk_set][w] && tag_q[lk_set][w] == lk_tag && !hit) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
    end
  end

  always_comb begin
    logic found;
    found      = 1'b0;
    victim_way = rr_q[lk_set];
    for (int w = 0; w < int'(N_WAYS); w++) begin
      if (!valid_q[lk_set][w] && !found) begin
        found      = 1'b1;
        victim_way = WAY_W'(w);
      end
    end
  end

  assign rd_valid = valid_q[lk_set][rd_way];
  assign rd_dirty = dirty_q[lk_set][rd_way];
  assign rd_tag   = tag_q[lk_set][rd_way];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(N_SETS); s++) begin
        rr_q[s] <= '0;
        for (int w = 0; w < int'(N_WAYS); w++) begin
          valid_q[s][w] <= 1'b0;
          dirty_q[s][w] <= 1'b0;
          tag_q[s][w]   <= '0;
        end
      end
    end else begin
      if (fill_en) begin
        tag_q[fill_set][fill_way]   <= fill_tag;
        valid_q[fill_set][fill_way] <= 1'b1;
        dirty_q[fill_set][fill_way] <= 1'b0;
        rr_q[fill_set] <= (int'(fill_way) == int'(N_WAYS) - 1) ? '0 : fill_way + 1'b1;
      end
      if (dirty_en) dirty_q[upd_set][upd_way] <= 1'b1;
      if (clean_en) dirty_q[upd_set][upd_way] <= 1'b0;
    end
  end

endmodule

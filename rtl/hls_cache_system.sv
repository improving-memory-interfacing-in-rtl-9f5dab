// hls_cache_system: the caches of one HLS-generated accelerator.
//
// The accelerator has N_CHANNELS separate AXI memory channels (for example
// one per non-aliasing pointer argument of the kernel), and each channel gets
// its own hls_cache with its own geometry and write policy, set by the
// per-channel parameter arrays. The caches share nothing: no coherence is
// kept between them, since each channel works on its own memory region.
//
// Ports are per-channel arrays: the accelerator-side request ports of every
// cache and the AXI4 master port of every cache towards external memory. A
// single flush_req starts the flush of every cache at once (each cache takes
// it when it is not serving a request); flush_done pulses once every cache
// has written back its dirty lines and seen all its write responses, which is
// when the accelerator may signal that it has finished.
//
// The default is the document's matrix-multiply example: three channels, each
// cache 16 lines per way of 16 words. The number of ways (1), the write policy
// (write-back) and MAX_OUTSTANDING (4) are this design's own defaults, as is
// the combining of the per-cache flush completions.
module hls_cache_system
  import cache_pkg::*;
#(
  parameter int unsigned   N_CHANNELS                    = 3,
  parameter int unsigned   N_WAYS          [N_CHANNELS]  = '{default: 1},
  parameter int unsigned   WAY_SIZE        [N_CHANNELS]  = '{default: 16},
  parameter int unsigned   LINE_SIZE       [N_CHANNELS]  = '{default: 16},
  parameter write_policy_e WRITE_POLICY    [N_CHANNELS]  = '{default: WRITE_BACK},
  parameter int unsigned   MAX_OUTSTANDING               = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     fe_req_valid [N_CHANNELS],
  output logic     fe_req_ready [N_CHANNELS],
  input  fe_req_t  fe_req       [N_CHANNELS],
  output logic     fe_rsp_valid [N_CHANNELS],
  output word_t    fe_rsp_rdata [N_CHANNELS],
  input  logic     flush_req,
  output logic     flush_done,
  output axi_req_t axi_req      [N_CHANNELS],
  input  axi_rsp_t axi_rsp      [N_CHANNELS]
);

  logic [N_CHANNELS-1:0] ch_flush_req, ch_flush_done, done_seen_q;
  logic                  flushing_q;

  for (genvar c = 0; c < int'(N_CHANNELS); c++) begin : g_ch
    hls_cache #(
      .N_WAYS         (N_WAYS[c]),
      .WAY_SIZE       (WAY_SIZE[c]),
      .LINE_SIZE      (LINE_SIZE[c]),
      .WRITE_POLICY   (WRITE_POLICY[c]),
      .MAX_OUTSTANDING(MAX_OUTSTANDING)
    ) u_cache (
      .clk, .rst_n,
      .fe_req_valid(fe_req_valid[c]), .fe_req_ready(fe_req_ready[c]), .fe_req(fe_req[c]),
      .fe_rsp_valid(fe_rsp_valid[c]), .fe_rsp_rdata(fe_rsp_rdata[c]),
      .flush_req(ch_flush_req[c]), .flush_done(ch_flush_done[c]),
      .axi_req(axi_req[c]), .axi_rsp(axi_rsp[c])
    );
    // each cache is asked to flush until it has reported completion
    assign ch_flush_req[c] = flushing_q && !done_seen_q[c];
  end

  logic all_done;
  assign all_done   = &(done_seen_q | ch_flush_done);
  assign flush_done = flushing_q && all_done;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      flushing_q  <= 1'b0;
      done_seen_q <= '0;
    end else if (!flushing_q) begin
      flushing_q  <= flush_req;
      done_seen_q <= '0;
    end else if (all_done) begin
      flushing_q  <= 1'b0;
      done_seen_q <= '0;
    end else begin
      done_seen_q <= done_seen_q | ch_flush_done;
    end
  end

endmodule

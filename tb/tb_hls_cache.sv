// tb_hls_cache: self-checking test of one cache, in both write policies.
//
// Two small caches (2 ways x 4 sets x 4 words) run the same request stream,
// one write-back and one write-through, each in front of its own memory model.
// A reference array in the testbench predicts every read. Checks:
//   - read-hit latency (response one cycle after acceptance) and the latency
//     of a clean read miss (memory latency + line length + 4 cycles);
//   - random loads and byte-masked stores over a region 8x the cache size,
//     with random AXI back-pressure, against the reference;
//   - write-through: memory equals the reference as soon as the writes drain;
//   - write-back: memory is stale before the flush and equals the reference
//     after flush_done;
//   - that hits, misses, dirty write-backs and several outstanding writes
//     all occurred.
module tb_hls_cache;
  import cache_pkg::*;

  localparam int unsigned LAT   = 8;
  localparam int unsigned LINE  = 4;
  localparam int unsigned WORDS = 256;   // region used by the test
  localparam int unsigned MEMW  = 1024;

  logic clk = 1'b0, rst_n = 1'b0, stall_en = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic     req_valid, flush_req;
  fe_req_t  req;
  logic     rdy   [2];
  logic     rspv  [2];
  word_t    rdata [2];
  logic     fdone [2];
  axi_req_t areq  [2];
  axi_rsp_t arsp  [2];

  hls_cache #(.N_WAYS(2), .WAY_SIZE(4), .LINE_SIZE(LINE), .WRITE_POLICY(WRITE_BACK)) dut_wb (
    .clk, .rst_n, .fe_req_valid(req_valid && rdy[0] && rdy[1]), .fe_req_ready(rdy[0]), .fe_req(req),
    .fe_rsp_valid(rspv[0]), .fe_rsp_rdata(rdata[0]), .flush_req, .flush_done(fdone[0]),
    .axi_req(areq[0]), .axi_rsp(arsp[0]));
  hls_cache #(.N_WAYS(2), .WAY_SIZE(4), .LINE_SIZE(LINE), .WRITE_POLICY(WRITE_THROUGH)) dut_wt (
    .clk, .rst_n, .fe_req_valid(req_valid && rdy[0] && rdy[1]), .fe_req_ready(rdy[1]), .fe_req(req),
    .fe_rsp_valid(rspv[1]), .fe_rsp_rdata(rdata[1]), .flush_req, .flush_done(fdone[1]),
    .axi_req(areq[1]), .axi_rsp(arsp[1]));

  axi_mem_model #(.MEM_WORDS(MEMW), .LATENCY(LAT)) mem_wb (.clk, .rst_n, .stall_en, .req(areq[0]), .rsp(arsp[0]));
  axi_mem_model #(.MEM_WORDS(MEMW), .LATENCY(LAT)) mem_wt (.clk, .rst_n, .stall_en, .req(areq[1]), .rsp(arsp[1]));

  logic [31:0] ref_mem [WORDS];

  // cycle counter and watchdog
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 400000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // hits: accesses of the write-back cache answered in one cycle;
  // misses: its line refills (read bursts)
  int hits = 0, misses;
  assign misses = mem_wb.n_ar;

  // Issue one request to both caches; return read data and latency of cache 0.
  task automatic access(input logic we, input int unsigned word, input word_t wdata,
                        input strb_t wstrb, output word_t rd, output int lat);
    bit got [2];
    int t0;
    req       = '{we: we, addr: 32'(word) << 2, wdata: wdata, wstrb: wstrb};
    req_valid = 1'b1;
    // both caches accept in the same cycle: they are in step
    while (!(rdy[0] && rdy[1])) @(negedge clk);
    t0 = cyc;
    @(negedge clk);
    req_valid = 1'b0;
    got = '{1'b0, 1'b0};
    lat = 0;
    while (!(got[0] && got[1])) begin
      for (int i = 0; i < 2; i++)
        if (rspv[i] && !got[i]) begin
          got[i] = 1'b1;
          if (i == 0) begin rd = rdata[0]; lat = cyc - t0; if (lat == 1) hits++; end
          if (!we) begin
            checks++;
            if (rdata[i] !== ref_mem[word]) begin
              failures++;
              $display("read mismatch cache %0d word %0d: got %h exp %h", i, word, rdata[i], ref_mem[word]);
            end
          end
        end
      if (!(got[0] && got[1])) @(negedge clk);
    end
  endtask

  task automatic do_flush();
    bit got [2];
    flush_req = 1'b1;
    got = '{1'b0, 1'b0};
    while (!(got[0] && got[1])) begin
      @(negedge clk);
      for (int i = 0; i < 2; i++) if (fdone[i]) got[i] = 1'b1;
    end
    @(negedge clk);
    flush_req = 1'b0;
  endtask

  function automatic int mem_mismatches(input int which);
    int n = 0;
    for (int i = 0; i < int'(WORDS); i++) begin
      logic [31:0] v;
      v = (which == 0) ? mem_wb.mem[i] : mem_wt.mem[i];
      if (v !== ref_mem[i]) n++;
    end
    return n;
  endfunction

  initial begin
    word_t rd;
    int lat;
    req_valid = 1'b0; flush_req = 1'b0; req = '0;
    for (int i = 0; i < int'(MEMW); i++) begin
      mem_wb.mem[i] = 32'hA500_0000 + 32'(i);
      mem_wt.mem[i] = 32'hA500_0000 + 32'(i);
    end
    for (int i = 0; i < int'(WORDS); i++) ref_mem[i] = 32'hA500_0000 + 32'(i);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Directed: clean read miss, then hit on the same line.
    access(1'b0, 8, '0, '0, rd, lat);
    checks++;
    if (lat != int'(LAT + LINE + 4)) begin failures++; $display("miss latency %0d", lat); end
    access(1'b0, 9, '0, '0, rd, lat);
    checks++;
    if (lat != 1) begin failures++; $display("hit latency %0d", lat); end

    // Random traffic with back-pressure.
    stall_en = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      int unsigned w;
      logic we;
      word_t d;
      strb_t s;
      w  = $urandom % WORDS;
      we = ($urandom % 3) == 0;
      d  = $urandom;
      s  = (($urandom % 2) == 0) ? 4'hF : 4'($urandom);
      if (we) begin
        for (int b = 0; b < 4; b++) if (s[b]) ref_mem[w][8*b +: 8] = d[8*b +: 8];
      end
      access(we, w, d, s, rd, lat);
    end
    stall_en = 1'b0;

    // Write-through memory is up to date once its writes have drained.
    while (!dut_wt.u_wr.idle) @(negedge clk);
    checks++;
    if (mem_mismatches(1) != 0) begin failures++; $display("write-through memory stale"); end
    // Write-back memory still lacks the dirty lines.
    checks++;
    if (mem_mismatches(0) == 0) begin failures++; $display("write-back memory already complete before flush"); end

    do_flush();
    checks++;
    if (mem_mismatches(0) != 0) begin failures++; $display("write-back memory wrong after flush: %0d words", mem_mismatches(0)); end
    checks++;
    if (mem_mismatches(1) != 0) begin failures++; $display("write-through memory wrong after flush"); end

    // Mechanisms seen.
    $display("hits=%0d misses=%0d wb_bursts=%0d wb_max_outstanding=%0d wt_writes=%0d wt_max_outstanding=%0d",
             hits, misses, mem_wb.n_aw_burst, mem_wb.max_outstanding_w, mem_wt.n_aw, mem_wt.max_outstanding_w);
    checks++; if (hits == 0)   begin failures++; $display("no hits"); end
    checks++; if (misses == 0) begin failures++; $display("no misses"); end
    checks++; if (mem_wb.n_aw_burst == 0) begin failures++; $display("no write-back bursts"); end
    checks++; if (mem_wt.max_outstanding_w < 2) begin failures++; $display("no outstanding writes"); end
    checks++; if (mem_wt.n_aw_burst != 0) begin failures++; $display("write-through sent bursts"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

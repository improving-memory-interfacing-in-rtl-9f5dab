// tb_cache_size_sweep: the cache-size exploration of the matrix multiply.
//
// Nine cache configurations, as (words in the cache of the matrix read by
// rows, words in the cache of the matrix read by columns): (16,256),
// (32,256), (64,256), (128,256), (256,256), (256,16), (256,32), (256,64),
// (256,128). Nine systems run side by side, one per configuration, and
// repeat the run at memory latencies of 5, 10, 25 and 50 cycles, with a reset
// in between. Every cache is one way with 8-word lines (WAY_SIZE = words /
// 8); the output cache has 256 words. Each run is the 10 x 10 multiply of the
// accelerator model, and the result in memory is checked. Then the cycle
// counts are printed and three trends are checked: every configuration gets
// slower as the latency grows; at latency 50 the smallest cache for the
// column-read matrix is much slower (over 2x) than the full-size caches,
// since each column access then misses; and at latency 50 the size of the
// row-read matrix's cache matters little (within 25 % of full size), since
// each of its lines is used up before it is replaced.
module tb_cache_size_sweep;
  import cache_pkg::*;

  localparam int unsigned N    = 10;
  localparam int unsigned NCFG = 9;
  localparam int unsigned ROW  [NCFG] = '{16, 32, 64, 128, 256, 256, 256, 256, 256};
  localparam int unsigned COL  [NCFG] = '{256, 256, 256, 256, 256, 16, 32, 64, 128};
  localparam int unsigned NLAT = 4;
  localparam int unsigned LATS [NLAT] = '{5, 10, 25, 50};

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  int cycles [NLAT][NCFG];
  int finished = 0;
  int round = -1;

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 1000000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic logic [31:0] a_val(input int i); return 32'((i * 7 + 3) % 101); endfunction
  function automatic logic [31:0] b_val(input int i); return 32'((i * 13 + 5) % 97); endfunction

  for (genvar k = 0; k < int'(NCFG); k++) begin : g_cfg
    localparam int unsigned WS [3] = '{ROW[k] / 8, COL[k] / 8, 32};
    localparam int unsigned LS [3] = '{8, 8, 8};
    localparam int unsigned NW [3] = '{1, 1, 1};

    logic     v [3], rdy [3], rspv [3], freq, fdone, done;
    fe_req_t  rq [3];
    word_t    rd [3];
    axi_req_t areq [3];
    axi_rsp_t arsp [3];

    hls_cache_system #(.N_CHANNELS(3), .N_WAYS(NW), .WAY_SIZE(WS), .LINE_SIZE(LS)) u_sys (
      .clk, .rst_n, .fe_req_valid(v), .fe_req_ready(rdy), .fe_req(rq),
      .fe_rsp_valid(rspv), .fe_rsp_rdata(rd), .flush_req(freq), .flush_done(fdone),
      .axi_req(areq), .axi_rsp(arsp));
    mmult_accel #(.N(N)) u_acc (
      .clk, .start, .done, .fe_req_valid(v), .fe_req_ready(rdy), .fe_req(rq),
      .fe_rsp_valid(rspv), .fe_rsp_rdata(rd), .flush_req(freq), .flush_done(fdone));
    axi_mem_model #(.MEM_WORDS(4096), .LATENCY(LATS[0])) mem_a (.clk, .rst_n, .stall_en(1'b0), .req(areq[0]), .rsp(arsp[0]));
    axi_mem_model #(.MEM_WORDS(4096), .LATENCY(LATS[0])) mem_b (.clk, .rst_n, .stall_en(1'b0), .req(areq[1]), .rsp(arsp[1]));
    axi_mem_model #(.MEM_WORDS(4096), .LATENCY(LATS[0])) mem_c (.clk, .rst_n, .stall_en(1'b0), .req(areq[2]), .rsp(arsp[2]));

    // One run per latency: while the main block holds reset, set the latency
    // and the memory contents; after done, check the product.
    initial begin
      int bad;
      logic [31:0] s;
      for (int l = 0; l < int'(NLAT); l++) begin
        while (round != l) @(negedge clk);
        mem_a.latency = LATS[l]; mem_b.latency = LATS[l]; mem_c.latency = LATS[l];
        for (int i = 0; i < 4096; i++) begin mem_a.mem[i] = 0; mem_b.mem[i] = 0; mem_c.mem[i] = 0; end
        for (int i = 0; i < int'(N * N); i++) begin
          mem_a.mem[i] = a_val(i);
          mem_b.mem[1024 + i] = b_val(i);
        end
        @(negedge clk);
        while (!done) @(negedge clk);
        bad = 0;
        for (int i = 0; i < int'(N); i++)
          for (int j = 0; j < int'(N); j++) begin
            s = 0;
            for (int t = 0; t < int'(N); t++) s += a_val(i * N + t) * b_val(t * N + j);
            if (mem_c.mem[2048 + i * N + j] !== s) bad++;
          end
        checks++;
        if (bad != 0) begin
          failures++;
          $display("FAIL latency %0d config (%0d,%0d): %0d wrong", LATS[l], ROW[k], COL[k], bad);
        end
        cycles[l][k] = u_acc.cycles;
        finished++;
      end
    end
  end

  initial begin
    for (int l = 0; l < int'(NLAT); l++) begin
      rst_n = 1'b0;
      finished = 0;
      round = l;
      repeat (4) @(negedge clk);
      rst_n = 1'b1;
      @(negedge clk);
      start = 1'b1;
      while (finished < int'(NCFG)) @(negedge clk);
      start = 1'b0;
      repeat (2) @(negedge clk);
    end
    $display("config (row,col words)   latency 5  latency 10  latency 25  latency 50");
    for (int k = 0; k < int'(NCFG); k++)
      $display("  (%3d,%3d)              %9d  %10d  %10d  %10d", ROW[k], COL[k],
               cycles[0][k], cycles[1][k], cycles[2][k], cycles[3][k]);
    for (int k = 0; k < int'(NCFG); k++)
      for (int l = 1; l < int'(NLAT); l++) begin
        checks++;
        if (cycles[l][k] <= cycles[l-1][k]) begin
          failures++;
          $display("FAIL: config %0d not slower at latency %0d", k, LATS[l]);
        end
      end
    checks++;
    if (!(cycles[NLAT-1][5] > 2 * cycles[NLAT-1][4])) begin failures++; $display("FAIL: small column cache not slower"); end
    checks++;
    if (!(cycles[NLAT-1][0] * 4 < cycles[NLAT-1][4] * 5)) begin failures++; $display("FAIL: small row cache much slower"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

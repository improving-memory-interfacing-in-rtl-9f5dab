// tb_hls_cache_system: end-to-end test of the cache system running the
// three-channel matrix multiply (a, b, output; N = 10) of the accelerator
// model against external memory with a latency of 50 cycles.
//
// Two systems run side by side with small caches, so that lines are
// replaced often:
//   sys_wb - all three caches write-back (a: 2 ways of 2 lines of 4 words,
//            b: 2 ways of 16 lines of 4 words, output: 1 way of 2 lines of 4);
//   sys_wt - the same, but the output cache is write-through.
// Checks: the output matrix in external memory equals the product computed
// here, after the flush, and that each mechanism
// happened: cache hits, line refills, dirty write-backs on replacement,
// write-backs by the flush, writes issued while others were still unanswered,
// single-word write-through writes (exactly one per output element), and
// flush completion.
module tb_hls_cache_system;
  import cache_pkg::*;

  localparam int unsigned N   = 10;
  localparam int unsigned LAT = 50;
  localparam int unsigned MEMW = 4096;
  localparam int unsigned NWAYS [3] = '{2, 2, 1};
  localparam int unsigned WSIZE [3] = '{2, 16, 2};
  localparam int unsigned LSIZE [3] = '{4, 4, 4};
  localparam write_policy_e POL_WB [3] = '{WRITE_BACK, WRITE_BACK, WRITE_BACK};
  localparam write_policy_e POL_WT [3] = '{WRITE_BACK, WRITE_BACK, WRITE_THROUGH};

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // two systems: index 0 = sys_wb, 1 = sys_wt
  logic     v    [2][3];
  logic     rdy  [2][3];
  fe_req_t  rq   [2][3];
  logic     rspv [2][3];
  word_t    rd   [2][3];
  logic     freq [2], fdone [2], done [2];
  axi_req_t areq [2][3];
  axi_rsp_t arsp [2][3];

  hls_cache_system #(.N_CHANNELS(3), .N_WAYS(NWAYS), .WAY_SIZE(WSIZE), .LINE_SIZE(LSIZE),
                     .WRITE_POLICY(POL_WB), .MAX_OUTSTANDING(2)) sys_wb (
    .clk, .rst_n, .fe_req_valid(v[0]), .fe_req_ready(rdy[0]), .fe_req(rq[0]),
    .fe_rsp_valid(rspv[0]), .fe_rsp_rdata(rd[0]), .flush_req(freq[0]), .flush_done(fdone[0]),
    .axi_req(areq[0]), .axi_rsp(arsp[0]));
  hls_cache_system #(.N_CHANNELS(3), .N_WAYS(NWAYS), .WAY_SIZE(WSIZE), .LINE_SIZE(LSIZE),
                     .WRITE_POLICY(POL_WT), .MAX_OUTSTANDING(2)) sys_wt (
    .clk, .rst_n, .fe_req_valid(v[1]), .fe_req_ready(rdy[1]), .fe_req(rq[1]),
    .fe_rsp_valid(rspv[1]), .fe_rsp_rdata(rd[1]), .flush_req(freq[1]), .flush_done(fdone[1]),
    .axi_req(areq[1]), .axi_rsp(arsp[1]));

  for (genvar s = 0; s < 2; s++) begin : g_sys
    mmult_accel #(.N(N)) u_acc (
      .clk, .start, .done(done[s]), .fe_req_valid(v[s]), .fe_req_ready(rdy[s]), .fe_req(rq[s]),
      .fe_rsp_valid(rspv[s]), .fe_rsp_rdata(rd[s]), .flush_req(freq[s]), .flush_done(fdone[s]));
    for (genvar c = 0; c < 3; c++) begin : g_mem
      axi_mem_model #(.MEM_WORDS(MEMW), .LATENCY(LAT)) u_mem (
        .clk, .rst_n, .stall_en(1'b0), .req(areq[s][c]), .rsp(arsp[s][c]));
    end
  end

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 500000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  logic [31:0] a [N*N], b [N*N], c_ref [N*N];

  // write-back bursts seen before the flush started, per system
  int bursts_before_flush [2];
  bit flush_seen [2] = '{1'b0, 1'b0};
  always @(posedge clk) begin
    if (freq[0]) flush_seen[0] <= 1'b1;
    if (freq[1]) flush_seen[1] <= 1'b1;
    if (!freq[0] && !flush_seen[0]) bursts_before_flush[0] <= g_sys[0].g_mem[2].u_mem.n_aw_burst;
    if (!freq[1] && !flush_seen[1]) bursts_before_flush[1] <= g_sys[1].g_mem[2].u_mem.n_aw_burst;
  end

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int out_errors(input int s);
    int n = 0;
    for (int i = 0; i < int'(N * N); i++) begin
      logic [31:0] got;
      got = (s == 0) ? g_sys[0].g_mem[2].u_mem.mem[2048 + i] : g_sys[1].g_mem[2].u_mem.mem[2048 + i];
      if (got !== c_ref[i]) n++;
    end
    return n;
  endfunction

  initial begin
    for (int i = 0; i < int'(N * N); i++) begin
      a[i] = $urandom % 1000;
      b[i] = $urandom % 1000;
    end
    for (int i = 0; i < int'(N); i++)
      for (int j = 0; j < int'(N); j++) begin
        c_ref[i * N + j] = 0;
        for (int k = 0; k < int'(N); k++) c_ref[i * N + j] += a[i * N + k] * b[k * N + j];
      end
    for (int i = 0; i < int'(MEMW); i++) begin
      g_sys[0].g_mem[0].u_mem.mem[i] = 0; g_sys[0].g_mem[1].u_mem.mem[i] = 0; g_sys[0].g_mem[2].u_mem.mem[i] = 0;
      g_sys[1].g_mem[0].u_mem.mem[i] = 0; g_sys[1].g_mem[1].u_mem.mem[i] = 0; g_sys[1].g_mem[2].u_mem.mem[i] = 0;
    end
    for (int i = 0; i < int'(N * N); i++) begin
      g_sys[0].g_mem[0].u_mem.mem[i] = a[i];          // a at 0x0000
      g_sys[0].g_mem[1].u_mem.mem[1024 + i] = b[i];   // b at 0x1000
      g_sys[1].g_mem[0].u_mem.mem[i] = a[i];
      g_sys[1].g_mem[1].u_mem.mem[1024 + i] = b[i];
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    while (!(done[0] && done[1])) @(negedge clk);
    expect_true("write-back output correct after flush", out_errors(0) == 0);
    expect_true("write-through output correct after flush", out_errors(1) == 0);

    begin
      int refills [2];
      refills[0] = g_sys[0].g_mem[0].u_mem.n_ar + g_sys[0].g_mem[1].u_mem.n_ar + g_sys[0].g_mem[2].u_mem.n_ar;
      refills[1] = g_sys[1].g_mem[0].u_mem.n_ar + g_sys[1].g_mem[1].u_mem.n_ar + g_sys[1].g_mem[2].u_mem.n_ar;
      $display("sys_wb: accesses=%0d hits=%0d refills=%0d cycles=%0d", g_sys[0].u_acc.accesses,
               g_sys[0].u_acc.hits, refills[0], g_sys[0].u_acc.cycles);
      $display("sys_wt: accesses=%0d hits=%0d refills=%0d cycles=%0d", g_sys[1].u_acc.accesses,
               g_sys[1].u_acc.hits, refills[1], g_sys[1].u_acc.cycles);
      expect_true("refills happened", refills[0] > 0 && refills[1] > 0);
    end
    $display("wb: bursts before flush %0d, total %0d, max outstanding %0d; wt: writes %0d, bursts %0d, max outstanding %0d",
             bursts_before_flush[0], g_sys[0].g_mem[2].u_mem.n_aw_burst, g_sys[0].g_mem[2].u_mem.max_outstanding_w,
             g_sys[1].g_mem[2].u_mem.n_aw, g_sys[1].g_mem[2].u_mem.n_aw_burst, g_sys[1].g_mem[2].u_mem.max_outstanding_w);
    expect_true("hits happened", g_sys[0].u_acc.hits > 0 && g_sys[1].u_acc.hits > 0);
    expect_true("dirty write-back on replacement", bursts_before_flush[0] > 0);
    expect_true("write-back by flush", g_sys[0].g_mem[2].u_mem.n_aw_burst > bursts_before_flush[0]);
    expect_true("outstanding writes (write-back)", g_sys[0].g_mem[2].u_mem.max_outstanding_w >= 2);
    expect_true("outstanding writes (write-through)", g_sys[1].g_mem[2].u_mem.max_outstanding_w >= 2);
    expect_true("one write-through write per element", g_sys[1].g_mem[2].u_mem.n_aw == int'(N * N) &&
                                                       g_sys[1].g_mem[2].u_mem.n_aw_burst == 0);
    expect_true("flush completed", done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_hls_cache_system_full: the cache system at its default configuration
// (three channels, each cache one way of 16 lines of 16 words, write-back)
// running the 10 x 10 matrix multiply of the accelerator model against
// external memory with a latency of 50 cycles, from reset to flush_done.
// Checks the output matrix in memory after the flush, that a and b were each
// fetched exactly once per line (a and b, 100 words each, fit in 256-word
// caches: 7 lines of 16 words), that output was written back only by the
// flush (7 bursts), and that the run ends within the cycle bound below.
module tb_hls_cache_system_full;
  import cache_pkg::*;

  localparam int unsigned N    = 10;
  localparam int unsigned LAT  = 50;
  localparam int unsigned MEMW = 4096;
  localparam int unsigned LINES = (N * N + 15) / 16;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic     v [3], rdy [3], rspv [3], freq, fdone, done;
  fe_req_t  rq [3];
  word_t    rd [3];
  axi_req_t areq [3];
  axi_rsp_t arsp [3];

  hls_cache_system dut (
    .clk, .rst_n, .fe_req_valid(v), .fe_req_ready(rdy), .fe_req(rq),
    .fe_rsp_valid(rspv), .fe_rsp_rdata(rd), .flush_req(freq), .flush_done(fdone),
    .axi_req(areq), .axi_rsp(arsp));

  mmult_accel #(.N(N)) u_acc (
    .clk, .start, .done, .fe_req_valid(v), .fe_req_ready(rdy), .fe_req(rq),
    .fe_rsp_valid(rspv), .fe_rsp_rdata(rd), .flush_req(freq), .flush_done(fdone));

  axi_mem_model #(.MEM_WORDS(MEMW), .LATENCY(LAT)) mem_a (.clk, .rst_n, .stall_en(1'b0), .req(areq[0]), .rsp(arsp[0]));
  axi_mem_model #(.MEM_WORDS(MEMW), .LATENCY(LAT)) mem_b (.clk, .rst_n, .stall_en(1'b0), .req(areq[1]), .rsp(arsp[1]));
  axi_mem_model #(.MEM_WORDS(MEMW), .LATENCY(LAT)) mem_c (.clk, .rst_n, .stall_en(1'b0), .req(areq[2]), .rsp(arsp[2]));

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 200000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  logic [31:0] a [N*N], b [N*N], c_ref [N*N];

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int bad;
    for (int i = 0; i < int'(N * N); i++) begin
      a[i] = $urandom;
      b[i] = $urandom;
    end
    for (int i = 0; i < int'(N); i++)
      for (int j = 0; j < int'(N); j++) begin
        c_ref[i * N + j] = 0;
        for (int k = 0; k < int'(N); k++) c_ref[i * N + j] += a[i * N + k] * b[k * N + j];
      end
    for (int i = 0; i < int'(MEMW); i++) begin mem_a.mem[i] = 0; mem_b.mem[i] = 0; mem_c.mem[i] = 0; end
    for (int i = 0; i < int'(N * N); i++) begin
      mem_a.mem[i] = a[i];
      mem_b.mem[1024 + i] = b[i];
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    while (!done) @(negedge clk);
    bad = 0;
    for (int i = 0; i < int'(N * N); i++) if (mem_c.mem[2048 + i] !== c_ref[i]) bad++;
    expect_true("output matrix in memory", bad == 0);
    $display("accesses=%0d hits=%0d cycles=%0d refills a=%0d b=%0d c=%0d, output bursts=%0d",
             u_acc.accesses, u_acc.hits, u_acc.cycles, mem_a.n_ar, mem_b.n_ar, mem_c.n_ar, mem_c.n_aw_burst);
    expect_true("a fetched once per line", mem_a.n_ar == int'(LINES));
    expect_true("b fetched once per line", mem_b.n_ar == int'(LINES));
    expect_true("output lines allocated once", mem_c.n_ar == int'(LINES));
    expect_true("output written back by the flush only", mem_c.n_aw_burst == int'(LINES) && mem_c.n_aw == int'(LINES));
    expect_true("hits = accesses - misses", u_acc.hits == u_acc.accesses - 3 * int'(LINES));
    // bound: 3*LINES refills of (LAT + 16 + 4) cycles, 3 cycles per other
    // load pair or store, flush write-backs and their responses
    expect_true("cycle bound", u_acc.cycles < 3 * int'(LINES) * int'(LAT + 20) + 3 * 1100 + int'(LINES) * 20 + int'(LAT) + 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

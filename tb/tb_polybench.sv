// tb_polybench: runs the five PolyBench kernels used to evaluate the caches
// (2mm, atax, bicg, doitgen, mvt; vectors of 10 and matrices of 10 x 10
// 32-bit integers, doitgen's 3-D array 10 x 10 x 10) through the cache system
// at its default configuration, against external memory with a latency of
// 50 cycles.
//
// The testbench plays the accelerator: it issues the kernel's loads and
// stores one at a time on the channel that holds each array (one channel per
// large array, vectors sharing a matrix channel), flushes, and compares every
// output array in external memory with a reference computed here. The system
// is reset before each kernel so each starts with empty caches. It prints the
// cycles of each kernel and, for comparison, the cycles the same accesses
// would take if each were a single AXI transfer of latency + 2 cycles.
// atax and 2mm are also run at memory latencies of 5, 10 and 25 cycles, and
// the testbench checks that their cycle counts grow with the latency.
module tb_polybench;
  import cache_pkg::*;

  localparam int unsigned N    = 10;
  localparam int unsigned LAT  = 50;
  localparam int unsigned MEMW = 2048;

  logic clk = 1'b0, rst_n = 1'b0, freq = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic     v [3], rdy [3], rspv [3], fdone;
  fe_req_t  rq [3];
  word_t    rd [3];
  axi_req_t areq [3];
  axi_rsp_t arsp [3];

  hls_cache_system dut (
    .clk, .rst_n, .fe_req_valid(v), .fe_req_ready(rdy), .fe_req(rq),
    .fe_rsp_valid(rspv), .fe_rsp_rdata(rd), .flush_req(freq), .flush_done(fdone),
    .axi_req(areq), .axi_rsp(arsp));

  axi_mem_model #(.MEM_WORDS(MEMW), .LATENCY(LAT)) mem0 (.clk, .rst_n, .stall_en(1'b0), .req(areq[0]), .rsp(arsp[0]));
  axi_mem_model #(.MEM_WORDS(MEMW), .LATENCY(LAT)) mem1 (.clk, .rst_n, .stall_en(1'b0), .req(areq[1]), .rsp(arsp[1]));
  axi_mem_model #(.MEM_WORDS(MEMW), .LATENCY(LAT)) mem2 (.clk, .rst_n, .stall_en(1'b0), .req(areq[2]), .rsp(arsp[2]));

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 2000000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  int n_access;

  // --- external memory access by the testbench (initialisation / checking)
  function automatic word_t peek(input int ch, input int w);
    case (ch)
      0: return mem0.mem[w];
      1: return mem1.mem[w];
      default: return mem2.mem[w];
    endcase
  endfunction
  task automatic poke(input int ch, input int w, input word_t d);
    case (ch)
      0: mem0.mem[w] = d;
      1: mem1.mem[w] = d;
      default: mem2.mem[w] = d;
    endcase
  endtask

  // --- accelerator accesses through the caches
  task automatic access(input int ch, input logic we, input int w, input word_t wd, output word_t d);
    for (int c = 0; c < 3; c++) v[c] = 1'b0;
    rq[ch] = '{we: we, addr: addr_t'(w) << 2, wdata: wd, wstrb: 4'hF};
    v[ch]  = 1'b1;
    while (!rdy[ch]) @(negedge clk);
    @(negedge clk);
    v[ch] = 1'b0;
    while (!rspv[ch]) @(negedge clk);
    d = rd[ch];
    n_access++;
  endtask
  function automatic void unused(input word_t d);
  endfunction
  task automatic ld(input int ch, input int w, output word_t d);
    access(ch, 1'b0, w, '0, d);
  endtask
  task automatic st(input int ch, input int w, input word_t d);
    word_t x;
    access(ch, 1'b1, w, d, x);
    unused(x);
  endtask

  int unsigned lat_now = LAT;

  task automatic start_kernel();
    mem0.latency = lat_now; mem1.latency = lat_now; mem2.latency = lat_now;
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    n_access = 0;
    for (int c = 0; c < 3; c++) for (int i = 0; i < int'(MEMW); i++) poke(c, i, $urandom % 100);
  endtask

  int last_cycles;
  task automatic finish_kernel(input string name, input int t0);
    freq = 1'b1;
    while (!fdone) @(negedge clk);
    @(negedge clk);
    freq = 1'b0;
    last_cycles = cyc - t0;
    $display("%-8s latency=%0d cycles=%0d accesses=%0d  uncached estimate=%0d", name, lat_now,
             cyc - t0, n_access, n_access * int'(lat_now + 2));
  endtask

  task automatic compare(input string what, input int ch, input int base, input word_t exp [], input int n);
    int bad = 0;
    for (int i = 0; i < n; i++) if (peek(ch, base + i) !== exp[i]) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %s: %0d words wrong", what, bad); end
  endtask

  // ---------------------------------------------------------------- kernels
  task automatic run_atax();
    // A: ch0 @0; x: ch1 @0; tmp: ch1 @64; y: ch2 @0
    word_t a [], x [], y_ref [], tmp_ref [];
    word_t d, e, acc;
    int t0;
    start_kernel();
    a = new[N*N]; x = new[N]; y_ref = new[N]; tmp_ref = new[N];
    for (int i = 0; i < int'(N*N); i++) a[i] = peek(0, i);
    for (int i = 0; i < int'(N); i++) begin x[i] = peek(1, i); y_ref[i] = 0; end
    for (int i = 0; i < int'(N); i++) begin
      tmp_ref[i] = 0;
      for (int j = 0; j < int'(N); j++) tmp_ref[i] += a[i*N+j] * x[j];
      for (int j = 0; j < int'(N); j++) y_ref[j] += a[i*N+j] * tmp_ref[i];
    end
    t0 = cyc;
    for (int j = 0; j < int'(N); j++) st(2, j, 0);
    for (int i = 0; i < int'(N); i++) begin
      acc = 0;
      for (int j = 0; j < int'(N); j++) begin ld(0, i*N+j, d); ld(1, j, e); acc += d * e; end
      st(1, 64 + i, acc);
      for (int j = 0; j < int'(N); j++) begin
        ld(2, j, e); ld(0, i*N+j, d); st(2, j, e + d * acc);
      end
    end
    finish_kernel("atax", t0);
    compare("atax y", 2, 0, y_ref, N);
    compare("atax tmp", 1, 64, tmp_ref, N);
  endtask

  task automatic run_bicg();
    // A: ch0 @0; p: ch1 @0; r: ch1 @64; s: ch2 @0; q: ch2 @64
    word_t a [], p [], r [], s_ref [], q_ref [];
    word_t d, e, f, acc;
    int t0;
    start_kernel();
    a = new[N*N]; p = new[N]; r = new[N]; s_ref = new[N]; q_ref = new[N];
    for (int i = 0; i < int'(N*N); i++) a[i] = peek(0, i);
    for (int i = 0; i < int'(N); i++) begin p[i] = peek(1, i); r[i] = peek(1, 64 + i); s_ref[i] = 0; end
    for (int i = 0; i < int'(N); i++) begin
      q_ref[i] = 0;
      for (int j = 0; j < int'(N); j++) begin
        s_ref[j] += r[i] * a[i*N+j];
        q_ref[i] += a[i*N+j] * p[j];
      end
    end
    t0 = cyc;
    for (int j = 0; j < int'(N); j++) st(2, j, 0);
    for (int i = 0; i < int'(N); i++) begin
      acc = 0;
      ld(1, 64 + i, f);
      for (int j = 0; j < int'(N); j++) begin
        ld(0, i*N+j, d);
        ld(2, j, e); st(2, j, e + f * d);
        ld(1, j, e); acc += d * e;
      end
      st(2, 64 + i, acc);
    end
    finish_kernel("bicg", t0);
    compare("bicg s", 2, 0, s_ref, N);
    compare("bicg q", 2, 64, q_ref, N);
  endtask

  task automatic run_mvt();
    // A: ch0 @0; y1: ch1 @0; y2: ch1 @64; x1: ch2 @0; x2: ch2 @64
    word_t a [], y1 [], y2 [], x1_ref [], x2_ref [];
    word_t d, e, acc;
    int t0;
    start_kernel();
    a = new[N*N]; y1 = new[N]; y2 = new[N]; x1_ref = new[N]; x2_ref = new[N];
    for (int i = 0; i < int'(N*N); i++) a[i] = peek(0, i);
    for (int i = 0; i < int'(N); i++) begin
      y1[i] = peek(1, i); y2[i] = peek(1, 64 + i); x1_ref[i] = peek(2, i); x2_ref[i] = peek(2, 64 + i);
    end
    for (int i = 0; i < int'(N); i++)
      for (int j = 0; j < int'(N); j++) begin
        x1_ref[i] += a[i*N+j] * y1[j];
        x2_ref[i] += a[j*N+i] * y2[j];
      end
    t0 = cyc;
    for (int i = 0; i < int'(N); i++) begin
      ld(2, i, acc);
      for (int j = 0; j < int'(N); j++) begin ld(0, i*N+j, d); ld(1, j, e); acc += d * e; end
      st(2, i, acc);
    end
    for (int i = 0; i < int'(N); i++) begin
      ld(2, 64 + i, acc);
      for (int j = 0; j < int'(N); j++) begin ld(0, j*N+i, d); ld(1, 64 + j, e); acc += d * e; end
      st(2, 64 + i, acc);
    end
    finish_kernel("mvt", t0);
    compare("mvt x1", 2, 0, x1_ref, N);
    compare("mvt x2", 2, 64, x2_ref, N);
  endtask

  task automatic run_2mm();
    // A: ch0 @0; B: ch1 @0; C: ch1 @256; tmp: ch2 @0; D: ch2 @256
    localparam word_t ALPHA = 3, BETA = 2;
    word_t a [], b [], c [], tmp_ref [], d_ref [];
    word_t d, e, acc;
    int t0;
    start_kernel();
    a = new[N*N]; b = new[N*N]; c = new[N*N]; tmp_ref = new[N*N]; d_ref = new[N*N];
    for (int i = 0; i < int'(N*N); i++) begin
      a[i] = peek(0, i); b[i] = peek(1, i); c[i] = peek(1, 256 + i); d_ref[i] = peek(2, 256 + i);
    end
    for (int i = 0; i < int'(N); i++)
      for (int j = 0; j < int'(N); j++) begin
        tmp_ref[i*N+j] = 0;
        for (int k = 0; k < int'(N); k++) tmp_ref[i*N+j] += ALPHA * a[i*N+k] * b[k*N+j];
      end
    for (int i = 0; i < int'(N); i++)
      for (int j = 0; j < int'(N); j++) begin
        d_ref[i*N+j] *= BETA;
        for (int k = 0; k < int'(N); k++) d_ref[i*N+j] += tmp_ref[i*N+k] * c[k*N+j];
      end
    t0 = cyc;
    for (int i = 0; i < int'(N); i++)
      for (int j = 0; j < int'(N); j++) begin
        acc = 0;
        for (int k = 0; k < int'(N); k++) begin ld(0, i*N+k, d); ld(1, k*N+j, e); acc += ALPHA * d * e; end
        st(2, i*N+j, acc);
      end
    for (int i = 0; i < int'(N); i++)
      for (int j = 0; j < int'(N); j++) begin
        ld(2, 256 + i*N+j, acc);
        acc *= BETA;
        for (int k = 0; k < int'(N); k++) begin ld(2, i*N+k, d); ld(1, 256 + k*N+j, e); acc += d * e; end
        st(2, 256 + i*N+j, acc);
      end
    finish_kernel("2mm", t0);
    compare("2mm tmp", 2, 0, tmp_ref, N*N);
    compare("2mm D", 2, 256, d_ref, N*N);
  endtask

  task automatic run_doitgen();
    // A[r][q][p]: ch0 @0 (1000 words); C4: ch1 @0; sum: ch2 @0
    word_t a_ref [], c4 [], s [];
    word_t d, e, acc;
    int t0;
    start_kernel();
    a_ref = new[N*N*N]; c4 = new[N*N]; s = new[N];
    for (int i = 0; i < int'(N*N*N); i++) a_ref[i] = peek(0, i);
    for (int i = 0; i < int'(N*N); i++) c4[i] = peek(1, i);
    for (int r = 0; r < int'(N); r++)
      for (int q = 0; q < int'(N); q++) begin
        for (int p = 0; p < int'(N); p++) begin
          s[p] = 0;
          for (int k = 0; k < int'(N); k++) s[p] += a_ref[(r*N+q)*N+k] * c4[k*N+p];
        end
        for (int p = 0; p < int'(N); p++) a_ref[(r*N+q)*N+p] = s[p];
      end
    t0 = cyc;
    for (int r = 0; r < int'(N); r++)
      for (int q = 0; q < int'(N); q++) begin
        for (int p = 0; p < int'(N); p++) begin
          acc = 0;
          for (int k = 0; k < int'(N); k++) begin ld(0, (r*N+q)*N+k, d); ld(1, k*N+p, e); acc += d * e; end
          st(2, p, acc);
        end
        for (int p = 0; p < int'(N); p++) begin ld(2, p, d); st(0, (r*N+q)*N+p, d); end
      end
    finish_kernel("doitgen", t0);
    compare("doitgen A", 0, 0, a_ref, N*N*N);
  endtask

  initial begin
    for (int c = 0; c < 3; c++) begin v[c] = 1'b0; rq[c] = '0; end
    repeat (2) @(negedge clk);
    run_atax();
    run_bicg();
    run_mvt();
    run_2mm();
    run_doitgen();
    // latency sweep of atax and 2mm
    begin
      int prev_atax, prev_2mm;
      int unsigned lats [4] = '{5, 10, 25, 50};
      prev_atax = 0; prev_2mm = 0;
      for (int li = 0; li < 4; li++) begin
        lat_now = lats[li];
        run_atax();
        checks++;
        if (last_cycles <= prev_atax) begin failures++; $display("FAIL: atax not slower at latency %0d", lat_now); end
        prev_atax = last_cycles;
        run_2mm();
        checks++;
        if (last_cycles <= prev_2mm) begin failures++; $display("FAIL: 2mm not slower at latency %0d", lat_now); end
        prev_2mm = last_cycles;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

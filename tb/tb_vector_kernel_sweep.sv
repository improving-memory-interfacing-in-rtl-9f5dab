// tb_vector_kernel_sweep: the cache-size exploration of the three kernels
// that combine one 10 x 10 matrix with vectors of 10 (atax, bicg, mvt).
//
// Five systems run side by side. All three caches of a system have the same
// size: 16, 32, 64, 128 or 256 words, built as one way of 8-word lines
// (WAY_SIZE = words / 8). The external memory has a latency of 50 cycles.
// Each system runs atax, bicg and mvt in turn, with a reset before each
// kernel. The testbench plays the accelerator and makes one access at a
// time. The matrix is on channel 0, the input vectors on channel 1 and the
// output vectors on channel 2. Every output vector is checked against a
// reference computed here. The cycles of each kernel are printed, and for
// each kernel the 256-word caches must be faster than the 16-word ones.
// mvt reads its matrix down the columns in its second half, so it is the
// kernel that gains most from a larger cache.
module tb_vector_kernel_sweep;
  import cache_pkg::*;

  localparam int unsigned N     = 10;
  localparam int unsigned LAT   = 50;
  localparam int unsigned MEMW  = 1024;
  localparam int unsigned NCFG  = 5;
  localparam int unsigned WORDS [NCFG] = '{16, 32, 64, 128, 256};

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  int cycles [NCFG][3];
  int finished = 0;

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 400000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  for (genvar k = 0; k < int'(NCFG); k++) begin : g_cfg
    localparam int unsigned WS [3] = '{default: WORDS[k] / 8};
    localparam int unsigned LS [3] = '{default: 8};
    localparam int unsigned NW [3] = '{default: 1};

    logic     rst_n = 1'b0, freq = 1'b0, fdone;
    logic     v [3], rdy [3], rspv [3];
    fe_req_t  rq [3];
    word_t    rd [3];
    axi_req_t areq [3];
    axi_rsp_t arsp [3];

    hls_cache_system #(.N_CHANNELS(3), .N_WAYS(NW), .WAY_SIZE(WS), .LINE_SIZE(LS)) u_sys (
      .clk, .rst_n, .fe_req_valid(v), .fe_req_ready(rdy), .fe_req(rq),
      .fe_rsp_valid(rspv), .fe_rsp_rdata(rd), .flush_req(freq), .flush_done(fdone),
      .axi_req(areq), .axi_rsp(arsp));
    axi_mem_model #(.MEM_WORDS(MEMW), .LATENCY(LAT)) mem0 (.clk, .rst_n, .stall_en(1'b0), .req(areq[0]), .rsp(arsp[0]));
    axi_mem_model #(.MEM_WORDS(MEMW), .LATENCY(LAT)) mem1 (.clk, .rst_n, .stall_en(1'b0), .req(areq[1]), .rsp(arsp[1]));
    axi_mem_model #(.MEM_WORDS(MEMW), .LATENCY(LAT)) mem2 (.clk, .rst_n, .stall_en(1'b0), .req(areq[2]), .rsp(arsp[2]));

    function automatic word_t peek(input int ch, input int w);
      case (ch)
        0: return g_cfg[k].mem0.mem[w];
        1: return g_cfg[k].mem1.mem[w];
        default: return g_cfg[k].mem2.mem[w];
      endcase
    endfunction
    task automatic poke(input int ch, input int w, input word_t d);
      case (ch)
        0: g_cfg[k].mem0.mem[w] = d;
        1: g_cfg[k].mem1.mem[w] = d;
        default: g_cfg[k].mem2.mem[w] = d;
      endcase
    endtask

    task automatic access(input int ch, input logic we, input int w, input word_t wd, output word_t d);
      for (int c = 0; c < 3; c++) v[c] = 1'b0;
      rq[ch] = '{we: we, addr: addr_t'(w) << 2, wdata: wd, wstrb: 4'hF};
      v[ch]  = 1'b1;
      while (!rdy[ch]) @(negedge clk);
      @(negedge clk);
      v[ch] = 1'b0;
      while (!rspv[ch]) @(negedge clk);
      d = rd[ch];
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

    task automatic start_kernel(output int t0);
      rst_n = 1'b0;
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      @(negedge clk);
      for (int c = 0; c < 3; c++) for (int i = 0; i < int'(MEMW); i++) poke(c, i, $urandom % 100);
      t0 = cyc;
    endtask
    task automatic finish_kernel(input int kern, input int t0);
      freq = 1'b1;
      while (!fdone) @(negedge clk);
      @(negedge clk);
      freq = 1'b0;
      cycles[k][kern] = cyc - t0;
    endtask
    task automatic compare(input string what, input int ch, input int base, input word_t exp [], input int n);
      int bad = 0;
      for (int i = 0; i < n; i++) if (peek(ch, base + i) !== exp[i]) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("FAIL %0d words: %s, %0d words wrong", WORDS[k], what, bad); end
    endtask

    task automatic run_atax();
      // A: ch0 @0; x: ch1 @0; tmp: ch1 @64; y: ch2 @0
      word_t a [], x [], y_ref [], tmp_ref [];
      word_t d, e, acc;
      int t0;
      start_kernel(t0);
      a = new[N*N]; x = new[N]; y_ref = new[N]; tmp_ref = new[N];
      for (int i = 0; i < int'(N*N); i++) a[i] = peek(0, i);
      for (int i = 0; i < int'(N); i++) begin x[i] = peek(1, i); y_ref[i] = 0; end
      for (int i = 0; i < int'(N); i++) begin
        tmp_ref[i] = 0;
        for (int j = 0; j < int'(N); j++) tmp_ref[i] += a[i*N+j] * x[j];
        for (int j = 0; j < int'(N); j++) y_ref[j] += a[i*N+j] * tmp_ref[i];
      end
      for (int j = 0; j < int'(N); j++) st(2, j, 0);
      for (int i = 0; i < int'(N); i++) begin
        acc = 0;
        for (int j = 0; j < int'(N); j++) begin ld(0, i*N+j, d); ld(1, j, e); acc += d * e; end
        st(1, 64 + i, acc);
        for (int j = 0; j < int'(N); j++) begin
          ld(2, j, e); ld(0, i*N+j, d); st(2, j, e + d * acc);
        end
      end
      finish_kernel(0, t0);
      compare("atax y", 2, 0, y_ref, N);
      compare("atax tmp", 1, 64, tmp_ref, N);
    endtask

    task automatic run_bicg();
      // A: ch0 @0; p: ch1 @0; r: ch1 @64; s: ch2 @0; q: ch2 @64
      word_t a [], p [], r [], s_ref [], q_ref [];
      word_t d, e, f, acc;
      int t0;
      start_kernel(t0);
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
      finish_kernel(1, t0);
      compare("bicg s", 2, 0, s_ref, N);
      compare("bicg q", 2, 64, q_ref, N);
    endtask

    task automatic run_mvt();
      // A: ch0 @0; y1: ch1 @0; y2: ch1 @64; x1: ch2 @0; x2: ch2 @64
      word_t a [], y1 [], y2 [], x1_ref [], x2_ref [];
      word_t d, e, acc;
      int t0;
      start_kernel(t0);
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
      finish_kernel(2, t0);
      compare("mvt x1", 2, 0, x1_ref, N);
      compare("mvt x2", 2, 64, x2_ref, N);
    endtask

    initial begin
      for (int c = 0; c < 3; c++) begin v[c] = 1'b0; rq[c] = '0; end
      repeat (2) @(negedge clk);
      run_atax();
      run_bicg();
      run_mvt();
      finished++;
    end
  end

  initial begin
    string names [3] = '{"atax", "bicg", "mvt"};
    @(negedge clk);
    while (finished < int'(NCFG)) @(negedge clk);
    $display("cache words      atax      bicg       mvt");
    for (int k = 0; k < int'(NCFG); k++)
      $display("  %4d       %8d  %8d  %8d", WORDS[k], cycles[k][0], cycles[k][1], cycles[k][2]);
    for (int j = 0; j < 3; j++) begin
      checks++;
      if (cycles[NCFG-1][j] >= cycles[0][j]) begin
        failures++;
        $display("FAIL: %s not faster with 256-word caches than with 16-word ones", names[j]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_axi_read_fill: self-checking test of the line-fill read burst.
// Fetches lines of 8 words from a memory model (latency 6) with and without
// random back-pressure, checks the AR fields, every beat's index and data,
// the done pulse, and, without back-pressure, that the burst takes exactly
// latency + 8 cycles from the AR handshake.
module tb_axi_read_fill;
  import cache_pkg::*;
  localparam int LAT = 6, LW = 8;
  logic clk = 1'b0, rst_n = 1'b0, stall_en = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, beat_valid, done;
  addr_t line_addr;
  logic [2:0] beat_idx;
  word_t beat_data;
  axi_req_t req;
  axi_rsp_t rsp;

  axi_read_fill #(.LINE_WORDS(LW)) dut (
    .clk, .rst_n, .start, .line_addr, .busy, .beat_valid, .beat_idx, .beat_data, .done,
    .ar_valid(req.ar_valid), .ar(req.ar), .ar_ready(rsp.ar_ready),
    .r_valid(rsp.r_valid), .r(rsp.r), .r_ready(req.r_ready));
  assign req.aw_valid = 1'b0;
  assign req.aw = '0;
  assign req.w_valid = 1'b0;
  assign req.w = '0;
  assign req.b_ready = 1'b0;

  axi_mem_model #(.MEM_WORDS(256), .LATENCY(LAT)) mem (.clk, .rst_n, .stall_en, .req, .rsp);

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 20000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic fetch(input int line, input bit timed);
    int beats = 0, t_ar = -1;
    bit fin = 0;
    start = 1'b1; line_addr = addr_t'(line * LW * 4);
    @(negedge clk);
    start = 1'b0;
    while (!fin) begin
      if (req.ar_valid && rsp.ar_ready) begin
        t_ar = cyc;
        checks++;
        if (req.ar.addr != addr_t'(line * LW * 4) || req.ar.len != 8'(LW - 1) ||
            req.ar.burst != AXI_BURST_INCR || req.ar.size != AXI_SIZE_WORD) begin
          failures++; $display("bad AR %p", req.ar);
        end
      end
      if (beat_valid) begin
        checks++;
        if (int'(beat_idx) != beats || beat_data != mem.mem[line * LW + beats]) begin
          failures++; $display("beat %0d idx %0d data %h", beats, beat_idx, beat_data);
        end
        beats++;
        if (done) begin
          fin = 1;
          checks++;
          if (beats != LW) begin failures++; $display("done after %0d beats", beats); end
          if (timed) begin
            checks++;
            if (cyc - t_ar != LAT + LW - 1) begin failures++; $display("burst took %0d", cyc - t_ar); end
          end
        end
      end
      @(negedge clk);
    end
    checks++;
    if (busy) begin failures++; $display("still busy"); end
  endtask

  initial begin
    start = 0; line_addr = 0;
    for (int i = 0; i < 256; i++) mem.mem[i] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    fetch(3, 1);
    fetch(0, 1);
    stall_en = 1'b1;
    for (int n = 0; n < 20; n++) fetch($urandom % 32, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

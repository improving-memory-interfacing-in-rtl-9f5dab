// tb_axi_write_unit: self-checking test of the write master.
// Line bursts (4 words) and single masked words are handed to the unit
// (MAX_OUTSTANDING = 3) in front of a memory model with latency 40. Checks:
// memory contents against a reference; that three writes are in flight
// without responses and a fourth is refused until a response arrives; the
// same-line check (chk_hit) for buffered and answered writes; idle; and the
// same under random back-pressure.
module tb_axi_write_unit;
  import cache_pkg::*;
  localparam int LAT = 40, LW = 4, MO = 3;
  logic clk = 1'b0, rst_n = 1'b0, stall_en = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req_valid, req_ready, chk_hit, idle;
  addr_t req_addr, chk_line_addr;
  logic [7:0] req_len;
  logic [LW-1:0][31:0] req_data;
  logic [LW-1:0][3:0]  req_strb;
  axi_req_t req;
  axi_rsp_t rsp;
  logic [31:0] ref_mem [256];

  axi_write_unit #(.LINE_WORDS(LW), .MAX_OUTSTANDING(MO)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_addr, .req_len, .req_data, .req_strb,
    .chk_line_addr, .chk_hit, .idle,
    .aw_valid(req.aw_valid), .aw(req.aw), .aw_ready(rsp.aw_ready),
    .w_valid(req.w_valid), .w(req.w), .w_ready(rsp.w_ready),
    .b_valid(rsp.b_valid), .b(rsp.b), .b_ready(req.b_ready));
  assign req.ar_valid = 1'b0;
  assign req.ar = '0;
  assign req.r_ready = 1'b0;

  axi_mem_model #(.MEM_WORDS(256), .LATENCY(LAT)) mem (.clk, .rst_n, .stall_en, .req, .rsp);

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 50000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic push_line(input int line);
    req_valid = 1'b1; req_addr = addr_t'(line * LW * 4); req_len = 8'(LW - 1);
    for (int i = 0; i < LW; i++) begin
      logic [31:0] d = $urandom;
      req_data[i] = d; req_strb[i] = 4'hF; ref_mem[line * LW + i] = d;
    end
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 1'b0;
  endtask

  task automatic push_word(input int word);
    logic [31:0] d = $urandom;
    logic [3:0]  s = 4'($urandom);
    req_valid = 1'b1; req_addr = addr_t'(word * 4); req_len = 8'd0;
    req_data = '0; req_strb = '0;
    req_data[0] = d; req_strb[0] = s;
    for (int b = 0; b < 4; b++) if (s[b]) ref_mem[word][8*b +: 8] = d[8*b +: 8];
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 1'b0;
  endtask

  task automatic check_mem();
    int bad = 0;
    for (int i = 0; i < 256; i++) if (mem.mem[i] !== ref_mem[i]) begin
      if (bad < 4) $display("word %0d: %h exp %h", i, mem.mem[i], ref_mem[i]);
      bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("%0d memory words wrong", bad); end
  endtask

  initial begin
    req_valid = 0; req_addr = 0; req_len = 0; req_data = '0; req_strb = '0; chk_line_addr = '0;
    for (int i = 0; i < 256; i++) begin mem.mem[i] = 32'(i); ref_mem[i] = 32'(i); end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // three line write-backs back to back, no response waited for
    push_line(1);
    push_line(5);
    push_line(9);
    repeat (LW + 2) @(negedge clk);
    checks++;
    if (req_ready) begin failures++; $display("fourth write accepted with %0d outstanding", MO); end
    chk_line_addr = addr_t'(5 * LW * 4 + 8); #1;
    checks++; if (!chk_hit) begin failures++; $display("pending line not flagged"); end
    chk_line_addr = addr_t'(6 * LW * 4); #1;
    checks++; if (chk_hit) begin failures++; $display("other line flagged"); end
    checks++; if (idle) begin failures++; $display("idle with writes pending"); end
    push_word(70);   // waits for a response
    while (!idle) @(negedge clk);
    chk_line_addr = addr_t'(5 * LW * 4); #1;
    checks++; if (chk_hit) begin failures++; $display("answered line still flagged"); end
    checks++;
    if (mem.max_outstanding_w != MO) begin failures++; $display("max outstanding %0d", mem.max_outstanding_w); end
    check_mem();

    // random mix with back-pressure
    stall_en = 1'b1;
    for (int n = 0; n < 200; n++) begin
      if ($urandom % 2) push_line($urandom % 64);
      else push_word($urandom % 256);
    end
    while (!idle) @(negedge clk);
    check_mem();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

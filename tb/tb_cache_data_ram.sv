// tb_cache_data_ram: self-checking test of the data store (2 ways x 4 sets x
// 4 words). Random byte-masked writes are mirrored in a reference array and
// every line is read back through the asynchronous whole-line port.
module tb_cache_data_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             rd_way, wr_way, wr_en;
  logic [1:0]       rd_set, wr_set, wr_word;
  logic [3:0][31:0] rd_line;
  logic [31:0]      wr_data;
  logic [3:0]       wr_strb;
  logic [31:0]      ref_mem [2][4][4];

  cache_data_ram #(.N_WAYS(2), .N_SETS(4), .LINE_WORDS(4)) dut (.*);

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 5000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check_all();
    for (int w = 0; w < 2; w++)
      for (int s = 0; s < 4; s++) begin
        rd_way = 1'(w); rd_set = 2'(s); #1;
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (rd_line[i] !== ref_mem[w][s][i]) begin
            failures++;
            $display("way %0d set %0d word %0d: got %h exp %h", w, s, i, rd_line[i], ref_mem[w][s][i]);
          end
        end
      end
  endtask

  initial begin
    wr_en = 0; rd_way = 0; rd_set = 0; wr_way = 0; wr_set = 0; wr_word = 0; wr_data = 0; wr_strb = 0;
    // fill every word fully first
    for (int w = 0; w < 2; w++)
      for (int s = 0; s < 4; s++)
        for (int i = 0; i < 4; i++) begin
          ref_mem[w][s][i] = $urandom;
          wr_en <= 1; wr_way <= 1'(w); wr_set <= 2'(s); wr_word <= 2'(i);
          wr_data <= ref_mem[w][s][i]; wr_strb <= 4'hF;
          @(posedge clk);
        end
    wr_en <= 0; @(posedge clk);
    check_all();
    // random partial writes
    for (int n = 0; n < 200; n++) begin
      int w, s, i;
      logic [31:0] d; logic [3:0] st;
      w = $urandom % 2; s = $urandom % 4; i = $urandom % 4; d = $urandom; st = 4'($urandom);
      for (int b = 0; b < 4; b++) if (st[b]) ref_mem[w][s][i][8*b +: 8] = d[8*b +: 8];
      wr_en <= 1; wr_way <= 1'(w); wr_set <= 2'(s); wr_word <= 2'(i); wr_data <= d; wr_strb <= st;
      @(posedge clk);
    end
    // a disabled write changes nothing
    wr_en <= 0; wr_strb <= 4'hF; wr_data <= 32'hDEAD_BEEF; @(posedge clk); @(posedge clk);
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

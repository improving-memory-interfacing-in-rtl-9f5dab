// tb_cache_tags: self-checking test of the tag store (2 ways, 4 sets).
// Checks misses after reset, hits after a fill, victim choice (invalid way
// first, then round-robin per set), the dirty and clean updates, and that the
// way-addressed read port returns the stored tag.
module tb_cache_tags;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0] lk_set, fill_set, upd_set;
  logic [7:0] lk_tag, fill_tag, rd_tag;
  logic       hit, rd_valid, rd_dirty, fill_en, dirty_en, clean_en;
  logic       hit_way, victim_way, rd_way, fill_way, upd_way;

  cache_tags #(.N_WAYS(2), .N_SETS(4), .TAG_W(8)) dut (.*);

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 1000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic fill(input int set, input int way, input int tag);
    fill_en <= 1'b1; fill_set <= 2'(set); fill_way <= 1'(way); fill_tag <= 8'(tag);
    @(posedge clk);
    fill_en <= 1'b0;
    @(posedge clk);
  endtask

  task automatic look(input int set, input int tag);
    lk_set = 2'(set); lk_tag = 8'(tag);
    #1;
  endtask

  initial begin
    {fill_en, dirty_en, clean_en} = '0;
    {fill_set, upd_set, fill_tag, fill_way, upd_way, rd_way} = '0;
    lk_set = '0; lk_tag = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    look(1, 8'h11);
    expect_eq("hit after reset", hit, 0);
    look(1, 8'h00);
    expect_eq("invalid entry with matching tag misses", hit, 0);
    expect_eq("victim after reset", victim_way, 0);

    fill(1, 0, 8'h11);
    look(1, 8'h11);
    expect_eq("hit after fill", hit, 1);
    expect_eq("hit way", hit_way, 0);
    expect_eq("victim is the invalid way", victim_way, 1);
    look(2, 8'h11);
    expect_eq("other set misses", hit, 0);

    fill(1, 1, 8'h22);
    look(1, 8'h22);
    expect_eq("hit way 1", hit, 1);
    expect_eq("hit way 1 idx", hit_way, 1);
    expect_eq("round-robin victim after way 1", victim_way, 0);
    fill(1, 0, 8'h33);
    look(1, 8'h11);
    expect_eq("replaced tag misses", hit, 0);
    expect_eq("round-robin victim after way 0", victim_way, 1);
    look(1, 8'h33);
    expect_eq("new tag hits", hit, 1);

    // dirty / clean
    rd_way = 1'b0;
    look(1, 8'h33);
    expect_eq("clean after fill", rd_dirty, 0);
    dirty_en <= 1'b1; upd_set <= 2'd1; upd_way <= 1'b0;
    @(posedge clk); dirty_en <= 1'b0; @(posedge clk);
    look(1, 8'h33);
    expect_eq("dirty set", rd_dirty, 1);
    expect_eq("rd valid", rd_valid, 1);
    expect_eq("rd tag", rd_tag, 8'h33);
    rd_way = 1'b1; #1;
    expect_eq("other way not dirty", rd_dirty, 0);
    expect_eq("other way tag", rd_tag, 8'h22);
    clean_en <= 1'b1; upd_set <= 2'd1; upd_way <= 1'b0;
    @(posedge clk); clean_en <= 1'b0; @(posedge clk);
    rd_way = 1'b0; look(1, 8'h33);
    expect_eq("cleaned", rd_dirty, 0);

    // reset invalidates
    rst_n <= 1'b0; @(posedge clk); rst_n <= 1'b1; @(posedge clk);
    look(1, 8'h33);
    expect_eq("invalid after reset", hit, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

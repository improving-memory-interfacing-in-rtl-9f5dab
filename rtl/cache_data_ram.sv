// cache_data_ram: data store of the cache, N_WAYS x N_SETS lines of
// LINE_WORDS 32-bit words.
//
// The read port is asynchronous and returns a whole line (rd_way, rd_set);
// the controller takes one word of it for a read hit and the whole line for a
// write-back burst. The write port writes one word per cycle at the rising
// edge, with one enable bit per byte (wr_strb), which serves both the
// accelerator's partial-word stores and the word-by-word refill from an AXI
// read burst.
//
// The document describes the cache as holding lines of configurable size in a
// configurable number of ways; the array organisation and the asynchronous
// whole-line read port are this design's own choices. The array is not reset:
// a line is only read after it has been filled.
module cache_data_ram #(
  parameter int unsigned N_WAYS     = 1,
  parameter int unsigned N_SETS     = 16,
  parameter int unsigned LINE_WORDS = 16,
  localparam int unsigned WAY_W     = (N_WAYS > 1) ? $clog2(N_WAYS) : 1,
  localparam int unsigned SET_W     = (N_SETS > 1) ? $clog2(N_SETS) : 1,
  localparam int unsigned WORD_W    = (LINE_WORDS > 1) ? $clog2(LINE_WORDS) : 1
) (
  input  logic                            clk,
  input  logic [WAY_W-1:0]                rd_way,
  input  logic [SET_W-1:0]                rd_set,
  output logic [LINE_WORDS-1:0][31:0]     rd_line,
  input  logic                            wr_en,
  input  logic [WAY_W-1:0]                wr_way,
  input  logic [SET_W-1:0]                wr_set,
  input  logic [WORD_W-1:0]               wr_word,
  input  logic [31:0]                     wr_data,
  input  logic [3:0]                      wr_strb
);

  localparam int unsigned DEPTH = N_WAYS * N_SETS * LINE_WORDS;

  logic [3:0][7:0] mem [DEPTH];

  function automatic int unsigned index(input int unsigned way, input int unsigned set,
                                        input int unsigned word);
    return (way * N_SETS + set) * LINE_WORDS + word;
  endfunction

  always_comb begin
    for (int i = 0; i < int'(LINE_WORDS); i++)
      rd_line[i] = mem[index(int'(rd_way), int'(rd_set), i)];
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int b = 0; b < 4; b++)
        if (wr_strb[b]) mem[index(int'(wr_way), int'(wr_set), int'(wr_word))][b] <= wr_data[8*b +: 8];
    end
  end

endmodule

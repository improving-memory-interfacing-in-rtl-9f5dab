// mmult_accel: behavioural model of an HLS-generated accelerator for the
// matrix multiply output = a * b (N x N, 32-bit integers, row-major), for
// testbenches only.
//
// It has three memory channels, one per pointer argument: channel 0 reads a,
// channel 1 reads b, channel 2 writes output. For every output element it
// loads a[i][k] and b[k][j] on channels 0 and 1 in the same cycle, waits for
// both, accumulates, and after the k loop stores the sum on channel 2. When
// all elements are stored it asks the caches to flush and raises done once
// flush_done arrives. It drives and samples its ports on the falling clock
// edge, so every request is seen by the caches at the following rising edge.
// hits counts accesses answered in the cycle after acceptance; cycles is the
// time from start to done. done stays high until start is lowered; the next
// rising start runs the multiply again, with the counters cleared.
module mmult_accel
  import cache_pkg::*;
#(
  parameter int unsigned N      = 10,
  parameter addr_t       A_BASE = 32'h0000_0000,
  parameter addr_t       B_BASE = 32'h0000_1000,
  parameter addr_t       C_BASE = 32'h0000_2000
) (
  input  logic    clk,
  input  logic    start,
  output logic    done,
  output logic    fe_req_valid [3],
  input  logic    fe_req_ready [3],
  output fe_req_t fe_req       [3],
  input  logic    fe_rsp_valid [3],
  input  word_t   fe_rsp_rdata [3],
  output logic    flush_req,
  input  logic    flush_done
);
  int hits = 0, accesses = 0, cycles = 0;
  longint t_start;
  int ccount = 0;
  always @(posedge clk) ccount <= ccount + 1;

  // Issue requests on the enabled channels together; wait for all answers.
  task automatic par_access(input logic [2:0] en, input fe_req_t r [3], output word_t d [3]);
    bit acc [3], fin [3], now [3];
    int t_acc [3];
    for (int c = 0; c < 3; c++) begin
      fe_req[c] = r[c]; fe_req_valid[c] = en[c];
      acc[c] = 1'b0; fin[c] = !en[c]; d[c] = '0;
    end
    while (!(fin[0] && fin[1] && fin[2])) begin
      for (int c = 0; c < 3; c++) begin
        now[c] = fe_req_valid[c] && fe_req_ready[c];
        if (now[c]) t_acc[c] = ccount;
      end
      @(negedge clk);
      for (int c = 0; c < 3; c++) begin
        if (now[c]) begin fe_req_valid[c] = 1'b0; acc[c] = 1'b1; end
        if (acc[c] && !fin[c] && fe_rsp_valid[c]) begin
          d[c] = fe_rsp_rdata[c]; fin[c] = 1'b1; accesses++;
          if (ccount - t_acc[c] == 1) hits++;
        end
      end
    end
  endtask

  initial begin
    for (int c = 0; c < 3; c++) begin fe_req_valid[c] = 1'b0; fe_req[c] = '0; end
    flush_req = 1'b0;
    done = 1'b0;
    @(negedge clk);
    forever begin
      while (!start) @(negedge clk);
      t_start = ccount;
      hits = 0; accesses = 0;
      for (int i = 0; i < int'(N); i++)
        for (int j = 0; j < int'(N); j++) begin
          word_t   sum;
          fe_req_t r [3];
          word_t   d [3];
          sum = '0;
          for (int k = 0; k < int'(N); k++) begin
            r[0] = '{we: 1'b0, addr: A_BASE + addr_t'(4 * (i * N + k)), wdata: '0, wstrb: '0};
            r[1] = '{we: 1'b0, addr: B_BASE + addr_t'(4 * (k * N + j)), wdata: '0, wstrb: '0};
            r[2] = '0;
            par_access(3'b011, r, d);
            sum += d[0] * d[1];
          end
          r[0] = '0; r[1] = '0;
          r[2] = '{we: 1'b1, addr: C_BASE + addr_t'(4 * (i * N + j)), wdata: sum, wstrb: 4'hF};
          par_access(3'b100, r, d);
        end
      flush_req = 1'b1;
      while (!flush_done) @(negedge clk);
      @(negedge clk);
      flush_req = 1'b0;
      cycles = ccount - int'(t_start);
      done = 1'b1;
      while (start) @(negedge clk);
      done = 1'b0;
    end
  end
endmodule

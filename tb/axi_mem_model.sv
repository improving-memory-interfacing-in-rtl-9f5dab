// axi_mem_model: behavioural model of external memory behind an AXI4 slave
// port, for testbenches only.
//
// Word-addressed array of MEM_WORDS 32-bit words (byte address / 4, wrapping).
// Read requests are accepted at once and answered `latency` cycles later with
// one beat per cycle. Write address and data are accepted independently;
// when the last beat of a burst has been written the write response is given
// `latency` cycles later (initially LATENCY; a testbench may change the
// variable between runs). Any number of requests (up to QD) may be waiting, so
// the master can keep several writes outstanding. While stall_en is high, the
// ready signals are dropped at random to exercise the master's handshakes.
// Counters (n_ar, n_aw, n_aw_burst, max_outstanding_w) let a testbench see
// which mechanisms were used.
module axi_mem_model
  import cache_pkg::*;
#(
  parameter int unsigned MEM_WORDS    = 4096,
  parameter int unsigned LATENCY      = 50
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     stall_en,
  input  axi_req_t req,
  output axi_rsp_t rsp
);
  localparam int QD = 32;

  logic [31:0] mem [MEM_WORDS];
  // response delay in cycles; a testbench may change it between runs
  int unsigned latency = LATENCY;

  axi_ax_t rq_ax [QD];
  longint  rq_due[QD];
  int      rq_h, rq_n, rbeat;
  axi_ax_t awq [QD];
  int      aw_h, aw_n, wbeat;
  longint  bq_due[QD];
  int      b_h, b_n;
  longint  cyc;
  logic    st_ar, st_aw, st_w, st_r, st_b;

  int n_ar, n_aw, n_aw_burst, outstanding_w, max_outstanding_w;

  function automatic int widx(input logic [31:0] a, input int beat);
    return int'((a >> 2) + 32'(beat)) % int'(MEM_WORDS);
  endfunction

  always_comb begin
    rsp          = '0;
    rsp.ar_ready = !st_ar && rq_n < QD;
    rsp.aw_ready = !st_aw && aw_n < QD;
    rsp.w_ready  = !st_w && aw_n > 0;
    rsp.r_valid  = !st_r && rq_n > 0 && cyc >= rq_due[rq_h];
    rsp.r.data   = mem[widx(rq_ax[rq_h].addr, rbeat)];
    rsp.r.last   = (rbeat == int'(rq_ax[rq_h].len));
    rsp.r.resp   = AXI_RESP_OKAY;
    rsp.b_valid  = !st_b && b_n > 0 && cyc >= bq_due[b_h];
    rsp.b.resp   = AXI_RESP_OKAY;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rq_h <= 0; rq_n <= 0; rbeat <= 0; aw_h <= 0; aw_n <= 0; wbeat <= 0;
      b_h <= 0; b_n <= 0; cyc <= 0;
      st_ar <= 0; st_aw <= 0; st_w <= 0; st_r <= 0; st_b <= 0;
      n_ar <= 0; n_aw <= 0; n_aw_burst <= 0; outstanding_w <= 0; max_outstanding_w <= 0;
    end else begin
      int rq_n_n, aw_n_n, b_n_n, out_n;
      cyc <= cyc + 1;
      if (stall_en) begin
        st_ar <= ($urandom % 4) == 0; st_aw <= ($urandom % 4) == 0;
        st_w  <= ($urandom % 4) == 0; st_r  <= ($urandom % 4) == 0;
        st_b  <= ($urandom % 4) == 0;
      end else begin
        st_ar <= 0; st_aw <= 0; st_w <= 0; st_r <= 0; st_b <= 0;
      end
      rq_n_n = rq_n; aw_n_n = aw_n; b_n_n = b_n; out_n = outstanding_w;
      // read address
      if (req.ar_valid && rsp.ar_ready) begin
        rq_ax[(rq_h + rq_n) % QD]  <= req.ar;
        rq_due[(rq_h + rq_n) % QD] <= cyc + longint'(latency);
        rq_n_n++;
        n_ar <= n_ar + 1;
      end
      // read data
      if (rsp.r_valid && req.r_ready) begin
        if (rsp.r.last) begin
          rbeat <= 0; rq_h <= (rq_h + 1) % QD; rq_n_n--;
        end else rbeat <= rbeat + 1;
      end
      // write address
      if (req.aw_valid && rsp.aw_ready) begin
        awq[(aw_h + aw_n) % QD] <= req.aw;
        aw_n_n++;
        out_n++;
        n_aw <= n_aw + 1;
        if (req.aw.len != 0) n_aw_burst <= n_aw_burst + 1;
      end
      // write data
      if (req.w_valid && rsp.w_ready) begin
        for (int b = 0; b < 4; b++)
          if (req.w.strb[b]) mem[widx(awq[aw_h].addr, wbeat)][8*b +: 8] <= req.w.data[8*b +: 8];
        if (wbeat == int'(awq[aw_h].len)) begin
          wbeat <= 0; aw_h <= (aw_h + 1) % QD; aw_n_n--;
          bq_due[(b_h + b_n) % QD] <= cyc + longint'(latency);
          b_n_n++;
        end else wbeat <= wbeat + 1;
      end
      // write response
      if (rsp.b_valid && req.b_ready) begin
        b_h <= (b_h + 1) % QD; b_n_n--; out_n--;
      end
      rq_n <= rq_n_n; aw_n <= aw_n_n; b_n <= b_n_n; outstanding_w <= out_n;
      if (out_n > max_outstanding_w) max_outstanding_w <= out_n;
    end
  end

endmodule

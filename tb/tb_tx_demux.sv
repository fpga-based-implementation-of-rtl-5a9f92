// tb_tx_demux: four ports get random jobs, frames of 1..64 bytes from the
// Memory Pool or the Trigger Message buffer, while their Transmission
// Buffer Units are randomly not ready. Memory and buffer are models whose
// registered read data is a fixed function of the address. Each word
// delivered to a port must be the next word of that port's job, with the
// right first/last flags, byte count and frame length; done must pulse
// once per job. A last phase checks the rate: with every buffer ready a
// 64-byte frame (16 words) takes one wheel turn, four cycles, per word, plus up to five cycles to
// reach its slot and register the word.
module tb_tx_demux;
  import ftt_pkg::*;
  localparam int N = 4, WPB = 16, NB = 8, TMW = 16;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #4 clk = ~clk;
  logic start [N], start_tm [N], busy [N], done [N], txb_ready [N], w_valid [N];
  logic [BLK_W-1:0] start_blk [N];
  logic [LEN_W-1:0] start_len [N], w_len;
  logic mem_re, tm_re, w_first, w_last;
  logic [6:0] mem_raddr;
  logic [3:0] tm_raddr;
  logic [31:0] mem_rdata = 0, tm_rdata = 0, w_data;
  logic [2:0] w_nbytes;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  tx_demux #(.NPORTS(N), .WPB(WPB), .NBLOCKS(NB), .TM_WORDS(TMW)) dut (.clk, .rst_n, .start, .start_tm,
    .start_blk, .start_len, .busy, .done, .mem_re, .mem_raddr, .mem_rdata, .tm_re, .tm_raddr, .tm_rdata,
    .txb_ready, .w_valid, .w_data, .w_first, .w_last, .w_nbytes, .w_len);

  function automatic logic [31:0] mem_f(int a); return 32'(a) * 32'h9E3779B1 ^ 32'h0000_1234; endfunction
  function automatic logic [31:0] tm_f(int a);  return 32'(a) * 32'h7F4A7C15 + 32'h5555_0000; endfunction
  always @(posedge clk) begin
    if (mem_re) mem_rdata <= mem_f(int'(mem_raddr));
    if (tm_re)  tm_rdata  <= tm_f(int'(tm_raddr));
  end

  typedef struct { bit tm; int blk; int len; int k; } job_t;
  job_t job [N][$];
  int n_jobs = 0, n_done = 0, n_words = 0;
  always @(posedge clk) if (rst_n) begin
    int nv; nv = 0;
    for (int p = 0; p < N; p++) begin
      if (w_valid[p]) begin
        nv++;
        if (job[p].size() == 0) check(0, "word without a job");
        else begin
          job_t j; int nw, k;
          j = job[p][0]; k = j.k; nw = (j.len + N - 1) / N;
          check(w_data == (j.tm ? tm_f(k) : mem_f(j.blk * WPB + k)), $sformatf("port %0d word %0d data", p, k));
          check(w_first == (k == 0) && w_last == (k == nw - 1) && int'(w_len) == j.len, "word flags");
          check(int'(w_nbytes) == ((k == nw - 1) ? j.len - (nw - 1) * N : N), "bytes in word");
          job[p][0].k++;
          n_words++;
        end
      end
      if (done[p]) begin
        check(job[p].size() != 0 && job[p][0].k == (job[p][0].len + N - 1) / N, "done after the last word");
        if (job[p].size() != 0) void'(job[p].pop_front());
        n_done++;
      end
      if (start[p] && !busy[p]) begin
        job[p].push_back('{tm: start_tm[p], blk: int'(start_blk[p]), len: int'(start_len[p]), k: 0});
        n_jobs++;
      end
    end
    check(nv <= 1, "one word per cycle");
  end
  int rate_t0 = -1, rate_t1 = -1, cyc = 0;
  always @(posedge clk) begin cyc++; if (done[0] && rate_t0 >= 0 && rate_t1 < 0) rate_t1 = cyc; end

  initial begin
    for (int p = 0; p < N; p++) begin start[p] = 0; start_tm[p] = 0; start_blk[p] = 0; start_len[p] = 0; txb_ready[p] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int p = 0; p < N; p++) begin
        txb_ready[p] = ($urandom % 4) != 0;
        start[p] = !busy[p] && !start[p] && ($urandom % 6 == 0);
        start_tm[p] = ($urandom % 4) == 0;
        start_blk[p] = BLK_W'($urandom % NB);
        start_len[p] = LEN_W'(1 + $urandom % (start_tm[p] ? TMW * N : WPB * N));
      end
    end
    for (int p = 0; p < N; p++) start[p] = 0;
    for (int p = 0; p < N; p++) txb_ready[p] = 1;
    repeat (200) @(negedge clk);
    check(n_jobs > 100 && n_done == n_jobs, $sformatf("every job done (%0d of %0d)", n_done, n_jobs));
    // rate
    start[0] = 1; start_tm[0] = 0; start_blk[0] = 3; start_len[0] = 64;
    rate_t0 = cyc;
    @(negedge clk); start[0] = 0;
    repeat (100) @(negedge clk);
    check(rate_t1 > 0 && rate_t1 - rate_t0 >= 15 * N && rate_t1 - rate_t0 <= 16 * N + N + 1, $sformatf("64-byte frame in %0d cycles", rate_t1 - rate_t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

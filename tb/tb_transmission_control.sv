// tb_transmission_control: two ports, a 1000-cycle Elementary Cycle with the
// synchronous window up to 300 and the asynchronous window up to 650. Each
// cycle fills the class queues with frames of random length; a small model
// of the TX Demultiplexing Unit answers each start with busy and a done
// pulse. Checked for every start: the Trigger Message goes first and to
// every port, even a busy one once it is free; each class only in its
// window; an asynchronous or NRT frame only if its wire time ends inside
// its window; no start before the previous frame's wire time has passed;
// the queue head is the frame started; a memory frame is released on done
// and a Trigger Message is not.
module tb_transmission_control;
  import ftt_pkg::*;
  localparam int N = 2, TW = 11, EC = 1000, SE = 300, AE = 650;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #4 clk = ~clk;
  logic [TW-1:0] ec_time = 0;
  logic tm_go = 0;
  logic pl_empty [N][3], pl_pop [N][3];
  pkt_ptr_t pl_head [N][3];
  logic start [N], start_tm [N], busy [N], done [N], rel_valid [N];
  logic [BLK_W-1:0] start_blk [N], rel_blk [N];
  logic [LEN_W-1:0] start_len [N];
  logic [N-1:0] ev_tm, ev_sync, ev_async, ev_nrt, ev_hold;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  transmission_control #(.NPORTS(N), .TW(TW)) dut (.clk, .rst_n, .ec_time, .ec_len(TW'(EC)),
    .sync_end(TW'(SE)), .async_end(TW'(AE)), .tm_go, .tm_len(LEN_W'(60)), .pl_empty, .pl_head, .pl_pop,
    .start, .start_tm, .start_blk, .start_len, .busy, .done, .rel_valid, .rel_blk,
    .ev_tm, .ev_sync, .ev_async, .ev_nrt, .ev_hold);

  pkt_ptr_t q [N][3][$];
  int next_free [N];        // first cycle a new start is allowed
  int bcnt [N];             // demux model: cycles of busy left
  bit bmem [N];
  int bblk [N];
  bit tm_owed [N];
  int cyc = 0, n_tm = 0, n_cls [3], n_hold = 0, n_rel = 0, nblk = 0;

  always_comb
    for (int p = 0; p < N; p++)
      for (int c = 0; c < 3; c++) begin
        pl_empty[p][c] = q[p][c].size() == 0;
        pl_head[p][c]  = pl_empty[p][c] ? '0 : q[p][c][0];
      end

  always @(posedge clk) if (rst_n) begin
    int t; t = int'(ec_time);
    cyc++;
    for (int p = 0; p < N; p++) begin
      if (tm_go) tm_owed[p] = 1;
      // release check
      if (done[p]) begin
        check(rel_valid[p] == bmem[p], "release only for memory frames");
        if (bmem[p]) begin check(int'(rel_blk[p]) == bblk[p], "released block"); n_rel++; end
      end else check(!rel_valid[p], "release only on done");
      if (ev_hold[p]) n_hold++;
      if (start[p]) begin
        int npop; npop = 0;
        check(cyc >= next_free[p] && !busy[p], $sformatf("port %0d started while the previous frame is on the wire", p));
        if (start_tm[p]) begin
          check(tm_owed[p], "Trigger Message only when one is due");
          check(int'(start_len[p]) == 60, "Trigger Message length");
          tm_owed[p] = 0; n_tm++;
        end else begin
          int c; c = -1;
          check(!tm_owed[p], "Trigger Message goes before any frame");
          for (int k = 0; k < 3; k++) if (pl_pop[p][k]) begin c = k; npop++; end
          check(npop == 1, "one queue popped per start");
          if (c >= 0) begin
            check(start_blk[p] == q[p][c][0].blk && start_len[p] == q[p][c][0].len, "queue head started");
            if (c == CL_SYNC) check(t < SE, $sformatf("sync frame at %0d", t));
            if (c == CL_ASYNC) check(t >= SE && t + wire_time(start_len[p]) <= AE, $sformatf("async frame at %0d len %0d", t, start_len[p]));
            if (c == CL_NRT) check(t >= AE && t + wire_time(start_len[p]) <= EC, $sformatf("NRT frame at %0d len %0d", t, start_len[p]));
            if (c == CL_ASYNC) check(q[p][CL_SYNC].size() == 0 || t >= SE, "sync before async");
            void'(q[p][c].pop_front());
            n_cls[c]++;
          end
        end
        next_free[p] = cyc + int'(wire_time(start_len[p]));
        bcnt[p] = 3; bmem[p] = !start_tm[p]; bblk[p] = int'(start_blk[p]);
      end else
        for (int k = 0; k < 3; k++) check(!pl_pop[p][k], "no pop without a start");
    end
  end

  // time base, Trigger Message request, demux model, traffic
  always @(negedge clk) if (rst_n) begin
    ec_time <= (int'(ec_time) == EC - 1) ? '0 : ec_time + 1'b1;
    tm_go <= (int'(ec_time) == 2);
    for (int p = 0; p < N; p++) begin
      done[p] <= (bcnt[p] == 1);
      busy[p] <= (bcnt[p] > 1);
      if (bcnt[p] > 0) bcnt[p]--;
    end
    if (int'(ec_time) == EC - 1) begin
      for (int p = 0; p < N; p++) begin
        for (int i = 0; i < 2; i++) begin q[p][CL_SYNC].push_back('{blk: BLK_W'(nblk), len: LEN_W'(40 + $urandom % 60)}); nblk++; end
        for (int i = 0; i < 3; i++) begin q[p][CL_ASYNC].push_back('{blk: BLK_W'(nblk), len: LEN_W'(40 + $urandom % 110)}); nblk++; end
        for (int i = 0; i < 3; i++) begin q[p][CL_NRT].push_back('{blk: BLK_W'(nblk), len: LEN_W'(60 + $urandom % 200)}); nblk++; end
      end
    end
  end

  initial begin
    for (int p = 0; p < N; p++) begin next_free[p] = 0; bcnt[p] = 0; tm_owed[p] = 0; busy[p] = 0; done[p] = 0; end
    for (int c = 0; c < 3; c++) n_cls[c] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (EC * 12) @(negedge clk);
    check(n_tm == 12 * N, $sformatf("one Trigger Message per port and cycle (%0d)", n_tm));
    check(n_cls[CL_SYNC] > 0 && n_cls[CL_ASYNC] > 0 && n_cls[CL_NRT] > 0, $sformatf("every class sent (%0d %0d %0d)", n_cls[0], n_cls[1], n_cls[2]));
    check(n_hold > 0, "some frames held back for lack of time");
    check(n_rel == n_cls[0] + n_cls[1] + n_cls[2] || n_rel + N >= n_cls[0] + n_cls[1] + n_cls[2], "every memory frame released");
    $display("sent sync %0d async %0d nrt %0d tm %0d held %0d", n_cls[0], n_cls[1], n_cls[2], n_tm, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_switching_control: the Switching & Control Logic with four ports and a
// 2000-cycle Elementary Cycle (synchronous window to 600, asynchronous to
// 1200). Port models take blocks from the allocator and offer descriptors;
// a master model answers every cycle request with tm_go; a demultiplexer
// model answers starts with busy and done. Checks:
//  - every port sends the Trigger Message first in every cycle;
//  - a synchronous frame from port 0 with mask 0110 goes to ports 1 and 2
//    only, inside the synchronous window of that cycle;
//  - an NRT frame to an unknown address floods to ports 1..3 (ev_flood),
//    and a reply from port 2 to the learned address goes to port 0 only;
//  - an asynchronous frame goes out in the asynchronous window;
//  - once everything is sent all blocks except the ports' own are free.
module tb_switching_control;
  import ftt_pkg::*;
  localparam int N = 4, EC = 2000, NB = 20;
  localparam int TW = $clog2(EC + 1);
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #4 clk = ~clk;
  logic enable = 0, ec_start, ec_req, tm_go = 0;
  logic [TW-1:0] ec_time;
  logic [15:0] ec_num;
  logic alloc_req [N], alloc_gnt [N], desc_valid [N], desc_ready [N];
  logic [BLK_W-1:0] alloc_blk, start_blk [N];
  rx_desc_t desc [N];
  logic start [N], start_tm [N], busy [N], done [N];
  logic [LEN_W-1:0] start_len [N];
  logic [BLK_W:0] free_count;
  logic ev_flood, ev_quota_drop;
  logic [N-1:0] ev_tm, ev_sync, ev_async, ev_nrt, ev_hold;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  switching_control #(.NPORTS(N), .EC_CYCLES(EC), .NBLOCKS(NB), .SYNC_Q(4), .ASYNC_Q(4), .NRT_Q(4),
    .QDEPTH(8), .FT_ENTRIES(8)) dut (.clk, .rst_n, .enable, .sync_end(TW'(600)), .async_end(TW'(1200)),
    .ec_start, .ec_time, .ec_num, .ec_req, .tm_go, .tm_len(LEN_W'(60)), .alloc_req, .alloc_gnt, .alloc_blk,
    .desc_valid, .desc, .desc_ready, .start, .start_tm, .start_blk, .start_len, .busy, .done,
    .free_count, .ev_flood, .ev_quota_drop, .ev_tm, .ev_sync, .ev_async, .ev_nrt, .ev_hold);

  // master model
  always @(posedge clk) tm_go <= ec_req;

  // demultiplexer model: busy for 5 cycles, then done
  int bcnt [N];
  always @(negedge clk) for (int p = 0; p < N; p++) begin
    done[p] <= (bcnt[p] == 1);
    busy[p] <= (bcnt[p] > 1);
    if (bcnt[p] > 0) bcnt[p]--;
  end

  // what each port sent in each cycle
  typedef struct { int ec; int t; bit tm; int blk; int len; } tx_t;
  tx_t sent [N][$];
  int n_flood = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_flood) n_flood++;
    for (int p = 0; p < N; p++) if (start[p] && !busy[p]) begin
      sent[p].push_back('{int'(ec_num), int'(ec_time), start_tm[p], int'(start_blk[p]), int'(start_len[p])});
      bcnt[p] = 6;
    end
  end

  task automatic get_block(int p, output int blk);
    @(negedge clk); alloc_req[p] = 1;
    do @(posedge clk); while (!alloc_gnt[p]);
    blk = int'(alloc_blk);
    @(negedge clk); alloc_req[p] = 0;
  endtask
  task automatic offer(int p, rx_desc_t d);
    @(negedge clk); desc_valid[p] = 1; desc[p] = d;
    do @(posedge clk); while (!desc_ready[p]);
    @(negedge clk); desc_valid[p] = 0;
  endtask
  function automatic int find(int p, int blk, output tx_t x);
    int n = 0;
    foreach (sent[p][i]) if (!sent[p][i].tm && sent[p][i].blk == blk) begin n++; x = sent[p][i]; end
    return n;
  endfunction

  logic [47:0] sta0 = 48'h0200_0000_0A00, sta2 = 48'h0200_0000_0A02;
  initial begin
    int b_sync, b_nrt, b_rep, b_async, n; tx_t x; rx_desc_t d;
    for (int p = 0; p < N; p++) begin alloc_req[p] = 0; desc_valid[p] = 0; desc[p] = '0; bcnt[p] = 0; busy[p] = 0; done[p] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); enable = 1;
    get_block(0, b_sync); get_block(0, b_nrt); get_block(2, b_rep); get_block(1, b_async);
    // in cycle 0, before the synchronous window closes
    d = '{cls: CL_SYNC, blk: BLK_W'(b_sync), len: LEN_W'(100), by_mac: 1'b0, out_mask: 8'b0110, dst: 48'h0100_5E00_0001, src: sta0};
    offer(0, d);
    d = '{cls: CL_NRT, blk: BLK_W'(b_nrt), len: LEN_W'(200), by_mac: 1'b1, out_mask: 8'h0, dst: 48'h0200_0000_0BBB, src: sta0};
    offer(0, d);
    d = '{cls: CL_NRT, blk: BLK_W'(b_rep), len: LEN_W'(80), by_mac: 1'b1, out_mask: 8'h0, dst: sta0, src: sta2};
    offer(2, d);
    d = '{cls: CL_ASYNC, blk: BLK_W'(b_async), len: LEN_W'(120), by_mac: 1'b0, out_mask: 8'b1001, dst: 48'h0100_5E00_0002, src: 48'h0200_0000_0A01};
    offer(1, d);
    repeat (3 * EC) @(negedge clk);
    for (int p = 0; p < N; p++) begin
      check(sent[p].size() >= 3 && sent[p][0].tm && sent[p][0].t < 5, $sformatf("port %0d starts with the Trigger Message", p));
      foreach (sent[p][i]) if (sent[p][i].tm) check(sent[p][i].t < 5, "Trigger Message at the cycle start");
    end
    for (int p = 0; p < N; p++) begin
      n = find(p, b_sync, x);
      check(n == ((p == 1 || p == 2) ? 1 : 0), $sformatf("synchronous frame on port %0d: %0d", p, n));
      if (n == 1) check(x.ec == 0 && x.t < 600, "synchronous frame in its window");
      n = find(p, b_nrt, x);
      check(n == ((p != 0) ? 1 : 0), $sformatf("flooded frame on port %0d: %0d", p, n));
      if (n == 1) check(x.t >= 1200, "NRT frame in the NRT window");
      n = find(p, b_rep, x);
      check(n == ((p == 0) ? 1 : 0), $sformatf("reply on port %0d: %0d", p, n));
      n = find(p, b_async, x);
      check(n == ((p == 0 || p == 3) ? 1 : 0), $sformatf("asynchronous frame on port %0d: %0d", p, n));
      if (n == 1) check(x.t >= 600 && x.t + int'(wire_time(120)) <= 1200, "asynchronous frame in its window");
    end
    check(n_flood == 1, "one flood");
    check(int'(free_count) == NB, $sformatf("all blocks free again (%0d)", free_count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_ftt_switch_nrt_load: traffic-confinement workload at full size.
//
// The switch runs with every parameter at its default (4 ports, 1 ms EC of
// 125000 cycles); windows: synchronous [0,30000), asynchronous
// [30000,60000), NRT from 60000 to the end of the EC. Station B on port 1
// first sends one frame so that its address is learned. Then station A on
// port 0 sends NRT frames of 1014 bytes (1000 bytes of payload plus the
// 14-byte header) to B, one every 3460 byte times on average (random
// spacing of +/-400), i.e. about 30% of a 1 Gb/s link, for three ECs.
// The frames arrive all over the EC but must leave port 1 only inside the
// NRT window, ending before the EC ends, in order and unchanged, and
// nowhere else. No frame may be lost: the backlog that builds up outside
// the NRT window (about 17 frames) stays inside the NRT memory quota.
// The testbench counts how many frames arrived outside the NRT window and
// checks that there were some, so the confinement was really exercised.
module tb_ftt_switch_nrt_load;
  import ftt_pkg::*;
  localparam int N = 4;
  localparam int EC = 125000;
  localparam int SYNC_END = 30000;
  localparam int ASYNC_END = 60000;
  localparam int TW = $clog2(EC + 1);
  localparam int LEN = 1014;
  localparam int PERIOD = 3460;

  typedef byte unsigned bq_t[$];

  logic clk = 0, rxclk = 0, txclk = 0, rst_n = 1, enable = 0;
  initial #1 rst_n = 0;
  always #4 clk = ~clk;
  initial begin #3; forever #4 rxclk = ~rxclk; end
  initial begin #5; forever #4 txclk = ~txclk; end

  logic       mac_rx_clk [N], mac_tx_clk [N];
  logic [7:0] mac_rx_data [N];
  logic       mac_rx_data_valid [N], mac_rx_good_frame [N], mac_rx_bad_frame [N];
  logic [7:0] mac_tx_data [N];
  logic       mac_tx_data_valid [N], mac_tx_ack [N], mac_tx_underrun [N];
  logic [1:0] host_opcode [N];
  logic [9:0] host_addr [N];
  logic [31:0] host_wr_data [N];
  logic       host_miim_sel [N], host_req [N], cfg_done [N];
  logic       tm_in_valid = 0, tm_in_last = 0;
  logic [7:0] tm_in_data = 0;
  logic       rq_valid, rq_last, ec_req;
  logic [7:0] rq_data;
  logic [PORT_W-1:0] rq_port;
  logic [15:0] ec_num;
  logic [BLK_W:0] free_blocks;
  logic [N-1:0] ev_trash, ev_drop, ev_rx_overflow, ev_tm, ev_sync, ev_async, ev_nrt, ev_hold;
  logic ev_flood, ev_quota_drop, ev_tm_missing, ev_req_drop;

  always_comb for (int p = 0; p < N; p++) begin mac_rx_clk[p] = rxclk; mac_tx_clk[p] = txclk; end

  ftt_switch dut (
    .clk, .rst_n, .enable, .cfg_sync_end(TW'(SYNC_END)), .cfg_async_end(TW'(ASYNC_END)),
    .mac_rx_clk, .mac_rx_data, .mac_rx_data_valid, .mac_rx_good_frame, .mac_rx_bad_frame,
    .mac_tx_clk, .mac_tx_data, .mac_tx_data_valid, .mac_tx_ack, .mac_tx_underrun,
    .host_opcode, .host_addr, .host_wr_data, .host_miim_sel, .host_req, .cfg_done,
    .tm_in_valid, .tm_in_data, .tm_in_last, .rq_valid, .rq_data, .rq_last, .rq_port,
    .rq_ready(1'b1), .ec_req, .ec_num, .free_blocks,
    .ev_trash, .ev_drop, .ev_rx_overflow, .ev_flood, .ev_quota_drop, .ev_tm, .ev_sync,
    .ev_async, .ev_nrt, .ev_hold, .ev_tm_missing, .ev_req_drop);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  function automatic int unsigned sig(bq_t f);
    int unsigned h = 32'h811C9DC5;
    foreach (f[i]) h = (h ^ f[i]) * 32'h01000193;
    return h ^ f.size();
  endfunction
  function automatic bq_t mac_bytes(bq_t f, logic [47:0] m);
    for (int i = 5; i >= 0; i--) f.push_back(m[8*i +: 8]);
    return f;
  endfunction
  function automatic bq_t mk_nrt(logic [47:0] dst, logic [47:0] src, int len, int seq);
    bq_t f = {};
    f = mac_bytes(f, dst);
    f = mac_bytes(f, src);
    f.push_back(8'h08); f.push_back(8'h00);
    f.push_back(8'(seq >> 8)); f.push_back(8'(seq));
    while (f.size() < len) f.push_back(8'(seq * 13 + f.size()));
    return f;
  endfunction
  localparam logic [47:0] STA_A = 48'h0200_0000_00A0, STA_B = 48'h0200_0000_00B1;

  // EC time as seen by the testbench
  int ec_seen = 0, ec_t = 0;
  always @(posedge clk) begin
    if (ec_req) begin ec_seen <= ec_seen + 1; ec_t <= 1; end
    else ec_t <= ec_t + 1;
  end

  // Master Unit model: an empty schedule every EC
  bq_t tm_frame;
  initial begin
    tm_frame = {};
    tm_frame = mac_bytes(tm_frame, 48'hFFFF_FFFF_FFFF);
    tm_frame = mac_bytes(tm_frame, 48'h0200_0000_00FE);
    tm_frame.push_back(8'h8F); tm_frame.push_back(8'hF0);
    tm_frame.push_back(FT_TM); tm_frame.push_back(8'd0);
    while (tm_frame.size() < 60) tm_frame.push_back(8'h00);
    forever begin
      do @(posedge clk); while (!ec_req);
      repeat (50) @(posedge clk);
      foreach (tm_frame[i]) begin
        tm_in_valid <= 1'b1; tm_in_data <= tm_frame[i]; tm_in_last <= (i == tm_frame.size() - 1);
        @(posedge clk);
      end
      tm_in_valid <= 1'b0; tm_in_last <= 1'b0;
    end
  end

  // receive side of the MACs
  task automatic send(int p, bq_t f);
    foreach (f[i]) begin
      @(posedge rxclk); mac_rx_data[p] <= f[i]; mac_rx_data_valid[p] <= 1'b1;
    end
    @(posedge rxclk); mac_rx_data_valid[p] <= 1'b0;
    @(posedge rxclk); mac_rx_good_frame[p] <= 1'b1;
    @(posedge rxclk); mac_rx_good_frame[p] <= 1'b0;
  endtask

  // transmit side of the MACs
  int unsigned exp_q [$];
  int tm_off [N];
  int n_out = 0, n_tm = 0, n_stray = 0, n_hello = 0;
  task automatic frame_done(int p, bq_t f, int start);
    int t_lo = start - tm_off[p] - 2;
    int t_hi = start - tm_off[p] + 4;
    if (f.size() >= 16 && f[12] == 8'h8F && f[13] == 8'hF0 && f[14] == FT_TM) begin
      if (tm_off[p] < 0) tm_off[p] = start;
      check(start == tm_off[p], "TM at a fixed offset in the EC");
      n_tm++;
      return;
    end
    if (f.size() == 64 && p != 1) begin n_hello++; return; end
    if (p != 1 || f.size() != LEN) begin n_stray++; check(0, $sformatf("frame of %0d bytes on port %0d", f.size(), p)); return; end
    check(t_hi >= ASYNC_END && t_lo + LEN + 24 <= EC, $sformatf("NRT frame inside the NRT window (start %0d)", t_lo));
    check(exp_q.size() != 0 && sig(f) == exp_q[0], $sformatf("frame %0d in order and unchanged", n_out));
    if (exp_q.size() != 0) void'(exp_q.pop_front());
    n_out++;
  endtask

  for (genvar gp = 0; gp < N; gp++) begin : g_mac_tx
    int   st = 0, k = 0, start = 0;
    bq_t  buf_q;
    initial begin mac_tx_ack[gp] = 1'b0; tm_off[gp] = -1; end
    always @(posedge txclk) begin
      if (mac_tx_underrun[gp]) check(1'b0, "no transmit underrun");
      case (st)
        0: if (mac_tx_data_valid[gp]) begin st = 1; k = 0; start = ec_t; buf_q = {}; end
        1: begin k++; if (k == 2) begin mac_tx_ack[gp] <= 1'b1; st = 2; end end
        2: begin mac_tx_ack[gp] <= 1'b0; buf_q.push_back(mac_tx_data[gp]); st = 3; end
        default: begin
          if (mac_tx_data_valid[gp]) buf_q.push_back(mac_tx_data[gp]);
          else begin frame_done(gp, buf_q, start); st = 0; end
        end
      endcase
    end
  end

  int n_drop = 0;
  always @(posedge clk) begin
    n_drop += $countones(ev_drop) + int'(ev_quota_drop) + $countones(ev_rx_overflow) + $countones(ev_trash);
    check(!ev_tm_missing || ec_seen == 1, "a TM for every EC after the first");
  end

  int n_in = 0, n_outside = 0;
  initial begin
    bq_t f;
    for (int p = 0; p < N; p++) begin
      mac_rx_data[p] = '0; mac_rx_data_valid[p] = 0; mac_rx_good_frame[p] = 0; mac_rx_bad_frame[p] = 0;
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (cfg_done[0] && cfg_done[1] && cfg_done[2] && cfg_done[3]);
    @(posedge clk); enable <= 1'b1;
    // station B introduces itself (flooded, goes out in the NRT window)
    wait (ec_seen == 2);
    send(1, mk_nrt(48'hFFFF_FFFF_FFFF, STA_B, 64, 0));
    wait (ec_seen == 3);
    // three ECs of 30% load from A to B
    while (ec_seen < 6) begin
      int gap;
      f = mk_nrt(STA_B, STA_A, LEN, n_in + 1);
      exp_q.push_back(sig(f));
      if (ec_t < ASYNC_END) n_outside++;
      send(0, f);
      n_in++;
      gap = PERIOD - (LEN + 2) - 400 + int'($urandom % 801);
      repeat (gap) @(posedge rxclk);
    end
    wait (ec_seen == 7 && ec_t > 100);
    check(n_in > 100, $sformatf("about 108 frames offered (%0d)", n_in));
    check(n_outside > 40, $sformatf("frames arriving outside the NRT window (%0d)", n_outside));
    check(n_out == n_in && exp_q.size() == 0, $sformatf("every frame delivered (%0d of %0d)", n_out, n_in));
    check(n_drop == 0, "no frame dropped");
    check(n_stray == 0, "no frame on another port");
    check(n_hello == 3, "B's first frame flooded to the three other ports");
    check(n_tm >= 5 * N, "TM broadcast in every EC");
    check(free_blocks == (BLK_W+1)'(72 - N), "all memory blocks free again");
    $display("offered %0d frames (%0d outside the NRT window), delivered %0d", n_in, n_outside, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (8 * EC + 20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

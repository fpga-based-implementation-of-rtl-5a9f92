// tb_ftt_switch: end-to-end test of the FTT switch at its default sizes
// (4 ports, 1 ms Elementary Cycle of 125000 cycles).
//
// The testbench plays the Ethernet MACs of the four ports (receive side:
// byte stream then good/bad status; transmit side: ack two cycles after
// data valid) and the FTT Master Unit (on every EC request it returns the
// Trigger Message for the next EC, except for EC 5). The TM schedules
// synchronous message 5 from port 0 to ports 1 and 2, and asynchronous
// message 7 from port 1 to port 3 with a minimum inter-arrival of 2 ECs.
// Windows: synchronous [0,30000), asynchronous [30000,60000), NRT after.
// Over seven ECs it sends scheduled, unscheduled and repeated synchronous
// frames, asynchronous frames too early and on time, NRT frames to
// unknown and learned addresses, a bad frame, an FTT request, an NRT frame
// too late to fit in its window and a burst that exceeds the NRT memory
// quota. Every frame leaving a port is checked against the expected frames
// for that port (by length and content hash), and its start time against
// its class's window: the TM must start at the same offset in every EC,
// asynchronous and NRT frames must end inside their windows. Each
// mechanism (TM broadcast, missing TM, validation trash, forwarding by
// schedule, flooding, learning, time-left hold, quota drop, request
// relay) is counted and must occur.
module tb_ftt_switch;
  import ftt_pkg::*;
  localparam int N = 4;
  localparam int EC = 125000;
  localparam int SYNC_END = 30000;
  localparam int ASYNC_END = 60000;
  localparam int TW = $clog2(EC + 1);
  localparam int SKIP_EC = 5;

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

  // ---------------- frames ----------------
  function automatic int unsigned sig(bq_t f);
    int unsigned h = 32'h811C9DC5;
    foreach (f[i]) h = (h ^ f[i]) * 32'h01000193;
    return h ^ f.size();
  endfunction

  function automatic bq_t mac_bytes(bq_t f, logic [47:0] m);
    for (int i = 5; i >= 0; i--) f.push_back(m[8*i +: 8]);
    return f;
  endfunction

  function automatic bq_t mk_ftt(byte unsigned ftype, byte unsigned id, int len, int seq);
    bq_t f = {};
    f = mac_bytes(f, 48'hFFFF_FFFF_FFFF);
    f = mac_bytes(f, 48'h0200_0000_0000 | 48'(seq));
    f.push_back(8'h8F); f.push_back(8'hF0); f.push_back(ftype); f.push_back(id);
    while (f.size() < len) f.push_back(8'(seq * 7 + f.size()));
    return f;
  endfunction

  function automatic bq_t mk_nrt(logic [47:0] dst, logic [47:0] src, int len, int seq);
    bq_t f = {};
    f = mac_bytes(f, dst);
    f = mac_bytes(f, src);
    f.push_back(8'h08); f.push_back(8'h00);
    while (f.size() < len) f.push_back(8'(seq * 13 + f.size()));
    return f;
  endfunction

  localparam logic [47:0] MAC_A0 = 48'h0200_0000_00A0, MAC_A2 = 48'h0200_0000_00A2,
                          MAC_A3 = 48'h0200_0000_00A3, MAC_UNK = 48'h0200_0000_000B;

  int unsigned exp_q [N][$];
  int unsigned opt_q [$];
  task automatic expect_on(bq_t f, logic [N-1:0] ports);
    for (int p = 0; p < N; p++) if (ports[p]) exp_q[p].push_back(sig(f));
  endtask

  // receive side of the MACs (all ports share one receive clock)
  task automatic send(int p, bq_t f, bit good = 1);
    foreach (f[i]) begin
      @(posedge rxclk); mac_rx_data[p] <= f[i]; mac_rx_data_valid[p] <= 1'b1;
    end
    @(posedge rxclk); mac_rx_data_valid[p] <= 1'b0;
    @(posedge rxclk); mac_rx_good_frame[p] <= good; mac_rx_bad_frame[p] <= !good;
    @(posedge rxclk); mac_rx_good_frame[p] <= 1'b0; mac_rx_bad_frame[p] <= 1'b0;
    repeat (20) @(posedge rxclk);
  endtask

  // ---------------- Master Unit model ----------------
  bq_t tm_frame;
  int  tm_sent = 0;
  initial begin
    tm_frame = {};
    tm_frame = mac_bytes(tm_frame, 48'hFFFF_FFFF_FFFF);
    tm_frame = mac_bytes(tm_frame, 48'h0200_0000_00FE);
    tm_frame.push_back(8'h8F); tm_frame.push_back(8'hF0);
    tm_frame.push_back(FT_TM); tm_frame.push_back(8'd2);
    // sync id 5, from port 0, to ports 1 and 2
    tm_frame.push_back(8'd5); tm_frame.push_back(8'h00); tm_frame.push_back(8'h06); tm_frame.push_back(8'd0);
    // async id 7, from port 1, to port 3, min inter-arrival 2 ECs
    tm_frame.push_back(8'd7); tm_frame.push_back(8'h81); tm_frame.push_back(8'h08); tm_frame.push_back(8'd2);
    while (tm_frame.size() < 60) tm_frame.push_back(8'h00);
  end

  int ec_seen = 0;     // EC starts so far
  int ec_t = 0;        // cycles since the last EC start
  always @(posedge clk) begin
    if (ec_req) begin ec_seen <= ec_seen + 1; ec_t <= 1; end
    else ec_t <= ec_t + 1;
  end

  initial begin
    forever begin
      do @(posedge clk); while (!ec_req);
      repeat (50) @(posedge clk);
      if (ec_seen != SKIP_EC) begin   // ec_seen = index of the next EC
        foreach (tm_frame[i]) begin
          tm_in_valid <= 1'b1; tm_in_data <= tm_frame[i]; tm_in_last <= (i == tm_frame.size() - 1);
          @(posedge clk);
        end
        tm_in_valid <= 1'b0; tm_in_last <= 1'b0;
        tm_sent++;
      end
    end
  end

  // FTT requests reaching the master
  bq_t rq_bytes = {};
  int  rq_frames = 0;
  int unsigned rq_expect;
  always @(posedge clk) if (rq_valid) begin
    rq_bytes.push_back(rq_data);
    if (rq_last) begin
      rq_frames++;
      check(rq_port == PORT_W'(1), "request arrives from port 1");
      check(sig(rq_bytes) == rq_expect, "request content");
      rq_bytes = {};
    end
  end

  // ---------------- transmit side of the MACs ----------------
  int tm_off [N];
  int tm_rx [N];
  int n_sync_out = 0, n_async_out = 0, n_nrt_out = 0, n_learned = 0;

  function automatic int wire_bytes(int len);
    return (len < 60 ? 60 : len) + 24;
  endfunction

  task automatic frame_done(int p, bq_t f, int start);
    int unsigned s = sig(f);
    bit found = 0;
    int t_lo = start - tm_off[p] - 2;   // earliest possible start at the scheduler
    int t_hi = start - tm_off[p] + 4;   // latest possible start at the scheduler
    if (f.size() >= 16 && f[12] == 8'h8F && f[13] == 8'hF0 && f[14] == FT_TM) begin
      check(s == sig(tm_frame), "TM content");
      if (tm_off[p] < 0) tm_off[p] = start;
      check(start == tm_off[p], $sformatf("TM at fixed offset in the EC (%0d vs %0d)", start, tm_off[p]));
      tm_rx[p]++;
      return;
    end
    if (f.size() >= 16 && f[12] == 8'h8F && f[13] == 8'hF0 && f[14] == FT_SYNC) begin
      n_sync_out++;
      check(t_lo < SYNC_END, "sync frame inside the synchronous window");
    end else if (f.size() >= 16 && f[12] == 8'h8F && f[13] == 8'hF0 && f[14] == FT_ASYNC) begin
      n_async_out++;
      check(t_hi >= SYNC_END && t_lo + wire_bytes(f.size()) <= ASYNC_END,
            $sformatf("async frame inside the asynchronous window (start %0d)", t_lo));
    end else begin
      n_nrt_out++;
      check(t_hi >= ASYNC_END && t_lo + wire_bytes(f.size()) <= EC,
            $sformatf("NRT frame inside the NRT window (start %0d)", t_lo));
      if (p == 2 && f[5] == 8'hA2) n_learned++;
    end
    foreach (exp_q[p][i]) if (!found && exp_q[p][i] == s) begin exp_q[p].delete(i); found = 1; end
    foreach (opt_q[i]) if (!found && opt_q[i] == s) begin opt_q.delete(i); found = 1; end
    check(found, $sformatf("frame of %0d bytes on port %0d was expected", f.size(), p));
  endtask

  for (genvar gp = 0; gp < N; gp++) begin : g_mac_tx
    int   st = 0, k = 0, start = 0;
    bq_t  buf_q;
    initial begin mac_tx_ack[gp] = 1'b0; tm_rx[gp] = 0; tm_off[gp] = -1; end
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

  // ---------------- event counters ----------------
  int n_tm = 0, n_trash = 0, n_flood = 0, n_quota = 0, n_missing = 0, n_hold = 0;
  always @(posedge clk) begin
    n_tm      += $countones(ev_tm);
    n_trash   += $countones(ev_trash);
    n_hold    += $countones(ev_hold);
    n_flood   += int'(ev_flood);
    n_quota   += int'(ev_quota_drop);
    n_missing += int'(ev_tm_missing);
    if (ev_rx_overflow != '0) check(1'b0, "no receive FIFO overflow");
  end

  task automatic wait_ec(int k, int t);
    wait (ec_seen == k + 1);
    wait (ec_t >= t);
  endtask

  // ---------------- scenario ----------------
  bq_t f;
  initial begin
    for (int p = 0; p < N; p++) begin
      mac_rx_data[p] = '0; mac_rx_data_valid[p] = 0; mac_rx_good_frame[p] = 0; mac_rx_bad_frame[p] = 0;
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (cfg_done[0] && cfg_done[1] && cfg_done[2] && cfg_done[3]);
    check(host_addr[0] == 10'h300, "configuration unit wrote its last register");
    @(posedge clk); enable <= 1'b1;

    // EC 1
    wait_ec(1, 200);
    fork
      begin
        f = mk_ftt(FT_SYNC, 5, 100, 1); expect_on(f, 4'b0110); send(0, f);
        send(0, mk_ftt(FT_SYNC, 9, 80, 2));                        // unscheduled: trashed
      end
      begin
        bq_t g = mk_ftt(FT_ASYNC, 7, 120, 3); expect_on(g, 4'b1000); send(1, g);
        g = mk_ftt(FT_REQ, 1, 40, 4); rq_expect = sig(g); send(1, g);
      end
      begin
        bq_t g = mk_nrt(MAC_UNK, MAC_A2, 200, 5); expect_on(g, 4'b1011); send(2, g);  // flooded
      end
      begin
        send(3, mk_nrt(MAC_A2, MAC_A3, 100, 6), 1'b0);             // bad FCS: trashed
      end
    join

    // EC 2
    wait_ec(2, 200);
    fork
      begin
        bq_t g = mk_ftt(FT_ASYNC, 7, 120, 7); send(1, g);            // too early: trashed
      end
      begin
        bq_t g = mk_nrt(MAC_A2, MAC_A3, 150, 8); expect_on(g, 4'b0100); send(3, g);  // learned
      end
      begin
        bq_t g = mk_ftt(FT_SYNC, 5, 100, 9); expect_on(g, 4'b0110); send(0, g);
        g = mk_ftt(FT_SYNC, 5, 100, 10); send(0, g);               // second in one EC: trashed
      end
    join

    // EC 3
    wait_ec(3, 200);
    begin
      bq_t g = mk_ftt(FT_ASYNC, 7, 300, 11); expect_on(g, 4'b1000); send(1, g);   // on time
    end
    wait_ec(3, EC - 2000);
    begin
      bq_t g = mk_nrt(MAC_A3, MAC_A0, 1500, 12); expect_on(g, 4'b1000); send(0, g); // too late: held
    end

    // EC 4: more NRT frames than the NRT memory subdivision holds
    wait_ec(4, 200);
    for (int i = 0; i < 44; i++) begin
      bq_t g = mk_nrt(MAC_A3, MAC_A2, 64, 100 + i); opt_q.push_back(sig(g)); send(2, g);
    end

    // EC 5: no Trigger Message, so no FTT frame is valid
    wait_ec(5, 200);
    send(0, mk_ftt(FT_SYNC, 5, 100, 13));

    // EC 6: schedule back
    wait_ec(6, 200);
    begin
      bq_t g = mk_ftt(FT_SYNC, 5, 64, 14); expect_on(g, 4'b0110); send(0, g);
    end

    wait_ec(7, 1000);
    for (int p = 0; p < N; p++) begin
      check(exp_q[p].size() == 0, $sformatf("all expected frames left port %0d (%0d missing)", p, exp_q[p].size()));
      check(tm_rx[p] == 6, $sformatf("port %0d sent 6 TMs (got %0d)", p, tm_rx[p]));
    end
    check(n_tm == 4 * 6, "TM broadcast count");
    check(n_missing == 2, $sformatf("missing TM in EC 0 and EC 5 (%0d)", n_missing));
    check(n_trash == 5, $sformatf("five frames trashed by validation (%0d)", n_trash));
    check(n_flood >= 1, "flooding happened");
    check(n_learned == 1, "learned unicast delivered to port 2 only");
    check(n_hold >= 1, "NRT frame held for lack of time");
    check(n_quota >= 1, $sformatf("NRT quota drop happened (%0d)", n_quota));
    check(rq_frames == 1, "one FTT request relayed to the master");
    check(n_sync_out == 6 && n_async_out == 2, $sformatf("sync %0d / async %0d frames sent", n_sync_out, n_async_out));
    check(free_blocks == (BLK_W+1)'(72 - 4), $sformatf("all blocks back but the spares (%0d free)", free_blocks));
    $display("mechanisms: tm=%0d missing=%0d trash=%0d flood=%0d learned=%0d hold=%0d quota=%0d req=%0d sync=%0d async=%0d nrt=%0d",
             n_tm, n_missing, n_trash, n_flood, n_learned, n_hold, n_quota, rq_frames, n_sync_out, n_async_out, n_nrt_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8 * EC + 20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
